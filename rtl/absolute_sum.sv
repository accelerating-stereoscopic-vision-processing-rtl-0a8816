// absolute_sum: gradient magnitude |gx| + |gy| of two convolution results.
//
// One register stage (latency 1, as budgeted for this block). The output
// keeps the full range, one bit wider than the inputs, without saturation.
// gx and gy must arrive in the same clock; their side-band words are equal,
// and the one of gx is passed on.
module absolute_sum #(
  parameter int IW = 12,
  parameter int SW = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [IW-1:0] gx,
  input  logic signed [IW-1:0] gy,
  input  logic [SW-1:0]        in_sb,
  output logic [IW:0]          mag,
  output logic [SW-1:0]        out_sb
);

  logic [IW-1:0] ax, ay;
  assign ax = gx[IW-1] ? IW'(-gx) : IW'(gx);
  assign ay = gy[IW-1] ? IW'(-gy) : IW'(gy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag    <= '0;
      out_sb <= '0;
    end else begin
      mag    <= {1'b0, ax} + {1'b0, ay};
      out_sb <= in_sb;
    end
  end

endmodule
