// correlation_metric: cross-correlation of two 3x3 windows.
//
// The plain (unnormalised) correlation sum of L*R over the nine pixel
// pairs. Stage 1 registers the nine products, stage 2 their sum: one result
// per clock with a latency of 2 cycles, as budgeted for the correlation
// block. A larger value means a better match. The side-band word travels
// alongside. Leaving out normalisation is this design's choice.
module correlation_metric #(
  parameter int DW = 8,
  parameter int SW = 1,
  localparam int PW = 2 * DW,
  localparam int OW = 2 * DW + 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [8:0][DW-1:0]  win_l,
  input  logic [8:0][DW-1:0]  win_r,
  input  logic [SW-1:0]       in_sb,
  output logic [OW-1:0]       out_val,
  output logic [SW-1:0]       out_sb
);

  logic [PW-1:0] prod [9];
  logic [SW-1:0] s1_sb;
  logic [OW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 9; i++) sum += OW'(prod[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) prod[i] <= '0;
      s1_sb <= '0; out_val <= '0; out_sb <= '0;
    end else begin
      for (int i = 0; i < 9; i++) prod[i] <= PW'(win_l[i]) * PW'(win_r[i]);
      s1_sb   <= in_sb;
      out_val <= sum;
      out_sb  <= s1_sb;
    end
  end

endmodule
