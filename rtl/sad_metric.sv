// sad_metric: sum of absolute differences of two 3x3 windows.
//
// Stage 1 registers the nine |L-R| values, stage 2 their sum: one result per
// clock with a latency of 2 cycles, as budgeted for the SAD block. The
// side-band word (valid and tag) of the window pair travels alongside.
// A smaller value means a better match; the largest result is 9*255.
module sad_metric #(
  parameter int DW = 8,
  parameter int SW = 1,
  localparam int OW = DW + 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [8:0][DW-1:0]  win_l,
  input  logic [8:0][DW-1:0]  win_r,
  input  logic [SW-1:0]       in_sb,
  output logic [OW-1:0]       out_val,
  output logic [SW-1:0]       out_sb
);

  logic [DW-1:0] ad [9];
  logic [SW-1:0] s1_sb;
  logic [OW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 9; i++) sum += OW'(ad[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) ad[i] <= '0;
      s1_sb <= '0; out_val <= '0; out_sb <= '0;
    end else begin
      for (int i = 0; i < 9; i++)
        ad[i] <= (win_l[i] > win_r[i]) ? win_l[i] - win_r[i] : win_r[i] - win_l[i];
      s1_sb   <= in_sb;
      out_val <= sum;
      out_sb  <= s1_sb;
    end
  end

endmodule
