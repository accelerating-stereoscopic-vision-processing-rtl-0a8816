// ssd_metric: sum of squared differences of two 3x3 windows.
//
// Pipeline, one result per clock:
//   stage 1       nine absolute differences a = |L-R|
//   stages 2-9    shift-add squaring, one bit of a per stage:
//                 acc += a[j] ? (a << j) : 0
//   stages 10-13  adder tree 9 -> 5 -> 3 -> 2 -> 1
//   stages 14-18  output registers
// giving the 18-cycle latency the system description gives for its SSD
// block. The squaring and tree structure are this design's choice; the
// last five registers only bring the latency to that figure and give the
// slower multiplier path room for retiming. The side-band word travels
// alongside. A smaller value means a better match (largest 9*255*255).
module ssd_metric #(
  parameter int DW = 8,
  parameter int SW = 1,
  parameter int LATENCY = 18,           // >= 13
  localparam int SQ = 2 * DW,
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

  localparam int NPAD = LATENCY - 1 - DW - 4;

  // stage 1 + squaring stages: operand and running sum per element
  logic [8:0][DW-1:0] op  [DW+1];
  logic [8:0][SQ-1:0] acc [DW+1];
  logic [SW-1:0]      sb  [LATENCY+1];

  assign sb[0] = in_sb;
  for (genvar s = 0; s < LATENCY; s++) begin : g_sb
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) sb[s+1] <= '0;
      else        sb[s+1] <= sb[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op[0]  <= '0;
      acc[0] <= '0;
    end else begin
      for (int i = 0; i < 9; i++) begin
        op[0][i]  <= (win_l[i] > win_r[i]) ? win_l[i] - win_r[i] : win_r[i] - win_l[i];
        acc[0][i] <= '0;
      end
    end
  end

  for (genvar j = 0; j < DW; j++) begin : g_sq
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        op[j+1]  <= '0;
        acc[j+1] <= '0;
      end else begin
        op[j+1] <= op[j];
        for (int i = 0; i < 9; i++)
          acc[j+1][i] <= acc[j][i] + (op[j][i][j] ? (SQ'(op[j][i]) << j) : '0);
      end
    end
  end

  // adder tree
  logic [4:0][OW-1:0] t1;
  logic [2:0][OW-1:0] t2;
  logic [1:0][OW-1:0] t3;
  logic [OW-1:0]      t4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0; t2 <= '0; t3 <= '0; t4 <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        t1[i] <= OW'(acc[DW][2*i]) + OW'(acc[DW][2*i+1]);
      t1[4] <= OW'(acc[DW][8]);
      t2[0] <= t1[0] + t1[1];
      t2[1] <= t1[2] + t1[3];
      t2[2] <= t1[4];
      t3[0] <= t2[0] + t2[1];
      t3[1] <= t2[2];
      t4    <= t3[0] + t3[1];
    end
  end

  // output registers
  logic [OW-1:0] pad [NPAD+1];
  assign pad[0] = t4;
  for (genvar p = 0; p < NPAD; p++) begin : g_pad
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) pad[p+1] <= '0;
      else        pad[p+1] <= pad[p];
  end

  assign out_val = pad[NPAD];
  assign out_sb  = sb[LATENCY];

endmodule
