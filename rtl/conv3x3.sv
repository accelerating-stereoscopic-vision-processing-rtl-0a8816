// conv3x3: 3x3 convolution (multiply and sum) with a fixed mask.
//
// K holds the mask row by row (K[r*3+c] multiplies window pixel win[r*3+c],
// row 0 being the oldest line). Stage 1 registers the nine signed products,
// stage 2 registers their sum: a latency of 2 cycles and one result per
// clock, as budgeted for the convolution block. The default mask is the
// horizontal-edge Sobel operator; the pre-processing unit runs two of these
// side by side, one with each Sobel mask. OW must hold the largest possible
// sum (12 bits covers Sobel on 8-bit pixels with margin).
module conv3x3 #(
  parameter int DW = 8,
  parameter int SW = 2,
  parameter int OW = 12,
  parameter int K [9] = '{-1, -2, -1,
                           0,  0,  0,
                           1,  2,  1}
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [8:0][DW-1:0]        in_win,
  input  logic [SW-1:0]             in_sb,
  output logic signed [OW-1:0]      out_val,
  output logic [SW-1:0]             out_sb
);

  logic signed [OW-1:0] prod [9];
  logic [SW-1:0]        s1_sb;
  logic signed [OW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 9; i++) sum += prod[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) prod[i] <= '0;
      s1_sb   <= '0;
      out_val <= '0;
      out_sb  <= '0;
    end else begin
      for (int i = 0; i < 9; i++)
        prod[i] <= OW'($signed({1'b0, in_win[i]}) * K[i]);
      s1_sb   <= in_sb;
      out_val <= sum;
      out_sb  <= s1_sb;
    end
  end

endmodule
