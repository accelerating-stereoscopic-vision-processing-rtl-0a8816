// gray_dilation: gray-scale dilation with a flat 3x3 structuring element.
//
// The output is the largest of the nine window pixels, taken from the
// shared 9-stage sorting network, so the latency is 9 cycles as budgeted
// for dilation. The window is also passed on, delayed by the same 9 cycles,
// because in the pre-processing chain the erosion block follows the
// dilation block without a window builder of its own. The flat 3x3
// structuring element is this design's choice.
module gray_dilation #(
  parameter int DW = 8,
  parameter int SW = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [8:0][DW-1:0]  in_win,
  input  logic [SW-1:0]       in_sb,
  output logic [DW-1:0]       out_pix,
  output logic [8:0][DW-1:0]  out_win,
  output logic [SW-1:0]       out_sb
);

  logic [8:0][DW-1:0] sorted;

  sort9_pipe #(.DW(DW), .SW(SW)) u_sort (
    .clk, .rst_n, .in_win, .in_sb,
    .sorted, .out_win, .out_sb
  );

  assign out_pix = sorted[8];

endmodule
