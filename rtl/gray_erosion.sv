// gray_erosion: gray-scale erosion with a flat 3x3 structuring element.
//
// The output is the smallest of the nine window pixels, taken from the
// shared 9-stage sorting network: 9 cycles of latency, as budgeted for
// erosion. The flat 3x3 structuring element is this design's choice.
module gray_erosion #(
  parameter int DW = 8,
  parameter int SW = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [8:0][DW-1:0]  in_win,
  input  logic [SW-1:0]       in_sb,
  output logic [DW-1:0]       out_pix,
  output logic [SW-1:0]       out_sb
);

  logic [8:0][DW-1:0] sorted;
  logic [8:0][DW-1:0] unused_win;

  sort9_pipe #(.DW(DW), .SW(SW)) u_sort (
    .clk, .rst_n, .in_win, .in_sb,
    .sorted, .out_win(unused_win), .out_sb
  );

  assign out_pix = sorted[0];

endmodule
