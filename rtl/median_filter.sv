// median_filter: 3x3 median of a window stream.
//
// The nine window pixels go through the shared 9-stage sorting network
// (sort9_pipe) and the fifth smallest value is the output. One window is
// accepted per clock; the result and the side-band of the window appear
// 9 cycles later, the latency budgeted for the median filter. The sorting
// network is this design's choice of insides.
module median_filter #(
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

  assign out_pix = sorted[4];

endmodule
