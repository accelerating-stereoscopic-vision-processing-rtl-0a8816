// preprocessing_unit: per-camera image pre-processing pipeline.
//
// Chain, one pixel per clock with no stalls:
//   image_acquisition (6) -> rgb2gray (2) -> neighborhood_loader (2W+3)
//   -> median_filter (9) -> neighborhood_loader (2W+3)
//   -> two conv3x3 in parallel, horizontal and vertical Sobel (2)
//   -> absolute_sum (1) -> threshold (0) -> neighborhood_loader (2W+3)
//   -> gray_dilation (9) -> gray_erosion (9)
// Numbers are latencies in clock cycles. The total is 6W+47, i.e. 4847 for
// an 800-pixel line, and an 800x480 frame leaves the unit 384,000 + 4,847
// cycles after its first pixel entered. The order of the blocks and their
// latencies follow the system description.
//
// Output pixel i of a frame is the result for the 3x3 window (at each
// window stage) whose top-left pixel is pixel i, so each window stage moves
// the image one pixel up and left; windows at the right edge wrap into the
// next line and windows below the last line see zeros. Before each window
// builder the data of invalid words is forced to zero, so the result only
// depends on the frame itself (provided the stream is idle for at least
// 6W+47 cycles after the frame, or the next frame follows).
//
// Only one window builder serves both morphology blocks, so erosion works
// on the same window as dilation (passed on by the dilation block).
// morph_sel chooses which result leaves the unit; the dilated pixel is
// delayed so that both choices have the same latency. thr_level is the
// binarisation level of the gradient magnitude. Both are this design's
// choices, as are the Sobel signs (see conv3x3).
module preprocessing_unit
  import stereo_pkg::*;
#(
  parameter int W = 800
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cam_fval,
  input  logic        cam_lval,
  input  rgb_t        cam_rgb,
  input  logic [12:0] thr_level,
  input  morph_sel_e  morph_sel,
  output pix8_t       out_pix,
  output sb_t         out_sb,
  output logic        frame_start
);

  localparam int SOBEL_H [9] = '{-1, -2, -1,
                                  0,  0,  0,
                                  1,  2,  1};
  localparam int SOBEL_V [9] = '{-1,  0,  1,
                                 -2,  0,  2,
                                 -1,  0,  1};

  // acquisition and gray conversion
  rgb_t  acq_rgb;
  sb_t   acq_sb;
  pix8_t gray;
  sb_t   gray_sb;

  image_acquisition u_acq (
    .clk, .rst_n, .cam_fval, .cam_lval, .cam_rgb,
    .out_rgb(acq_rgb), .out_sb(acq_sb), .frame_start
  );

  rgb2gray u_gray (
    .clk, .rst_n, .in_rgb(acq_rgb), .in_sb(acq_sb),
    .out_gray(gray), .out_sb(gray_sb)
  );

  // median stage
  logic [8:0][7:0] win1;
  sb_t             win1_sb;
  pix8_t           med;
  sb_t             med_sb;

  neighborhood_loader #(.W(W), .DW(8), .SW(SB_W)) u_nl1 (
    .clk, .rst_n, .in_data(gray_sb.valid ? gray : '0), .in_sb(gray_sb),
    .win(win1), .out_sb(win1_sb)
  );

  median_filter #(.DW(8), .SW(SB_W)) u_med (
    .clk, .rst_n, .in_win(win1), .in_sb(win1_sb),
    .out_pix(med), .out_sb(med_sb)
  );

  // edge stage: two Sobel convolutions in parallel, then |gx| + |gy|
  logic [8:0][7:0]    win2;
  sb_t                win2_sb;
  logic signed [11:0] gx, gy;
  sb_t                gx_sb, gy_sb_unused;
  logic [12:0]        mag;
  sb_t                mag_sb;

  neighborhood_loader #(.W(W), .DW(8), .SW(SB_W)) u_nl2 (
    .clk, .rst_n, .in_data(med_sb.valid ? med : '0), .in_sb(med_sb),
    .win(win2), .out_sb(win2_sb)
  );

  conv3x3 #(.DW(8), .SW(SB_W), .OW(12), .K(SOBEL_H)) u_conv_h (
    .clk, .rst_n, .in_win(win2), .in_sb(win2_sb),
    .out_val(gx), .out_sb(gx_sb)
  );

  conv3x3 #(.DW(8), .SW(SB_W), .OW(12), .K(SOBEL_V)) u_conv_v (
    .clk, .rst_n, .in_win(win2), .in_sb(win2_sb),
    .out_val(gy), .out_sb(gy_sb_unused)
  );

  absolute_sum #(.IW(12), .SW(SB_W)) u_abs (
    .clk, .rst_n, .gx, .gy, .in_sb(gx_sb),
    .mag, .out_sb(mag_sb)
  );

  // binarisation
  pix8_t bin;
  sb_t   bin_sb;

  threshold #(.MW(13), .DW(8), .SW(SB_W)) u_thr (
    .mag, .level(thr_level), .in_valid(mag_sb.valid), .in_sb(mag_sb),
    .out_pix(bin), .out_sb(bin_sb)
  );

  // morphology stage
  logic [8:0][7:0] win3, win3_fwd;
  sb_t             win3_sb, dil_sb, ero_sb;
  pix8_t           dil, ero;

  neighborhood_loader #(.W(W), .DW(8), .SW(SB_W)) u_nl3 (
    .clk, .rst_n, .in_data(bin), .in_sb(bin_sb),
    .win(win3), .out_sb(win3_sb)
  );

  gray_dilation #(.DW(8), .SW(SB_W)) u_dil (
    .clk, .rst_n, .in_win(win3), .in_sb(win3_sb),
    .out_pix(dil), .out_win(win3_fwd), .out_sb(dil_sb)
  );

  gray_erosion #(.DW(8), .SW(SB_W)) u_ero (
    .clk, .rst_n, .in_win(win3_fwd), .in_sb(dil_sb),
    .out_pix(ero), .out_sb(ero_sb)
  );

  // dilated pixel delayed by the erosion latency
  pix8_t dil_d [9];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) dil_d[i] <= '0;
    end else begin
      dil_d[0] <= dil;
      for (int i = 1; i < 9; i++) dil_d[i] <= dil_d[i-1];
    end
  end

  assign out_pix = !ero_sb.valid             ? '0
                 : (morph_sel == MORPH_ERODE) ? ero
                 :                              dil_d[8];
  assign out_sb  = ero_sb;

endmodule
