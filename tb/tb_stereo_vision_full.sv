// tb_stereo_vision_full: end-to-end test at the default size, 800x480 pixels
// and a 40-pixel search range: one complete search of a frame pair.
// The design is connected port for port to stereo_top_harness, which plays
// the two cameras and the SDRAM and checks every result.
module tb_stereo_vision_full;
  import stereo_pkg::*;

  localparam int W = 800, H = 480, D = 40;
  localparam int N = W * H, AW = $clog2(N);
  localparam int XW = $clog2(W), YW = $clog2(H), DDW = (D > 1) ? $clog2(D) : 1;

  logic           clk, rst_n;
  logic           cam_l_fval, cam_l_lval, cam_r_fval, cam_r_lval;
  rgb_t           cam_l_rgb, cam_r_rgb;
  logic [12:0]    thr_level;
  morph_sel_e     morph_sel;
  logic           mem_we [2], mem_re [2];
  logic [AW-1:0]  mem_waddr [2], mem_raddr [2];
  logic [7:0]     mem_wdata [2], mem_rdata [2];
  logic           sad_valid, ssd_valid, corr_valid;
  logic [11:0]    sad_val;
  logic [19:0]    ssd_val, corr_val;
  logic [XW-1:0]  sad_x, ssd_x, corr_x;
  logic [YW-1:0]  sad_y, ssd_y, corr_y;
  logic [DDW-1:0] sad_d, ssd_d, corr_d;
  logic           frame_start_l, frame_start_r, busy, scan_done;
  logic [15:0]    frames_dropped;

  stereo_vision_top dut (.*);
  stereo_top_harness #(.W(W), .H(H), .D(D), .NSEARCH(1)) harness (.*);
endmodule
