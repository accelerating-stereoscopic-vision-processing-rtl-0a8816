// stereo_vision_top: two-camera stereo vision pipeline.
//
// Each camera feeds its own pre-processing unit (acquisition, gray
// conversion, median, Sobel edge magnitude, threshold, morphology); the two
// units run in parallel on the same clock. Their output streams are stored
// in an external SDRAM through the disparity unit's memory controller,
// which then reads both images back and computes the SAD, SSD and
// correlation values for every searched window pair and disparity.
//
// The SDRAM (two write ports, two read ports, read data one clock after the
// request) is outside this module and is reached through the mem_* ports.
// The metric outputs go to the output frame memory and display, which are
// also outside. Timing: a frame leaves pre-processing 6W+47 cycles after it
// entered; the search then takes D*W*H + 2W+25 cycles, during which new
// frames are dropped (counted in frames_dropped).
module stereo_vision_top
  import stereo_pkg::*;
#(
  parameter int W = 800,
  parameter int H = 480,
  parameter int D = 40,
  localparam int N   = W * H,
  localparam int AW  = $clog2(N),
  localparam int XW  = $clog2(W),
  localparam int YW  = $clog2(H),
  localparam int DDW = (D > 1) ? $clog2(D) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // camera 1 (left) and camera 2 (right) parallel buses
  input  logic           cam_l_fval,
  input  logic           cam_l_lval,
  input  rgb_t           cam_l_rgb,
  input  logic           cam_r_fval,
  input  logic           cam_r_lval,
  input  rgb_t           cam_r_rgb,
  // pre-processing settings, shared by both units
  input  logic [12:0]    thr_level,
  input  morph_sel_e     morph_sel,
  // external SDRAM
  output logic           mem_we    [2],
  output logic [AW-1:0]  mem_waddr [2],
  output logic [7:0]     mem_wdata [2],
  output logic           mem_re    [2],
  output logic [AW-1:0]  mem_raddr [2],
  input  logic [7:0]     mem_rdata [2],
  // disparity metric outputs
  output logic           sad_valid,
  output logic [11:0]    sad_val,
  output logic           ssd_valid,
  output logic [19:0]    ssd_val,
  output logic           corr_valid,
  output logic [19:0]    corr_val,
  output logic [XW-1:0]  sad_x,  ssd_x,  corr_x,
  output logic [YW-1:0]  sad_y,  ssd_y,  corr_y,
  output logic [DDW-1:0] sad_d,  ssd_d,  corr_d,
  // status
  output logic           frame_start_l,
  output logic           frame_start_r,
  output logic           busy,
  output logic           scan_done,
  output logic [15:0]    frames_dropped
);

  pix8_t pp_pix [2];
  sb_t   pp_sb  [2];

  preprocessing_unit #(.W(W)) u_pp_l (
    .clk, .rst_n, .cam_fval(cam_l_fval), .cam_lval(cam_l_lval), .cam_rgb(cam_l_rgb),
    .thr_level, .morph_sel, .out_pix(pp_pix[0]), .out_sb(pp_sb[0]),
    .frame_start(frame_start_l)
  );

  preprocessing_unit #(.W(W)) u_pp_r (
    .clk, .rst_n, .cam_fval(cam_r_fval), .cam_lval(cam_r_lval), .cam_rgb(cam_r_rgb),
    .thr_level, .morph_sel, .out_pix(pp_pix[1]), .out_sb(pp_sb[1]),
    .frame_start(frame_start_r)
  );

  logic [7:0] du_pix   [2];
  logic       du_valid [2];
  logic       du_sof   [2];
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      du_pix[k]   = pp_pix[k];
      du_valid[k] = pp_sb[k].valid;
      du_sof[k]   = pp_sb[k].sof;
    end
  end

  disparity_unit #(.W(W), .H(H), .D(D)) u_du (
    .clk, .rst_n,
    .in_pix(du_pix), .in_valid(du_valid), .in_sof(du_sof),
    .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr, .mem_rdata,
    .sad_valid, .sad_val, .ssd_valid, .ssd_val, .corr_valid, .corr_val,
    .sad_x, .ssd_x, .corr_x, .sad_y, .ssd_y, .corr_y, .sad_d, .ssd_d, .corr_d,
    .busy, .scan_done, .frames_dropped
  );

endmodule
