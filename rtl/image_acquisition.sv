// image_acquisition: turns a camera's parallel bus into a framed pixel stream.
//
// The camera presents frame-valid, line-valid and a 24-bit RGB word in the
// system clock domain, one pixel per clock. The block registers the bus,
// waits for a rising edge of frame-valid so that capture never begins in the
// middle of a frame, and then marks every pixel with both valid flags high as
// valid; the first such pixel of a frame also carries start-of-frame.
//
// Timing: the output word for a bus sample taken at clock edge e appears
// after edge e+5, i.e. a latency of 6 cycles as the pre-processing latency
// budget gives for acquisition. Stages 1-3 do the work (input register,
// edge detection, framing); stages 4-6 are pipeline registers. A frame
// that is already running when reset ends is skipped.
//
// The bus format and the framing rules are this design's choice; only the
// block's place in the chain and its latency come from the system
// description. A frame must be sent with its lines back to back (no blanking
// inside the frame), because the window builders downstream count clocks.
module image_acquisition
  import stereo_pkg::*;
#(
  parameter int LATENCY = 6   // must be >= 3
) (
  input  logic  clk,
  input  logic  rst_n,
  // camera parallel bus
  input  logic  cam_fval,
  input  logic  cam_lval,
  input  rgb_t  cam_rgb,
  // framed RGB stream
  output rgb_t  out_rgb,
  output sb_t   out_sb,
  // a frame-valid rising edge was seen (one pulse per frame)
  output logic  frame_start
);

  // stage 1: input registers
  logic  s1_fval, s1_lval;
  rgb_t  s1_rgb;
  // stage 2: edge detection
  logic  s2_fval_d, s2_rise;
  logic  s2_fval, s2_lval;
  rgb_t  s2_rgb;
  // stage 3: framing
  logic  armed;       // a frame is being captured
  logic  first_pend;  // the next valid pixel is the first of the frame
  rgb_t  s3_rgb;
  sb_t   s3_sb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // frame-valid is taken as high during reset, so a frame already
      // running when reset ends is not mistaken for a new one
      s1_fval <= 1'b1; s1_lval <= 1'b0; s1_rgb <= '0;
      s2_fval <= 1'b0; s2_lval <= 1'b0; s2_rgb <= '0;
      s2_fval_d <= 1'b1; s2_rise <= 1'b0;
      armed <= 1'b0; first_pend <= 1'b0;
      s3_rgb <= '0; s3_sb <= '0;
    end else begin
      s1_fval <= cam_fval;
      s1_lval <= cam_lval;
      s1_rgb  <= cam_rgb;

      s2_fval   <= s1_fval;
      s2_lval   <= s1_lval;
      s2_rgb    <= s1_rgb;
      s2_fval_d <= s1_fval;
      s2_rise   <= s1_fval & ~s2_fval_d;

      // framing
      if (s2_rise) begin
        armed      <= 1'b1;
        first_pend <= 1'b1;
      end else if (!s2_fval) begin
        armed      <= 1'b0;
      end
      if (s2_fval && s2_lval && (armed || s2_rise)) begin
        s3_sb.valid <= 1'b1;
        s3_sb.sof   <= first_pend || s2_rise;
        s3_rgb      <= s2_rgb;
        first_pend  <= 1'b0;
      end else begin
        s3_sb  <= '0;
        s3_rgb <= '0;
      end
    end
  end

  // stages 4..LATENCY: plain pipeline registers
  localparam int NPAD = LATENCY - 3;
  rgb_t pad_rgb [NPAD+1];
  sb_t  pad_sb  [NPAD+1];
  assign pad_rgb[0] = s3_rgb;
  assign pad_sb[0]  = s3_sb;
  for (genvar i = 0; i < NPAD; i++) begin : g_pad
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pad_rgb[i+1] <= '0;
        pad_sb[i+1]  <= '0;
      end else begin
        pad_rgb[i+1] <= pad_rgb[i];
        pad_sb[i+1]  <= pad_sb[i];
      end
    end
  end
  assign out_rgb     = pad_rgb[NPAD];
  assign out_sb      = pad_sb[NPAD];
  assign frame_start = s2_rise;

endmodule
