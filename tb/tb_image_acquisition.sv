// tb_image_acquisition: a camera bus with a frame already running when
// reset ends (must be skipped), then frames with line and frame blanking.
// Every bus sample with both valid flags inside an accepted frame must come
// out 6 clocks later as a valid pixel; the first pixel of each frame must
// carry start-of-frame; everything else must come out invalid.
module tb_image_acquisition;
  import stereo_pkg::*;

  localparam int L = 6;
  localparam int NCYC = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, sof_seen = 0, skipped = 0;

  logic cam_fval, cam_lval, frame_start;
  rgb_t cam_rgb, out_rgb;
  sb_t  out_sb;

  image_acquisition dut (.clk, .rst_n, .cam_fval, .cam_lval, .cam_rgb, .out_rgb, .out_sb, .frame_start);

  // expected output per sampled edge
  rgb_t ex_rgb [NCYC + 16];
  sb_t  ex_sb  [NCYC + 16];

  initial begin
    repeat (NCYC * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, ph;
    bit prev_f, armed, first;
    cam_fval = 1'b1; cam_lval = 1'b1; cam_rgb = '0;
    prev_f = 1'b1; armed = 1'b0; first = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NCYC; p++) begin
      @(negedge clk);
      e = p - L + 1;
      if (e >= 1) begin
        checks++;
        if (out_sb != ex_sb[e] || (ex_sb[e].valid && out_rgb != ex_rgb[e])) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: sb %b exp %b", e, out_sb, ex_sb[e]);
        end
        if (out_sb.valid && out_sb.sof) sof_seen++;
      end
      // bus: the first 150 clocks finish a frame begun before reset; then
      // frames of 5 lines x 20 pixels with 6 clocks of line blanking; each
      // line starts 3 clocks after the start of its 26-clock slot
      if (p < 150) begin
        cam_fval = 1'b1; cam_lval = (p % 26) < 20;
      end else begin
        ph = (p - 150) % 190;
        cam_fval = (ph >= 20) && (ph < 20 + 5 * 26);
        cam_lval = cam_fval && (((ph - 20) % 26) >= 3) && (((ph - 20) % 26) < 23);
      end
      cam_rgb = rgb_t'($urandom);
      // reference framing
      if (cam_fval && !prev_f) begin armed = 1'b1; first = 1'b1; end
      else if (!cam_fval) armed = 1'b0;
      if (cam_fval && cam_lval && !armed) skipped++;
      ex_sb[p+1]  = '{valid: cam_fval && cam_lval && armed, sof: cam_fval && cam_lval && armed && first};
      ex_rgb[p+1] = cam_rgb;
      if (cam_fval && cam_lval && armed) first = 1'b0;
      prev_f = cam_fval;
    end
    checks++;
    if (sof_seen < 15 || skipped == 0) begin
      failures++;
      $display("framing not exercised: sof %0d skipped %0d", sof_seen, skipped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
