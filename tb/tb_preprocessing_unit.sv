// tb_preprocessing_unit: two 12x8 RGB frames through the whole chain, the
// first with erosion selected and the second with dilation. Every output
// pixel is compared with a software model of the chain (gray, median,
// Sobel magnitude, threshold, morphology on the raster stream). The first
// output pixel of each frame must carry start-of-frame and leave exactly
// 6W+47 clocks after the frame's first pixel went in. Both binary levels
// must occur in the output.
module tb_preprocessing_unit;
  import stereo_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 12, H = 8, N = W * H;
  localparam int L = 6 * W + 47;
  localparam int THR = 160;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cam_fval, cam_lval, frame_start;
  rgb_t        cam_rgb;
  logic [12:0] thr_level;
  morph_sel_e  morph_sel;
  pix8_t       out_pix;
  sb_t         out_sb;

  preprocessing_unit #(.W(W)) dut (.*);

  img_t frame [2], expect_img [2];
  int cyc = 0, got = 0, ones = 0, zeros = 0;
  int start_cyc [2];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // blocky image with some noise, so that there are edges and flat parts
  function automatic img_t make_frame(int seed);
    img_t f;
    f = new[N];
    for (int i = 0; i < N; i++) begin
      int x, y, base;
      x = i % W; y = i / W;
      base = ((x / 4 + y / 3 + seed) % 2) ? 200 : 30;
      f[i] = ((base + $urandom_range(0, 20)) << 16) | ((base + $urandom_range(0, 20)) << 8) | base;
    end
    return f;
  endfunction

  always @(posedge clk) cyc++;   // number of clock edges so far

  always @(negedge clk) begin
    if (out_sb.valid) begin
      int fr, i;
      fr = got / N; i = got % N;
      checks++;
      if (int'(out_pix) != expect_img[fr][i] || out_sb.sof != (i == 0)) begin
        failures++;
        if (failures < 10) $display("frame %0d pixel %0d: %0d exp %0d sof %b", fr, i, out_pix, expect_img[fr][i], out_sb.sof);
      end
      if (i == 0) begin
        checks++;
        if (cyc - start_cyc[fr] != L) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - start_cyc[fr], L);
        end
      end
      if (out_pix == 8'd255) ones++; else if (out_pix == 8'd0) zeros++;
      got++;
    end
  end

  initial begin
    cam_fval = 1'b0; cam_lval = 1'b0; cam_rgb = '0;
    thr_level = 13'(THR);
    morph_sel = MORPH_ERODE;
    for (int f = 0; f < 2; f++) begin
      frame[f] = make_frame(f);
      expect_img[f] = preprocess(frame[f], W, THR, f == 0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      morph_sel = (f == 0) ? MORPH_ERODE : MORPH_DILATE;
      for (int i = 0; i < N; i++) begin
        cam_fval = 1'b1; cam_lval = 1'b1;
        cam_rgb = rgb_t'(frame[f][i]);
        if (i == 0) start_cyc[f] = cyc;
        @(negedge clk);
      end
      cam_fval = 1'b0; cam_lval = 1'b0; cam_rgb = '0;
      repeat (L + 20) @(negedge clk);
    end
    checks++;
    if (got != 2 * N || ones == 0 || zeros == 0) begin
      failures++;
      $display("got %0d pixels, %0d at 255, %0d at 0", got, ones, zeros);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
