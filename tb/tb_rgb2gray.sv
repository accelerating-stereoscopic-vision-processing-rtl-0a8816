// tb_rgb2gray: random RGB pixels, checked against the BT.601 integer
// formula, with the 2-cycle latency checked by comparing each output with
// the input sampled two clocks earlier.
module tb_rgb2gray;
  import stereo_pkg::*;
  import tb_ref_pkg::*;

  localparam int L = 2;
  localparam int NCYC = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  rgb_t  in_rgb;
  sb_t   in_sb;
  pix8_t out_gray;
  sb_t   out_sb;

  rgb2gray dut (.clk, .rst_n, .in_rgb, .in_sb, .out_gray, .out_sb);

  rgb_t hist_rgb [NCYC + 8];
  sb_t  hist_sb  [NCYC + 8];

  initial begin
    repeat (NCYC * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, exp_g;
    in_rgb = '0; in_sb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NCYC; p++) begin
      @(negedge clk);
      // outputs now reflect the input sampled at edge p-L+1
      e = p - L + 1;
      if (e >= 1) begin
        exp_g = gray_of(hist_rgb[e].r, hist_rgb[e].g, hist_rgb[e].b);
        checks++;
        if (out_gray != 8'(exp_g) || out_sb != hist_sb[e]) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: got %0d exp %0d", e, out_gray, exp_g);
        end
      end
      // drive the input for edge p+1
      case (p % 50)
        0: in_rgb = '{r: 8'hff, g: 8'hff, b: 8'hff};
        1: in_rgb = '0;
        default: in_rgb = rgb_t'($urandom);
      endcase
      in_sb = sb_t'($urandom);
      hist_rgb[p+1] = in_rgb;
      hist_sb[p+1]  = in_sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
