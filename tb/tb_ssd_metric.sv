// tb_ssd_metric: random window pairs (including all-255 against all-0); the output
// must be the sum of squared differences exactly 18 clocks later.
module tb_ssd_metric;
  import tb_ref_pkg::*;

  localparam int L = 18;
  localparam int NCYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [8:0][7:0] win_l, win_r;
  logic [1:0] in_sb, out_sb;
  logic [19:0] out_val;

  ssd_metric #(.DW(8), .SW(2)) dut (.clk, .rst_n, .win_l, .win_r, .in_sb, .out_val, .out_sb);

  int hw [NCYC + 32][9];
  int hr [NCYC + 32][9];
  logic [1:0] hs [NCYC + 32];

  initial begin
    repeat (NCYC * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // windows with many repeated values, flat windows and extremes
  function automatic int pick(int p, int i);
    case (p % 6)
      0: return 255;
      1: return (i == 4) ? 255 : 0;
      2: return $urandom_range(0, 3);
      default: return $urandom_range(0, 255);
    endcase
  endfunction

  initial begin
    int e, ex;
    int w [9];
    win_l = '0; win_r = '0; in_sb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NCYC; p++) begin
      @(negedge clk);
      e = p - L + 1;
      if (e >= 1) begin
        w = hw[e];
        ex = ssd9(w, hr[e]);
        checks++;
        if (int'(out_val) != ex || out_sb != hs[e]) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: got %0d exp %0d", e, out_val, ex);
        end
      end
      for (int i = 0; i < 9; i++) begin
        hw[p+1][i] = pick(p, i);
        hr[p+1][i] = (p % 6 == 0) ? 0 : pick(p + 3, i);
        win_l[i] = 8'(hw[p+1][i]);
        win_r[i] = 8'(hr[p+1][i]);
      end
      in_sb = 2'($urandom);
      hs[p+1] = in_sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
