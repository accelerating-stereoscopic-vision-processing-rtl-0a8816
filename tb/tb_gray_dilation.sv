// tb_gray_dilation: random 3x3 windows; the output must be the window maximum 9 clocks
// later, and the forwarded window must be the input window 9 clocks later.
module tb_gray_dilation;
  import tb_ref_pkg::*;

  localparam int L = 9;
  localparam int NCYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [8:0][7:0] in_win;
  logic [1:0] in_sb, out_sb;
  logic [7:0] out_pix;
  logic [8:0][7:0] out_win;

  gray_dilation #(.DW(8), .SW(2)) dut (.clk, .rst_n, .in_win, .in_sb, .out_pix, .out_win, .out_sb);

  int hw [NCYC + 32][9];

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
    in_win = '0; in_sb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NCYC; p++) begin
      @(negedge clk);
      e = p - L + 1;
      if (e >= 1) begin
        w = hw[e];
        ex = rank9(w, 8);
        checks++;
        if (int'(out_pix) != ex || out_sb != hs[e]) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: got %0d exp %0d", e, out_pix, ex);
        end
        for (int i = 0; i < 9; i++) begin
          checks++;
          if (int'(out_win[i]) != w[i]) failures++;
        end
      end
      for (int i = 0; i < 9; i++) begin
        hw[p+1][i] = pick(p, i);
        in_win[i] = 8'(hw[p+1][i]);
      end
      in_sb = 2'($urandom);
      hs[p+1] = in_sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
