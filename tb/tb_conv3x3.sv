// tb_conv3x3: two instances, one with the default (horizontal Sobel) mask
// and one with an asymmetric mask, fed random windows; each output must be
// the signed multiply-and-sum of its mask, 2 clocks later.
module tb_conv3x3;
  localparam int L = 2;
  localparam int NCYC = 3000;
  localparam int KA [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
  localparam int KB [9] = '{3, -1, 0, 2, -4, 1, 0, 1, -2};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [8:0][7:0]    in_win;
  logic [1:0]         in_sb, sb_a, sb_b;
  logic signed [11:0] val_a, val_b;

  conv3x3 dut_a (.clk, .rst_n, .in_win, .in_sb, .out_val(val_a), .out_sb(sb_a));
  conv3x3 #(.DW(8), .SW(2), .OW(12), .K(KB)) dut_b (
    .clk, .rst_n, .in_win, .in_sb, .out_val(val_b), .out_sb(sb_b));

  int hw [NCYC + 8][9];
  logic [1:0] hs [NCYC + 8];

  initial begin
    repeat (NCYC * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, ea, eb;
    in_win = '0; in_sb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NCYC; p++) begin
      @(negedge clk);
      e = p - L + 1;
      if (e >= 1) begin
        ea = 0; eb = 0;
        for (int i = 0; i < 9; i++) begin
          ea += KA[i] * hw[e][i];
          eb += KB[i] * hw[e][i];
        end
        checks += 2;
        if (int'(val_a) != ea || sb_a != hs[e]) begin
          failures++;
          if (failures < 10) $display("A mismatch at %0d: %0d exp %0d", e, val_a, ea);
        end
        if (int'(val_b) != eb || sb_b != hs[e]) begin
          failures++;
          if (failures < 10) $display("B mismatch at %0d: %0d exp %0d", e, val_b, eb);
        end
      end
      for (int i = 0; i < 9; i++) begin
        case (p % 4)
          0: hw[p+1][i] = (i < 3) ? 0 : 255;
          1: hw[p+1][i] = (i >= 6) ? 0 : 255;
          default: hw[p+1][i] = $urandom_range(0, 255);
        endcase
        in_win[i] = 8'(hw[p+1][i]);
      end
      in_sb = 2'($urandom);
      hs[p+1] = in_sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
