// tb_absolute_sum: random signed pairs including the extremes, checked
// against |gx| + |gy| one clock later (latency 1).
module tb_absolute_sum;
  localparam int L = 1;
  localparam int NCYC = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [11:0] gx, gy;
  logic [1:0]  in_sb, out_sb;
  logic [12:0] mag;

  absolute_sum #(.IW(12), .SW(2)) dut (.clk, .rst_n, .gx, .gy, .in_sb, .mag, .out_sb);

  int hx [NCYC + 8], hy [NCYC + 8];
  logic [1:0] hs [NCYC + 8];

  initial begin
    repeat (NCYC * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, ex;
    gx = '0; gy = '0; in_sb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NCYC; p++) begin
      @(negedge clk);
      e = p - L + 1;
      if (e >= 1) begin
        ex = (hx[e] < 0 ? -hx[e] : hx[e]) + (hy[e] < 0 ? -hy[e] : hy[e]);
        checks++;
        if (int'(mag) != ex || out_sb != hs[e]) begin
          failures++;
          if (failures < 10) $display("mismatch: %0d %0d -> %0d exp %0d", hx[e], hy[e], mag, ex);
        end
      end
      case (p % 7)
        0: begin gx = -12'sd1020; gy = 12'sd1020; end
        1: begin gx = -12'sd2047; gy = -12'sd2047; end
        default: begin gx = 12'($urandom); gy = 12'($urandom); end
      endcase
      in_sb = 2'($urandom);
      hx[p+1] = int'(gx); hy[p+1] = int'(gy); hs[p+1] = in_sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
