// tb_threshold: random magnitudes around random levels; the output must be
// 255 exactly when the word is valid and mag >= level, in the same clock.
module tb_threshold;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [12:0] mag, level;
  logic        in_valid;
  logic [1:0]  in_sb, out_sb;
  logic [7:0]  out_pix;

  threshold #(.MW(13), .DW(8), .SW(2)) dut (.mag, .level, .in_valid, .in_sb, .out_pix, .out_sb);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex;
    for (int p = 0; p < 2000; p++) begin
      @(negedge clk);
      level    = 13'($urandom_range(0, 2040));
      mag      = (p % 3 == 0) ? level : 13'($urandom_range(0, 2040));
      in_valid = (p % 5 != 0);
      in_sb    = 2'($urandom);
      #1;
      ex = (in_valid && mag >= level) ? 255 : 0;
      checks++;
      if (int'(out_pix) != ex || out_sb != in_sb) begin
        failures++;
        if (failures < 10) $display("mismatch: mag %0d level %0d -> %0d", mag, level, out_pix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
