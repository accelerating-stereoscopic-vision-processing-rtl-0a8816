// tb_neighborhood_loader: a random stream through a loader with 8-pixel
// lines. After each clock the window must hold, for the top-left stream
// index e entered 2W+3 clocks earlier, pixel e + r*W + c at position
// r*3+c, and the side-band word that entered with pixel e.
module tb_neighborhood_loader;
  localparam int W = 8;
  localparam int L = 2 * W + 3;
  localparam int NCYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]      in_data;
  logic [2:0]      in_sb, out_sb;
  logic [8:0][7:0] win;

  neighborhood_loader #(.W(W), .DW(8), .SW(3)) dut (.clk, .rst_n, .in_data, .in_sb, .win, .out_sb);

  int hd [NCYC + 64];
  logic [2:0] hs [NCYC + 64];

  initial begin
    repeat (NCYC * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    in_data = '0; in_sb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NCYC; p++) begin
      @(negedge clk);
      e = p - L + 1;
      if (e >= 1) begin
        checks++;
        if (out_sb != hs[e]) failures++;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (int'(win[r*3+c]) != hd[e + r*W + c]) begin
              failures++;
              if (failures < 10) $display("mismatch e=%0d r=%0d c=%0d: %0d exp %0d",
                                          e, r, c, win[r*3+c], hd[e + r*W + c]);
            end
          end
      end
      in_data = 8'($urandom);
      in_sb   = 3'($urandom);
      hd[p+1] = int'(in_data);
      hs[p+1] = in_sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
