// tb_disparity_unit: stores an 8x6 left image and a right image that is
// the left one moved two columns (plus noise), searches D = 3 disparities
// and checks every SAD, SSD and correlation value and its x/y/d tag, in
// order, against software metrics on the same window pairs. It also checks
// the number of results (only rows starting a three-line band are
// searched) and the latency from the first pixel pair to the first result:
// 2W+3+2 clocks for SAD and correlation, 2W+3+18 for SSD.
module tb_disparity_unit;
  import tb_ref_pkg::*;

  localparam int W = 8, H = 6, D = 3;
  localparam int N = W * H, AW = $clog2(N);
  localparam int XW = $clog2(W), YW = $clog2(H), DDW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]     in_pix [2];
  logic           in_valid [2], in_sof [2];
  logic           mem_we [2], mem_re [2];
  logic [AW-1:0]  mem_waddr [2], mem_raddr [2];
  logic [7:0]     mem_wdata [2], mem_rdata [2];
  logic           sad_valid, ssd_valid, corr_valid;
  logic [11:0]    sad_val;
  logic [19:0]    ssd_val, corr_val;
  logic [XW-1:0]  sad_x, ssd_x, corr_x;
  logic [YW-1:0]  sad_y, ssd_y, corr_y;
  logic [DDW-1:0] sad_d, ssd_d, corr_d;
  logic           busy, scan_done;
  logic [15:0]    frames_dropped;

  disparity_unit #(.W(W), .H(H), .D(D)) dut (.*);
  sdram_model #(.N(N), .AW(AW)) mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  img_t iml, imr, sl, sr;
  int exp_g [$];            // global stream index of each expected result
  int n_sad = 0, n_ssd = 0, n_corr = 0;
  int cyc = 0, first_pair = -1, first_sad = -1, first_ssd = -1, first_corr = -1;

  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit check_one(string name, int k, int val, int x, int y, int d);
    int g, ex, lw [9], rw [9];
    g = exp_g[k];
    window(sl, W, g, lw);
    window(sr, W, g, rw);
    case (name)
      "sad": ex = sad9(lw, rw);
      "ssd": ex = ssd9(lw, rw);
      default: ex = corr9(lw, rw);
    endcase
    if (val != ex || x != (g % N) % W || y != (g % N) / W || d != g / N) begin
      if (failures < 10) $display("%s result %0d: %0d exp %0d at (%0d,%0d,%0d)", name, k, val, ex, x, y, d);
      return 1'b0;
    end
    return 1'b1;
  endfunction

  always @(negedge clk) begin
    if (dut.pvalid && first_pair < 0) first_pair = cyc;
    if (sad_valid) begin
      if (first_sad < 0) first_sad = cyc;
      checks++;
      if (n_sad >= exp_g.size() || !check_one("sad", n_sad, int'(sad_val), sad_x, sad_y, sad_d)) failures++;
      n_sad++;
    end
    if (ssd_valid) begin
      if (first_ssd < 0) first_ssd = cyc;
      checks++;
      if (n_ssd >= exp_g.size() || !check_one("ssd", n_ssd, int'(ssd_val), ssd_x, ssd_y, ssd_d)) failures++;
      n_ssd++;
    end
    if (corr_valid) begin
      if (first_corr < 0) first_corr = cyc;
      checks++;
      if (n_corr >= exp_g.size() || !check_one("corr", n_corr, int'(corr_val), corr_x, corr_y, corr_d)) failures++;
      n_corr++;
    end
  end

  initial begin
    iml = new[N]; imr = new[N];
    for (int i = 0; i < N; i++) iml[i] = $urandom_range(0, 255);
    for (int i = 0; i < N; i++) imr[i] = ((i % W) + 2 < W) ? iml[i + 2] : $urandom_range(0, 255);
    sl = search_stream(iml, W, D, 1'b0);
    sr = search_stream(imr, W, D, 1'b1);
    for (int d = 0; d < D; d++)
      for (int j = 0; j < N; j++)
        if ((j / W) % 3 == 0 && (j / W) + 2 < H) exp_g.push_back(d * N + j);

    in_pix = '{8'd0, 8'd0}; in_valid = '{1'b0, 1'b0}; in_sof = '{1'b0, 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      in_pix[0] = 8'(iml[i]); in_pix[1] = 8'(imr[i]);
      in_valid = '{1'b1, 1'b1};
      in_sof = '{i == 0, i == 0};
      @(negedge clk);
    end
    in_valid = '{1'b0, 1'b0}; in_sof = '{1'b0, 1'b0};
    wait (scan_done);
    @(negedge clk);
    checks += 4;
    if (n_sad != exp_g.size() || n_ssd != exp_g.size() || n_corr != exp_g.size()) begin
      failures++;
      $display("results: sad %0d ssd %0d corr %0d, expected %0d each", n_sad, n_ssd, n_corr, exp_g.size());
    end
    if (first_sad - first_pair != 2 * W + 3 + 2) begin
      failures++; $display("SAD latency %0d", first_sad - first_pair);
    end
    if (first_ssd - first_pair != 2 * W + 3 + 18) begin
      failures++; $display("SSD latency %0d", first_ssd - first_pair);
    end
    if (first_corr - first_pair != 2 * W + 3 + 2) begin
      failures++; $display("correlation latency %0d", first_corr - first_pair);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
