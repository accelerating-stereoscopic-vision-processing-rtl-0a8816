// tb_memory_controller: stores a left and a right 8x6 image, then checks
// the D = 3 search passes pixel pair by pixel pair: left pixel, right
// pixel moved d columns (zero where x < d), x/y/d tag and band bit, the
// pass length D*W*H, and the scan_done pulse. A frame sent during the
// search must be dropped and counted; a later frame pair must start a new
// search.
module tb_memory_controller;
  localparam int W = 8, H = 6, D = 3;
  localparam int N = W * H, AW = $clog2(N);
  localparam int XW = $clog2(W), YW = $clog2(H), DDW = $clog2(D);
  localparam int TW = XW + YW + DDW + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]    in_pix [2];
  logic          in_valid [2], in_sof [2];
  logic          mem_we [2], mem_re [2];
  logic [AW-1:0] mem_waddr [2], mem_raddr [2];
  logic [7:0]    mem_wdata [2], mem_rdata [2];
  logic [7:0]    out_l, out_r;
  logic          out_valid, busy, scan_done;
  logic [TW-1:0] out_tag;
  logic [15:0]   frames_dropped;

  memory_controller #(.W(W), .H(H), .D(D)) dut (.*);
  sdram_model #(.N(N), .AW(AW)) mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  int imgl [N], imgr [N];
  int got = 0, dones = 0, first_cyc = -1, last_cyc = -1, cyc = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frames(bit new_data);
    for (int i = 0; i < N; i++) begin
      if (new_data) begin
        imgl[i] = $urandom_range(1, 255);
        imgr[i] = $urandom_range(1, 255);
      end
      in_pix[0] = 8'(imgl[i]); in_pix[1] = 8'(imgr[i]);
      in_valid[0] = 1'b1; in_valid[1] = 1'b1;
      in_sof[0] = (i == 0); in_sof[1] = (i == 0);
      @(negedge clk);
    end
    in_valid = '{1'b0, 1'b0}; in_sof = '{1'b0, 1'b0};
  endtask

  // monitor of the pixel-pair stream
  always @(negedge clk) begin
    cyc++;
    if (scan_done) dones++;
    if (out_valid) begin
      int k, d, j, x, y, el, er;
      bit band;
      k = got % (N * D);
      d = k / N; j = k % N; x = j % W; y = j / W;
      el = imgl[j];
      er = (x >= d) ? imgr[j - d] : 0;
      band = (y % 3 == 0) && (y + 2 < H);
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      checks++;
      if (int'(out_l) != el || int'(out_r) != er ||
          out_tag != {band, DDW'(d), YW'(y), XW'(x)}) begin
        failures++;
        if (failures < 10) $display("pair %0d: l %0d/%0d r %0d/%0d tag %h", got, out_l, el, out_r, er, out_tag);
      end
      got++;
    end
  end

  initial begin
    in_pix = '{8'd0, 8'd0}; in_valid = '{1'b0, 1'b0}; in_sof = '{1'b0, 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    send_frames(1'b1);
    // the search starts; a frame sent now must be dropped
    repeat (10) @(negedge clk);
    send_frames(1'b0);
    wait (dones == 1);
    @(negedge clk);
    checks++;
    if (got != D * N || last_cyc - first_cyc + 1 != D * N) begin
      failures++;
      $display("pass length: %0d pairs over %0d clocks", got, last_cyc - first_cyc + 1);
    end
    checks++;
    if (frames_dropped != 16'd2) begin
      failures++;
      $display("frames dropped %0d, expected 2", frames_dropped);
    end
    // a second frame pair gives a second search
    send_frames(1'b1);
    wait (dones == 2);
    checks++;
    if (got != 2 * D * N) begin
      failures++;
      $display("second search delivered %0d pairs", got - D * N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
