// stereo_top_harness: drives and checks a stereo_vision_top instance.
//
// It plays two cameras, holds the SDRAM model and compares everything the
// design produces with software models:
//   * a frame already running on the left camera when reset ends (must be
//     ignored);
//   * frame pair A (erosion selected): the right camera sees the left scene
//     moved two columns; the images stored in SDRAM must equal the modelled
//     pre-processing of each camera frame;
//   * frame pair B, sent while the search of A runs (must be dropped);
//   * if NSEARCH = 2, frame pair C with dilation selected and a second
//     search.
// Every SAD, SSD and correlation value and its x/y/d tag is checked in
// order, as is the time from a frame's first camera pixel to its last
// stored pixel (N + 6W+47 clocks). At the end it counts how often each mechanism happened (frame
// skipped after reset, erosion, dilation, both threshold levels, dropped
// frames, zero fill for x < d, rows skipped between bands, searches) and
// counts a failure for any that never did.
module stereo_top_harness
  import stereo_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int W = 16,
  parameter int H = 9,
  parameter int D = 4,
  parameter int NSEARCH = 2,
  localparam int N   = W * H,
  localparam int AW  = $clog2(N),
  localparam int XW  = $clog2(W),
  localparam int YW  = $clog2(H),
  localparam int DDW = (D > 1) ? $clog2(D) : 1
) (
  output logic           clk,
  output logic           rst_n,
  output logic           cam_l_fval,
  output logic           cam_l_lval,
  output rgb_t           cam_l_rgb,
  output logic           cam_r_fval,
  output logic           cam_r_lval,
  output rgb_t           cam_r_rgb,
  output logic [12:0]    thr_level,
  output morph_sel_e     morph_sel,
  input  logic           mem_we    [2],
  input  logic [AW-1:0]  mem_waddr [2],
  input  logic [7:0]     mem_wdata [2],
  input  logic           mem_re    [2],
  input  logic [AW-1:0]  mem_raddr [2],
  output logic [7:0]     mem_rdata [2],
  input  logic           sad_valid,
  input  logic [11:0]    sad_val,
  input  logic           ssd_valid,
  input  logic [19:0]    ssd_val,
  input  logic           corr_valid,
  input  logic [19:0]    corr_val,
  input  logic [XW-1:0]  sad_x,  ssd_x,  corr_x,
  input  logic [YW-1:0]  sad_y,  ssd_y,  corr_y,
  input  logic [DDW-1:0] sad_d,  ssd_d,  corr_d,
  input  logic           frame_start_l,
  input  logic           frame_start_r,
  input  logic           busy,
  input  logic           scan_done,
  input  logic [15:0]    frames_dropped
);

  localparam int THR = 160;
  localparam int SHIFT = 2;     // true disparity of the synthetic scene

  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sdram_model #(.N(N), .AW(AW)) u_sdram (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  // mechanism counters
  int n_skip = 0, n_erode = 0, n_dilate = 0, n_one = 0, n_zero = 0;
  int n_fill = 0, n_rowskip = 0, n_search = 0;

  img_t pl, pr;                     // expected pre-processed images of the search
  bit   row_seen [H];
  bit   armed_store = 1'b0;         // frame pair A has been sent
  int   early_writes = 0;
  longint unsigned t_in0 = 0, t_last = 0;   // first camera pixel, last stored pixel
  longint unsigned t_busy = 0, t_done = 0;  // search start and end
  bit busy_q = 1'b0;
  int   n_exp = 0;                  // results per metric per search
  int   n_sad = 0, n_ssd = 0, n_corr = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    longint unsigned limit;
    limit = longint'(N) * D * (NSEARCH + 1) * 2 + 40 * longint'(N) + 100000;
    while (cyc < limit) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the search streams: pass d of the right stream is the right image moved
  // d columns right; beyond the last pass the stream is zero
  function automatic int sval(const ref img_t im, input longint g, input bit right);
    int d, j;
    if (g < 0 || g >= longint'(N) * D) return 0;
    d = int'(g / N); j = int'(g % N);
    if (!right) return im[j];
    return ((j % W) >= d) ? im[j - d] : 0;
  endfunction

  // k-th searched window pair of a search, as a global stream index
  function automatic longint kth(input int k);
    int per_pass, d, r, band, x;
    per_pass = ((H - 3) / 3 + 1) * W;
    d = k / per_pass; r = k % per_pass;
    band = r / W; x = r % W;
    return longint'(d) * N + (band * 3) * W + x;
  endfunction

  function automatic bit check_one(input int sel, input int k, input int val, input int x, input int y, input int d);
    longint g;
    int ex, lw [9], rw [9];
    g = kth(k);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        lw[r*3+c] = sval(pl, g + r*W + c, 1'b0);
        rw[r*3+c] = sval(pr, g + r*W + c, 1'b1);
      end
    case (sel)
      0: ex = sad9(lw, rw);
      1: ex = ssd9(lw, rw);
      default: ex = corr9(lw, rw);
    endcase
    if (val != ex || x != int'(g % N) % W || y != int'(g % N) / W || d != int'(g / N)) begin
      if (failures < 10) $display("metric %0d result %0d: %0d exp %0d at (%0d,%0d,%0d), clock %0d", sel, k, val, ex, x, y, d, cyc);
      return 1'b0;
    end
    if (sel == 0 && x < d) n_fill++;
    if (sel == 0) row_seen[y] = 1'b1;
    return 1'b1;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (!armed_store && (mem_we[0] || mem_we[1])) early_writes++;
    if (mem_we[0] && mem_waddr[0] == AW'(N - 1)) t_last = cyc;
    if (busy && !busy_q) t_busy = cyc;
    if (scan_done) t_done = cyc;
    busy_q = busy;
    if (sad_valid) begin
      checks++;
      if (n_sad >= n_exp || !check_one(0, n_sad, int'(sad_val), sad_x, sad_y, sad_d)) failures++;
      n_sad++;
    end
    if (ssd_valid) begin
      checks++;
      if (n_ssd >= n_exp || !check_one(1, n_ssd, int'(ssd_val), ssd_x, ssd_y, ssd_d)) failures++;
      n_ssd++;
    end
    if (corr_valid) begin
      checks++;
      if (n_corr >= n_exp || !check_one(2, n_corr, int'(corr_val), corr_x, corr_y, corr_d)) failures++;
      n_corr++;
    end
  end

  // blocky scene with noise, so that there are edges and flat parts
  function automatic img_t make_scene(input int seed);
    img_t f;
    f = new[N];
    for (int i = 0; i < N; i++) begin
      int x, y, base;
      x = i % W; y = i / W;
      base = ((x / 5 + y / 4 + seed) % 2) ? 200 : 30;
      f[i] = ((base + $urandom_range(0, 20)) << 16) | ((base + $urandom_range(0, 20)) << 8) | base;
    end
    return f;
  endfunction

  // right camera: the scene moved SHIFT columns to the left
  function automatic img_t right_view(const ref img_t l);
    img_t f;
    f = new[N];
    for (int i = 0; i < N; i++) f[i] = ((i % W) + SHIFT < W) ? l[i + SHIFT] : l[i];
    return f;
  endfunction

  task automatic send_pair(const ref img_t fl, const ref img_t fr);
    cam_l_fval = 1'b0; cam_r_fval = 1'b0; cam_l_lval = 1'b0; cam_r_lval = 1'b0;
    repeat (4) @(negedge clk);
    t_in0 = cyc;
    for (int i = 0; i < N; i++) begin
      cam_l_fval = 1'b1; cam_l_lval = 1'b1; cam_l_rgb = rgb_t'(fl[i]);
      cam_r_fval = 1'b1; cam_r_lval = 1'b1; cam_r_rgb = rgb_t'(fr[i]);
      @(negedge clk);
    end
    cam_l_fval = 1'b0; cam_r_fval = 1'b0; cam_l_lval = 1'b0; cam_r_lval = 1'b0;
    cam_l_rgb = '0; cam_r_rgb = '0;
  endtask

  // compare the stored images with the model and count binary levels
  task automatic check_store();
    int bad;
    bad = 0;
    for (int i = 0; i < N; i++) begin
      if (int'(u_sdram.mem0[i]) != pl[i]) bad++;
      if (int'(u_sdram.mem1[i]) != pr[i]) bad++;
      if (pl[i] == 255) n_one++; else n_zero++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%0d stored pixels differ from the model", bad);
    end
  endtask

  task automatic run_search(input bit erode, input bit send_extra);
    img_t fl, fr, xl, xr;
    int done0;
    fl = make_scene(n_search);
    fr = right_view(fl);
    morph_sel = erode ? MORPH_ERODE : MORPH_DILATE;
    pl = preprocess(fl, W, THR, erode);
    pr = preprocess(fr, W, THR, erode);
    n_sad = 0; n_ssd = 0; n_corr = 0;
    send_pair(fl, fr);
    wait (busy);
    @(negedge clk);
    #1;
    check_store();
    // one frame takes N + 6W+47 clocks from its first camera pixel to its
    // last stored pixel (388,847 for 800x480)
    checks++;
    $display("frame in to frame stored: %0d clocks", t_last - t_in0 + 1);
    if (t_last - t_in0 + 1 != longint'(N + 6 * W + 47)) begin
      failures++;
      $display("expected %0d clocks", N + 6 * W + 47);
    end
    if (erode) n_erode++; else n_dilate++;
    if (send_extra) begin
      xl = make_scene(7);
      xr = right_view(xl);
      send_pair(xl, xr);
    end
    wait (scan_done);
    @(negedge clk);
    #1;
    n_search++;
    // a search lasts D*N clocks of passes plus 2W+24 of draining
    checks++;
    $display("search: %0d clocks", t_done - t_busy);
    if (t_done - t_busy != longint'(D) * N + 2 * W + 24) begin
      failures++;
      $display("expected %0d clocks", longint'(D) * N + 2 * W + 24);
    end
    checks += 3;
    if (n_sad != n_exp) begin failures++; $display("SAD results %0d of %0d", n_sad, n_exp); end
    if (n_ssd != n_exp) begin failures++; $display("SSD results %0d of %0d", n_ssd, n_exp); end
    if (n_corr != n_exp) begin failures++; $display("correlation results %0d of %0d", n_corr, n_exp); end
  endtask

  initial begin
    rst_n = 1'b0;
    thr_level = 13'(THR);
    morph_sel = MORPH_ERODE;
    n_exp = ((H - 3) / 3 + 1) * W * D;
    // left camera is in the middle of a frame when reset ends
    cam_l_fval = 1'b1; cam_l_lval = 1'b1; cam_l_rgb = 24'h808080;
    cam_r_fval = 1'b0; cam_r_lval = 1'b0; cam_r_rgb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (W) @(negedge clk);
    checks++;
    if (frame_start_l) failures++;
    cam_l_fval = 1'b0; cam_l_lval = 1'b0;
    repeat (6 * W + 60) @(negedge clk);
    checks++;
    if (busy || early_writes != 0) failures++;
    else n_skip++;
    armed_store = 1'b1;

    run_search(1'b1, 1'b1);
    if (NSEARCH > 1) run_search(1'b0, 1'b0);

    checks++;
    if (frames_dropped != 16'd2) begin
      failures++;
      $display("frames dropped %0d, expected 2", frames_dropped);
    end
    for (int y = 0; y < H; y++) if (!row_seen[y]) n_rowskip++;
    $display("mechanisms: skipped-at-reset %0d, erosion %0d, dilation %0d, pixels at 255 %0d, at 0 %0d,",
             n_skip, n_erode, n_dilate, n_one, n_zero);
    $display("            frames dropped %0d, zero-filled results %0d, rows outside bands %0d, searches %0d",
             frames_dropped, n_fill, n_rowskip, n_search);
    checks += 8;
    if (n_skip == 0)            failures++;
    if (n_erode == 0)           failures++;
    if (n_dilate == 0 && NSEARCH > 1) failures++;
    if (n_one == 0 || n_zero == 0) failures++;
    if (frames_dropped == 0)    failures++;
    if (n_fill == 0)            failures++;
    if (n_rowskip == 0)         failures++;
    if (n_search != NSEARCH)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
