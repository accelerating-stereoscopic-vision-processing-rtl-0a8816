// disparity_unit: computes SAD, SSD and correlation for every searched
// pair of 3x3 windows of the stored left and right images.
//
// The memory controller streams the left image and, for candidate
// disparity d, the right image moved d pixels to the right, one pixel pair
// per clock. Two neighborhood loaders turn the two streams into windows at
// the same time, and the same pair of windows is handed to all three metric
// blocks, so the three metrics are computed concurrently on identical data.
// For the window whose top-left pixel is left (x, y) the metrics compare it
// with the right window whose top-left pixel is (x-d, y).
//
// Each metric output is valid for one clock per searched window pair, with
// that pair's x, y and d. Latency from the controller's pixel pair to a
// metric value is 2W+3 (window) plus 2 for SAD and correlation or 18 for
// SSD: 1605 / 1621 cycles for an 800-pixel line, as the system description
// gives. Choosing the best disparity per window from these values is not
// part of this unit.
module disparity_unit #(
  parameter int W = 800,
  parameter int H = 480,
  parameter int D = 40,
  localparam int N   = W * H,
  localparam int AW  = $clog2(N),
  localparam int XW  = $clog2(W),
  localparam int YW  = $clog2(H),
  localparam int DDW = (D > 1) ? $clog2(D) : 1,
  localparam int TW  = XW + YW + DDW + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // pre-processed streams from the two pre-processing units
  input  logic [7:0]     in_pix   [2],
  input  logic           in_valid [2],
  input  logic           in_sof   [2],
  // SDRAM ports
  output logic           mem_we    [2],
  output logic [AW-1:0]  mem_waddr [2],
  output logic [7:0]     mem_wdata [2],
  output logic           mem_re    [2],
  output logic [AW-1:0]  mem_raddr [2],
  input  logic [7:0]     mem_rdata [2],
  // metric outputs
  output logic           sad_valid,
  output logic [11:0]    sad_val,
  output logic           ssd_valid,
  output logic [19:0]    ssd_val,
  output logic           corr_valid,
  output logic [19:0]    corr_val,
  output logic [XW-1:0]  sad_x,  ssd_x,  corr_x,
  output logic [YW-1:0]  sad_y,  ssd_y,  corr_y,
  output logic [DDW-1:0] sad_d,  ssd_d,  corr_d,
  // status
  output logic           busy,
  output logic           scan_done,
  output logic [15:0]    frames_dropped
);

  logic [7:0]    pl, pr;
  logic          pvalid;
  logic [TW-1:0] ptag;

  memory_controller #(.W(W), .H(H), .D(D)) u_mc (
    .clk, .rst_n, .in_pix, .in_valid, .in_sof,
    .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr, .mem_rdata,
    .out_l(pl), .out_r(pr), .out_valid(pvalid), .out_tag(ptag),
    .busy, .scan_done, .frames_dropped
  );

  // side-band of the left stream: {valid, tag}; of the right stream: valid
  localparam int SWL = TW + 1;
  logic [8:0][7:0] win_l, win_r;
  logic [SWL-1:0]  wl_sb;
  logic            wr_valid;

  neighborhood_loader #(.W(W), .DW(8), .SW(SWL)) u_nl_left (
    .clk, .rst_n, .in_data(pl), .in_sb({pvalid, ptag}),
    .win(win_l), .out_sb(wl_sb)
  );

  neighborhood_loader #(.W(W), .DW(8), .SW(1)) u_nl_right (
    .clk, .rst_n, .in_data(pr), .in_sb(pvalid),
    .win(win_r), .out_sb(wr_valid)
  );

  // both loaders see the same pixel timing, so their windows stay paired
  a_windows_paired: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid == wl_sb[SWL-1])
    else $error("left and right windows out of step");

  // "bus": the same window pair goes to the three metric blocks
  logic [SWL-1:0] sad_sb, ssd_sb, corr_sb;

  sad_metric #(.DW(8), .SW(SWL)) u_sad (
    .clk, .rst_n, .win_l, .win_r, .in_sb(wl_sb), .out_val(sad_val), .out_sb(sad_sb)
  );

  ssd_metric #(.DW(8), .SW(SWL)) u_ssd (
    .clk, .rst_n, .win_l, .win_r, .in_sb(wl_sb), .out_val(ssd_val), .out_sb(ssd_sb)
  );

  correlation_metric #(.DW(8), .SW(SWL)) u_corr (
    .clk, .rst_n, .win_l, .win_r, .in_sb(wl_sb), .out_val(corr_val), .out_sb(corr_sb)
  );

  // a result is delivered when the window pair is valid and searched
  assign sad_valid  = sad_sb[SWL-1]  & sad_sb[TW-1];
  assign ssd_valid  = ssd_sb[SWL-1]  & ssd_sb[TW-1];
  assign corr_valid = corr_sb[SWL-1] & corr_sb[TW-1];
  assign {sad_d,  sad_y,  sad_x}  = sad_sb[TW-2:0];
  assign {ssd_d,  ssd_y,  ssd_x}  = ssd_sb[TW-2:0];
  assign {corr_d, corr_y, corr_x} = corr_sb[TW-2:0];

endmodule
