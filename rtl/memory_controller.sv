// memory_controller: stores the two pre-processed images in the SDRAM and
// streams them back, once per candidate disparity.
//
// Store: each image has its own SDRAM write port. A frame is captured from
// the pixel flagged start-of-frame; its N = W*H valid pixels are written at
// word addresses 0..N-1, one per clock. Frames that start while a search is
// running, or after that image is already stored, are dropped and counted.
//
// Search: once both images are stored the controller makes D raster passes
// (d = 0..D-1). In every clock of pass d it reads left pixel (x, y) through
// read port 0 and right pixel (x-d, y) through read port 1, zero where
// x < d, and presents the pair on out_l / out_r together with a tag. The
// SDRAM answers one clock after the read request, and the pair appears in
// that clock. After the last pass the controller idles for FLUSH cycles so
// the window builders and metric pipelines drain, pulses scan_done and
// accepts new frames. A search takes D*W*H + FLUSH + 1 cycles.
//
// Tag layout, LSB first: x (XW bits), y (YW bits), d (DDW bits), then a
// "search" bit that is set for pixels whose 3x3 window is searched: top row
// a multiple of 3 and the whole window inside the image height, so the
// image is searched in bands of three lines.
//
// The SDRAM with two write and two read ports is the memory model of the
// system description; the pass-per-disparity order, the drop policy, the
// band rule as coded here and the one-cycle read latency are this design's
// choices. Refresh, bursts and a separate memory clock are not modelled.
module memory_controller #(
  parameter int W     = 800,
  parameter int H     = 480,
  parameter int D     = 40,
  parameter int FLUSH = 2 * W + 3 + 18 + 2,
  // derived widths
  localparam int N    = W * H,
  localparam int AW   = $clog2(N),
  localparam int XW   = $clog2(W),
  localparam int YW   = $clog2(H),
  localparam int DDW  = (D > 1) ? $clog2(D) : 1,
  localparam int TW   = XW + YW + DDW + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // pre-processed streams: {valid, sof} side-band and pixel
  input  logic [7:0]     in_pix   [2],
  input  logic           in_valid [2],
  input  logic           in_sof   [2],
  // SDRAM: two write ports, two read ports (read data one clock later)
  output logic           mem_we    [2],
  output logic [AW-1:0]  mem_waddr [2],
  output logic [7:0]     mem_wdata [2],
  output logic           mem_re    [2],
  output logic [AW-1:0]  mem_raddr [2],
  input  logic [7:0]     mem_rdata [2],
  // pixel-pair stream to the window builders
  output logic [7:0]     out_l,
  output logic [7:0]     out_r,
  output logic           out_valid,
  output logic [TW-1:0]  out_tag,
  // status
  output logic           busy,
  output logic           scan_done,
  output logic [15:0]    frames_dropped
);

  typedef enum logic [1:0] {ST_STORE, ST_SCAN, ST_FLUSH} state_e;
  state_e state;
  logic [$clog2(FLUSH+1)-1:0] flush_cnt;

  // ---------------- store side ----------------
  logic          cap    [2];   // capturing a frame
  logic          stored [2];   // a full image is in memory
  logic [AW-1:0] waddr  [2];
  logic [1:0]    drop_ev;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      drop_ev[k]      = 1'b0;
      mem_we[k]       = 1'b0;
      mem_waddr[k]    = waddr[k];
      mem_wdata[k]    = in_pix[k];
      if (in_valid[k]) begin
        if (in_sof[k]) begin
          if (state == ST_STORE && !stored[k]) begin
            mem_we[k]    = 1'b1;
            mem_waddr[k] = '0;
          end else begin
            drop_ev[k]   = 1'b1;
          end
        end else if (cap[k]) begin
          mem_we[k] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 2; k++) begin
        cap[k] <= 1'b0; stored[k] <= 1'b0; waddr[k] <= '0;
      end
      frames_dropped <= '0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (mem_we[k]) begin
          if (mem_waddr[k] == AW'(N - 1)) begin
            cap[k]    <= 1'b0;
            stored[k] <= 1'b1;
          end else begin
            cap[k]    <= 1'b1;
            waddr[k]  <= mem_waddr[k] + 1'b1;
          end
        end
      end
      if (state == ST_FLUSH && flush_cnt == '0) begin
        stored[0] <= 1'b0;
        stored[1] <= 1'b0;
      end
      frames_dropped <= frames_dropped + 16'(drop_ev[0]) + 16'(drop_ev[1]);
    end
  end

  // ---------------- search side ----------------
  logic [XW-1:0]  x;
  logic [YW-1:0]  y;
  logic [DDW-1:0] d;
  logic [1:0]     ph;          // y mod 3
  logic [AW-1:0]  raddr;

  logic issue;
  assign issue = (state == ST_SCAN);

  always_comb begin
    mem_re[0]    = issue;
    mem_raddr[0] = raddr;
    mem_re[1]    = issue && (x >= XW'(d));
    mem_raddr[1] = raddr - AW'(d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_STORE;
      x <= '0; y <= '0; d <= '0; ph <= '0; raddr <= '0;
      flush_cnt <= '0;
      scan_done <= 1'b0;
    end else begin
      scan_done <= 1'b0;
      case (state)
        ST_STORE: begin
          if (stored[0] && stored[1]) begin
            state <= ST_SCAN;
            x <= '0; y <= '0; d <= '0; ph <= '0; raddr <= '0;
          end
        end
        ST_SCAN: begin
          if (x == XW'(W - 1)) begin
            x  <= '0;
            ph <= (ph == 2'd2) ? 2'd0 : ph + 1'b1;
            if (y == YW'(H - 1)) begin
              y     <= '0;
              ph    <= '0;
              raddr <= '0;
              if (d == DDW'(D - 1)) begin
                state     <= ST_FLUSH;
                flush_cnt <= ($clog2(FLUSH+1))'(FLUSH);
              end else begin
                d <= d + 1'b1;
              end
            end else begin
              y     <= y + 1'b1;
              raddr <= raddr + 1'b1;
            end
          end else begin
            x     <= x + 1'b1;
            raddr <= raddr + 1'b1;
          end
        end
        ST_FLUSH: begin
          if (flush_cnt == '0) begin
            state     <= ST_STORE;
            scan_done <= 1'b1;
          end else begin
            flush_cnt <= flush_cnt - 1'b1;
          end
        end
        default: state <= ST_STORE;
      endcase
    end
  end

  // read data returns one clock after the request
  logic           rd_v, rd_r_en;
  logic [TW-1:0]  rd_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v <= 1'b0; rd_r_en <= 1'b0; rd_tag <= '0;
    end else begin
      rd_v    <= issue;
      rd_r_en <= mem_re[1];
      rd_tag  <= {(ph == 2'd0) && (32'(y) + 2 < H), d, y, x};
    end
  end

  assign out_valid = rd_v;
  assign out_tag   = rd_v ? rd_tag : '0;
  assign out_l     = rd_v ? mem_rdata[0] : '0;
  assign out_r     = (rd_v && rd_r_en) ? mem_rdata[1] : '0;
  assign busy      = (state != ST_STORE);

endmodule
