// neighborhood_loader: builds 3x3 windows from a raster pixel stream.
//
// Two line buffers of W words hold the two previous image lines. Each clock
// the newest pixel and the two pixels exactly one and two lines older are
// shifted into three 3-deep column registers, which together form the
// window. The line buffers are arrays addressed by one circular pointer: the
// word read at the pointer is W clocks old, and the new word is written back
// in its place.
//
// Window layout: win[r*3+c] is row r (0 = oldest line), column c (0 = oldest
// pixel). The window whose top-left pixel entered at clock edge e is
// registered out after edge e+2W+2, i.e. a latency of 2W+3 cycles (1603 for
// an 800-pixel line, as the system's latency tables give). out_sb is the
// side-band word that entered with that top-left pixel.
//
// The loader advances on every clock, valid or not: a frame has to arrive
// with its pixels back to back, and an idle stream (zeros) flushes it. There
// is no border handling: windows at the right edge of a line continue into
// the next line. The 3x3 size and the latency follow the system
// description; the circular-buffer structure and the border behaviour are
// this design's choices.
module neighborhood_loader #(
  parameter int W  = 800,  // pixels per line
  parameter int DW = 8,    // data bits per pixel
  parameter int SW = 2     // side-band bits carried with the top-left pixel
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DW-1:0]       in_data,
  input  logic [SW-1:0]       in_sb,
  output logic [8:0][DW-1:0]  win,
  output logic [SW-1:0]       out_sb
);

  localparam int AW = (W > 1) ? $clog2(W) : 1;
  localparam int WW = DW + SW;

  logic [WW-1:0] line1 [W];   // one line old
  logic [WW-1:0] line2 [W];   // two lines old
  logic [AW-1:0] ptr;

  // The line buffers are not reset. Until a buffer has been written once
  // all round, the side-band read from it is forced to zero, so no stale
  // valid flag can leave the loader after reset.
  logic line1_ok, line2_ok;
  logic [WW-1:0] rd1, rd2, tap0, tap1, tap2;
  assign rd1  = line1[ptr];
  assign rd2  = line2[ptr];
  assign tap0 = {in_sb, in_data};
  assign tap1 = line1_ok ? rd1 : {{SW{1'b0}}, rd1[DW-1:0]};
  assign tap2 = line2_ok ? rd2 : {{SW{1'b0}}, rd2[DW-1:0]};

  always_ff @(posedge clk) begin
    line1[ptr] <= tap0;
    line2[ptr] <= tap1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      line1_ok <= 1'b0;
      line2_ok <= 1'b0;
    end else if (ptr == AW'(W - 1)) begin
      ptr      <= '0;
      line1_ok <= 1'b1;
      line2_ok <= line1_ok;
    end else begin
      ptr      <= ptr + 1'b1;
    end
  end

  // column shift registers: col[r][2] is the newest pixel of row r
  logic [WW-1:0] col [3][3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) col[r][c] <= '0;
    end else begin
      for (int r = 0; r < 3; r++) begin
        col[r][0] <= col[r][1];
        col[r][1] <= col[r][2];
      end
      col[0][2] <= tap2;
      col[1][2] <= tap1;
      col[2][2] <= tap0;
    end
  end

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[r*3+c] = col[r][c][DW-1:0];
    out_sb = col[0][0][WW-1:DW];
  end

endmodule
