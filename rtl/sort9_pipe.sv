// sort9_pipe: pipelined sorter for the nine pixels of a 3x3 window.
//
// An odd-even transposition network: stage k compares and exchanges the
// neighbour pairs (0,1),(2,3),(4,5),(6,7) when k is even and
// (1,2),(3,4),(5,6),(7,8) when k is odd. Nine such stages sort nine values,
// and each stage is one register, so the sorted window (ascending,
// sorted[0] smallest) appears 9 cycles after the window enters. This is
// what lets the median, dilation and erosion blocks share the 9-cycle
// latency budgeted for each of them. The input window and the side-band
// word are delayed alongside, so a following block can use the same window.
module sort9_pipe #(
  parameter int DW = 8,
  parameter int SW = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [8:0][DW-1:0]  in_win,
  input  logic [SW-1:0]       in_sb,
  output logic [8:0][DW-1:0]  sorted,
  output logic [8:0][DW-1:0]  out_win,  // in_win delayed by 9 cycles
  output logic [SW-1:0]       out_sb
);

  localparam int NST = 9;

  logic [8:0][DW-1:0] v   [NST+1];
  logic [8:0][DW-1:0] w   [NST+1];
  logic [SW-1:0]      sb  [NST+1];

  assign v[0]  = in_win;
  assign w[0]  = in_win;
  assign sb[0] = in_sb;

  for (genvar k = 0; k < NST; k++) begin : g_stage
    logic [8:0][DW-1:0] nxt;
    always_comb begin
      nxt = v[k];
      for (int i = (k % 2); i + 1 < 9; i += 2) begin
        if (v[k][i] > v[k][i+1]) begin
          nxt[i]   = v[k][i+1];
          nxt[i+1] = v[k][i];
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[k+1]  <= '0;
        w[k+1]  <= '0;
        sb[k+1] <= '0;
      end else begin
        v[k+1]  <= nxt;
        w[k+1]  <= w[k];
        sb[k+1] <= sb[k];
      end
    end
  end

  assign sorted  = v[NST];
  assign out_win = w[NST];
  assign out_sb  = sb[NST];

endmodule
