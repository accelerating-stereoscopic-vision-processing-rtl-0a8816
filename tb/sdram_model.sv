// sdram_model: behavioural model of the external frame memory with two
// write ports and two read ports, one image per port pair (port k writes
// and reads image k). Writes take effect at the clock edge; read data is
// returned one clock after the request; a clock without a request returns
// noise. For simulation only.
module sdram_model #(
  parameter int N  = 64,
  parameter int AW = 6
) (
  input  logic           clk,
  input  logic           we    [2],
  input  logic [AW-1:0]  waddr [2],
  input  logic [7:0]     wdata [2],
  input  logic           re    [2],
  input  logic [AW-1:0]  raddr [2],
  output logic [7:0]     rdata [2]
);
  logic [7:0] mem0 [N];
  logic [7:0] mem1 [N];

  always_ff @(posedge clk) begin
    if (we[0]) mem0[waddr[0]] <= wdata[0];
    if (we[1]) mem1[waddr[1]] <= wdata[1];
    rdata[0] <= re[0] ? mem0[raddr[0]] : 8'($urandom);
    rdata[1] <= re[1] ? mem1[raddr[1]] : 8'($urandom);
  end
endmodule
