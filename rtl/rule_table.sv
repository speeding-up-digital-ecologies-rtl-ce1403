// rule_table: the transition-rule memory of one cell.
//
// DEPTH entries of WIDTH bits (64 x 2 for a 4-state radius-1 automaton).
// The cell reads it combinationally as a look-up table: during the dynamics
// the address is the cell's neighbourhood {left, centre, right} and the
// output is the next state; during rule modification and host access the
// address is the global rule address and the output is the entry that the
// neighbours may copy. One synchronous write port; a write lands on the
// rising clock edge and is visible to the read port in the next cycle.
// The single shared address mirrors the published cell, where one memory
// serves both uses; asynchronous read (an SRAM / LUT RAM) is this design's
// choice. Contents are not reset: the host loads them before the first run.
module rule_table #(
  parameter int unsigned DEPTH = ca_pkg::RULE_DEPTH,
  parameter int unsigned WIDTH = ca_pkg::STATE_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
