// random_mem: the RANDOM memory, a store of noise for cross-over.
//
// RAND_DEPTH bytes (32K x 8 by default) of random data written by the host.
// During rule modification the evolver reads one byte per cycle at a running
// address, so a fixed content makes a run exactly repeatable. A pseudo-random
// generator would save the global wiring but not give that repeatability.
//
// Interface and timing: a synchronous host write port (the write lands on the
// rising edge) and an asynchronous read port. Size and role follow the
// published system; the ports and timing are this design's choices. Contents
// are not reset.
module random_mem #(
  parameter int unsigned DEPTH = ca_pkg::RAND_DEPTH,
  parameter int unsigned WIDTH = ca_pkg::RAND_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
