// seeds_mem: the SEEDS memory, the store of initial configurations.
//
// Each word is one initial configuration of the whole array: N_CELLS cells
// of STATE_W bits, cell i in bits [i*STATE_W +: STATE_W] (8K words of 512
// bits by default). The evolver reads it at the pattern address and the
// cells load the word on their init_load command. Keeping a fixed set of
// seeds lets the same experiment be repeated exactly.
//
// Interface and timing: one synchronous write port, used by the host to
// fill the memory before a run (the write lands on the rising edge), and one
// asynchronous read port, as in the static RAMs of the emulator the system
// was built on. Size and role follow the published system; the host write
// port and the read timing are this design's choices. Contents are not
// reset.
module seeds_mem #(
  parameter int unsigned DEPTH = ca_pkg::PAT_DEPTH,
  parameter int unsigned WIDTH = ca_pkg::N_CELLS * ca_pkg::STATE_W,
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
