// evolution_ctrl: the EVOLUTION part of the evolver.
//
// While `en` is high it walks the RULE_DEPTH rule-table locations, spending
// PHASES cycles on each (64 x 4 = 256 cycles by default). In every enabled
// cycle it reads one RAND_W-bit word from RANDOM at `rand_addr` and shifts it
// into a register; in the last phase of a location it asserts `rule_wr`, and
// `rnd_word` then holds the PHASES words read for that location (the one read
// in the current cycle in the low bits), giving the cells
// PHASES*RAND_W = 32 random bits for their cross-over choice. `rule_addr` is
// the location broadcast to all cells. `at_start` is high while the walk
// stands at location 0, phase 0 (the place for the global test); `last`
// marks the final write. The random address keeps running across
// generations and wraps at RAND_DEPTH.
// The 256-cycle budget for 64 locations and the RANDOM memory follow the
// published system; how the four cycles per location are used is this
// design's choice. PHASES must be at least 2.
module evolution_ctrl #(
  parameter int unsigned RULE_DEPTH = ca_pkg::RULE_DEPTH,
  parameter int unsigned PHASES     = ca_pkg::RULE_PHASES,
  parameter int unsigned RAND_DEPTH = ca_pkg::RAND_DEPTH,
  parameter int unsigned RAND_W     = ca_pkg::RAND_W,
  localparam int unsigned AW  = $clog2(RULE_DEPTH),
  localparam int unsigned PW  = (PHASES > 1) ? $clog2(PHASES) : 1,
  localparam int unsigned RAW = $clog2(RAND_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [RAND_W-1:0]        rand_data,
  output logic [AW-1:0]            rule_addr,
  output logic [RAW-1:0]           rand_addr,
  output logic [PHASES*RAND_W-1:0] rnd_word,
  output logic                     rule_wr,
  output logic                     at_start,
  output logic                     last
);

  logic [PW-1:0]              phase;
  logic [(PHASES-1)*RAND_W-1:0] shreg;
  logic                       last_phase;

  assign last_phase = (phase == PW'(PHASES - 1));
  assign rule_wr    = en && last_phase;
  assign last       = rule_wr && (rule_addr == AW'(RULE_DEPTH - 1));
  assign at_start   = (rule_addr == '0) && (phase == '0);
  assign rnd_word   = {shreg[(PHASES-1)*RAND_W-1:0], rand_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      rule_addr <= '0;
      rand_addr <= '0;
      shreg     <= '0;
    end else if (en) begin
      shreg     <= rnd_word[(PHASES-1)*RAND_W-1:0];
      rand_addr <= (rand_addr == RAW'(RAND_DEPTH - 1)) ? '0 : rand_addr + 1'b1;
      if (last_phase) begin
        phase     <= '0;
        rule_addr <= (rule_addr == AW'(RULE_DEPTH - 1)) ? '0 : rule_addr + 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

endmodule
