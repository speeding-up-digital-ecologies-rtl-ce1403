// evolvable_ca: on-line evolution of a non-uniform cellular automaton.
//
// A ring of N_CELLS four-state automata, each with its own 64-entry
// transition-rule table, is evolved in hardware (cellular programming). For
// every generation the evolver presents N_PATTERNS initial configurations
// from SEEDS, lets the ring iterate DYN_CYCLES times on each, and counts in
// every cell how often its final state equals the awaited one from RESULTS.
// Each cell then rewrites its rule table from its fitter neighbours: it
// keeps its rules when no neighbour is fitter, copies the table of the single
// fitter one, or mixes both neighbours' tables entry by entry (uniform
// cross-over) under bits from the RANDOM memory. The run stops when every
// cell reaches `fit_threshold` or after `max_gens` generations.
//
// Host interface (while `busy` is low): fill SEEDS, RESULTS and RANDOM
// through their write ports; write all cells' rule entry at `rule_addr` with
// `rule_we`/`rule_wdata` (cell i in bits [i*STATE_W +: STATE_W]) and read
// them back on `rule_rdata`. While busy the host rule port is ignored and
// `rule_rdata` shows the entries being modified or, in working cycles, each
// cell's next state. `cell_state`, `cell_fitness`, the memory addresses,
// the pattern number and the working-cycle count are always visible.
// Pulse `start` to run; `done` pulses at the end, `ok` tells whether the
// global test passed, `gen_count` counts completed generations.
//
// Timing: one CA iteration per clock; a generation takes
// N_PATTERNS*(DYN_CYCLES+2) + RULE_DEPTH*RULE_PHASES clocks (66304 with the
// defaults), plus one for the first generation of a run.
//
// The block structure (evolver, three memories, cell array), the sizes and the
// cycle budget follow the published system; the host ports are this
// design's own.
module evolvable_ca
  import ca_pkg::*;
#(
  parameter int unsigned N           = N_CELLS,
  parameter int unsigned FW          = FIT_W,
  parameter int unsigned N_PAT       = N_PATTERNS,
  parameter int unsigned DYN         = DYN_CYCLES,
  parameter int unsigned PAT_DEPTH_P = PAT_DEPTH,
  parameter int unsigned RAND_DEPTH_P = RAND_DEPTH,
  localparam int unsigned SW  = STATE_W,
  localparam int unsigned AW  = NBHD_W,
  localparam int unsigned PAW = $clog2(PAT_DEPTH_P),
  localparam int unsigned RAW = $clog2(RAND_DEPTH_P),
  localparam int unsigned PCW = (N_PAT > 1) ? $clog2(N_PAT) : 1,
  localparam int unsigned DCW = (DYN > 1) ? $clog2(DYN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // run control
  input  logic                 start,
  input  logic [GEN_W-1:0]     max_gens,
  input  logic [FW-1:0]        fit_threshold,
  output logic                 busy,
  output logic                 done,
  output logic                 ok,
  output logic [GEN_W-1:0]     gen_count,
  output ev_state_e            ev_state,
  // memory load ports
  input  logic                 seed_we,
  input  logic [PAW-1:0]       seed_waddr,
  input  logic [N*SW-1:0]      seed_wdata,
  input  logic                 res_we,
  input  logic [PAW-1:0]       res_waddr,
  input  logic [N*SW-1:0]      res_wdata,
  input  logic                 rnd_we,
  input  logic [RAW-1:0]       rnd_waddr,
  input  logic [RAND_W-1:0]    rnd_wdata,
  // rule tables
  input  logic                 rule_we,
  input  logic [AW-1:0]        rule_addr,
  input  logic [N*SW-1:0]      rule_wdata,
  output logic [N*SW-1:0]      rule_rdata,
  // observation
  output logic [N*SW-1:0]      cell_state,
  output logic [N*FW-1:0]      cell_fitness,
  output logic [PAW-1:0]       pat_addr,
  output logic [RAW-1:0]       rand_addr,
  output logic [PCW-1:0]       pat_idx,
  output logic [DCW-1:0]       dyn_count
);

  cell_ctrl_t                ctrl;
  logic [AW-1:0]             evo_rule_addr, cell_rule_addr;
  logic [RAND_W*RULE_PHASES-1:0] rnd_word;
  logic [RAND_W-1:0]         rand_data;
  logic [N*SW-1:0]           seed_word, res_word;
  logic                      global_ok;

  evolver #(
    .DYN_CYCLES_P (DYN),
    .N_PATTERNS_P (N_PAT),
    .PAT_DEPTH_P  (PAT_DEPTH_P),
    .RULE_DEPTH_P (RULE_DEPTH),
    .RAND_DEPTH_P (RAND_DEPTH_P)
  ) u_evolver (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .max_gens  (max_gens),
    .global_ok (global_ok),
    .rand_data (rand_data),
    .ctrl      (ctrl),
    .pat_addr  (pat_addr),
    .rand_addr (rand_addr),
    .rule_addr (evo_rule_addr),
    .rnd_word  (rnd_word),
    .pat_idx   (pat_idx),
    .dyn_count (dyn_count),
    .ev_state  (ev_state),
    .busy      (busy),
    .done      (done),
    .ok        (ok),
    .gen_count (gen_count)
  );

  seeds_mem #(.DEPTH(PAT_DEPTH_P), .WIDTH(N*SW)) u_seeds (
    .clk (clk), .we (seed_we && !busy), .waddr (seed_waddr), .wdata (seed_wdata),
    .raddr (pat_addr), .rdata (seed_word)
  );

  results_mem #(.DEPTH(PAT_DEPTH_P), .WIDTH(N*SW)) u_results (
    .clk (clk), .we (res_we && !busy), .waddr (res_waddr), .wdata (res_wdata),
    .raddr (pat_addr), .rdata (res_word)
  );

  random_mem #(.DEPTH(RAND_DEPTH_P), .WIDTH(RAND_W)) u_random (
    .clk (clk), .we (rnd_we && !busy), .waddr (rnd_waddr), .wdata (rnd_wdata),
    .raddr (rand_addr), .rdata (rand_data)
  );

  assign cell_rule_addr = busy ? evo_rule_addr : rule_addr;

  cell_array #(.N(N), .SW(SW), .FW(FW), .RND_W(RAND_W * RULE_PHASES)) u_cells (
    .clk           (clk),
    .rst_n         (rst_n),
    .ctrl          (ctrl),
    .rule_addr     (cell_rule_addr),
    .host_wr       (rule_we && !busy),
    .host_rule     (rule_wdata),
    .seed          (seed_word),
    .awaited       (res_word),
    .rnd           (rnd_word),
    .fit_threshold (fit_threshold),
    .state         (cell_state),
    .fitness       (cell_fitness),
    .rule_q        (rule_rdata),
    .global_ok     (global_ok)
  );

endmodule
