// evolver: the sequencer of dynamics, fitness evaluation and evolution.
//
// One generation:
//   LOAD  1 cycle    first seed loaded into the cells, fitness cleared
//   then, for each of N_PATTERNS patterns:
//     DYN  DYN_CYCLES cycles   one CA iteration per cycle
//     FIT  2 cycles            compare with the awaited result, then
//                              increment fitness; the second cycle also loads
//                              the next pattern's seed
//   EVOL  RULE_DEPTH*RULE_PHASES cycles   rule modification
// With the defaults that is 256 x (256 + 2) + 256 = 66304 cycles, plus the
// LOAD cycle of the first generation of a run: later generations are opened
// by the last EVOL cycle, which loads their first seed and clears fitness
// while it writes the last rule entry.
//
// Global test: in the first EVOL cycle, before any rule is written, the run
// ends if `global_ok` (every cell at or above the fitness threshold) is set;
// `ok` then stays set until the next start. Otherwise the run ends after
// `max_gens` generations (0 = run until the global test passes). `done`
// pulses for one cycle in the first idle cycle after a run; `busy` is high
// from the LOAD cycle to the last cycle of the run.
//
// Interface: `ctrl` is the command word broadcast to all cells; `pat_addr`
// addresses SEEDS and RESULTS, `rand_addr` addresses RANDOM, `rule_addr`
// is the rule location being modified and `rnd_word` the random bits for it.
// `pat_idx` is the pattern's number within the generation and `dyn_count`
// the working cycles already done on it.
// `ctrl.rule_global` is low during the working and fitness cycles (the rule
// tables then act as next-state look-up tables) and high otherwise, so that
// when the evolver is idle the rule tables can be read and written by the
// host.
//
// The generation structure and its cycle budget, the flow of dynamics,
// fitness, global test and rule modification follow the published system;
// the overlapping of generation start with the last rule write, the form
// of the global test and the generation limit are this design's choices.
module evolver
  import ca_pkg::*;
#(
  parameter int unsigned DYN_CYCLES_P = DYN_CYCLES,
  parameter int unsigned N_PATTERNS_P = N_PATTERNS,
  parameter int unsigned PAT_DEPTH_P  = PAT_DEPTH,
  parameter int unsigned RULE_DEPTH_P = RULE_DEPTH,
  parameter int unsigned RAND_DEPTH_P = RAND_DEPTH,
  localparam int unsigned PAW = $clog2(PAT_DEPTH_P),
  localparam int unsigned RAW = $clog2(RAND_DEPTH_P),
  localparam int unsigned AW  = $clog2(RULE_DEPTH_P),
  localparam int unsigned RNW = RAND_W * RULE_PHASES,
  localparam int unsigned PCW = (N_PATTERNS_P > 1) ? $clog2(N_PATTERNS_P) : 1,
  localparam int unsigned DCW = (DYN_CYCLES_P > 1) ? $clog2(DYN_CYCLES_P) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [GEN_W-1:0]  max_gens,
  input  logic              global_ok,
  input  logic [RAND_W-1:0] rand_data,
  output cell_ctrl_t        ctrl,
  output logic [PAW-1:0]    pat_addr,
  output logic [RAW-1:0]    rand_addr,
  output logic [AW-1:0]     rule_addr,
  output logic [RNW-1:0]    rnd_word,
  output logic [PCW-1:0]    pat_idx,
  output logic [DCW-1:0]    dyn_count,
  output ev_state_e         ev_state,
  output logic              busy,
  output logic              done,
  output logic              ok,
  output logic [GEN_W-1:0]  gen_count
);

  ev_state_e state, state_n;

  logic first, dyn_en, fit_en, evo_en;
  logic init_load, gen_end;
  logic dyn_step, dyn_last;
  logic fit_cmp, fit_inc, fit_last;
  logic evo_wr, evo_start, evo_last;
  logic stop_ok, stop_gen;

  // Global test before any rule is written; generation limit at the end.
  assign stop_ok  = (state == EV_EVOL) && evo_start && global_ok;
  assign stop_gen = evo_last && (max_gens != '0) && (gen_count + 1'b1 == max_gens);

  assign dyn_en = (state == EV_DYN);
  assign fit_en = (state == EV_FIT);
  assign evo_en = (state == EV_EVOL) && !stop_ok;
  assign first  = (state == EV_LOAD) || (evo_last && !stop_gen);

  initialization_ctrl #(.PAT_DEPTH(PAT_DEPTH_P), .N_PATTERNS(N_PATTERNS_P)) u_init (
    .clk (clk), .rst_n (rst_n), .first (first), .next (fit_cmp),
    .pat_addr (pat_addr), .pat_idx (pat_idx), .init_load (init_load), .gen_end (gen_end)
  );

  dynamics_ctrl #(.DYN_CYCLES(DYN_CYCLES_P)) u_dyn (
    .clk (clk), .rst_n (rst_n), .en (dyn_en),
    .step (dyn_step), .last (dyn_last), .count (dyn_count)
  );

  fitness_ctrl u_fit (
    .clk (clk), .rst_n (rst_n), .en (fit_en),
    .compare (fit_cmp), .inc (fit_inc), .last (fit_last)
  );

  evolution_ctrl #(.RULE_DEPTH(RULE_DEPTH_P), .PHASES(RULE_PHASES),
                   .RAND_DEPTH(RAND_DEPTH_P), .RAND_W(RAND_W)) u_evo (
    .clk (clk), .rst_n (rst_n), .en (evo_en), .rand_data (rand_data),
    .rule_addr (rule_addr), .rand_addr (rand_addr), .rnd_word (rnd_word),
    .rule_wr (evo_wr), .at_start (evo_start), .last (evo_last)
  );

  always_comb begin
    state_n = state;
    unique case (state)
      EV_IDLE: if (start)    state_n = EV_LOAD;
      EV_LOAD:               state_n = EV_DYN;
      EV_DYN:  if (dyn_last) state_n = EV_FIT;
      EV_FIT:  if (fit_last) state_n = gen_end ? EV_EVOL : EV_DYN;
      EV_EVOL: if (stop_ok || stop_gen) state_n = EV_IDLE;
               else if (evo_last)       state_n = EV_DYN;
      default:               state_n = EV_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= EV_IDLE;
      done      <= 1'b0;
      ok        <= 1'b0;
      gen_count <= '0;
    end else begin
      state <= state_n;
      done  <= (state == EV_EVOL) && (state_n == EV_IDLE);
      if (state == EV_IDLE && start) begin
        ok        <= 1'b0;
        gen_count <= '0;
      end else begin
        if (stop_ok)  ok        <= 1'b1;
        if (evo_last) gen_count <= gen_count + 1'b1;
      end
    end
  end

  always_comb begin
    ctrl             = '0;
    ctrl.init_load   = init_load;
    ctrl.fit_clear   = first;
    ctrl.step        = dyn_step;
    ctrl.rule_global = (state != EV_DYN) && (state != EV_FIT);
    ctrl.fit_compare = fit_cmp;
    ctrl.fit_inc     = fit_inc;
    ctrl.rule_wr     = evo_wr;
  end

  assign ev_state = state;
  assign busy     = (state != EV_IDLE);

  // The cells must never be asked to load a seed and iterate in one cycle,
  // and a rule write only happens during rule modification.
  a_load_step: assert property (@(posedge clk) disable iff (!rst_n)
                                !(ctrl.init_load && ctrl.step));
  a_wr_evol:   assert property (@(posedge clk) disable iff (!rst_n)
                                ctrl.rule_wr |-> state == EV_EVOL);

endmodule
