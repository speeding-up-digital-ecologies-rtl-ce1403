// ca_cell: one automaton of the evolvable cellular array.
//
// State register: a STATE_W-bit state S_T. On `init_load` it takes the seed
// bits for this cell; on `step` it takes S_T+1 = rule[{left, S_T, right}], the
// rule table read as a look-up table addressed by the neighbourhood (left in
// the high bits, right in the low bits).
//
// Fitness: on `fit_compare` (issued with `rule_global` low, so that the rule
// table output is S_T+1) the cell latches whether both its final state S_T
// and the state S_T+1 that would follow it equal its awaited result, i.e.
// whether the cell sits at the awaited fixed point for two iterations. On the
// following `fit_inc` the fitness counter adds one if it did. `fit_clear`
// zeroes the counter.
//
// Rule modification: with `rule_global` set, the rule table is addressed by
// the broadcast `rule_addr` and its entry is offered to both neighbours on
// `rule_q`. On `rule_wr` the cell compares its fitness with each neighbour's:
//   - neither neighbour strictly fitter: the entry is kept (no write);
//   - exactly one fitter: that neighbour's entry is copied;
//   - both fitter (cross-over): `rnd_bit` picks the right (1) or left (0)
//     neighbour's entry, so over the 64 entries the new table is a uniform
//     mix of the two neighbours' tables.
// `host_wr` writes `host_rule` at `rule_addr` instead (initial rules).
// All updates happen on the rising clock edge; every read is combinational.
//
// The three rules, the two greater-than comparators, the compare of S_T+1
// against the awaited result and the two-iteration stability of a
// fixed-point result follow the published cell. Also requiring S_T to match,
// the latched two-cycle fitness step and the polarity of `rnd_bit` are this
// design's choices.
module ca_cell
  import ca_pkg::*;
#(
  parameter int unsigned SW = STATE_W,
  parameter int unsigned FW = FIT_W,
  localparam int unsigned AW = 3 * SW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cell_ctrl_t    ctrl,
  input  logic [AW-1:0] rule_addr,
  input  logic          host_wr,
  input  logic [SW-1:0] host_rule,
  input  logic [SW-1:0] seed,
  input  logic [SW-1:0] awaited,
  input  logic          rnd_bit,
  input  logic [SW-1:0] left_state,
  input  logic [SW-1:0] right_state,
  input  logic [FW-1:0] left_fit,
  input  logic [FW-1:0] right_fit,
  input  logic [SW-1:0] left_rule,
  input  logic [SW-1:0] right_rule,
  output logic [SW-1:0] state,
  output logic [FW-1:0] fitness,
  output logic [SW-1:0] rule_q
);

  logic [AW-1:0] lut_addr;
  logic          match_q;
  logic          left_better, right_better;
  logic          evo_wr, tbl_we;
  logic [SW-1:0] evo_data, tbl_wdata;

  assign lut_addr = ctrl.rule_global ? rule_addr : {left_state, state, right_state};

  // State register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              state <= '0;
    else if (ctrl.init_load) state <= seed;
    else if (ctrl.step)      state <= rule_q;
  end

  // Local fitness evaluation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                match_q <= 1'b0;
    else if (ctrl.fit_compare) match_q <= (state == awaited) && (rule_q == awaited);
  end

  fitness_counter #(.W(FW)) u_fit (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (ctrl.fit_clear),
    .inc   (ctrl.fit_inc && match_q),
    .count (fitness)
  );

  // Transition-rule modification
  assign left_better  = left_fit  > fitness;
  assign right_better = right_fit > fitness;

  always_comb begin
    evo_wr   = ctrl.rule_wr && (left_better || right_better);
    if (left_better && right_better) evo_data = rnd_bit ? right_rule : left_rule;
    else if (left_better)            evo_data = left_rule;
    else                             evo_data = right_rule;
  end

  assign tbl_we    = evo_wr || host_wr;
  assign tbl_wdata = host_wr ? host_rule : evo_data;

  rule_table #(.DEPTH(1 << AW), .WIDTH(SW)) u_rules (
    .clk   (clk),
    .addr  (lut_addr),
    .we    (tbl_we),
    .wdata (tbl_wdata),
    .rdata (rule_q)
  );

endmodule
