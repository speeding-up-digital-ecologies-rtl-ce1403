// cell_array: the ring of N automata.
//
// Instantiates N ca_cell blocks and closes them into a ring (cell 0's left
// neighbour is cell N-1, and cell N-1's right neighbour is cell 0), giving
// each cell its neighbours' states for the dynamics and their fitness and
// rule entries for rule modification. Seeds, awaited results and rule data
// arrive as packed N*STATE_W-bit words with cell i in bits
// [i*STATE_W +: STATE_W]. Cell i takes random bit i mod RND_W of the random
// word used for cross-over.
//
// `global_ok` is the global test of the evolution loop: it is set when every
// cell's fitness is at least `fit_threshold`. It is combinational from the
// fitness registers.
//
// The ring and its circular boundary follow the published system; the bit
// layout, the random-bit assignment and the form of the global test (which
// the published flow names but does not define) are this design's choices.
module cell_array
  import ca_pkg::*;
#(
  parameter int unsigned N     = N_CELLS,
  parameter int unsigned SW    = STATE_W,
  parameter int unsigned FW    = FIT_W,
  parameter int unsigned RND_W = RAND_W * RULE_PHASES,
  localparam int unsigned AW   = 3 * SW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cell_ctrl_t           ctrl,
  input  logic [AW-1:0]        rule_addr,
  input  logic                 host_wr,
  input  logic [N-1:0][SW-1:0] host_rule,
  input  logic [N-1:0][SW-1:0] seed,
  input  logic [N-1:0][SW-1:0] awaited,
  input  logic [RND_W-1:0]     rnd,
  input  logic [FW-1:0]        fit_threshold,
  output logic [N-1:0][SW-1:0] state,
  output logic [N-1:0][FW-1:0] fitness,
  output logic [N-1:0][SW-1:0] rule_q,
  output logic                 global_ok
);

  logic [N-1:0] cell_ok;

  for (genvar i = 0; i < N; i++) begin : g_cell
    localparam int unsigned L = (i + N - 1) % N;
    localparam int unsigned R = (i + 1) % N;

    ca_cell #(.SW(SW), .FW(FW)) u_cell (
      .clk         (clk),
      .rst_n       (rst_n),
      .ctrl        (ctrl),
      .rule_addr   (rule_addr),
      .host_wr     (host_wr),
      .host_rule   (host_rule[i]),
      .seed        (seed[i]),
      .awaited     (awaited[i]),
      .rnd_bit     (rnd[i % RND_W]),
      .left_state  (state[L]),
      .right_state (state[R]),
      .left_fit    (fitness[L]),
      .right_fit   (fitness[R]),
      .left_rule   (rule_q[L]),
      .right_rule  (rule_q[R]),
      .state       (state[i]),
      .fitness     (fitness[i]),
      .rule_q      (rule_q[i])
    );

    assign cell_ok[i] = fitness[i] >= fit_threshold;
  end

  assign global_ok = &cell_ok;

endmodule
