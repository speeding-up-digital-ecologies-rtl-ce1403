// ca_pkg: sizes, types and control encoding shared by the evolvable
// cellular-automaton system.
//
// The array is a ring of 256 four-state automata with a radius-1
// neighbourhood, so a cell's transition-rule table has 2^(3*2) = 64 entries
// of 2 bits. One generation presents 256 patterns, each run for 256 working
// cycles and evaluated in 2 fitness cycles, and then rewrites the 64 rule
// entries in 4 cycles each. The SEEDS and RESULTS memories are 8K words of
// 512 bits (one bit pair per cell), the RANDOM memory is 32K x 8. These
// numbers follow the published system; the 8-bit fitness width is read from
// its waveform display, and everything in the control encoding below is this
// design's own choice.
package ca_pkg;

  parameter int unsigned N_CELLS     = 256;    // cells in the ring
  parameter int unsigned STATE_W     = 2;      // 4-state automata
  parameter int unsigned NBHD_W      = 3 * STATE_W;  // left, centre, right
  parameter int unsigned RULE_DEPTH  = 1 << NBHD_W;  // 64 rule entries
  parameter int unsigned FIT_W       = 8;      // fitness counter width
  parameter int unsigned N_PATTERNS  = 256;    // patterns per generation
  parameter int unsigned DYN_CYCLES  = 256;    // working cycles per pattern
  parameter int unsigned PAT_DEPTH   = 8192;   // SEEDS / RESULTS words
  parameter int unsigned RAND_DEPTH  = 32768;  // RANDOM words
  parameter int unsigned RAND_W      = 8;      // RANDOM word width
  parameter int unsigned RULE_PHASES = 4;      // cycles per rule entry
  parameter int unsigned GEN_W       = 16;     // generation counter width

  // Per-cycle commands broadcast by the EVOLVER to every cell.
  typedef struct packed {
    logic init_load;    // load the seed into the state register
    logic step;         // one CA iteration: state <= rule[left,state,right]
    logic rule_global;  // rule table addressed by the global rule address
    logic fit_clear;    // clear the fitness counter
    logic fit_compare;  // latch (state == awaited result)
    logic fit_inc;      // increment fitness if the latched compare matched
    logic rule_wr;      // write the evolved rule entry if a neighbour is fitter
  } cell_ctrl_t;

  typedef enum logic [2:0] {
    EV_IDLE,   // waiting for start; host owns the rule tables
    EV_LOAD,   // load first seed of a generation, clear fitness
    EV_DYN,    // working cycles
    EV_FIT,    // two fitness cycles
    EV_EVOL    // global test, then rule modification
  } ev_state_e;

endpackage
