// initialization_ctrl: the INITIALIZATION part of the evolver.
//
// Holds the pattern address shared by the SEEDS and RESULTS memories and
// counts the patterns presented in the current generation, and issues the
// cells' seed-load command.
//
// The address keeps running from one generation to the next (wrapping at
// PAT_DEPTH), so successive generations see different seed sets: presenting
// the same patterns every generation is reported to stall evolution.
//
// Timing:
//   - `first` (the cycle that opens a generation) asserts `init_load` in the
//     same cycle and restarts the pattern count.
//   - `next` (the fitness compare cycle, which still reads RESULTS at the old
//     address) advances address and count at its rising edge. In the cycle
//     after `next`, `init_load` loads the seed at the new address, unless the
//     pattern just finished was the generation's last; then `gen_end` is set
//     instead.
// The sharing of one address by SEEDS and RESULTS follows the published
// waveform; the rest of the scheme is this design's choice.
module initialization_ctrl #(
  parameter int unsigned PAT_DEPTH  = ca_pkg::PAT_DEPTH,
  parameter int unsigned N_PATTERNS = ca_pkg::N_PATTERNS,
  localparam int unsigned AW = $clog2(PAT_DEPTH),
  localparam int unsigned CW = (N_PATTERNS > 1) ? $clog2(N_PATTERNS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          first,
  input  logic          next,
  output logic [AW-1:0] pat_addr,
  output logic [CW-1:0] pat_idx,
  output logic          init_load,
  output logic          gen_end
);

  logic last_pat;
  logic load_q, end_q;

  assign last_pat = (pat_idx == CW'(N_PATTERNS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat_addr <= '0;
      pat_idx  <= '0;
      load_q   <= 1'b0;
      end_q    <= 1'b0;
    end else begin
      load_q <= next && !last_pat;
      end_q  <= next && last_pat;
      if (first) begin
        pat_idx <= '0;
      end else if (next) begin
        pat_addr <= (pat_addr == AW'(PAT_DEPTH - 1)) ? '0 : pat_addr + 1'b1;
        pat_idx  <= last_pat ? '0 : pat_idx + 1'b1;
      end
    end
  end

  assign init_load = first || load_q;
  assign gen_end   = end_q;

endmodule
