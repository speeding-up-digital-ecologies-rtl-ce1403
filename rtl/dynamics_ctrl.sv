// dynamics_ctrl: the DYNAMICS part of the evolver.
//
// While `en` is high it issues one CA iteration (`step`) per clock and counts
// the working cycles of the current pattern; `last` marks the DYN_CYCLES-th
// one, after which the count restarts from zero. `count` is the number of
// working cycles already done for this pattern.
// The 256 working cycles per pattern follow the published generation
// budget; the enable/last handshake is this design's choice.
module dynamics_ctrl #(
  parameter int unsigned DYN_CYCLES = ca_pkg::DYN_CYCLES,
  localparam int unsigned CW = (DYN_CYCLES > 1) ? $clog2(DYN_CYCLES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic          step,
  output logic          last,
  output logic [CW-1:0] count
);

  assign step = en;
  assign last = en && (count == CW'(DYN_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (last) count <= '0;
    else if (en)   count <= count + 1'b1;
  end

endmodule
