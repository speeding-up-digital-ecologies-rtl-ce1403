// fitness_ctrl: the FITNESS part of the evolver.
//
// After the working cycles of a pattern, the evolver holds `en` for two
// cycles. In the first, `compare` makes every cell latch whether its state,
// and the state that would follow it, equal its awaited result (read from
// RESULTS at the current pattern address). In the second, `inc` makes the cells that matched increment their
// fitness counter; `last` marks that cycle.
// The two extra cycles per pattern follow the published generation budget;
// splitting them into a compare and an increment cycle is this design's
// choice.
module fitness_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic compare,
  output logic inc,
  output logic last
);

  logic second;

  assign compare = en && !second;
  assign inc     = en && second;
  assign last    = inc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  second <= 1'b0;
    else if (en) second <= !second;
  end

endmodule
