// fitness_counter: per-cell fitness register.
//
// Counts how many of the patterns of one generation ended with the cell in
// its awaited state. `clear` zeroes it at the start of a generation and takes
// priority; `inc` adds one on the rising edge. The count saturates at its
// maximum instead of wrapping, so with the default 8 bits a cell that matched
// all 256 patterns reads 255, still above every cell that missed at least
// two. Counting follows the published cell; the width is taken from the
// published waveform and saturation is this design's choice.
module fitness_counter #(
  parameter int unsigned W = ca_pkg::FIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         inc,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  count <= '0;
    else if (clear)              count <= '0;
    else if (inc && count != '1) count <= count + 1'b1;
  end

endmodule
