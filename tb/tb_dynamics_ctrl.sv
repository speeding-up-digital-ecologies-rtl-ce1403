// tb_dynamics_ctrl: enables the counter for random stretches (including gaps
// inside a pattern) and checks that `last` comes on exactly the 256th enabled
// cycle of each pattern, that `step` follows `en`, and that `count` tracks a
// reference count.
module tb_dynamics_ctrl;
  localparam int DYN = 256;
  logic clk = 0, rst_n = 0, en = 0, step, last;
  logic [7:0] count;
  int model = 0, checks = 0, failures = 0, lasts = 0;

  dynamics_ctrl dut (.clk, .rst_n, .en, .step, .last, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      en = ($urandom_range(9) != 0);
      #1;
      checks++;
      if (step !== en || last !== (en && model == DYN - 1) || count != 8'(model)) begin
        failures++;
        $display("FAIL k=%0d en=%0b step=%0b last=%0b count=%0d model=%0d", k, en, step, last, count, model);
      end
      if (last) lasts++;
      @(posedge clk);
      if (en) model = (model == DYN - 1) ? 0 : model + 1;
    end
    checks++;
    if (lasts < 15) begin failures++; $display("FAIL only %0d patterns ended", lasts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
