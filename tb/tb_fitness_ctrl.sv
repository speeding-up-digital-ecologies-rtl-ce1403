// tb_fitness_ctrl: holds `en` for two-cycle windows separated by random gaps
// and checks that each window gives exactly one compare cycle followed by one
// increment cycle, and nothing while `en` is low.
module tb_fitness_ctrl;
  logic clk = 0, rst_n = 0, en = 0, compare, inc, last;
  int checks = 0, failures = 0;

  fitness_ctrl dut (.clk, .rst_n, .en, .compare, .inc, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic c, input logic i);
    #1;
    checks++;
    if (compare !== c || inc !== i || last !== i) begin
      failures++;
      $display("FAIL en=%0b compare=%0b inc=%0b last=%0b, expected %0b %0b", en, compare, inc, last, c, i);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      int gap = $urandom_range(5);
      for (int g = 0; g < gap; g++) begin
        @(negedge clk) en = 0;
        expect_out(0, 0);
      end
      @(negedge clk) en = 1;
      expect_out(1, 0);
      @(negedge clk) en = 1;
      expect_out(0, 1);
    end
    @(negedge clk) en = 0;
    expect_out(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
