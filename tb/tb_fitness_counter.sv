// tb_fitness_counter: random increment/clear sequences against a saturating
// reference count, including runs long enough (300 increments) to reach
// saturation at 255.
module tb_fitness_counter;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [7:0] count;
  int model = 0, checks = 0, failures = 0, sat_seen = 0;

  fitness_counter dut (.clk, .rst_n, .clear, .inc, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input logic c, input logic i);
    @(negedge clk);
    clear = c; inc = i;
    @(posedge clk);
    if (c) model = 0;
    else if (i && model < 255) model++;
    @(negedge clk);
    clear = 0; inc = 0;
    checks++;
    if (count != 8'(model)) begin
      failures++;
      $display("FAIL count %0d expected %0d", count, model);
    end
    if (model == 255) sat_seen++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (count != 0) begin failures++; $display("FAIL reset"); end
    for (int k = 0; k < 300; k++) cyc(0, 1);       // saturate
    cyc(1, 1);                                      // clear wins over inc
    for (int k = 0; k < 3000; k++) cyc($urandom_range(99) == 0, $urandom_range(1));
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
