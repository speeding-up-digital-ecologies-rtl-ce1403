// tb_random_mem: fills the whole 32K x 8 memory with a known pseudo-random
// sequence and reads every byte back, then checks that a disabled write
// leaves a byte alone.
module tb_random_mem;
  localparam int DEPTH = 32768;
  logic clk = 0, we = 0;
  logic [14:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  random_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      waddr = 15'(i); wdata = 8'($urandom); we = 1;
      model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 15'(i); #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %0h exp %0h", i, rdata, model[i]);
      end
    end
    @(negedge clk);
    waddr = 15'(77); wdata = ~model[77]; we = 0; raddr = 15'(77);
    @(negedge clk);
    checks++;
    if (rdata !== model[77]) begin failures++; $display("FAIL write without enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
