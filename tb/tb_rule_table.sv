// tb_rule_table: fills the 64 x 2 rule memory with random data, checks every
// entry through the combinational read port, checks that an entry only
// changes on a write-enabled clock edge, and rewrites part of it.
module tb_rule_table;
  localparam int DEPTH = 64, WIDTH = 2;
  logic clk = 0, we = 0;
  logic [5:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  rule_table dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = 6'(i); wdata = WIDTH'($urandom); we = 1;
      model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = 6'(i); #1;
      check(rdata, model[i], $sformatf("read %0d", i));
    end
    // no write without enable
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = 6'(i); wdata = ~model[i]; we = 0;
      @(negedge clk);
      check(rdata, model[i], $sformatf("hold %0d", i));
    end
    // random rewrites, each checked right after its edge
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      addr = 6'($urandom_range(DEPTH-1)); wdata = WIDTH'($urandom); we = 1;
      model[addr] = wdata;
      @(negedge clk);
      we = 0;
      check(rdata, model[addr], "rewrite");
      addr = 6'($urandom_range(DEPTH-1)); #1;
      check(rdata, model[addr], "other");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
