// tb_results_mem: writes random 512-bit words at random addresses of the full
// 8K-word memory, then reads every written address back and compares with a
// reference copy; also checks that a disabled write leaves a word alone.
module tb_results_mem;
  localparam int DEPTH = 8192, WIDTH = 512;
  logic clk = 0, we = 0;
  logic [12:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [int];
  int checks = 0, failures = 0;

  results_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] rnd_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      waddr = 13'($urandom_range(DEPTH-1)); wdata = rnd_word(); we = 1;
      if (k < 8) waddr = 13'(1 << (k + 5));  // every high address bit
      model[int'(waddr)] = wdata;
    end
    @(negedge clk) we = 0;
    foreach (model[a]) begin
      raddr = 13'(a); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d", a);
      end
    end
    @(negedge clk);
    waddr = 13'(32); wdata = ~model[32]; we = 0; raddr = 13'(32);
    @(negedge clk);
    checks++;
    if (rdata !== model[32]) begin failures++; $display("FAIL write without enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
