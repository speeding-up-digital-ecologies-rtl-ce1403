// tb_initialization_ctrl: runs the pattern sequence of several generations
// with a small configuration (4 patterns, 16 addresses) and checks the
// pattern address (running on across generations and wrapping), the seed
// load in the `first` cycle and in the cycle after each `next` except the
// generation's last, and `gen_end` after the last.
module tb_initialization_ctrl;
  localparam int PD = 16, NP = 4;
  logic clk = 0, rst_n = 0, first = 0, next = 0, init_load, gen_end;
  logic [3:0] pat_addr;
  logic [1:0] pat_idx;
  int checks = 0, failures = 0, addr_model = 0, loads = 0, ends = 0;

  initialization_ctrl #(.PAT_DEPTH(PD), .N_PATTERNS(NP)) dut (
    .clk, .rst_n, .first, .next, .pat_addr, .pat_idx, .init_load, .gen_end);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: addr=%0d idx=%0d load=%0b end=%0b", what, pat_addr, pat_idx, init_load, gen_end);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int gen = 0; gen < 10; gen++) begin
      @(negedge clk) first = 1; #1;
      chk(init_load && !gen_end, "first loads");
      loads += init_load;
      for (int p = 0; p < NP; p++) begin
        @(negedge clk) first = 0; next = 0;
        repeat ($urandom_range(3)) begin
          #1 chk(!init_load && !gen_end && pat_addr == 4'(addr_model), "idle");
          @(negedge clk);
        end
        next = 1; #1;
        chk(pat_addr == 4'(addr_model) && pat_idx == 2'(p), "compare address");
        @(negedge clk) next = 0; #1;
        addr_model = (addr_model + 1) % PD;
        chk(pat_addr == 4'(addr_model), "address advanced");
        if (p < NP - 1) chk(init_load && !gen_end, "next seed loaded");
        else            chk(!init_load && gen_end, "generation end");
        loads += init_load;
        ends  += gen_end;
      end
    end
    chk(loads == 10 * NP && ends == 10, "totals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
