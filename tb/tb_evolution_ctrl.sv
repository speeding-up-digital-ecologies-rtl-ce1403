// tb_evolution_ctrl: runs the full 64-location walk several times with
// random stalls of `en`, feeding rand_data from a model memory, and checks:
// 256 enabled cycles per walk, one write per location in its fourth cycle,
// the location address, the 32 random bits presented with each write (the
// four bytes read for that location, newest in the low bits), the running
// random address and the `at_start` / `last` flags.
module tb_evolution_ctrl;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] rand_data;
  logic [5:0] rule_addr;
  logic [14:0] rand_addr;
  logic [31:0] rnd_word;
  logic rule_wr, at_start, last;
  logic [7:0] rmem [32768];
  int checks = 0, failures = 0;

  evolution_ctrl dut (.clk, .rst_n, .en, .rand_data, .rule_addr, .rand_addr,
                      .rnd_word, .rule_wr, .at_start, .last);

  assign rand_data = rmem[rand_addr];

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
      if (failures < 20) $display("FAIL %s: addr=%0d raddr=%0d wr=%0b rnd=%h", what, rule_addr, rand_addr, rule_wr, rnd_word);
    end
  endtask

  initial begin
    int ra = 0, cycles, writes;
    for (int i = 0; i < 32768; i++) rmem[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int walk = 0; walk < 5; walk++) begin
      cycles = 0; writes = 0;
      for (int loc = 0; loc < 64; loc++) begin
        logic [31:0] exp_rnd;
        for (int ph = 0; ph < 4; ph++) begin
          @(negedge clk);
          while ($urandom_range(4) == 0) begin
            en = 0; #1;
            chk(!rule_wr && !last, "stalled");
            @(negedge clk);
          end
          en = 1; #1;
          chk(rule_addr == 6'(loc) && rand_addr == 15'(ra), "addresses");
          chk(at_start == (loc == 0 && ph == 0), "at_start");
          exp_rnd = {exp_rnd[23:0], rmem[ra]};
          chk(rule_wr == (ph == 3), "write phase");
          chk(last == (ph == 3 && loc == 63), "last");
          if (ph == 3) chk(rnd_word == exp_rnd, "random word");
          cycles++;
          writes += rule_wr;
          ra = (ra + 1) % 32768;
        end
      end
      chk(cycles == 256 && writes == 64, "walk length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
