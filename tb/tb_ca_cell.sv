// tb_ca_cell: drives one cell directly.
//  1. host-writes a random 64-entry rule table and reads it back;
//  2. loads seeds and iterates with random neighbour states, checking each
//     new state against the reference table entry {left, state, right};
//  3. runs compare/increment fitness sequences with random awaited values
//     and neighbour states, and checks the fitness count (a match needs the
//     state and the table's next state both equal to the awaited value);
//  4. issues rule writes with random neighbour fitness (lower, equal,
//     higher), random neighbour entries and random cross-over bits, checking
//     keep / copy-left / copy-right / cross-over against the three rules.
module tb_ca_cell;
  import ca_pkg::*;
  logic clk = 0, rst_n = 0;
  cell_ctrl_t ctrl;
  logic [5:0] rule_addr = '0;
  logic host_wr = 0, rnd_bit = 0;
  logic [1:0] host_rule = '0, seed = '0, awaited = '0;
  logic [1:0] left_state = '0, right_state = '0, left_rule = '0, right_rule = '0;
  logic [7:0] left_fit = '0, right_fit = '0;
  logic [1:0] state, rule_q;
  logic [7:0] fitness;
  logic [1:0] tbl [64];
  int fit_model = 0, checks = 0, failures = 0;
  int n_keep = 0, n_left = 0, n_right = 0, n_cross = 0, n_stable = 0;

  ca_cell dut (.clk, .rst_n, .ctrl, .rule_addr, .host_wr, .host_rule, .seed, .awaited,
               .rnd_bit, .left_state, .right_state, .left_fit, .right_fit,
               .left_rule, .right_rule, .state, .fitness, .rule_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic idle();
    ctrl = '0; ctrl.rule_global = 1; host_wr = 0;
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. host write
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      rule_addr = 6'(a); host_rule = 2'($urandom); host_wr = 1; tbl[a] = host_rule;
    end
    @(negedge clk) idle();
    for (int a = 0; a < 64; a++) begin
      rule_addr = 6'(a); #1;
      chk(rule_q == tbl[a], $sformatf("host readback %0d", a));
    end
    // 2. dynamics
    for (int p = 0; p < 50; p++) begin
      logic [1:0] s;
      @(negedge clk);
      idle(); ctrl.init_load = 1; seed = 2'($urandom); s = seed;
      @(negedge clk);
      chk(state == s, "seed load");
      for (int t = 0; t < 40; t++) begin
        ctrl = '0; ctrl.step = 1;
        left_state = 2'($urandom); right_state = 2'($urandom);
        s = tbl[{left_state, s, right_state}];
        @(negedge clk);
        chk(state == s, $sformatf("step p=%0d t=%0d", p, t));
      end
    end
    // 3. fitness
    @(negedge clk) idle(); ctrl.fit_clear = 1; fit_model = 0;
    for (int k = 0; k < 120; k++) begin
      @(negedge clk);
      ctrl = '0; ctrl.fit_compare = 1;   // rule table read as next-state LUT
      left_state = 2'($urandom); right_state = 2'($urandom);
      awaited = ($urandom_range(2) != 0) ? state : 2'($urandom);
      if (awaited == state && tbl[{left_state, state, right_state}] == awaited) begin
        fit_model++; n_stable++;
      end
      @(negedge clk);
      idle(); ctrl.fit_inc = 1; awaited = ~state;  // ignored in this cycle
      @(negedge clk);
      idle();
      chk(fitness == 8'(fit_model), $sformatf("fitness %0d vs %0d", fitness, fit_model));
    end
    // 4. rule modification
    for (int k = 0; k < 2000; k++) begin
      bit lb, rb;
      @(negedge clk);
      idle();
      rule_addr = 6'($urandom);
      case ($urandom_range(2))
        0: left_fit = fitness - 8'($urandom_range(1, 5));
        1: left_fit = fitness;
        default: left_fit = fitness + 8'($urandom_range(1, 5));
      endcase
      case ($urandom_range(2))
        0: right_fit = fitness - 8'($urandom_range(1, 5));
        1: right_fit = fitness;
        default: right_fit = fitness + 8'($urandom_range(1, 5));
      endcase
      left_rule = 2'($urandom); right_rule = 2'($urandom); rnd_bit = 1'($urandom);
      ctrl.rule_wr = 1;
      lb = left_fit > fitness; rb = right_fit > fitness;
      if (lb && rb)  begin tbl[rule_addr] = rnd_bit ? right_rule : left_rule; n_cross++; end
      else if (lb)   begin tbl[rule_addr] = left_rule;  n_left++;  end
      else if (rb)   begin tbl[rule_addr] = right_rule; n_right++; end
      else n_keep++;
      @(negedge clk);
      idle();
      #1 chk(rule_q == tbl[rule_addr], $sformatf("rule write k=%0d lb=%0b rb=%0b", k, lb, rb));
    end
    for (int a = 0; a < 64; a++) begin
      rule_addr = 6'(a); #1;
      chk(rule_q == tbl[a], "final table");
    end
    chk(n_keep > 0 && n_left > 0 && n_right > 0 && n_cross > 0, "all four cases");
    chk(n_stable > 0, "some stable matches");
    $display("keep=%0d left=%0d right=%0d cross=%0d", n_keep, n_left, n_right, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
