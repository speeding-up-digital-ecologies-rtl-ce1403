// tb_cell_array: a ring of 12 cells (cell i uses random bit i mod 32, so a
// 40-bit random word is used to exercise the wrap) checked against a
// reference model of the whole ring:
//  - random rule tables written and read back through the host port;
//  - several patterns of seed load + 30 iterations with circular boundary;
//  - fitness compares (state and next state both equal to the awaited
//    value) against random awaited words;
//  - the global test for thresholds below, at and above the minimum fitness;
//  - one full rule-modification walk (64 entries) with random bits, checked
//    against the keep / copy / cross-over rules using the neighbours' old
//    tables.
module tb_cell_array;
  import ca_pkg::*;
  localparam int N = 12, RW = 40;
  logic clk = 0, rst_n = 0;
  cell_ctrl_t ctrl;
  logic [5:0] rule_addr = '0;
  logic host_wr = 0;
  logic [N-1:0][1:0] host_rule = '0, seed = '0, awaited = '0, state, rule_q;
  logic [RW-1:0] rnd = '0;
  logic [7:0] fit_threshold = '0;
  logic [N-1:0][7:0] fitness;
  logic global_ok;
  logic [1:0] tbl [N][64];
  logic [1:0] st [N];
  int fit [N];
  int checks = 0, failures = 0;

  cell_array #(.N(N), .RND_W(RW)) dut (.clk, .rst_n, .ctrl, .rule_addr, .host_wr, .host_rule,
    .seed, .awaited, .rnd, .fit_threshold, .state, .fitness, .rule_q, .global_ok);

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
    int mn;
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      rule_addr = 6'(a); host_wr = 1;
      for (int i = 0; i < N; i++) begin host_rule[i] = 2'($urandom); tbl[i][a] = host_rule[i]; end
    end
    @(negedge clk) idle();
    for (int a = 0; a < 64; a++) begin
      rule_addr = 6'(a); #1;
      for (int i = 0; i < N; i++) chk(rule_q[i] == tbl[i][a], "host readback");
    end
    @(negedge clk) ctrl.fit_clear = 1;
    for (int i = 0; i < N; i++) fit[i] = 0;
    for (int p = 0; p < 20; p++) begin
      @(negedge clk);
      idle(); ctrl.init_load = 1;
      for (int i = 0; i < N; i++) begin seed[i] = 2'($urandom); st[i] = seed[i]; end
      for (int t = 0; t < 30; t++) begin
        logic [1:0] nx [N];
        @(negedge clk);
        for (int i = 0; i < N; i++) chk(state[i] == st[i], $sformatf("state p=%0d t=%0d i=%0d", p, t, i));
        ctrl = '0; ctrl.step = 1;
        for (int i = 0; i < N; i++) nx[i] = tbl[i][{st[(i+N-1)%N], st[i], st[(i+1)%N]}];
        st = nx;
      end
      @(negedge clk);
      ctrl = '0; ctrl.fit_compare = 1;
      for (int i = 0; i < N; i++) begin
        awaited[i] = ($urandom_range(1) != 0) ? st[i] : 2'($urandom);
        if (awaited[i] == st[i] && tbl[i][{st[(i+N-1)%N], st[i], st[(i+1)%N]}] == st[i]) fit[i]++;
      end
      @(negedge clk);
      idle(); ctrl.fit_inc = 1;
    end
    @(negedge clk) idle();
    mn = 1000;
    for (int i = 0; i < N; i++) begin
      chk(fitness[i] == 8'(fit[i]), $sformatf("fitness cell %0d: %0d vs %0d", i, fitness[i], fit[i]));
      if (fit[i] < mn) mn = fit[i];
    end
    fit_threshold = 8'(mn); #1 chk(global_ok == 1, "global ok at min");
    fit_threshold = 8'(mn + 1); #1 chk(global_ok == 0, "global not ok above min");
    fit_threshold = 0; #1 chk(global_ok == 1, "global ok at 0");
    // rule modification walk
    for (int a = 0; a < 64; a++) begin
      logic [1:0] nt [N];
      @(negedge clk);
      idle(); rule_addr = 6'(a); ctrl.rule_wr = 1;
      for (int i = 0; i < RW; i += 8) rnd[i +: 8] = 8'($urandom);
      for (int i = 0; i < N; i++) begin
        int l, r;
        bit lb, rb;
        l = (i + N - 1) % N; r = (i + 1) % N;
        lb = fit[l] > fit[i]; rb = fit[r] > fit[i];
        if (lb && rb)  nt[i] = rnd[i % RW] ? tbl[r][a] : tbl[l][a];
        else if (lb)   nt[i] = tbl[l][a];
        else if (rb)   nt[i] = tbl[r][a];
        else           nt[i] = tbl[i][a];
      end
      for (int i = 0; i < N; i++) tbl[i][a] = nt[i];
    end
    @(negedge clk) idle();
    for (int a = 0; a < 64; a++) begin
      rule_addr = 6'(a); #1;
      for (int i = 0; i < N; i++) chk(rule_q[i] == tbl[i][a], $sformatf("evolved rule cell %0d addr %0d got %0d exp %0d fit %0d %0d %0d", i, a, rule_q[i], tbl[i][a], fit[(i+N-1)%N], fit[i], fit[(i+1)%N]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
