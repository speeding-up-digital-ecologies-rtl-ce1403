// tb_evolvable_ca: end-to-end test of the whole system at its default size
// (256 cells, 256 patterns of 256 working cycles, 8K-word SEEDS/RESULTS,
// 32K-byte RANDOM), against a reference model of the automaton and of the
// evolution rules written here independently of the RTL.
//
// Set-up: random rule tables, except cell 0 whose table maps everything to
// state 0; random seeds. The awaited results are built from the reference
// model's final states (a cell scores only if its final state is also
// stable for one more iteration), with cell i's entry replaced by a random value with a
// probability drawn at random for each cell, so fitness varies along the ring;
// cell 0 always awaits 0, so it matches all 256 patterns and its counter
// saturates at 255.
//
// Run 1 (max_gens = 1, threshold 255): checks the generation length
// (1 + 256*258 + 256 = 66305 busy cycles), every cell's fitness, and all
// 64 x 256 rule entries after modification (keep / copy left / copy right /
// cross-over with the bytes of RANDOM), and the generation-limit stop.
// Run 2 (threshold 0): the next 256 seeds are evaluated with the evolved
// tables; checks fitness again, the global-test stop after
// 1 + 256*258 + 1 = 66050 cycles, and that no rule changed.
// Every mechanism is counted and a failure is counted for one that never
// happened.
module tb_evolvable_ca;
  import ca_pkg::*;
  localparam int N = N_CELLS, NP = N_PATTERNS, DYN = DYN_CYCLES;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] max_gens = '0;
  logic [7:0] fit_threshold = '0;
  logic busy, done, ok;
  logic [15:0] gen_count;
  ev_state_e ev_state;
  logic [7:0] pat_idx, dyn_count;
  logic seed_we = 0, res_we = 0, rnd_we = 0, rule_we = 0;
  logic [12:0] seed_waddr = '0, res_waddr = '0, pat_addr;
  logic [N*2-1:0] seed_wdata = '0, res_wdata = '0, rule_wdata = '0, rule_rdata, cell_state;
  logic [14:0] rnd_waddr = '0, rand_addr;
  logic [7:0] rnd_wdata = '0;
  logic [5:0] rule_addr = '0;
  logic [N*8-1:0] cell_fitness;

  evolvable_ca dut (
    .clk, .rst_n, .start, .max_gens, .fit_threshold, .busy, .done, .ok, .gen_count, .ev_state,
    .seed_we, .seed_waddr, .seed_wdata, .res_we, .res_waddr, .res_wdata,
    .rnd_we, .rnd_waddr, .rnd_wdata, .rule_we, .rule_addr, .rule_wdata, .rule_rdata,
    .cell_state, .cell_fitness, .pat_addr, .rand_addr, .pat_idx, .dyn_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load = 0, n_step = 0, n_inc = 0, n_wr = 0, n_sat = 0;
  int n_keep = 0, n_left = 0, n_right = 0, n_cross = 0, n_stop_gen = 0, n_stop_ok = 0;

  logic [1:0] tbl [N][64];
  logic [1:0] seeds [2*NP][N];
  logic [1:0] res [2*NP][N];
  logic [7:0] rbytes [256];
  int fit [N];
  int noise [N];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  // Reference automaton: final configuration after DYN iterations.
  // Also returns the configuration one iteration later, for the
  // fixed-point test.
  function automatic void run_ca(int p, output logic [1:0] fin [N], output logic [1:0] fin1 [N]);
    logic [1:0] s [N], nx [N];
    s = seeds[p];
    for (int t = 0; t <= DYN; t++) begin
      for (int i = 0; i < N; i++) nx[i] = tbl[i][{s[(i+N-1)%N], s[i], s[(i+1)%N]}];
      if (t == DYN) begin fin = s; fin1 = nx; end
      s = nx;
    end
  endfunction

  function automatic void expected_fitness(int base);
    logic [1:0] fin [N], fin1 [N];
    for (int i = 0; i < N; i++) fit[i] = 0;
    for (int p = base; p < base + NP; p++) begin
      run_ca(p, fin, fin1);
      for (int i = 0; i < N; i++) if (fin[i] == res[p][i] && fin1[i] == res[p][i]) fit[i]++;
    end
    for (int i = 0; i < N; i++) if (fit[i] > 255) begin fit[i] = 255; n_sat++; end
  endfunction

  function automatic void expected_rules();
    logic [1:0] nt [N][64];
    for (int a = 0; a < 64; a++) begin
      logic [31:0] rw;
      rw = {rbytes[4*a], rbytes[4*a+1], rbytes[4*a+2], rbytes[4*a+3]};
      for (int i = 0; i < N; i++) begin
        int l, r;
        bit lb, rb;
        l = (i + N - 1) % N; r = (i + 1) % N;
        lb = fit[l] > fit[i]; rb = fit[r] > fit[i];
        if (lb && rb)    begin nt[i][a] = rw[i % 32] ? tbl[r][a] : tbl[l][a]; n_cross++; end
        else if (lb)     begin nt[i][a] = tbl[l][a]; n_left++; end
        else if (rb)     begin nt[i][a] = tbl[r][a]; n_right++; end
        else             begin nt[i][a] = tbl[i][a]; n_keep++; end
      end
    end
    tbl = nt;
  endfunction

  task automatic check_fitness(string name);
    for (int i = 0; i < N; i++)
      chk(int'(cell_fitness[i*8 +: 8]) == fit[i],
          $sformatf("%s fitness cell %0d: %0d expected %0d", name, i, cell_fitness[i*8 +: 8], fit[i]));
  endtask

  task automatic check_rules(string name);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk) rule_addr = 6'(a);
      #1;
      for (int i = 0; i < N; i++)
        chk(rule_rdata[2*i +: 2] == tbl[i][a], $sformatf("%s rule cell %0d addr %0d", name, i, a));
    end
  endtask

  task automatic run(output int cycles);
    cycles = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (busy) begin
      cycles++;
      n_load += dut.ctrl.init_load;
      n_step += dut.ctrl.step;
      n_inc  += dut.ctrl.fit_inc;
      n_wr   += dut.ctrl.rule_wr;
      @(negedge clk);
    end
  endtask

  initial begin
    int cycles;
    logic [1:0] fin [N], fin1 [N];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // rule tables
    for (int i = 0; i < N; i++)
      for (int a = 0; a < 64; a++) tbl[i][a] = (i == 0) ? 2'd0 : 2'($urandom);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      rule_we = 1; rule_addr = 6'(a);
      for (int i = 0; i < N; i++) rule_wdata[2*i +: 2] = tbl[i][a];
    end
    @(negedge clk) rule_we = 0;
    check_rules("initial");
    // seeds for both runs, awaited results for run 1
    for (int i = 0; i < N; i++) noise[i] = (i % 7 == 0) ? 0 : $urandom_range(6);
    for (int p = 0; p < 2 * NP; p++) begin
      for (int i = 0; i < N; i++) seeds[p][i] = 2'($urandom);
      if (p < NP) begin
        run_ca(p, fin, fin1);
        for (int i = 0; i < N; i++)
          res[p][i] = (i == 0) ? 2'd0 : ($urandom_range(6) >= noise[i]) ? fin[i] : 2'($urandom);
      end else begin
        for (int i = 0; i < N; i++) res[p][i] = (i == 0) ? 2'd0 : 2'($urandom);
      end
      @(negedge clk);
      seed_we = 1; seed_waddr = 13'(p); res_we = 1; res_waddr = 13'(p);
      for (int i = 0; i < N; i++) begin seed_wdata[2*i +: 2] = seeds[p][i]; res_wdata[2*i +: 2] = res[p][i]; end
    end
    for (int k = 0; k < 256; k++) begin
      rbytes[k] = 8'($urandom);
      @(negedge clk);
      seed_we = 0; res_we = 0; rnd_we = 1; rnd_waddr = 15'(k); rnd_wdata = rbytes[k];
    end
    @(negedge clk) rnd_we = 0;

    // run 1: one generation, stopped by the generation limit
    expected_fitness(0);
    max_gens = 1; fit_threshold = 8'd255;
    run(cycles);
    $display("run 1: %0d cycles", cycles);
    chk(cycles == 1 + NP * (DYN + 2) + 64 * 4, $sformatf("generation length %0d", cycles));
    chk(gen_count == 1 && !ok, "run 1 status");
    if (gen_count == 1 && !ok) n_stop_gen++;
    check_fitness("run 1");
    expected_rules();
    check_rules("run 1");
    chk(pat_addr == 13'(NP) && rand_addr == 15'(256), "addresses after run 1");

    // run 2: next seed set with the evolved tables, stopped by the global test
    expected_fitness(NP);
    max_gens = 0; fit_threshold = 8'd0;
    run(cycles);
    $display("run 2: %0d cycles", cycles);
    chk(cycles == 1 + NP * (DYN + 2) + 1, $sformatf("global-stop length %0d", cycles));
    chk(gen_count == 0 && ok, "run 2 status");
    if (gen_count == 0 && ok) n_stop_ok++;
    check_fitness("run 2");
    check_rules("run 2 unchanged");

    $display("seed loads=%0d steps=%0d fitness increments=%0d rule writes=%0d saturations=%0d",
             n_load, n_step, n_inc, n_wr, n_sat);
    $display("keep=%0d copy-left=%0d copy-right=%0d cross-over=%0d stop-gen=%0d stop-ok=%0d",
             n_keep, n_left, n_right, n_cross, n_stop_gen, n_stop_ok);
    chk(n_load == 2 * NP, "seed loads");
    chk(n_step == 2 * NP * DYN, "working cycles");
    chk(n_inc == 2 * NP, "fitness cycles");
    chk(n_wr == 64, "rule write cycles");
    chk(n_sat > 0, "fitness saturation happened");
    chk(n_keep > 0, "keep happened");
    chk(n_left > 0, "copy-left happened");
    chk(n_right > 0, "copy-right happened");
    chk(n_cross > 0, "cross-over happened");
    chk(n_stop_gen > 0, "generation-limit stop happened");
    chk(n_stop_ok > 0, "global-test stop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
