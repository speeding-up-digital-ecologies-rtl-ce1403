// tb_fixed_point_tasks: runs the two fixed-point tasks that the system was
// evolved on, at full size (256 cells, 256 patterns of 256 working cycles),
// for four back-to-back generations each, against a behavioural model of the
// automaton and of the selection rules.
//
//   density:  seeds are random 0/1 configurations whose density of ones is
//             itself drawn at random; the awaited result is all ones if more
//             than half the cells are 1, else all zeros.
//   ordering: same kind of seeds; the awaited result is the seed sorted, all
//             zeros on the low cells and all ones on the high cells.
//
// Each task starts from random rule tables and runs as one start with
// max_gens = 4, so later generations are opened by the last rule-write
// cycle. At the first rule-modification cycle of every generation the
// testbench compares all 256 fitness counters with the model; at the end it
// compares all 64 x 256 rule entries, the run length (1 + 4 x 66304 cycles)
// and the generation count. It prints the mean fitness per generation.
module tb_fixed_point_tasks;
  import ca_pkg::*;
  localparam int N = N_CELLS, NP = N_PATTERNS, DYN = DYN_CYCLES, G = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] max_gens = '0;
  logic [7:0] fit_threshold = '0;
  logic busy, done, ok;
  logic [15:0] gen_count;
  ev_state_e ev_state;
  logic seed_we = 0, res_we = 0, rnd_we = 0, rule_we = 0;
  logic [12:0] seed_waddr = '0, res_waddr = '0, pat_addr;
  logic [N*2-1:0] seed_wdata = '0, res_wdata = '0, rule_wdata = '0, rule_rdata, cell_state;
  logic [14:0] rnd_waddr = '0, rand_addr;
  logic [7:0] rnd_wdata = '0, pat_idx, dyn_count;
  logic [5:0] rule_addr = '0;
  logic [N*8-1:0] cell_fitness;

  evolvable_ca dut (
    .clk, .rst_n, .start, .max_gens, .fit_threshold, .busy, .done, .ok, .gen_count, .ev_state,
    .seed_we, .seed_waddr, .seed_wdata, .res_we, .res_waddr, .res_wdata,
    .rnd_we, .rnd_waddr, .rnd_wdata, .rule_we, .rule_addr, .rule_wdata, .rule_rdata,
    .cell_state, .cell_fitness, .pat_addr, .rand_addr, .pat_idx, .dyn_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [1:0] tbl [N][64];
  logic [1:0] seeds [G*NP][N];
  logic [1:0] res [G*NP][N];
  logic [7:0] rbytes [G*256];
  int fit [N];
  int fit_hist [G][N];

  initial begin
    repeat (1200000) @(posedge clk);
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

  function automatic void model_fitness(int base);
    logic [1:0] s [N], nx [N];
    for (int i = 0; i < N; i++) fit[i] = 0;
    for (int p = base; p < base + NP; p++) begin
      s = seeds[p];
      for (int t = 0; t <= DYN; t++) begin
        for (int i = 0; i < N; i++) nx[i] = tbl[i][{s[(i+N-1)%N], s[i], s[(i+1)%N]}];
        if (t == DYN)
          for (int i = 0; i < N; i++) if (s[i] == res[p][i] && nx[i] == res[p][i]) fit[i]++;
        s = nx;
      end
    end
    for (int i = 0; i < N; i++) if (fit[i] > 255) fit[i] = 255;
  endfunction

  function automatic void model_rules(int rbase);
    logic [1:0] nt [N][64];
    for (int a = 0; a < 64; a++) begin
      logic [31:0] rw;
      rw = {rbytes[rbase+4*a], rbytes[rbase+4*a+1], rbytes[rbase+4*a+2], rbytes[rbase+4*a+3]};
      for (int i = 0; i < N; i++) begin
        int l, r;
        bit lb, rb;
        l = (i + N - 1) % N; r = (i + 1) % N;
        lb = fit[l] > fit[i]; rb = fit[r] > fit[i];
        if (lb && rb)  nt[i][a] = rw[i % 32] ? tbl[r][a] : tbl[l][a];
        else if (lb)   nt[i][a] = tbl[l][a];
        else if (rb)   nt[i][a] = tbl[r][a];
        else           nt[i][a] = tbl[i][a];
      end
    end
    tbl = nt;
  endfunction

  // Sample the fitness counters at the first rule-modification cycle of
  // each generation.
  int gen_seen = 0;
  always @(negedge clk)
    if (busy && ev_state == EV_EVOL && dut.u_evolver.rule_addr == 0
        && !dut.ctrl.rule_wr && $past(ev_state) == EV_FIT) begin
      for (int i = 0; i < N; i++) fit_hist[gen_seen][i] = int'(cell_fitness[i*8 +: 8]);
      gen_seen++;
    end

  task automatic run_task(string name, bit ordering, int pat_base, int rnd_base);
    int cycles = 0;
    // random rule tables
    for (int i = 0; i < N; i++)
      for (int a = 0; a < 64; a++) tbl[i][a] = 2'($urandom);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      rule_we = 1; rule_addr = 6'(a);
      for (int i = 0; i < N; i++) rule_wdata[2*i +: 2] = tbl[i][a];
    end
    @(negedge clk) rule_we = 0;
    // seeds and awaited results
    for (int p = 0; p < G * NP; p++) begin
      int ones = 0, pct;
      pct = $urandom_range(100);
      for (int i = 0; i < N; i++) begin
        seeds[p][i] = ($urandom_range(99) < pct) ? 2'd1 : 2'd0;
        ones += seeds[p][i];
      end
      for (int i = 0; i < N; i++)
        res[p][i] = ordering ? ((i >= N - ones) ? 2'd1 : 2'd0) : ((2 * ones > N) ? 2'd1 : 2'd0);
      @(negedge clk);
      seed_we = 1; seed_waddr = 13'(pat_base + p); res_we = 1; res_waddr = 13'(pat_base + p);
      for (int i = 0; i < N; i++) begin seed_wdata[2*i +: 2] = seeds[p][i]; res_wdata[2*i +: 2] = res[p][i]; end
    end
    for (int k = 0; k < G * 256; k++) begin
      rbytes[k] = 8'($urandom);
      @(negedge clk);
      seed_we = 0; res_we = 0; rnd_we = 1; rnd_waddr = 15'(rnd_base + k); rnd_wdata = rbytes[k];
    end
    @(negedge clk) rnd_we = 0;
    chk(int'(pat_addr) == pat_base && int'(rand_addr) == rnd_base, {name, ": start addresses"});
    // run G generations in one go
    gen_seen = 0;
    max_gens = 16'(G); fit_threshold = 8'd255;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (busy) begin cycles++; @(negedge clk); end
    chk(cycles == 1 + G * (NP * (DYN + 2) + 256), $sformatf("%s: run length %0d", name, cycles));
    chk(gen_count == 16'(G) && !ok && gen_seen == G, {name, ": status"});
    // replay in the model, generation by generation
    for (int g = 0; g < G; g++) begin
      real mean = 0;
      model_fitness(g * NP);
      for (int i = 0; i < N; i++) begin
        chk(fit_hist[g][i] == fit[i], $sformatf("%s gen %0d fitness cell %0d: %0d expected %0d", name, g, i, fit_hist[g][i], fit[i]));
        mean += fit[i];
      end
      $display("%s generation %0d: mean fitness %0.1f of %0d", name, g, mean / N, NP);
      model_rules(g * 256);
    end
    for (int a = 0; a < 64; a++) begin
      @(negedge clk) rule_addr = 6'(a);
      #1;
      for (int i = 0; i < N; i++)
        chk(rule_rdata[2*i +: 2] == tbl[i][a], $sformatf("%s rule cell %0d addr %0d", name, i, a));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_task("density", 0, 0, 0);
    run_task("ordering", 1, G * NP, G * 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
