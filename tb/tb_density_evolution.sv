// tb_density_evolution: the density task over many generations at full size
// (256 cells, 256 patterns of 256 working cycles per generation), as one
// long evolution run.
//
// Seeds are random 0/1 configurations whose density of ones is drawn at
// random, filling all 8192 SEEDS words; the awaited result is all ones if
// more than half the cells are 1, else all zeros. Rule tables start random.
// Each generation is started on its own (max_gens = 1) so that the rule
// tables can be read out between generations. For every generation the
// testbench
//   - checks the run length (1 + 66304 cycles) and the addresses,
//   - samples all fitness counters at the first rule-modification cycle; in
//     the first and the last generation it checks them against a reference
//     model of the automaton,
//   - reads all 64 x 256 rule entries afterwards and checks each one against
//     the keep / copy / cross-over rules applied to the previous tables, the
//     sampled fitness and the RANDOM bytes of that generation.
// It prints the mean and best fitness every 10 generations, and counts a
// failure if the mean fitness of the last generation is not above that of
// the first.
module tb_density_evolution;
  import ca_pkg::*;
  localparam int N = N_CELLS, NP = N_PATTERNS, DYN = DYN_CYCLES;
  localparam int G = 100;
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
  logic [7:0] rbytes [G*256];
  logic [1:0] seeds [PAT_DEPTH][N];
  logic [1:0] res_bit [PAT_DEPTH];
  int fit [N];
  bit sampled;

  initial begin
    repeat (G * 67000 + 100000) @(posedge clk);
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

  always @(negedge clk)
    if (busy && ev_state == EV_EVOL && !sampled) begin
      for (int i = 0; i < N; i++) fit[i] = int'(cell_fitness[i*8 +: 8]);
      sampled = 1;
    end

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

  // Reference fitness of generation g from the current tables.
  function automatic void check_fitness(int g);
    logic [1:0] st [N], nx [N];
    int mf [N];
    for (int i = 0; i < N; i++) mf[i] = 0;
    for (int k = 0; k < NP; k++) begin
      int p;
      p = (g * NP + k) % PAT_DEPTH;
      st = seeds[p];
      for (int t = 0; t <= DYN; t++) begin
        for (int i = 0; i < N; i++) nx[i] = tbl[i][{st[(i+N-1)%N], st[i], st[(i+1)%N]}];
        if (t == DYN)
          for (int i = 0; i < N; i++) if (st[i] == res_bit[p] && nx[i] == res_bit[p]) mf[i]++;
        st = nx;
      end
    end
    for (int i = 0; i < N; i++)
      chk(fit[i] == ((mf[i] > 255) ? 255 : mf[i]),
          $sformatf("gen %0d fitness cell %0d: %0d expected %0d", g, i, fit[i], mf[i]));
  endfunction

  initial begin
    real first_mean = 0, mean;
    int best, cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++)
      for (int a = 0; a < 64; a++) tbl[i][a] = 2'($urandom);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      rule_we = 1; rule_addr = 6'(a);
      for (int i = 0; i < N; i++) rule_wdata[2*i +: 2] = tbl[i][a];
    end
    @(negedge clk) rule_we = 0;
    for (int p = 0; p < PAT_DEPTH; p++) begin
      int ones = 0, pct;
      pct = $urandom_range(100);
      for (int i = 0; i < N; i++) begin
        seed_wdata[2*i +: 2] = ($urandom_range(99) < pct) ? 2'd1 : 2'd0;
        seeds[p][i] = seed_wdata[2*i +: 2];
        ones += int'(seed_wdata[2*i +: 2]);
      end
      res_bit[p] = (2 * ones > N) ? 2'd1 : 2'd0;
      res_wdata = '0;
      for (int i = 0; i < N; i++) res_wdata[2*i +: 2] = (2 * ones > N) ? 2'd1 : 2'd0;
      seed_we = 1; seed_waddr = 13'(p); res_we = 1; res_waddr = 13'(p);
      @(negedge clk);
    end
    seed_we = 0; res_we = 0;
    for (int k = 0; k < G * 256; k++) begin
      rbytes[k] = 8'($urandom);
      rnd_we = 1; rnd_waddr = 15'(k); rnd_wdata = rbytes[k];
      @(negedge clk);
    end
    rnd_we = 0;
    max_gens = 16'd1; fit_threshold = 8'd255;
    for (int g = 0; g < G; g++) begin
      chk(int'(pat_addr) == (g * NP) % PAT_DEPTH && int'(rand_addr) == g * 256,
          $sformatf("gen %0d start addresses", g));
      sampled = 0; cycles = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (busy) begin cycles++; @(negedge clk); end
      chk(cycles == 1 + NP * (DYN + 2) + 256 && sampled && gen_count == 1,
          $sformatf("gen %0d length %0d", g, cycles));
      mean = 0; best = 0;
      for (int i = 0; i < N; i++) begin
        mean += fit[i];
        if (fit[i] > best) best = fit[i];
      end
      mean = mean / N;
      if (g == 0) first_mean = mean;
      if (g % 10 == 0 || g == G - 1)
        $display("generation %0d: mean fitness %0.1f, best %0d (of %0d patterns)", g, mean, best, NP);
      if (g == 0 || g == G - 1) check_fitness(g);
      model_rules(g * 256);
      for (int a = 0; a < 64; a++) begin
        rule_addr = 6'(a);
        #1;
        for (int i = 0; i < N; i++)
          chk(rule_rdata[2*i +: 2] == tbl[i][a], $sformatf("gen %0d rule cell %0d addr %0d", g, i, a));
      end
    end
    chk(mean > first_mean, $sformatf("mean fitness rose from %0.1f to %0.1f", first_mean, mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
