// tb_evolver: runs the sequencer with a small configuration (3 patterns of 5
// working cycles, 8 seed addresses, 64 random addresses, full 64-entry rule
// walk) and compares, cycle by cycle, the command word sent to the cells, the
// pattern address and the rule-write address with a trace built
// independently from the generation schedule:
//   LOAD | (DYN x5, FIT compare, FIT increment + next seed) x3 | EVOL x256
// Run 1: max_gens = 2, global test failing: two generations, 278 + 277
//        busy cycles, done pulse, gen_count = 2, ok = 0.
// Run 2: global test passing: stops in the first EVOL cycle without a rule
//        write, ok = 1.
module tb_evolver;
  import ca_pkg::*;
  localparam int DYN = 5, NP = 3, PD = 8, RD = 64;
  logic clk = 0, rst_n = 0, start = 0, global_ok = 0;
  logic [15:0] max_gens = '0;
  logic [7:0] rand_data = '0;
  cell_ctrl_t ctrl;
  logic [2:0] pat_addr;
  logic [5:0] rand_addr, rule_addr;
  logic [31:0] rnd_word;
  ev_state_e ev_state;
  logic [1:0] pat_idx;
  logic [2:0] dyn_count;
  logic busy, done, ok;
  logic [15:0] gen_count;
  int checks = 0, failures = 0;

  evolver #(.DYN_CYCLES_P(DYN), .N_PATTERNS_P(NP), .PAT_DEPTH_P(PD), .RAND_DEPTH_P(RD)) dut (
    .clk, .rst_n, .start, .max_gens, .global_ok, .rand_data, .ctrl, .pat_addr, .rand_addr,
    .rule_addr, .rnd_word, .pat_idx, .dyn_count, .ev_state, .busy, .done, .ok, .gen_count);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { cell_ctrl_t c; int pa; int ra; int pi; int dc; } exp_t;
  exp_t trace[$];
  int pa_model = 0;

  function automatic cell_ctrl_t mk(bit il, bit st, bit fc, bit fcmp, bit fi, bit wr);
    cell_ctrl_t c = '0;
    c.init_load = il; c.step = st; c.rule_global = !(st || fcmp || fi); c.fit_clear = fc;
    c.fit_compare = fcmp; c.fit_inc = fi; c.rule_wr = wr;
    return c;
  endfunction

  // Expected trace of one generation; `opening` adds the LOAD cycle,
  // `more` makes the last EVOL cycle open the next generation,
  // `stop_ok` cuts the generation at its first EVOL cycle.
  task automatic build_gen(bit opening, bit more, bit stop_ok);
    if (opening) trace.push_back('{mk(1, 0, 1, 0, 0, 0), pa_model, 0, -1, -1});
    for (int p = 0; p < NP; p++) begin
      for (int t = 0; t < DYN; t++) trace.push_back('{mk(0, 1, 0, 0, 0, 0), pa_model, 0, p, t});
      trace.push_back('{mk(0, 0, 0, 1, 0, 0), pa_model, 0, p, -1});
      pa_model = (pa_model + 1) % PD;
      trace.push_back('{mk(p < NP - 1, 0, 0, 0, 1, 0), pa_model, 0, -1, -1});
    end
    if (stop_ok) begin
      trace.push_back('{mk(0, 0, 0, 0, 0, 0), pa_model, 0, -1, -1});
      return;
    end
    for (int a = 0; a < 64; a++)
      for (int ph = 0; ph < 4; ph++) begin
        bit lastc = (a == 63 && ph == 3);
        trace.push_back('{mk(lastc && more, 0, lastc && more, 0, 0, ph == 3), pa_model, a, -1, -1});
      end
  endtask

  task automatic run_and_compare(string name, int exp_gens, bit exp_ok);
    int n = 0, busy_cycles = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (busy) begin
      exp_t e;
      if (trace.size() == 0) begin
        chk(0, $sformatf("%s: run longer than expected", name));
        break;
      end
      e = trace.pop_front();
      chk(ctrl == e.c, $sformatf("%s cycle %0d ctrl %b expected %b", name, n, ctrl, e.c));
      chk(int'(pat_addr) == e.pa, $sformatf("%s cycle %0d pat_addr %0d expected %0d", name, n, pat_addr, e.pa));
      if (e.pi >= 0) chk(int'(pat_idx) == e.pi, $sformatf("%s cycle %0d pat_idx", name, n));
      if (e.dc >= 0) chk(int'(dyn_count) == e.dc, $sformatf("%s cycle %0d dyn_count", name, n));
      if (ctrl.rule_wr) chk(int'(rule_addr) == e.ra, $sformatf("%s cycle %0d rule_addr", name, n));
      busy_cycles++; n++;
      @(negedge clk);
    end
    chk(trace.size() == 0, $sformatf("%s: %0d expected cycles left", name, trace.size()));
    chk(done == 1, $sformatf("%s: done pulse", name));
    chk(int'(gen_count) == exp_gens && ok == exp_ok, $sformatf("%s: gen_count %0d ok %0b", name, gen_count, ok));
    @(negedge clk);
    chk(done == 0 && !busy, $sformatf("%s: done is a pulse", name));
    $display("%s: %0d busy cycles", name, busy_cycles);
  endtask

  function automatic void chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // run 1: two generations, cut by max_gens
    max_gens = 2; global_ok = 0;
    build_gen(1, 1, 0);
    build_gen(0, 0, 0);
    chk(trace.size() == (1 + NP*(DYN+2) + 256) + (NP*(DYN+2) + 256), "trace length");
    run_and_compare("gen-limit", 2, 0);
    // run 2: global test passes at the first check
    max_gens = 0; global_ok = 1;
    build_gen(1, 0, 1);
    run_and_compare("global-ok", 0, 1);
    chk(rand_addr == 6'((2 * 256) % RD), "random address after two walks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
