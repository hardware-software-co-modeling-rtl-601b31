// tb_control_unit: the control unit against behavioural implication units.
//
// The testbench plays two IUs at the command level: it records the literals
// each one is sent, keeps a variable table per IU, and after every burst of
// commands (four quiet cycles, during which iu_idle is low) propagates each
// IU's clauses to a fixpoint, queueing implications or a conflict. It
// answers READ with the queued words and an end word, and derives config_n
// and cu_stsin the way the glue logic does. Checked: round-robin partition of
// the clauses, CFG_DONE to every IU, the SAT/UNSAT verdict against brute
// force, the returned assignment against every clause, the capacity error,
// and that decisions, backtracks and reads all occurred.
module tb_control_unit;
  import sat_pkg::*;
  localparam int N = 2, NV = 10, MAXL = 512;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             ld_we, start, done, sat, error, res_value, res_assigned;
  logic [12:0]      ld_addr;
  inst_lit_t        ld_data;
  logic [VAR_W:0]   num_vars;
  logic [13:0]      num_lits;
  logic [VAR_W-1:0] res_var;
  logic [31:0]      n_decisions, n_implications, n_conflicts, n_reads;
  cu_word_t         cu_out;
  iu_word_t         cu_in;
  logic             cu_in_valid, cu_stsin, config_n, iu_idle;
  logic             cmd_ready, cu_in_pop, popped;

  control_unit #(.N_IU(N), .ROWS(64), .ROW_LITS(4)) dut (.*);

  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // instance (1-based signed literals)
  int lits [MAXL];
  bit lasts[MAXL];
  int nl, nv;

  // ---- behavioural IUs ----
  lit_t     iu_lit  [N][MAXL];
  bit       iu_last [N][MAXL];
  int       iu_n    [N];
  bit       iu_cfg  [N];
  vstat_e   iu_s    [N][NV];
  logic     iu_v    [N][NV];
  impl_t    iu_q    [N][$];
  bit       iu_conf [N];
  iu_word_t stream  [$];
  int       quiet, clause_idx, part_err;
  bit       dirty;

  function automatic void propagate(int k);
    bit changed = 1'b1;
    while (changed && !iu_conf[k]) begin
      int nfree = 0, st = 0;
      lit_t fl;
      changed = 1'b0;
      fl = '0;
      for (int i = 0; i < iu_n[k]; i++) begin
        lit_t l = iu_lit[k][i];
        if (iu_s[k][l.vidx] == V_FREE) begin nfree++; fl = l; end
        else if (iu_v[k][l.vidx] != l.neg) st = 1;
        if (iu_last[k][i]) begin
          if (st == 0 && nfree == 0) begin iu_conf[k] = 1'b1; break; end
          if (st == 0 && nfree == 1) begin
            iu_s[k][fl.vidx] = V_IMPLIED;
            iu_v[k][fl.vidx] = !fl.neg;
            iu_q[k].push_back('{value: !fl.neg, vidx: fl.vidx});
            changed = 1'b1;
          end
          nfree = 0; st = 0;
        end
      end
    end
  endfunction

  always @(posedge clk) popped <= cu_in_pop;

  always @(negedge clk) begin
    if (popped && stream.size() != 0) void'(stream.pop_front());
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        iu_n[k] = 0; iu_cfg[k] = 0; iu_conf[k] = 0; iu_q[k] = {};
        for (int i = 0; i < NV; i++) iu_s[k][i] = V_FREE;
      end
      stream = {}; quiet = 0; dirty = 0; clause_idx = 0; part_err = 0;
    end else begin
      cu_word_t w;
      w = cu_out;
      if (w.cmd != CMD_NOP) quiet = 4;
      else if (quiet > 0) quiet--;
      unique case (w.cmd)
        CMD_LIT: begin
          if (int'(w.addr) != clause_idx % N) part_err++;
          iu_lit[w.addr][iu_n[w.addr]]  = '{neg: w.value, vidx: w.vidx};
          iu_last[w.addr][iu_n[w.addr]] = w.last;
          iu_n[w.addr]++;
          if (w.last) clause_idx++;
        end
        CMD_CFG_DONE: iu_cfg[w.addr] = 1'b1;
        CMD_CLEAR: begin
          for (int k = 0; k < N; k++) begin
            for (int i = 0; i < NV; i++) iu_s[k][i] = V_FREE;
            iu_q[k] = {}; iu_conf[k] = 0;
          end
          dirty = 1;
        end
        CMD_VAR: begin
          for (int k = 0; k < N; k++) begin
            iu_s[k][w.vidx] = w.stat; iu_v[k][w.vidx] = w.value;
          end
          dirty = 1;
        end
        CMD_READ: begin
          while (iu_q[w.addr].size() != 0)
            stream.push_back('{last: 1'b0, conflict: 1'b0, impl: iu_q[w.addr].pop_front()});
          stream.push_back('{last: 1'b1, conflict: iu_conf[w.addr], impl: '0});
          iu_conf[w.addr] = 0;
        end
        default: ;
      endcase
      if (quiet == 0 && dirty) begin
        for (int k = 0; k < N; k++) propagate(k);
        dirty = 0;
      end
    end
    // outputs seen by the CU at the next rising edge
    iu_idle  = (quiet == 0) && !dirty;
    cu_stsin = 1'b0;
    config_n = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (iu_q[k].size() != 0 || iu_conf[k]) cu_stsin = 1'b1;
      if (!iu_cfg[k]) config_n = 1'b1;
    end
    cu_in_valid = (stream.size() != 0);
    cu_in = (stream.size() != 0) ? stream[0] : '0;
    cmd_ready = ($urandom_range(4) != 0);
  end

  function automatic bit lit_true(int l, bit val);
    return (l > 0) ? val : !val;
  endfunction

  function automatic bit brute_sat();
    for (int unsigned a = 0; a < (1 << nv); a++) begin
      bit all_ok = 1'b1, cl_ok = 1'b0;
      for (int i = 0; i < nl; i++) begin
        int x = (lits[i] > 0) ? lits[i] : -lits[i];
        if (lit_true(lits[i], a[x-1])) cl_ok = 1'b1;
        if (lasts[i]) begin
          if (!cl_ok) all_ok = 1'b0;
          cl_ok = 1'b0;
        end
      end
      if (all_ok) return 1'b1;
    end
    return 1'b0;
  endfunction

  int tot_dec = 0, tot_bt = 0, tot_rd = 0, n_sat = 0, n_unsat = 0;

  task automatic solve_and_check(input string name, input bit expect_err);
    int t;
    bit ok, cl_ok;
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < nl; i++) begin
      int x = (lits[i] > 0) ? lits[i] : -lits[i];
      ld_we = 1'b1; ld_addr = 13'(i);
      ld_data = '{last: lasts[i], lit: '{neg: lits[i] < 0, vidx: VAR_W'(x - 1)}};
      @(negedge clk);
    end
    ld_we = 1'b0;
    num_vars = (VAR_W+1)'(nv); num_lits = 14'(nl);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t = 0;
    while (!done && t < 500000) begin @(negedge clk); t++; end
    check(done, {name, ": finished"});
    check(error == expect_err, {name, ": error flag"});
    if (expect_err) return;
    check(part_err == 0, {name, ": clause i went to IU i mod N"});
    check(iu_cfg[0] && iu_cfg[1], {name, ": every IU got CFG_DONE"});
    check(sat == brute_sat(), {name, ": verdict matches brute force"});
    if (sat) begin
      ok = 1'b1; cl_ok = 1'b0;
      for (int i = 0; i < nl; i++) begin
        int x = (lits[i] > 0) ? lits[i] : -lits[i];
        res_var = VAR_W'(x - 1);
        #1;
        if (lit_true(lits[i], res_value) && res_assigned) cl_ok = 1'b1;
        if (lasts[i]) begin if (!cl_ok) ok = 1'b0; cl_ok = 1'b0; end
      end
      check(ok, {name, ": assignment satisfies every clause"});
      n_sat++;
    end else n_unsat++;
    tot_dec += n_decisions; tot_bt += n_conflicts; tot_rd += n_reads;
  endtask

  task automatic add(input int a, input int b = 0, input int c = 0);
    int cls[3];
    int n;
    cls = '{a, b, c};
    n = (c != 0) ? 3 : (b != 0) ? 2 : 1;
    for (int i = 0; i < n; i++) begin lits[nl] = cls[i]; lasts[nl] = (i == n - 1); nl++; end
  endtask

  initial begin
    ld_we = 0; ld_addr = '0; ld_data = '0; num_vars = '0; num_lits = '0;
    cmd_ready = 1'b1; cu_in_valid = 1'b0; cu_in = '0; popped = 1'b0;
    start = 0; res_var = '0;
    nl = 0; nv = 4;
    add(1); add(-1, 2); add(-2, 3, 4);
    solve_and_check("chain", 0);
    for (int t = 0; t < 20; t++) begin
      nl = 0; nv = NV;
      for (int c = 0; c < 30 + 2 * t; c++) begin
        int a, b, d;
        a = 1 + int'($urandom_range(NV - 1));
        do b = 1 + int'($urandom_range(NV - 1)); while (b == a);
        do d = 1 + int'($urandom_range(NV - 1)); while (d == a || d == b);
        add($urandom_range(1) ? a : -a, $urandom_range(1) ? b : -b, $urandom_range(1) ? d : -d);
      end
      solve_and_check($sformatf("random %0d", t), 0);
    end
    // a clause of five literals does not fit rows of four
    nl = 0; nv = 5;
    for (int i = 1; i <= 5; i++) begin lits[nl] = i; lasts[nl] = (i == 5); nl++; end
    solve_and_check("too long", 1);
    check(tot_dec > 0 && tot_bt > 0 && tot_rd > 0, "decisions, backtracks and reads occurred");
    check(n_sat > 0 && n_unsat > 0, "both SAT and UNSAT instances solved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
