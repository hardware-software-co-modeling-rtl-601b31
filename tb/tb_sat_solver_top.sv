// tb_sat_solver_top: end-to-end test of the whole solver (CU, three IUs,
// glue logic) at its default parameters.
//
// Instances are built in the testbench: hand-written ones with unit clauses,
// small pigeonhole instances (always UNSAT), random 3-SAT instances small
// enough to brute-force (12 variables), one random instance of 50 variables
// and 80 clauses, and an instance that does not fit. For every instance the
// verdict is compared with the brute-force answer where one exists, and
// every SAT answer is checked by evaluating each clause under the returned
// assignment. Monitors count how often each mechanism occurs: decisions,
// implications, IU conflict reports, contradicting implications from two
// IUs, backtracks, clear-and-replay, repeated clause passes, reads, stalls on
// a full command FIFO, SAT, UNSAT and the capacity error; a mechanism that never occurs is a failure.
module tb_sat_solver_top;
  import sat_pkg::*;

  localparam int MAXL = 8192;

  logic             clock_cu = 1'b0;
  logic             clock_iu = 1'b0;
  logic             rst_n;
  logic             ld_we;
  logic [12:0]      ld_addr;
  inst_lit_t        ld_data;
  logic [VAR_W:0]   num_vars;
  logic [13:0]      num_lits;
  logic             start;
  logic             done, sat, error, res_value, res_assigned, lcm_overflow;
  logic [VAR_W-1:0] res_var;
  logic [31:0]      n_decisions, n_implications, n_conflicts, n_reads, n_passes;

  sat_solver_top dut (.*);

  // unrelated clocks: CU clock 10 ns period, IU clock 13 ns period, so the
  // command FIFO fills while the CU streams the instance out
  always #5 clock_cu = !clock_cu;
  always #6.5 clock_iu = !clock_iu;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clock_cu) cyc++;

  // instance under test: DIMACS-style signed literals, 1-based variables
  int lits [MAXL];
  bit lasts[MAXL];
  int nl, nv;

  // mechanism counters
  int c_iu_conflict = 0, c_cross = 0, c_replay = 0, c_sat = 0, c_unsat = 0, c_err = 0;
  int c_dec = 0, c_imp = 0, c_bt = 0, c_rd = 0, c_rescan = 0, c_stall = 0;

  always @(posedge clock_cu) if (rst_n) begin
    if (dut.cu_in_pop && dut.cu_in.last && dut.cu_in.conflict) c_iu_conflict++;
    if (dut.cu_in_pop && !dut.cu_in.last &&
        dut.u_cu.db_asg[dut.cu_in.impl.vidx] &&
        dut.u_cu.db_val[dut.cu_in.impl.vidx] != dut.cu_in.impl.value) c_cross++;
    if (dut.cu_out.cmd == CMD_CLEAR && dut.u_cu.top != 0) c_replay++;
    if (!dut.cmd_ready) c_stall++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic add_clause(input int a, input int b = 0, input int c = 0);
    int cl[3];
    int n;
    cl = '{a, b, c};
    n = (c != 0) ? 3 : (b != 0) ? 2 : 1;
    for (int i = 0; i < n; i++) begin
      lits[nl]  = cl[i];
      lasts[nl] = (i == n - 1);
      nl++;
    end
  endtask

  function automatic bit lit_true(int l, bit val);
    return (l > 0) ? val : !val;
  endfunction

  // brute force over all assignments (nv <= 16)
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

  task automatic model_ok(output bit ok);
    bit cl_ok = 1'b0;
    ok = 1'b1;
    for (int i = 0; i < nl; i++) begin
      int x = (lits[i] > 0) ? lits[i] : -lits[i];
      res_var = VAR_W'(x - 1);
      #1;
      if (!res_assigned) ok = 1'b0;
      if (lit_true(lits[i], res_value)) cl_ok = 1'b1;
      if (lasts[i]) begin
        if (!cl_ok) ok = 1'b0;
        cl_ok = 1'b0;
      end
    end
  endtask

  task automatic run_solver(output bit r_sat, output bit r_err, input longint unsigned limit);
    longint unsigned t0;
    rst_n = 1'b0;
    repeat (2) @(posedge clock_cu);
    rst_n = 1'b1;
    @(posedge clock_cu);
    for (int i = 0; i < nl; i++) begin
      int x = (lits[i] > 0) ? lits[i] : -lits[i];
      ld_we   <= 1'b1;
      ld_addr <= 13'(i);
      ld_data <= '{last: lasts[i], lit: '{neg: lits[i] < 0, vidx: VAR_W'(x - 1)}};
      @(posedge clock_cu);
    end
    ld_we    <= 1'b0;
    num_vars <= (VAR_W+1)'(nv);
    num_lits <= 14'(nl);
    start    <= 1'b1;
    @(posedge clock_cu);
    start <= 1'b0;
    t0 = cyc;
    while (!done && cyc - t0 < limit) @(posedge clock_cu);
    check(done, "solver finished within the cycle limit");
    if (!done) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    r_sat = sat;
    r_err = error;
    c_dec += n_decisions;
    c_imp += n_implications;
    c_bt  += n_conflicts;
    c_rd  += n_reads;
    if (n_passes > n_reads + n_decisions + 1) c_rescan++;
    if (r_err) c_err++;
    else if (r_sat) c_sat++;
    else c_unsat++;
    $display("  vars=%0d lits=%0d -> %s in %0d cycles (dec=%0d imp=%0d confl=%0d reads=%0d passes=%0d)",
             nv, nl, r_err ? "ERROR" : r_sat ? "SAT" : "UNSAT", cyc - t0,
             n_decisions, n_implications, n_conflicts, n_reads, n_passes);
  endtask

  task automatic run_checked(input string name, input bit brute, input int expect_sat);
    bit s, e, ok, ref_sat;
    $display("%s", name);
    run_solver(s, e, 200_000);
    check(!e, {name, ": no capacity error"});
    if (brute) begin
      ref_sat = brute_sat();
      check(s == ref_sat, {name, ": verdict matches brute force"});
    end
    if (expect_sat >= 0) check(s == bit'(expect_sat), {name, ": expected verdict"});
    if (s) begin
      model_ok(ok);
      check(ok, {name, ": assignment satisfies every clause"});
    end
  endtask

  task automatic pigeonhole(input int h);
    // h+1 pigeons, h holes; variable p*h+j+1: pigeon p in hole j
    nl = 0;
    nv = (h + 1) * h;
    for (int p = 0; p <= h; p++) begin
      for (int j = 0; j < h; j++) begin
        lits[nl]  = p * h + j + 1;
        lasts[nl] = (j == h - 1);
        nl++;
      end
    end
    for (int j = 0; j < h; j++)
      for (int p = 0; p < h + 1; p++)
        for (int q = p + 1; q < h + 1; q++)
          add_clause(-(p * h + j + 1), -(q * h + j + 1));
  endtask

  task automatic random3(input int n, input int m);
    nl = 0;
    nv = n;
    for (int c = 0; c < m; c++) begin
      int a, b, d;
      a = 1 + int'($urandom_range(n - 1));
      do b = 1 + int'($urandom_range(n - 1)); while (b == a);
      do d = 1 + int'($urandom_range(n - 1)); while (d == a || d == b);
      add_clause($urandom_range(1) ? a : -a, $urandom_range(1) ? b : -b,
                 $urandom_range(1) ? d : -d);
    end
  endtask

  initial begin
    bit s, e;
    rst_n = 1'b0; ld_we = 1'b0; ld_addr = '0; ld_data = '0;
    num_vars = '0; num_lits = '0; start = 1'b0; res_var = '0;

    // 1. implication chain from a unit clause, then one decision
    nl = 0; nv = 5;
    add_clause(1); add_clause(-1, 2); add_clause(-2, 3); add_clause(-3, -4, 5);
    add_clause(-5, 4);
    run_checked("chain", 1, 1);

    // 2. unit clauses that contradict: UNSAT without any decision
    nl = 0; nv = 2;
    add_clause(1); add_clause(-1, 2); add_clause(-2);
    run_checked("level-0 conflict", 1, 0);

    // 3. pigeonhole, 3 pigeons in 2 holes and 4 in 3
    pigeonhole(2); run_checked("hole2", 1, 0);
    pigeonhole(3); run_checked("hole3", 1, 0);

    // 4. random 3-SAT around the threshold, checked by brute force
    for (int t = 0; t < 12; t++) begin
      random3(12, 40 + 3 * t);
      run_checked($sformatf("random 12x%0d", 40 + 3 * t), 1, -1);
    end

    // 5. a 50-variable, 80-clause random 3-SAT instance
    random3(50, 80);
    run_checked("random 50x80", 0, -1);

    // 6. a clause longer than a clause-memory row: capacity error
    nl = 0; nv = 9;
    for (int i = 1; i <= 9; i++) begin lits[nl] = i; lasts[nl] = (i == 9); nl++; end
    $display("too long");
    run_solver(s, e, 10_000);
    check(e, "clause longer than a row is refused");

    $display("mechanisms: dec=%0d imp=%0d iu_conflict=%0d cross=%0d backtrack=%0d replay=%0d rescan=%0d read=%0d stall=%0d sat=%0d unsat=%0d err=%0d",
             c_dec, c_imp, c_iu_conflict, c_cross, c_bt, c_replay, c_rescan, c_rd, c_stall, c_sat, c_unsat, c_err);
    check(c_dec > 0, "decisions happened");
    check(c_imp > 0, "implications happened");
    check(c_iu_conflict > 0, "an IU reported a conflict");
    check(c_cross > 0, "two IUs implied opposite values");
    check(c_bt > 0, "backtracking happened");
    check(c_replay > 0, "clear-and-replay happened");
    check(c_rescan > 0, "IUs made repeated passes");
    check(c_rd > 0, "implication reads happened");
    check(c_stall > 0, "the CU was held by a full command FIFO");
    check(c_sat > 0 && c_unsat > 0 && c_err > 0, "SAT, UNSAT and error outcomes all seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clock_cu);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
