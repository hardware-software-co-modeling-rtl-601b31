// tb_sat_workloads: the solver at its default size (three IUs, 512-variable
// address space, 512 clause rows of 8 literals per IU) on benchmark-sized
// problems, one complete solve each.
//
//   hole6     - the pigeonhole problem with 7 pigeons and 6 holes, built
//               clause for clause as the standard benchmark defines it (42
//               variables, 133 clauses); it is unsatisfiable, so the solver
//               must exhaust the search space.
//   rand50x80, rand50x100, rand100x160 - random 3-SAT instances with the
//               variable and clause counts of the aim-50-1_6, aim-50-2_0 and
//               aim-100-1_6 benchmarks (the aim instances themselves are not
//               reproduced); any SAT answer is checked clause by clause.
// Both clocks run at 10 MHz. Cycle counts (CU clock) are printed together
// with the run time they give.
module tb_sat_workloads;
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

  // both clocks at 10 MHz (100 ns), IU clock shifted by a quarter period
  always #50 clock_cu = !clock_cu;
  initial begin
    #25;
    forever #50 clock_iu = !clock_iu;
  end

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clock_cu) cyc++;

  int lits [MAXL];
  bit lasts[MAXL];
  int nl, nv;

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

  task automatic run(input string name, input int expect_sat, input longint unsigned limit);
    longint unsigned t0;
    bit ok;
    rst_n = 1'b0;
    repeat (2) @(negedge clock_cu);
    rst_n = 1'b1;
    for (int i = 0; i < nl; i++) begin
      int x = (lits[i] > 0) ? lits[i] : -lits[i];
      ld_we = 1'b1;
      ld_addr = 13'(i);
      ld_data = '{last: lasts[i], lit: '{neg: lits[i] < 0, vidx: VAR_W'(x - 1)}};
      @(negedge clock_cu);
    end
    ld_we = 1'b0;
    num_vars = (VAR_W+1)'(nv);
    num_lits = 14'(nl);
    start = 1'b1;
    @(negedge clock_cu);
    start = 1'b0;
    t0 = cyc;
    while (!done && cyc - t0 < limit) @(negedge clock_cu);
    check(done && !error, {name, ": solved"});
    if (expect_sat >= 0) check(sat == bit'(expect_sat), {name, ": expected verdict"});
    if (done && sat) begin
      model_ok(ok);
      check(ok, {name, ": assignment satisfies every clause"});
    end
    $display("%-12s vars=%0d clauses-literals=%0d -> %s, %0d cycles = %0d us at 10 MHz (dec=%0d imp=%0d confl=%0d)",
             name, nv, nl, sat ? "SAT" : "UNSAT", cyc - t0, (cyc - t0) / 10,
             n_decisions, n_implications, n_conflicts);
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
    rst_n = 1'b0; ld_we = 1'b0; ld_addr = '0; ld_data = '0;
    num_vars = '0; num_lits = '0; start = 1'b0; res_var = '0;

    // hole6: variable p*6+j+1 means pigeon p sits in hole j
    nl = 0; nv = 42;
    for (int p = 0; p < 7; p++)
      for (int j = 0; j < 6; j++) begin
        lits[nl] = p * 6 + j + 1; lasts[nl] = (j == 5); nl++;
      end
    for (int j = 0; j < 6; j++)
      for (int p = 0; p < 7; p++)
        for (int q = p + 1; q < 7; q++)
          add_clause(-(p * 6 + j + 1), -(q * 6 + j + 1));
    check(nl == 7 * 6 + 126 * 2, "hole6 has 133 clauses");
    run("hole6", 0, 400_000_000);

    random3(50, 80);   run("rand50x80", -1, 50_000_000);
    random3(50, 100);  run("rand50x100", -1, 50_000_000);
    random3(100, 160); run("rand100x160", -1, 100_000_000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600_000_000) @(posedge clock_cu);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
