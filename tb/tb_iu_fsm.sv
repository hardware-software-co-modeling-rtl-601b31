// tb_iu_fsm: the implication scheduler against behavioural clause and
// variable memories (one-cycle read latency, like the real ones).
//
// 1. A fixed chain (x0 | x1), (!x1 | x2), (!x2 | x3 | x4), (x5 | x6 | x7 | x8)
//    with x0 = 0: x1 and x2 must be implied in the first pass, a second pass
//    finds nothing, and the trigger cycle plus busy must last
//    2 + 2 * sum(len + 3) cycles (the trigger cycle, one cycle to start,
//    then two passes of len + 3 cycles per clause).
// 2. Random instances and random partial assignments: the final variable
//    memory must equal the unit-propagation fixpoint computed here, and a
//    conflict must be reported exactly when that fixpoint is contradictory.
// 3. After a conflict, further writes start no pass until clear.
module tb_iu_fsm;
  import sat_pkg::*;
  localparam int ROWS = 32, RL = 4;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             clear, trigger, lcm_rd_en, lvm_value, imp_we, conflict, pass_start, busy;
  logic [5:0]       n_rows;
  logic [4:0]       lcm_rd_row;
  lit_t             lcm_lits [RL];
  logic [2:0]       lcm_len;
  logic [VAR_W-1:0] lvm_rd_var;
  vstat_e           lvm_stat;
  impl_t            imp;

  iu_fsm #(.ROWS(ROWS), .ROW_LITS(RL)) dut (.*);

  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural memories
  lit_t   cm  [ROWS][RL];
  int     cl  [ROWS];
  vstat_e vs  [N_VARS];
  logic   vv  [N_VARS];
  int     n_conf = 0, n_pass = 0;

  always @(posedge clk) begin
    if (lcm_rd_en) begin
      lcm_lits <= cm[lcm_rd_row];
      lcm_len  <= 3'(cl[lcm_rd_row]);
    end
    lvm_stat  <= vs[lvm_rd_var];
    lvm_value <= vv[lvm_rd_var];
    if (imp_we) begin
      vs[imp.vidx] <= V_IMPLIED;
      vv[imp.vidx] <= imp.value;
    end
    if (conflict) n_conf++;
    if (pass_start) n_pass++;
  end

  function automatic lit_t L(int signed x);
    return '{neg: x < 0, vidx: VAR_W'((x < 0) ? -x - 1 : x - 1)};
  endfunction

  task automatic kick(output int cycles);
    @(negedge clk);
    trigger = 1'b1;
    @(negedge clk);
    trigger = 1'b0;
    cycles = 1;
    while (busy && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // reference unit propagation; returns 1 on conflict
  function automatic bit ref_bcp(ref vstat_e s[N_VARS], ref logic v[N_VARS], input int nr);
    bit changed = 1'b1;
    while (changed) begin
      changed = 1'b0;
      for (int r = 0; r < nr; r++) begin
        int nfree = 0, fs = 0;
        bit st = 1'b0;
        for (int k = 0; k < cl[r]; k++) begin
          lit_t l = cm[r][k];
          if (s[l.vidx] == V_FREE) begin nfree++; fs = k; end
          else if (v[l.vidx] != l.neg) st = 1'b1;
        end
        if (!st && nfree == 0) return 1'b1;
        if (!st && nfree == 1) begin
          s[cm[r][fs].vidx] = V_IMPLIED;
          v[cm[r][fs].vidx] = !cm[r][fs].neg;
          changed = 1'b1;
        end
      end
    end
    return 1'b0;
  endfunction

  initial begin
    int cyc, exp_cyc;
    clear = 0; trigger = 0; n_rows = '0;
    for (int i = 0; i < N_VARS; i++) begin vs[i] = V_FREE; vv[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1. fixed chain ----
    cm[0][0] = L(1);  cm[0][1] = L(2);                   cl[0] = 2;
    cm[1][0] = L(-2); cm[1][1] = L(3);                   cl[1] = 2;
    cm[2][0] = L(-3); cm[2][1] = L(4); cm[2][2] = L(5);  cl[2] = 3;
    cm[3][0] = L(6);  cm[3][1] = L(7); cm[3][2] = L(8); cm[3][3] = L(9); cl[3] = 4;
    n_rows = 6'd4;
    vs[0] = V_ASSIGNED; vv[0] = 1'b0;
    n_pass = 0;
    kick(cyc);
    exp_cyc = 2 + 2 * ((2 + 3) + (2 + 3) + (3 + 3) + (4 + 3));
    check(vs[1] == V_IMPLIED && vv[1] == 1'b1, "x1 implied true");
    check(vs[2] == V_IMPLIED && vv[2] == 1'b1, "x2 implied true");
    check(vs[3] == V_FREE && vs[4] == V_FREE && vs[5] == V_FREE, "nothing else implied");
    check(n_pass == 2, "two passes");
    check(cyc == exp_cyc, $sformatf("busy for %0d cycles, expected %0d", cyc, exp_cyc));
    check(n_conf == 0, "no conflict");

    // ---- 2. random instances ----
    for (int t = 0; t < 300; t++) begin
      vstat_e rs[N_VARS];
      logic   rv[N_VARS];
      bit     rc;
      int     nr;
      nr = 1 + int'($urandom_range(ROWS - 1));
      @(negedge clk);
      n_rows = '0;
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      while (busy) @(negedge clk);
      for (int r = 0; r < nr; r++) begin
        cl[r] = 1 + int'($urandom_range(RL - 1));
        for (int k = 0; k < cl[r]; k++)
          cm[r][k] = '{neg: 1'($urandom), vidx: VAR_W'($urandom_range(11))};
      end
      n_rows = 6'(nr);
      for (int i = 0; i < N_VARS; i++) begin vs[i] = V_FREE; vv[i] = 0; end
      for (int i = 0; i < 12; i++)
        if ($urandom_range(3) == 0) begin vs[i] = V_ASSIGNED; vv[i] = 1'($urandom); end
      rs = vs; rv = vv;
      rc = ref_bcp(rs, rv, nr);
      n_conf = 0;
      kick(cyc);
      check((n_conf != 0) == rc, $sformatf("instance %0d: conflict reported iff reference conflicts", t));
      if (!rc) begin
        bit same;
        same = 1'b1;
        for (int i = 0; i < 12; i++)
          if (vs[i] != rs[i] || (vs[i] != V_FREE && vv[i] != rv[i])) same = 1'b0;
        check(same, $sformatf("instance %0d: fixpoint matches reference", t));
      end else begin
        // 3. held after a conflict
        int p0;
        p0 = n_pass;
        kick(cyc);
        check(n_pass == p0 && cyc <= 2, $sformatf("no pass after conflict until clear (%0d passes, %0d cycles)", n_pass - p0, cyc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
