// tb_implication_unit: one IU (address 2, 16 rows of 4 slots) driven through
// its command bus only.
//
// A random sub-instance is loaded with literal commands, interleaved with
// literals addressed to another IU that must be ignored; cfgout must rise
// only on this IU's CFG_DONE. Then, many times: CLEAR, a random partial
// assignment broadcast as variable writes, wait for busy to drop, compare
// stsout with the expectation and READ the implication data. Without a
// conflict the implications must be exactly the unit-propagation fixpoint
// computed here; with one, the end word must carry the conflict flag.
module tb_implication_unit;
  import sat_pkg::*;
  localparam int ROWS = 16, RL = 4, NV = 12;

  logic     clk = 1'b0, rst_n = 1'b0;
  cu_word_t data_in;
  iu_word_t data_out;
  logic     oe, stsout, cfgout, busy, lcm_overflow, pass_start;

  implication_unit #(.MY_ADDR(4'd2), .ROWS(ROWS), .ROW_LITS(RL)) dut (.*);

  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  lit_t cm [ROWS][RL];
  int   cl [ROWS];
  int   nr;

  task automatic send(input cmd_e c, input int addr, input bit last, input vstat_e st,
                      input bit val, input int x);
    @(negedge clk);
    data_in = '{cmd: c, addr: IU_AW'(addr), last: last, stat: st, value: val, vidx: VAR_W'(x)};
    @(negedge clk);
    data_in = CU_NOP;
  endtask

  // reference propagation over the loaded clauses; 1 on conflict
  function automatic bit ref_bcp(ref vstat_e s[NV], ref logic v[NV]);
    bit changed = 1'b1;
    while (changed) begin
      changed = 1'b0;
      for (int r = 0; r < nr; r++) begin
        int nfree = 0, fs = 0;
        bit st = 1'b0;
        for (int k = 0; k < cl[r]; k++) begin
          if (s[cm[r][k].vidx] == V_FREE) begin nfree++; fs = k; end
          else if (v[cm[r][k].vidx] != cm[r][k].neg) st = 1'b1;
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

  int n_conf_seen = 0, n_imp_seen = 0;

  initial begin
    data_in = CU_NOP;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    nr = ROWS;
    for (int r = 0; r < nr; r++) begin
      cl[r] = 2 + int'($urandom_range(RL - 2));
      for (int k = 0; k < cl[r]; k++) begin
        cm[r][k] = '{neg: 1'($urandom), vidx: VAR_W'($urandom_range(NV - 1))};
        send(CMD_LIT, 2, k == cl[r] - 1, V_FREE, cm[r][k].neg, int'(cm[r][k].vidx));
        send(CMD_LIT, 1, 1'b1, V_FREE, 1'b0, 0);   // for another IU
      end
    end
    send(CMD_CFG_DONE, 1, 0, V_FREE, 0, 0);
    repeat (2) @(negedge clk);
    check(!cfgout, "cfgout stays low on another IU's CFG_DONE");
    send(CMD_CFG_DONE, 2, 0, V_FREE, 0, 0);
    repeat (2) @(negedge clk);
    check(cfgout, "cfgout high after CFG_DONE");
    check(dut.n_rows == 5'(ROWS) && !lcm_overflow, "all clauses stored, none from the other IU");

    for (int t = 0; t < 200; t++) begin
      vstat_e rs[NV];
      logic   rv[NV];
      bit     rc, got_end, conf_flag, ok;
      int     seen[NV];
      send(CMD_CLEAR, 0, 0, V_FREE, 0, 0);
      for (int i = 0; i < NV; i++) begin rs[i] = V_FREE; rv[i] = 1'b0; seen[i] = 0; end
      for (int i = 0; i < NV; i++)
        if ($urandom_range(2) == 0) begin
          rs[i] = V_ASSIGNED; rv[i] = 1'($urandom);
          send(CMD_VAR, 0, 0, V_ASSIGNED, rv[i], i);
        end
      rc = ref_bcp(rs, rv);
      @(negedge clk);
      while (busy) @(negedge clk);
      // read everything out
      send(CMD_READ, 2, 0, V_FREE, 0, 0);
      got_end = 1'b0; conf_flag = 1'b0; ok = 1'b1;
      for (int w = 0; w < 64 && !got_end; w++) begin
        if (oe) begin
          if (data_out.last) begin
            got_end = 1'b1;
            conf_flag = data_out.conflict;
          end else begin
            int x;
            x = int'(data_out.impl.vidx);
            n_imp_seen++;
            if (x >= NV || rs[x] == V_FREE || rv[x] != data_out.impl.value) ok = 1'b0;
            else seen[x]++;
          end
        end
        @(negedge clk);
      end
      check(got_end, "read response ends with an end word");
      check(conf_flag == rc, $sformatf("trial %0d: conflict flag matches reference", t));
      if (conf_flag) n_conf_seen++;
      if (!rc) begin
        for (int i = 0; i < NV; i++)
          if (rs[i] == V_IMPLIED && seen[i] != 1) ok = 1'b0;
        check(ok, $sformatf("trial %0d: implications equal the reference fixpoint", t));
      end
      check(!stsout, "stsout low after the read");
    end
    check(n_conf_seen > 0 && n_imp_seen > 0, "both conflicts and implications occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
