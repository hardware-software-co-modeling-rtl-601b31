// tb_cu_iu_bridge: the clock crossing with a fast CU clock (5 ns) and a slow
// IU clock (13 ns), so the command FIFO fills and cmd_ready must hold the
// sender back.
//   * Random command words are sent whenever cmd_ready allows, like the CU
//     does (registered output); every word must reach the IU side once, in
//     order, and none may be lost.
//   * Bursts of response words are written on the IU side and popped at random
//     on the CU side; order and contents are checked.
//   * The IU side is modelled as busy for 6 IU cycles after each command.
//     Whenever iu_idle is high, every command sent must have arrived and
//     the model must be idle.
//   * iu_stsin and iu_config_n changes must show up on the CU side within
//     a few CU cycles.
module tb_cu_iu_bridge;
  import sat_pkg::*;

  logic     clock_cu = 1'b0, clock_iu = 1'b0, rst_n = 1'b0;
  cu_word_t cu_out, iu_cmd;
  iu_word_t cu_in, iu_rsp;
  logic     cmd_ready, cu_in_valid, cu_in_pop, cu_stsin, config_n, iu_idle;
  logic     iu_rsp_valid, iu_stsin, iu_config_n, iu_all_idle;
  logic     rst_cu_n, rst_iu_n;

  assign rst_cu_n = rst_n;
  assign rst_iu_n = rst_n;

  cu_iu_bridge dut (.*);

  always #2.5 clock_cu = !clock_cu;
  always #6.5 clock_iu = !clock_iu;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  cu_word_t sent_q [$];
  iu_word_t rsp_q  [$];
  int n_sent = 0, n_recv = 0, n_stall = 0, idle_seen = 0, busy_cnt = 0;
  bit sending = 1'b0, popping = 1'b0;

  // CU side: registered sender and random popper
  always @(posedge clock_cu) begin
    if (!rst_n) begin
      cu_out    <= CU_NOP;
    end else begin
      cu_word_t w;
      w = CU_NOP;
      if (sending && cmd_ready && $urandom_range(3) != 0) begin
        w = cu_word_t'($urandom);
        w.cmd = cmd_e'(1 + $urandom_range(4));
        sent_q.push_back(w);
        n_sent++;
      end
      if (sending && !cmd_ready) n_stall++;
      cu_out <= w;
      if (cu_in_pop) begin
        check(rsp_q.size() != 0 && cu_in == rsp_q[0], "response word in order");
        if (rsp_q.size() != 0) void'(rsp_q.pop_front());
      end
      if (iu_idle) begin
        idle_seen++;
        check(n_sent == n_recv && busy_cnt == 0, "idle only when every command arrived and IUs are idle");
      end
    end
  end
  // The pop is set between clock edges and takes the word at the head in the
  // same cycle, as the CU does.
  initial cu_in_pop = 1'b0;
  always @(negedge clock_cu) cu_in_pop = popping && cu_in_valid && ($urandom_range(2) != 0);

  // IU side: receiver and busy model
  always @(posedge clock_iu) begin
    if (rst_n) begin
      if (iu_cmd.cmd != CMD_NOP) begin
        check(sent_q.size() != 0 && iu_cmd == sent_q[0], "command word in order");
        if (sent_q.size() != 0) void'(sent_q.pop_front());
        n_recv++;
        busy_cnt = 6;
      end else if (busy_cnt > 0) busy_cnt--;
    end
  end
  assign iu_all_idle = (busy_cnt == 0);

  initial begin
    iu_rsp = '0; iu_rsp_valid = 1'b0; iu_stsin = 1'b0; iu_config_n = 1'b1;
    repeat (3) @(posedge clock_iu);
    rst_n = 1'b1;
    // commands
    sending = 1'b1;
    repeat (600) @(posedge clock_cu);
    sending = 1'b0;
    repeat (60) @(posedge clock_cu);
    check(n_sent == n_recv && n_sent > 100, $sformatf("all %0d commands delivered (%0d)", n_sent, n_recv));
    check(n_stall > 0, "cmd_ready held the sender back");
    check(idle_seen > 0 && iu_idle, "idle reported after the traffic stopped");
    // responses
    for (int b = 0; b < 20; b++) begin
      int n;
      n = 1 + int'($urandom_range(40));
      for (int i = 0; i < n; i++) begin
        iu_word_t r;
        @(negedge clock_iu);
        r = iu_word_t'($urandom);
        iu_rsp = r; iu_rsp_valid = 1'b1;
        rsp_q.push_back(r);
      end
      @(negedge clock_iu);
      iu_rsp_valid = 1'b0;
      popping = 1'b1;
      while (rsp_q.size() != 0) @(posedge clock_cu);
      popping = 1'b0;
      @(posedge clock_cu);
    end
    check(!cu_in_valid, "return FIFO empty at the end");
    // status
    for (int t = 0; t < 10; t++) begin
      @(negedge clock_iu);
      iu_stsin = !iu_stsin; iu_config_n = !iu_config_n;
      repeat (3) @(posedge clock_iu);
      repeat (3) @(posedge clock_cu);
      check(cu_stsin == iu_stsin && config_n == iu_config_n, "status reaches the CU side");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clock_cu);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
