// cu_iu_bridge: the crossing between the CU clock and the IU clock.
//
// The CU and the implication units run on separate clocks. This block
// carries everything between them:
//   * command bus  - CU words go through an 8-word dual-clock FIFO; on the IU
//     side the oldest word is broadcast to the IUs and removed in the same
//     cycle (a NOP when the FIFO is empty). cmd_ready tells the CU that at
//     least two words are free, which covers the CU's registered output.
//   * return bus   - IU response words go through a 1024-word dual-clock
//     FIFO. That is deep enough for a whole read response (at most one word
//     per variable plus the end word), because the output buffer streams
//     without back-pressure. The CU takes a word with cu_in_pop.
//   * status       - CU_stsin and config are registered in the IU domain and
//     passed through two synchronising flip-flops.
//   * idle         - the IUs count as idle for the CU only when the registered
//     IU-side idle (all IUs idle and the command FIFO empty) has passed the
//     synchronisers and every written command is known to be read out, both
//     for IDLE_HOLD CU cycles in a row. This makes sure a command still in
//     flight, or a status change still in a synchroniser, is never taken as
//     "finished".
// Separate CU and IU clocks follow the design; how they are bridged is this
// design's own choice.
module cu_iu_bridge
  import sat_pkg::*;
#(
  parameter int unsigned CMD_AW    = 3,
  parameter int unsigned RSP_AW    = 10,
  parameter int unsigned IDLE_HOLD = 3
) (
  // CU clock domain
  input  logic     clock_cu,
  input  logic     rst_cu_n,
  input  cu_word_t cu_out,
  output logic     cmd_ready,
  output iu_word_t cu_in,
  output logic     cu_in_valid,
  input  logic     cu_in_pop,
  output logic     cu_stsin,
  output logic     config_n,
  output logic     iu_idle,
  // IU clock domain
  input  logic     clock_iu,
  input  logic     rst_iu_n,
  output cu_word_t iu_cmd,
  input  iu_word_t iu_rsp,
  input  logic     iu_rsp_valid,
  input  logic     iu_stsin,
  input  logic     iu_config_n,
  input  logic     iu_all_idle
);

  localparam int unsigned CW = $bits(cu_word_t);
  localparam int unsigned RWD = $bits(iu_word_t);

  // ---- command FIFO ----
  logic          cmd_rempty, cmd_drained, cmd_wfull;
  logic [CMD_AW:0] cmd_used;
  logic [CW-1:0] cmd_rdata;

  async_fifo #(.WIDTH(CW), .AW(CMD_AW)) u_cmd_fifo (
    .wclk(clock_cu), .wrst_n(rst_cu_n), .we(cu_out.cmd != CMD_NOP), .wdata(cu_out),
    .wfull(cmd_wfull), .w_used(cmd_used), .w_drained(cmd_drained),
    .rclk(clock_iu), .rrst_n(rst_iu_n), .re(1'b1), .rdata(cmd_rdata), .rempty(cmd_rempty)
  );

  assign cmd_ready = (cmd_used <= (CMD_AW+1)'(2**CMD_AW - 2));
  assign iu_cmd    = cmd_rempty ? CU_NOP : cu_word_t'(cmd_rdata);

  // ---- response FIFO ----
  logic            rsp_rempty, rsp_wfull, rsp_drained;
  logic [RSP_AW:0] rsp_used;
  logic [RWD-1:0]  rsp_rdata;

  async_fifo #(.WIDTH(RWD), .AW(RSP_AW)) u_rsp_fifo (
    .wclk(clock_iu), .wrst_n(rst_iu_n), .we(iu_rsp_valid), .wdata(iu_rsp),
    .wfull(rsp_wfull), .w_used(rsp_used), .w_drained(rsp_drained),
    .rclk(clock_cu), .rrst_n(rst_cu_n), .re(cu_in_pop), .rdata(rsp_rdata), .rempty(rsp_rempty)
  );

  assign cu_in       = iu_word_t'(rsp_rdata);
  assign cu_in_valid = !rsp_rempty;

  // ---- status, IU side registers ----
  logic sts_q, cfg_q, idle_q;
  always_ff @(posedge clock_iu or negedge rst_iu_n) begin
    if (!rst_iu_n) begin
      sts_q  <= 1'b0;
      cfg_q  <= 1'b1;
      idle_q <= 1'b0;
    end else begin
      sts_q  <= iu_stsin;
      cfg_q  <= iu_config_n;
      idle_q <= iu_all_idle && cmd_rempty;
    end
  end

  // ---- status, CU side synchronisers ----
  logic [1:0] sts_s, cfg_s, idle_s;
  logic [$clog2(IDLE_HOLD+1)-1:0] hold;
  always_ff @(posedge clock_cu or negedge rst_cu_n) begin
    if (!rst_cu_n) begin
      sts_s  <= '0;
      cfg_s  <= '1;
      idle_s <= '0;
      hold   <= '0;
    end else begin
      sts_s  <= {sts_s[0], sts_q};
      cfg_s  <= {cfg_s[0], cfg_q};
      idle_s <= {idle_s[0], idle_q};
      if (!(idle_s[1] && cmd_drained)) hold <= '0;
      else if (hold != ($clog2(IDLE_HOLD+1))'(IDLE_HOLD)) hold <= hold + 1'b1;
    end
  end

  assign cu_stsin = sts_s[1];
  assign config_n = cfg_s[1];
  assign iu_idle  = (hold == ($clog2(IDLE_HOLD+1))'(IDLE_HOLD)) && idle_s[1] && cmd_drained;

  // The CU never writes into a full command FIFO, and a read response never
  // overflows the return FIFO.
  a_cmd_room: assert property (@(posedge clock_cu) disable iff (!rst_cu_n)
                               (cu_out.cmd != CMD_NOP) |-> !cmd_wfull);
  a_rsp_room: assert property (@(posedge clock_iu) disable iff (!rst_iu_n)
                               iu_rsp_valid |-> !rsp_wfull);

endmodule
