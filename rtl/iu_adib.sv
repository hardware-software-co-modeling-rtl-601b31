// iu_adib: address decoder and input buffer of one implication unit.
//
// Every command word the CU drives on its output bus is captured in a
// one-word input register (the input buffer). The registered word is then
// decoded and steered: literals addressed to this IU go to the local clause
// memory, variable writes and CLEAR (broadcast to all IUs) go to the local
// variable memory and the FSM, CFG_DONE and READ addressed to this IU go to the
// status register and the output buffer. Steering by command type and a unique
// IU address follows the design; the word format, the single register stage
// and broadcast-by-command-type are this design's choices.
//
// Timing: a word present on data_in in cycle t produces its decoded strobe in
// cycle t+1 (one cycle of latency, one word per cycle, never stalls).
// buf_valid is high while a non-NOP word sits in the buffer; it is part of the
// IU's busy indication.
module iu_adib
  import sat_pkg::*;
#(
  parameter logic [IU_AW-1:0] MY_ADDR = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cu_word_t         data_in,
  output logic             buf_valid,
  // to the local clause memory
  output logic             lcm_we,
  output lit_t             lcm_lit,
  output logic             lcm_last,
  // to the local variable memory / FSM
  output logic             lvm_we,
  output logic [VAR_W-1:0] lvm_var,
  output vstat_e           lvm_stat,
  output logic             lvm_value,
  output logic             clear,
  // to the status register and output buffer
  output logic             cfg_done,
  output logic             rd_req
);

  cu_word_t buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buf_q <= CU_NOP;
    else        buf_q <= data_in;
  end

  logic mine;
  assign mine      = (buf_q.addr == MY_ADDR);
  assign buf_valid = (buf_q.cmd != CMD_NOP);

  always_comb begin
    lcm_we    = (buf_q.cmd == CMD_LIT) && mine;
    lcm_lit   = '{neg: buf_q.value, vidx: buf_q.vidx};
    lcm_last  = buf_q.last;
    lvm_we    = (buf_q.cmd == CMD_VAR);
    lvm_var   = buf_q.vidx;
    lvm_stat  = buf_q.stat;
    lvm_value = buf_q.value;
    clear     = (buf_q.cmd == CMD_CLEAR);
    cfg_done  = (buf_q.cmd == CMD_CFG_DONE) && mine;
    rd_req    = (buf_q.cmd == CMD_READ) && mine;
  end

endmodule
