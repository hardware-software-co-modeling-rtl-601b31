// implication_unit: one implication unit (IU) of the distributed SAT solver.
//
// An IU holds a part of the instance (its sub-instance) and, for the current
// assignment, finds every clause of that part that has become unit and the
// value it forces. It is built from the five blocks of the design:
//   ADIB - address decoder and input buffer: takes CU commands off data_in;
//   LCM  - local clause memory: the sub-instance, one clause per row;
//   LVM  - local variable memory: value and status of every variable;
//   FSM  - scheduler: rescans the clauses whenever the LVM changes;
//   OPB  - output buffer: implications and conflict flag, read out by the CU.
// cfgout rises when the CU signals the end of the sub-instance (CFG_DONE)
// and stays high until reset. stsout is high while the OPB holds implication
// data. oe qualifies data_out during a read response. busy (this design's
// addition, not one of the design's named signals) is high from the cycle a
// command reaches the input buffer until the FSM has reached a fixpoint, so
// that the CU can tell "no implications" from "not finished yet".
// All blocks run on one clock; MY_ADDR is the IU's unique address.
module implication_unit
  import sat_pkg::*;
#(
  parameter logic [IU_AW-1:0] MY_ADDR  = '0,
  parameter int unsigned      ROWS     = 512,
  parameter int unsigned      ROW_LITS = 8,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned SW = $clog2(ROW_LITS + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cu_word_t data_in,
  output iu_word_t data_out,
  output logic     oe,
  output logic     stsout,
  output logic     cfgout,
  output logic     busy,
  output logic     lcm_overflow,
  output logic     pass_start     // pulse: the FSM begins a pass over its clauses
);

  // ADIB outputs
  logic             buf_valid, lcm_we, lcm_last, lvm_we, clear, cfg_done, rd_req;
  lit_t             lcm_lit;
  logic [VAR_W-1:0] lvm_var;
  vstat_e           lvm_stat;
  logic             lvm_value;
  // LCM
  logic [RW:0]      n_rows;
  logic             lcm_rd_en;
  logic [RW-1:0]    lcm_rd_row;
  lit_t             lcm_lits [ROW_LITS];
  logic [SW-1:0]    lcm_len;
  // LVM
  logic [VAR_W-1:0] lvm_rd_var;
  vstat_e           lvm_rd_stat;
  logic             lvm_rd_value;
  // FSM
  logic             imp_we, conflict, fsm_busy;
  impl_t            imp;

  iu_adib #(.MY_ADDR(MY_ADDR)) u_adib (
    .clk, .rst_n, .data_in, .buf_valid,
    .lcm_we, .lcm_lit, .lcm_last,
    .lvm_we, .lvm_var, .lvm_stat, .lvm_value, .clear,
    .cfg_done, .rd_req
  );

  iu_lcm #(.ROWS(ROWS), .ROW_LITS(ROW_LITS)) u_lcm (
    .clk, .rst_n,
    .we(lcm_we), .wr_lit(lcm_lit), .wr_last(lcm_last),
    .n_rows, .overflow(lcm_overflow),
    .rd_en(lcm_rd_en), .rd_row(lcm_rd_row), .rd_lits(lcm_lits), .rd_len(lcm_len)
  );

  iu_lvm u_lvm (
    .clk, .rst_n, .clear,
    .we_a(lvm_we), .var_a(lvm_var), .stat_a(lvm_stat), .value_a(lvm_value),
    .we_b(imp_we), .var_b(imp.vidx), .stat_b(V_IMPLIED), .value_b(imp.value),
    .rd_var(lvm_rd_var), .rd_stat(lvm_rd_stat), .rd_value(lvm_rd_value)
  );

  iu_fsm #(.ROWS(ROWS), .ROW_LITS(ROW_LITS)) u_fsm (
    .clk, .rst_n, .clear, .trigger(lvm_we), .n_rows,
    .lcm_rd_en, .lcm_rd_row, .lcm_lits, .lcm_len,
    .lvm_rd_var, .lvm_stat(lvm_rd_stat), .lvm_value(lvm_rd_value),
    .imp_we, .imp, .conflict, .pass_start, .busy(fsm_busy)
  );

  iu_opb u_opb (
    .clk, .rst_n, .clear,
    .push(imp_we), .push_data(imp), .conflict_set(conflict),
    .rd_req, .data_out, .oe, .stsout
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfgout <= 1'b0;
    else if (cfg_done) cfgout <= 1'b1;
  end

  assign busy = buf_valid || fsm_busy;

endmodule
