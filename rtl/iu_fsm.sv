// iu_fsm: implication scheduler of one implication unit.
//
// Whenever the local variable memory (LVM) has been written, the FSM scans
// every clause row of the local clause memory (LCM). For each clause one
// counter counts its free literals while a flag records whether any literal
// is already true. At the end of the clause:
//   * not satisfied and exactly one free literal -> implication: the free
//     literal's variable is forced to the value that makes it true. It is
//     written into the LVM as "implied" and pushed to the output buffer;
//   * not satisfied and no free literal -> conflict: the output buffer's
//     conflict flag is set and scanning stops until the next CLEAR.
// A pass that produced an implication, or during which the CU wrote the LVM,
// is followed by another pass, so the FSM stops only at a fixpoint (or on a
// conflict). The counter rule and scan-on-change follow the design. Sharing
// one counter among all clauses (they are visited one at a time), the
// repeat-until-no-change passes and the stop on conflict are this design's
// own choices.
//
// Timing per clause: one cycle to read the LCM row, one cycle per literal to
// read its variable from the LVM (pipelined with evaluation), one cycle to
// evaluate the last literal and one cycle to decide: len + 3 cycles. The
// implication write lands before the next clause reads the LVM, so a pass
// always sees its own implications.
// busy is high while a pass runs or one is pending.
module iu_fsm
  import sat_pkg::*;
#(
  parameter int unsigned ROWS     = 512,
  parameter int unsigned ROW_LITS = 8,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned SW = $clog2(ROW_LITS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,      // CU CLEAR: abort, drop conflict, rescan
  input  logic             trigger,    // the CU wrote the LVM
  input  logic [RW:0]      n_rows,
  // LCM read port
  output logic             lcm_rd_en,
  output logic [RW-1:0]    lcm_rd_row,
  input  lit_t             lcm_lits [ROW_LITS],
  input  logic [SW-1:0]    lcm_len,
  // LVM read port
  output logic [VAR_W-1:0] lvm_rd_var,
  input  vstat_e           lvm_stat,
  input  logic             lvm_value,
  // results
  output logic             imp_we,     // to LVM port B and output buffer
  output impl_t            imp,
  output logic             conflict,   // one-cycle pulse
  output logic             pass_start, // one-cycle pulse at the start of each pass
  output logic             busy
);

  typedef enum logic [2:0] {S_IDLE, S_ROW, S_LIT, S_EVAL, S_DEC} state_e;

  state_e        state;
  logic [RW-1:0] row;
  logic [SW-1:0] slot;
  logic [SW-1:0] free_cnt;
  logic          sat;
  lit_t          prev_lit, free_lit;
  logic          changed, pending, hold;

  // Evaluation of the literal whose variable was read in the previous cycle.
  logic ev;
  assign ev = (state == S_EVAL) || (state == S_LIT && slot != '0);

  // Decision at the end of a clause.
  logic is_imp, is_conf, last_row;
  assign is_imp   = (state == S_DEC) && !sat && (free_cnt == SW'(1));
  assign is_conf  = (state == S_DEC) && !sat && (free_cnt == '0);
  assign last_row = ((RW+1)'(row) + 1'b1 >= n_rows);

  logic start_pass;
  always_comb begin
    start_pass = 1'b0;
    if (!clear) begin
      if (state == S_IDLE)
        start_pass = pending && !hold && (n_rows != '0);
      else if (state == S_DEC && !is_conf && last_row)
        start_pass = changed || is_imp || pending;
    end
  end

  assign lcm_rd_en  = (state == S_ROW);
  assign lcm_rd_row = row;
  assign lvm_rd_var = lcm_lits[slot[$clog2(ROW_LITS)-1:0]].vidx;
  assign imp_we     = is_imp && !clear;
  assign imp        = '{value: !free_lit.neg, vidx: free_lit.vidx};
  assign conflict   = is_conf && !clear;
  assign pass_start = start_pass;
  assign busy       = (state != S_IDLE) || (pending && !hold);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      row      <= '0;
      slot     <= '0;
      free_cnt <= '0;
      sat      <= 1'b0;
      prev_lit <= '0;
      free_lit <= '0;
      changed  <= 1'b0;
      pending  <= 1'b0;
      hold     <= 1'b0;
    end else if (clear) begin
      state   <= S_IDLE;
      pending <= 1'b1;
      hold    <= 1'b0;
      changed <= 1'b0;
    end else begin
      pending <= trigger || (pending && !start_pass);
      if (ev) begin
        if (lvm_stat == V_FREE) begin
          free_cnt <= free_cnt + 1'b1;
          free_lit <= prev_lit;
        end else if (lvm_value != prev_lit.neg) begin
          sat <= 1'b1;
        end
      end
      unique case (state)
        S_IDLE: begin
          if (state == S_IDLE && pending && !hold && n_rows == '0) pending <= trigger;
          if (start_pass) begin
            state   <= S_ROW;
            row     <= '0;
            changed <= 1'b0;
          end
        end
        S_ROW: begin
          state    <= S_LIT;
          slot     <= '0;
          free_cnt <= '0;
          sat      <= 1'b0;
        end
        S_LIT: begin
          prev_lit <= lcm_lits[slot[$clog2(ROW_LITS)-1:0]];
          slot     <= slot + 1'b1;
          if (slot + 1'b1 >= lcm_len) state <= S_EVAL;
        end
        S_EVAL: state <= S_DEC;
        S_DEC: begin
          if (is_imp) changed <= 1'b1;
          if (is_conf) begin
            state <= S_IDLE;
            hold  <= 1'b1;
          end else if (!last_row) begin
            state <= S_ROW;
            row   <= row + 1'b1;
          end else if (start_pass) begin
            state   <= S_ROW;
            row     <= '0;
            changed <= 1'b0;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
