// control_unit: the control unit (CU) of the distributed SAT solver.
//
// The CU runs the sequential part of Davis-Putnam style search while the
// implication units (IUs) do unit propagation in parallel. In the design the
// CU is firmware on a microprocessor; it also allows a custom circuit, and
// this module is such a circuit: one state machine that carries out the CU's
// algorithm.
//
//   1. Load: a host writes the instance (a flat list of literals, the last
//      literal of each clause marked) into the instance memory, sets
//      num_vars / num_lits and pulses start.
//   2. Partition and distribute: clauses are dealt out round-robin, clause
//      i to IU i mod N_IU, one literal per cycle (CMD_LIT); then every IU
//      gets CFG_DONE. The CU waits until config_n goes low (all IUs loaded).
//   3. Search: CLEAR is broadcast, then the loop
//        wait until every IU is idle;
//        cu_stsin high -> READ each IU in turn; every implication is checked
//          against the variable database: a contradicting value, or an IU's
//          conflict flag, is a conflict; a new value is recorded on the
//          trail and later broadcast to all IUs (CMD_VAR, implied);
//        cu_stsin low  -> decide: the lowest-numbered free variable gets
//          the value 0 and is broadcast (CMD_VAR, assigned); if there is none,
//          every variable is assigned without conflict: SAT.
//      On a conflict the CU backtracks chronologically: it pops the trail
//      back to the most recent decision not yet flipped, flips it, broadcasts
//      CLEAR and re-broadcasts the surviving trail. With no decision left to
//      flip the instance is UNSAT.
// The split of work, the command sequence (distribute, config, clear, assign,
// read, analyse, backtrack by flipping the latest decision) follows the
// design. Round-robin partitioning, the value tried first, the lowest-index
// decision order and clear-and-replay on backtrack are this design's choices.
//
// Timing: one command word per cycle on cu_out (registered) while cmd_ready
// is high; when it is low the state machine holds (except while idle or done,
// so that a start pulse is never lost). Response words are
// taken from cu_in when cu_in_valid is high, one per cycle, acknowledged with
// cu_in_pop. After a burst of commands the CU waits SETTLE cycles before it
// trusts iu_idle, which covers the command path's latency. error is raised (with done) when a clause is
// longer than ROW_LITS, the instance has more than N_IU*ROWS clauses or uses
// a variable >= num_vars.
module control_unit
  import sat_pkg::*;
#(
  parameter int unsigned N_IU       = 3,
  parameter int unsigned ROWS       = 512,
  parameter int unsigned ROW_LITS   = 8,
  parameter int unsigned INST_DEPTH = 8192,
  parameter int unsigned SETTLE     = 3,
  localparam int unsigned IAW = $clog2(INST_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host side
  input  logic             ld_we,
  input  logic [IAW-1:0]   ld_addr,
  input  inst_lit_t        ld_data,
  input  logic [VAR_W:0]   num_vars,
  input  logic [IAW:0]     num_lits,
  input  logic             start,
  output logic             done,
  output logic             sat,
  output logic             error,
  input  logic [VAR_W-1:0] res_var,
  output logic             res_value,
  output logic             res_assigned,
  output logic [31:0]      n_decisions,
  output logic [31:0]      n_implications,
  output logic [31:0]      n_conflicts,
  output logic [31:0]      n_reads,
  // IU side
  output cu_word_t         cu_out,
  input  logic             cmd_ready,   // room for two more command words
  input  iu_word_t         cu_in,
  input  logic             cu_in_valid,
  output logic             cu_in_pop,   // cu_in consumed this cycle
  input  logic             cu_stsin,
  input  logic             config_n,
  input  logic             iu_idle
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_DIST_RD, S_DIST_WR, S_CFG, S_CFG_WAIT, S_CLEAR,
    S_SETTLE, S_WAIT, S_READ, S_RECV, S_AFTER, S_BCAST, S_DECIDE, S_BT, S_DONE
  } state_e;

  typedef struct packed {
    logic             dec;    // entry is a decision
    logic             flip;   // decision already flipped
    logic             value;
    logic [VAR_W-1:0] vidx;
  } trail_t;

  localparam int unsigned KW = (N_IU > 1) ? $clog2(N_IU) : 1;
  localparam int unsigned CW = $clog2(N_IU * ROWS + 1);
  localparam int unsigned LW = $clog2(ROW_LITS + 1);

  // instance memory
  inst_lit_t inst_mem [INST_DEPTH];
  inst_lit_t inst_rd;
  always_ff @(posedge clk) begin
    if (ld_we) inst_mem[ld_addr] <= ld_data;
  end

  // variable database and trail
  logic   db_asg [N_VARS];
  logic   db_val [N_VARS];
  trail_t trail  [N_VARS];

  state_e           state;
  logic [IAW:0]     ptr;
  logic [KW-1:0]    cur_iu, k;
  logic [CW-1:0]    cl_cnt;
  logic [LW-1:0]    cl_len;
  logic [VAR_W:0]   top, bptr, v;
  logic [3:0]       cnt;
  logic             conf;

  assign res_value    = db_val[res_var];
  assign res_assigned = db_asg[res_var];

  trail_t top_e, b_e;
  assign top_e = trail[top[VAR_W-1:0] - 1'b1];
  assign b_e   = trail[bptr[VAR_W-1:0]];

  logic [VAR_W-1:0] iv;
  assign iv = cu_in.impl.vidx;

  assign cu_in_pop = cmd_ready && (state == S_RECV) && cu_in_valid;

  always_ff @(posedge clk) begin
    if (state == S_DIST_RD) inst_rd <= inst_mem[ptr[IAW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      cu_out         <= CU_NOP;
      done           <= 1'b0;
      sat            <= 1'b0;
      error          <= 1'b0;
      ptr            <= '0;
      cur_iu         <= '0;
      k              <= '0;
      cl_cnt         <= '0;
      cl_len         <= '0;
      top            <= '0;
      bptr           <= '0;
      v              <= '0;
      cnt            <= '0;
      conf           <= 1'b0;
      n_decisions    <= '0;
      n_implications <= '0;
      n_conflicts    <= '0;
      n_reads        <= '0;
      for (int i = 0; i < N_VARS; i++) begin
        db_asg[i] <= 1'b0;
        db_val[i] <= 1'b0;
        trail[i]  <= '0;
      end
    end else if (!cmd_ready && state != S_IDLE && state != S_DONE) begin
      cu_out <= CU_NOP;                 // hold until there is room (start is never missed)
    end else begin
      cu_out <= CU_NOP;
      unique case (state)
        S_IDLE: if (start) state <= S_INIT;

        S_INIT: begin
          for (int i = 0; i < N_VARS; i++) db_asg[i] <= 1'b0;
          done           <= 1'b0;
          sat            <= 1'b0;
          error          <= 1'b0;
          ptr            <= '0;
          cur_iu         <= '0;
          cl_cnt         <= '0;
          cl_len         <= '0;
          top            <= '0;
          bptr           <= '0;
          n_decisions    <= '0;
          n_implications <= '0;
          n_conflicts    <= '0;
          n_reads        <= '0;
          k              <= '0;
          state          <= (num_lits == '0) ? S_CFG : S_DIST_RD;
        end

        // ---- partition and distribute the instance ----
        S_DIST_RD: state <= S_DIST_WR;

        S_DIST_WR: begin
          if (cl_len == LW'(ROW_LITS) || {1'b0, inst_rd.lit.vidx} >= num_vars ||
              (cl_len == '0 && cl_cnt == CW'(N_IU * ROWS))) begin
            error <= 1'b1;
            state <= S_DONE;
          end else begin
            cu_out <= '{cmd: CMD_LIT, addr: IU_AW'(cur_iu), last: inst_rd.last,
                        stat: V_FREE, value: inst_rd.lit.neg, vidx: inst_rd.lit.vidx};
            if (inst_rd.last) begin
              cl_len <= '0;
              cl_cnt <= cl_cnt + 1'b1;
              cur_iu <= (cur_iu == KW'(N_IU - 1)) ? '0 : cur_iu + 1'b1;
            end else begin
              cl_len <= cl_len + 1'b1;
            end
            ptr   <= ptr + 1'b1;
            state <= (ptr + 1'b1 == num_lits) ? S_CFG : S_DIST_RD;
          end
        end

        S_CFG: begin
          cu_out <= '{cmd: CMD_CFG_DONE, addr: IU_AW'(k), last: 1'b0,
                      stat: V_FREE, value: 1'b0, vidx: '0};
          if (k == KW'(N_IU - 1)) begin
            k     <= '0;
            cnt   <= 4'(SETTLE);
            state <= S_CFG_WAIT;
          end else begin
            k <= k + 1'b1;
          end
        end

        S_CFG_WAIT: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else if (!config_n) state <= S_CLEAR;
        end

        // ---- search ----
        S_CLEAR: begin
          cu_out <= '{cmd: CMD_CLEAR, addr: '0, last: 1'b0,
                      stat: V_FREE, value: 1'b0, vidx: '0};
          bptr   <= '0;
          state  <= S_BCAST;
        end

        S_BCAST: begin
          if (bptr == top) begin
            cnt   <= 4'(SETTLE);
            state <= S_SETTLE;
          end else begin
            cu_out <= '{cmd: CMD_VAR, addr: '0, last: 1'b0,
                        stat: b_e.dec ? V_ASSIGNED : V_IMPLIED,
                        value: b_e.value, vidx: b_e.vidx};
            bptr   <= bptr + 1'b1;
          end
        end

        S_SETTLE: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else           state <= S_WAIT;
        end

        S_WAIT: begin
          if (iu_idle) begin
            if (cu_stsin) begin
              k       <= '0;
              conf    <= 1'b0;
              n_reads <= n_reads + 1'b1;
              state   <= S_READ;
            end else begin
              v     <= '0;
              state <= S_DECIDE;
            end
          end
        end

        S_READ: begin
          cu_out <= '{cmd: CMD_READ, addr: IU_AW'(k), last: 1'b0,
                      stat: V_FREE, value: 1'b0, vidx: '0};
          state  <= S_RECV;
        end

        S_RECV: begin
          if (cu_in_valid) begin
            if (!cu_in.last) begin
              if (db_asg[iv]) begin
                if (db_val[iv] != cu_in.impl.value) conf <= 1'b1;
              end else begin
                db_asg[iv] <= 1'b1;
                db_val[iv] <= cu_in.impl.value;
                trail[top[VAR_W-1:0]] <= '{dec: 1'b0, flip: 1'b0,
                                           value: cu_in.impl.value, vidx: iv};
                top            <= top + 1'b1;
                n_implications <= n_implications + 1'b1;
              end
            end else begin
              if (cu_in.conflict) conf <= 1'b1;
              if (k == KW'(N_IU - 1)) begin
                state <= S_AFTER;
              end else begin
                k     <= k + 1'b1;
                state <= S_READ;
              end
            end
          end
        end

        S_AFTER: begin
          if (conf) begin
            n_conflicts <= n_conflicts + 1'b1;
            state       <= S_BT;
          end else begin
            state <= S_BCAST;
          end
        end

        S_DECIDE: begin
          if (v == num_vars) begin
            sat   <= 1'b1;
            state <= S_DONE;
          end else if (!db_asg[v[VAR_W-1:0]]) begin
            db_asg[v[VAR_W-1:0]] <= 1'b1;
            db_val[v[VAR_W-1:0]] <= 1'b0;
            trail[top[VAR_W-1:0]] <= '{dec: 1'b1, flip: 1'b0, value: 1'b0,
                                       vidx: v[VAR_W-1:0]};
            top         <= top + 1'b1;
            n_decisions <= n_decisions + 1'b1;
            state       <= S_BCAST;
          end else begin
            v <= v + 1'b1;
          end
        end

        S_BT: begin
          if (top == '0) begin
            sat   <= 1'b0;
            state <= S_DONE;
          end else if (top_e.dec && !top_e.flip) begin
            trail[top[VAR_W-1:0] - 1'b1] <= '{dec: 1'b1, flip: 1'b1,
                                              value: !top_e.value, vidx: top_e.vidx};
            db_val[top_e.vidx] <= !top_e.value;
            state <= S_CLEAR;
          end else begin
            db_asg[top_e.vidx] <= 1'b0;
            top <= top - 1'b1;
          end
        end

        S_DONE: begin
          done <= 1'b1;
          if (start) state <= S_INIT;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
