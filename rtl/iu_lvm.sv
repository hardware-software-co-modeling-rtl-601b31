// iu_lvm: local variable memory of one implication unit.
//
// Holds, for every variable of the instance, its value and its status: free,
// assigned (by a CU decision) or implied. Keeping value and status per
// variable follows the design; the organisation below is this design's own.
//
// It is a register array with two write ports and one read port:
//   port A - the CU's variable writes, arriving through the address decoder;
//   port B - implications found by this IU's own FSM.
// When both write the same variable in one cycle, port A (the CU) wins.
// clear sets every variable free in one cycle; it is used by the CU's CLEAR
// command and by reset, and has priority over both write ports.
// Read: rd_var in cycle t gives rd_stat / rd_value in cycle t+1, and sees
// every write made up to the end of cycle t.
module iu_lvm
  import sat_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             we_a,
  input  logic [VAR_W-1:0] var_a,
  input  vstat_e           stat_a,
  input  logic             value_a,
  input  logic             we_b,
  input  logic [VAR_W-1:0] var_b,
  input  vstat_e           stat_b,
  input  logic             value_b,
  input  logic [VAR_W-1:0] rd_var,
  output vstat_e           rd_stat,
  output logic             rd_value
);

  vstat_e stat_q  [N_VARS];
  logic   value_q [N_VARS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_VARS; i++) begin
        stat_q[i]  <= V_FREE;
        value_q[i] <= 1'b0;
      end
    end else if (clear) begin
      for (int i = 0; i < N_VARS; i++) stat_q[i] <= V_FREE;
    end else begin
      if (we_b && !(we_a && var_a == var_b)) begin
        stat_q[var_b]  <= stat_b;
        value_q[var_b] <= value_b;
      end
      if (we_a) begin
        stat_q[var_a]  <= stat_a;
        value_q[var_a] <= value_a;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_stat  <= V_FREE;
      rd_value <= 1'b0;
    end else begin
      rd_stat  <= stat_q[rd_var];
      rd_value <= value_q[rd_var];
    end
  end

endmodule
