// sat_solver_top: the distributed SAT solver - one control unit (CU), N_IU
// implication units (IUs), the glue logic between them and the crossing
// between the CU clock and the IU clock.
//
// The CU drives one command bus that reaches the input of every IU (CU_out
// to IU_in); the IUs' outputs share one return bus to the CU (IU_out to
// CU_in), qualified by each IU's oe. The glue logic turns the IUs' cfgout
// and stsout into the CU's config and CU_stsin inputs. The CU runs on
// clock_cu and the IUs and glue logic on clock_iu; the two may be unrelated.
// This structure, the two clocks, three IUs and the 9-bit variable address
// (512 variables) follow the design. The clock-crossing bridge and the
// busy/iu_idle handshake are this design's additions.
//
// Use: reset (rst_n is asynchronous and released in step in both domains);
// write the instance through ld_we/ld_addr/ld_data on clock_cu (one literal
// per word, last marks the end of a clause; variables numbered from 0); set
// num_vars and num_lits; pulse start; wait for done. sat then gives the
// answer and res_var/res_value read the satisfying assignment. error means
// the instance does not fit (clause longer than ROW_LITS, more than
// N_IU*ROWS clauses, or a variable >= num_vars). n_passes (clause passes of
// all IUs since reset) and lcm_overflow come from the IU clock domain.
module sat_solver_top
  import sat_pkg::*;
#(
  parameter int unsigned N_IU       = 3,
  parameter int unsigned ROWS       = 512,
  parameter int unsigned ROW_LITS   = 8,
  parameter int unsigned INST_DEPTH = 8192,
  localparam int unsigned IAW = $clog2(INST_DEPTH)
) (
  input  logic             clock_cu,
  input  logic             clock_iu,
  input  logic             rst_n,
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
  output logic [31:0]      n_passes,      // clause passes since reset, all IUs
  output logic             lcm_overflow
);

  logic     rst_cu_n, rst_iu_n;
  cu_word_t cu_out, iu_cmd;
  iu_word_t cu_in, iu_rsp;
  logic     cu_in_valid, cu_in_pop, cmd_ready, cu_stsin, config_n, iu_idle;
  logic     iu_rsp_valid, iu_stsin, iu_config_n, iu_all_idle;

  iu_word_t data_out [N_IU];
  logic     oe       [N_IU];
  logic     stsout   [N_IU];
  logic     cfgout   [N_IU];
  logic     busy     [N_IU];
  logic     ovf      [N_IU];
  logic     pass     [N_IU];

  reset_sync u_rst_cu (.clk(clock_cu), .rst_n, .rst_sync_n(rst_cu_n));
  reset_sync u_rst_iu (.clk(clock_iu), .rst_n, .rst_sync_n(rst_iu_n));

  control_unit #(
    .N_IU(N_IU), .ROWS(ROWS), .ROW_LITS(ROW_LITS), .INST_DEPTH(INST_DEPTH)
  ) u_cu (
    .clk(clock_cu), .rst_n(rst_cu_n),
    .ld_we, .ld_addr, .ld_data, .num_vars, .num_lits, .start,
    .done, .sat, .error, .res_var, .res_value, .res_assigned,
    .n_decisions, .n_implications, .n_conflicts, .n_reads,
    .cu_out, .cmd_ready, .cu_in, .cu_in_valid, .cu_in_pop,
    .cu_stsin, .config_n, .iu_idle
  );

  cu_iu_bridge u_bridge (
    .clock_cu, .rst_cu_n, .cu_out, .cmd_ready, .cu_in, .cu_in_valid, .cu_in_pop,
    .cu_stsin, .config_n, .iu_idle,
    .clock_iu, .rst_iu_n, .iu_cmd, .iu_rsp, .iu_rsp_valid,
    .iu_stsin, .iu_config_n, .iu_all_idle
  );

  for (genvar g = 0; g < N_IU; g++) begin : g_iu
    implication_unit #(
      .MY_ADDR(IU_AW'(g)), .ROWS(ROWS), .ROW_LITS(ROW_LITS)
    ) u_iu (
      .clk(clock_iu), .rst_n(rst_iu_n),
      .data_in(iu_cmd), .data_out(data_out[g]), .oe(oe[g]),
      .stsout(stsout[g]), .cfgout(cfgout[g]), .busy(busy[g]),
      .lcm_overflow(ovf[g]), .pass_start(pass[g])
    );
  end

  iu_logic #(.N_IU(N_IU)) u_logic (
    .stsout, .cfgout, .busy, .oe, .data_out,
    .config_n(iu_config_n), .cu_stsin(iu_stsin), .iu_idle(iu_all_idle),
    .cu_in(iu_rsp), .cu_in_valid(iu_rsp_valid)
  );

  always_comb begin
    lcm_overflow = 1'b0;
    for (int i = 0; i < N_IU; i++) lcm_overflow |= ovf[i];
  end

  // Only the IU the CU addressed may drive the return bus.
  logic [N_IU-1:0] oe_vec;
  always_comb for (int i = 0; i < N_IU; i++) oe_vec[i] = oe[i];
  a_one_driver: assert property (@(posedge clock_iu) disable iff (!rst_iu_n) $onehot0(oe_vec));

  logic [31:0] pass_sum;
  always_comb begin
    pass_sum = '0;
    for (int i = 0; i < N_IU; i++) pass_sum += 32'(pass[i]);
  end

  always_ff @(posedge clock_iu or negedge rst_iu_n) begin
    if (!rst_iu_n) n_passes <= '0;
    else           n_passes <= n_passes + pass_sum;
  end

endmodule
