// iu_logic: the glue logic between the implication units and the CU.
//
// It merges the per-IU signals into the few the CU looks at:
//   config   - low once every IU has raised cfgout (all sub-instances loaded);
//   cu_stsin - high when any IU's stsout says it holds implication data;
//   iu_idle  - high when no IU is busy (this design's addition);
//   cu_in    - the shared IU -> CU return bus: the word of the IU whose oe is
//              high (only the IU the CU addressed drives at any time), with
//              cu_in_valid = any oe. The top checks with an assertion that
//              at most one oe is high.
// The design names this block and the signals it combines but not its gates:
// the AND/OR reductions follow from what config and CU_stsin are said to
// mean. Purely combinational.
module iu_logic
  import sat_pkg::*;
#(
  parameter int unsigned N_IU = 3
) (
  input  logic     stsout   [N_IU],
  input  logic     cfgout   [N_IU],
  input  logic     busy     [N_IU],
  input  logic     oe       [N_IU],
  input  iu_word_t data_out [N_IU],
  output logic     config_n,
  output logic     cu_stsin,
  output logic     iu_idle,
  output iu_word_t cu_in,
  output logic     cu_in_valid
);

  always_comb begin
    logic all_cfg;
    all_cfg     = 1'b1;
    cu_stsin    = 1'b0;
    iu_idle     = 1'b1;
    cu_in       = '0;
    cu_in_valid = 1'b0;
    for (int i = 0; i < N_IU; i++) begin
      all_cfg     &= cfgout[i];
      cu_stsin    |= stsout[i];
      iu_idle     &= !busy[i];
      cu_in_valid |= oe[i];
      if (oe[i]) cu_in |= data_out[i];
    end
    config_n = !all_cfg;
  end

endmodule
