// tb_iu_lvm: random writes on both ports, random reads and occasional
// clears, compared cycle by cycle with a reference array; includes
// same-address writes on both ports (port A must win) and the one-cycle read
// latency.
module tb_iu_lvm;
  import sat_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             clear, we_a, value_a, we_b, value_b, rd_value;
  logic [VAR_W-1:0] var_a, var_b, rd_var;
  vstat_e           stat_a, stat_b, rd_stat;

  iu_lvm dut (.*);

  always #5 clk = !clk;
  int checks = 0, failures = 0;

  vstat_e rs [N_VARS];
  logic   rv [N_VARS];

  initial begin
    clear = 0; we_a = 0; we_b = 0; var_a = '0; var_b = '0; value_a = 0; value_b = 0;
    stat_a = V_FREE; stat_b = V_FREE; rd_var = '0;
    for (int i = 0; i < N_VARS; i++) begin rs[i] = V_FREE; rv[i] = 1'b0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      vstat_e exp_s;
      logic   exp_v;
      @(negedge clk);
      clear   = ($urandom_range(99) == 0);
      we_a    = 1'($urandom);
      we_b    = 1'($urandom);
      var_a   = VAR_W'($urandom_range(15));
      var_b   = ($urandom_range(3) == 0) ? var_a : VAR_W'($urandom_range(15));
      stat_a  = vstat_e'($urandom_range(2));
      stat_b  = vstat_e'($urandom_range(2));
      value_a = 1'($urandom);
      value_b = 1'($urandom);
      rd_var  = VAR_W'($urandom_range(15));
      exp_s = rs[rd_var];
      exp_v = rv[rd_var];
      @(posedge clk);
      if (clear) begin
        for (int i = 0; i < N_VARS; i++) rs[i] = V_FREE;
      end else begin
        if (we_b) begin rs[var_b] = stat_b; rv[var_b] = value_b; end
        if (we_a) begin rs[var_a] = stat_a; rv[var_a] = value_a; end
      end
      #1;
      checks++;
      if (rd_stat != exp_s || (exp_s != V_FREE && rd_value != exp_v)) begin
        failures++;
        $display("FAIL: read of %0d gave %0d/%0d, expected %0d/%0d", rd_var, rd_stat, rd_value, exp_s, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
