// tb_iu_logic: random status inputs from four IUs, with at most one oe high
// at a time, compared with the reductions worked out here: config_n low only
// when every cfgout is high, cu_stsin = any stsout, iu_idle = no busy, and the
// return bus carrying the word of the IU whose oe is high.
module tb_iu_logic;
  import sat_pkg::*;
  localparam int N = 4;

  logic     stsout [N], cfgout [N], busy [N], oe [N];
  iu_word_t data_out [N];
  logic     config_n, cu_stsin, iu_idle, cu_in_valid;
  iu_word_t cu_in;

  iu_logic #(.N_IU(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int sel, ns, nc, nb;
      sel = int'($urandom_range(N));   // N means no driver
      ns = 0; nc = 0; nb = 0;
      for (int i = 0; i < N; i++) begin
        stsout[i]   = ($urandom_range(3) == 0);
        cfgout[i]   = ($urandom_range(4) != 0);
        busy[i]     = ($urandom_range(3) == 0);
        oe[i]       = (i == sel);
        data_out[i] = iu_word_t'($urandom);
        ns += int'(stsout[i]); nc += int'(cfgout[i]); nb += int'(busy[i]);
      end
      #1;
      check(config_n == (nc != N), "config_n");
      check(cu_stsin == (ns != 0), "cu_stsin");
      check(iu_idle == (nb == 0), "iu_idle");
      check(cu_in_valid == (sel != N), "cu_in_valid");
      if (sel != N) check(cu_in == data_out[sel], "return bus carries the selected IU");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
