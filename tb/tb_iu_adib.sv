// tb_iu_adib: random command words into the address decoder; each decoded
// strobe and field is compared one cycle later with a reference decode of
// the word that was sent. The IU address is 5, and words are sent to it, to
// other IUs and as broadcasts.
module tb_iu_adib;
  import sat_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  cu_word_t         data_in;
  logic             buf_valid, lcm_we, lcm_last, lvm_we, clear, cfg_done, rd_req;
  lit_t             lcm_lit;
  logic [VAR_W-1:0] lvm_var;
  vstat_e           lvm_stat;
  logic             lvm_value;

  iu_adib #(.MY_ADDR(4'd5)) dut (.*);

  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cu_word_t w;
    data_in = CU_NOP;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!buf_valid && !lcm_we && !lvm_we && !clear && !cfg_done && !rd_req, "idle after reset");
    for (int i = 0; i < 2000; i++) begin
      w.cmd   = cmd_e'($urandom_range(5));
      w.addr  = ($urandom_range(1)) ? 4'd5 : IU_AW'($urandom);
      w.last  = 1'($urandom);
      w.stat  = vstat_e'($urandom_range(2));
      w.value = 1'($urandom);
      w.vidx  = VAR_W'($urandom);
      data_in = w;
      @(negedge clk);
      check(buf_valid == (w.cmd != CMD_NOP), "buf_valid");
      check(lcm_we == (w.cmd == CMD_LIT && w.addr == 4'd5), "lcm_we");
      check(lvm_we == (w.cmd == CMD_VAR), "lvm_we");
      check(clear == (w.cmd == CMD_CLEAR), "clear");
      check(cfg_done == (w.cmd == CMD_CFG_DONE && w.addr == 4'd5), "cfg_done");
      check(rd_req == (w.cmd == CMD_READ && w.addr == 4'd5), "rd_req");
      if (w.cmd == CMD_LIT)
        check(lcm_lit.vidx == w.vidx && lcm_lit.neg == w.value && lcm_last == w.last, "literal fields");
      if (w.cmd == CMD_VAR)
        check(lvm_var == w.vidx && lvm_stat == w.stat && lvm_value == w.value, "variable fields");
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
