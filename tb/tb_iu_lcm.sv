// tb_iu_lcm: writes clauses of random lengths (1..ROW_LITS) into the clause
// memory, reads every row back and compares literals and lengths with a
// reference copy; then checks that a too-long clause and a clause beyond the
// last row set the overflow flag and are dropped. Runs with 16 rows of 4 slots.
module tb_iu_lcm;
  import sat_pkg::*;
  localparam int ROWS = 16, RL = 4;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          we, wr_last, overflow, rd_en;
  lit_t          wr_lit;
  logic [4:0]    n_rows;
  logic [3:0]    rd_row;
  lit_t          rd_lits [RL];
  logic [2:0]    rd_len;

  iu_lcm #(.ROWS(ROWS), .ROW_LITS(RL)) dut (.*);

  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  lit_t ref_lits [ROWS][RL];
  int   ref_len  [ROWS];

  task automatic put(input lit_t l, input bit last);
    @(negedge clk);
    we = 1'b1; wr_lit = l; wr_last = last;
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin
    we = 0; wr_lit = '0; wr_last = 0; rd_en = 0; rd_row = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // rows 0..ROWS-2 filled with random clauses, an over-long one in between
    for (int r = 0; r < ROWS - 1; r++) begin
      ref_len[r] = 1 + int'($urandom_range(RL - 1));
      for (int s = 0; s < ref_len[r]; s++) begin
        ref_lits[r][s] = lit_t'($urandom);
        put(ref_lits[r][s], s == ref_len[r] - 1);
      end
      if (r == 5) begin
        for (int s = 0; s <= RL; s++) put(lit_t'($urandom), s == RL);
      end
    end
    @(posedge clk);
    check(n_rows == 5'(ROWS - 1), "row count");
    check(overflow, "over-long clause flagged");
    for (int r = 0; r < ROWS - 1; r++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_row = 4'(r);
      @(negedge clk);
      rd_en = 1'b0;
      check(int'(rd_len) == ref_len[r], $sformatf("length of row %0d", r));
      for (int s = 0; s < ref_len[r]; s++)
        check(rd_lits[s] == ref_lits[r][s], $sformatf("row %0d slot %0d", r, s));
    end
    // fill the last row, then one more clause is dropped
    put(lit_t'(10'h011), 1'b1);
    put(lit_t'(10'h022), 1'b1);
    @(posedge clk);
    check(n_rows == 5'(ROWS), "memory full, extra clause dropped");
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
