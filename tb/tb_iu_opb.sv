// tb_iu_opb: pushes random runs of implications (sometimes with a conflict)
// into the output buffer, reads them out and checks order, contents, the
// closing end word with its conflict flag, the two-cycle read latency, stsout
// before and after, and that clear empties the buffer. Depth 16.
module tb_iu_opb;
  import sat_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     clear, push, conflict_set, rd_req, oe, stsout;
  impl_t    push_data;
  iu_word_t data_out;

  iu_opb #(.DEPTH(16)) dut (.*);

  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    clear = 0; push = 0; conflict_set = 0; rd_req = 0; push_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!stsout && !oe, "empty after reset");
    for (int t = 0; t < 200; t++) begin
      impl_t q[$];
      int    n, lat;
      bit    c, got_end;
      n = int'($urandom_range(16));
      c = ($urandom_range(3) == 0);
      for (int i = 0; i < n; i++) begin
        impl_t d;
        d = impl_t'($urandom);
        q.push_back(d);
        push = 1'b1; push_data = d;
        @(negedge clk);
      end
      push = 1'b0;
      if (c) begin
        conflict_set = 1'b1;
        @(negedge clk);
        conflict_set = 1'b0;
      end
      check(stsout == (n != 0 || c), "stsout reflects buffered data");
      if (t % 7 == 3) begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        q = {};
        c = 1'b0;
        check(!stsout, "clear empties the buffer");
      end
      rd_req = 1'b1;
      @(negedge clk);
      rd_req = 1'b0;
      lat = 0;
      while (!oe && lat < 5) begin @(negedge clk); lat++; end
      check(lat == 1, "first word two cycles after the read request");
      got_end = 1'b0;
      while (oe && !got_end) begin
        if (data_out.last) begin
          got_end = 1'b1;
          check(q.size() == 0, "end word after all implications");
          check(data_out.conflict == c, "conflict flag in end word");
        end else begin
          check(q.size() != 0 && data_out.impl == q[0], "implication in order");
          if (q.size() != 0) void'(q.pop_front());
        end
        @(negedge clk);
      end
      check(got_end && !oe, "response closed by one end word");
      check(!stsout, "buffer empty after read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
