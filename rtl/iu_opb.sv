// iu_opb: output buffer of one implication unit.
//
// Collects the implications the FSM finds in a first-in first-out buffer and
// keeps a sticky conflict flag. stsout is high whenever the buffer holds
// implication data (an implication or a conflict), which tells the CU that a
// read is worth issuing. On a read request the buffer drives its contents on
// data_out, one word per cycle with oe high, oldest first, and closes the
// response with an end word (last = 1) that carries the conflict flag; the
// flag is cleared as it is sent. An empty buffer answers with the end word
// alone. The status output and buffering of outgoing data follow the design;
// the response format, the depth and the end word are this design's choices.
//
// DEPTH defaults to one entry per variable: between two CLEARs the FSM can
// imply each variable at most once, so the buffer cannot overflow in use; an
// assertion checks this. clear empties the buffer and drops the flag.
// Timing: rd_req in cycle t -> first word on data_out in cycle t+2, then
// one word per cycle.
module iu_opb
  import sat_pkg::*;
#(
  parameter int unsigned DEPTH = N_VARS,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     push,
  input  impl_t    push_data,
  input  logic     conflict_set,
  input  logic     rd_req,
  output iu_word_t data_out,
  output logic     oe,
  output logic     stsout
);

  impl_t         mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic          conf;
  logic          streaming;

  logic do_push, do_pop;
  assign do_push = push && (count < (AW+1)'(DEPTH)) && !clear;
  assign do_pop  = streaming && (count != '0) && !clear;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      conf      <= 1'b0;
      streaming <= 1'b0;
      oe        <= 1'b0;
      data_out  <= '0;
    end else if (clear) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      conf      <= 1'b0;
      streaming <= 1'b0;
      oe        <= 1'b0;
    end else begin
      oe <= 1'b0;
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (conflict_set) conf <= 1'b1;
      if (rd_req) streaming <= 1'b1;
      if (streaming) begin
        oe <= 1'b1;
        if (count != '0) begin
          data_out <= '{last: 1'b0, conflict: 1'b0, impl: mem[rd_ptr]};
        end else begin
          data_out  <= '{last: 1'b1, conflict: conf, impl: '0};
          streaming <= 1'b0;
          if (!conflict_set) conf <= 1'b0;
        end
      end
    end
  end

  assign stsout = (count != '0) || conf;

  // The buffer is sized so that it never fills in use.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> count < (AW+1)'(DEPTH));

endmodule
