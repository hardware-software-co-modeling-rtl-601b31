// iu_lcm: local clause memory of one implication unit.
//
// The memory is an array of rows, one clause per row. A row has ROW_LITS
// literal slots; a clause shorter than that leaves the rest of its row unused
// (the spare slots are what lets clauses of different lengths share one
// regular array). A separate length array records how many slots of each row
// hold literals. Storing clauses as rows of literal slots follows the
// design; the row width, the row count and the separate length array are this
// design's own choices.
//
// Write side: the address decoder appends one literal per cycle (we). The
// literal goes to slot wr_slot of row n_rows; when last is set the row's length
// is recorded and n_rows advances. A clause longer than ROW_LITS or a clause
// beyond the last row sets the sticky overflow flag and is dropped.
// Read side: rd_en with rd_row returns the whole row and its length one cycle
// later (synchronous read). Reset empties the memory (n_rows = 0).
module iu_lcm
  import sat_pkg::*;
#(
  parameter int unsigned ROWS     = 512,
  parameter int unsigned ROW_LITS = 8,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned SW = $clog2(ROW_LITS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  lit_t          wr_lit,
  input  logic          wr_last,
  output logic [RW:0]   n_rows,
  output logic          overflow,
  input  logic          rd_en,
  input  logic [RW-1:0] rd_row,
  output lit_t          rd_lits [ROW_LITS],
  output logic [SW-1:0] rd_len
);

  lit_t          mem     [ROWS][ROW_LITS];
  logic [SW-1:0] len_mem [ROWS];
  logic [SW-1:0] wr_slot;
  logic          drop;      // current clause is being discarded

  logic row_ok, slot_ok;
  assign row_ok  = (n_rows < (RW+1)'(ROWS));
  assign slot_ok = (wr_slot < SW'(ROW_LITS));

  always_ff @(posedge clk) begin
    if (we && row_ok && slot_ok && !drop) begin
      mem[n_rows[RW-1:0]][wr_slot[$clog2(ROW_LITS)-1:0]] <= wr_lit;
      if (wr_last) len_mem[n_rows[RW-1:0]] <= wr_slot + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_rows   <= '0;
      wr_slot  <= '0;
      overflow <= 1'b0;
      drop     <= 1'b0;
    end else if (we) begin
      if (!row_ok || !slot_ok || drop) begin
        overflow <= 1'b1;
        drop     <= !wr_last;
        wr_slot  <= '0;
      end else if (wr_last) begin
        n_rows  <= n_rows + 1'b1;
        wr_slot <= '0;
      end else begin
        wr_slot <= wr_slot + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_lits <= mem[rd_row];
      rd_len  <= len_mem[rd_row];
    end
  end

endmodule
