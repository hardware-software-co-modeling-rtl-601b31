// reset_sync: reset synchroniser for one clock domain. The output is
// asserted at once when rst_n falls and released two clock edges after rst_n
// rises, so every flip-flop of the domain leaves reset in the same cycle.
module reset_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_sync_n
);

  logic [1:0] q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= {q[0], 1'b1};
  end
  assign rst_sync_n = q[1];

endmodule
