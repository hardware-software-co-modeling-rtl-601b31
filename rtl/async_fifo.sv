// async_fifo: first-in first-out buffer between two unrelated clocks.
//
// Standard dual-clock design: a memory of 2**AW words, binary write and read
// pointers one bit wider than the address, each passed to the other clock
// domain as a Gray code through two synchronising flip-flops. The read side is
// first-word-fall-through: rdata shows the oldest word whenever rempty is low,
// and re removes it. Both sides see the other's pointer late, so wfull and
// w_used are pessimistic (never under-report the fill level) and rempty is
// pessimistic too; nothing is ever lost or read twice.
// Write side extras: w_used counts the words not yet known to be read, and
// w_drained is high when every written word has been read out.
// Resets are asynchronous, one per domain, and must be released in step
// (both sides empty).
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = 3
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [AW:0]      w_used,
  output logic             w_drained,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             re,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);

  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---- write domain ----
  logic do_write;
  assign do_write = we && !wfull;

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_write) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  assign w_used    = wbin - gray2bin(rgray_w2);
  assign wfull     = (w_used == (AW+1)'(2**AW));
  assign w_drained = (wgray == rgray_w2);

  // ---- read domain ----
  logic do_read;
  assign do_read = re && !rempty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_read) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

endmodule
