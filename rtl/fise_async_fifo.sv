// fise_async_fifo: the FIFO buffer between the TCAM lookup and the SRAM
// lookup of FISE. It carries the matched TCAM addresses from the TCAM clock
// domain into the SRAM clock domain, so that the two memories can run at
// different clock rates.
//
// Construction (this implementation's choice; the design only names the
// buffer and its purpose): a dual-clock FIFO with binary pointers one bit
// wider than the address, Gray-coded copies crossing each way through two
// flip-flop synchronisers. The read side is show-ahead: rdata is the head
// entry whenever rempty is low, and rpop removes it at the clock edge.
// wlevel is the write side's (pessimistic) fill level, used by the writer to
// keep enough space for words already on their way.
//
// Timing: a word written in write-clock cycle t becomes visible to the reader
// two to three read-clock edges later. Writing when full or popping when
// empty is ignored (and flagged by an assertion).
module fise_async_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16,           // power of two
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  // write side
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wpush,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [AW:0]      wlevel,
  // read side
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rpop,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rgray_w1, rgray_w2;
  logic [AW:0] rbin_q, rgray_q, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] rbin_w;
  assign rbin_w = gray2bin(rgray_w2);
  assign wlevel = wbin_q - rbin_w;
  assign wfull  = (wlevel == (AW+1)'(DEPTH));

  always_ff @(posedge wclk) begin
    if (wpush && !wfull) mem[wbin_q[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
      if (wpush && !wfull) begin
        wbin_q  <= wbin_q + 1'b1;
        wgray_q <= bin2gray(wbin_q + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  assign rempty = (rgray_q == wgray_r2);
  assign rdata  = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
      if (rpop && !rempty) begin
        rbin_q  <= rbin_q + 1'b1;
        rgray_q <= bin2gray(rbin_q + 1'b1);
      end
    end
  end

  // Handshake rules: never push into a full FIFO, never pop an empty one.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) wpush |-> !wfull)
    else $error("fise_async_fifo: push while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) rpop |-> !rempty)
    else $error("fise_async_fifo: pop while empty");

endmodule
