// fise_sync_fifo: the FIFO between the FISE lookup logic and the switch
// co-process module, which takes the lookup results (nexthop per packet) in
// order.
//
// A single-clock FIFO with a valid/ready output. count is the number of
// stored words; the lookup pipeline uses it to stop issuing new lookups when
// the words already in flight could not be stored. Depth, width and the
// show-ahead output are this implementation's choices; the design only places
// a FIFO at this point.
//
// Timing: a word pushed in cycle t is visible at the output (out_valid) in
// cycle t+1. A pop (out_valid && out_ready) and a push may share a cycle.
// Reset empties the FIFO.
module fise_sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16,            // power of two
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  output logic             full,
  output logic [AW:0]      count,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr_q, rptr_q;
  logic        do_push, do_pop;

  assign count     = wptr_q - rptr_q;
  assign full      = (count == (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr_q[AW-1:0]];
  assign do_push   = push && !full;
  assign do_pop    = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr_q[AW-1:0]] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
    end else begin
      if (do_push) wptr_q <= wptr_q + 1'b1;
      if (do_pop)  rptr_q <= rptr_q + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("fise_sync_fifo: push while full");

endmodule
