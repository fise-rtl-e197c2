// fise_dp_sram: dual-port SRAM used for every SRAM table of the FISE lookup
// (destination and source index tables, TD-table, catalog, dictionary,
// mapping table).
//
// One write port serves the control-plane updates and one read port serves
// the lookup pipeline, so table updates never interrupt lookups. A read of
// the cell that is being written in the same cycle returns the new data
// (write-first bypass): the design relies on dual-port SRAM resolving such
// read-write collisions, the bypass is this implementation's way of doing it.
//
// Timing: synchronous read, one cycle. raddr with re in cycle t, rdata valid
// in cycle t+1 and held until the next read. Contents are not reset.
module fise_dp_sram #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  // write port
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  // read port
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata,
  output logic              collision   // pulses with rdata when the read was bypassed
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] mem_q;
  logic [WIDTH-1:0] byp_q;
  logic             byp_sel_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) begin
      mem_q     <= mem[raddr];
      byp_q     <= wdata;
      byp_sel_q <= we && (waddr == raddr);
    end else begin
      byp_sel_q <= 1'b0;
      if (byp_sel_q) mem_q <= byp_q;
    end
  end

  assign rdata     = byp_sel_q ? byp_q : mem_q;
  assign collision = byp_sel_q;

endmodule
