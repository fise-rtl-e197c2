// fise_td_table: the FISE TD-table, a two-dimensional array of nexthop
// indexes held in SRAM. The destination index selects the row, the source
// index selects the column, and the TD-cell at (row, column) holds the
// nexthop index of the rule for that (destination prefix, source prefix)
// pair, already saturated by the control plane so that a single read gives
// the answer.
//
// The array is stored row-major in one dual-port SRAM: cell (r, c) sits at
// r * COLS + c. Cells are 8 bits wide as in the design; the row and column
// counts are parameters (the design's index fields are 32 bits wide, of
// which only the low ROW_AW / COL_AW bits are used here).
//
// Timing: one SRAM cycle. row/col with re in cycle t, cell valid in cycle
// t+1. The write port (control-plane updates) is independent of the read
// port; a read of the cell written in the same cycle returns the new value.
module fise_td_table
  import fise_pkg::*;
#(
  parameter int unsigned ROWS   = 1024,
  parameter int unsigned COLS   = 1024,
  parameter int unsigned ROW_AW = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned COL_AW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic              clk,
  // lookup read
  input  logic              re,
  input  logic [ROW_AW-1:0] row,
  input  logic [COL_AW-1:0] col,
  output nh_idx_t           td_cell,
  output logic              collision,
  // cell write
  input  logic              we,
  input  logic [ROW_AW-1:0] wrow,
  input  logic [COL_AW-1:0] wcol,
  input  nh_idx_t           wcell
);

  localparam int unsigned DEPTH = ROWS * COLS;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [AW-1:0] raddr, waddr;

  assign raddr = AW'(row) * AW'(COLS) + AW'(col);
  assign waddr = AW'(wrow) * AW'(COLS) + AW'(wcol);

  fise_dp_sram #(.WIDTH(NH_IDX_W), .DEPTH(DEPTH)) u_cells (
    .clk      (clk),
    .we       (we),
    .waddr    (waddr),
    .wdata    (wcell),
    .re       (re),
    .raddr    (raddr),
    .rdata    (td_cell),
    .collision(collision)
  );

endmodule
