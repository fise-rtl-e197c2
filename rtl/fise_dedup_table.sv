// fise_dedup_table: the TD-table after fixed block deduplication.
//
// Every TD-table row is cut into sub-rows of BLOCK_W cells. The dictionary
// table holds each distinct sub-row once; the catalog table holds, for every
// (row, chunk) of the original TD-table, the number of the dictionary
// sub-row that equals it. A lookup of cell (n, m) reads the catalog at row n,
// column m / BLOCK_W to get the sub-row number r, then reads the dictionary
// at row r, column m % BLOCK_W to get the nexthop index. This costs one SRAM
// cycle more than the plain TD-table. Catalog cells are 32 bits and
// dictionary cells 8 bits, as in the design. The deduplication itself
// (fingerprints, Bloom filter, fingerprint store) runs in the control plane,
// which then writes the two tables through the write ports.
//
// Both tables are stored row-major in dual-port SRAMs. Of a 32-bit sub-row
// number only the low bits that address DICT_ROWS sub-rows are used.
//
// Timing: two SRAM cycles. row/col with re in cycle t, cell valid in cycle
// t+2. Catalog and dictionary writes are independent of the lookup and
// bypass a read of the same cell in the same cycle.
module fise_dedup_table
  import fise_pkg::*;
#(
  parameter int unsigned ROWS      = 1024,
  parameter int unsigned COLS      = 1024,
  parameter int unsigned BLOCK_W   = 32,
  parameter int unsigned DICT_ROWS = 4096,
  parameter int unsigned ROW_AW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned COL_AW    = (COLS > 1) ? $clog2(COLS) : 1,
  parameter int unsigned CHUNKS    = (COLS + BLOCK_W - 1) / BLOCK_W,
  parameter int unsigned CHUNK_AW  = (CHUNKS > 1) ? $clog2(CHUNKS) : 1,
  parameter int unsigned OFF_AW    = (BLOCK_W > 1) ? $clog2(BLOCK_W) : 1,
  parameter int unsigned DICT_AW   = (DICT_ROWS > 1) ? $clog2(DICT_ROWS) : 1
) (
  input  logic                clk,
  // lookup read
  input  logic                re,
  input  logic [ROW_AW-1:0]   row,
  input  logic [COL_AW-1:0]   col,
  output nh_idx_t             td_cell,
  output logic                collision,
  // catalog write: cell (wrow, wchunk) <- sub-row number
  input  logic                cat_we,
  input  logic [ROW_AW-1:0]   cat_wrow,
  input  logic [CHUNK_AW-1:0] cat_wchunk,
  input  logic [CAT_W-1:0]    cat_wdata,
  // dictionary write: cell (wsubrow, woff) <- nexthop index
  input  logic                dict_we,
  input  logic [DICT_AW-1:0]  dict_wsubrow,
  input  logic [OFF_AW-1:0]   dict_woff,
  input  nh_idx_t             dict_wdata
);

  localparam int unsigned CAT_DEPTH  = ROWS * CHUNKS;
  localparam int unsigned CAT_AW     = (CAT_DEPTH > 1) ? $clog2(CAT_DEPTH) : 1;
  localparam int unsigned DICT_DEPTH = DICT_ROWS * BLOCK_W;
  localparam int unsigned DCELL_AW   = (DICT_DEPTH > 1) ? $clog2(DICT_DEPTH) : 1;

  // Stage 1: catalog read at (n, m / w); keep m % w for stage 2.
  logic [CAT_AW-1:0] cat_raddr, cat_waddr;
  logic [CAT_W-1:0]  cat_rdata;
  logic              cat_coll;
  logic [OFF_AW-1:0] off_q;
  logic              re_q;

  assign cat_raddr = CAT_AW'(row) * CAT_AW'(CHUNKS) + CAT_AW'(col / COL_AW'(BLOCK_W));
  assign cat_waddr = CAT_AW'(cat_wrow) * CAT_AW'(CHUNKS) + CAT_AW'(cat_wchunk);

  fise_dp_sram #(.WIDTH(CAT_W), .DEPTH(CAT_DEPTH)) u_catalog (
    .clk      (clk),
    .we       (cat_we),
    .waddr    (cat_waddr),
    .wdata    (cat_wdata),
    .re       (re),
    .raddr    (cat_raddr),
    .rdata    (cat_rdata),
    .collision(cat_coll)
  );

  always_ff @(posedge clk) begin
    re_q <= re;
    if (re) off_q <= OFF_AW'(col % COL_AW'(BLOCK_W));
  end

  // Stage 2: dictionary read at (r, m % w).
  logic [DCELL_AW-1:0] dict_raddr, dict_waddr;
  logic                dict_coll;
  logic                cat_coll_q;

  assign dict_raddr = DCELL_AW'(cat_rdata[DICT_AW-1:0]) * DCELL_AW'(BLOCK_W) + DCELL_AW'(off_q);
  assign dict_waddr = DCELL_AW'(dict_wsubrow) * DCELL_AW'(BLOCK_W) + DCELL_AW'(dict_woff);

  fise_dp_sram #(.WIDTH(NH_IDX_W), .DEPTH(DICT_DEPTH)) u_dictionary (
    .clk      (clk),
    .we       (dict_we),
    .waddr    (dict_waddr),
    .wdata    (dict_wdata),
    .re       (re_q),
    .raddr    (dict_raddr),
    .rdata    (td_cell),
    .collision(dict_coll)
  );

  always_ff @(posedge clk) cat_coll_q <= cat_coll;

  assign collision = cat_coll_q | dict_coll;

endmodule
