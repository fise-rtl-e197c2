// fise_pkg: types and constants shared by the FISE forwarding-table RTL.
//
// FISE splits a two-dimensional (destination, source) forwarding table into a
// destination TCAM table, a source TCAM table, a two-dimensional SRAM table of
// nexthop indexes (the TD-table) and a mapping table from nexthop index to
// nexthop information. The index records below follow the index formats of
// the design: a source index is a 32-bit column number; a destination index
// is a 32-bit row number, an indicator bit (set when the destination owns a
// TD-table row) and an 8-bit default nexthop index. The 8-bit TD-cell, the
// 32-bit catalog cell and the 8-bit dictionary cell are the design's sizes.
// The update-command encoding, the result record and the choice of the value
// 0 as the "empty TD-cell" code are this implementation's own choices.
package fise_pkg;

  localparam int unsigned ROW_NUM_W = 32;  // row number field of a destination index
  localparam int unsigned COL_NUM_W = 32;  // column number field of a source index
  localparam int unsigned NH_IDX_W  = 8;   // nexthop index, TD-cell and dictionary cell
  localparam int unsigned CAT_W     = 32;  // catalog cell (sub-row number)
  localparam int unsigned NH_INFO_W = 32;  // nexthop information (an IPv4 nexthop address)
  localparam int unsigned TAG_W     = 16;  // packet tag carried along the pipeline

  typedef logic [NH_IDX_W-1:0] nh_idx_t;

  // TD-cell code that marks an empty cell: the lookup then falls back to the
  // destination's default nexthop index.
  localparam nh_idx_t EMPTY_CELL = '0;

  // Destination index record, stored in the SRAM associated with the
  // destination TCAM table.
  typedef struct packed {
    logic [ROW_NUM_W-1:0] row;        // TD-table row number
    logic                 indicator;  // 1: the destination owns a TD-table row
    nh_idx_t              dflt;       // default nexthop index
  } dst_index_t;

  // Source index record: the TD-table column number.
  typedef struct packed {
    logic [COL_NUM_W-1:0] col;
  } src_index_t;

  // Which SRAM an SRAM-side update command writes.
  typedef enum logic [2:0] {
    UPD_DST_INDEX = 3'd0,  // destination index table: addr0 = TCAM address
    UPD_SRC_INDEX = 3'd1,  // source index table: addr0 = TCAM address
    UPD_TD_CELL   = 3'd2,  // TD-table cell or dictionary cell: addr0 = row, addr1 = column
    UPD_CATALOG   = 3'd3,  // catalog cell: addr0 = row, addr1 = chunk
    UPD_MAPPING   = 3'd4   // mapping table: addr0 = nexthop index
  } upd_target_e;

  typedef struct packed {
    upd_target_e target;
    logic [31:0] addr0;
    logic [31:0] addr1;
    logic [63:0] data;
  } sram_upd_t;

  // Which TCAM table a TCAM-side update command writes.
  typedef enum logic {
    TCAM_DST = 1'b0,
    TCAM_SRC = 1'b1
  } tcam_sel_e;

  // How the nexthop index of a lookup was obtained.
  typedef enum logic [1:0] {
    RES_CELL          = 2'd0,  // value of the TD-cell
    RES_NO_ROW        = 2'd1,  // indicator bit clear: default index
    RES_NO_SRC_MATCH  = 2'd2,  // no source prefix matched: default index
    RES_EMPTY_CELL    = 2'd3   // TD-cell empty: default index
  } res_kind_e;

  // Lookup result delivered towards the switch co-process module.
  typedef struct packed {
    logic [TAG_W-1:0]     tag;
    logic                 dst_hit;   // 0: no destination prefix matched, packet has no route
    res_kind_e            kind;
    nh_idx_t              nh_idx;
    logic [NH_INFO_W-1:0] nh_info;
  } lookup_result_t;

endpackage
