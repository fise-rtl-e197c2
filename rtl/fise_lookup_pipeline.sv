// fise_lookup_pipeline: the SRAM side of a FISE lookup.
//
// It takes the matched TCAM addresses of a packet from the TCAM-to-SRAM FIFO
// and turns them into a nexthop:
//   stage 1  read the destination index and the source index from the SRAMs
//            associated with the two TCAM tables (both in parallel);
//   stage 2  read the TD-cell at (row of the destination index, column of the
//            source index), from the plain TD-table or, with DEDUP = 1, from
//            the catalog and then the dictionary (one stage more);
//   resolve  pick the nexthop index: the destination's default index when the
//            indicator bit is clear, when no source prefix matched, or when
//            the TD-cell is empty; the TD-cell value otherwise;
//   stage 3  read the nexthop information from the mapping table.
// One packet can enter every cycle, so packets overlap as in a classic
// pipeline: one packet per SRAM clock. The default-index rules and the three
// SRAM reads follow the design; the no-destination-match case (reported as
// dst_hit = 0) is this implementation's choice, since the destination table
// always holds a default prefix in normal use.
//
// Flow control: a packet is taken from the FIFO only when the output FIFO can
// store it together with all packets already in the pipeline, so the pipeline
// itself never stalls. Updates come in on one write port per SRAM and do not
// disturb the lookups (dual-port SRAMs).
//
// Timing: a packet popped in cycle t is pushed to the output FIFO in cycle
// t+3 (t+4 with DEDUP = 1).
module fise_lookup_pipeline
  import fise_pkg::*;
#(
  parameter int unsigned DST_DEPTH = 1024,
  parameter int unsigned SRC_DEPTH = 1024,
  parameter int unsigned TD_ROWS   = 1024,
  parameter int unsigned TD_COLS   = 1024,
  parameter bit          DEDUP     = 1'b0,
  parameter int unsigned BLOCK_W   = 32,
  parameter int unsigned DICT_ROWS = 4096,
  parameter int unsigned MAP_DEPTH = 256,
  parameter int unsigned OUT_DEPTH = 16,
  parameter int unsigned DST_AW    = (DST_DEPTH > 1) ? $clog2(DST_DEPTH) : 1,
  parameter int unsigned SRC_AW    = (SRC_DEPTH > 1) ? $clog2(SRC_DEPTH) : 1,
  parameter int unsigned OUT_AW    = $clog2(OUT_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the TCAM-to-SRAM FIFO (show-ahead)
  input  logic              in_empty,
  output logic              in_pop,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic              in_dst_hit,
  input  logic [DST_AW-1:0] in_dst_addr,
  input  logic              in_src_hit,
  input  logic [SRC_AW-1:0] in_src_addr,
  // to the output FIFO
  input  logic [OUT_AW:0]   out_count,
  output logic              out_push,
  output lookup_result_t    out_result,
  // control-plane updates of the SRAM tables
  input  logic              upd_valid,
  input  sram_upd_t         upd,
  // status: a lookup read hit a cell written in the same cycle
  output logic              collision
);

  localparam int unsigned TD_LAT   = DEDUP ? 2 : 1;
  localparam int unsigned ROW_AW   = (TD_ROWS > 1) ? $clog2(TD_ROWS) : 1;
  localparam int unsigned COL_AW   = (TD_COLS > 1) ? $clog2(TD_COLS) : 1;
  localparam int unsigned MAP_AW   = (MAP_DEPTH > 1) ? $clog2(MAP_DEPTH) : 1;
  localparam int unsigned CHUNKS   = (TD_COLS + BLOCK_W - 1) / BLOCK_W;
  localparam int unsigned CHUNK_AW = (CHUNKS > 1) ? $clog2(CHUNKS) : 1;
  localparam int unsigned OFF_AW   = (BLOCK_W > 1) ? $clog2(BLOCK_W) : 1;
  localparam int unsigned DICT_AW  = (DICT_ROWS > 1) ? $clog2(DICT_ROWS) : 1;

  // -------------------------------------------------------------------------
  // Flow control: number of packets between the pop and the output push.
  // -------------------------------------------------------------------------
  logic       s1_valid;
  logic [TD_LAT-1:0] td_valid;
  logic       s3_valid;
  int unsigned in_flight;

  always_comb begin
    in_flight = int'(s1_valid) + int'(s3_valid);
    for (int i = 0; i < int'(TD_LAT); i++) in_flight += int'(td_valid[i]);
  end

  assign in_pop = !in_empty && ((int'(out_count) + in_flight) < int'(OUT_DEPTH));

  // -------------------------------------------------------------------------
  // Update decoding
  // -------------------------------------------------------------------------
  logic dst_we, src_we, td_we, cat_we, map_we;
  assign dst_we = upd_valid && (upd.target == UPD_DST_INDEX);
  assign src_we = upd_valid && (upd.target == UPD_SRC_INDEX);
  assign td_we  = upd_valid && (upd.target == UPD_TD_CELL);
  assign cat_we = upd_valid && (upd.target == UPD_CATALOG);
  assign map_we = upd_valid && (upd.target == UPD_MAPPING);

  // -------------------------------------------------------------------------
  // Stage 1: destination and source index SRAMs
  // -------------------------------------------------------------------------
  dst_index_t dst_idx;
  src_index_t src_idx;
  logic       dst_coll, src_coll;
  logic [TAG_W-1:0] s1_tag;
  logic       s1_dst_hit, s1_src_hit;

  fise_dp_sram #(.WIDTH($bits(dst_index_t)), .DEPTH(DST_DEPTH)) u_dst_index (
    .clk      (clk),
    .we       (dst_we),
    .waddr    (DST_AW'(upd.addr0)),
    .wdata    (upd.data[$bits(dst_index_t)-1:0]),
    .re       (in_pop),
    .raddr    (in_dst_addr),
    .rdata    (dst_idx),
    .collision(dst_coll)
  );

  fise_dp_sram #(.WIDTH($bits(src_index_t)), .DEPTH(SRC_DEPTH)) u_src_index (
    .clk      (clk),
    .we       (src_we),
    .waddr    (SRC_AW'(upd.addr0)),
    .wdata    (upd.data[$bits(src_index_t)-1:0]),
    .re       (in_pop),
    .raddr    (in_src_addr),
    .rdata    (src_idx),
    .collision(src_coll)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_pop;
  end

  always_ff @(posedge clk) begin
    if (in_pop) begin
      s1_tag     <= in_tag;
      s1_dst_hit <= in_dst_hit;
      s1_src_hit <= in_src_hit;
    end
  end

  // -------------------------------------------------------------------------
  // Stage 2: TD-cell read (plain TD-table or catalog + dictionary)
  // -------------------------------------------------------------------------
  logic      need_cell;
  res_kind_e s1_kind;
  nh_idx_t   td_cell;
  logic      td_coll;

  always_comb begin
    if (!dst_idx.indicator) s1_kind = RES_NO_ROW;
    else if (!s1_src_hit)   s1_kind = RES_NO_SRC_MATCH;
    else                    s1_kind = RES_CELL;
  end
  assign need_cell = s1_valid && s1_dst_hit && (s1_kind == RES_CELL);

  if (DEDUP) begin : g_dedup
    fise_dedup_table #(
      .ROWS(TD_ROWS), .COLS(TD_COLS), .BLOCK_W(BLOCK_W), .DICT_ROWS(DICT_ROWS)
    ) u_td (
      .clk         (clk),
      .re          (need_cell),
      .row         (ROW_AW'(dst_idx.row)),
      .col         (COL_AW'(src_idx.col)),
      .td_cell        (td_cell),
      .collision   (td_coll),
      .cat_we      (cat_we),
      .cat_wrow    (ROW_AW'(upd.addr0)),
      .cat_wchunk  (CHUNK_AW'(upd.addr1)),
      .cat_wdata   (upd.data[CAT_W-1:0]),
      .dict_we     (td_we),
      .dict_wsubrow(DICT_AW'(upd.addr0)),
      .dict_woff   (OFF_AW'(upd.addr1)),
      .dict_wdata  (upd.data[NH_IDX_W-1:0])
    );
  end else begin : g_plain
    fise_td_table #(.ROWS(TD_ROWS), .COLS(TD_COLS)) u_td (
      .clk      (clk),
      .re       (need_cell),
      .row      (ROW_AW'(dst_idx.row)),
      .col      (COL_AW'(src_idx.col)),
      .td_cell     (td_cell),
      .collision(td_coll),
      .we       (td_we),
      .wrow     (ROW_AW'(upd.addr0)),
      .wcol     (COL_AW'(upd.addr1)),
      .wcell    (upd.data[NH_IDX_W-1:0])
    );
  end

  // Side information travels alongside the TD read.
  logic [TAG_W-1:0] td_tag     [TD_LAT];
  logic             td_dst_hit [TD_LAT];
  res_kind_e        td_kind    [TD_LAT];
  nh_idx_t          td_dflt    [TD_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) td_valid <= '0;
    else begin
      td_valid[0] <= s1_valid;
      for (int i = 1; i < int'(TD_LAT); i++) td_valid[i] <= td_valid[i-1];
    end
  end

  always_ff @(posedge clk) begin
    td_tag[0]     <= s1_tag;
    td_dst_hit[0] <= s1_dst_hit;
    td_kind[0]    <= s1_kind;
    td_dflt[0]    <= dst_idx.dflt;
    for (int i = 1; i < int'(TD_LAT); i++) begin
      td_tag[i]     <= td_tag[i-1];
      td_dst_hit[i] <= td_dst_hit[i-1];
      td_kind[i]    <= td_kind[i-1];
      td_dflt[i]    <= td_dflt[i-1];
    end
  end

  // -------------------------------------------------------------------------
  // Resolve the nexthop index, then stage 3: mapping table
  // -------------------------------------------------------------------------
  localparam int unsigned L = TD_LAT - 1;
  res_kind_e r_kind;
  nh_idx_t   r_idx;

  always_comb begin
    r_kind = td_kind[L];
    r_idx  = td_dflt[L];
    if (td_kind[L] == RES_CELL) begin
      if (td_cell == EMPTY_CELL) r_kind = RES_EMPTY_CELL;
      else                    r_idx  = td_cell;
    end
  end

  logic [NH_INFO_W-1:0] nh_info;
  logic                 map_coll;
  logic [TAG_W-1:0]     s3_tag;
  logic                 s3_dst_hit;
  res_kind_e            s3_kind;
  nh_idx_t              s3_idx;

  fise_dp_sram #(.WIDTH(NH_INFO_W), .DEPTH(MAP_DEPTH)) u_mapping (
    .clk      (clk),
    .we       (map_we),
    .waddr    (MAP_AW'(upd.addr0)),
    .wdata    (upd.data[NH_INFO_W-1:0]),
    .re       (td_valid[L]),
    .raddr    (MAP_AW'(r_idx)),
    .rdata    (nh_info),
    .collision(map_coll)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_valid <= 1'b0;
    else        s3_valid <= td_valid[L];
  end

  always_ff @(posedge clk) begin
    s3_tag     <= td_tag[L];
    s3_dst_hit <= td_dst_hit[L];
    s3_kind    <= r_kind;
    s3_idx     <= r_idx;
  end

  assign out_push           = s3_valid;
  assign out_result.tag     = s3_tag;
  assign out_result.dst_hit = s3_dst_hit;
  assign out_result.kind    = s3_kind;
  assign out_result.nh_idx  = s3_idx;
  assign out_result.nh_info = nh_info;

  // A collision is only meaningful for reads that were really issued.
  assign collision = (s1_valid && (dst_coll || src_coll)) ||
                     (td_valid[L] && td_kind[L] == RES_CELL && td_coll) ||
                     (s3_valid && map_coll);

endmodule
