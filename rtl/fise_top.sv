// fise_top: FISE forwarding table, a two-dimensional (destination, source)
// forwarding plane that keeps only prefixes in TCAM and moves the
// destination x source product into SRAM.
//
// Structure:
//   TCAM clock domain
//     - destination table and source table (fise_tcam), looked up in
//       parallel with the packet's destination and source address;
//     - the matched addresses (and a packet tag) are pushed into
//   the TCAM-to-SRAM FIFO (fise_async_fifo), which crosses to
//   SRAM clock domain
//     - fise_lookup_pipeline: destination/source index SRAMs, TD-table
//       (plain, or catalog + dictionary with DEDUP = 1), default-index
//       resolution, mapping table;
//     - output FIFO (fise_sync_fifo) towards the switch co-process module.
//
// Interfaces:
//   in_*        packet lookup requests, valid/ready, TCAM clock. in_ready is
//               low while a TCAM entry is written (a TCAM update interrupts
//               lookups) and while the FIFO could not take the request.
//   tcam_upd_*  one TCAM entry write per cycle, TCAM clock, always accepted.
//   sram_upd_*  one SRAM word write per cycle, SRAM clock, always accepted;
//               lookups continue meanwhile (dual-port SRAMs).
//   out_*       lookup results in request order, valid/ready, SRAM clock.
//
// Timing: one TCAM clock for the TCAM lookup, the FIFO crossing (two to
// three SRAM clocks), then three SRAM clocks (four with DEDUP = 1); one
// packet per clock in steady state. The two clocks may be the same clock.
// Sizes: 128-bit keys (IPv6 addresses), 1024-entry tables and a 1024 x 1024
// TD-table of 8-bit cells are this implementation's defaults, sized for
// fewer than 1,000 destination and 1,000 source prefixes; the 8-bit nexthop
// index, the 32-bit index fields and the 32-bit catalog cell are the
// design's own sizes.
module fise_top
  import fise_pkg::*;
#(
  parameter int unsigned KEY_W      = 128,
  parameter int unsigned DST_DEPTH  = 1024,
  parameter int unsigned SRC_DEPTH  = 1024,
  parameter int unsigned TD_ROWS    = 1024,
  parameter int unsigned TD_COLS    = 1024,
  parameter bit          DEDUP      = 1'b0,
  parameter int unsigned BLOCK_W    = 32,
  parameter int unsigned DICT_ROWS  = 4096,
  parameter int unsigned MAP_DEPTH  = 256,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned OUT_DEPTH  = 16
) (
  input  logic                 clk_tcam,
  input  logic                 rst_tcam_n,
  input  logic                 clk_sram,
  input  logic                 rst_sram_n,
  // lookup requests (TCAM clock)
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [KEY_W-1:0]     in_dst_addr,
  input  logic [KEY_W-1:0]     in_src_addr,
  input  logic [TAG_W-1:0]     in_tag,
  // TCAM entry writes (TCAM clock)
  input  logic                 tcam_upd_valid,
  input  tcam_sel_e            tcam_upd_sel,
  input  logic [31:0]          tcam_upd_addr,
  input  logic [KEY_W-1:0]     tcam_upd_value,
  input  logic [KEY_W-1:0]     tcam_upd_mask,
  input  logic                 tcam_upd_entry_valid,
  // SRAM word writes (SRAM clock)
  input  logic                 sram_upd_valid,
  input  sram_upd_t            sram_upd,
  // lookup results (SRAM clock)
  output logic                 out_valid,
  input  logic                 out_ready,
  output lookup_result_t       out_result,
  // status (SRAM clock): a lookup read a cell that was written that cycle
  output logic                 sram_collision
);

  localparam int unsigned DST_AW  = (DST_DEPTH > 1) ? $clog2(DST_DEPTH) : 1;
  localparam int unsigned SRC_AW  = (SRC_DEPTH > 1) ? $clog2(SRC_DEPTH) : 1;
  localparam int unsigned FIFO_AW = $clog2(FIFO_DEPTH);
  localparam int unsigned OUT_AW  = $clog2(OUT_DEPTH);

  // FIFO word: {tag, dst_hit, dst_addr, src_hit, src_addr}
  localparam int unsigned FW = TAG_W + 1 + DST_AW + 1 + SRC_AW;

  // -------------------------------------------------------------------------
  // TCAM domain
  // -------------------------------------------------------------------------
  logic              lookup_en;
  logic              dst_res_valid, dst_hit, src_res_valid, src_hit;
  logic [DST_AW-1:0] dst_match;
  logic [SRC_AW-1:0] src_match;
  logic [TAG_W-1:0]  tag_q;
  logic [FIFO_AW:0]  fifo_level;

  // Keep room for the lookup already in the TCAM stage.
  assign in_ready  = !tcam_upd_valid &&
                     ((int'(fifo_level) + int'(dst_res_valid)) < int'(FIFO_DEPTH));
  assign lookup_en = in_valid && in_ready;

  fise_tcam #(.KEY_W(KEY_W), .DEPTH(DST_DEPTH)) u_dst_table (
    .clk         (clk_tcam),
    .rst_n       (rst_tcam_n),
    .lookup_en   (lookup_en),
    .key         (in_dst_addr),
    .res_valid   (dst_res_valid),
    .hit         (dst_hit),
    .match_addr  (dst_match),
    .we          (tcam_upd_valid && tcam_upd_sel == TCAM_DST),
    .waddr       (DST_AW'(tcam_upd_addr)),
    .wvalue      (tcam_upd_value),
    .wmask       (tcam_upd_mask),
    .wentry_valid(tcam_upd_entry_valid)
  );

  fise_tcam #(.KEY_W(KEY_W), .DEPTH(SRC_DEPTH)) u_src_table (
    .clk         (clk_tcam),
    .rst_n       (rst_tcam_n),
    .lookup_en   (lookup_en),
    .key         (in_src_addr),
    .res_valid   (src_res_valid),
    .hit         (src_hit),
    .match_addr  (src_match),
    .we          (tcam_upd_valid && tcam_upd_sel == TCAM_SRC),
    .waddr       (SRC_AW'(tcam_upd_addr)),
    .wvalue      (tcam_upd_value),
    .wmask       (tcam_upd_mask),
    .wentry_valid(tcam_upd_entry_valid)
  );

  always_ff @(posedge clk_tcam) begin
    if (lookup_en) tag_q <= in_tag;
  end

  // -------------------------------------------------------------------------
  // TCAM-to-SRAM FIFO
  // -------------------------------------------------------------------------
  logic [FW-1:0] fifo_wdata, fifo_rdata;
  logic          fifo_rempty, fifo_pop;

  assign fifo_wdata = {tag_q, dst_hit, dst_match, src_hit, src_match};

  fise_async_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk  (clk_tcam),
    .wrst_n(rst_tcam_n),
    .wpush (dst_res_valid),
    .wdata (fifo_wdata),
    .wfull (),
    .wlevel(fifo_level),
    .rclk  (clk_sram),
    .rrst_n(rst_sram_n),
    .rpop  (fifo_pop),
    .rdata (fifo_rdata),
    .rempty(fifo_rempty)
  );

  // -------------------------------------------------------------------------
  // SRAM domain
  // -------------------------------------------------------------------------
  logic [TAG_W-1:0]  p_tag;
  logic              p_dst_hit, p_src_hit;
  logic [DST_AW-1:0] p_dst_addr;
  logic [SRC_AW-1:0] p_src_addr;
  logic [OUT_AW:0]   out_count;
  logic              res_push;
  lookup_result_t    res;

  assign {p_tag, p_dst_hit, p_dst_addr, p_src_hit, p_src_addr} = fifo_rdata;

  fise_lookup_pipeline #(
    .DST_DEPTH(DST_DEPTH), .SRC_DEPTH(SRC_DEPTH),
    .TD_ROWS(TD_ROWS), .TD_COLS(TD_COLS),
    .DEDUP(DEDUP), .BLOCK_W(BLOCK_W), .DICT_ROWS(DICT_ROWS),
    .MAP_DEPTH(MAP_DEPTH), .OUT_DEPTH(OUT_DEPTH)
  ) u_pipe (
    .clk        (clk_sram),
    .rst_n      (rst_sram_n),
    .in_empty   (fifo_rempty),
    .in_pop     (fifo_pop),
    .in_tag     (p_tag),
    .in_dst_hit (p_dst_hit),
    .in_dst_addr(p_dst_addr),
    .in_src_hit (p_src_hit),
    .in_src_addr(p_src_addr),
    .out_count  (out_count),
    .out_push   (res_push),
    .out_result (res),
    .upd_valid  (sram_upd_valid),
    .upd        (sram_upd),
    .collision  (sram_collision)
  );

  fise_sync_fifo #(.WIDTH($bits(lookup_result_t)), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk      (clk_sram),
    .rst_n    (rst_sram_n),
    .push     (res_push),
    .push_data(res),
    .full     (),
    .count    (out_count),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (out_result)
  );

  // The two TCAM tables are always looked up together.
  a_tcam_lockstep: assert property (@(posedge clk_tcam) disable iff (!rst_tcam_n)
                                    dst_res_valid == src_res_valid)
    else $error("fise_top: TCAM tables out of step");

endmodule
