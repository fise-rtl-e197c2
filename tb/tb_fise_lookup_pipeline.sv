// tb_fise_lookup_pipeline: self-checking test of the SRAM side of the lookup.
//
// The testbench plays the TCAM-to-SRAM FIFO (a queue of matched TCAM
// addresses) and the output FIFO (a queue drained at random, whose fill level
// is fed back as out_count). It programs random destination indexes (some
// with the indicator bit clear), source indexes, a TD-table with some empty
// cells and a mapping table, then checks for every packet the resolution
// rule (TD-cell, default on clear indicator, default on no source match,
// default on empty cell), the nexthop information, the order, the pop-to-push
// latency of three cycles, one packet per cycle when nothing blocks, and that
// the output FIFO never overflows.
module tb_fise_lookup_pipeline;
  import fise_pkg::*;
  localparam int DST_DEPTH = 8, SRC_DEPTH = 8, TD_ROWS = 4, TD_COLS = 8, OUT_DEPTH = 8;
  localparam int NPKT = 1500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_empty, in_pop, in_dst_hit, in_src_hit, out_push, upd_valid, collision;
  logic [TAG_W-1:0] in_tag;
  logic [2:0]       in_dst_addr, in_src_addr;
  logic [3:0]       out_count;
  lookup_result_t   out_result;
  sram_upd_t        upd;

  fise_lookup_pipeline #(
    .DST_DEPTH(DST_DEPTH), .SRC_DEPTH(SRC_DEPTH), .TD_ROWS(TD_ROWS), .TD_COLS(TD_COLS),
    .OUT_DEPTH(OUT_DEPTH)
  ) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_kind [4];

  dst_index_t m_dst [DST_DEPTH];
  src_index_t m_src [SRC_DEPTH];
  nh_idx_t    m_td  [TD_ROWS][TD_COLS];
  logic [31:0] m_map [256];

  typedef struct {
    int tag; bit dh; int da; bit sh; int sa;
  } pkt_t;
  pkt_t in_q[$];
  lookup_result_t out_q[$];
  int   exp_tag = 0;
  int   pop_cycle[$];
  int   streak = 0, best_streak = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_upd(input upd_target_e t, input int a0, input int a1, input logic [63:0] d);
    @(negedge clk);
    upd_valid = 1; upd.target = t; upd.addr0 = a0; upd.addr1 = a1; upd.data = d;
    @(negedge clk);
    upd_valid = 0;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model on the input side: the head of in_q drives the DUT inputs.
  // Updated with non-blocking assignments at the clock edge, directly when a
  // packet is added at the falling edge.
  task automatic show_head_now();
    in_empty    = (in_q.size() == 0);
    in_tag      = in_empty ? '0 : TAG_W'(in_q[0].tag);
    in_dst_hit  = in_empty ? 1'b0 : in_q[0].dh;
    in_dst_addr = in_empty ? '0 : 3'(in_q[0].da);
    in_src_hit  = in_empty ? 1'b0 : in_q[0].sh;
    in_src_addr = in_empty ? '0 : 3'(in_q[0].sa);
  endtask

  bit drain_fast = 0;
  bit feeding = 0;

  // Clocked models of the two FIFOs and the output checker.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      check(!(out_push && out_q.size() >= OUT_DEPTH), "output FIFO overflow");
      if (in_pop) begin
        pop_cycle.push_back(cycle);
        void'(in_q.pop_front());
      end
      if (out_push) begin
        int pc;
        out_q.push_back(out_result);
        pc = pop_cycle.pop_front();
        check(cycle - pc == 3, $sformatf("pop-to-push latency %0d", cycle - pc));
        streak = streak + 1;
        if (streak > best_streak) best_streak = streak;
      end else streak = 0;
      if (out_q.size() > 0 && (drain_fast || $urandom_range(3) == 0)) begin
        lookup_result_t r;
        pkt_t p;
        r = out_q.pop_front();
        // expected result from the models
        p.tag = exp_tag;
        check(int'(r.tag) == exp_tag % 65536, $sformatf("order: tag %0d vs %0d", r.tag, exp_tag));
        exp_tag++;
      end
      out_count   <= 4'(out_q.size());
      in_empty    <= (in_q.size() == 0);
      in_tag      <= (in_q.size() == 0) ? '0 : TAG_W'(in_q[0].tag);
      in_dst_hit  <= (in_q.size() == 0) ? 1'b0 : in_q[0].dh;
      in_dst_addr <= (in_q.size() == 0) ? '0 : 3'(in_q[0].da);
      in_src_hit  <= (in_q.size() == 0) ? 1'b0 : in_q[0].sh;
      in_src_addr <= (in_q.size() == 0) ? '0 : 3'(in_q[0].sa);
    end
  end

  // reference results, indexed by tag
  lookup_result_t exp_res [NPKT];

  always @(posedge clk) begin
    if (rst_n && out_push) begin
      lookup_result_t e;
      e = exp_res[out_result.tag];
      check(out_result.dst_hit == e.dst_hit, "dst_hit");
      if (e.dst_hit) begin
        check(out_result.kind == e.kind, $sformatf("kind %0d vs %0d (tag %0d)",
                                                   out_result.kind, e.kind, out_result.tag));
        check(out_result.nh_idx == e.nh_idx, $sformatf("nexthop index %0d vs %0d (tag %0d)",
                                                       out_result.nh_idx, e.nh_idx, out_result.tag));
        check(out_result.nh_info == m_map[e.nh_idx], "nexthop information");
        n_kind[e.kind]++;
      end
    end
  end

  initial begin
    upd_valid = 0; upd = '0; out_count = '0;
    show_head_now();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // mapping table: nexthop information 1.0.0.(i)
    for (int i = 0; i < 256; i++) begin
      m_map[i] = 32'h0100_0000 | 32'(i);
      write_upd(UPD_MAPPING, i, 0, 64'(m_map[i]));
    end
    for (int a = 0; a < DST_DEPTH; a++) begin
      m_dst[a].row       = 32'($urandom_range(TD_ROWS - 1));
      m_dst[a].indicator = (a % 3 != 0);
      m_dst[a].dflt      = nh_idx_t'($urandom);
      write_upd(UPD_DST_INDEX, a, 0, 64'(m_dst[a]));
    end
    for (int a = 0; a < SRC_DEPTH; a++) begin
      m_src[a].col = 32'($urandom_range(TD_COLS - 1));
      write_upd(UPD_SRC_INDEX, a, 0, 64'(m_src[a]));
    end
    for (int r = 0; r < TD_ROWS; r++)
      for (int c = 0; c < TD_COLS; c++) begin
        m_td[r][c] = ($urandom_range(3) == 0) ? EMPTY_CELL : nh_idx_t'($urandom_range(255, 1));
        write_upd(UPD_TD_CELL, r, c, 64'(m_td[r][c]));
      end
    // reference results
    for (int t = 0; t < NPKT; t++) begin
      pkt_t p;
      lookup_result_t e;
      p.tag = t; p.dh = ($urandom_range(15) != 0); p.da = $urandom_range(DST_DEPTH - 1);
      p.sh = ($urandom_range(5) != 0); p.sa = $urandom_range(SRC_DEPTH - 1);
      e = '0;
      e.tag = TAG_W'(t);
      e.dst_hit = p.dh;
      if (!m_dst[p.da].indicator) begin
        e.kind = RES_NO_ROW; e.nh_idx = m_dst[p.da].dflt;
      end else if (!p.sh) begin
        e.kind = RES_NO_SRC_MATCH; e.nh_idx = m_dst[p.da].dflt;
      end else if (m_td[m_dst[p.da].row][m_src[p.sa].col] == EMPTY_CELL) begin
        e.kind = RES_EMPTY_CELL; e.nh_idx = m_dst[p.da].dflt;
      end else begin
        e.kind = RES_CELL; e.nh_idx = m_td[m_dst[p.da].row][m_src[p.sa].col];
      end
      exp_res[t] = e;
      // first third: output drained slowly (back-pressure); then fast
      if (t == NPKT / 3) begin
        wait (in_q.size() == 0);
        drain_fast = 1;
      end
      @(negedge clk);
      in_q.push_back(p);
      show_head_now();
    end
    wait (exp_tag == NPKT);
    repeat (5) @(negedge clk);
    check(best_streak >= 20, $sformatf("one packet per cycle: longest run %0d", best_streak));
    for (int k = 0; k < 4; k++) check(n_kind[k] > 0, $sformatf("resolution kind %0d seen", k));
    $display("kinds: cell=%0d no_row=%0d no_src=%0d empty=%0d", n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
