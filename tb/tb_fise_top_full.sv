// tb_fise_top_full: one complete lookup operation on the forwarding table at
// its default size (128-bit keys, 1024-entry destination and source tables,
// 1024 x 1024 TD-table, 256-entry mapping table), with no parameter changed.
//
// The 20-rule two-dimensional example (4-bit prefixes, placed in the top
// four bits of the 128-bit addresses, the rest random) is loaded as the
// control plane would: prefixes longest first in the two TCAM tables, the
// full-wildcard source rules kept as each destination's default nexthop
// index, TD-cells saturated from the longest covering source prefix, the
// others left empty. Every destination x source pair is then looked up and
// the nexthop compared with the matching rule evaluated directly on the rule
// list. It also checks the lookup latency with both clocks equal: one TCAM
// cycle, the FIFO crossing and three SRAM cycles, and one result per cycle
// when requests are sent back to back.
module tb_fise_top_full;
  import fise_pkg::*;
  localparam int KEY_W = 128;
  localparam int NRULES = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid, in_ready, out_valid, out_ready, coll;
  logic [KEY_W-1:0] in_dst_addr, in_src_addr;
  logic [TAG_W-1:0] in_tag;
  logic             tcam_upd_valid, tcam_upd_entry_valid, sram_upd_valid;
  tcam_sel_e        tcam_upd_sel;
  logic [31:0]      tcam_upd_addr;
  logic [KEY_W-1:0] tcam_upd_value, tcam_upd_mask;
  sram_upd_t        sram_upd;
  lookup_result_t   out_result;

  fise_top dut (
    .clk_tcam(clk), .rst_tcam_n(rst_n), .clk_sram(clk), .rst_sram_n(rst_n),
    .in_valid, .in_ready, .in_dst_addr, .in_src_addr, .in_tag,
    .tcam_upd_valid, .tcam_upd_sel, .tcam_upd_addr, .tcam_upd_value, .tcam_upd_mask,
    .tcam_upd_entry_valid, .sram_upd_valid, .sram_upd,
    .out_valid, .out_ready, .out_result, .sram_collision(coll)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int r_dv [NRULES], r_dl [NRULES], r_sv [NRULES], r_sl [NRULES], r_act [NRULES];

  task automatic set_rule(input int i, input string d, input string s, input int act);
    int v, l;
    v = 0; l = 0;
    for (int k = 0; k < 4; k++) begin
      v = v << 1;
      if (d[k] != "*") begin v |= (d[k] == "1"); l++; end
    end
    r_dv[i] = v; r_dl[i] = l;
    v = 0; l = 0;
    for (int k = 0; k < 4; k++) begin
      v = v << 1;
      if (s[k] != "*") begin v |= (s[k] == "1"); l++; end
    end
    r_sv[i] = v; r_sl[i] = l; r_act[i] = act;
  endtask

  function automatic bit covers(input int pv, input int pl, input int addr4);
    return (pl == 0) || ((pv >> (4 - pl)) == (addr4 >> (4 - pl)));
  endfunction

  function automatic int reference(input int d4, input int s4);
    int bd, bdl, bs, bsl;
    bdl = -1; bd = -1;
    for (int i = 0; i < NRULES; i++)
      if (covers(r_dv[i], r_dl[i], d4) && r_dl[i] > bdl) begin bdl = r_dl[i]; bd = r_dv[i]; end
    bsl = -1; bs = -1;
    for (int i = 0; i < NRULES; i++)
      if (r_dl[i] == bdl && r_dv[i] == bd && covers(r_sv[i], r_sl[i], s4) && r_sl[i] > bsl) begin
        bsl = r_sl[i]; bs = r_act[i];
      end
    return bs;
  endfunction

  function automatic logic [KEY_W-1:0] key_of(input int v4);
    logic [KEY_W-1:0] k;
    k = {$urandom, $urandom, $urandom, $urandom};
    k[KEY_W-1 -: 4] = 4'(v4);
    return k;
  endfunction

  task automatic tcam_write(input tcam_sel_e sel, input int a, input int v, input int l);
    @(negedge clk);
    tcam_upd_valid = 1; tcam_upd_sel = sel; tcam_upd_addr = 32'(a);
    tcam_upd_value = '0;
    tcam_upd_value[KEY_W-1 -: 4] = 4'(v);
    tcam_upd_mask  = (l == 0) ? '0 : ~({KEY_W{1'b1}} >> l);
    tcam_upd_entry_valid = 1;
    @(negedge clk);
    tcam_upd_valid = 0;
  endtask

  task automatic sram_write(input upd_target_e t, input int a0, input int a1, input logic [63:0] d);
    @(negedge clk);
    sram_upd_valid = 1; sram_upd.target = t; sram_upd.addr0 = 32'(a0); sram_upd.addr1 = 32'(a1);
    sram_upd.data = d;
    @(negedge clk);
    sram_upd_valid = 0;
  endtask

  int exp_q[$];
  int tag_q[$];
  int sent_cycle[$];
  int cycle = 0;
  int n_res = 0, streak = 0, best_streak = 0, lat_min = 1000, lat_max = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid && in_ready) sent_cycle.push_back(cycle);
    if (rst_n && out_valid && out_ready) begin
      int e, t, got, lat;
      e = exp_q.pop_front();
      t = tag_q.pop_front();
      lat = cycle - sent_cycle.pop_front();
      if (lat < lat_min) lat_min = lat;
      if (lat > lat_max) lat_max = lat;
      got = int'(out_result.nh_info - 32'h0100_0000);
      check(int'(out_result.tag) == t, "order");
      check(out_result.dst_hit && got == e,
            $sformatf("tag %0d: nexthop %0d, expected %0d", t, got, e));
      n_res++;
      streak++;
      if (streak > best_streak) best_streak = streak;
    end else streak = 0;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d_v [8], d_l [8], s_v [8], s_l [8];
    int nd, ns, nrow;
    in_valid = 0; in_dst_addr = 0; in_src_addr = 0; in_tag = 0; out_ready = 1;
    tcam_upd_valid = 0; tcam_upd_sel = TCAM_DST; tcam_upd_addr = 0; tcam_upd_value = 0;
    tcam_upd_mask = 0; tcam_upd_entry_valid = 0; sram_upd_valid = 0; sram_upd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    set_rule(0,  "****", "****", 1); set_rule(1,  "****", "101*", 0);
    set_rule(2,  "****", "11**", 2); set_rule(3,  "****", "01**", 0);
    set_rule(4,  "011*", "****", 2); set_rule(5,  "110*", "****", 1);
    set_rule(6,  "110*", "111*", 2); set_rule(7,  "110*", "101*", 0);
    set_rule(8,  "110*", "100*", 2); set_rule(9,  "110*", "11**", 3);
    set_rule(10, "110*", "01**", 2); set_rule(11, "101*", "****", 1);
    set_rule(12, "101*", "101*", 0); set_rule(13, "101*", "11**", 2);
    set_rule(14, "101*", "01**", 0); set_rule(15, "11**", "****", 2);
    set_rule(16, "11**", "11**", 3); set_rule(17, "10**", "****", 2);
    set_rule(18, "10**", "100*", 2); set_rule(19, "10**", "11**", 3);

    // prefixes, longest first
    nd = 0; ns = 0;
    for (int len = 4; len >= 0; len--)
      for (int i = 0; i < NRULES; i++) begin
        bit seen;
        if (r_dl[i] == len) begin
          seen = 0;
          for (int k = 0; k < nd; k++) if (d_v[k] == r_dv[i] && d_l[k] == len) seen = 1;
          if (!seen) begin d_v[nd] = r_dv[i]; d_l[nd] = len; nd++; end
        end
        if (r_sl[i] == len && len > 0) begin
          seen = 0;
          for (int k = 0; k < ns; k++) if (s_v[k] == r_sv[i] && s_l[k] == len) seen = 1;
          if (!seen) begin s_v[ns] = r_sv[i]; s_l[ns] = len; ns++; end
        end
      end
    for (int k = 0; k < nd; k++) tcam_write(TCAM_DST, k, d_v[k], d_l[k]);
    for (int c = 0; c < ns; c++) tcam_write(TCAM_SRC, c, s_v[c], s_l[c]);
    for (int i = 0; i < 4; i++) sram_write(UPD_MAPPING, i + 1, 0, 64'(32'h0100_0000 + i));
    for (int c = 0; c < ns; c++) sram_write(UPD_SRC_INDEX, c, 0, 64'(c));
    // destination indexes and TD rows (spread over the table: row 200 * n + 7)
    nrow = 0;
    for (int k = 0; k < nd; k++) begin
      dst_index_t di;
      di = '0;
      for (int i = 0; i < NRULES; i++)
        if (r_dv[i] == d_v[k] && r_dl[i] == d_l[k]) begin
          if (r_sl[i] == 0) di.dflt = nh_idx_t'(r_act[i] + 1);
          else di.indicator = 1'b1;
        end
      if (di.indicator) begin
        di.row = 32'(200 * nrow + 7);
        for (int c = 0; c < ns; c++) begin
          int bl;
          nh_idx_t v;
          bl = 0; v = EMPTY_CELL;
          for (int i = 0; i < NRULES; i++)
            if (r_dv[i] == d_v[k] && r_dl[i] == d_l[k] && r_sl[i] > bl && r_sl[i] <= s_l[c] &&
                covers(r_sv[i], r_sl[i], s_v[c])) begin
              bl = r_sl[i]; v = nh_idx_t'(r_act[i] + 1);
            end
          sram_write(UPD_TD_CELL, int'(di.row), c, 64'(v));
        end
        nrow++;
      end
      sram_write(UPD_DST_INDEX, k, 0, 64'(di));
    end

    // a single lookup: latency
    @(negedge clk);
    in_valid = 1; in_dst_addr = key_of(4'b1011); in_src_addr = key_of(4'b1111); in_tag = 0;
    exp_q.push_back(reference(4'b1011, 4'b1111)); tag_q.push_back(0);
    @(negedge clk);
    in_valid = 0;
    wait (n_res == 1);
    check(lat_min == lat_max && lat_min >= 6 && lat_min <= 8,
          $sformatf("single lookup latency %0d cycles", lat_min));
    // every pair, back to back
    for (int d = 0; d < 16; d++)
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        in_valid = 1; in_dst_addr = key_of(d); in_src_addr = key_of(s);
        in_tag = TAG_W'(1 + d * 16 + s);
        exp_q.push_back(reference(d, s)); tag_q.push_back(1 + d * 16 + s);
        @(posedge clk);
        check(in_ready, "request accepted every cycle");
      end
    @(negedge clk);
    in_valid = 0;
    wait (n_res == 257);
    repeat (3) @(negedge clk);
    check(best_streak >= 250, $sformatf("one result per cycle: longest run %0d", best_streak));
    $display("latency %0d..%0d cycles, longest back-to-back run %0d", lat_min, lat_max, best_streak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
