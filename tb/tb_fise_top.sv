// tb_fise_top: end-to-end test of the FISE forwarding table.
//
// Two copies of the design run side by side on the same traffic: one with
// the plain TD-table, one with the deduplicated catalog + dictionary table.
// The TCAM clock (10 ns) and the SRAM clock (8 ns) differ.
//
// The testbench acts as the control plane. From a list of two-dimensional
// rules (destination prefix, source prefix, nexthop) it builds the tables the
// way the design prescribes: destination and source prefixes in TCAM, longest
// first; the rule with the full-wildcard source kept out of the source table
// and stored as the destination's default nexthop index; an indicator bit
// only for destinations with source-specific rules, each of which gets a
// TD-table row; each TD-cell filled with the nexthop of the longest source
// prefix of that destination's rules that covers the column's prefix, or left
// empty; the TD-table cut into 4-cell sub-rows and deduplicated for the second
// copy. The rule set is the 20-rule example with 4-bit addresses (placed in
// the top four bits of 8-bit keys, the low bits random).
//
// The expected nexthop of every packet is computed straight from the rule
// list by the matching rule (longest destination prefix first, then the
// longest source prefix among that destination's rules), independently of the
// tables. Phases: (1) every destination x source pair; (2) traffic with TCAM
// entry rewrites (lookups must pause), unchanged TD-cell rewrites (read-
// during-write collisions) and long output back-pressure; (3) rule changes
// written to the SRAMs while traffic flows (either answer accepted while the
// update is in progress, the new one afterwards). It counts each mechanism
// and fails if one never happened.
module tb_fise_top;
  import fise_pkg::*;
  localparam int KEY_W = 8, DEPTH = 16, TD_ROWS = 16, TD_COLS = 16, BW = 4, DICT_ROWS = 64;
  localparam int FIFO_DEPTH = 8, OUT_DEPTH = 8;
  localparam int NRULES = 20;

  logic clk_tcam = 0, clk_sram = 0, rst_tcam_n = 0, rst_sram_n = 0;
  always #5 clk_tcam = ~clk_tcam;
  always #4 clk_sram = ~clk_sram;

  // shared request and TCAM-update signals
  logic             drv_valid;
  logic [KEY_W-1:0] in_dst_addr, in_src_addr;
  logic [TAG_W-1:0] in_tag;
  logic             tcam_upd_valid, tcam_upd_entry_valid;
  tcam_sel_e        tcam_upd_sel;
  logic [31:0]      tcam_upd_addr;
  logic [KEY_W-1:0] tcam_upd_value, tcam_upd_mask;
  // per-copy signals (index 0 = plain, 1 = deduplicated)
  logic             rdy [2];
  logic             upd_v [2];
  sram_upd_t        upd [2];
  logic             out_valid [2], out_ready [2], coll [2];
  lookup_result_t   out_result [2];
  logic             in_valid;

  assign in_valid = drv_valid && rdy[0] && rdy[1];

  fise_top #(
    .KEY_W(KEY_W), .DST_DEPTH(DEPTH), .SRC_DEPTH(DEPTH), .TD_ROWS(TD_ROWS), .TD_COLS(TD_COLS),
    .DEDUP(1'b0), .MAP_DEPTH(256), .FIFO_DEPTH(FIFO_DEPTH), .OUT_DEPTH(OUT_DEPTH)
  ) u_plain (
    .clk_tcam, .rst_tcam_n, .clk_sram, .rst_sram_n,
    .in_valid, .in_ready(rdy[0]), .in_dst_addr, .in_src_addr, .in_tag,
    .tcam_upd_valid, .tcam_upd_sel, .tcam_upd_addr, .tcam_upd_value, .tcam_upd_mask,
    .tcam_upd_entry_valid,
    .sram_upd_valid(upd_v[0]), .sram_upd(upd[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_result(out_result[0]),
    .sram_collision(coll[0])
  );

  fise_top #(
    .KEY_W(KEY_W), .DST_DEPTH(DEPTH), .SRC_DEPTH(DEPTH), .TD_ROWS(TD_ROWS), .TD_COLS(TD_COLS),
    .DEDUP(1'b1), .BLOCK_W(BW), .DICT_ROWS(DICT_ROWS), .MAP_DEPTH(256),
    .FIFO_DEPTH(FIFO_DEPTH), .OUT_DEPTH(OUT_DEPTH)
  ) u_dedup (
    .clk_tcam, .rst_tcam_n, .clk_sram, .rst_sram_n,
    .in_valid, .in_ready(rdy[1]), .in_dst_addr, .in_src_addr, .in_tag,
    .tcam_upd_valid, .tcam_upd_sel, .tcam_upd_addr, .tcam_upd_value, .tcam_upd_mask,
    .tcam_upd_entry_valid,
    .sram_upd_valid(upd_v[1]), .sram_upd(upd[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_result(out_result[1]),
    .sram_collision(coll[1])
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------------------
  // Rules: destination prefix, source prefix (4-bit value, length), nexthop
  // 1.0.0.<act>.
  // ------------------------------------------------------------------------
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
    int sh;
    sh = 4 - pl;
    return (pl == 0) || ((pv >> sh) == (addr4 >> sh));
  endfunction

  // prefix (pv,pl) is a prefix of (qv,ql)
  function automatic bit is_prefix_of(input int pv, input int pl, input int qv, input int ql);
    return (pl <= ql) && covers(pv, pl, qv);
  endfunction

  // Matching rule: longest destination prefix, then the longest source
  // prefix among that destination's rules. Returns the nexthop octet.
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

  // ------------------------------------------------------------------------
  // Control-plane table construction
  // ------------------------------------------------------------------------
  int         nd, ns;
  int         d_v [DEPTH], d_l [DEPTH], s_v [DEPTH], s_l [DEPTH];
  dst_index_t t_dst [DEPTH];
  nh_idx_t    t_td [TD_ROWS][TD_COLS];
  int         t_cat [TD_ROWS][TD_COLS/BW];
  nh_idx_t    t_dict [DICT_ROWS][BW];
  int         ndict;
  int         dict_base = 0;   // first dictionary row used by the current tables

  task automatic build_tables();
    int nrow;
    nd = 0; ns = 0;
    // unique prefixes, sorted by length, longest first
    for (int len = 4; len >= 0; len--) begin
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
    end
    for (int r = 0; r < TD_ROWS; r++) for (int c = 0; c < TD_COLS; c++) t_td[r][c] = EMPTY_CELL;
    nrow = 0;
    for (int k = 0; k < nd; k++) begin
      t_dst[k] = '0;
      for (int i = 0; i < NRULES; i++)
        if (r_dv[i] == d_v[k] && r_dl[i] == d_l[k]) begin
          if (r_sl[i] == 0) t_dst[k].dflt = nh_idx_t'(r_act[i] + 1);
          else t_dst[k].indicator = 1'b1;
        end
      if (t_dst[k].indicator) begin
        t_dst[k].row = 32'(nrow);
        for (int c = 0; c < ns; c++) begin
          int bl;
          bl = 0;
          for (int i = 0; i < NRULES; i++)
            if (r_dv[i] == d_v[k] && r_dl[i] == d_l[k] && r_sl[i] > bl &&
                is_prefix_of(r_sv[i], r_sl[i], s_v[c], s_l[c])) begin
              bl = r_sl[i];
              t_td[nrow][c] = nh_idx_t'(r_act[i] + 1);
            end
        end
        nrow++;
      end
    end
    // fixed block deduplication for the second copy
    ndict = 0;
    for (int r = 0; r < TD_ROWS; r++)
      for (int k = 0; k < TD_COLS / BW; k++) begin
        int found;
        found = -1;
        for (int d = 0; d < ndict; d++) begin
          bit same;
          same = 1;
          for (int o = 0; o < BW; o++) if (t_dict[d][o] != t_td[r][k*BW+o]) same = 0;
          if (same && found < 0) found = d;
        end
        if (found < 0) begin
          for (int o = 0; o < BW; o++) t_dict[ndict][o] = t_td[r][k*BW+o];
          found = ndict;
          ndict++;
        end
        t_cat[r][k] = found + dict_base;
      end
  endtask

  // ------------------------------------------------------------------------
  // Update ports
  // ------------------------------------------------------------------------
  task automatic tcam_write(input tcam_sel_e sel, input int a, input int v, input int l);
    @(negedge clk_tcam);
    tcam_upd_valid = 1; tcam_upd_sel = sel; tcam_upd_addr = 32'(a);
    tcam_upd_value = KEY_W'(v << (KEY_W - 4));
    tcam_upd_mask  = (l == 0) ? '0 : ~(KEY_W'({KEY_W{1'b1}}) >> l);
    tcam_upd_entry_valid = 1;
    @(negedge clk_tcam);
    tcam_upd_valid = 0;
  endtask

  // one SRAM word to one copy (k) or both (k = 2)
  task automatic sram_write(input int k, input upd_target_e t, input int a0, input int a1,
                            input logic [63:0] d);
    @(negedge clk_sram);
    for (int j = 0; j < 2; j++) begin
      upd_v[j] = (k == 2 || k == j);
      upd[j].target = t; upd[j].addr0 = 32'(a0); upd[j].addr1 = 32'(a1); upd[j].data = d;
    end
    @(negedge clk_sram);
    upd_v[0] = 0; upd_v[1] = 0;
  endtask

  // Write the SRAM words of the tables (all of them, or only those that
  // differ from the previous tables).
  dst_index_t o_dst [DEPTH];
  nh_idx_t    o_td [TD_ROWS][TD_COLS];
  int         o_cat [TD_ROWS][TD_COLS/BW];
  int         n_sram_writes = 0;

  task automatic write_sram_tables(input bit only_diff);
    for (int k = 0; k < nd; k++)
      if (!only_diff || t_dst[k] != o_dst[k]) begin
        sram_write(2, UPD_DST_INDEX, k, 0, 64'(t_dst[k])); n_sram_writes++;
      end
    if (!only_diff)
      for (int c = 0; c < ns; c++) sram_write(2, UPD_SRC_INDEX, c, 0, 64'(c));
    for (int r = 0; r < TD_ROWS; r++)
      for (int c = 0; c < TD_COLS; c++)
        if (!only_diff || t_td[r][c] != o_td[r][c]) begin
          sram_write(0, UPD_TD_CELL, r, c, 64'(t_td[r][c])); n_sram_writes++;
        end
    // New sub-rows go to fresh dictionary rows before any catalog cell
    // points at them, so a lookup always sees a complete old or new sub-row.
    for (int d = 0; d < ndict; d++)
      for (int o = 0; o < BW; o++) begin
        sram_write(1, UPD_TD_CELL, d + dict_base, o, 64'(t_dict[d][o])); n_sram_writes++;
      end
    for (int r = 0; r < TD_ROWS; r++)
      for (int k = 0; k < TD_COLS / BW; k++)
        if (!only_diff || t_cat[r][k] != o_cat[r][k]) begin
          sram_write(1, UPD_CATALOG, r, k, 64'(t_cat[r][k])); n_sram_writes++;
        end
    o_dst = t_dst; o_td = t_td; o_cat = t_cat;
  endtask

  // ------------------------------------------------------------------------
  // Traffic and checking
  // ------------------------------------------------------------------------
  typedef struct { int tag; int exp_new; int exp_old; bit either; } exp_t;
  exp_t exp_q [2][$];
  int   next_tag = 0;
  int   old_ref [16][16];
  bit   in_transition = 0;
  int   n_kind [2][4];
  int   n_tcam_stall = 0, n_fifo_stall = 0, n_out_block = 0, n_coll = 0, n_upd_in_flight = 0;
  int   n_results [2];
  bit   slow_drain = 0;

  // accept a request at the TCAM clock edge
  always @(posedge clk_tcam) begin
    if (rst_tcam_n) begin
      if (drv_valid && tcam_upd_valid) n_tcam_stall++;
      if (drv_valid && !tcam_upd_valid && !(rdy[0] && rdy[1])) n_fifo_stall++;
      if (in_valid) begin
        exp_t e;
        int d4, s4;
        d4 = int'(in_dst_addr) >> (KEY_W - 4);
        s4 = int'(in_src_addr) >> (KEY_W - 4);
        e.tag = int'(in_tag);
        e.exp_new = reference(d4, s4);
        e.exp_old = old_ref[d4][s4];
        e.either  = in_transition;
        exp_q[0].push_back(e);
        exp_q[1].push_back(e);
      end
    end
  end

  // results at the SRAM clock edge
  always @(posedge clk_sram) begin
    if (rst_sram_n) begin
      if (u_plain.fifo_rempty == 1'b0 && u_plain.fifo_pop == 1'b0) n_out_block++;
      if (coll[0]) n_coll++;
      if (upd_v[0] && u_plain.u_pipe.in_flight > 0) n_upd_in_flight++;
      for (int j = 0; j < 2; j++) begin
        if (out_valid[j] && out_ready[j]) begin
          exp_t e;
          int got;
          n_results[j]++;
          if (exp_q[j].size() == 0) check(0, "result without request");
          else begin
            e = exp_q[j].pop_front();
            got = int'(out_result[j].nh_info - 32'h0100_0000);
            check(int'(out_result[j].tag) == e.tag, $sformatf("copy %0d order", j));
            check(out_result[j].dst_hit, "destination matched");
            check(out_result[j].nh_idx == nh_idx_t'(got + 1), "index and information agree");
            if (e.either)
              check(got == e.exp_new || got == e.exp_old,
                    $sformatf("copy %0d tag %0d: nexthop %0d, expected %0d or %0d",
                              j, e.tag, got, e.exp_new, e.exp_old));
            else
              check(got == e.exp_new, $sformatf("copy %0d tag %0d: nexthop %0d, expected %0d",
                                                j, e.tag, got, e.exp_new));
            n_kind[j][out_result[j].kind]++;
          end
        end
      end
    end
  end

  // random output readiness
  always @(negedge clk_sram) begin
    out_ready[0] = slow_drain ? ($urandom_range(9) == 0) : ($urandom_range(3) != 0);
    out_ready[1] = slow_drain ? ($urandom_range(9) == 0) : ($urandom_range(3) != 0);
  end

  task automatic send(input int d4, input int s4);
    @(negedge clk_tcam);
    drv_valid   = 1;
    in_dst_addr = KEY_W'((d4 << (KEY_W - 4)) | $urandom_range(15));
    in_src_addr = KEY_W'((s4 << (KEY_W - 4)) | $urandom_range(15));
    in_tag      = TAG_W'(next_tag);
    @(posedge clk_tcam);
    while (!in_valid) @(posedge clk_tcam);
    next_tag++;
    #1 drv_valid = 0;
  endtask

  task automatic wait_drained();
    while (exp_q[0].size() != 0 || exp_q[1].size() != 0) @(posedge clk_sram);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mid-traffic activity for phase 2
  bit phase2 = 0;
  initial begin
    wait (phase2);
    while (phase2) begin
      // unchanged TCAM rewrite: lookups pause for that cycle
      repeat (7) @(negedge clk_tcam);
      tcam_upd_valid = 1; tcam_upd_sel = TCAM_SRC; tcam_upd_addr = 0;
      tcam_upd_value = KEY_W'(s_v[0] << (KEY_W - 4));
      tcam_upd_mask  = ~(KEY_W'({KEY_W{1'b1}}) >> s_l[0]);
      tcam_upd_entry_valid = 1;
      @(negedge clk_tcam);
      tcam_upd_valid = 0;
    end
  end

  initial begin
    drv_valid = 0; in_dst_addr = 0; in_src_addr = 0; in_tag = 0;
    tcam_upd_valid = 0; tcam_upd_sel = TCAM_DST; tcam_upd_addr = 0;
    tcam_upd_value = 0; tcam_upd_mask = 0; tcam_upd_entry_valid = 0;
    for (int j = 0; j < 2; j++) begin upd_v[j] = 0; upd[j] = '0; out_ready[j] = 0; end
    repeat (3) @(negedge clk_tcam);
    rst_tcam_n = 1; rst_sram_n = 1;

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

    build_tables();
    check(nd == 6 && ns == 5, $sformatf("6 destination and 5 source prefixes (%0d, %0d)", nd, ns));
    for (int k = 0; k < nd; k++) tcam_write(TCAM_DST, k, d_v[k], d_l[k]);
    for (int c = 0; c < ns; c++) tcam_write(TCAM_SRC, c, s_v[c], s_l[c]);
    for (int i = 0; i < 4; i++) sram_write(2, UPD_MAPPING, i + 1, 0, 64'(32'h0100_0000 + i));
    write_sram_tables(1'b0);

    // Phase 1: every destination x source pair
    for (int d = 0; d < 16; d++) for (int s = 0; s < 16; s++) send(d, s);
    wait_drained();

    // Phase 2: TCAM rewrites, TD-cell rewrites and output back-pressure
    phase2 = 1;
    fork
      begin
        for (int n = 0; n < 400; n++) begin
          slow_drain = (n >= 100 && n < 200);
          send($urandom_range(15), $urandom_range(15));
        end
      end
      begin
        // unchanged rewrites of TD-cells and mapping entries while lookups read them
        repeat (3) begin
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < ns; c++) sram_write(0, UPD_TD_CELL, r, c, 64'(t_td[r][c]));
        end
        repeat (60)
          for (int i = 0; i < 4; i++) sram_write(2, UPD_MAPPING, i + 1, 0, 64'(32'h0100_0000 + i));
      end
    join
    phase2 = 0;
    slow_drain = 0;
    wait_drained();

    // Phase 3: rule changes written while traffic flows
    for (int d = 0; d < 16; d++) for (int s = 0; s < 16; s++) old_ref[d][s] = reference(d, s);
    r_act[13] = 3;   // (101*, 11**) -> 1.0.0.3
    r_act[4]  = 1;   // (011*, ****) -> 1.0.0.1
    r_act[8]  = 0;   // (110*, 100*) -> 1.0.0.0
    r_act[0]  = 3;   // (****, ****) -> 1.0.0.3
    dict_base = ndict;
    build_tables();
    in_transition = 1;
    fork
      begin
        for (int n = 0; n < 300; n++) send($urandom_range(15), $urandom_range(15));
      end
      begin
        repeat (20) @(negedge clk_sram);
        write_sram_tables(1'b1);
      end
    join
    // let every in-flight lookup finish before exact checking resumes
    wait_drained();
    in_transition = 0;
    for (int d = 0; d < 16; d++) for (int s = 0; s < 16; s++) send(d, s);
    wait_drained();

    $display("copy 0 kinds: cell=%0d no_row=%0d no_src=%0d empty=%0d",
             n_kind[0][0], n_kind[0][1], n_kind[0][2], n_kind[0][3]);
    $display("copy 1 kinds: cell=%0d no_row=%0d no_src=%0d empty=%0d",
             n_kind[1][0], n_kind[1][1], n_kind[1][2], n_kind[1][3]);
    $display("tcam_stall=%0d fifo_stall=%0d out_block=%0d collisions=%0d updates_in_flight=%0d dict_rows=%0d",
             n_tcam_stall, n_fifo_stall, n_out_block, n_coll, n_upd_in_flight, ndict);
    for (int j = 0; j < 2; j++) for (int k = 0; k < 4; k++)
      check(n_kind[j][k] > 0, $sformatf("copy %0d resolution kind %0d happened", j, k));
    check(n_tcam_stall > 0, "lookup paused by a TCAM update");
    check(n_fifo_stall > 0, "requests held back by a full FIFO");
    check(n_out_block > 0, "SRAM pipeline held back by the output FIFO");
    check(n_coll > 0, "read-during-write collision");
    check(n_upd_in_flight > 0, "SRAM update while lookups in flight");
    check(ndict < TD_ROWS * TD_COLS / BW, "deduplication merged sub-rows");
    check(n_results[0] == next_tag && n_results[1] == next_tag, "every request answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
