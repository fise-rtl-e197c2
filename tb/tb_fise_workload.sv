// tb_fise_workload: the forwarding table under a synthetic enterprise policy
// workload, at the design's default table sizes.
//
// The workload follows the way such policy tables arise: a set of
// destination networks (ASes) and a set of source networks, each owning a few
// IPv4 prefixes (8 to 24 bits, a quarter of them nested inside another
// prefix). A fraction of the destination x source network pairs, the fill
// ratio, gets a policy: a random nexthop between 1 and 255 for every source
// prefix of the source network towards every destination prefix of the
// destination network. Every destination prefix also has a default nexthop,
// and a default route (*) catches the rest. The IPv4 addresses sit in the top
// 32 bits of the 128-bit keys.
//
// The testbench is the control plane. It loads the tables as the design
// prescribes (prefixes longest first, default nexthop and indicator bit in
// the destination index, saturated TD-rows) into two copies: the default
// configuration, and the same sizes with the deduplicated catalog +
// dictionary TD-table (32-cell sub-rows). For each fill ratio (3 % and 10 %)
// it then:
//   1. sends 8,000 lookups back to back and checks every nexthop against the
//      matching rule evaluated straight from the policy list;
//   2. applies policy changes at 50,000 updates per second, one every 2,000
//      SRAM cycles at an assumed 100 MHz, while lookups keep flowing. Only
//      the TD-cells whose saturated value changes are rewritten. For the
//      deduplicated copy, new sub-rows go to unused dictionary rows before
//      the catalog is switched. Lookups issued during an update may see the
//      old or the new nexthop; all others must see the current one;
//   3. checks that the SRAM updates never held up a lookup, that each update
//      fits its 2,000-cycle budget, that every resolution case occurred, and
//      reports the deduplication ratio (TD-table bits before and after).
module tb_fise_workload;
  import fise_pkg::*;
  localparam int KEY_W = 128, ROWS = 1024, COLS = 1024, BW = 32, DICT_ROWS = 4096;
  localparam int KD = 40, KS = 40;          // destination and source networks
  localparam int MAXP = 8;                  // prefixes per network, at most
  localparam int NLOOK = 8000, NUPD = 24, UPD_GAP = 2000;

  logic clk_tcam = 0, clk_sram = 0, rst_tcam_n = 0, rst_sram_n = 0;
  always #5 clk_tcam = ~clk_tcam;
  always #4 clk_sram = ~clk_sram;

  logic             drv_valid, in_valid;
  logic [KEY_W-1:0] in_dst_addr, in_src_addr;
  logic [TAG_W-1:0] in_tag;
  logic             tcam_upd_valid, tcam_upd_entry_valid;
  tcam_sel_e        tcam_upd_sel;
  logic [31:0]      tcam_upd_addr;
  logic [KEY_W-1:0] tcam_upd_value, tcam_upd_mask;
  logic             rdy [2];
  logic             upd_v [2];
  sram_upd_t        upd [2];
  logic             out_valid [2], coll [2];
  lookup_result_t   out_result [2];

  assign in_valid = drv_valid && rdy[0] && rdy[1];

  fise_top u_plain (
    .clk_tcam, .rst_tcam_n, .clk_sram, .rst_sram_n,
    .in_valid, .in_ready(rdy[0]), .in_dst_addr, .in_src_addr, .in_tag,
    .tcam_upd_valid, .tcam_upd_sel, .tcam_upd_addr, .tcam_upd_value, .tcam_upd_mask,
    .tcam_upd_entry_valid,
    .sram_upd_valid(upd_v[0]), .sram_upd(upd[0]),
    .out_valid(out_valid[0]), .out_ready(1'b1), .out_result(out_result[0]),
    .sram_collision(coll[0])
  );

  fise_top #(.DEDUP(1'b1), .BLOCK_W(BW), .DICT_ROWS(DICT_ROWS)) u_dedup (
    .clk_tcam, .rst_tcam_n, .clk_sram, .rst_sram_n,
    .in_valid, .in_ready(rdy[1]), .in_dst_addr, .in_src_addr, .in_tag,
    .tcam_upd_valid, .tcam_upd_sel, .tcam_upd_addr, .tcam_upd_value, .tcam_upd_mask,
    .tcam_upd_entry_valid,
    .sram_upd_valid(upd_v[1]), .sram_upd(upd[1]),
    .out_valid(out_valid[1]), .out_ready(1'b1), .out_result(out_result[1]),
    .sram_collision(coll[1])
  );

  int checks = 0, failures = 0;
  int sram_cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] pmask(input int len);
    return (len == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> len);
  endfunction

  function automatic bit covers(input logic [31:0] pv, input int pl, input logic [31:0] a);
    return ((pv ^ a) & pmask(pl)) == 32'h0;
  endfunction

  // ------------------------------------------------------------------------
  // Prefixes (sorted longest first, index = TCAM address) and policies
  // ------------------------------------------------------------------------
  int          nd, ns;
  logic [31:0] d_v [ROWS], s_v [COLS];
  int          d_l [ROWS], s_l [COLS];
  int          d_as [ROWS], s_as [COLS];   // owning network, -1 for the default route
  int          d_dflt [ROWS];
  int          pair_nh [KD][KS];           // 0 = no policy for this pair
  int          n_pairs_of [KD];
  int          cov [COLS][$];              // source prefixes covering column c, longest first

  // generate one side's prefixes: unsorted value, length and network
  task automatic gen_side(input int k_nets, output logic [31:0] v [$], output int l [$],
                          output int as_of [$]);
    v = {}; l = {}; as_of = {};
    for (int a = 0; a < k_nets; a++) begin
      int np;
      np = 2 + $urandom_range(MAXP - 2);
      for (int p = 0; p < np; p++) begin
        logic [31:0] nv;
        int          nl;
        bit          dup;
        do begin
          if (v.size() > 4 && $urandom_range(3) == 0) begin
            int j;
            j  = $urandom_range(v.size() - 1);
            nl = l[j] + 1 + $urandom_range(3);
            if (nl > 30) nl = 30;
            nv = (v[j] | ($urandom & ~pmask(l[j]))) & pmask(nl);
          end else begin
            nl = 8 + $urandom_range(16);
            nv = $urandom & pmask(nl);
          end
          dup = 0;
          foreach (v[j]) if (v[j] == nv && l[j] == nl) dup = 1;
        end while (dup);
        v.push_back(nv); l.push_back(nl); as_of.push_back(a);
      end
    end
  endtask

  task automatic gen_prefixes();
    logic [31:0] v [$];
    int          l [$], as_of [$];
    gen_side(KD, v, l, as_of);
    v.push_back(32'h0); l.push_back(0); as_of.push_back(-1);   // default route
    nd = 0;
    for (int len = 32; len >= 0; len--)
      foreach (v[j]) if (l[j] == len) begin
        d_v[nd] = v[j]; d_l[nd] = len; d_as[nd] = as_of[j]; d_dflt[nd] = 1 + $urandom_range(254);
        nd++;
      end
    gen_side(KS, v, l, as_of);
    ns = 0;
    for (int len = 32; len >= 0; len--)
      foreach (v[j]) if (l[j] == len) begin
        s_v[ns] = v[j]; s_l[ns] = len; s_as[ns] = as_of[j];
        ns++;
      end
    for (int c = 0; c < ns; c++) begin
      cov[c] = {};
      for (int q = 0; q < ns; q++)
        if (s_l[q] <= s_l[c] && covers(s_v[q], s_l[q], s_v[c])) cov[c].push_back(q);
    end
  endtask

  task automatic gen_policies(input int permille);
    for (int a = 0; a < KD; a++) begin
      n_pairs_of[a] = 0;
      for (int b = 0; b < KS; b++) begin
        pair_nh[a][b] = ($urandom_range(999) < permille) ? 1 + $urandom_range(254) : 0;
        if (pair_nh[a][b] != 0) n_pairs_of[a]++;
      end
    end
  endtask

  // Matching rule on the policy list: longest destination prefix, then the
  // longest source prefix among the rules of that destination prefix (its
  // network's policies), else its default nexthop.
  function automatic int reference(input logic [31:0] da, input logic [31:0] sa);
    int k, a, bl, nh;
    k = -1;
    for (int i = 0; i < nd && k < 0; i++) if (covers(d_v[i], d_l[i], da)) k = i;
    a = d_as[k];
    nh = d_dflt[k];
    bl = -1;
    if (a >= 0)
      for (int c = 0; c < ns; c++)
        if (pair_nh[a][s_as[c]] != 0 && s_l[c] > bl && covers(s_v[c], s_l[c], sa)) begin
          bl = s_l[c]; nh = pair_nh[a][s_as[c]];
        end
    return nh;
  endfunction

  // ------------------------------------------------------------------------
  // Table images
  // ------------------------------------------------------------------------
  nh_idx_t t_td [ROWS][COLS];
  int      t_cat [ROWS][COLS/BW];
  int      dict_id [string];
  int      ndict;
  int      nchunks;
  bit      dict_written [DICT_ROWS];

  // saturated TD-cell of destination prefix k, source column c
  function automatic nh_idx_t sat_cell(input int k, input int c);
    int a;
    a = d_as[k];
    foreach (cov[c][i]) if (pair_nh[a][s_as[cov[c][i]]] != 0)
      return nh_idx_t'(pair_nh[a][s_as[cov[c][i]]]);
    return EMPTY_CELL;
  endfunction

  function automatic bit has_row(input int k);
    return d_as[k] >= 0 && n_pairs_of[d_as[k]] > 0;
  endfunction

  function automatic string chunk_key(input int r, input int ck);
    string s;
    s = "";
    for (int o = 0; o < BW; o++) s = {s, $sformatf("%02x", t_td[r][ck*BW+o])};
    return s;
  endfunction

  // ------------------------------------------------------------------------
  // Update ports
  // ------------------------------------------------------------------------
  int n_writes [2];

  task automatic tcam_write(input tcam_sel_e sel, input int a, input logic [31:0] v, input int l);
    @(negedge clk_tcam);
    tcam_upd_valid = 1; tcam_upd_sel = sel; tcam_upd_addr = 32'(a);
    tcam_upd_value = {v, 96'h0};
    tcam_upd_mask  = {pmask(l), 96'h0};
    tcam_upd_entry_valid = 1;
    @(negedge clk_tcam);
    tcam_upd_valid = 0;
  endtask

  // one SRAM word to copy j, one per SRAM cycle when called back to back;
  // the two copies may be written concurrently
  task automatic sram_write(input int j, input upd_target_e t, input int a0, input int a1,
                            input logic [63:0] d);
    @(negedge clk_sram);
    upd_v[j] = 1;
    upd[j].target = t; upd[j].addr0 = 32'(a0); upd[j].addr1 = 32'(a1); upd[j].data = d;
    @(posedge clk_sram);
    #1 upd_v[j] = 0;
    n_writes[j]++;
  endtask

  function automatic dst_index_t dst_word(input int k);
    dst_index_t di;
    di = '0;
    di.dflt = nh_idx_t'(d_dflt[k]);
    di.indicator = has_row(k);
    di.row = 32'(k);
    return di;
  endfunction

  // full load of both copies (no traffic)
  task automatic load_all();
    for (int k = 0; k < nd; k++)
      for (int c = 0; c < nchunks * BW; c++)
        t_td[k][c] = (has_row(k) && c < ns) ? sat_cell(k, c) : EMPTY_CELL;
    dict_id.delete();
    ndict = 0;
    foreach (dict_written[i]) dict_written[i] = 0;
    for (int k = 0; k < nd; k++)
      if (has_row(k))
        for (int ck = 0; ck < nchunks; ck++) begin
          string key;
          key = chunk_key(k, ck);
          if (!dict_id.exists(key)) begin dict_id[key] = ndict; ndict++; end
          t_cat[k][ck] = dict_id[key];
        end
    fork
      begin
        for (int c = 0; c < ns; c++) sram_write(0, UPD_SRC_INDEX, c, 0, 64'(c));
        for (int k = 0; k < nd; k++) begin
          if (has_row(k))
            for (int c = 0; c < ns; c++) sram_write(0, UPD_TD_CELL, k, c, 64'(t_td[k][c]));
          sram_write(0, UPD_DST_INDEX, k, 0, 64'(dst_word(k)));
        end
      end
      begin
        for (int c = 0; c < ns; c++) sram_write(1, UPD_SRC_INDEX, c, 0, 64'(c));
        for (int k = 0; k < nd; k++)
          if (has_row(k))
            for (int ck = 0; ck < nchunks; ck++) begin
              if (!dict_written[t_cat[k][ck]]) begin
                for (int o = 0; o < BW; o++)
                  sram_write(1, UPD_TD_CELL, t_cat[k][ck], o, 64'(t_td[k][ck*BW+o]));
                dict_written[t_cat[k][ck]] = 1;
              end
              sram_write(1, UPD_CATALOG, k, ck, 64'(t_cat[k][ck]));
            end
        for (int k = 0; k < nd; k++) sram_write(1, UPD_DST_INDEX, k, 0, 64'(dst_word(k)));
      end
    join
  endtask

  // One policy change for pair (a, b): recompute the rows of network a and
  // write only what changed. Returns the SRAM cycles the writes took.
  task automatic apply_update(input int a, input int b, input int nh, output int cycles);
    int cells_r [$], cells_c [$];
    int cat_r [$], cat_k [$], cat_v [$], new_d [$];
    int t0;
    if (pair_nh[a][b] == 0) n_pairs_of[a]++;
    pair_nh[a][b] = nh;
    for (int k = 0; k < nd; k++)
      if (d_as[k] == a) begin
        for (int c = 0; c < ns; c++) begin
          nh_idx_t v;
          v = sat_cell(k, c);
          if (v != t_td[k][c]) begin
            t_td[k][c] = v; cells_r.push_back(k); cells_c.push_back(c);
          end
        end
        for (int ck = 0; ck < nchunks; ck++) begin
          string key;
          key = chunk_key(k, ck);
          if (!dict_id.exists(key)) begin
            dict_id[key] = ndict; new_d.push_back(ndict); new_d.push_back(k); new_d.push_back(ck);
            ndict++;
          end
          if (dict_id[key] != t_cat[k][ck]) begin
            t_cat[k][ck] = dict_id[key];
            cat_r.push_back(k); cat_k.push_back(ck); cat_v.push_back(dict_id[key]);
          end
        end
      end
    t0 = sram_cycle;
    fork
      foreach (cells_r[i]) sram_write(0, UPD_TD_CELL, cells_r[i], cells_c[i],
                                      64'(t_td[cells_r[i]][cells_c[i]]));
      begin
        // fresh sub-rows first, then the catalog cells that point to them
        for (int i = 0; i < new_d.size(); i += 3)
          for (int o = 0; o < BW; o++)
            sram_write(1, UPD_TD_CELL, new_d[i], o, 64'(t_td[new_d[i+1]][new_d[i+2]*BW+o]));
        foreach (cat_r[i]) sram_write(1, UPD_CATALOG, cat_r[i], cat_k[i], 64'(cat_v[i]));
      end
    join
    cycles = sram_cycle - t0;
  endtask

  // ------------------------------------------------------------------------
  // Traffic and checking
  // ------------------------------------------------------------------------
  typedef struct { int tag; int exp_new; int exp_old; bit either; } exp_t;
  exp_t exp_q [2][$];
  int   next_tag = 0;
  bit   in_transition = 0;
  int   tr_a = 0, tr_b = 0, tr_old = 0;
  int   n_kind [2][4];
  int   n_held = 0, n_coll = 0, n_results [2];
  bit   counting_held = 0;
  bit   stop_traffic = 0;

  always @(posedge clk_tcam) begin
    if (rst_tcam_n) begin
      if (counting_held && drv_valid && !in_valid) n_held++;
      if (in_valid) begin
        exp_t e;
        int   nw;
        e.tag = int'(in_tag);
        e.exp_new = reference(in_dst_addr[KEY_W-1 -: 32], in_src_addr[KEY_W-1 -: 32]);
        e.either = in_transition;
        e.exp_old = e.exp_new;
        if (in_transition) begin
          nw = pair_nh[tr_a][tr_b];
          pair_nh[tr_a][tr_b] = tr_old;
          e.exp_old = reference(in_dst_addr[KEY_W-1 -: 32], in_src_addr[KEY_W-1 -: 32]);
          pair_nh[tr_a][tr_b] = nw;
        end
        exp_q[0].push_back(e);
        exp_q[1].push_back(e);
      end
    end
  end

  always @(posedge clk_sram) begin
    sram_cycle <= sram_cycle + 1;
    if (rst_sram_n) begin
      if (coll[0] || coll[1]) n_coll++;
      for (int j = 0; j < 2; j++)
        if (out_valid[j]) begin
          exp_t e;
          int   got;
          n_results[j]++;
          if (exp_q[j].size() == 0) check(0, "result without request");
          else begin
            e = exp_q[j].pop_front();
            got = int'(out_result[j].nh_idx);
            check(int'(out_result[j].tag) == e.tag, $sformatf("copy %0d order", j));
            check(out_result[j].nh_info == 32'h0A00_0000 + 32'(got),
                  "nexthop information matches the index");
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

  function automatic logic [31:0] addr_in(input logic [31:0] pv, input int pl);
    return pv | ($urandom & ~pmask(pl));
  endfunction

  task automatic send_random();
    logic [31:0] da, sa;
    da = $urandom;
    if ($urandom_range(4) != 0) begin
      int k;
      k = $urandom_range(nd - 1);
      da = addr_in(d_v[k], d_l[k]);
    end
    if ($urandom_range(6) == 0) sa = $urandom;
    else begin
      int c;
      c = $urandom_range(ns - 1);
      sa = addr_in(s_v[c], s_l[c]);
    end
    @(negedge clk_tcam);
    drv_valid   = 1;
    in_dst_addr = {da, $urandom, $urandom, $urandom};
    in_src_addr = {sa, $urandom, $urandom, $urandom};
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
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fills [2];
    fills = '{30, 100};
    drv_valid = 0; in_dst_addr = 0; in_src_addr = 0; in_tag = 0;
    tcam_upd_valid = 0; tcam_upd_sel = TCAM_DST; tcam_upd_addr = 0;
    tcam_upd_value = 0; tcam_upd_mask = 0; tcam_upd_entry_valid = 0;
    for (int j = 0; j < 2; j++) begin upd_v[j] = 0; upd[j] = '0; end
    repeat (3) @(negedge clk_tcam);
    rst_tcam_n = 1; rst_sram_n = 1;

    gen_prefixes();
    nchunks = (ns + BW - 1) / BW;
    $display("%0d destination prefixes, %0d source prefixes", nd, ns);
    check(nd <= ROWS && ns <= COLS, "prefixes fit the TCAM tables");
    for (int k = 0; k < nd; k++) tcam_write(TCAM_DST, k, d_v[k], d_l[k]);
    for (int c = 0; c < ns; c++) tcam_write(TCAM_SRC, c, s_v[c], s_l[c]);
    fork
      for (int i = 1; i < 256; i++) sram_write(0, UPD_MAPPING, i, 0, 64'(32'h0A00_0000 + i));
      for (int i = 1; i < 256; i++) sram_write(1, UPD_MAPPING, i, 0, 64'(32'h0A00_0000 + i));
    join

    foreach (fills[f]) begin
      int npairs, nrows, worst, upd_writes;
      longint plain_bits, dedup_bits;
      gen_policies(fills[f]);
      n_writes[0] = 0; n_writes[1] = 0;
      load_all();
      npairs = 0; nrows = 0;
      for (int a = 0; a < KD; a++) npairs += n_pairs_of[a];
      for (int k = 0; k < nd; k++) if (has_row(k)) nrows++;
      plain_bits = longint'(nrows) * ns * 8;
      dedup_bits = longint'(nrows) * nchunks * CAT_W + longint'(ndict) * BW * 8;
      $display("fill %0d/1000: %0d policies, %0d TD-rows, %0d sub-rows kept of %0d, %0d + %0d load writes",
               fills[f], npairs, nrows, ndict, nrows * nchunks, n_writes[0], n_writes[1]);
      $display("  TD-table %0d bits, deduplicated %0d bits, ratio %0.2f",
               plain_bits, dedup_bits, real'(plain_bits) / real'(dedup_bits));
      check(ndict < nrows * nchunks, "deduplication merged sub-rows");
      check(ndict <= DICT_ROWS, "dictionary fits");

      // 1. static traffic
      counting_held = 1;
      repeat (NLOOK) send_random();
      wait_drained();

      // 2. policy changes at 50,000 per second while lookups flow
      worst = 0;
      n_writes[0] = 0; n_writes[1] = 0;
      stop_traffic = 0;
      fork
        while (!stop_traffic) send_random();
        begin
          for (int u = 0; u < NUPD; u++) begin
            int a, b, nh, cyc, t_start;
            t_start = sram_cycle;
            do a = $urandom_range(KD - 1); while (n_pairs_of[a] == 0);
            b = $urandom_range(KS - 1);
            do nh = 1 + $urandom_range(254); while (nh == pair_nh[a][b]);
            tr_a = a; tr_b = b; tr_old = pair_nh[a][b];
            in_transition = 1;
            repeat (80) @(negedge clk_sram);   // lookups already in flight finish
            apply_update(a, b, nh, cyc);
            if (cyc > worst) worst = cyc;
            check(cyc <= UPD_GAP - 200, $sformatf("update %0d took %0d SRAM cycles", u, cyc));
            repeat (80) @(negedge clk_sram);
            in_transition = 0;
            while (sram_cycle - t_start < UPD_GAP) @(negedge clk_sram);
          end
          stop_traffic = 1;
        end
      join
      wait_drained();
      $display("  %0d updates: %0d + %0d SRAM writes, slowest %0d SRAM cycles",
               NUPD, n_writes[0], n_writes[1], worst);

      // 3. exact checking again after the updates
      repeat (NLOOK / 4) send_random();
      wait_drained();
      counting_held = 0;
    end

    $display("copy 0 kinds: cell=%0d no_row=%0d no_src=%0d empty=%0d",
             n_kind[0][0], n_kind[0][1], n_kind[0][2], n_kind[0][3]);
    $display("copy 1 kinds: cell=%0d no_row=%0d no_src=%0d empty=%0d",
             n_kind[1][0], n_kind[1][1], n_kind[1][2], n_kind[1][3]);
    $display("requests held back=%0d read-during-write collisions=%0d", n_held, n_coll);
    for (int j = 0; j < 2; j++) for (int k = 0; k < 4; k++)
      check(n_kind[j][k] > 0, $sformatf("copy %0d resolution kind %0d happened", j, k));
    check(n_held == 0, "SRAM updates never held up a lookup");
    check(n_results[0] == next_tag && n_results[1] == next_tag, "every request answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
