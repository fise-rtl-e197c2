// tb_fise_dedup_table: self-checking test of the catalog + dictionary
// (fixed block deduplicated) TD-table.
//
// Builds a random 8 x 12 TD-table whose rows are made of a few repeated
// 4-cell sub-rows, deduplicates it in the testbench (catalog cell = number of
// the first identical sub-row in the dictionary), writes catalog and
// dictionary, and checks every cell read through the two-level lookup and its
// two-cycle latency, including back-to-back reads.
module tb_fise_dedup_table;
  import fise_pkg::*;
  localparam int ROWS = 8, COLS = 12, BW = 4, DICT_ROWS = 16;
  localparam int CHUNKS = COLS / BW;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             re, collision, cat_we, dict_we;
  logic [2:0]       row, cat_wrow;
  logic [3:0]       col;
  logic [1:0]       cat_wchunk, dict_woff;
  logic [CAT_W-1:0] cat_wdata;
  logic [3:0]       dict_wsubrow;
  nh_idx_t          td_cell, dict_wdata;

  fise_dedup_table #(.ROWS(ROWS), .COLS(COLS), .BLOCK_W(BW), .DICT_ROWS(DICT_ROWS)) dut (.*);

  int checks = 0, failures = 0;
  nh_idx_t td [ROWS][COLS];
  nh_idx_t dict [DICT_ROWS][BW];
  int      cat  [ROWS][CHUNKS];
  int      ndict;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dedup_and_write(input int rows, input int chunks);
    ndict = 0;
    for (int r = 0; r < rows; r++)
      for (int k = 0; k < chunks; k++) begin
        int found;
        found = -1;
        for (int d = 0; d < ndict; d++) begin
          bit same;
          same = 1;
          for (int o = 0; o < BW; o++) if (dict[d][o] != td[r][k*BW+o]) same = 0;
          if (same && found < 0) found = d;
        end
        if (found < 0) begin
          for (int o = 0; o < BW; o++) dict[ndict][o] = td[r][k*BW+o];
          found = ndict++;
        end
        cat[r][k] = found;
      end
    for (int r = 0; r < rows; r++)
      for (int k = 0; k < chunks; k++) begin
        @(negedge clk);
        cat_we = 1; cat_wrow = 3'(r); cat_wchunk = 2'(k); cat_wdata = CAT_W'(cat[r][k]);
      end
    @(negedge clk);
    cat_we = 0;
    for (int d = 0; d < ndict; d++)
      for (int o = 0; o < BW; o++) begin
        dict_we = 1; dict_wsubrow = 4'(d); dict_woff = 2'(o); dict_wdata = dict[d][o];
        @(negedge clk);
      end
    dict_we = 0;
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nh_idx_t pool [4][BW];
    re = 0; row = 0; col = 0; cat_we = 0; dict_we = 0;
    cat_wrow = 0; cat_wchunk = 0; cat_wdata = 0; dict_wsubrow = 0; dict_woff = 0; dict_wdata = 0;
    for (int p = 0; p < 4; p++) for (int o = 0; o < BW; o++) pool[p][o] = nh_idx_t'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < CHUNKS; k++) begin
        int p;
        p = $urandom_range(3);
        for (int o = 0; o < BW; o++) td[r][k*BW+o] = pool[p][o];
      end
    dedup_and_write(ROWS, CHUNKS);
    check(ndict <= 4, "sub-rows deduplicated");
    // single reads: two-cycle latency
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        re = 1; row = 3'(r); col = 4'(c);
        @(negedge clk);
        re = 0; row = 3'($urandom); col = 4'($urandom);
        @(negedge clk);
        check(td_cell == td[r][c], $sformatf("cell (%0d,%0d) = %0d, expected %0d",
                                             r, c, td_cell, td[r][c]));
      end
    // back-to-back reads: one cell per cycle
    begin
      int qr[$], qc[$];
      @(negedge clk);
      for (int n = 0; n < 60; n++) begin
        int r, c;
        r = $urandom_range(ROWS - 1);
        c = $urandom_range(COLS - 1);
        re = 1; row = 3'(r); col = 4'(c);
        qr.push_back(r); qc.push_back(c);
        @(negedge clk);
        if (n >= 1) begin
          int er, ec;
          er = qr.pop_front();
          ec = qc.pop_front();
          check(td_cell == td[er][ec], "pipelined cell");
        end
      end
      re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
