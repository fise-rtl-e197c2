// tb_fise_td_table: self-checking test of the plain TD-table.
//
// Fills a 6 x 10 TD-table (sizes that are not powers of two, so the
// row-major address arithmetic is exercised) with random 8-bit cells, then
// reads random (row, column) pairs and checks the cell and the one-cycle
// latency, with concurrent writes to other cells and to the read cell.
module tb_fise_td_table;
  import fise_pkg::*;
  localparam int ROWS = 6;
  localparam int COLS = 10;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       re, we, collision;
  logic [2:0] row, wrow;
  logic [3:0] col, wcol;
  nh_idx_t    td_cell, wcell;

  fise_td_table #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  nh_idx_t model [ROWS][COLS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; row = 0; col = 0; wrow = 0; wcol = 0; wcell = 0;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        we = 1; wrow = 3'(r); wcol = 4'(c); wcell = nh_idx_t'($urandom);
        model[r][c] = wcell;
        @(negedge clk);
      end
    we = 0;
    // every cell once
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        re = 1; row = 3'(r); col = 4'(c);
        @(negedge clk);
        re = 0;
        check(td_cell == model[r][c], $sformatf("cell (%0d,%0d)", r, c));
      end
    // random reads with concurrent writes
    for (int n = 0; n < 300; n++) begin
      int r, c, wr, wc;
      nh_idx_t exp;
      r = $urandom_range(ROWS - 1); c = $urandom_range(COLS - 1);
      wr = (n % 4 == 0) ? r : $urandom_range(ROWS - 1);
      wc = (n % 4 == 0) ? c : $urandom_range(COLS - 1);
      re = 1; row = 3'(r); col = 4'(c);
      we = 1; wrow = 3'(wr); wcol = 4'(wc); wcell = nh_idx_t'($urandom);
      exp = (r == wr && c == wc) ? wcell : model[r][c];
      model[wr][wc] = wcell;
      @(negedge clk);
      re = 0; we = 0;
      check(td_cell == exp, $sformatf("cell (%0d,%0d) during write", r, c));
      check(collision == (r == wr && c == wc), "collision flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
