// tb_fise_tcam: self-checking test of the ternary CAM.
//
// Loads random prefixes, longest first (so the lowest address holds the
// longest prefix), and checks every key of an 8-bit space against a software
// scan of the same entries: hit, lowest matching address, and the one-cycle
// lookup latency. Also checks entry invalidation and reset.
module tb_fise_tcam;
  localparam int KEY_W = 8;
  localparam int DEPTH = 16;
  localparam int AW    = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             lookup_en, res_valid, hit, we, wentry_valid;
  logic [KEY_W-1:0] key, wvalue, wmask;
  logic [AW-1:0]    match_addr, waddr;

  fise_tcam #(.KEY_W(KEY_W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [KEY_W-1:0] m_val [DEPTH];
  logic [KEY_W-1:0] m_msk [DEPTH];
  logic             m_vld [DEPTH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_entry(input int a, input logic [KEY_W-1:0] v, input logic [KEY_W-1:0] m,
                             input logic ev);
    @(negedge clk);
    we = 1; waddr = AW'(a); wvalue = v; wmask = m; wentry_valid = ev;
    @(negedge clk);
    we = 0;
    m_val[a] = v; m_msk[a] = m; m_vld[a] = ev;
  endtask

  task automatic lookup_and_check(input logic [KEY_W-1:0] k);
    int exp_a;
    exp_a = -1;
    for (int i = 0; i < DEPTH; i++)
      if (exp_a < 0 && m_vld[i] && (((k ^ m_val[i]) & m_msk[i]) == 0)) exp_a = i;
    @(negedge clk);
    lookup_en = 1; key = k;
    @(negedge clk);
    lookup_en = 0;
    key = ~k;  // result must not follow the key after the lookup cycle
    check(res_valid == 1'b1, "res_valid one cycle after lookup_en");
    check(hit == (exp_a >= 0), $sformatf("hit for key %02h", k));
    if (exp_a >= 0) check(match_addr == AW'(exp_a), $sformatf("addr for key %02h: %0d vs %0d",
                                                              k, match_addr, exp_a));
    @(negedge clk);
    check(res_valid == 1'b0, "res_valid drops");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len [DEPTH];
    lookup_en = 0; we = 0; key = 0; waddr = 0; wvalue = 0; wmask = 0; wentry_valid = 0;
    for (int i = 0; i < DEPTH; i++) m_vld[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset leaves every entry invalid
    lookup_and_check(8'h5a);
    // longest prefixes at the lowest addresses; the last entry is the default
    for (int i = 0; i < DEPTH; i++) len[i] = (i == DEPTH - 1) ? 0 : 8 - (i * 8) / (DEPTH - 1);
    for (int i = 0; i < DEPTH; i++) begin
      logic [KEY_W-1:0] m;
      m = (len[i] == 0) ? '0 : ~((8'hff) >> len[i]);
      write_entry(i, 8'($urandom) & m, m, 1'b1);
    end
    for (int k = 0; k < 256; k++) lookup_and_check(8'(k));
    // invalidate the default and a few others
    write_entry(DEPTH - 1, 8'h00, 8'h00, 1'b0);
    write_entry(3, m_val[3], m_msk[3], 1'b0);
    for (int k = 0; k < 256; k++) lookup_and_check(8'(k));
    // back-to-back lookups: one result per cycle
    @(negedge clk);
    lookup_en = 1; key = m_val[0];
    @(negedge clk);
    key = m_val[1];
    check(res_valid && hit && match_addr == 0, "back-to-back first");
    @(negedge clk);
    lookup_en = 0;
    check(res_valid && hit && match_addr == 1, "back-to-back second");
    // reset clears the table
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH; i++) m_vld[i] = 0;
    lookup_and_check(m_val[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
