// tb_fise_dp_sram: self-checking test of the dual-port SRAM.
//
// Writes random words, reads them back with the one-cycle latency, checks
// that rdata holds between reads, and that a read of the word written in the
// same cycle returns the new data and raises collision.
module tb_fise_dp_sram;
  localparam int WIDTH = 12;
  localparam int DEPTH = 32;
  localparam int AW    = 5;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             we, re, collision;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;

  fise_dp_sram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

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
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = WIDTH'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    // plain reads
    for (int n = 0; n < 100; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      re = 1; raddr = AW'(a);
      @(negedge clk);
      re = 0;
      check(rdata == model[a], $sformatf("read %0d", a));
      check(!collision, "no collision on plain read");
      @(negedge clk);
      check(rdata == model[a], "rdata held while re is low");
    end
    // simultaneous random reads and writes, including same-address collisions
    for (int n = 0; n < 200; n++) begin
      int ra, wa;
      logic [WIDTH-1:0] exp;
      bit   coll;
      ra = $urandom_range(DEPTH - 1);
      wa = (n % 3 == 0) ? ra : $urandom_range(DEPTH - 1);
      re = 1; raddr = AW'(ra);
      we = 1; waddr = AW'(wa); wdata = WIDTH'($urandom);
      coll = (ra == wa);
      exp  = coll ? wdata : model[ra];
      model[wa] = wdata;
      @(negedge clk);
      re = 0; we = 0;
      check(rdata == exp, $sformatf("read-during-write %0d/%0d", ra, wa));
      check(collision == coll, "collision flag");
      @(negedge clk);
      check(rdata == exp, "bypassed data held");
      check(!collision, "collision is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
