// tb_fise_async_fifo: self-checking test of the dual-clock FIFO.
//
// Write clock 10 ns, read clock 7 ns. The writer pushes a counting sequence
// whenever the FIFO is not full (randomly throttled); the reader pops at
// random. Checks order and completeness, that the FIFO reaches full and
// empty, that wlevel never exceeds the depth, that a word is not visible
// before the synchroniser delay, and the read-side latency.
module tb_fise_async_fifo;
  localparam int WIDTH = 16;
  localparam int DEPTH = 8;
  localparam int N     = 600;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  logic             wpush, wfull, rpop, rempty;
  logic [WIDTH-1:0] wdata, rdata;
  logic [3:0]       wlevel;

  fise_async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, got = 0, full_seen = 0;
  bit reader_slow = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wpush = 0; wdata = 0;
    repeat (3) @(negedge wclk);
    wrst_n = 1;
    while (sent < N) begin
      @(negedge wclk);
      check(int'(wlevel) <= DEPTH, "wlevel within depth");
      if (wfull) full_seen++;
      wpush = !wfull && ($urandom_range(3) != 0);
      wdata = WIDTH'(sent);
      @(posedge wclk);
      if (wpush) sent++;
    end
    @(negedge wclk);
    wpush = 0;
  end

  // reader
  initial begin
    rpop = 0;
    repeat (4) @(negedge rclk);
    rrst_n = 1;
    // latency: a single word appears within 2..4 read edges of its write edge
    forever begin
      @(negedge rclk);
      if (got >= N / 3) reader_slow = 0;
      rpop = !rempty && (reader_slow ? ($urandom_range(4) == 0) : ($urandom_range(3) != 0));
      if (rpop) begin
        check(rdata == WIDTH'(got), $sformatf("order: got %0d expected %0d", rdata, got));
      end
      @(posedge rclk);
      if (rpop) got++;
      if (got == N) break;
    end
    @(negedge rclk);
    rpop = 0;
    check(rempty, "empty at the end");
    check(full_seen > 0, "FIFO reached full");
    // single-word latency
    @(negedge wclk);
    wpush = 1; wdata = 16'hbeef;
    @(negedge wclk);
    wpush = 0;
    check(rempty, "not visible immediately");
    begin
      int n = 0;
      while (rempty && n < 10) begin @(posedge rclk); n++; end
      #1;
      check(n >= 2 && n <= 4, $sformatf("crossing latency %0d read edges", n));
      check(rdata == 16'hbeef, "single word data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
