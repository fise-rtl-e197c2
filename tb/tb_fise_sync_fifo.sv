// tb_fise_sync_fifo: self-checking test of the single-clock output FIFO.
//
// Pushes a counting sequence while not full and pops at random, checking
// order, count against a model, full/empty flags and the one-cycle
// push-to-output latency.
module tb_fise_sync_fifo;
  localparam int WIDTH = 16;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             push, full, out_valid, out_ready;
  logic [WIDTH-1:0] push_data, out_data;
  logic [3:0]       count;

  fise_sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, got = 0, model_count = 0, full_seen = 0;

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
    push = 0; push_data = 0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && count == 0, "empty after reset");
    // latency
    push = 1; push_data = 16'h1234;
    @(negedge clk);
    push = 0;
    check(out_valid && out_data == 16'h1234 && count == 1, "visible one cycle after push");
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    check(!out_valid, "empty after pop");
    // random traffic
    for (int cyc = 0; cyc < 2000; cyc++) begin
      bit do_push, do_pop;
      push = !full && ($urandom_range(2) != 0);
      push_data = WIDTH'(sent);
      out_ready = (cyc < 300) ? ($urandom_range(5) == 0) : ($urandom_range(1) == 0);
      do_push = push;
      do_pop  = out_valid && out_ready;
      if (full) full_seen++;
      check(int'(count) == model_count, "count");
      check(full == (model_count == DEPTH), "full flag");
      if (do_pop) begin
        check(out_data == WIDTH'(got), $sformatf("order %0d vs %0d", out_data, got));
        got++;
      end
      if (do_push) sent++;
      model_count += int'(do_push) - int'(do_pop);
      @(negedge clk);
    end
    check(full_seen > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
