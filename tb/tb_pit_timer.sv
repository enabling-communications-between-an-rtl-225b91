// tb_pit_timer: self-checking test of the interval timer.
//
// Enables the counter for random stretches separated by random pauses and
// compares the count with the number of enabled cycles counted here; checks
// that clear returns it to zero and wins over enable, and that `wrapped`
// stays low.
module tb_pit_timer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, enable, wrapped;
  logic [31:0] count;

  pit_timer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned expected;
    clear = 0; enable = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0, "zero after reset");
    expected = 0;
    for (int r = 0; r < 20; r++) begin
      int on, off;
      on = $urandom_range(1, 50); off = $urandom_range(0, 20);
      enable = 1;
      repeat (on) @(negedge clk);
      expected += on;
      enable = 0;
      repeat (off) @(negedge clk);
      check(count == expected, $sformatf("count %0d exp %0d", count, expected));
    end
    enable = 1; clear = 1;
    @(negedge clk);
    check(count == 0, "clear wins over enable");
    clear = 0;
    repeat (17) @(negedge clk);
    check(count == 17, $sformatf("count after clear %0d exp 17", count));
    check(!wrapped, "no wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
