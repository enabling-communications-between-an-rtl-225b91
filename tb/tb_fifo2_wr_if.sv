// tb_fifo2_wr_if: self-checking test of FIFO 2's write interface.
//
// Run 1: unqualified outputs before the first qualified one are ignored,
// then a burst of qualified outputs is stored at addresses 0.. on
// successive clocks, and the first unqualified output ends capture for good
// (later qualified outputs are not stored). Run 2: a burst longer than the
// BlockRAM stops at its capacity with stop_full set.
module tb_fifo2_wr_if;
  localparam int DW = 16, DEPTH = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DW-1:0] duc_dout, a_wdata;
  logic          duc_rdy, a_we, waiting, capturing, done, stop_full;
  logic [5:0]    a_addr;
  logic [6:0]    count;
  logic [DW-1:0] mem [DEPTH];
  int            writes;

  always_ff @(posedge clk) if (a_we) begin
    mem[a_addr] <= a_wdata;
    writes      <= writes + 1;
  end

  fifo2_wr_if #(.DATA_W(DW), .F2_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [DW-1:0] sent [200];

  task automatic run(input int len, input bit expect_full);
    int stored, bad;
    rst_n = 0; duc_rdy = 0; duc_dout = 0; writes = 0;
    for (int k = 0; k < DEPTH; k++) mem[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) begin @(negedge clk); duc_dout = DW'($urandom); end
    check(waiting && writes == 0, "unqualified outputs ignored before start");
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      duc_rdy = 1; duc_dout = DW'($urandom); sent[k] = duc_dout;
    end
    @(negedge clk); duc_rdy = 0;
    repeat (3) @(negedge clk);
    duc_rdy = 1;                      // late qualified values
    repeat (5) @(negedge clk);
    duc_rdy = 0;
    @(negedge clk);
    stored = (len < DEPTH) ? len : DEPTH;
    check(done, "done");
    check(stop_full == expect_full, $sformatf("stop_full %0b exp %0b", stop_full, expect_full));
    check(writes == stored, $sformatf("writes %0d exp %0d", writes, stored));
    check(int'(count) == stored, "count");
    bad = 0;
    for (int k = 0; k < stored; k++) if (mem[k] != sent[k]) bad++;
    check(bad == 0, $sformatf("%0d wrong stored samples", bad));
  endtask

  initial begin
    run(40, 0);
    run(150, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
