// tb_fifo1_duc_if: self-checking test of FIFO 1's DUC-side interface.
//
// The BlockRAM is an array written directly by the test. The interface must
// keep polling word 0 while the header is not ready and present nothing to
// the DUC; after the header {ready, count} is written it must present words
// 1..count in order on consecutive clk_duc cycles (one sample per cycle, the
// DUC input rate), then stop for good. A second run uses a zero count; a
// third starts with a stale ready header, which must be ignored until the
// word has been seen not ready.
module tb_fifo1_duc_if;
  import fm3tr_pkg::*;
  localparam int DEPTH = 128;

  logic clk_duc = 0, rst_n = 0;
  always #80 clk_duc = ~clk_duc;   // 6.25 MHz

  logic        b_en;
  logic [6:0]  b_addr;
  logic [31:0] b_rdata;
  q15_t        duc_din_i, duc_din_q;
  logic        duc_nd, polling, streaming, done;
  logic [15:0] words_sent, poll_count;

  logic [31:0] mem [DEPTH];
  always_ff @(posedge clk_duc) if (b_en) b_rdata <= mem[b_addr];

  fifo1_duc_if #(.F1_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int got, nd_cycles, first_nd, last_nd, cyc, bad;
  always @(posedge clk_duc) begin
    cyc <= cyc + 1;
    if (rst_n && duc_nd) begin
      iq_word_t w;
      w = iq_word_t'(mem[1 + got]);
      if (duc_din_i != w.i || duc_din_q != w.q) bad++;
      if (got == 0) first_nd = cyc;
      last_nd = cyc;
      got++;
    end
  end

  task automatic run(input int count, input bit stale);
    rst_n = 0; got = 0; bad = 0; cyc = 0;
    for (int k = 0; k < DEPTH; k++) mem[k] = '0;
    // a header left ready by an earlier window must not start a stream
    if (stale) mem[0] = fifo1_hdr_t'{ready: 1'b1, rsvd: '0, count: 16'd50};
    repeat (2) @(posedge clk_duc);
    rst_n = 1;
    repeat (20) @(posedge clk_duc);
    if (stale) begin
      check(polling && got == 0, "stale ready header ignored");
      @(negedge clk_duc);
      mem[0] = '0;                     // the producer clears the header
      repeat (3) @(posedge clk_duc);
    end
    check(polling && !duc_nd && got == 0, "polls and presents nothing before the header");
    check(poll_count >= 19, $sformatf("poll count %0d", poll_count));
    for (int k = 1; k <= count; k++) mem[k] = $urandom;
    repeat (3) @(posedge clk_duc);
    check(got == 0, "sample words alone do not start the stream");
    @(negedge clk_duc);
    mem[0] = fifo1_hdr_t'{ready: 1'b1, rsvd: '0, count: 16'(count)};
    repeat (count + 10) @(posedge clk_duc);
    check(done, "done after the stream");
    check(got == count, $sformatf("words presented %0d exp %0d", got, count));
    check(int'(words_sent) == count, "words_sent");
    check(bad == 0, $sformatf("%0d wrong words", bad));
    if (count > 0)
      check(last_nd - first_nd == count - 1, "one sample per clk_duc cycle, no gaps");
    repeat (10) @(posedge clk_duc);
    check(got == count && !duc_nd, "nothing more after done");
  endtask

  initial begin
    run(100, 0);
    run(0, 0);
    run(37, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk_duc);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
