// tb_fm3tr_app_top: end-to-end test of the FM3TR transmit chain at its
// default sizes (FIFO 0/1: 512 x 32, FIFO 2: 1024 x 16).
//
// clk runs at 100 MHz and clk_duc at 6.25 MHz (clk/16). The DUC core is
// replaced by duc_model (hold by 16, quarter-rate carrier). The expected I/Q
// stream is computed here from the input bits by phase accumulation
// (z = j^P, P += a_n, reference P = 3) and half-sine pulses of 9 samples;
// the expected FIFO 2 contents follow from it through the model's formula.
//
// Run A: 9 bits delivered in three bursts with pauses and a late go; the
// whole passband output (16*(4*9+9) = 720 samples) fits FIFO 2, which stops
// on the first unqualified DUC output.
// Run B: 130 bits at once, more than FIFO 1 holds: the modulator truncates
// to 125 bits (509 words), FIFO 2 stops at capacity (1024 samples).
// Checked: every I/Q sample presented to the DUC, its rate (one per clk_duc
// cycle), the FIFO 2 contents, the interval timer against the modulator's
// cycle budget, and that each mechanism (INIT hold, WAIT stall, header
// polling, a stale header left by run A ignored in run B, truncation, stop
// on unqualified data, stop on full) happened.
module tb_fm3tr_app_top;
  import fm3tr_pkg::*;

  logic clk = 0, clk_duc = 0, rst_n = 0;
  always #5  clk = ~clk;
  always #80 clk_duc = ~clk_duc;

  logic        src_we, src_done, ctrl_go, sink_en;
  logic [8:0]  src_addr;
  logic [31:0] src_wdata;
  logic [15:0] src_count;
  q15_t        duc_din_i, duc_din_q;
  logic        duc_nd, duc_rdy;
  logic [15:0] duc_dout, sink_rdata;
  logic [9:0]  sink_addr;
  mod_state_e  mod_state;
  logic        mod_done, mod_truncated, mod_cycles_wrapped;
  logic [15:0] mod_bits, f1_words_sent, f1_polls;
  logic [31:0] mod_cycles;
  logic        f1_polling, f1_done, f2_capturing, f2_done, f2_full;
  logic [10:0] f2_count;

  fm3tr_app_top dut (.*);

  // input-rate strobe for the DUC model: once every 16 clk cycles
  int   ce_cnt = 0;
  logic ce_in;
  always_ff @(posedge clk) ce_cnt <= (ce_cnt + 1) % 16;
  assign ce_in = (ce_cnt == 8);

  duc_model #(.RATE(16)) u_duc (
    .clk, .rst_n, .ce_in, .din_i(duc_din_i), .din_q(duc_din_q), .nd(duc_nd),
    .dout(duc_dout), .rdy(duc_rdy)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_init_hold, n_stale, n_wait_stall, n_polls_before, n_trunc, n_stop_unq, n_stop_full;

  int bits [];
  function automatic int g(input int k);
    return $rtoi(32767.0 * $sin(3.14159265358979 * k / 8.0) + 0.5);
  endfunction
  function automatic int expect_iq(input int s, input int n, input int iq);
    int p, v, k;
    v = 0; p = 3;
    for (int m = -1; m < n; m++) begin
      if (m >= 0) p = (p + bits[m] + 4) % 4;
      k = s - 4 * (m + 1);
      if (k >= 0 && k <= 8)
        v += (iq == 0 ? ((p == 0) ? 1 : (p == 2) ? -1 : 0)
                      : ((p == 1) ? 1 : (p == 3) ? -1 : 0)) * g(k);
    end
    return v;
  endfunction

  // monitor of the DUC input
  int got_i [600], got_q [600];
  int n_got, first_nd_t, last_nd_t;
  always @(posedge clk_duc) begin
    if (rst_n && duc_nd && n_got < 600) begin
      got_i[n_got] = int'(duc_din_i);
      got_q[n_got] = int'(duc_din_q);
      if (n_got == 0) first_nd_t = int'($time);
      last_nd_t = int'($time);
      n_got++;
    end
  end

  // mechanism monitor: RUN -> WAIT while the window is still open
  mod_state_e prev_state;
  always_ff @(posedge clk) begin
    prev_state <= mod_state;
    if (prev_state == MS_RUN && mod_state == MS_WAIT && !src_done) n_wait_stall <= n_wait_stall + 1;
  end

  task automatic write_bits(input int from, input int upto);
    for (int w = from / 4; w < (upto + 3) / 4; w++) begin
      logic [31:0] word;
      word = 32'h0101_0101;
      for (int b = 0; b < 4; b++)
        if (4 * w + b < bits.size() && bits[4 * w + b] < 0) word[31 - 8 * b -: 8] = 8'hFF;
      @(negedge clk);
      src_we = 1; src_addr = 9'(w); src_wdata = word;
    end
    @(negedge clk);
    src_we = 0;
    src_count = 16'(upto);
  endtask

  task automatic start_run(input int n);
    rst_n = 0; src_we = 0; src_done = 0; ctrl_go = 0; src_count = 0;
    src_addr = 0; src_wdata = 0; sink_en = 0; sink_addr = 0;
    n_got = 0;
    bits = new[n];
    foreach (bits[i]) bits[i] = ($urandom_range(0, 1) == 1) ? 1 : -1;
    repeat (4) @(posedge clk_duc);
    rst_n = 1;
  endtask

  task automatic check_results(input int nb, input int max_f2, input string tag);
    int words, bad, nf2;
    words = 4 * nb + 9;
    check(n_got == words, $sformatf("%s: DUC got %0d words exp %0d", tag, n_got, words));
    bad = 0;
    for (int s = 0; s < n_got && s < words; s++)
      if (got_i[s] != expect_iq(s, nb, 0) || got_q[s] != expect_iq(s, nb, 1)) bad++;
    check(bad == 0, $sformatf("%s: %0d wrong I/Q words at the DUC input", tag, bad));
    check(last_nd_t - first_nd_t == 160 * (n_got - 1),
          $sformatf("%s: DUC input rate one sample per 160 ns", tag));
    nf2 = (16 * words < max_f2) ? 16 * words : max_f2;
    check(int'(f2_count) == nf2, $sformatf("%s: FIFO 2 count %0d exp %0d", tag, f2_count, nf2));
    bad = 0;
    for (int k = 0; k < nf2; k++) begin
      int w, e;
      w = k / 16;
      unique case (k % 4)
        0: e = expect_iq(w, nb, 0);
        1: e = -expect_iq(w, nb, 1);
        2: e = -expect_iq(w, nb, 0);
        default: e = expect_iq(w, nb, 1);
      endcase
      @(negedge clk);
      sink_en = 1; sink_addr = 10'(k);
      @(negedge clk);
      sink_en = 0;
      if (int'($signed(sink_rdata)) != e) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d wrong FIFO 2 samples", tag, bad));
  endtask

  initial begin
    n_init_hold = 0; n_stale = 0; n_wait_stall = 0; n_polls_before = 0;
    n_trunc = 0; n_stop_unq = 0; n_stop_full = 0;

    // ---------------- run A ----------------
    start_run(9);
    write_bits(0, 3);
    repeat (30) @(posedge clk);
    if (mod_state == MS_INIT) n_init_hold++;
    check(mod_state == MS_INIT, "A: modulator holds in INIT until go");
    ctrl_go = 1;
    repeat (50) @(posedge clk);
    write_bits(3, 6);
    repeat (50) @(posedge clk);
    write_bits(6, 9);
    repeat (50) @(posedge clk);
    check(f1_polling && n_got == 0, "A: DUC side still polling before the window closes");
    src_done = 1;
    wait (mod_done);
    if (f1_polls > 2) n_polls_before++;
    wait (f2_done);
    repeat (2) @(posedge clk);
    if (!f2_full) n_stop_unq++;
    check(!mod_truncated, "A: no truncation");
    check(!f2_full, "A: FIFO 2 stopped on unqualified data");
    check_results(9, 1024, "A");

    // ---------------- run B ----------------
    start_run(130);
    // FIFO 1 still holds run A's ready header: the reader must not use it
    repeat (40) @(posedge clk);
    if (f1_polling && n_got == 0) n_stale++;
    check(f1_polling && n_got == 0, "B: stale FIFO 1 header ignored");
    write_bits(0, 130);
    ctrl_go = 1; src_done = 1;
    wait (mod_done);
    if (mod_truncated) n_trunc++;
    check(mod_truncated && mod_bits == 125, $sformatf("B: truncated to %0d bits", mod_bits));
    check(mod_cycles == 32'(5 * 125 + (125 + 3) / 4 + 8),
          $sformatf("B: timer %0d exp %0d", mod_cycles, 5 * 125 + (125 + 3) / 4 + 8));
    check(!mod_cycles_wrapped, "B: timer did not wrap");
    wait (f2_done);
    repeat (2) @(posedge clk);
    if (f2_full) n_stop_full++;
    check(f2_full, "B: FIFO 2 stopped at capacity");
    wait (f1_done);
    check(int'(f1_words_sent) == 509, $sformatf("B: FIFO 1 words sent %0d", f1_words_sent));
    check_results(125, 1024, "B");

    check(n_init_hold > 0,    "mechanism: INIT hold");
    check(n_wait_stall > 0,   "mechanism: WAIT stall for new data");
    check(n_polls_before > 0, "mechanism: header polling");
    check(n_stale > 0,        "mechanism: stale header ignored");
    check(n_trunc > 0,        "mechanism: window truncation");
    check(n_stop_unq > 0,     "mechanism: FIFO 2 stop on unqualified data");
    check(n_stop_full > 0,    "mechanism: FIFO 2 stop on full");
    $display("mechanisms: stale_header=%0d", n_stale);
    $display("mechanisms: init_hold=%0d wait_stall=%0d polling=%0d truncation=%0d stop_unqualified=%0d stop_full=%0d",
             n_init_hold, n_wait_stall, n_polls_before, n_trunc, n_stop_unq, n_stop_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
