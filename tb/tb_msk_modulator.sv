// tb_msk_modulator: self-checking test of the MSK modulator.
//
// FIFO 0 and FIFO 1 are plain arrays here. The expected I/Q stream is worked
// out independently of the design: the carrier phase index P (z = j^P) is
// accumulated as P += a_n starting from the reference P = 3 (z = -j), and
// every symbol contributes a half-sine pulse round(32767*sin(pi*k/8)),
// k = 0..8, starting 4 samples after the previous one, on I for a real z and
// on Q for an imaginary z. Three runs:
//   1. a whole window available at once: every word, the header and the
//      busy cycle count 5N + ceil(N/4) + 8 are checked;
//   2. samples arriving in bursts with pauses (WAIT <-> RUN), and a late go;
//   3. a window larger than FIFO 1 can hold: truncation flag and header.
module tb_msk_modulator;
  import fm3tr_pkg::*;

  localparam int F0_DEPTH = 64;
  localparam int F1_DEPTH = 128;
  localparam int MAXB     = (F1_DEPTH - 1 - 9) / 4;   // 29

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        go, src_done;
  logic [15:0] src_count;
  logic        f0_en, f1_we, busy, done, truncated;
  logic [5:0]  f0_addr;
  logic [6:0]  f1_addr;
  logic [31:0] f0_rdata, f1_wdata;
  mod_state_e  state;
  logic [15:0] bits_done;

  logic [31:0] f0_mem [F0_DEPTH];
  logic [31:0] f1_mem [F1_DEPTH];

  always_ff @(posedge clk) begin
    if (f0_en) f0_rdata <= f0_mem[f0_addr];
    if (f1_we) f1_mem[f1_addr] <= f1_wdata;
  end

  msk_modulator #(.F0_DEPTH(F0_DEPTH), .F1_DEPTH(F1_DEPTH)) dut (
    .clk, .rst_n, .go, .src_count, .src_done,
    .f0_en, .f0_addr, .f0_rdata, .f1_we, .f1_addr, .f1_wdata,
    .state, .busy, .done, .bits_done, .truncated
  );

  int checks = 0, failures = 0;
  int busy_cycles;
  int wait_to_run, run_to_wait;
  mod_state_e prev_state;

  always_ff @(posedge clk) begin
    prev_state <= state;
    if (busy) busy_cycles <= busy_cycles + 1;
    if (prev_state == MS_WAIT && state == MS_RUN) wait_to_run <= wait_to_run + 1;
    if (prev_state == MS_RUN && state == MS_WAIT) run_to_wait <= run_to_wait + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int bits [];

  function automatic int g(input int k);
    return $rtoi(32767.0 * $sin(3.14159265358979 * k / 8.0) + 0.5);
  endfunction

  // expected sample s of the I (iq=0) or Q (iq=1) output for n bits
  function automatic int expect_iq(input int s, input int n, input int iq);
    int p, v, k, re, im;
    v = 0;
    p = 3;
    for (int m = -1; m < n; m++) begin
      if (m >= 0) p = (p + bits[m] + 4) % 4;
      k = s - 4 * (m + 1);
      re = (p == 0) ? 1 : (p == 2) ? -1 : 0;
      im = (p == 1) ? 1 : (p == 3) ? -1 : 0;
      if (k >= 0 && k <= 8) v += (iq == 0 ? re : im) * g(k);
    end
    return v;
  endfunction

  task automatic load_bits(input int n);
    bits = new[n];
    for (int w = 0; w < F0_DEPTH; w++) f0_mem[w] = 32'h0101_0101;
    for (int i = 0; i < n; i++) begin
      bits[i] = ($urandom_range(0, 1) == 1) ? 1 : -1;
      if (i < 4 * F0_DEPTH)
        f0_mem[i / 4][31 - 8 * (i % 4) -: 8] = (bits[i] == 1) ? 8'h01 : 8'hFF;
    end
  endtask

  task automatic reset_dut();
    rst_n = 0; go = 0; src_done = 0; src_count = 0;
    for (int w = 0; w < F1_DEPTH; w++) f1_mem[w] = '0;
    busy_cycles = 0; wait_to_run = 0; run_to_wait = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
  endtask

  task automatic check_output(input int n, input string tag);
    fifo1_hdr_t h;
    iq_word_t   w;
    int bad = 0;
    h = fifo1_hdr_t'(f1_mem[0]);
    check(h.ready == 1'b1, {tag, ": header ready"});
    check(int'(h.count) == 4 * n + 9, $sformatf("%s: header count %0d exp %0d", tag, h.count, 4*n+9));
    for (int s = 0; s < 4 * n + 9; s++) begin
      w = iq_word_t'(f1_mem[1 + s]);
      if (int'(w.i) != expect_iq(s, n, 0) || int'(w.q) != expect_iq(s, n, 1)) begin
        bad++;
        if (bad < 5) $display("  %s s=%0d got I=%0d Q=%0d exp I=%0d Q=%0d", tag, s,
                              w.i, w.q, expect_iq(s, n, 0), expect_iq(s, n, 1));
      end
    end
    check(bad == 0, $sformatf("%s: %0d wrong sample words", tag, bad));
  endtask

  initial begin
    int n;
    // ---- run 1: whole window at once ----
    n = 21;
    load_bits(n);
    reset_dut();
    src_count <= 16'(n); src_done <= 1; go <= 1;
    wait (done);
    @(posedge clk);
    check_output(n, "run1");
    check(busy_cycles == 5 * n + (n + 3) / 4 + 8,
          $sformatf("run1: busy cycles %0d exp %0d", busy_cycles, 5 * n + (n + 3) / 4 + 8));
    check(!truncated, "run1: no truncation");

    // ---- run 2: bursts with pauses, late go ----
    n = 27;
    load_bits(n);
    reset_dut();
    repeat (10) @(posedge clk);
    check(state == MS_INIT, "run2: INIT holds until go");
    check(f1_mem[0] == 0, "run2: no header before the window ends");
    go <= 1;
    for (int c = 3; c <= n; c += 5) begin
      src_count <= 16'(c);
      repeat (40) @(posedge clk);
    end
    src_count <= 16'(n);
    repeat (40) @(posedge clk);
    check(!done, "run2: not done before src_done");
    src_done <= 1;
    wait (done);
    @(posedge clk);
    check_output(n, "run2");
    check(wait_to_run >= 5 && run_to_wait >= 5,
          $sformatf("run2: WAIT->RUN %0d RUN->WAIT %0d", wait_to_run, run_to_wait));

    // ---- run 3: more samples than FIFO 1 can take ----
    n = MAXB + 7;
    load_bits(n);
    reset_dut();
    src_count <= 16'(n); src_done <= 1; go <= 1;
    wait (done);
    @(posedge clk);
    check(truncated, "run3: truncated");
    check(int'(bits_done) == MAXB, $sformatf("run3: bits %0d exp %0d", bits_done, MAXB));
    check_output(MAXB, "run3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
