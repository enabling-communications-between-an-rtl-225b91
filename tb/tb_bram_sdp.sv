// tb_bram_sdp: self-checking test of the dual-clock BlockRAM.
//
// Port A (write) runs on a 10 ns clock, port B (read) on a 26 ns clock.
// Random writes are mirrored in a reference array; every read is checked
// one port-B cycle later against the reference, and the read data must hold
// while b_en is low. The array must read as zero before it is written.
module tb_bram_sdp;
  localparam int DW = 32, DEPTH = 64, AW = 6;

  logic a_clk = 0, b_clk = 0;
  always #5  a_clk = ~a_clk;
  always #13 b_clk = ~b_clk;

  logic a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, b_rdata;
  logic [DW-1:0] ref_mem [DEPTH];

  bram_sdp #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [DW-1:0] expv;
    a_we = 0; b_en = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    for (int k = 0; k < DEPTH; k++) ref_mem[k] = '0;
    // reads before any write return zero
    for (int k = 0; k < 8; k++) begin
      @(negedge b_clk); b_en = 1; b_addr = AW'(k * 7);
      @(posedge b_clk); #1;
      check(b_rdata == 0, $sformatf("initial zero at %0d", k * 7));
    end
    b_en = 0;
    // writes on port A
    for (int k = 0; k < 200; k++) begin
      @(negedge a_clk);
      a_we = 1; a_addr = AW'($urandom_range(0, DEPTH - 1)); a_wdata = $urandom;
      ref_mem[a_addr] = a_wdata;
    end
    @(negedge a_clk); a_we = 0;
    // reads on port B, with idle cycles in between
    for (int k = 0; k < 100; k++) begin
      @(negedge b_clk);
      b_en = 1; b_addr = AW'($urandom_range(0, DEPTH - 1));
      expv = ref_mem[b_addr];
      @(posedge b_clk); #1;
      check(b_rdata == expv, $sformatf("read %0d got %h exp %h", b_addr, b_rdata, expv));
      @(negedge b_clk); b_en = 0; b_addr = b_addr + 1;
      @(posedge b_clk); #1;
      check(b_rdata == expv, "read data holds while b_en is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
