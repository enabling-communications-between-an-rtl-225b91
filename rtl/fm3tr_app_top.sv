// fm3tr_app_top: FM3TR transmit chain in its all-on-chip-memory form:
// FIFO 0 -> MSK modulator -> FIFO 1 -> [digital up-converter] -> FIFO 2.
//
// How it works. An external source fills FIFO 0 with packed +1/-1 samples
// and reports how many are present. The modulator turns them into 16-bit
// I/Q samples (4 per symbol) and writes them through FIFO 1's write port,
// the data-side memory port of the processor in the original system. When
// the window is complete it writes the FIFO 1 header; fifo1_duc_if, on the
// other BlockRAM port and clocked at the DUC input rate (clk_duc), polls that
// header and then streams one I/Q sample per clk_duc cycle to the DUC. The
// DUC itself is a vendor core and is not part of this RTL: its input and
// output signals are ports of this module. The DUC's qualified passband
// output comes back in on clk and fifo2_wr_if stores it in FIFO 2, which an
// external sink reads through sink_en/sink_addr. A 32-bit interval timer
// counts the clk cycles the modulator spends on the window.
//
// Clocks: clk is the main clock (100 MHz on the original board), used by
// the modulator, FIFO 0, the write side of FIFO 1, the DUC output and FIFO 2.
// clk_duc is the DUC input-rate clock, clk/16 for the default rate change of
// 16, produced outside this module by a clock manager; it clocks FIFO 1's
// read side. rst_n is an asynchronous active-low reset for both domains and
// must be released synchronously to each (own choice).
//
// Sizes: every FIFO is one BlockRAM. FIFO 0 and FIFO 1 are 512 x 32 bits,
// FIFO 2 is 1024 x 16 bits (the DUC output width of 16 bits is assumed).
module fm3tr_app_top
  import fm3tr_pkg::*;
#(
  parameter int unsigned F0_DEPTH = 512,
  parameter int unsigned F1_DEPTH = 512,
  parameter int unsigned F2_DEPTH = 1024,
  parameter int unsigned DOUT_W   = 16,
  localparam int unsigned F0_AW   = $clog2(F0_DEPTH),
  localparam int unsigned F2_AW   = $clog2(F2_DEPTH)
) (
  input  logic              clk,
  input  logic              clk_duc,
  input  logic              rst_n,

  // source side of FIFO 0 and the radio controller's start signal
  input  logic              src_we,
  input  logic [F0_AW-1:0]  src_addr,
  input  logic [31:0]       src_wdata,
  input  logic [15:0]       src_count,
  input  logic              src_done,
  input  logic              ctrl_go,

  // to the DUC core (clk_duc domain)
  output q15_t              duc_din_i,
  output q15_t              duc_din_q,
  output logic              duc_nd,
  // from the DUC core (clk domain)
  input  logic [DOUT_W-1:0] duc_dout,
  input  logic              duc_rdy,

  // sink side of FIFO 2
  input  logic              sink_en,
  input  logic [F2_AW-1:0]  sink_addr,
  output logic [DOUT_W-1:0] sink_rdata,

  // status
  output mod_state_e        mod_state,
  output logic              mod_done,
  output logic              mod_truncated,
  output logic [15:0]       mod_bits,
  output logic [31:0]       mod_cycles,
  output logic              mod_cycles_wrapped,
  output logic              f1_polling,
  output logic              f1_done,
  output logic [15:0]       f1_words_sent,
  output logic [15:0]       f1_polls,
  output logic              f2_capturing,
  output logic              f2_done,
  output logic              f2_full,
  output logic [F2_AW:0]    f2_count
);

  localparam int unsigned F1_AW = $clog2(F1_DEPTH);

  // ---------------- FIFO 0: source -> modulator ----------------
  logic             f0_en;
  logic [F0_AW-1:0] f0_addr;
  logic [31:0]      f0_rdata;

  bram_sdp #(.DATA_W(32), .DEPTH(F0_DEPTH)) u_fifo0 (
    .a_clk(clk), .a_we(src_we), .a_addr(src_addr), .a_wdata(src_wdata),
    .b_clk(clk), .b_en(f0_en),  .b_addr(f0_addr),  .b_rdata(f0_rdata)
  );

  // ---------------- modulator ----------------
  logic             f1_we;
  logic [F1_AW-1:0] f1_waddr;
  logic [31:0]      f1_wdata;
  logic             mod_busy;

  msk_modulator #(.F0_DEPTH(F0_DEPTH), .F1_DEPTH(F1_DEPTH)) u_mod (
    .clk, .rst_n,
    .go(ctrl_go), .src_count, .src_done,
    .f0_en, .f0_addr, .f0_rdata,
    .f1_we, .f1_addr(f1_waddr), .f1_wdata,
    .state(mod_state), .busy(mod_busy), .done(mod_done),
    .bits_done(mod_bits), .truncated(mod_truncated)
  );

  // interval timer: cleared while the modulator waits in INIT, counts while
  // it works on the window, holds the result afterwards
  pit_timer u_pit (
    .clk, .rst_n,
    .clear(mod_state == MS_INIT), .enable(mod_busy),
    .count(mod_cycles), .wrapped(mod_cycles_wrapped)
  );

  // ---------------- FIFO 1: modulator -> DUC ----------------
  logic             f1_ren;
  logic [F1_AW-1:0] f1_raddr;
  logic [31:0]      f1_rdata;

  bram_sdp #(.DATA_W(32), .DEPTH(F1_DEPTH)) u_fifo1 (
    .a_clk(clk),     .a_we(f1_we),  .a_addr(f1_waddr), .a_wdata(f1_wdata),
    .b_clk(clk_duc), .b_en(f1_ren), .b_addr(f1_raddr), .b_rdata(f1_rdata)
  );

  fifo1_duc_if #(.F1_DEPTH(F1_DEPTH)) u_f1if (
    .clk_duc, .rst_n,
    .b_en(f1_ren), .b_addr(f1_raddr), .b_rdata(f1_rdata),
    .duc_din_i, .duc_din_q, .duc_nd,
    .polling(f1_polling), .streaming(), .done(f1_done),
    .words_sent(f1_words_sent), .poll_count(f1_polls)
  );

  // ---------------- FIFO 2: DUC -> sink ----------------
  logic              f2_we;
  logic [F2_AW-1:0]  f2_waddr;
  logic [DOUT_W-1:0] f2_wdata;

  fifo2_wr_if #(.DATA_W(DOUT_W), .F2_DEPTH(F2_DEPTH)) u_f2if (
    .clk, .rst_n,
    .duc_dout, .duc_rdy,
    .a_we(f2_we), .a_addr(f2_waddr), .a_wdata(f2_wdata),
    .waiting(), .capturing(f2_capturing), .done(f2_done),
    .stop_full(f2_full), .count(f2_count)
  );

  bram_sdp #(.DATA_W(DOUT_W), .DEPTH(F2_DEPTH)) u_fifo2 (
    .a_clk(clk), .a_we(f2_we),   .a_addr(f2_waddr),  .a_wdata(f2_wdata),
    .b_clk(clk), .b_en(sink_en), .b_addr(sink_addr), .b_rdata(sink_rdata)
  );

endmodule
