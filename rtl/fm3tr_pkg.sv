// fm3tr_pkg: constants and types shared by the FM3TR transmit chain
// (MSK modulator -> FIFO 1 -> digital up-converter -> FIFO 2).
//
// Numeric formats follow the design: modulator input samples are 8-bit
// two's-complement values of +1 or -1, four of them packed into each 32-bit
// BlockRAM word; modulator outputs are 16-bit two's-complement values with 15
// fractional bits (Q1.15). The symbol rate is 25,000 symbols/s with 4 output
// samples per symbol, so one half-sine pulse spans 2*Tb = 8 sample intervals
// and is described by 9 sample values.
//
// Own choices of this implementation (not fixed by the design description):
//  * the big-endian byte order of the packed input samples (sample 4k+0 in
//    bits 31:24), matching the PowerPC's storage of a char array;
//  * the FIFO 1 layout: word 0 is a ready/count header that the DUC-side
//    interface polls, the I/Q sample pairs follow from word 1 on, with I in
//    bits 31:16 and Q in bits 15:0.
package fm3tr_pkg;

  // Samples per symbol interval Tb and samples per half-sine pulse (2*Tb + 1).
  localparam int unsigned SPS        = 4;
  localparam int unsigned PULSE_LEN  = 2 * SPS + 1;   // 9

  // Q1.15 half-sine pulse g[k] = round(32767 * sin(pi*k/8)), k = 0..8.
  // It is symmetric, so only k = 0..4 is stored; g[8-k] = g[k].
  typedef logic signed [15:0] q15_t;
  localparam q15_t PULSE_Q15 [0:4] = '{16'sd0, 16'sd12539, 16'sd23170,
                                       16'sd30273, 16'sd32767};

  function automatic q15_t pulse_at(input logic [3:0] k);
    logic [3:0] m;
    m = (k > 4'd4) ? 4'd8 - k : k;
    return PULSE_Q15[m[2:0]];
  endfunction

  // One modulator output word in FIFO 1: in-phase and quadrature sample.
  typedef struct packed {
    q15_t i;
    q15_t q;
  } iq_word_t;

  // FIFO 1 header word (address 0). The DUC-side interface waits until
  // ready is set, then streams `count` I/Q words from address 1 on.
  typedef struct packed {
    logic        ready;
    logic [14:0] rsvd;
    logic [15:0] count;
  } fifo1_hdr_t;

  // Modulator control states. INIT, WAIT and RUN are the three states of the
  // modulator state machine; FLUSH finishes the last pulse and publishes the
  // FIFO 1 header, DONE holds the result.
  typedef enum logic [2:0] {
    MS_INIT  = 3'd0,
    MS_WAIT  = 3'd1,
    MS_RUN   = 3'd2,
    MS_FLUSH = 3'd3,
    MS_DONE  = 3'd4
  } mod_state_e;

endpackage
