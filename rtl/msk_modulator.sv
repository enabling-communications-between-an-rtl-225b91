// msk_modulator: FM3TR minimum-shift-keying modulator for one window of
// samples, reading FIFO 0 and writing the modulated I/Q samples into FIFO 1.
//
// How it works. MSK is generated in its recursive complex-envelope form:
// each input bit a_n (+1/-1) rotates the envelope symbol by a quarter turn,
// z_n = j * a_n * z_(n-1), so only the last z has to be kept. z is always
// one of +1, -1, +j, -j: a real z puts a half-sine pulse of sign z on the
// in-phase output, an imaginary z a pulse of sign Im(z) on the quadrature
// output. Consecutive bits therefore alternate between I and Q, each pulse
// lasting 2*Tb (9 sample values, 4 samples per Tb) and starting Tb after the
// previous one. Before the first bit a reference pulse (z = -j, a negative
// Q pulse) is sent so that later phase changes are known relative to it;
// with that reference, even bits land on I and odd bits on Q.
//
// The control follows the modulator's state machine: INIT clears the FIFO 1
// header, presents the reference pulse and waits for `go`; WAIT checks whether FIFO 0 holds a
// sample not yet used (src_count); RUN modulates every available sample and
// then returns to WAIT. When the source closes the window (src_done) and all
// samples are used, FLUSH sends the tail of the last pulse and writes the
// FIFO 1 header {ready, count}, which tells the DUC side to start; DONE
// holds until reset. FLUSH/DONE and the header are this design's own way of
// signalling the end of the window.
//
// The design runs this algorithm as software on the embedded processor;
// this module performs the same function in logic (own choice, so that the
// chain can be built and simulated without the processor).
//
// Interface and timing (all on clk, active-low asynchronous reset):
//   FIFO 0 read port : f0_en/f0_addr, f0_rdata valid one cycle later and held.
//   FIFO 1 write port: f1_we/f1_addr/f1_wdata, one I/Q word per cycle while
//                      emitting; sample s is written at address 1+s.
//   Per bit: one cycle to apply the bit, four cycles to write its four
//   samples, plus one FIFO 0 read cycle every fourth bit. A window of N bits
//   writes 4N+9 sample words; at most MAX_BITS bits fit FIFO 1, further
//   samples are ignored and `truncated` is raised.
module msk_modulator
  import fm3tr_pkg::*;
#(
  parameter int unsigned F0_DEPTH = 512,
  parameter int unsigned F1_DEPTH = 512,
  localparam int unsigned F0_AW   = $clog2(F0_DEPTH),
  localparam int unsigned F1_AW   = $clog2(F1_DEPTH),
  // 4N+9 words plus the header must fit FIFO 1; N samples must fit FIFO 0.
  localparam int unsigned MAX_BITS_F1 = (F1_DEPTH - 1 - PULSE_LEN) / SPS,
  localparam int unsigned MAX_BITS = (MAX_BITS_F1 < 4 * F0_DEPTH) ? MAX_BITS_F1 : 4 * F0_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,

  input  logic             go,          // controller: leave INIT
  input  logic [15:0]      src_count,   // samples present in FIFO 0
  input  logic             src_done,    // source has closed the window

  output logic             f0_en,
  output logic [F0_AW-1:0] f0_addr,
  input  logic [31:0]      f0_rdata,

  output logic             f1_we,
  output logic [F1_AW-1:0] f1_addr,
  output logic [31:0]      f1_wdata,

  output mod_state_e       state,
  output logic             busy,        // between leaving INIT and DONE
  output logic             done,
  output logic [15:0]      bits_done,
  output logic             truncated
);

  typedef enum logic [1:0] {R_FETCH, R_APPLY, R_EMIT} run_step_e;

  run_step_e   step;
  logic [15:0] s_idx;       // next output sample index
  logic [1:0]  emit_cnt;    // samples written for the current bit / flush
  logic [2:0]  flush_cnt;
  logic        z_real;      // z on the real axis (I) or imaginary axis (Q)
  logic        z_neg;       // sign of z
  logic [1:0]  sgn_i, sgn_q;// 2'b01 = +1, 2'b11 = -1, 2'b00 = silent
  logic        hdr_clr;     // FIFO 1 header has been cleared for this window

  logic [15:0] avail;
  assign avail = (src_count > 16'(MAX_BITS)) ? 16'(MAX_BITS) : src_count;

  // Current input sample: big-endian byte bits_done[1:0] of the FIFO 0 word;
  // a negative byte is -1, anything else +1.
  logic a_neg;
  always_comb begin
    unique case (bits_done[1:0])
      2'd0: a_neg = f0_rdata[31];
      2'd1: a_neg = f0_rdata[23];
      2'd2: a_neg = f0_rdata[15];
      default: a_neg = f0_rdata[7];
    endcase
  end

  // Output sample s: Q pulses start at s = 0 mod 8, I pulses at s = 4 mod 8.
  function automatic q15_t apply_sign(input logic [1:0] sg, input q15_t v);
    case (sg)
      2'b01:   return v;
      2'b11:   return -v;
      default: return '0;
    endcase
  endfunction

  iq_word_t  out_word;
  always_comb begin
    out_word.q = apply_sign(sgn_q, pulse_at({1'b0, s_idx[2:0]}));
    out_word.i = apply_sign(sgn_i, pulse_at({1'b0, s_idx[2:0] + 3'd4}));
  end

  logic emitting;
  assign emitting = (state == MS_INIT && hdr_clr && s_idx < 16'(SPS)) ||
                    (state == MS_RUN && step == R_EMIT) ||
                    (state == MS_FLUSH && flush_cnt < 3'(PULSE_LEN - SPS));

  always_comb begin
    f1_we    = 1'b0;
    f1_addr  = '0;
    f1_wdata = out_word;
    if (emitting) begin
      f1_we   = 1'b1;
      f1_addr = F1_AW'(s_idx + 16'd1);
    end else if (state == MS_INIT && !hdr_clr) begin
      // first action after reset: mark FIFO 1 as not ready
      f1_we    = 1'b1;
      f1_addr  = '0;
      f1_wdata = '0;
    end else if (state == MS_FLUSH) begin
      // header after the last sample word
      f1_we    = 1'b1;
      f1_addr  = '0;
      f1_wdata = fifo1_hdr_t'{ready: 1'b1, rsvd: '0, count: s_idx};
    end
  end

  assign f0_en   = (state == MS_RUN) && (step == R_FETCH);
  assign f0_addr = F0_AW'(bits_done >> 2);

  assign busy = (state == MS_WAIT) || (state == MS_RUN) || (state == MS_FLUSH);
  assign done = (state == MS_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= MS_INIT;
      step      <= R_FETCH;
      s_idx     <= '0;
      emit_cnt  <= '0;
      flush_cnt <= '0;
      z_real    <= 1'b0;      // reference symbol z = -j
      z_neg     <= 1'b1;
      sgn_q     <= 2'b11;     // reference pulse: negative on Q
      sgn_i     <= 2'b00;
      bits_done <= '0;
      truncated <= 1'b0;
      hdr_clr   <= 1'b0;
    end else begin
      hdr_clr <= 1'b1;
      if (emitting) s_idx <= s_idx + 16'd1;
      unique case (state)
        MS_INIT: begin
          if (s_idx >= 16'(SPS) && go) state <= MS_WAIT;
        end
        MS_WAIT: begin
          if (bits_done < avail) begin
            // always re-read: the source may have refilled the current word
            state <= MS_RUN;
            step  <= R_FETCH;
          end else if (src_done) begin
            state     <= MS_FLUSH;
            truncated <= (src_count > 16'(MAX_BITS));
            // the branch whose next pulse would start carries no more bits
            if (z_real) sgn_q <= 2'b00;
            else        sgn_i <= 2'b00;
          end
        end
        MS_RUN: begin
          unique case (step)
            R_FETCH: step <= R_APPLY;
            R_APPLY: begin
              // z_n = j * a_n * z_(n-1)
              //   real r      -> imaginary r*a
              //   imaginary q -> real -q*a
              z_real    <= ~z_real;
              z_neg     <= z_real ? (z_neg ^ a_neg) : ~(z_neg ^ a_neg);
              if (z_real) sgn_q <= (z_neg ^ a_neg) ? 2'b11 : 2'b01;
              else        sgn_i <= (z_neg ^ a_neg) ? 2'b01 : 2'b11;
              bits_done <= bits_done + 16'd1;
              emit_cnt  <= '0;
              step      <= R_EMIT;
            end
            default: begin  // R_EMIT
              emit_cnt <= emit_cnt + 2'd1;
              if (emit_cnt == 2'(SPS - 1)) begin
                if (bits_done < avail)
                  step <= (bits_done[1:0] == 2'd0) ? R_FETCH : R_APPLY;
                else
                  state <= MS_WAIT;          // check for new data
              end
            end
          endcase
        end
        MS_FLUSH: begin
          if (flush_cnt < 3'(PULSE_LEN - SPS)) flush_cnt <= flush_cnt + 3'd1;
          else                                 state     <= MS_DONE;
        end
        default: ;  // MS_DONE holds
      endcase
    end
  end

  // FIFO 1 is never written beyond its last word, and the header is only
  // written once all sample words are in place.
  a_f1_range: assert property (@(posedge clk) disable iff (!rst_n)
    f1_we && f1_addr != '0 |-> 32'(s_idx) + 1 < F1_DEPTH);
  a_hdr_last: assert property (@(posedge clk) disable iff (!rst_n)
    f1_we && f1_addr == '0 && f1_wdata[31] |-> state == MS_FLUSH && s_idx == 16'(SPS) * bits_done + 16'(PULSE_LEN));

endmodule
