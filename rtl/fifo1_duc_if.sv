// fifo1_duc_if: read side of FIFO 1, the memory interface between port B of
// FIFO 1's BlockRAM and the in-phase/quadrature inputs of the digital
// up-converter (DUC).
//
// How it works. After reset the interface keeps reading one fixed location,
// word 0 of the BlockRAM, on every cycle (POLL). The modulator clears that
// word when it starts and writes it last, once the whole window of I/Q
// samples is in place. The interface reacts to a change of the word: it
// first has to read it as not ready, and when the `ready` bit then shows up
// it takes the sample count from the same word and STREAMs words 1..count
// to the DUC, one per clock, then stops (DONE) until reset. A header left
// ready by an earlier window is therefore never taken for a new one. This polling of one location is the only
// synchronisation between the two clock domains of FIFO 1: no pointers or
// full/empty flags are kept, because a whole window fits one BlockRAM.
//
// The polled location and the start-on-value behaviour follow the design;
// the header format {ready, count} and word layout {I, Q} are own choices
// (see fm3tr_pkg).
//
// Interface and timing: everything is on clk_duc, the DUC input-rate clock
// (one sixteenth of the main clock in the default configuration), so the DUC
// receives one new I/Q sample per clk_duc cycle. BlockRAM reads have one
// cycle of latency; duc_nd is high in the cycles in which duc_din_i/q carry
// a sample, and the inputs are zero otherwise.
module fifo1_duc_if
  import fm3tr_pkg::*;
#(
  parameter int unsigned F1_DEPTH = 512,
  localparam int unsigned F1_AW   = $clog2(F1_DEPTH)
) (
  input  logic             clk_duc,
  input  logic             rst_n,

  output logic             b_en,
  output logic [F1_AW-1:0] b_addr,
  input  logic [31:0]      b_rdata,

  output q15_t             duc_din_i,
  output q15_t             duc_din_q,
  output logic             duc_nd,

  output logic             polling,
  output logic             streaming,
  output logic             done,
  output logic [15:0]      words_sent,
  output logic [15:0]      poll_count
);

  typedef enum logic [1:0] {F1_POLL, F1_STREAM, F1_DONE} f1_state_e;

  f1_state_e   state;
  logic        poll_valid;   // b_rdata holds word 0
  logic        armed;        // word 0 has been seen not ready
  logic        data_valid;   // b_rdata holds a sample word
  logic [15:0] count;
  logic [15:0] issued;
  fifo1_hdr_t  hdr;
  iq_word_t    word;

  assign hdr  = fifo1_hdr_t'(b_rdata);
  assign word = iq_word_t'(b_rdata);

  logic issue;
  assign issue = (state == F1_STREAM) && (issued < count);

  always_comb begin
    b_en   = 1'b0;
    b_addr = '0;
    if (state == F1_POLL) begin
      b_en = 1'b1;
    end else if (issue) begin
      b_en   = 1'b1;
      b_addr = F1_AW'(issued + 16'd1);
    end
  end

  assign duc_nd    = data_valid;
  assign duc_din_i = data_valid ? word.i : '0;
  assign duc_din_q = data_valid ? word.q : '0;
  assign polling   = (state == F1_POLL);
  assign streaming = (state == F1_STREAM);
  assign done      = (state == F1_DONE);

  always_ff @(posedge clk_duc or negedge rst_n) begin
    if (!rst_n) begin
      state      <= F1_POLL;
      poll_valid <= 1'b0;
      armed      <= 1'b0;
      data_valid <= 1'b0;
      count      <= '0;
      issued     <= '0;
      words_sent <= '0;
      poll_count <= '0;
    end else begin
      data_valid <= issue;
      if (data_valid) words_sent <= words_sent + 16'd1;
      unique case (state)
        F1_POLL: begin
          poll_valid <= 1'b1;
          if (poll_count != '1) poll_count <= poll_count + 16'd1;
          if (poll_valid && !hdr.ready) armed <= 1'b1;
          if (poll_valid && armed && hdr.ready) begin
            // a count beyond the BlockRAM is clipped to its last word
            count <= (32'(hdr.count) > F1_DEPTH - 1) ? 16'(F1_DEPTH - 1) : hdr.count;
            state <= F1_STREAM;
          end
        end
        F1_STREAM: begin
          if (issue) issued <= issued + 16'd1;
          else if (!data_valid) state <= F1_DONE;
        end
        default: ;
      endcase
    end
  end

  // a sample is presented only for words the modulator announced
  a_sent_le_count: assert property (@(posedge clk_duc) disable iff (!rst_n)
    duc_nd |-> words_sent < count);

endmodule
