// fifo2_wr_if: write side of FIFO 2, the memory interface that stores the
// digital up-converter's passband output in a BlockRAM.
//
// How it works. After reset the interface waits for the first qualified DUC
// output (duc_rdy high). From that sample on it writes every qualified
// output to the next BlockRAM address, one per clock, starting at address 0.
// It stops for good at the first unqualified output after the start, or when
// the BlockRAM is full; `stop_full` tells the two cases apart. There is no
// read pointer and no wrap-around: the consumer reads the stored window
// afterwards through the BlockRAM's other port.
//
// Interface and timing: on clk, the DUC output clock; active-low asynchronous
// reset. The write to the BlockRAM is combinational from duc_rdy/duc_dout,
// so a sample is stored at the same edge at which it is qualified.
// `count` is the number of samples stored so far.
module fifo2_wr_if #(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned F2_DEPTH = 1024,
  localparam int unsigned F2_AW   = $clog2(F2_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,

  input  logic [DATA_W-1:0] duc_dout,
  input  logic              duc_rdy,

  output logic              a_we,
  output logic [F2_AW-1:0]  a_addr,
  output logic [DATA_W-1:0] a_wdata,

  output logic              waiting,
  output logic              capturing,
  output logic              done,
  output logic              stop_full,
  output logic [F2_AW:0]    count
);

  typedef enum logic [1:0] {F2_WAIT, F2_CAPTURE, F2_DONE} f2_state_e;
  f2_state_e state;

  logic room;
  assign room = (count < (F2_AW+1)'(F2_DEPTH));

  assign a_we    = duc_rdy && room && (state != F2_DONE);
  assign a_addr  = count[F2_AW-1:0];
  assign a_wdata = duc_dout;

  assign waiting   = (state == F2_WAIT);
  assign capturing = (state == F2_CAPTURE);
  assign done      = (state == F2_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= F2_WAIT;
      count     <= '0;
      stop_full <= 1'b0;
    end else begin
      if (a_we) count <= count + 1'b1;
      unique case (state)
        F2_WAIT: begin
          if (duc_rdy) state <= F2_CAPTURE;
        end
        F2_CAPTURE: begin
          if (!room) begin
            state     <= F2_DONE;
            stop_full <= 1'b1;
          end else if (!duc_rdy) begin
            state <= F2_DONE;
          end
        end
        default: ;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    a_we |-> count < (F2_AW+1)'(F2_DEPTH));

endmodule
