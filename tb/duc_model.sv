// duc_model: behavioural stand-in for the digital up-converter core, for
// simulation only. It is not the real core: the pulse-shaping, compensation
// and CIC filters are replaced by holding each input sample for RATE output
// samples, and the local oscillator is a quarter-rate carrier, so that
// dout = I*cos - Q*sin takes the values I, -Q, -I, Q in turn.
//
// Interface and timing: ce_in marks the clk cycle in which the input sample
// (din_i, din_q, qualified by nd) is taken, once per input-rate period. The
// RATE outputs of a sample appear on the following RATE clk cycles with rdy
// high, so samples taken every RATE cycles give an unbroken output stream.
module duc_model #(
  parameter int RATE = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce_in,
  input  logic signed [15:0] din_i,
  input  logic signed [15:0] din_q,
  input  logic               nd,
  output logic signed [15:0] dout,
  output logic               rdy
);
  logic signed [15:0] yi, yq;
  int                 left;
  logic [1:0]         ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yi <= '0; yq <= '0; left <= 0; ph <= '0; dout <= '0; rdy <= 1'b0;
    end else begin
      if (left > 0) begin
        unique case (ph)
          2'd0: dout <= yi;
          2'd1: dout <= -yq;
          2'd2: dout <= -yi;
          default: dout <= yq;
        endcase
        rdy <= 1'b1;
        ph  <= ph + 2'd1;
      end else begin
        rdy <= 1'b0;
      end
      if (ce_in && nd) begin
        yi <= din_i; yq <= din_q; left <= RATE;
      end else if (left > 0) begin
        left <= left - 1;
      end
    end
  end
endmodule
