// pit_timer: free-running 32-bit cycle counter used to time one modulation
// run, in the manner of the processor's interval timer.
//
// The count is a 32-bit register that increases by one on every rising clock
// edge while `enable` is high. `clear` sets it to zero (clear wins over
// enable). The elapsed time of a task is the count read after it ends times
// the clock period. The counter wraps at 2^32; a separate sticky flag
// `wrapped` reports that, which is this design's own addition.
//
// Interface and timing: synchronous to clk, active-low asynchronous reset;
// `count` shows the value after the last edge.
module pit_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        enable,
  output logic [31:0] count,
  output logic        wrapped
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      wrapped <= 1'b0;
    end else if (clear) begin
      count   <= '0;
      wrapped <= 1'b0;
    end else if (enable) begin
      count <= count + 32'd1;
      if (count == '1) wrapped <= 1'b1;
    end
  end

endmodule
