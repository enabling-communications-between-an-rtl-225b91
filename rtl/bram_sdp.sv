// bram_sdp: dual-ported BlockRAM with two independently clocked synchronous
// ports, one writing (port A) and one reading (port B).
//
// This is the storage behind all three FIFOs of the transmit chain. The
// BlockRAMs the design builds on have 18 Kb and two independently clocked
// ports onto a common array; the default shape here, 512 words of 32 bits,
// is the 16 Kb data part of such a block (the 2 Kb parity bits are not
// modelled). In every use of this design one side only writes and the other
// only reads, so the ports are specialised that way (own choice).
//
// Interface and timing:
//   port A (a_clk): when a_we is high at a rising edge, a_wdata is stored at
//                   a_addr.
//   port B (b_clk): when b_en is high at a rising edge, the word at b_addr
//                   appears on b_rdata after that edge (one cycle latency);
//                   b_rdata holds its value while b_en is low.
// A read of an address that is written in the same instant on the other
// clock returns either the old or the new word, as in the real part.
// The array starts cleared (as after configuration) so that a poller never
// sees stale contents; b_rdata is undefined until the first read.
module bram_sdp #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 512,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              a_clk,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,

  input  logic              b_clk,
  input  logic              b_en,
  input  logic [AW-1:0]     b_addr,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned k = 0; k < DEPTH; k++) mem[k] = '0;
  end

  always_ff @(posedge a_clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge b_clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
