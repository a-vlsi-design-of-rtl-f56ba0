// sram_2kb: the 2 KB on-chip SRAM of the data processor (2048 x 8 bits).
// It holds the demodulated main data, the CIRC deinterleave delay lines and
// the decoded frames waiting for the audio processor. Single port,
// synchronous: a write stores wdata at addr on the clock edge; a read
// returns the word at addr on rdata one cycle later. The size follows the
// document; the port arrangement is this design's. Written as an array so
// that synthesis maps it to a memory macro.
module sram_2kb #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
