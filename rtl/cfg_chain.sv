// Configuration memory of the fabric.
//
// Holds the W configuration bits (multiplexer selects and LUT contents) that
// program the interconnect and the logic blocks. The bits are loaded serially:
// while cfg_en is high, every rising clk edge shifts cfg_in into bit W-1 and
// moves every bit one place down; bit 0 leaves on cfg_out so chains can be
// cascaded or read back. After W enabled cycles the first bit shifted in sits
// in bit 0. The bits keep their value while cfg_en is low; they are not
// reset, as SRAM configuration cells are not.
//
// The source architecture counts these bits as SRAM cells but does not say
// how they are written; the serial chain is this design's choice.
module cfg_chain #(
  parameter int W = 560
) (
  input  logic         clk,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  output logic [W-1:0] bits
);
  always_ff @(posedge clk)
    if (cfg_en) bits <= {cfg_in, bits[W-1:1]};

  assign cfg_out = bits[0];
endmodule
