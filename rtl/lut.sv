// lut: K-input lookup table, the LUT of the PLB (K = 6 by default).
//
// The 2**K configuration bits hold the truth table; the inputs address
// one of them, so the output is mask[in]. The six-input size is the one
// the architecture specifies for its PLB; the table's bit order is this
// design's choice, and how the multiplexer tree is built at transistor
// level is left to the synthesis tool. Input in = 0 reads mask[0].
// Interface: in[K-1:0] from routing, mask[2**K-1:0] from configuration
// memory, out. Purely combinational.
module lut #(
  parameter int unsigned K = 6
) (
  input  logic [K-1:0]      in,
  input  logic [2**K-1:0]   mask,
  output logic              out
);

  always_comb out = mask[in];

endmodule
