// mg_gates: the four fixed six-input functions of the macrogate.
//
// They are the NPN-class representatives chosen for the macrogate,
// written here as the sums of products that define them (inputs a..f are
// x[0]..x[5], a primed letter is a complemented input):
//   g1 = abcdef
//   g2 = ab'c' + bcf + bc'd + b'ce        (a 4-1 multiplexer of a,e,d,f
//                                          steered by b and c)
//   g3 = ab'cd'e + bcef + def
//   g4 = ab' + a'cd' + b'c' + e' + f'
// Interface: x in, g[0]=g1 .. g[3]=g4 out. Purely combinational.
module mg_gates
  import plb_pkg::*;
(
  input  logic [MG_IN-1:0]    x,
  output logic [MG_FUNCS-1:0] g
);

  logic a, b, c, d, e, f;

  always_comb begin
    {f, e, d, c, b, a} = x;
    g[0] = a & b & c & d & e & f;
    g[1] = (a & ~b & ~c) | (b & c & f) | (b & ~c & d) | (~b & c & e);
    g[2] = (a & ~b & c & ~d & e) | (b & c & e & f) | (d & e & f);
    g[3] = (a & ~b) | (~a & c & ~d) | (~b & ~c) | ~e | ~f;
  end

endmodule
