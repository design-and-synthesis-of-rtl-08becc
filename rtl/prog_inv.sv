// prog_inv: programmable inverter, the polarity stage in front of each
// macrogate input and behind its output.
//
// The signal and its complement both reach a 2-1 multiplexer whose select
// is one configuration cell, as drawn for the macrogate. inv = 1 passes
// the complement, inv = 0 the true signal (the value that inverts is this
// design's choice). Purely combinational.
module prog_inv (
  input  logic d,    // signal in
  input  logic inv,  // configuration cell: 1 = invert
  output logic q     // d or ~d
);

  logic d_n;

  always_comb begin
    d_n = ~d;
    q   = inv ? d_n : d;
  end

endmodule
