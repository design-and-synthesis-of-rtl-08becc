// cfg_chain: configuration memory of a PLB, loaded serially.
//
// N configuration cells form a shift register. While cfg_en is high,
// every rising clock edge moves the word one place towards bit N-1 and
// takes cfg_si into bit 0; bit N-1 leaves on cfg_so so that blocks can
// be chained. A bit sent first therefore ends in bit N-1 after N enabled
// cycles, i.e. a block's word is sent most significant bit first. While
// cfg_en is low the cells hold their contents and drive cfg_q to the
// logic they configure. An active-low synchronous reset clears all cells.
// The use of configuration cells follows the macrogate drawing and the
// bitstream of the flow; the serial chain, its bit order and the reset are
// this design's choices.
module cfg_chain #(
  parameter int unsigned N = 73
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,   // shift enable
  input  logic         cfg_si,   // serial in
  output logic         cfg_so,   // serial out (bit N-1)
  output logic [N-1:0] cfg_q     // configuration word
);

  always_ff @(posedge clk) begin
    if (!rst_n)      cfg_q <= '0;
    else if (cfg_en) cfg_q <= {cfg_q[N-2:0], cfg_si};
  end

  assign cfg_so = cfg_q[N-1];

endmodule
