// macrogate: the six-input macrogate of the PLB.
//
// Each of the six inputs passes a programmable inverter (cells L0..L5);
// the six resulting bits feed all four fixed functions g1..g4 in
// parallel; a 4-1 multiplexer steered by cells L6 and L7 picks one of
// them; a last programmable inverter (cell L8) sets the output polarity.
// With input and output negation the four functions cover the NPN classes
// of g1..g4 and every function that a constant or repeated input reduces
// them to.
// This structure follows the macrogate drawing. The select encoding
// ({L7,L6} = 0..3 picks g1..g4) and the inverting value of a cell (1)
// are this design's choices; see plb_pkg.
// Interface: in[5:0] from routing, cfg = L8..L0, out. Purely
// combinational: one polarity stage, one gate level, one 4-1 mux and one
// more polarity stage from any input to out.
module macrogate
  import plb_pkg::*;
(
  input  logic [MG_IN-1:0] in,
  input  mg_cfg_t          cfg,
  output logic             out
);

  logic [MG_IN-1:0]    x;       // inputs after polarity selection
  logic [MG_FUNCS-1:0] g;       // g1..g4
  logic                g_sel;   // multiplexer output

  for (genvar i = 0; i < MG_IN; i++) begin : g_in_pol
    prog_inv u_inv (.d(in[i]), .inv(cfg.in_inv[i]), .q(x[i]));
  end

  mg_gates u_gates (.x(x), .g(g));

  always_comb begin
    unique case (mg_sel_e'(cfg.sel))
      SEL_G1:  g_sel = g[0];
      SEL_G2:  g_sel = g[1];
      SEL_G3:  g_sel = g[2];
      SEL_G4:  g_sel = g[3];
      default: g_sel = g[0];
    endcase
  end

  prog_inv u_out_inv (.d(g_sel), .inv(cfg.out_inv), .q(out));

endmodule
