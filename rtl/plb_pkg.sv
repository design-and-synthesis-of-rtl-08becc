// plb_pkg: sizes and the configuration word shared by the macrogate, the
// configuration chain and the programmable logic block (PLB).
//
// The macrogate has six inputs, four fixed functions g1..g4 and nine
// configuration cells L0..L8: L0..L5 set the polarity of inputs 0..5,
// L6 and L7 steer the 4-1 multiplexer, L8 sets the output polarity.
// The packed struct below puts cell Li at bit i of the 9-bit word.
// Which of L6/L7 is the more significant select bit, and which value of a
// polarity cell inverts, are choices of this design (1 = invert,
// select {L7,L6} = 0..3 picks g1..g4).
package plb_pkg;

  localparam int unsigned MG_IN       = 6;               // macrogate inputs
  localparam int unsigned MG_FUNCS    = 4;               // g1..g4
  localparam int unsigned MG_SEL_W    = $clog2(MG_FUNCS);
  localparam int unsigned MG_CFG_BITS = MG_IN + MG_SEL_W + 1;   // L0..L8
  localparam int unsigned LUT_K_DEF   = 6;               // LUT6 of the PLB

  typedef struct packed {
    logic                out_inv;  // L8
    logic [MG_SEL_W-1:0] sel;      // {L7, L6}
    logic [MG_IN-1:0]    in_inv;   // L5..L0
  } mg_cfg_t;

  // Select codes of the 4-1 multiplexer.
  typedef enum logic [MG_SEL_W-1:0] {
    SEL_G1 = 2'd0,
    SEL_G2 = 2'd1,
    SEL_G3 = 2'd2,
    SEL_G4 = 2'd3
  } mg_sel_e;

endpackage
