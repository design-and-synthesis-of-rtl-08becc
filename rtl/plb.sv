// plb: heterogeneous programmable logic block with one LUT and one
// six-input macrogate.
//
// The block pairs a K-input LUT (K = 6) with the macrogate, so a mapped
// netlist packs one LUT node and one macrogate node into each PLB; the
// tightest packing is reached when the mapped design uses LUTs and
// macrogates in the ratio 1:1. The two elements are independent: each has
// its own inputs from routing and its own output. Their configuration,
// 2**K LUT bits and the nine macrogate cells L0..L8, sits in one serial
// chain of 2**K + 9 cells:
//   cfg word [2**K-1:0]        LUT truth table (bit i = output for input i)
//   cfg word [2**K+8:2**K]     macrogate cells L0..L8 (plb_pkg::mg_cfg_t)
// The word is shifted in most significant bit first while cfg_en is high
// (2**K + 9 cycles); cfg_so continues the chain to the next PLB.
// The LUT and macrogate outputs are combinational in their inputs.
// One LUT plus one macrogate per block follows the source architecture;
// separate input pins for the two elements, the serial configuration and
// its bit layout are this design's choices.
module plb
  import plb_pkg::*;
#(
  parameter int unsigned LUT_K = LUT_K_DEF,
  localparam int unsigned LUT_BITS = 2**LUT_K,
  localparam int unsigned CFG_BITS = LUT_BITS + MG_CFG_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration chain
  input  logic             cfg_en,
  input  logic             cfg_si,
  output logic             cfg_so,
  // LUT
  input  logic [LUT_K-1:0] lut_in,
  output logic             lut_out,
  // macrogate
  input  logic [MG_IN-1:0] mg_in,
  output logic             mg_out
);

  logic [CFG_BITS-1:0] cfg_q;
  logic [LUT_BITS-1:0] lut_mask;
  mg_cfg_t             mg_cfg;

  cfg_chain #(.N(CFG_BITS)) u_cfg (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg_en (cfg_en),
    .cfg_si (cfg_si),
    .cfg_so (cfg_so),
    .cfg_q  (cfg_q)
  );

  assign lut_mask = cfg_q[LUT_BITS-1:0];
  assign mg_cfg   = mg_cfg_t'(cfg_q[CFG_BITS-1:LUT_BITS]);

  lut #(.K(LUT_K)) u_lut (
    .in   (lut_in),
    .mask (lut_mask),
    .out  (lut_out)
  );

  macrogate u_mg (
    .in  (mg_in),
    .cfg (mg_cfg),
    .out (mg_out)
  );

endmodule
