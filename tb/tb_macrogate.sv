// tb_macrogate: exhaustive check of the six-input macrogate.
// All 512 settings of the cells L0..L8 are combined with all 64 input
// vectors (32768 checks). The reference applies the input polarities,
// evaluates g1..g4 in forms written independently of the block (AND of
// all bits, a 2-level multiplexer, a cube list and a product of sums),
// picks one by {L7,L6} and applies the output polarity.
// A last group shows a two-input exclusive-or built on the macrogate by
// pin assignment alone: steer g2's multiplexer with p and feed it q and ~q.
module tb_macrogate;
  import plb_pkg::*;

  logic [MG_IN-1:0] in;
  mg_cfg_t          cfg;
  logic             out;
  int checks = 0, failures = 0;

  macrogate dut (.in(in), .cfg(cfg), .out(out));

  function automatic logic ref_out(input logic [5:0] v, input logic [8:0] c);
    logic [5:0] x;
    logic a, b, cc, d, e, f;
    logic g;
    x = v ^ c[5:0];
    {f, e, d, cc, b, a} = x;
    case (c[7:6])
      2'd0: g = &x;
      2'd1: g = b ? (cc ? f : d) : (cc ? e : a);
      2'd2: g = (d & e & f) | (b & cc & e & f) | (a & !b & cc & !d & e);
      default: g = !((!a | b) & (a | !cc | d) & (b | cc) & e & f);
    endcase
    return g ^ c[8];
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 512; c++) begin
      for (int v = 0; v < 64; v++) begin
        cfg = mg_cfg_t'(9'(c));
        in  = 6'(v);
        #1;
        checks++;
        if (out !== ref_out(6'(v), 9'(c))) begin
          failures++;
          if (failures < 10)
            $display("FAIL cfg=%09b in=%06b out=%0b", c, v, out);
        end
      end
    end
    // XOR2 on the multiplexer gate g2: steer with p on pin b, feed q
    // true on pin a and complemented on pin d, pin c held at 0.
    cfg = '{out_inv: 1'b0, sel: SEL_G2, in_inv: 6'b001000};
    for (int v = 0; v < 4; v++) begin
      logic p, q;
      {p, q} = 2'(v);
      in = {1'b0, 1'b0, q, 1'b0, p, q};  // f e d c b a
      #1;
      checks++;
      if (out !== (p ^ q)) begin
        failures++;
        $display("FAIL xor2 p=%0b q=%0b out=%0b", p, q, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
