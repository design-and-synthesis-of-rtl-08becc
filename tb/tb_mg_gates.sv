// tb_mg_gates: exhaustive check of the four macrogate functions.
// The reference forms are written differently from the block:
//   g1: all six inputs high
//   g2: a multiplexer of {a,e,d,f} indexed by {b,c}
//   g3: true when d,e,f all high, when b,c,e,f all high, or for the
//       single cube a=1,b=0,c=1,d=0,e=1
//   g4: complement of its product-of-sums form
//       (a'+b)(a+c'+d)(b+c) e f
// Every one of the 64 input vectors is checked for each function.
module tb_mg_gates;
  import plb_pkg::*;

  logic [MG_IN-1:0]    x;
  logic [MG_FUNCS-1:0] g;
  int checks = 0, failures = 0;

  mg_gates dut (.x(x), .g(g));

  function automatic logic [3:0] ref_g(input logic [5:0] v);
    logic a, b, c, d, e, f;
    logic [3:0] r;
    logic [3:0] mux_data;
    a = v[0]; b = v[1]; c = v[2]; d = v[3]; e = v[4]; f = v[5];
    r[0] = (v == 6'h3f);
    // index {b,c}: 00 -> a, 01 -> e, 10 -> d, 11 -> f
    mux_data = {f, d, e, a};
    r[1] = mux_data[{b, c}];
    r[2] = (v[5:3] == 3'b111) || ({b, c, e, f} == 4'b1111) ||
           ({e, d, c, b, a} == 5'b10101);
    r[3] = !((!a || b) && (a || !c || d) && (b || c) && e && f);
    return r;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ones [4] = '{0, 0, 0, 0};
    for (int i = 0; i < 64; i++) begin
      x = 6'(i);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (g[k] !== ref_g(x)[k]) begin
          failures++;
          $display("FAIL g%0d x=%06b got %0b want %0b", k + 1, x, g[k], ref_g(x)[k]);
        end
        if (g[k]) ones[k]++;
      end
    end
    // On-set sizes counted by hand from the sums of products.
    checks++;
    if (ones[0] != 1 || ones[1] != 32 || ones[2] != 12 || ones[3] != 56) begin
      failures++;
      $display("FAIL on-set sizes %0d %0d %0d %0d", ones[0], ones[1], ones[2], ones[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
