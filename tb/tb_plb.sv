// tb_plb: end-to-end test of the programmable logic block at its default
// size (LUT6 plus six-input macrogate, 73 configuration cells).
//
// The block is configured only through its serial chain, as a bitstream
// would configure it, and then exercised through its pins:
//  - after reset the LUT must read all zeros and the macrogate must be g1
//    (AND of the six inputs, no inversion);
//  - 150 random configuration words are loaded; each load must take
//    exactly 73 enabled clocks, the previous word must leave on cfg_so
//    most significant bit first, and for every word all 64 LUT input
//    vectors and all 64 macrogate input vectors are compared with a
//    reference model written independently of the RTL;
//  - with the enable low the configuration must hold while cfg_si toggles;
//  - four small functions, a'b', ab'+a'b, ab'+a'c' and ab'c'+a'bc'+a'b'c
//    (exactly one of three inputs high), are realised twice, once as a
//    LUT truth table and once on the macrogate by pin assignment alone
//    (one signal on several pins, constant pins, input polarities), and
//    both outputs are compared with the function.
// Every mechanism (chain load, chain pass-through, hold, each of g1..g4
// selected, input inversion, output inversion, LUT evaluation, mapping by
// pin assignment) is counted; one that never happened counts a failure.
module tb_plb;
  import plb_pkg::*;

  localparam int unsigned K   = LUT_K_DEF;
  localparam int unsigned LB  = 2**K;
  localparam int unsigned CB  = LB + MG_CFG_BITS;

  logic             clk = 1'b0;
  logic             rst_n, cfg_en, cfg_si, cfg_so;
  logic [K-1:0]     lut_in;
  logic             lut_out;
  logic [MG_IN-1:0] mg_in;
  logic             mg_out;

  logic [CB-1:0]    cur_word;   // word now held by the block
  int checks = 0, failures = 0;

  typedef enum int {
    M_LOAD, M_PASS, M_HOLD, M_G1, M_G2, M_G3, M_G4,
    M_IN_INV, M_OUT_INV, M_LUT, M_PINMAP, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"chain load", "chain pass-through", "hold",
    "g1 selected", "g2 selected", "g3 selected", "g4 selected",
    "input inversion", "output inversion", "LUT evaluation",
    "mapping by pin assignment"};

  plb dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Reference macrogate: polarity, four functions, select, polarity.
  function automatic logic ref_mg(input logic [5:0] v, input logic [8:0] c);
    logic [5:0] x;
    logic a, b, cc, d, e, f, g;
    x = v ^ c[5:0];
    {f, e, d, cc, b, a} = x;
    case (c[7:6])
      2'd0:    g = &x;
      2'd1:    g = b ? (cc ? f : d) : (cc ? e : a);
      2'd2:    g = (d & e & f) | (b & cc & e & f) | (a & !b & cc & !d & e);
      default: g = !((!a | b) & (a | !cc | d) & (b | cc) & e & f);
    endcase
    return g ^ c[8];
  endfunction

  // Shift a word in, most significant bit first, checking what leaves.
  task automatic load(input logic [CB-1:0] w);
    int cycles = 0;
    for (int i = CB - 1; i >= 0; i--) begin
      check(cfg_so == cur_word[i], $sformatf("cfg_so bit %0d", i));
      cfg_en = 1'b1;
      cfg_si = w[i];
      @(posedge clk);
      cycles++;
      #1;
    end
    cfg_en = 1'b0;
    mech[M_PASS]++;
    check(cycles == CB, "load takes one clock per cell");
    cur_word = w;
    mech[M_LOAD]++;
  endtask

  // All LUT and macrogate input vectors against the reference.
  task automatic sweep();
    logic [LB-1:0] mask;
    mg_cfg_t       mc;
    mask = cur_word[LB-1:0];
    mc   = mg_cfg_t'(cur_word[CB-1:LB]);
    for (int v = 0; v < LB; v++) begin
      lut_in = K'(v);
      mg_in  = 6'(v);
      #1;
      check(lut_out == mask[v], $sformatf("lut in=%0d", v));
      check(mg_out == ref_mg(6'(v), 9'(mc)), $sformatf("mg cfg=%03h in=%0d", 9'(mc), v));
    end
    mech[M_LUT]++;
    mech[M_G1 + int'(mc.sel)]++;
    if (mc.in_inv != '0) mech[M_IN_INV]++;
    if (mc.out_inv)      mech[M_OUT_INV]++;
  endtask

  function automatic logic [CB-1:0] rand_word();
    logic [95:0] r;
    r = {$urandom(), $urandom(), $urandom()};
    return CB'(r);
  endfunction

  // Truth table over lut_in[2:0] = {c,b,a}; upper LUT inputs held at 0,
  // so only the first eight bits matter.
  function automatic logic [LB-1:0] table3(input logic [7:0] t);
    return LB'(t);
  endfunction

  // One small function realised on the LUT and on the macrogate;
  // pinmap selects how a, b, c are wired to the macrogate pins.
  task automatic map_check(input string name, input logic [7:0] tt,
                           input mg_cfg_t mc, input int pinmap);
    load({9'(mc), table3(tt)});
    for (int v = 0; v < 8; v++) begin
      logic a, b, c;
      {c, b, a} = 3'(v);
      lut_in = K'(v);
      case (pinmap)
        // f e d c b a
        0: mg_in = {1'b1, 1'b1, 1'b1, 1'b1, b, a};     // AND of a,b; rest 1
        1: mg_in = {1'b0, 1'b0, a, 1'b0, b, a};        // XOR: b steers a / ~a
        2: mg_in = {1'b0, 1'b0, b, 1'b0, a, c};        // a steers ~c / ~b
        default: mg_in = {1'b0, a, a, c, b, a};        // one-hot of a,b,c
      endcase
      #1;
      check(lut_out == tt[v], $sformatf("%s on LUT, abc=%0b%0b%0b", name, a, b, c));
      check(mg_out == tt[v], $sformatf("%s on macrogate, abc=%0b%0b%0b", name, a, b, c));
    end
    mech[M_PINMAP]++;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CB-1:0] w;
    foreach (mech[i]) mech[i] = 0;
    rst_n = 1'b0; cfg_en = 1'b0; cfg_si = 1'b0; lut_in = '0; mg_in = '0;
    cur_word = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Reset state: LUT all zeros, macrogate = g1 without inversion.
    sweep();

    // Random configurations; the first eight cover every select code
    // with and without output inversion.
    for (int t = 0; t < 150; t++) begin
      w = rand_word();
      if (t < 8) w[CB-1:LB+MG_IN] = 3'(t);
      load(w);
      sweep();
    end

    // Hold: enable low, serial input toggling.
    for (int i = 0; i < 20; i++) begin
      cfg_si = ~cfg_si;
      @(posedge clk);
    end
    #1;
    sweep();
    mech[M_HOLD]++;

    // Small functions, with a = bit 0 of the truth-table index, b = bit 1,
    // c = bit 2.
    // a'b': g1 with pins a and b inverted, other pins tied to 1.
    map_check("a'b'", 8'b0001_0001,
              '{out_inv: 1'b0, sel: SEL_G1, in_inv: 6'b000011}, 0);
    // ab' + a'b: g2, pin b = b steers pin a = a and pin d = ~a.
    map_check("ab'+a'b", 8'b0110_0110,
              '{out_inv: 1'b0, sel: SEL_G2, in_inv: 6'b001000}, 1);
    // ab' + a'c': g2, pin b = a steers pin a = ~c and pin d = ~b.
    map_check("ab'+a'c'", 8'b0010_0111,
              '{out_inv: 1'b0, sel: SEL_G2, in_inv: 6'b001001}, 2);
    // ab'c' + a'bc' + a'b'c: g2, pins b,c = b,c steer a / ~a / ~a / 0.
    map_check("ab'c'+a'bc'+a'b'c", 8'b0001_0110,
              '{out_inv: 1'b0, sel: SEL_G2, in_inv: 6'b011000}, 3);

    // Reset clears the whole word again.
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    cur_word = '0;
    sweep();

    foreach (mech[i]) begin
      $display("mechanism %-26s happened %0d times", mech_name[i], mech[i]);
      check(mech[i] > 0, {"mechanism never happened: ", mech_name[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
