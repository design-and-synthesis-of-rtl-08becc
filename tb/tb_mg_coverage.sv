// tb_mg_coverage: which two- and three-input functions the macrogate can
// realise by pin assignment alone.
//
// Each of the six macrogate pins is given one of eight sources: constant
// 0, constant 1, or one of the variables a, b, c, true or complemented
// (a complemented variable is fed true and inverted by the pin's own
// polarity cell). With the four select codes that is 8^6 * 4 = 1 048 576
// configurations. Eight copies of the macrogate evaluate one
// configuration for all eight values of (a, b, c) at once, giving the
// 8-bit truth table of the realised function; its complement is reached
// too, through the output inversion cell.
// Two counts are kept:
//   constants only  - every variable on at most one pin, the rest tied to
//                     constants (fixing inputs of a gate, nothing more);
//   shared pins     - a variable may drive several pins.
// Checks: every evaluation against a reference model written
// independently of the RTL; the reached sets must be unions of whole NPN
// classes (input permutation and negation and output negation are all
// available); with shared pins all 16 two-input functions and the
// three-input functions ab'c'+a'bc'+a'b'c, ab'c+a'bc'+a'b'c and
// ab'+a'c' must be reached; and the NPN classifier of this testbench must
// find the 14 classes of three-input functions.
// The counts printed are over functions and classes, each counted once,
// not weighted by how often an application uses them.
module tb_mg_coverage;
  import plb_pkg::*;

  logic [MG_IN-1:0] pin_in [8];
  logic [7:0]       out_v;
  mg_cfg_t          cfg;
  int checks = 0, failures = 0;

  for (genvar v = 0; v < 8; v++) begin : g_copy
    macrogate u_mg (.in(pin_in[v]), .cfg(cfg), .out(out_v[v]));
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

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

  // Smallest truth table among the 96 NPN transforms of tt.
  function automatic logic [7:0] npn_canon(input logic [7:0] tt);
    int perm [6][3] = '{'{0,1,2}, '{0,2,1}, '{1,0,2}, '{1,2,0}, '{2,0,1}, '{2,1,0}};
    logic [7:0] best = 8'hff;
    for (int p = 0; p < 6; p++)
      for (int n = 0; n < 8; n++)
        for (int o = 0; o < 2; o++) begin
          logic [7:0] t;
          for (int v = 0; v < 8; v++) begin
            logic [2:0] u;
            for (int j = 0; j < 3; j++) u[j] = v[perm[p][j]] ^ n[j];
            t[v] = tt[u] ^ o[0];
          end
          if (t < best) best = t;
        end
    return best;
  endfunction

  initial begin : watchdog
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic reach_c [256];
    logic reach_s [256];
    logic is_class [256];
    automatic int n_c3 = 0, n_s3 = 0, n_c2 = 0, n_s2 = 0, n_cls = 0, n_cls_c = 0, n_cls_s = 0;
    automatic int bad = 0;
    foreach (reach_c[i]) begin
      reach_c[i] = 1'b0; reach_s[i] = 1'b0; is_class[i] = 1'b0;
    end

    for (int s = 0; s < 4; s++) begin
      for (int p = 0; p < (1 << 18); p++) begin
        logic [5:0] inv;
        int uses [3];
        logic single;
        logic [7:0] tt;
        uses = '{0, 0, 0};
        for (int i = 0; i < 6; i++) begin
          logic [2:0] code;
          code = 3'(p >> (3 * i));
          inv[i] = (code >= 3'd2) && !code[0];
          if (code >= 3'd2) uses[(code - 2) >> 1]++;
          for (int v = 0; v < 8; v++)
            pin_in[v][i] = (code < 3'd2) ? code[0] : v[(code - 2) >> 1];
        end
        cfg = '{out_inv: 1'b0, sel: 2'(s), in_inv: inv};
        #1;
        tt = out_v;
        for (int v = 0; v < 8; v++)
          if (tt[v] != ref_mg(pin_in[v], 9'(cfg))) bad++;
        checks++;
        single = (uses[0] <= 1) && (uses[1] <= 1) && (uses[2] <= 1);
        reach_s[tt] = 1'b1; reach_s[~tt] = 1'b1;
        if (single) begin
          reach_c[tt] = 1'b1; reach_c[~tt] = 1'b1;
        end
      end
    end
    failures += (bad != 0);
    if (bad != 0) $display("FAIL %0d evaluations differ from the reference", bad);

    // Class structure and closure under NPN.
    for (int t = 0; t < 256; t++) is_class[npn_canon(8'(t))] = 1'b1;
    for (int t = 0; t < 256; t++) begin
      logic [7:0] k;
      k = npn_canon(8'(t));
      check(reach_c[t] == reach_c[k], $sformatf("constants-only set not NPN closed at %02h", t));
      check(reach_s[t] == reach_s[k], $sformatf("shared-pin set not NPN closed at %02h", t));
      if (reach_c[t]) n_c3++;
      if (reach_s[t]) n_s3++;
      // two-input functions: independent of c
      if (t[7:4] == t[3:0]) begin
        if (reach_c[t]) n_c2++;
        if (reach_s[t]) n_s2++;
      end
      if (is_class[t]) begin
        n_cls++;
        if (reach_c[t]) n_cls_c++;
        if (reach_s[t]) n_cls_s++;
      end
    end
    check(n_cls == 14, $sformatf("three-input NPN classes found: %0d", n_cls));
    check(n_s2 == 16, $sformatf("two-input functions with shared pins: %0d", n_s2));
    check(reach_s[8'b0001_0110] == 1'b1, "ab'c'+a'bc'+a'b'c reached");
    check(reach_s[8'b0011_0110] == 1'b1, "ab'c+a'bc'+a'b'c reached");
    check(reach_s[8'b0010_0111] == 1'b1, "ab'+a'c' reached");

    $display("two-input functions   constants only %0d of 16, shared pins %0d of 16", n_c2, n_s2);
    $display("three-input functions constants only %0d of 256, shared pins %0d of 256", n_c3, n_s3);
    $display("three-input classes   constants only %0d of %0d, shared pins %0d of %0d",
             n_cls_c, n_cls, n_cls_s, n_cls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
