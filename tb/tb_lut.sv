// tb_lut: check of the K-input LUT at its default size (K = 6).
// For 40 truth tables (all zeros, all ones, a walking one, and random
// words) every one of the 64 input vectors is applied; the output must be
// the addressed truth-table bit, which the reference obtains by shifting
// the table right by the input value.
module tb_lut;

  localparam int unsigned K = 6;

  logic [K-1:0]    in;
  logic [2**K-1:0] mask;
  logic            out;
  int checks = 0, failures = 0;

  lut dut (.in(in), .mask(mask), .out(out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      case (t)
        0:       mask = '0;
        1:       mask = '1;
        2:       mask = 64'h1 << 37;
        default: mask = {$urandom(), $urandom()};
      endcase
      for (int v = 0; v < 2**K; v++) begin
        in = K'(v);
        #1;
        checks++;
        if (out !== 1'((mask >> v) & 64'h1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL mask=%016h in=%0d out=%0b", mask, v, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
