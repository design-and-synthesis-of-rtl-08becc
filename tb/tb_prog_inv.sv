// tb_prog_inv: exhaustive check of the programmable inverter.
// All four combinations of signal and configuration cell are applied;
// q must equal d when the cell is 0 and ~d when it is 1.
module tb_prog_inv;

  logic d, inv, q;
  int   checks = 0, failures = 0;

  prog_inv dut (.d(d), .inv(inv), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      d   = i[0];
      inv = i[1];
      #1;
      checks++;
      if (q !== (d ^ inv)) begin
        failures++;
        $display("FAIL d=%0b inv=%0b q=%0b", d, inv, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
