// tb_cfg_chain: check of the serial configuration chain at its default
// length (N = 73, one PLB).
// After reset the word must be zero. A random word is shifted in most
// significant bit first; it must appear complete after exactly N enabled
// clock cycles; one cycle earlier it must sit one place short. With the enable low it must
// hold. A second word is then shifted in while the first one must leave
// on cfg_so bit by bit, most significant first. A final reset clears it.
module tb_cfg_chain;

  localparam int unsigned N = 73;

  logic         clk = 1'b0;
  logic         rst_n, cfg_en, cfg_si, cfg_so;
  logic [N-1:0] cfg_q;
  logic [N-1:0] w1, w2;
  int checks = 0, failures = 0;

  cfg_chain dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] r;
    for (int i = 0; i < N; i += 32) r = {r[N-1-32:0], $urandom()};
    return r;
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_en = 1'b0; cfg_si = 1'b0;
    w1 = rand_word();
    w2 = rand_word();
    repeat (2) @(posedge clk);
    #1 check(cfg_q == '0, "reset clears the word");
    rst_n = 1'b1;
    // load w1
    for (int i = N - 1; i >= 0; i--) begin
      cfg_en = 1'b1; cfg_si = w1[i];
      @(posedge clk);
      #1;
      if (i == 1) check(cfg_q[N-2:0] == w1[N-1:1],
                        "one cycle early the word is one place short");
    end
    cfg_en = 1'b0;
    check(cfg_q == w1, "word complete after N cycles");
    repeat (5) @(posedge clk);
    #1 check(cfg_q == w1, "word held with enable low");
    // load w2, watching w1 leave on cfg_so
    for (int i = N - 1; i >= 0; i--) begin
      check(cfg_so == w1[i], $sformatf("cfg_so bit %0d", i));
      cfg_en = 1'b1; cfg_si = w2[i];
      @(posedge clk);
      #1;
    end
    cfg_en = 1'b0;
    check(cfg_q == w2, "second word complete");
    rst_n = 1'b0;
    @(posedge clk);
    #1 check(cfg_q == '0, "reset clears again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
