// tb_prbs31_gen: compares the generator's words with a bit-serial reference of the
// x^31 + x^28 + 1 sequence, and checks that the word holds when not requested.
module tb_prbs31_gen;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic req = 0;
  logic [15:0] word;
  prbs31_gen #(.W(16)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // reference: Fibonacci register holding the last 31 bits
  bit ref_bits [$];
  initial begin
    logic [15:0] exp;
    int ones = 0;
    for (int i = 0; i < 31; i++) ref_bits.push_back(1'b1);   // seed: all ones
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      for (int i = 0; i < 16; i++) begin
        bit b;
        b = ref_bits[ref_bits.size() - 31] ^ ref_bits[ref_bits.size() - 28];
        ref_bits.push_back(b);
        exp[15 - i] = b;
      end
      @(negedge clk);
      check(word == exp, $sformatf("word %0d: %h vs %h", w, word, exp));
      ones += $countones(word);
      if (w % 7 == 3) begin            // hold without request
        @(negedge clk);
        check(word == exp, "word holds without req");
      end
      req = 1; @(negedge clk); req = 0;
    end
    check(ones > 1400 && ones < 1800, $sformatf("balanced sequence (%0d ones of 3200)", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
