// tb_ber_checker: feeds 300 words of the PRBS31 sequence from a bit-serial reference. With no
// errors it must count 16*300-31 checked bits and no error; one flipped bit must give exactly
// three mismatches (the bit itself and the two later bits it predicts); the checker must
// recover by itself afterwards.
module tb_ber_checker;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic word_valid = 0, primed;
  logic [15:0] word = 0;
  logic [47:0] bits_checked;
  logic [31:0] bit_errors;
  ber_checker #(.W(16)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit prbs [$];
  function automatic logic [15:0] prbs_next();
    logic [15:0] w;
    for (int i = 0; i < 16; i++) begin
      bit b;
      b = prbs[prbs.size() - 31] ^ prbs[prbs.size() - 28];
      prbs.push_back(b);
      w[15 - i] = b;
    end
    return w;
  endfunction
  task automatic feed(input logic [15:0] w);
    @(negedge clk) word = w; word_valid = 1;
    @(negedge clk) word_valid = 0;
  endtask
  initial begin
    for (int k = 0; k < 31; k++) prbs.push_back(1'($urandom | (k == 0)));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 300; n++) feed(prbs_next());
    @(negedge clk);
    check(primed, "primed");
    check(bits_checked == 48'(16 * 300 - 31), $sformatf("bits checked %0d", bits_checked));
    check(bit_errors == 0, "no errors");
    feed(prbs_next() ^ 16'h0040);
    for (int n = 0; n < 10; n++) feed(prbs_next());
    @(negedge clk);
    check(bit_errors == 3, $sformatf("one flipped bit gives 3 mismatches (%0d)", bit_errors));
    for (int n = 0; n < 50; n++) feed(prbs_next());
    @(negedge clk);
    check(bit_errors == 3, "recovered after the error");
    check(bits_checked == 48'(16 * 361 - 31), "bits checked keep counting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
