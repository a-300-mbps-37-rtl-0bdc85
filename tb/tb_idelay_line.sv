// tb_idelay_line: sends a random bit stream through the 512-tap line and checks, for a range
// of taps including the first and the last, that the output is the input delayed by tap + 2
// slot clocks.
module tb_idelay_line;
  localparam int unsigned TAPS = 512;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic din = 0, dout;
  logic [8:0] tap = 0;
  idelay_line #(.TAPS(TAPS)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit hist [$];
  initial begin
    int taps [6] = '{0, 1, 7, 100, 300, 511};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (taps[k]) begin
      tap = 9'(taps[k]);
      for (int n = 0; n < 1200; n++) begin
        @(negedge clk);
        // hist holds din of the previous cycles, newest last
        if (n > taps[k] + 2)
          check(dout == hist[hist.size() - (taps[k] + 2)], $sformatf("tap %0d cycle %0d", taps[k], n));
        din = 1'($urandom);
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
