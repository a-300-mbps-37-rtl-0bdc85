// tb_rx_cu_des: with bit strobes every 4 cycles, word_done must pulse one cycle after every
// 16th strobe while enabled, never while disabled, and start must restart the count.
module tb_rx_cu_des;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic start = 0, en = 0, bit_valid = 0, word_done;
  logic [3:0] bit_cnt;
  rx_cu_des #(.W(16)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic strobe(output bit done_seen);
    @(negedge clk) bit_valid = 1;
    @(negedge clk) bit_valid = 0; done_seen = word_done;
    repeat (2) @(negedge clk);
  endtask
  initial begin
    bit d;
    int n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20; i++) begin strobe(d); check(!d, "no word while disabled"); end
    @(negedge clk) start = 1; en = 1;
    @(negedge clk) start = 0;
    for (int i = 1; i <= 64; i++) begin
      strobe(d);
      check(d == (i % 16 == 0), $sformatf("word_done after bit %0d", i));
    end
    // restart in the middle of a word
    for (int i = 0; i < 5; i++) strobe(d);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 1; i <= 16; i++) begin
      strobe(d);
      check(d == (i == 16), $sformatf("after restart, bit %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
