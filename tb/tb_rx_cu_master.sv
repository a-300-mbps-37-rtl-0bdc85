// tb_rx_cu_master: a match after a bit strobe must start a packet (start pulse, receiving)
// and be counted; matches while receiving are ignored; packet_done returns to hunting and
// counts the packet; a match without a preceding strobe does nothing.
module tb_rx_cu_master;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic bit_valid = 0, match = 0, packet_done = 0, start, receiving;
  logic [31:0] packets, headers_found;
  rx_cu_master dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int starts = 0;
  always @(posedge clk) if (rst_n && start) starts++;
  task automatic bit_with_match(input bit m);
    @(negedge clk) bit_valid = 1;
    @(negedge clk) bit_valid = 0; match = m;     // comparator sees the new bit one cycle later
    @(negedge clk) match = 0;
    repeat (3) @(negedge clk);
  endtask
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) bit_with_match(0);
    check(!receiving && starts == 0, "hunting");
    @(negedge clk) match = 1;                     // match without strobe
    @(negedge clk) match = 0;
    repeat (3) @(negedge clk);
    check(!receiving, "match needs a new bit");
    bit_with_match(1);
    check(receiving && starts == 1 && headers_found == 1, "header starts a packet");
    bit_with_match(1);
    check(starts == 1 && headers_found == 1, "matches ignored while receiving");
    @(negedge clk) packet_done = 1;
    @(negedge clk) packet_done = 0;
    @(negedge clk);
    check(!receiving && packets == 1, "packet done, hunting again");
    bit_with_match(1);
    check(receiving && starts == 2 && headers_found == 2, "second packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
