// tb_rx_cu_wr: 8 channels. Each word_done must be written at the next channel number, 0..7,
// packet_done must pulse right after the eighth and only then, and start must restart at channel 0.
module tb_rx_cu_wr;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic start = 0, en = 1, word_done = 0, wr_en, packet_done;
  logic [2:0] wr_addr;
  rx_cu_wr #(.CH(8)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int pd = 0;
  always @(posedge clk) if (rst_n && packet_done) pd++;
  task automatic word(input int exp_ch);
    @(negedge clk) word_done = 1;
    #0.5 check(wr_en && wr_addr == 3'(exp_ch), $sformatf("write at channel %0d (%0d)", exp_ch, wr_addr));
    @(negedge clk) word_done = 0;
    check(packet_done == (exp_ch == 7), $sformatf("packet_done right after channel %0d only", exp_ch));
    repeat (3) @(negedge clk);
  endtask
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int p = 0; p < 3; p++) begin
      for (int c = 0; c < 8; c++) word(c);
      check(pd == p + 1, $sformatf("packet_done after packet %0d", p));
    end
    word(0); word(1); word(2);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    word(0);
    check(pd == 3, "no extra packet_done");
    en = 0;
    @(negedge clk) word_done = 1;
    #0.5 check(!wr_en, "no write while disabled");
    @(negedge clk) word_done = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
