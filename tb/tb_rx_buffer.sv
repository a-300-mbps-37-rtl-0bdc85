// tb_rx_buffer: 64 channels. Random writes must appear on the streaming output one cycle later
// and be read back through the read port (one cycle latency), latest write winning.
module tb_rx_buffer;
  localparam int unsigned CH = 64;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic wr_en = 0, out_valid;
  logic [5:0] wr_addr = 0, rd_addr = 0, out_channel;
  logic [15:0] wr_data = 0, rd_data, out_data;
  rx_buffer #(.CH(CH), .W(16)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [15:0] model [CH];
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < CH; c++) begin
      wr_en = 1; wr_addr = 6'(c); wr_data = 16'($urandom); model[c] = wr_data;
      @(negedge clk);
      check(out_valid && out_channel == 6'(c) && out_data == model[c], "streaming output");
    end
    for (int k = 0; k < 100; k++) begin
      wr_addr = 6'($urandom); wr_data = 16'($urandom); model[wr_addr] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    @(negedge clk);
    check(!out_valid, "no output without write");
    for (int c = 0; c < CH; c++) begin
      rd_addr = 6'(c);
      @(negedge clk);
      check(rd_data == model[c], $sformatf("read channel %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
