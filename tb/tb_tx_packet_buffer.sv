// tb_tx_packet_buffer: 16 channels, 2 header words. Writes random words into both banks and
// reads every packet address back: header words first, then the channel words of the bank,
// with one cycle of read latency; banks must not disturb each other.
module tb_tx_packet_buffer;
  localparam int unsigned CH = 16, HW = 2;
  localparam logic [31:0] HDR = 32'hCAFE_0B57;
  logic clk = 0;
  always #1 clk = ~clk;
  logic wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [3:0] wr_channel = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic [4:0] rd_addr = 0;
  tx_packet_buffer #(.CH(CH), .W(16), .HDR_WORDS(HW), .HDR(HDR)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [15:0] model [2][CH];
  initial begin
    for (int b = 0; b < 2; b++)
      for (int c = 0; c < CH; c++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = b[0]; wr_channel = 4'(c); wr_data = 16'($urandom);
        model[b][c] = wr_data;
      end
    @(negedge clk) wr_en = 0;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < CH + HW; a++) begin
        @(negedge clk); rd_bank = b[0]; rd_addr = 5'(a);
        @(negedge clk);
        if (a == 0)      check(rd_data == 16'hCAFE, "header word 0");
        else if (a == 1) check(rd_data == 16'h0B57, "header word 1");
        else check(rd_data == model[b][a - HW], $sformatf("bank %0d word %0d", b, a));
      end
    // overwrite one word in bank 1, bank 0 unchanged
    @(negedge clk); wr_en = 1; wr_bank = 1; wr_channel = 4'd3; wr_data = 16'hBEEF;
    @(negedge clk); wr_en = 0; rd_bank = 0; rd_addr = 5'(3 + HW);
    @(negedge clk); check(rd_data == model[0][3], "bank 0 untouched");
    rd_bank = 1;
    @(negedge clk); check(rd_data == 16'hBEEF, "bank 1 rewritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
