// tb_rx_spc: shifts random bits into a 32-bit converter and compares it after every strobe
// with a reference register; bits without a strobe must be ignored.
module tb_rx_spc;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic bit_in = 0, bit_valid = 0;
  logic [31:0] q;
  rx_spc #(.WIDTH(32)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] r = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      bit_in = 1'($urandom); bit_valid = ($urandom % 3) != 0;
      if (bit_valid) r = {r[30:0], bit_in};
      @(negedge clk);
      check(q == r, $sformatf("step %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
