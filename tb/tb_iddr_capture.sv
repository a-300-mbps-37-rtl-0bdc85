// tb_iddr_capture: random input with rising and falling strobes at fixed phases of an 8-slot
// period; ready must hold the input seen at the rising strobe and data_bit the input seen at
// the falling strobe, each with its one-cycle valid pulse.
module tb_iddr_capture;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic din = 0, rise_stb = 0, fall_stb = 0, ready, ready_stb, data_bit, bit_valid;
  iddr_capture dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit exp_r = 0, exp_d = 0, r_stb = 0, d_stb = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 8 * 200; n++) begin
      @(negedge clk);
      if (n > 0) begin
        check(ready == exp_r && data_bit == exp_d, $sformatf("samples at %0d", n));
        check(ready_stb == r_stb && bit_valid == d_stb, "strobes");
      end
      din = 1'($urandom);
      rise_stb = (n % 8 == 1);
      fall_stb = (n % 8 == 5);
      r_stb = rise_stb; d_stb = fall_stb;
      if (rise_stb) exp_r = din;
      if (fall_stb) exp_d = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
