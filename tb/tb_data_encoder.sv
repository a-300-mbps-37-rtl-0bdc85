// tb_data_encoder: drives a bit sequence through the encoder and compares every slot of the
// output with the pulse pattern of the coding scheme: sync pulse in slots 0-1 of each bit,
// data pulse in slots 4-5 for a '1', seen one slot clock later at the registered output.
module tb_data_encoder;
  localparam int unsigned SLOTS = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [2:0] slot = 0;
  logic bit_in = 0, tx_pulse;
  data_encoder #(.SLOTS(SLOTS), .PULSE(2)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [63:0] bits = 64'hA5F0_0FF3_1C2B_9D4E;
  initial begin
    logic exp_q;
    int pulses = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_q = 0;
    for (int b = 0; b < 64; b++) begin
      for (int s = 0; s < SLOTS; s++) begin
        @(negedge clk);
        slot = 3'(s);
        bit_in = bits[b];
        if (b > 0 || s > 0) check(tx_pulse == exp_q, $sformatf("bit %0d slot %0d", b, s));
        exp_q = (s < 2) || (bits[b] && (s == 4 || s == 5));
        if (b > 0 || s > 0) pulses += tx_pulse;
      end
    end
    // 64 sync pulses of 2 slots plus 2 slots per '1', minus the last slot's lag
    check(pulses == 2 * 64 + 2 * $countones(bits), $sformatf("pulse slots %0d", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
