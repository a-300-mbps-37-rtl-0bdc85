// tb_tx_clock_gen: checks the slot counter, the once-per-bit tick and the 50 % bit clock over
// many bit periods against a reference count kept by the testbench.
module tb_tx_clock_gen;
  localparam int unsigned SLOTS = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [2:0] slot;
  logic bit_tick, clock_m;
  tx_clock_gen #(.SLOTS(SLOTS)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ticks = 0, high = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 10 * SLOTS; n++) begin
      @(negedge clk);
      // released at a falling edge: n+1 rising edges have passed
      check(slot == 3'((n + 1) % SLOTS), $sformatf("slot %0d at %0d", slot, n));
      check(bit_tick == ((n + 1) % SLOTS == SLOTS - 1), "bit_tick in last slot");
      check(clock_m == ((n + 1) % SLOTS < SLOTS / 2), "clock_m first half");
      ticks += bit_tick; high += clock_m;
    end
    check(ticks == 10, "one tick per bit period");
    check(high == 10 * SLOTS / 2, "50 % duty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
