// tb_data_decoding: the receiver front end fed with a coded pulse train of random bits,
// delayed by 5 slots. It must lock, align within the 512-tap range, and then recover exactly
// the transmitted bit sequence (compared bit by bit after finding the offset once), one bit
// per 8-slot period; the recovered clock must keep a 50 % duty cycle.
module tb_data_decoding;
  localparam int unsigned SLOTS = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic rx_pulse = 0, rec_clk, rec_bit, rec_bit_valid, ff_q, pll_locked, aligned, ready;
  logic [8:0] tap;
  logic [15:0] tap_steps, edges_ignored;
  data_decoding dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit sent [$];
  bit got  [$];
  longint t = 0, last_valid = -1;
  int bad_period = 0;
  always @(posedge clk) begin
    t <= t + 1;
    if (rst_n && rec_bit_valid) begin
      got.push_back(rec_bit);
      if (last_valid >= 0 && t - last_valid != SLOTS) bad_period++;
      last_valid = t;
    end
  end

  // transmitter model: pulse pattern, 5-slot link delay
  logic [4:0] line = '0;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    forever begin
      bit b;
      b = 1'($urandom);
      sent.push_back(b);
      for (int s = 0; s < SLOTS; s++) begin
        @(negedge clk);
        line = {line[3:0], (s < 2) || (b && (s == 4 || s == 5))};
        rx_pulse = line[4];
      end
    end
  end

  initial begin
    int off, best, hi;
    repeat (10) @(posedge clk);
    wait (aligned);
    check(pll_locked, "locked when aligned");
    $display("aligned at tap %0d after %0d steps", tap, tap_steps);
    wait (got.size() == 400);
    // find where the recovered bits sit in the sent sequence
    off = -1;
    for (int o = 0; o + 64 < sent.size() && off < 0; o++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 64; i++) if (got[i] != sent[o + i]) ok = 0;
      if (ok) off = o;
    end
    check(off >= 0, "recovered bits found in the sent sequence");
    if (off >= 0) for (int i = 0; i < 400 && off + i < sent.size(); i++) check(got[i] == sent[off + i], $sformatf("bit %0d", i));
    check(bad_period == 0, "one recovered bit per bit period");
    hi = 0;
    for (int i = 0; i < 80; i++) begin @(posedge clk); hi += rec_clk; end
    check(hi == 40, "recovered clock 50 % duty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
