// tb_clock_recovery: feeds a coded pulse train (sync pulse in slots 0-1 of each 8-slot bit,
// data pulse in slots 4-5 for a '1') with random data. Checks that the flip-flop output has
// one rise per bit period, each HOLD slots long, at the sync pulse; that the PLL locks and
// then gives a 50 % clock whose rising strobe sits on the flip-flop rise; and the two error
// cases of a missing sync pulse: followed by a '0' (no flip-flop rise in that period) and by
// a '1' (flip-flop rises half a period late until the next '0'), both without losing lock or
// moving the recovered clock, also when a third of the sync pulses go missing, some in
// consecutive bits. Finally a lasting half-period shift must drop the lock, and it must
// lock again.
module tb_clock_recovery;
  localparam int unsigned SLOTS = 8, HOLD = 6;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic rx_pulse = 0, ff_q, rec_clk, rise_stb, fall_stb, pll_locked;
  logic [2:0] phase;
  logic [15:0] edges_ignored;
  clock_recovery #(.SLOTS(SLOTS), .HOLD(HOLD)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // drive bit b with optional missing sync pulse; t is the slot clock count
  longint t = 0;
  int bitno = 0;
  logic q_d = 0;
  int q_rises [$];   // slot time of each ff_q rise
  int stbs [$];      // slot time of each rise_stb
  int q_high = 0;
  always @(posedge clk) begin
    t <= t + 1;
    q_d <= ff_q;
    if (rst_n && ff_q && !q_d) q_rises.push_back(int'(t));
    if (rst_n && rise_stb && pll_locked) stbs.push_back(int'(t));
    if (rst_n && ff_q) q_high++;
  end

  task automatic send_bit(input bit b, input bit no_sync);
    for (int s = 0; s < SLOTS; s++) begin
      @(negedge clk);
      rx_pulse = ((s < 2) && !no_sync) || (b && (s == 4 || s == 5));
    end
    bitno++;
  endtask

  initial begin
    int n0, hi0, base, ign0;
    bit b;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // random data until lock
    for (int i = 0; i < 40; i++) send_bit(1'($urandom), 0);
    check(pll_locked, "PLL locked after 40 bits");
    // clean run: 100 bits
    n0 = q_rises.size(); hi0 = q_high; stbs.delete();
    for (int i = 0; i < 100; i++) send_bit(1'($urandom), 0);
    check(q_rises.size() - n0 == 100, $sformatf("one flip-flop rise per bit (%0d)", q_rises.size() - n0));
    check(q_high - hi0 == 100 * HOLD, $sformatf("flip-flop high %0d slots per bit", HOLD));
    for (int i = n0 + 1; i < q_rises.size(); i++) check(q_rises[i] - q_rises[i-1] == SLOTS, "rise period");
    base = q_rises[n0] % SLOTS;
    check(stbs.size() == 100 || stbs.size() == 101, "one rising strobe per bit");
    foreach (stbs[i]) check(stbs[i] % SLOTS == base, "rising strobe on the flip-flop rise");
    // duty cycle of the recovered clock
    begin
      int hi = 0, fa = 0;
      fork
        for (int i = 0; i < 8; i++) send_bit(1'($urandom), 0);
        for (int i = 0; i < 8 * SLOTS; i++) begin @(posedge clk); hi += rec_clk; fa += fall_stb; end
      join
      check(hi == 4 * SLOTS, "recovered clock 50 % duty");
      check(fa == 8, "one falling strobe per bit");
    end
    // case 1: missing sync followed by a '0' (bit itself 0, next bit 0)
    n0 = q_rises.size();
    send_bit(0, 0); send_bit(0, 1); send_bit(0, 0); send_bit(0, 0);
    check(q_rises.size() - n0 == 3, "case 1: one period without a flip-flop rise");
    check(pll_locked, "case 1: still locked");
    // case 2: missing sync with a '1', then '1','1','0': rises shifted by half a period
    n0 = q_rises.size(); ign0 = edges_ignored;
    send_bit(0, 0); send_bit(1, 1); send_bit(1, 0); send_bit(1, 0); send_bit(0, 0); send_bit(0, 0);
    // rises: bit 0, then at the data pulses of the three '1' bits, none in the '0' bit whose
    // sync pulse is swallowed, then in phase again
    check(q_rises.size() - n0 == 5, $sformatf("case 2: %0d rises", q_rises.size() - n0));
    if (q_rises.size() - n0 == 5) begin
      check(q_rises[n0 + 1] % SLOTS == (base + SLOTS / 2) % SLOTS, "case 2: rise at the data pulse");
      check(q_rises[n0 + 3] % SLOTS == (base + SLOTS / 2) % SLOTS, "case 2: shift persists while data is 1");
      check(q_rises[n0 + 4] % SLOTS == base, "case 2: back in phase after a 0");
    end
    check(edges_ignored - ign0 == 3, $sformatf("case 2: 3 shifted edges ignored (%0d)", edges_ignored - ign0));
    check(pll_locked, "case 2: still locked");
    stbs.delete();
    for (int i = 0; i < 20; i++) send_bit(1'($urandom), 0);
    foreach (stbs[i]) check(stbs[i] % SLOTS == base, $sformatf("clock phase unchanged after errors (%0d vs %0d)", stbs[i] % SLOTS, base));
    // repeated errors: a third of the sync pulses missing, some in consecutive bits
    begin
      int n_miss = 0, n_run = 0;
      bit prev_miss = 0;
      for (int i = 0; i < 300; i++) begin
        bit miss;
        miss = ($urandom % 3) == 0;
        n_miss += miss;
        n_run  += miss && prev_miss;
        prev_miss = miss;
        send_bit(1'($urandom), miss);
      end
      check(n_miss > 50 && n_run > 10, $sformatf("repeated errors injected (%0d, %0d back to back)", n_miss, n_run));
      check(pll_locked, "repeated errors: still locked");
      stbs.delete();
      for (int i = 0; i < 20; i++) send_bit(1'($urandom), 0);
      check(stbs.size() >= 19, "repeated errors: strobes continue");
      foreach (stbs[i]) check(stbs[i] % SLOTS == base, "repeated errors: clock phase unchanged");
    end
    // pulses stop for long: lock is kept (no edges); a permanent half-period shift drops lock
    for (int i = 0; i < 20; i++) send_bit(1, 1);
    check(!pll_locked, "persistent shifted edges drop the lock");
    for (int i = 0; i < 40; i++) send_bit(1'($urandom), 0);
    check(pll_locked, "relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
