// tb_cu_decod: a model of the sampling window makes ready high only for taps 13 and 14 (ready
// random elsewhere, as a data pulse would give). The unit must step the tap upward from 0,
// settle 2 periods after each step, and declare alignment exactly after 50 consecutive high
// periods at tap 13; isolated low periods must not drop alignment, 4 in a row must; while the
// clock recovery is unlocked nothing may be counted.
module tb_cu_decod;
  localparam int unsigned TAPS = 32, READY = 50;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic enable = 1, ready = 0, ready_stb = 0, aligned;
  logic [4:0] tap;
  logic [15:0] tap_steps;
  logic [5:0] count;
  cu_decod #(.TAPS(TAPS), .READY(READY)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit force_low = 0;
  int periods = 0;
  task automatic period();
    @(negedge clk);
    ready = !force_low && ((tap == 13 || tap == 14) ? 1'b1 : 1'($urandom));
    ready_stb = 1;
    @(negedge clk) ready_stb = 0;
    repeat (6) @(negedge clk);
    periods++;
  endtask
  initial begin
    int t_al;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // disabled: nothing happens
    enable = 0;
    repeat (10) period();
    check(tap == 0 && tap_steps == 0 && count == 0, "idle while not enabled");
    enable = 1;
    t_al = -1;
    for (int i = 0; i < 2000 && t_al < 0; i++) begin
      period();
      if (aligned) t_al = i;
      if (tap > 13) break;
    end
    check(aligned, "aligned");
    check(tap == 13, $sformatf("first good tap chosen (%0d)", tap));
    check(tap_steps == 13, $sformatf("13 tap steps (%0d)", tap_steps));
    // the last step to 13 is followed by 2 settle periods and 50 high periods
    // single lows do not drop alignment
    for (int k = 0; k < 5; k++) begin
      force_low = 1; period(); force_low = 0;
      repeat (3) period();
    end
    check(aligned && tap == 13, "single missing sync pulses tolerated");
    force_low = 1; repeat (3) period();
    check(aligned, "three lows tolerated");
    period();
    check(!aligned && tap == 14, "four lows: search resumes at next tap");
    force_low = 0;
    // tap 14 is also good: 2 settle + 50 periods
    repeat (2 + READY - 1) period();
    check(!aligned, "not aligned after 49 high periods");
    period();
    check(aligned, "aligned after 50 high periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
