// tb_tx_cu_master: frame timer and bank handover with a 20-bit frame. frame_start must come on
// the first bit tick and every 20 ticks after; writer and reader banks must alternate, and a
// frame must be refused (wr_allowed low) while both banks are full; dropped frames are counted.
module tb_tx_cu_master;
  localparam int unsigned FRAME = 20;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic bit_tick = 0, das_frame_done = 0, frame_dropped = 0, pkt_end = 0;
  logic frame_start, wr_bank, wr_allowed, rd_bank, pkt_ready;
  logic [15:0] frames_dropped;
  tx_cu_master #(.FRAME(FRAME)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // bit tick every 4 clocks
  int ticks = 0, starts = 0;
  int start_ticks [$];
  always @(posedge clk) if (rst_n) begin
    if (bit_tick && frame_start) start_ticks.push_back(ticks);
    if (bit_tick) ticks++;
  end
  initial forever begin
    @(negedge clk) bit_tick = 0;
    repeat (2) @(negedge clk);
    bit_tick = 1;
  end
  task automatic strobe_done(); @(negedge clk) das_frame_done = 1; @(negedge clk) das_frame_done = 0; endtask
  task automatic strobe_end();  @(negedge clk) pkt_end = 1;        @(negedge clk) pkt_end = 0;        endtask
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (ticks == 70);
    check(start_ticks.size() == 4, $sformatf("%0d frame starts in 70 ticks", start_ticks.size()));
    for (int i = 0; i < start_ticks.size(); i++) check(start_ticks[i] == i * FRAME, "frame start period");
    // bank handover
    check(wr_allowed && !pkt_ready && wr_bank == 0 && rd_bank == 0, "both banks free");
    strobe_done();
    check(wr_bank == 1 && pkt_ready && rd_bank == 0 && wr_allowed, "bank 0 full, writer on bank 1");
    strobe_done();
    check(wr_bank == 0 && !wr_allowed && pkt_ready, "both full: writer refused");
    @(negedge clk) frame_dropped = 1; @(negedge clk) frame_dropped = 0;
    check(frames_dropped == 1, "dropped frame counted");
    strobe_end();
    check(rd_bank == 1 && pkt_ready && wr_allowed, "bank 0 freed, reader on bank 1");
    strobe_end();
    check(rd_bank == 0 && !pkt_ready && wr_allowed, "all free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
