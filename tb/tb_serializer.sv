// tb_serializer: 4-word packets from a behavioural buffer (word = 16'hA000 + 0x111*address,
// one cycle read latency). The serial output, one bit per bit tick, must be fill zeros until a
// packet is ready, then the 64 packet bits MSB first with no gap, then fill again; pkt_start
// and pkt_end must mark the first and last bit, and a packet that is ready when the previous
// one ends must follow it without a gap.
module tb_serializer;
  localparam int unsigned PW = 4, SLOTS = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic bit_tick, pkt_ready = 0;
  logic [1:0] rd_addr;
  logic [15:0] rd_data;
  logic bit_out, fill_bit, pkt_start, pkt_end;
  serializer #(.W(16), .PKT_WORDS(PW)) dut (.*);
  always_ff @(posedge clk) rd_data <= 16'hA000 + 16'h0111 * 16'(rd_addr);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int slot = 0;
  always @(posedge clk) slot <= (slot == SLOTS - 1) ? 0 : slot + 1;
  assign bit_tick = rst_n && (slot == SLOTS - 1);

  // record the bit of each bit period, sampled at its end
  bit  stream [$];
  bit  fills  [$];
  int  starts [$], ends [$];
  always @(posedge clk) if (bit_tick) begin
    stream.push_back(bit_out); fills.push_back(fill_bit);
  end
  always @(posedge clk) if (rst_n && pkt_start) starts.push_back(stream.size());
  always @(posedge clk) if (rst_n && pkt_end)   ends.push_back(stream.size());

  initial begin
    logic [63:0] pkt;
    int s;
    for (int i = 0; i < PW; i++) pkt[63 - 16 * i -: 16] = 16'hA000 + 16'h0111 * 16'(i);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (stream.size() == 10);
    pkt_ready = 1;                           // two packets back to back
    wait (ends.size() == 1);
    wait (starts.size() == 2);
    @(negedge clk) pkt_ready = 0;
    wait (stream.size() == 10 + 64 * 2 + 20);
    @(negedge clk);
    for (int i = 1; i < 10; i++) check(stream[i] == 0 && fills[i], "fill before packet");
    check(starts.size() == 2 && ends.size() == 2, "two packets");
    // pkt_start is seen one cycle after the tick that put out the first bit, which is the
    // next one to be recorded
    s = starts[0];
    for (int i = 0; i < 64; i++) check(stream[s + i] == pkt[63 - i] && !fills[s + i], $sformatf("packet 1 bit %0d", i));
    check(ends[0] - starts[0] == 63, $sformatf("pkt_end on the last bit (%0d)", ends[0] - starts[0]));
    check(starts[1] - starts[0] == 64, $sformatf("no gap between packets (%0d)", starts[1] - starts[0] - 64));
    s = starts[1];
    for (int i = 0; i < 64; i++) check(stream[s + i] == pkt[63 - i], $sformatf("packet 2 bit %0d", i));
    for (int i = s + 64; i < stream.size(); i++) check(stream[i] == 0 && fills[i], "fill after packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
