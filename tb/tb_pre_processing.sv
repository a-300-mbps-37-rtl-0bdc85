// tb_pre_processing: the transmitter packetiser with 4 channels and a 120-bit frame.
// The serial stream is captured bit by bit and parsed independently: after each header
// (32'h1ACFFC1D) come 4 words. In PRBS mode they must continue the 2^31-1 sequence from a
// bit-serial reference; in converter mode they must be {frame, channel}. A second run with a
// 60-bit frame, shorter than a packet, must drop frames and count them.
module tb_pre_processing;
  localparam int unsigned CH = 4, SLOTS = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int slot = 0;
  logic bit_tick;
  always @(posedge clk) slot <= (slot == SLOTS - 1) ? 0 : slot + 1;
  assign bit_tick = rst_n && (slot == SLOTS - 1);

  logic prbs_mode = 1;
  // normal frame
  logic [1:0] das_channel_a, das_channel_b;
  logic das_convert_a, das_valid_a, das_convert_b, das_valid_b;
  logic [15:0] das_sample_a, das_sample_b;
  logic bit_a, fill_a, start_a, fs_a, bit_b, fill_b, start_b, fs_b;
  logic [15:0] dropped_a, dropped_b;
  pre_processing #(.CH(CH), .FRAME(120)) dut (
    .clk, .rst_n, .bit_tick, .prbs_mode, .das_channel(das_channel_a), .das_convert(das_convert_a),
    .das_sample(das_sample_a), .das_valid(das_valid_a), .bit_out(bit_a), .fill_bit(fill_a),
    .pkt_start(start_a), .frame_start(fs_a), .frames_dropped(dropped_a));
  das_adc_model #(.CH(CH)) adc_a (.clk, .rst_n, .convert(das_convert_a), .channel(das_channel_a),
    .sample(das_sample_a), .valid(das_valid_a));
  // frame shorter than a packet: overrun
  pre_processing #(.CH(CH), .FRAME(60)) dut_short (
    .clk, .rst_n, .bit_tick, .prbs_mode(1'b1), .das_channel(das_channel_b), .das_convert(das_convert_b),
    .das_sample(das_sample_b), .das_valid(das_valid_b), .bit_out(bit_b), .fill_bit(fill_b),
    .pkt_start(start_b), .frame_start(fs_b), .frames_dropped(dropped_b));
  das_adc_model #(.CH(CH)) adc_b (.clk, .rst_n, .convert(das_convert_b), .channel(das_channel_b),
    .sample(das_sample_b), .valid(das_valid_b));

  bit stream [$];
  always @(posedge clk) if (bit_tick) stream.push_back(bit_a);

  // reference PRBS
  bit prbs [$];
  function automatic logic [15:0] prbs_next();
    logic [15:0] w;
    for (int i = 0; i < 16; i++) begin
      bit b;
      b = prbs[prbs.size() - 31] ^ prbs[prbs.size() - 28];
      prbs.push_back(b);
      w[15 - i] = b;
    end
    return w;
  endfunction

  int pkts = 0;
  initial begin
    logic [31:0] sh;
    int i, nbits;
    for (int k = 0; k < 31; k++) prbs.push_back(1'b1);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 3 frames PRBS, then converter mode
    wait (stream.size() == 3 * 120 + 20);
    prbs_mode = 0;
    wait (stream.size() == 7 * 120 + 20);
    // parse
    sh = '0; i = 0; nbits = stream.size();
    while (i < nbits) begin
      sh = {sh[30:0], stream[i]}; i++;
      if (sh == 32'h1ACF_FC1D && i + 64 <= nbits) begin
        logic [15:0] w [CH];
        for (int c = 0; c < CH; c++) begin
          for (int k = 0; k < 16; k++) w[c][15 - k] = stream[i + 16 * c + k];
        end
        i += 64;
        if (pkts < 3) begin
          for (int c = 0; c < CH; c++) check(w[c] == prbs_next(), $sformatf("packet %0d PRBS word %0d", pkts, c));
        end else if (pkts >= 4) begin
          for (int c = 0; c < CH; c++) check(w[c][9:0] == 10'(c) && w[c][15:10] == w[0][15:10],
                                              $sformatf("packet %0d converter word %0d = %h", pkts, c, w[c]));
        end
        pkts++;
        sh = '0;
      end
    end
    check(pkts >= 6, $sformatf("%0d packets found", pkts));
    check(dropped_a == 0, "no frames dropped with 120-bit frames");
    check(dropped_b > 0, $sformatf("overrun with 60-bit frames: %0d dropped", dropped_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
