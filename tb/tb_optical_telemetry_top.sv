// tb_optical_telemetry_top: end-to-end test of the whole link at its default sizes
// (1024 channels, 16667-bit frames, 512-tap delay line, 8 slots per bit).
//
// Transmitter and receiver run on their own slot clocks (same frequency, no shared signal
// other than the pulse train); a behavioural link model delays the pulses by a few slots.
//  1. PRBS mode: the receiver must lock its clock, scan the delay taps, align, find headers and
//     receive packets with no bit errors. The latency from a transmitted bit to its recovery
//     (link delay excluded) must be under 12 ns (28 slots of 0.417 ns).
//  2. Synchronisation pulses are removed on purpose, some followed by a '0' bit and some by a
//     '1' bit; the clock must stay locked, the alignment held and the bits still correct.
//  3. Converter mode: the packets must carry each channel's word in its place, also readable
//     through the buffer read port.
// Every mechanism is counted, and one that never happens counts as a failure. Each phase
// waits at most five frames for its packets, so a link that never delivers fails checks
// rather than hanging; a watchdog ends the run in any case.
module tb_optical_telemetry_top;
  import optel_pkg::*;

  localparam int unsigned CHW = $clog2(CHANNELS);

  logic tx_clk = 0, rx_clk = 0;
  always #1 tx_clk = ~tx_clk;
  always #1 rx_clk = ~rx_clk;

  logic tx_rst_n = 0, rx_rst_n = 0;
  logic prbs_mode = 1;
  logic [CHW-1:0] das_channel;
  logic das_convert, das_valid;
  word_t das_sample;
  logic tx_clock_m, tx_bit, tx_fill_bit, tx_pkt_start, tx_pulse;
  logic [15:0] tx_frames_dropped;
  logic rx_pulse, rec_clk, rec_bit, rec_bit_valid, rx_ff_q, pll_locked, aligned;
  logic [$clog2(DELAY_TAPS)-1:0] delay_tap;
  logic [15:0] tap_steps, edges_ignored;
  logic ch_valid, rx_receiving;
  logic [CHW-1:0] ch_index, buf_rd_addr = '0;
  word_t ch_data, buf_rd_data;
  logic [31:0] packets_received, headers_found, ber_errors;
  logic [47:0] ber_bits;

  logic drop = 0;
  logic [5:0] link_delay = 6'd3;

  optical_telemetry_top dut (.*);

  das_adc_model #(.CH(CHANNELS)) u_adc (
    .clk(tx_clk), .rst_n(tx_rst_n), .convert(das_convert), .channel(das_channel),
    .sample(das_sample), .valid(das_valid)
  );

  optical_link_model u_link (
    .clk(tx_clk), .din(tx_pulse), .drop, .delay(link_delay), .dout(rx_pulse)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters ----
  int n_lock = 0, n_merge = 0, n_fill = 0, n_drop0 = 0, n_drop1 = 0, n_unlock = 0;
  int n_misalign = 0, n_adc_words = 0, n_adc_bad = 0;
  logic locked_d = 0, aligned_d = 0, rx_pulse_d = 0;
  longint cyc = 0;
  always @(posedge rx_clk) begin
    cyc <= cyc + 1;
    locked_d   <= pll_locked;
    aligned_d  <= aligned;
    rx_pulse_d <= rx_pulse;
    if (rx_rst_n && pll_locked && !locked_d) n_lock++;
    if (rx_rst_n && !pll_locked && locked_d) n_unlock++;
    if (rx_rst_n && !aligned && aligned_d) n_misalign++;
    // a pulse edge while the flip-flop is already set: a data pulse merged with its sync pulse
    if (rx_pulse && !rx_pulse_d && rx_ff_q) n_merge++;
  end
  always @(posedge tx_clk) if (tx_fill_bit && dut.bit_tick && packets_received > 0) n_fill++;

  // ---- latency: last header bit sent -> last header bit recovered ----
  longint t_tx_start = -1, t_rx_recv = -1, lat_slots = -1;
  logic recv_d = 0;
  always @(posedge rx_clk) begin
    recv_d <= rx_receiving;
    if (tx_pkt_start && t_tx_start < 0) t_tx_start = cyc;
    if (rx_receiving && !recv_d && t_rx_recv < 0 && t_tx_start >= 0) t_rx_recv = cyc;
  end

  // ---- converter-mode word check ----
  int adc_from_packet = -1;
  logic [5:0] pkt_frame;
  always @(posedge rx_clk) begin
    if (ch_valid && adc_from_packet >= 0 && int'(packets_received) >= adc_from_packet) begin
      n_adc_words++;
      if (ch_index == '0) pkt_frame = ch_data[15:10];
      if (ch_data[9:0] != 10'(ch_index) || ch_data[15:10] != pkt_frame) n_adc_bad++;
    end
  end

  // ---- drop the synchronisation pulse of one bit whose value is v ----
  task automatic drop_sync(input bit v);
    // wait for the start of a payload bit with value v
    do @(posedge tx_clk); while (!(dut.bit_tick && dut.u_pre.u_ser.sending));
    @(posedge tx_clk);
    while (tx_bit !== v || dut.tx_slot != 0) begin
      @(posedge tx_clk);
    end
    // tx_slot 0 now; the sync pulse leaves the encoder in slots 1..2
    drop = 1;
    repeat (3) @(posedge tx_clk);
    drop = 0;
    if (v) n_drop1++; else n_drop0++;
    repeat (40) @(posedge tx_clk);
  endtask

  // wait until n packets have been received, for at most five frames; a
  // timeout counts as a failure and the test goes on with its checks
  task automatic wait_packets(input int n, input string what);
    int cycles;
    cycles = 0;
    while (int'(packets_received) < n && cycles < 5 * FRAME_BITS * SLOTS_PER_BIT) begin
      @(posedge rx_clk);
      cycles++;
    end
    check(int'(packets_received) >= n, $sformatf("%s: packet %0d received in time", what, n));
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge rx_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] err_before, err_after;
    logic [47:0] bits_before;
    logic [15:0] ign_before;
    word_t last5;
    repeat (5) @(posedge tx_clk);
    tx_rst_n = 1;
    repeat (3) @(posedge rx_clk);   // receiver starts mid-bit
    rx_rst_n = 1;

    // 1. PRBS acquisition and error-free reception of two packets
    wait_packets(2, "PRBS mode");
    @(posedge rx_clk);
    check(pll_locked, "clock recovery locked");
    check(aligned, "delay aligned");
    check(ber_bits > 48'd30000, "BER checker saw the payload");
    check(ber_errors == 0, $sformatf("no bit errors in PRBS mode (%0d)", ber_errors));
    check(t_rx_recv > 0, "header found");
    lat_slots = (t_rx_recv - 2) - (t_tx_start + 31 * SLOTS_PER_BIT) - link_delay;
    $display("latency %0d slots = %0.2f ns, tap %0d after %0d tap steps", lat_slots,
             real'(lat_slots) * 3.333 / SLOTS_PER_BIT, delay_tap, tap_steps);
    check(lat_slots > 0 && real'(lat_slots) * 3.333 / SLOTS_PER_BIT < 12.0, "latency below 12 ns");
    check(tx_frames_dropped == 0, "no frame dropped at 18 kHz");

    // 2. missing synchronisation pulses
    err_before  = ber_errors;
    bits_before = ber_bits;
    ign_before  = edges_ignored;
    for (int i = 0; i < 10; i++) begin
      drop_sync(1'b0);
      drop_sync(1'b1);
    end
    wait_packets(3, "sync pulse loss");
    @(posedge rx_clk);
    err_after = ber_errors;
    check(n_unlock == 0, "clock stayed locked through missing sync pulses");
    check(n_misalign == 0, "alignment held through missing sync pulses");
    check(edges_ignored > ign_before, "half-period shifted edges were ignored by the PLL");
    check(err_after == err_before, $sformatf("no bit errors from missing sync pulses (%0d)",
                                             err_after - err_before));
    check(ber_bits > bits_before, "bits checked during the error test");

    // 3. converter mode
    prbs_mode = 0;
    adc_from_packet = int'(packets_received) + 2;   // the next packet may be mixed
    wait_packets(adc_from_packet + 1, "converter mode");
    @(posedge rx_clk);
    check(n_adc_words >= CHANNELS, $sformatf("converter words received (%0d)", n_adc_words));
    check(n_adc_bad == 0, $sformatf("converter words in their places (%0d bad)", n_adc_bad));
    buf_rd_addr = CHW'(5);
    @(posedge rx_clk);
    @(posedge rx_clk);
    last5 = buf_rd_data;
    check(last5[9:0] == 10'd5 && last5[15:10] == pkt_frame, "buffer read port returns channel 5");

    // mechanisms seen
    check(n_lock > 0, "mechanism: PLL lock");
    check(tap_steps > 0, "mechanism: delay tap scan");
    check(n_merge > 0, "mechanism: data pulse merged into the one-shot");
    check(n_fill > 0, "mechanism: fill bits between packets");
    check(headers_found >= 3, "mechanism: header hunt");
    check(n_drop0 > 0 && n_drop1 > 0, "mechanism: missing sync pulse, both cases");
    check(n_adc_words > 0, "mechanism: mode switch to converter input");
    $display("locks=%0d tap_steps=%0d merges=%0d fill=%0d headers=%0d packets=%0d drops0=%0d drops1=%0d ignored=%0d ber_bits=%0d",
             n_lock, tap_steps, n_merge, n_fill, headers_found, packets_received, n_drop0, n_drop1,
             edges_ignored, ber_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
