// optical_telemetry_top: digital part of the pulsed optical telemetry link, both ends.
//
// Transmitter (implant side, slot clock tx_clk): the pre-processing packs one 16-bit sample of
// each of 1024 channels per 18 kHz frame behind a start header and serialises the packets into
// a continuous 300 Mbps bitstream; the encoder turns each bit into a synchronisation pulse at
// the rising bit-clock edge plus, for a '1', a data pulse at the falling edge. tx_pulse goes to
// the laser driver.
//
// Receiver (external side, slot clock rx_clk): rx_pulse comes from the photodiode amplifier.
// The data decoding recovers the bit clock from the pulses, aligns the sampling delay and
// recovers the bits; the post-processing finds the headers and stores the channel words. In
// PRBS test mode the transmitter fills the packets with a 2^31-1 sequence instead of converter
// samples, and the BER checker counts errors in the received words.
//
// The analog path (laser driver, laser, tissue, photodiode and its amplifier) and the
// converter front end are outside this module; their signals are ports. Both slot clocks run
// at SLOTS_PER_BIT times the bit rate (2.4 GHz for 300 Mbps at 8 slots); the receiver never
// uses tx_clk. This partitioning follows the published system; the slot-clock modelling of
// sub-bit timing is this design's choice.
module optical_telemetry_top
  import optel_pkg::*;
#(
  parameter int unsigned CH    = CHANNELS,
  parameter int unsigned FRAME = FRAME_BITS,
  parameter int unsigned TAPS  = DELAY_TAPS
) (
  // transmitter
  input  logic                    tx_clk,
  input  logic                    tx_rst_n,
  input  logic                    prbs_mode,
  output logic [$clog2(CH)-1:0]   das_channel,
  output logic                    das_convert,
  input  word_t                   das_sample,
  input  logic                    das_valid,
  output logic                    tx_clock_m,
  output logic                    tx_bit,
  output logic                    tx_fill_bit,
  output logic                    tx_pkt_start,
  output logic [15:0]             tx_frames_dropped,
  output logic                    tx_pulse,
  // receiver
  input  logic                    rx_clk,
  input  logic                    rx_rst_n,
  input  logic                    rx_pulse,
  output logic                    rec_clk,
  output logic                    rec_bit,
  output logic                    rec_bit_valid,
  output logic                    rx_ff_q,
  output logic                    pll_locked,
  output logic                    aligned,
  output logic [$clog2(TAPS)-1:0] delay_tap,
  output logic [15:0]             tap_steps,
  output logic [15:0]             edges_ignored,
  output logic                    ch_valid,
  output logic [$clog2(CH)-1:0]   ch_index,
  output word_t                   ch_data,
  input  logic [$clog2(CH)-1:0]   buf_rd_addr,
  output word_t                   buf_rd_data,
  output logic                    rx_receiving,
  output logic [31:0]             packets_received,
  output logic [31:0]             headers_found,
  output logic [47:0]             ber_bits,
  output logic [31:0]             ber_errors
);

  // ---------------- transmitter ----------------
  logic [$clog2(SLOTS_PER_BIT)-1:0] tx_slot;
  logic                             bit_tick, frame_start;

  tx_clock_gen u_txclk (
    .clk(tx_clk), .rst_n(tx_rst_n), .slot(tx_slot), .bit_tick, .clock_m(tx_clock_m)
  );

  pre_processing #(.CH(CH), .FRAME(FRAME)) u_pre (
    .clk(tx_clk), .rst_n(tx_rst_n), .bit_tick, .prbs_mode,
    .das_channel, .das_convert, .das_sample, .das_valid,
    .bit_out(tx_bit), .fill_bit(tx_fill_bit), .pkt_start(tx_pkt_start), .frame_start,
    .frames_dropped(tx_frames_dropped)
  );

  data_encoder u_enc (
    .clk(tx_clk), .rst_n(tx_rst_n), .slot(tx_slot), .bit_in(tx_bit), .tx_pulse
  );

  // ---------------- receiver ----------------
  logic rx_ready, packet_done;

  data_decoding #(.TAPS(TAPS)) u_dec (
    .clk(rx_clk), .rst_n(rx_rst_n), .rx_pulse,
    .rec_clk, .rec_bit, .rec_bit_valid, .ff_q(rx_ff_q), .pll_locked, .aligned,
    .ready(rx_ready), .tap(delay_tap), .tap_steps, .edges_ignored
  );

  post_processing #(.CH(CH)) u_post (
    .clk(rx_clk), .rst_n(rx_rst_n), .bit_in(rec_bit), .bit_valid(rec_bit_valid),
    .ch_valid, .ch_index, .ch_data, .rd_addr(buf_rd_addr), .rd_data(buf_rd_data),
    .receiving(rx_receiving), .packet_done, .packets(packets_received), .headers_found
  );

  ber_checker u_ber (
    .clk(rx_clk), .rst_n(rx_rst_n), .word_valid(ch_valid), .word(ch_data),
    .bits_checked(ber_bits), .bit_errors(ber_errors), .primed()
  );

endmodule
