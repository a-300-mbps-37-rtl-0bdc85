// pre_processing: transmitter packetiser, from multichannel samples to one bitstream.
//
// Once per acquisition frame (every FRAME bit periods, 18 kHz at 300 Mbps) the acquisition
// control unit reads one 16-bit sample of each of CH channels, from the converter front end
// or, in PRBS test mode, from the pseudo-random generator. The words are written into one bank
// of the double-banked packet buffer behind a fixed start header; the serializer sends a full
// bank as header + CH words, MSB first, and sends fill zeros when no packet is ready, so the
// bitstream is continuous. The master control unit runs the frame timer and hands banks
// between writer and reader.
//
// The organisation into master, acquisition, write and read control units, the WORD register,
// the buffer with its pre-loaded header and the serializer follows the published design; the
// handshakes, bank scheme and header value are this design's choices.
//
// Interface: all logic runs on the slot clock clk; bit_tick (one slot per bit period) is the
// bit-clock enable. bit_out is stable for a bit period after each bit_tick.
module pre_processing
  import optel_pkg::*;
#(
  parameter int unsigned                      CH        = CHANNELS,
  parameter int unsigned                      W         = WORD_BITS,
  parameter int unsigned                      HDR_WORDS = HEADER_WORDS,
  parameter logic [HEADER_WORDS*WORD_BITS-1:0] HDR      = HEADER,
  parameter int unsigned                      FRAME     = FRAME_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bit_tick,
  input  logic                  prbs_mode,
  output logic [$clog2(CH)-1:0] das_channel,
  output logic                  das_convert,
  input  logic [W-1:0]          das_sample,
  input  logic                  das_valid,
  output logic                  bit_out,
  output logic                  fill_bit,
  output logic                  pkt_start,
  output logic                  frame_start,
  output logic [15:0]           frames_dropped
);

  localparam int unsigned PKT_WORDS = HDR_WORDS + CH;

  logic                  wr_bank, wr_allowed, rd_bank, pkt_ready, pkt_end;
  logic                  frame_done, frame_dropped, prbs_req;
  logic [W-1:0]          prbs_word, word, rd_data;
  logic                  word_valid;
  logic [$clog2(CH)-1:0] word_channel;
  logic [$clog2(PKT_WORDS)-1:0] rd_addr;
  logic                  das_busy;

  tx_cu_master #(.FRAME(FRAME)) u_master (
    .clk, .rst_n, .bit_tick,
    .das_frame_done(frame_done), .frame_dropped, .pkt_end,
    .frame_start, .wr_bank, .wr_allowed, .rd_bank, .pkt_ready, .frames_dropped
  );

  prbs31_gen #(.W(W)) u_prbs (
    .clk, .rst_n, .req(prbs_req), .word(prbs_word)
  );

  cu_das #(.CH(CH), .W(W)) u_das (
    .clk, .rst_n, .frame_start, .wr_allowed, .prbs_mode,
    .das_channel, .das_convert, .das_sample, .das_valid,
    .prbs_word, .prbs_req,
    .word, .word_valid, .word_channel, .frame_done, .frame_dropped, .busy(das_busy)
  );

  tx_packet_buffer #(.CH(CH), .W(W), .HDR_WORDS(HDR_WORDS), .HDR(HDR)) u_buffer (
    .clk,
    .wr_en(word_valid), .wr_bank, .wr_channel(word_channel), .wr_data(word),
    .rd_bank, .rd_addr, .rd_data
  );

  serializer #(.W(W), .PKT_WORDS(PKT_WORDS)) u_ser (
    .clk, .rst_n, .bit_tick, .pkt_ready, .rd_addr, .rd_data,
    .bit_out, .fill_bit, .pkt_start, .pkt_end
  );

endmodule
