// post_processing: receiver depacketiser, from recovered bits to channel words.
//
// Recovered bits enter the serial-to-parallel register. The master control unit compares its
// contents with the header after every bit; on a match it starts the deserializer (word
// boundaries every W bits) and the write unit (channel numbers 0..CH-1), which store the
// packet's CH words in the output buffer. After the last channel the master hunts for the
// next header. This block structure is the published one; the counters, handshakes and output
// ports are this design's choices.
//
// Interface: slot clock, with bit_valid as the once-per-bit strobe. Channel words appear on
// ch_valid/ch_index/ch_data as they are stored; rd_addr/rd_data read the buffer.
module post_processing
  import optel_pkg::*;
#(
  parameter int unsigned                      CH        = CHANNELS,
  parameter int unsigned                      W         = WORD_BITS,
  parameter int unsigned                      HDR_WORDS = HEADER_WORDS,
  parameter logic [HEADER_WORDS*WORD_BITS-1:0] HDR      = HEADER
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bit_in,
  input  logic                  bit_valid,
  output logic                  ch_valid,
  output logic [$clog2(CH)-1:0] ch_index,
  output logic [W-1:0]          ch_data,
  input  logic [$clog2(CH)-1:0] rd_addr,
  output logic [W-1:0]          rd_data,
  output logic                  receiving,
  output logic                  packet_done,
  output logic [31:0]           packets,
  output logic [31:0]           headers_found
);

  localparam int unsigned SPC_W = HDR_WORDS * W;

  logic [SPC_W-1:0]      spc;
  logic                  match, start, word_done, wr_en;
  logic [$clog2(W)-1:0]  bit_cnt;
  logic [$clog2(CH)-1:0] wr_addr;

  rx_spc #(.WIDTH(SPC_W)) u_spc (
    .clk, .rst_n, .bit_in, .bit_valid, .q(spc)
  );

  header_comparator #(.WIDTH(SPC_W), .HDR(HDR)) u_cmp (
    .pattern(spc), .match
  );

  rx_cu_master u_master (
    .clk, .rst_n, .bit_valid, .match, .packet_done,
    .start, .receiving, .packets, .headers_found
  );

  rx_cu_des #(.W(W)) u_des (
    .clk, .rst_n, .start, .en(receiving), .bit_valid, .word_done, .bit_cnt
  );

  rx_cu_wr #(.CH(CH)) u_wr (
    .clk, .rst_n, .start, .en(receiving), .word_done, .wr_en, .wr_addr, .packet_done
  );

  rx_buffer #(.CH(CH), .W(W)) u_buf (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data(spc[W-1:0]), .rd_addr, .rd_data,
    .out_valid(ch_valid), .out_channel(ch_index), .out_data(ch_data)
  );

endmodule
