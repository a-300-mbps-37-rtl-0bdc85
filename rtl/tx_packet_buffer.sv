// tx_packet_buffer: packet buffer of the pre-processing, with the write control (C.U. WR).
//
// A packet is HDR_WORDS header words followed by one WORD_BITS-bit word per channel. The
// header part is pre-loaded with the fixed start sequence and never written; the channel part
// is a memory of two banks of CH words, so that one packet can be read while the next is
// written. The write side takes a channel number and a bank and stores the word at that
// channel's place in the bank; the read side addresses whole packets, 0..HDR_WORDS+CH-1,
// where the first HDR_WORDS addresses return the header.
//
// Two banks, and holding the header in a small constant table rather than in the memory, are
// this design's choices; the header in the first locations follows the published design.
//
// Timing: writes take effect on the clock edge; reads are registered, rd_data is valid one
// cycle after rd_bank/rd_addr.
module tx_packet_buffer
  import optel_pkg::*;
#(
  parameter int unsigned                      CH        = CHANNELS,
  parameter int unsigned                      W         = WORD_BITS,
  parameter int unsigned                      HDR_WORDS = HEADER_WORDS,
  parameter logic [HEADER_WORDS*WORD_BITS-1:0] HDR      = HEADER
) (
  input  logic                           clk,
  input  logic                           wr_en,
  input  logic                           wr_bank,
  input  logic [$clog2(CH)-1:0]          wr_channel,
  input  logic [W-1:0]                   wr_data,
  input  logic                           rd_bank,
  input  logic [$clog2(CH+HDR_WORDS)-1:0] rd_addr,
  output logic [W-1:0]                   rd_data
);

  localparam int unsigned CW = $clog2(CH);
  localparam int unsigned AW = $clog2(CH + HDR_WORDS);
  localparam int unsigned HW = (HDR_WORDS > 1) ? $clog2(HDR_WORDS) : 1;

  logic [W-1:0] mem [2*CH];
  logic [W-1:0] mem_q;
  logic [W-1:0] hdr_q;
  logic         hdr_sel;
  logic [AW-1:0] ch_addr;

  function automatic logic [W-1:0] header_word(input logic [HW-1:0] i);
    // word 0 is the most significant part of the start sequence
    return HDR[W*(HDR_WORDS-1-int'(i)) +: W];
  endfunction

  // C.U. WR: channel number and bank to memory address.
  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_channel}] <= wr_data;
  end

  assign ch_addr = rd_addr - AW'(HDR_WORDS);

  always_ff @(posedge clk) begin
    mem_q   <= mem[{rd_bank, ch_addr[CW-1:0]}];
    hdr_sel <= (rd_addr < AW'(HDR_WORDS));
    hdr_q   <= header_word(rd_addr[HW-1:0]);
  end

  assign rd_data = hdr_sel ? hdr_q : mem_q;

endmodule
