// serializer: parallel-to-serial converter with its read control unit (C.U. RD).
//
// When the master reports a full bank (pkt_ready) at a bit boundary, the serializer sends the
// packet held in that bank: PKT_WORDS words, read one after the other from the packet buffer
// and shifted out MSB first, one bit per bit_tick. The read address always points at the next
// word, so it is waiting in the buffer's output register when the current word runs out and
// the stream has no gaps inside a packet. With no packet ready it sends fill zeros, so the
// line never stops. pkt_start and pkt_end pulse on the first and last bit of a packet.
//
// The published design states the continuous serialization; the fill zeros between packets
// are this design's choice.
//
// Timing: bit_out changes on the slot-clock edge at which bit_tick is high and is then stable
// for a whole bit period. A packet that is ready when the previous one ends follows it with
// no gap. Needs at least 3 slot clocks per bit (bank handover and buffer read latency).
module serializer
  import optel_pkg::*;
#(
  parameter int unsigned W         = WORD_BITS,
  parameter int unsigned PKT_WORDS = HEADER_WORDS + CHANNELS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         bit_tick,
  input  logic                         pkt_ready,
  output logic [$clog2(PKT_WORDS)-1:0] rd_addr,
  input  logic [W-1:0]                 rd_data,
  output logic                         bit_out,
  output logic                         fill_bit,
  output logic                         pkt_start,
  output logic                         pkt_end
);

  localparam int unsigned AW = $clog2(PKT_WORDS);
  localparam int unsigned BW = $clog2(W);

  logic          sending;
  logic [W-1:0]  sh;
  logic [BW-1:0] bc;       // bits of the current word already sent
  logic [AW-1:0] wi;       // index of the current word
  logic          last_word;

  assign last_word = (wi == AW'(PKT_WORDS - 1));
  assign rd_addr   = (sending && !last_word) ? wi + 1'b1 : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending   <= 1'b0;
      sh        <= '0;
      bc        <= '0;
      wi        <= '0;
      bit_out   <= 1'b0;
      fill_bit  <= 1'b0;
      pkt_start <= 1'b0;
      pkt_end   <= 1'b0;
    end else begin
      pkt_start <= 1'b0;
      pkt_end   <= 1'b0;
      if (bit_tick) begin
        if (!sending) begin
          if (pkt_ready) begin
            bit_out   <= rd_data[W-1];
            fill_bit  <= 1'b0;
            sh        <= rd_data << 1;
            bc        <= BW'(1);
            wi        <= '0;
            sending   <= 1'b1;
            pkt_start <= 1'b1;
          end else begin
            bit_out  <= 1'b0;
            fill_bit <= 1'b1;
          end
        end else begin
          bit_out  <= sh[W-1];
          fill_bit <= 1'b0;
          if (bc == BW'(W - 1)) begin
            if (last_word) begin
              sending <= 1'b0;
              pkt_end <= 1'b1;
            end else begin
              sh <= rd_data;
              wi <= wi + 1'b1;
            end
            bc <= '0;
          end else begin
            sh <= sh << 1;
            bc <= bc + 1'b1;
          end
        end
      end
    end
  end

endmodule
