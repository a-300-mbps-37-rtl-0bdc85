// tx_cu_master: master control unit of the pre-processing.
//
// It keeps the acquisition, buffer write and buffer read in step so that the serial output is
// a continuous bitstream. A frame timer counts FRAME_BITS bit periods and starts one
// acquisition frame per period (18 kHz at 300 Mbps). The packet buffer has two banks: the
// acquisition writes bank wr_bank while the serializer reads bank rd_bank. A bank becomes full
// when its frame is written (das_frame_done) and free again when its packet has been sent
// (pkt_end). wr_allowed and pkt_ready tell the writer and reader whether their bank can be
// used. Dropped frames are counted.
//
// The published master control unit is described only by its role; the frame timer, the two
// banks and the full flags are this design's way of providing it.
//
// Timing: frame_start is a one-cycle pulse on the first bit_tick after reset and then every
// FRAME_BITS bit_ticks.
module tx_cu_master
  import optel_pkg::*;
#(
  parameter int unsigned FRAME = FRAME_BITS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_tick,
  input  logic        das_frame_done,
  input  logic        frame_dropped,
  input  logic        pkt_end,
  output logic        frame_start,
  output logic        wr_bank,
  output logic        wr_allowed,
  output logic        rd_bank,
  output logic        pkt_ready,
  output logic [15:0] frames_dropped
);

  localparam int unsigned FW = $clog2(FRAME);

  logic [FW-1:0] bit_cnt;
  logic [1:0]    full;

  assign frame_start = bit_tick && (bit_cnt == '0);
  assign wr_allowed  = !full[wr_bank];
  assign pkt_ready   = full[rd_bank];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt        <= '0;
      full           <= '0;
      wr_bank        <= 1'b0;
      rd_bank        <= 1'b0;
      frames_dropped <= '0;
    end else begin
      if (bit_tick) bit_cnt <= (bit_cnt == FW'(FRAME - 1)) ? '0 : bit_cnt + 1'b1;
      if (das_frame_done) begin
        full[wr_bank] <= 1'b1;
        wr_bank       <= !wr_bank;
      end
      if (pkt_end) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= !rd_bank;
      end
      if (frame_dropped && frames_dropped != '1) frames_dropped <= frames_dropped + 1'b1;
    end
  end

  // The writer finishes only a bank that was free, the reader only a bank that was full.
  assert property (@(posedge clk) disable iff (!rst_n) das_frame_done |-> !full[wr_bank]);
  assert property (@(posedge clk) disable iff (!rst_n) pkt_end |-> full[rd_bank]);

endmodule
