// rx_buffer: output buffer of the post-processing, one word per channel.
//
// Holds the latest received word of each of CH channels. Every write is also presented on a
// streaming output (channel number and word) for external monitoring, and any channel can be
// read back through a registered read port. The published buffer offers the channels as
// parallel outputs; the streaming and read ports are this design's way of bringing 1024 words
// out.
//
// Timing: out_valid/out_channel/out_data follow a write by one cycle; rd_data follows rd_addr
// by one cycle.
module rx_buffer
  import optel_pkg::*;
#(
  parameter int unsigned CH = CHANNELS,
  parameter int unsigned W  = WORD_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [$clog2(CH)-1:0] wr_addr,
  input  logic [W-1:0]          wr_data,
  input  logic [$clog2(CH)-1:0] rd_addr,
  output logic [W-1:0]          rd_data,
  output logic                  out_valid,
  output logic [$clog2(CH)-1:0] out_channel,
  output logic [W-1:0]          out_data
);

  logic [W-1:0] mem [CH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_channel <= '0;
      out_data    <= '0;
    end else begin
      out_valid <= wr_en;
      if (wr_en) begin
        out_channel <= wr_addr;
        out_data    <= wr_data;
      end
    end
  end

endmodule
