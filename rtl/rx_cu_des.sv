// rx_cu_des: deserializer control unit of the post-processing.
//
// While enabled it counts the recovered bits of the packet body and flags every W-th bit as
// the end of a channel word. start clears the count at the packet start.
//
// Timing: word_done pulses in the cycle after the bit_valid strobe of a word's last bit, the
// same cycle in which the serial-to-parallel register shows that bit.
module rx_cu_des
  import optel_pkg::*;
#(
  parameter int unsigned W = WORD_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 en,
  input  logic                 bit_valid,
  output logic                 word_done,
  output logic [$clog2(W)-1:0] bit_cnt
);

  localparam int unsigned BW = $clog2(W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt   <= '0;
      word_done <= 1'b0;
    end else begin
      word_done <= en && bit_valid && (bit_cnt == BW'(W - 1));
      if (start)                bit_cnt <= '0;
      else if (en && bit_valid) bit_cnt <= (bit_cnt == BW'(W - 1)) ? '0 : bit_cnt + 1'b1;
    end
  end

endmodule
