// rx_cu_wr: buffer write control unit of the post-processing.
//
// Gives each completed channel word its channel number, 0..CH-1 in packet order, and writes it
// into the output buffer. After the word of the last channel, packet_done pulses and the
// channel count returns to 0. start clears the count at the packet start.
//
// Timing: wr_en is the word_done strobe qualified by en; packet_done is registered, one cycle
// after the last write.
module rx_cu_wr
  import optel_pkg::*;
#(
  parameter int unsigned CH = CHANNELS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  en,
  input  logic                  word_done,
  output logic                  wr_en,
  output logic [$clog2(CH)-1:0] wr_addr,
  output logic                  packet_done
);

  localparam int unsigned CW = $clog2(CH);

  assign wr_en = en & word_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr     <= '0;
      packet_done <= 1'b0;
    end else begin
      packet_done <= wr_en && (wr_addr == CW'(CH - 1));
      if (start)      wr_addr <= '0;
      else if (wr_en) wr_addr <= (wr_addr == CW'(CH - 1)) ? '0 : wr_addr + 1'b1;
    end
  end

endmodule
