// rx_spc: serial-to-parallel converter of the post-processing.
//
// A WIDTH-bit shift register that takes one recovered bit per bit_valid strobe, newest bit in
// the LSB. Its full width is compared with the header; its low WORD_BITS bits are the channel
// word once a word's last bit has come in. WIDTH defaults to the header length (this design's
// choice; the published converter is described only by its role).
//
// Timing: q shows a bit in the cycle after its bit_valid strobe.
module rx_spc
  import optel_pkg::*;
#(
  parameter int unsigned WIDTH = HEADER_WORDS * WORD_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bit_in,
  input  logic             bit_valid,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= '0;
    else if (bit_valid) q <= {q[WIDTH-2:0], bit_in};
  end

endmodule
