// prbs31_gen: 2^31-1 pseudo-random bit sequence, delivered as WORD_BITS-bit words.
//
// Used in place of the acquisition front end to measure the bit error rate: each word is the
// next WORD_BITS bits of the sequence, earliest bit in the MSB. The recurrence is the usual
// PRBS31 polynomial x^31 + x^28 + 1, b[n] = b[n-31] ^ b[n-28]; the published design names only
// the sequence length, so the polynomial and the seed are this design's choices.
//
// Interface: word always shows the next unused word; a one-cycle req consumes it and the
// following word appears on the next clock.
module prbs31_gen
  import optel_pkg::*;
#(
  parameter int unsigned W    = WORD_BITS,
  parameter logic [30:0] SEED = 31'h7FFF_FFFF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  output logic [W-1:0] word
);

  logic [30:0] state;    // state[0] is the most recent bit
  logic [30:0] state_nx;

  always_comb begin
    logic [30:0] t;
    logic        b;
    t = state;
    word = '0;
    for (int i = 0; i < int'(W); i++) begin
      b = t[30] ^ t[27];
      word[W-1-i] = b;
      t = {t[29:0], b};
    end
    state_nx = t;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   state <= SEED;
    else if (req) state <= state_nx;
  end

  initial assert (SEED != '0) else $error("PRBS seed must be non-zero");

endmodule
