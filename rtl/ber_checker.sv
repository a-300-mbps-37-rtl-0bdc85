// ber_checker: bit error counter for the PRBS test mode.
//
// The received channel words, taken in order, continue the 2^31-1 sequence that the
// transmitter put into them. The checker predicts every bit from the 31 bits before it
// (b[n] = b[n-31] ^ b[n-28]) and counts mismatches once 31 bits have been seen; it needs no
// copy of the transmitter's state and recovers by itself after a lost packet. One wrong bit
// shows as up to three mismatches (it enters the prediction of two later bits). Each word is
// processed in one cycle, MSB first. The published design evaluates the error rate by comparing
// sent and received streams; the self-synchronising form is this design's choice.
module ber_checker
  import optel_pkg::*;
#(
  parameter int unsigned W = WORD_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         word_valid,
  input  logic [W-1:0] word,
  output logic [47:0]  bits_checked,
  output logic [31:0]  bit_errors,
  output logic         primed
);

  logic [30:0] hist;          // hist[0] is the most recent bit
  logic [5:0]  seen;          // bits seen, saturating at 31
  logic [30:0] hist_nx;
  logic [5:0]  seen_nx;
  logic [$clog2(W+1)-1:0] n_chk, n_err;

  always_comb begin
    logic b;
    hist_nx = hist;
    seen_nx = seen;
    n_chk   = '0;
    n_err   = '0;
    for (int i = W - 1; i >= 0; i--) begin
      b = word[i];
      if (seen_nx == 6'd31) begin
        n_chk = n_chk + 1'b1;
        if (b != (hist_nx[30] ^ hist_nx[27])) n_err = n_err + 1'b1;
      end else begin
        seen_nx = seen_nx + 1'b1;
      end
      hist_nx = {hist_nx[29:0], b};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist         <= '0;
      seen         <= '0;
      bits_checked <= '0;
      bit_errors   <= '0;
    end else if (word_valid) begin
      hist         <= hist_nx;
      seen         <= seen_nx;
      bits_checked <= bits_checked + 48'(n_chk);
      bit_errors   <= bit_errors + 32'(n_err);
    end
  end

  assign primed = (seen == 6'd31);

endmodule
