// idelay_line: programmable delay line for the received pulse train.
//
// It stands in for the FPGA's input delay element: the input is delayed by a number of taps
// chosen at run time, so that the capture stage samples the pulses where they are, relative
// to the recovered clock. The line is a TAPS-stage shift register on the slot clock; tap t
// selects stage t, giving a delay of t + 2 slot clocks (one stage of input register and one
// of output register are always present). TAPS follows the published 512-tap delay element;
// a tap here is one slot (0.42 ns at the default resolution) rather than the element's
// picosecond-scale steps, which is this design's simplification.
module idelay_line
  import optel_pkg::*;
#(
  parameter int unsigned TAPS = DELAY_TAPS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    din,
  input  logic [$clog2(TAPS)-1:0] tap,
  output logic                    dout
);

  logic [TAPS-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      dout <= 1'b0;
    end else begin
      sr   <= {sr[TAPS-2:0], din};
      dout <= sr[tap];
    end
  end

endmodule
