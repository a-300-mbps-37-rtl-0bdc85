// optical_link_model: behavioural model of the analog path between the two link ends
// (laser driver, laser, tissue, photodiode and its amplifier), for simulation only.
//
// The electrical pulse train is delayed by a run-time number of slot clocks; while drop is
// high the received signal is held low, as when a pulse is too weak to cross the receiver's
// logic threshold. Amplitude, jitter and noise are not modelled.
module optical_link_model #(
  parameter int unsigned MAX_DELAY = 64
) (
  input  logic       clk,
  input  logic       din,
  input  logic       drop,
  input  logic [5:0] delay,
  output logic       dout
);

  logic [MAX_DELAY-1:0] line = '0;

  always_ff @(posedge clk) line <= {line[MAX_DELAY-2:0], din & ~drop};

  assign dout = (delay == 0) ? (din & ~drop) : line[delay-1];

endmodule
