// data_encoder: pulse coding of the bitstream for the laser driver.
//
// Each bit period carries a synchronisation pulse (signal A) at the rising edge of the bit
// clock, and a data pulse at the falling edge when the bit is '1': the data pulse is the bit
// gated with signal B (AND), and the output is A OR data pulse, as in the published encoder.
// A and B are each PULSE_SLOTS slots wide (25 % of the period) and are 180 degrees apart.
// Instead of a PLL, the pulses are decoded from the slot index of tx_clock_gen.
//
// Interface: bit_in must be stable for a whole bit period (it changes at the slot SLOTS-1 ->
// 0 boundary). tx_pulse is registered and therefore lags the slot index by one slot clock.
module data_encoder
  import optel_pkg::*;
#(
  parameter int unsigned SLOTS  = SLOTS_PER_BIT,
  parameter int unsigned PULSE  = PULSE_SLOTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(SLOTS)-1:0] slot,
  input  logic                     bit_in,
  output logic                     tx_pulse
);

  localparam int unsigned SW = $clog2(SLOTS);

  logic pulse_a, pulse_b, data_pulse;

  assign pulse_a    = (slot < SW'(PULSE));
  assign pulse_b    = (slot >= SW'(SLOTS / 2)) && (slot < SW'(SLOTS / 2 + PULSE));
  assign data_pulse = bit_in & pulse_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_pulse <= 1'b0;
    else        tx_pulse <= pulse_a | data_pulse;
  end

  initial begin
    assert (SLOTS >= 4 && SLOTS % 2 == 0) else $error("SLOTS must be even and at least 4");
    assert (PULSE >= 1 && PULSE < SLOTS / 2) else $error("PULSE must be shorter than half a period");
  end

endmodule
