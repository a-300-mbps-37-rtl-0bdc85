// tx_clock_gen: transmitter bit clock (Clock_M) and bit-period phase.
//
// In the published transmitter an on-board PLL produces the 300 MHz bit clock Clock_M and a
// second PLL produces two pulse trains, A on the rising and B on the falling clock edge. Here
// both are derived from one slot clock that runs SLOTS times faster than the bit clock: a
// modulo-SLOTS counter gives the slot index inside the bit period, Clock_M is high for the
// first half of the period, and bit_tick marks the last slot so that bit-rate logic clocked by
// the slot clock advances exactly once per bit. Replacing the analog PLLs by a counter is this
// design's choice.
//
// Timing: slot counts 0..SLOTS-1 and restarts at 0 after reset; bit_tick is high in slot
// SLOTS-1; clock_m is high in slots 0..SLOTS/2-1.
module tx_clock_gen
  import optel_pkg::*;
#(
  parameter int unsigned SLOTS = SLOTS_PER_BIT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic [$clog2(SLOTS)-1:0] slot,
  output logic                     bit_tick,
  output logic                     clock_m
);

  localparam int unsigned SW = $clog2(SLOTS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         slot <= '0;
    else if (slot == SW'(SLOTS - 1))    slot <= '0;
    else                                slot <= slot + 1'b1;
  end

  assign bit_tick = (slot == SW'(SLOTS - 1));
  assign clock_m  = (slot < SW'(SLOTS / 2));

endmodule
