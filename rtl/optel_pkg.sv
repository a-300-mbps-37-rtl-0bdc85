// optel_pkg: constants and types shared by the pulsed optical telemetry link.
//
// The link carries a time-division-multiplexed packet stream (one 16-bit sample of each of
// 1024 channels, preceded by a start header) over a single optical pulse train at 300 Mbps.
// Every bit period carries a synchronisation pulse at the rising clock edge and, for a '1',
// a data pulse at the falling edge.
//
// Time inside a bit period is modelled with a slot clock running SLOTS_PER_BIT times faster
// than the bit clock; each slot is one tick of that clock. Pulse widths, the clock-recovery
// hold time and the delay-line taps are all counted in slots. The bit rate, word length,
// channel count, 25 % pulse duty, the 75 % hold time and the 50-period alignment rule follow
// the published design; the slot resolution, header word and frame length in bits are this
// design's choices.
package optel_pkg;

  // Bit-period timing, in slots of the slot clock.
  localparam int unsigned SLOTS_PER_BIT = 8;   // 8 slots of 0.417 ns per 3.33 ns bit
  localparam int unsigned PULSE_SLOTS   = 2;   // 25 % of the bit period (0.83 ns)
  localparam int unsigned HOLD_SLOTS    = 6;   // one-shot hold, ~75 % of the period (2.4 ns)

  // Packet format.
  localparam int unsigned WORD_BITS     = 16;  // one sample = 2 bytes
  localparam int unsigned CHANNELS      = 1024;
  localparam int unsigned HEADER_WORDS  = 2;   // 32-bit start sequence
  localparam logic [HEADER_WORDS*WORD_BITS-1:0] HEADER = 32'h1ACF_FC1D;
  // Bits per acquisition frame: 300 Mbps / 18 kHz = 16666.7, rounded up.
  localparam int unsigned FRAME_BITS    = 16667;

  // Receiver alignment.
  localparam int unsigned DELAY_TAPS    = 512; // programmable delay line taps
  localparam int unsigned READY_PERIODS = 50;  // ready must hold for this many clock periods

  typedef logic [WORD_BITS-1:0] word_t;

endpackage
