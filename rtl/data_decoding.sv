// data_decoding: receiver front end, from the received pulse train to clock and bits.
//
// The received signal feeds both the clock recovery and the programmable delay line. The
// capture stage samples the delayed signal at the rising edge of the recovered clock (ready:
// the synchronisation pulse is there) and at its falling edge (the data bit). The decoder
// control unit moves the delay tap until ready stays high for READY clock periods; from then
// on rec_bit_valid marks each recovered bit. This is the published decoder structure; the
// delay element's voltage/temperature calibration has nothing to do in this slot-accurate
// model and is left out.
//
// Interface: everything runs on the receiver's slot clock; rec_clk is the recovered 50 %
// clock as a signal, rec_bit_valid a one-cycle strobe per recovered bit.
module data_decoding
  import optel_pkg::*;
#(
  parameter int unsigned SLOTS = SLOTS_PER_BIT,
  parameter int unsigned HOLD  = HOLD_SLOTS,
  parameter int unsigned TAPS  = DELAY_TAPS,
  parameter int unsigned READY = READY_PERIODS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rx_pulse,
  output logic                    rec_clk,
  output logic                    rec_bit,
  output logic                    rec_bit_valid,
  output logic                    ff_q,
  output logic                    pll_locked,
  output logic                    aligned,
  output logic                    ready,
  output logic [$clog2(TAPS)-1:0] tap,
  output logic [15:0]             tap_steps,
  output logic [15:0]             edges_ignored
);

  logic                     rise_stb, fall_stb, ready_stb, bit_valid, delayed;
  logic [$clog2(SLOTS)-1:0] phase;
  logic [$clog2(READY+1)-1:0] count;

  clock_recovery #(.SLOTS(SLOTS), .HOLD(HOLD)) u_cdr (
    .clk, .rst_n, .rx_pulse, .ff_q, .rec_clk, .rise_stb, .fall_stb, .phase,
    .pll_locked, .edges_ignored
  );

  idelay_line #(.TAPS(TAPS)) u_delay (
    .clk, .rst_n, .din(rx_pulse), .tap, .dout(delayed)
  );

  iddr_capture u_iddr (
    .clk, .rst_n, .din(delayed), .rise_stb, .fall_stb,
    .ready, .ready_stb, .data_bit(rec_bit), .bit_valid
  );

  cu_decod #(.TAPS(TAPS), .READY(READY)) u_cu (
    .clk, .rst_n, .enable(pll_locked), .ready, .ready_stb,
    .tap, .aligned, .tap_steps, .count
  );

  assign rec_bit_valid = bit_valid & aligned;

endmodule
