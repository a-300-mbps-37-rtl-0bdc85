// iddr_capture: double-data-rate capture of the delayed pulse train.
//
// The delayed received signal is sampled at the rising and at the falling edge of the
// recovered clock, as the FPGA's input DDR register does. The rising-edge sample is the ready
// signal: it is high when the synchronisation pulse is caught, i.e. when the delay is right.
// The falling-edge sample is the recovered data bit: a data pulse present means '1'.
// The edges are given as one-slot strobes of the recovered clock.
//
// Timing: ready and data_bit are registered and held until the next sample; ready_stb and
// bit_valid are one-cycle pulses in the cycle after the respective sample.
module iddr_capture (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic rise_stb,
  input  logic fall_stb,
  output logic ready,
  output logic ready_stb,
  output logic data_bit,
  output logic bit_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready     <= 1'b0;
      ready_stb <= 1'b0;
      data_bit  <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      ready_stb <= rise_stb;
      bit_valid <= fall_stb;
      if (rise_stb) ready    <= din;
      if (fall_stb) data_bit <= din;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(rise_stb && fall_stb));

endmodule
