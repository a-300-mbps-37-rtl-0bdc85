// cu_decod: decoder control unit with its ready-period counter.
//
// It sets the tap of the delay line. After every tap change it lets SETTLE clock periods pass,
// then counts consecutive clock periods in which the ready sample is high. A low ready moves
// the tap on by one (wrapping at TAPS) and restarts the count; READY clock periods in a row
// declare alignment, as the published control unit does with its 50-period rule. Aligned, it
// keeps the tap until ready is low for LOSS consecutive periods, then searches again from the
// next tap. While the clock recovery is not locked the count is held at zero.
//
// The settle time, the loss rule and searching upward from tap 0 are this design's choices.
//
// Timing: ready_stb is the once-per-period strobe that qualifies ready. tap changes in the
// cycle after the strobe that failed.
module cu_decod
  import optel_pkg::*;
#(
  parameter int unsigned TAPS   = DELAY_TAPS,
  parameter int unsigned READY  = READY_PERIODS,
  parameter int unsigned SETTLE = 2,
  parameter int unsigned LOSS   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    ready,
  input  logic                    ready_stb,
  output logic [$clog2(TAPS)-1:0] tap,
  output logic                    aligned,
  output logic [15:0]             tap_steps,
  output logic [$clog2(READY+1)-1:0] count
);

  localparam int unsigned TW = $clog2(TAPS);
  localparam int unsigned CW = $clog2(READY + 1);
  localparam int unsigned SW = $clog2(SETTLE + 1);
  localparam int unsigned LW = $clog2(LOSS + 1);

  logic [SW-1:0] settle;
  logic [LW-1:0] loss;

  task automatic step_tap();
    tap    <= (tap == TW'(TAPS - 1)) ? '0 : tap + 1'b1;
    settle <= SW'(SETTLE);
    count  <= '0;
    if (tap_steps != '1) tap_steps <= tap_steps + 1'b1;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap       <= '0;
      aligned   <= 1'b0;
      tap_steps <= '0;
      count     <= '0;
      settle    <= SW'(SETTLE);
      loss      <= '0;
    end else if (!enable) begin
      aligned <= 1'b0;
      count   <= '0;
      settle  <= SW'(SETTLE);
      loss    <= '0;
    end else if (ready_stb) begin
      if (!aligned) begin
        if (settle != '0) begin
          settle <= settle - 1'b1;
        end else if (ready) begin
          // COUNTER: consecutive periods with ready high
          if (count == CW'(READY - 1)) begin
            aligned <= 1'b1;
            loss    <= '0;
          end
          count <= count + 1'b1;
        end else begin
          step_tap();
        end
      end else begin
        if (ready) begin
          loss <= '0;
        end else if (loss == LW'(LOSS - 1)) begin
          aligned <= 1'b0;
          loss    <= '0;
          step_tap();
        end else begin
          loss <= loss + 1'b1;
        end
      end
    end
  end

endmodule
