// cu_das: acquisition control unit and WORD register of the pre-processing.
//
// On each frame_start the unit sequences through all CHANNELS channels. For every channel it
// either asks the front end for a conversion (das_convert with das_channel selecting the
// multiplexer input) and waits for das_valid, or, in PRBS test mode, takes the next word of the
// pseudo-random generator instead, bypassing the front end. The 16-bit result is held in the
// WORD register and announced with word_valid and its channel number, for the buffer write.
// After the last channel frame_done pulses. A frame that starts while no buffer bank is free
// (wr_allowed low) is skipped and reported on frame_dropped.
//
// The sequencing follows the published description; the request/valid handshake with the
// converter and the skip-on-overrun rule are this design's choices.
//
// Timing: ADC mode takes 2 cycles plus the converter latency per channel; PRBS mode 1 cycle
// per channel. word_valid, frame_done and frame_dropped are one-cycle pulses.
module cu_das
  import optel_pkg::*;
#(
  parameter int unsigned CH = CHANNELS,
  parameter int unsigned W  = WORD_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frame_start,
  input  logic                  wr_allowed,
  input  logic                  prbs_mode,
  // converter front end
  output logic [$clog2(CH)-1:0] das_channel,
  output logic                  das_convert,
  input  logic [W-1:0]          das_sample,
  input  logic                  das_valid,
  // PRBS generator
  input  logic [W-1:0]          prbs_word,
  output logic                  prbs_req,
  // WORD register towards the buffer
  output logic [W-1:0]          word,
  output logic                  word_valid,
  output logic [$clog2(CH)-1:0] word_channel,
  output logic                  frame_done,
  output logic                  frame_dropped,
  output logic                  busy
);

  localparam int unsigned CW = $clog2(CH);

  typedef enum logic [1:0] {S_IDLE, S_CONVERT, S_WAIT} state_t;
  state_t state;
  logic [CW-1:0] ch;
  logic          take;      // a word is stored this cycle
  logic [W-1:0]  take_word;

  assign das_channel = ch;
  assign das_convert = (state == S_CONVERT) && !prbs_mode;
  assign prbs_req    = (state == S_CONVERT) &&  prbs_mode;
  assign busy        = (state != S_IDLE);

  always_comb begin
    take      = 1'b0;
    take_word = das_sample;
    if (state == S_CONVERT && prbs_mode) begin
      take      = 1'b1;
      take_word = prbs_word;
    end else if (state == S_WAIT && das_valid) begin
      take      = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      ch            <= '0;
      word          <= '0;
      word_valid    <= 1'b0;
      word_channel  <= '0;
      frame_done    <= 1'b0;
      frame_dropped <= 1'b0;
    end else begin
      word_valid    <= 1'b0;
      frame_done    <= 1'b0;
      frame_dropped <= 1'b0;
      unique case (state)
        S_IDLE: if (frame_start) begin
          if (wr_allowed) begin
            ch    <= '0;
            state <= S_CONVERT;
          end else begin
            frame_dropped <= 1'b1;
          end
        end
        S_CONVERT: if (!prbs_mode) state <= S_WAIT;
        S_WAIT: ;
        default: state <= S_IDLE;
      endcase
      if (take) begin
        word         <= take_word;
        word_valid   <= 1'b1;
        word_channel <= ch;
        if (ch == CW'(CH - 1)) begin
          frame_done <= 1'b1;
          state      <= S_IDLE;
        end else begin
          ch    <= ch + 1'b1;
          state <= S_CONVERT;
        end
      end
    end
  end

endmodule
