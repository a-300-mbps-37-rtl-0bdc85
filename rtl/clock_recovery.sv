// clock_recovery: recovers a 50 % duty-cycle bit clock from the received pulse train.
//
// Stage 1, flip-flop and latch: the rising edge of the received signal sets a flip-flop
// (its D input tied high) and a feedback path resets it HOLD slots later, about 75 % of the
// bit period. A data pulse, which arrives half a period after its synchronisation pulse,
// falls inside the hold time, so the flip-flop output ff_q shows exactly one pulse per bit
// period whatever the data. Here the feedback delay is a down-counter on the slot clock.
//
// Stage 2, PLL: a modulo-SLOTS phase counter whose phase 0 is placed on the rising edges of
// ff_q. Unlocked, it jumps to every edge and declares lock after LOCK_EDGES consecutive
// edges that fall on its phase 0. Locked, it follows edges within one slot of phase 0 and
// ignores others, so a missing synchronisation pulse (no edge, or edges shifted by half a
// period until the next '0' bit) does not move the recovered clock; UNLOCK_EDGES consecutive
// ignored edges drop the lock. rec_clk is high for the first half of the period; rise_stb and
// fall_stb mark its rising and falling edges for the capture stage.
//
// The flip-flop/latch structure, the ~75 % hold and the PLL's role (50 % duty cycle, holding
// lock through transmission errors) follow the published design. The digital phase counter
// standing in for the FPGA's analog PLL, its lock rules and window are this design's choices.
//
// Timing: ff_q rises one slot clock after the received edge; in lock, rise_stb is high in
// that same cycle.
module clock_recovery
  import optel_pkg::*;
#(
  parameter int unsigned SLOTS        = SLOTS_PER_BIT,
  parameter int unsigned HOLD         = HOLD_SLOTS,
  parameter int unsigned LOCK_EDGES   = 8,
  parameter int unsigned UNLOCK_EDGES = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rx_pulse,
  output logic                     ff_q,
  output logic                     rec_clk,
  output logic                     rise_stb,
  output logic                     fall_stb,
  output logic [$clog2(SLOTS)-1:0] phase,
  output logic                     pll_locked,
  output logic [15:0]              edges_ignored
);

  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned HW = $clog2(HOLD + 1);
  localparam int unsigned LW = $clog2(LOCK_EDGES + UNLOCK_EDGES + 1);

  // ---- flip-flop with delayed self-reset ----
  logic          pulse_d, pulse_edge;
  logic [HW-1:0] hold;

  assign pulse_edge = rx_pulse & ~pulse_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulse_d <= 1'b0;
      ff_q    <= 1'b0;
      hold    <= '0;
    end else begin
      pulse_d <= rx_pulse;
      if (!ff_q) begin
        if (pulse_edge) begin
          ff_q <= 1'b1;
          hold <= HW'(HOLD - 1);
        end
      end else if (hold == '0) begin
        ff_q <= 1'b0;
      end else begin
        hold <= hold - 1'b1;
      end
    end
  end

  // ---- phase-tracking PLL ----
  logic          q_d, q_rise;
  logic          near;          // edge within one slot of phase 0
  logic [LW-1:0] run;           // consecutive good (unlocked) or ignored (locked) edges

  assign q_rise = ff_q & ~q_d;
  assign near   = (phase == '0) || (phase == SW'(1)) || (phase == SW'(SLOTS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_d           <= 1'b0;
      phase         <= '0;
      pll_locked    <= 1'b0;
      run           <= '0;
      edges_ignored <= '0;
    end else begin
      q_d   <= ff_q;
      phase <= (phase == SW'(SLOTS - 1)) ? '0 : phase + 1'b1;
      if (q_rise) begin
        if (!pll_locked) begin
          phase <= SW'(1);                    // phase 0 is this cycle
          if (phase == '0) begin
            run <= run + 1'b1;
            if (run == LW'(LOCK_EDGES - 1)) begin
              pll_locked <= 1'b1;
              run        <= '0;
            end
          end else begin
            run <= '0;
          end
        end else if (near) begin
          phase <= SW'(1);
          run   <= '0;
        end else begin
          if (edges_ignored != '1) edges_ignored <= edges_ignored + 1'b1;
          run <= run + 1'b1;
          if (run == LW'(UNLOCK_EDGES - 1)) begin
            pll_locked <= 1'b0;
            run        <= '0;
          end
        end
      end
    end
  end

  assign rec_clk  = (phase < SW'(SLOTS / 2));
  assign rise_stb = (phase == '0);
  assign fall_stb = (phase == SW'(SLOTS / 2));

  initial begin
    assert (HOLD > SLOTS / 2 && HOLD < SLOTS) else $error("HOLD must lie between half and one bit period");
  end

endmodule
