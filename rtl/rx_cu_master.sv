// rx_cu_master: master control unit of the post-processing.
//
// It watches the header comparator after every recovered bit. In HUNT, a match marks the
// start of a packet: it pulses start to clear the word and channel counters and enters
// RECEIVE, in which the deserializer and write units are enabled. When the write unit reports
// the last channel (packet_done) it returns to HUNT and looks for the next header, so the
// fill bits between packets are skipped and a packet whose header was corrupted is dropped.
// Packets and header matches are counted.
//
// Timing: bit_valid is the recovered-bit strobe; the comparator output is looked at one cycle
// later, when the serial-to-parallel register holds that bit. start pulses the cycle after.
module rx_cu_master (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_valid,
  input  logic        match,
  input  logic        packet_done,
  output logic        start,
  output logic        receiving,
  output logic [31:0] packets,
  output logic [31:0] headers_found
);

  typedef enum logic {S_HUNT, S_RECEIVE} state_t;
  state_t state;
  logic   bv_d;

  assign receiving = (state == S_RECEIVE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_HUNT;
      bv_d          <= 1'b0;
      start         <= 1'b0;
      packets       <= '0;
      headers_found <= '0;
    end else begin
      bv_d  <= bit_valid;
      start <= 1'b0;
      unique case (state)
        S_HUNT: if (bv_d && match) begin
          state         <= S_RECEIVE;
          start         <= 1'b1;
          headers_found <= headers_found + 1'b1;
        end
        S_RECEIVE: if (packet_done) begin
          state   <= S_HUNT;
          packets <= packets + 1'b1;
        end
        default: state <= S_HUNT;
      endcase
    end
  end

endmodule
