// das_adc_model: behavioural model of the acquisition front end (channel multiplexer,
// sample-and-hold and converter), for simulation only.
//
// A conversion request for a channel returns, LAT clocks later, the word
// {frame[5:0], channel[9:0]}, where frame counts the requests for channel 0. The known
// pattern lets a testbench check that every word arrives in the right place.
module das_adc_model #(
  parameter int unsigned CH  = 1024,
  parameter int unsigned LAT = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  convert,
  input  logic [$clog2(CH)-1:0] channel,
  output logic [15:0]           sample,
  output logic                  valid
);

  logic [5:0]            frame;
  logic [7:0]            cnt;
  logic                  busy;
  logic [$clog2(CH)-1:0] ch_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= 6'h3f; cnt <= '0; busy <= 1'b0; valid <= 1'b0; sample <= '0; ch_q <= '0;
    end else begin
      valid <= 1'b0;
      if (convert) begin
        busy <= 1'b1;
        cnt  <= 8'(LAT);
        ch_q <= channel;
        if (channel == '0) frame <= frame + 1'b1;
      end else if (busy) begin
        if (cnt == 8'd1) begin
          busy   <= 1'b0;
          valid  <= 1'b1;
          sample <= 16'({frame, 10'(ch_q)});
        end
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
