// tb_post_processing: 8 channels. A bit stream of random fill, a packet, fill, a packet with a
// corrupted header and another good packet is fed one bit per 8 cycles. The two good packets
// must come out as 8 words each with channel numbers 0..7 and the sent values, the corrupted
// one must be skipped, and the buffer read port must return the last packet.
module tb_post_processing;
  localparam int unsigned CH = 8;
  localparam logic [31:0] HDR = 32'h1ACF_FC1D;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic bit_in = 0, bit_valid = 0, ch_valid, receiving, packet_done;
  logic [2:0] ch_index, rd_addr = 0;
  logic [15:0] ch_data, rd_data;
  logic [31:0] packets, headers_found;
  post_processing #(.CH(CH)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [15:0] got_d [$];
  logic [2:0]  got_c [$];
  always @(posedge clk) if (rst_n && ch_valid) begin got_d.push_back(ch_data); got_c.push_back(ch_index); end

  task automatic send(input bit b);
    @(negedge clk) bit_in = b; bit_valid = 1;
    @(negedge clk) bit_valid = 0;
    repeat (6) @(negedge clk);
  endtask
  task automatic send_word(input logic [15:0] w, input int n);
    for (int i = n - 1; i >= 0; i--) send(w[i]);
  endtask
  logic [15:0] pk [3][CH];
  task automatic send_packet(input int p, input logic [31:0] h);
    send_word(h[31:16], 16); send_word(h[15:0], 16);
    for (int c = 0; c < CH; c++) send_word(pk[p][c], 16);
  endtask

  initial begin
    for (int p = 0; p < 3; p++) for (int c = 0; c < CH; c++) pk[p][c] = 16'($urandom) & 16'h7F7F;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    send_word(16'h0000, 16); send_word(16'h1234, 16);
    send_packet(0, HDR);
    send_word(16'h0000, 13);
    send_packet(1, HDR ^ 32'h0000_0100);
    send_word(16'h0000, 7);
    send_packet(2, HDR);
    send_word(16'h0000, 16);
    check(packets == 2 && headers_found == 2, $sformatf("packets %0d headers %0d", packets, headers_found));
    check(got_d.size() == 2 * CH, $sformatf("%0d words", got_d.size()));
    for (int i = 0; i < got_d.size() && i < 2 * CH; i++) begin
      int p;
      p = (i < CH) ? 0 : 2;
      check(got_c[i] == 3'(i % CH), "channel number");
      check(got_d[i] == pk[p][i % CH], $sformatf("word %0d = %h", i, got_d[i]));
    end
    for (int c = 0; c < CH; c++) begin
      @(negedge clk) rd_addr = 3'(c);
      @(negedge clk);
      check(rd_data == pk[2][c], "buffer holds the last packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
