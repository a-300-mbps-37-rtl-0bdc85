// tb_cu_das: acquisition control unit with 8 channels. In converter mode every channel must be
// requested in order and its word {frame, channel} stored with the right channel number, at
// 2 + converter-latency cycles per channel; in PRBS mode the generator words must be taken one
// per cycle; with no free buffer bank the frame must be dropped and reported.
module tb_cu_das;
  localparam int unsigned CH = 8, LAT = 3;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic frame_start = 0, wr_allowed = 1, prbs_mode = 0;
  logic [2:0] das_channel, word_channel;
  logic das_convert, das_valid, prbs_req, word_valid, frame_done, frame_dropped, busy;
  logic [15:0] das_sample, prbs_word = 16'h1234, word;
  cu_das #(.CH(CH), .W(16)) dut (.*);
  das_adc_model #(.CH(CH), .LAT(LAT)) u_adc (.clk, .rst_n, .convert(das_convert),
    .channel(das_channel), .sample(das_sample), .valid(das_valid));
  always @(posedge clk) if (prbs_req) prbs_word <= prbs_word + 16'h0101;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nwords = 0, ndone = 0, ndrop = 0, last_cycle = 0, cyc = 0;
  logic [15:0] words [$];
  logic [2:0]  chans [$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && word_valid) begin words.push_back(word); chans.push_back(word_channel); last_cycle = cyc; end
    if (rst_n && frame_done) ndone++;
    if (rst_n && frame_dropped) ndrop++;
  end

  task automatic pulse_start();
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // converter mode, two frames
    for (int f = 0; f < 2; f++) begin
      words.delete(); chans.delete();
      t0 = cyc;
      pulse_start();
      wait (ndone == f + 1);
      repeat (2) @(posedge clk);
      check(words.size() == CH, $sformatf("frame %0d: %0d words", f, words.size()));
      for (int i = 0; i < CH && i < words.size(); i++) begin
        check(chans[i] == 3'(i), "channel order");
        check(words[i] == {6'(f), 10'(i)}, $sformatf("word %h for ch %0d frame %0d", words[i], i, f));
      end
      check(last_cycle - t0 <= int'(CH * (2 + LAT)) + 3 && last_cycle - t0 >= int'(CH * (2 + LAT)),
            $sformatf("converter frame took %0d cycles", last_cycle - t0));
      check(!busy, "idle after frame");
    end
    // PRBS mode: one word per cycle
    prbs_mode = 1;
    words.delete(); chans.delete();
    t0 = cyc;
    pulse_start();
    wait (ndone == 3);
    repeat (2) @(posedge clk);
    check(words.size() == CH, "PRBS frame words");
    for (int i = 0; i < CH && i < words.size(); i++)
      check(words[i] == 16'h1234 + 16'(i) * 16'h0101, $sformatf("PRBS word %0d = %h", i, words[i]));
    check(last_cycle - t0 <= int'(CH) + 3, $sformatf("PRBS frame took %0d cycles", last_cycle - t0));
    // no free bank: frame dropped
    wr_allowed = 0;
    words.delete();
    pulse_start();
    repeat (20) @(posedge clk);
    check(ndrop == 1, "frame dropped");
    check(words.size() == 0, "nothing written while dropped");
    check(ndone == 3, "no frame_done for dropped frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
