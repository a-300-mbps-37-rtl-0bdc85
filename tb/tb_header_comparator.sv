// tb_header_comparator: the header itself must match; every single-bit corruption of it and
// random patterns must not.
module tb_header_comparator;
  localparam logic [31:0] HDR = 32'h1ACF_FC1D;
  logic [31:0] pattern;
  logic match;
  header_comparator #(.WIDTH(32), .HDR(HDR)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    pattern = HDR; #1;
    check(match, "header matches");
    for (int i = 0; i < 32; i++) begin
      pattern = HDR ^ (32'd1 << i); #1;
      check(!match, $sformatf("bit %0d flipped", i));
    end
    for (int i = 0; i < 200; i++) begin
      pattern = $urandom; #1;
      check(match == (pattern == 32'h1ACF_FC1D), "random pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
