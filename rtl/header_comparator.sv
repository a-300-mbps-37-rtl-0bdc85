// header_comparator: recognises the packet start sequence in the serial-to-parallel register.
//
// match is high while the register holds exactly the header. Purely combinational. The
// header value is this design's choice (the published design does not print it).
module header_comparator
  import optel_pkg::*;
#(
  parameter int unsigned                   WIDTH = HEADER_WORDS * WORD_BITS,
  parameter logic [HEADER_WORDS*WORD_BITS-1:0] HDR = HEADER
) (
  input  logic [WIDTH-1:0] pattern,
  output logic             match
);

  assign match = (pattern == HDR[WIDTH-1:0]);

endmodule
