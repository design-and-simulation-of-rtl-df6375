// overflow_detection: registered signed-overflow detector for a two's-
// complement addition sum = in1 + in2.
//
// Overflow happens when both addends have the same sign and the sum has the
// other sign. The result is captured on the rising edge (one cycle of
// latency) and drives both ovf and error, as in the published 64-bit adder
// schematic. The three inputs must belong to the same addition; the caller
// aligns them. The sign rule is the standard one; the document states only
// that overflow of signed addition and subtraction is reported as an error.
module overflow_detection #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] sum,
  output logic             ovf,
  output logic             error
);

  logic ovf_d;

  assign ovf_d = (in1[WIDTH-1] == in2[WIDTH-1]) && (sum[WIDTH-1] != in1[WIDTH-1]);

  always_ff @(posedge clk)
    ovf <= ovf_d;

  assign error = ovf;

endmodule
