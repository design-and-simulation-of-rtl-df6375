// mods_64: signed remainder, the MOD component of the arithmetic unit.
//
// It is the division component with its remainder taken as the output, as
// the document describes: out1 = in1 - (in1 / in2) * in2 with the quotient
// truncated toward zero, so out1 has the sign of in1 (or is 0). error is the
// divider's (zero divisor, or most negative number by -1); out1 is then 0.
// Timing: one operation per cycle, result STAGES (8) cycles later.
module mods_64 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic [WIDTH-1:0] out1,
  output logic             error
);

  logic [WIDTH-1:0] quotient_unused;

  divs_64 #(.WIDTH(WIDTH)) u_div (
    .clk      (clk),
    .dividend (in1),
    .divisor  (in2),
    .quotient (quotient_unused),
    .remainder(out1),
    .error    (error)
  );

endmodule
