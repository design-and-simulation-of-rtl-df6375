// adds_64: signed 64-bit addition, the ADD component of the arithmetic unit.
//
// A pipelined conditional sum adder (cosa) forms in1 + in2 with carry-in 0.
// The operand sign bits travel beside the adder in a delay line so that the
// overflow detector sees the operands and the sum of the same addition. The
// sum is registered once more so that sum1, ovf and error leave together.
//
// Timing: one addition per cycle, result 1 + log2(WIDTH) + 1 cycles after the
// operands (8 for 64 bits, equal to alu_pkg::COMP_LAT). On overflow sum1
// holds the wrapped two's-complement sum and error = ovf = 1.
module adds_64 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic [WIDTH-1:0] sum1,
  output logic             error,
  output logic             ovf
);

  localparam int unsigned ADD_LAT = 1 + $clog2(WIDTH);

  logic [WIDTH-1:0] sum;
  logic             cout_unused;
  logic [1:0]       signs_d;

  cosa #(.W(WIDTH)) u_cosa (
    .clk (clk),
    .in1 (in1),
    .in2 (in2),
    .cin (1'b0),
    .sum (sum),
    .cout(cout_unused)
  );

  pipe_delay #(.W(2), .DEPTH(ADD_LAT)) u_signs (
    .clk(clk),
    .d  ({in1[WIDTH-1], in2[WIDTH-1]}),
    .q  (signs_d)
  );

  overflow_detection #(.WIDTH(WIDTH)) u_ovf (
    .clk  (clk),
    .in1  ({signs_d[1], {(WIDTH-1){1'b0}}}),
    .in2  ({signs_d[0], {(WIDTH-1){1'b0}}}),
    .sum  (sum),
    .ovf  (ovf),
    .error(error)
  );

  always_ff @(posedge clk)
    sum1 <= sum;

endmodule
