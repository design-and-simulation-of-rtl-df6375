// subs_64: signed 64-bit subtraction in1 - in2 - bin, the SUB component of
// the arithmetic unit.
//
// The subtraction runs through the same pipelined conditional sum adder as
// the addition: in1 + ~in2 + ~bin. The overflow detector checks that
// addition, i.e. it compares the sign of in1 with the sign of ~in2. In the
// ALU bin is tied to 0, as in the published schematic. Forming the difference
// by inverting in2 is this design's choice; the document only says the
// subtractor is built from the COSA.
//
// Timing: one subtraction per cycle, result COMP_LAT (8) cycles later;
// sub1 wraps on overflow and error = ovf = 1.
module subs_64 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             bin,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic [WIDTH-1:0] sub1,
  output logic             error,
  output logic             ovf
);

  localparam int unsigned ADD_LAT = 1 + $clog2(WIDTH);

  logic [WIDTH-1:0] in2_n;
  logic [WIDTH-1:0] diff;
  logic             cout_unused;
  logic [1:0]       signs_d;

  assign in2_n = ~in2;

  cosa #(.W(WIDTH)) u_cosa (
    .clk (clk),
    .in1 (in1),
    .in2 (in2_n),
    .cin (~bin),
    .sum (diff),
    .cout(cout_unused)
  );

  pipe_delay #(.W(2), .DEPTH(ADD_LAT)) u_signs (
    .clk(clk),
    .d  ({in1[WIDTH-1], in2_n[WIDTH-1]}),
    .q  (signs_d)
  );

  overflow_detection #(.WIDTH(WIDTH)) u_ovf (
    .clk  (clk),
    .in1  ({signs_d[1], {(WIDTH-1){1'b0}}}),
    .in2  ({signs_d[0], {(WIDTH-1){1'b0}}}),
    .sum  (diff),
    .ovf  (ovf),
    .error(error)
  );

  always_ff @(posedge clk)
    sub1 <= diff;

endmodule
