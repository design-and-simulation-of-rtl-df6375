// full_adder: one-bit full adder with registered outputs, the leaf cell of the
// conditional sum adder (cosa).
//
// sum and cout are the usual a ^ b ^ cin and majority(a, b, cin), captured on
// the rising clock edge, so the cell has a latency of one cycle. The
// registered output follows the clocked components of the ALU; how the full
// adder itself is built is this design's choice.
module full_adder (
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_ff @(posedge clk) begin
    sum  <= a ^ b ^ cin;
    cout <= (a & b) | (a & cin) | (b & cin);
  end

endmodule
