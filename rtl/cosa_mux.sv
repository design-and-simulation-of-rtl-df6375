// cosa_mux: registered 2:1 selection stage of the conditional sum adder
// (the 33-bit "mux66_33" of the 64-bit adder, generalised to W bits).
//
// in1 holds {carry, sum} of a high half computed with carry-in 0 and in2 the
// same half computed with carry-in 1. sel is the carry out of the low half:
// sel = 0 passes in1, sel = 1 passes in2. The choice is captured on the rising
// edge, one cycle of latency.
module cosa_mux #(
  parameter int unsigned W = 33
) (
  input  logic         clk,
  input  logic         sel,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] muxout
);

  always_ff @(posedge clk)
    muxout <= sel ? in2 : in1;

endmodule
