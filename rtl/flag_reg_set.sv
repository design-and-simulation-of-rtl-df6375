// flag_reg_set: registered status flags of a unit result.
//
// flag_reg = {parity, overflow, sign, zero}, most significant bit first, the
// order the document gives. parity is 1 when in1 holds an even number of
// ones (the polarity is this design's choice), overflow copies in2, sign is
// the top bit of in1 and zero is set when in1 is all zeros. One cycle of
// latency.
module flag_reg_set
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in1,
  input  logic             in2,
  output flags_t           flag_reg
);

  flags_t flags_d;

  always_comb begin
    flags_d.parity   = ~(^in1);
    flags_d.overflow = in2;
    flags_d.sign     = in1[WIDTH-1];
    flags_d.zero     = (in1 == '0);
  end

  always_ff @(posedge clk)
    flag_reg <= flags_d;

endmodule
