// shifter_64: one shift or rotate component of the shift/rotate unit; the
// parameter OP selects which of the six it is.
//
// in1 is shifted by the signed count in shft, with the meaning of the
// standard HDL operators the operation table is written in:
//   SH_SLL / SH_SRL  logical shift left / right, vacated bits 0
//   SH_SLA           arithmetic shift left, vacated bits copy in1[0]
//   SH_SRA           arithmetic shift right, vacated bits copy in1[WIDTH-1]
//   SH_ROTL / SH_ROTR rotate left / right, count taken modulo WIDTH
// A negative count shifts or rotates the other way by its magnitude; a
// magnitude of WIDTH or more shifts every bit out. The result is registered:
// one cycle of latency, one new operation per cycle.
module shifter_64
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 64,
  parameter shift_op_e   OP    = SH_SLL
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] shft,
  output logic [WIDTH-1:0] out1
);

  localparam int unsigned AW = $clog2(WIDTH);

  logic [WIDTH-1:0] mag;      // magnitude of the count
  logic             neg;      // count is negative: reverse the direction
  logic             all_out;  // magnitude >= WIDTH
  logic [AW-1:0]    amt;
  logic [WIDTH-1:0] res;

  // Shift left by amt, filling the vacated bits with fill.
  function automatic logic [WIDTH-1:0] shl(input logic [WIDTH-1:0] x,
                                           input logic [AW-1:0] n,
                                           input logic big, input logic fill);
    logic [WIDTH-1:0] ones;
    ones = '1;
    if (big) return {WIDTH{fill}};
    return (x << n) | (fill ? ~(ones << n) : '0);
  endfunction

  // Shift right by amt, filling the vacated bits with fill.
  function automatic logic [WIDTH-1:0] shr(input logic [WIDTH-1:0] x,
                                           input logic [AW-1:0] n,
                                           input logic big, input logic fill);
    logic [WIDTH-1:0] ones;
    ones = '1;
    if (big) return {WIDTH{fill}};
    return (x >> n) | (fill ? ~(ones >> n) : '0);
  endfunction

  function automatic logic [WIDTH-1:0] rotl(input logic [WIDTH-1:0] x,
                                            input logic [AW-1:0] n);
    return (x << n) | (x >> (WIDTH - int'(n)));
  endfunction

  assign neg     = shft[WIDTH-1];
  assign mag     = neg ? -shft : shft;
  assign all_out = (mag >= WIDTH'(WIDTH));
  assign amt     = mag[AW-1:0];

  always_comb begin
    unique case (OP)
      SH_SLL:  res = neg ? shr(in1, amt, all_out, 1'b0)
                         : shl(in1, amt, all_out, 1'b0);
      SH_SRL:  res = neg ? shl(in1, amt, all_out, 1'b0)
                         : shr(in1, amt, all_out, 1'b0);
      SH_SLA:  res = neg ? shr(in1, amt, all_out, in1[WIDTH-1])
                         : shl(in1, amt, all_out, in1[0]);
      SH_SRA:  res = neg ? shl(in1, amt, all_out, in1[0])
                         : shr(in1, amt, all_out, in1[WIDTH-1]);
      // Two's complement makes the low count bits already the right
      // rotation amount for a negative count.
      SH_ROTL: res = rotl(in1, shft[AW-1:0]);
      SH_ROTR: res = rotl(in1, AW'(-shft[AW-1:0]));
      default: res = '0;
    endcase
  end

  always_ff @(posedge clk)
    out1 <= res;

endmodule
