// logic_unit: the eight bitwise operations of the ALU (operation codes 01xxx).
//
// lunit_cont selects AND, OR, XOR, NOT A, NOT B, NAND, NOR or XNOR of the two
// 64-bit operands. As in the other units, every operation is formed in a
// registered component, a clocked multiplexer picks one, and an output
// register and flag_reg_set present result and flags. A delay line between
// the multiplexer and the output register gives this unit the same latency
// as the arithmetic unit, alu_pkg::UNIT_LAT (10 cycles), so the ALU's final
// multiplexer always sees the results of one operation. Logic operations
// raise no error and set no overflow.
//
// The operation set and codes follow the document; the internal structure is
// modelled on its other two units, and the alignment delay is this design's.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] input1,
  input  logic [WIDTH-1:0] input2,
  input  logic [2:0]       lunit_cont,
  output logic [WIDTH-1:0] lunit_out,
  output logic             error,
  output flags_t           flag_reg
);

  logic [WIDTH-1:0] comp_q [8];   // component results, indexed by operation code
  logic [2:0]       op_q;
  logic [WIDTH-1:0] mux_q;
  logic [WIDTH-1:0] mux_d;

  // Components: one register stage.
  always_ff @(posedge clk) begin
    comp_q[LG_AND]  <= input1 & input2;
    comp_q[LG_OR]   <= input1 | input2;
    comp_q[LG_XOR]  <= input1 ^ input2;
    comp_q[LG_NOTA] <= ~input1;
    comp_q[LG_NOTB] <= ~input2;
    comp_q[LG_NAND] <= ~(input1 & input2);
    comp_q[LG_NOR]  <= ~(input1 | input2);
    comp_q[LG_XNOR] <= ~(input1 ^ input2);
    op_q            <= lunit_cont;
  end

  // Clocked multiplexer.
  always_ff @(posedge clk)
    mux_q <= comp_q[op_q];

  // Align with the arithmetic unit: components take COMP_LAT there.
  pipe_delay #(.W(WIDTH), .DEPTH(COMP_LAT - 1)) u_align (
    .clk(clk), .d(mux_q), .q(mux_d)
  );

  always_ff @(posedge clk)
    lunit_out <= mux_d;

  assign error = 1'b0;

  flag_reg_set #(.WIDTH(WIDTH)) u_flags (
    .clk(clk), .in1(mux_d), .in2(1'b0), .flag_reg(flag_reg)
  );

endmodule
