// alu_64bit: 64-bit pipelined arithmetic logic unit for signed numbers.
//
// Both operands go to three units that work in parallel: arith_unit (signed
// add, subtract, 32x32 multiply, divide, remainder), logic_unit (eight
// bitwise operations) and shift_rotate_unit (logical and arithmetic shifts,
// rotations). The five-bit alu_cont selects the operation: alu_cont[4:3] is
// the unit (00 arithmetic, 01 logic, 10 shift/rotate) and alu_cont[2:0] the
// operation inside it. A clocked multiplexer keeps the result, error and
// flags of the chosen unit and registers drive the outputs.
//
//   flag_reg = {parity, overflow, sign, zero}
//   error    = ADD/SUB overflow, MULT operand beyond 32 bits, DIV/MOD by
//              zero, or an unused operation code
//
// Timing: fully pipelined, one operation may be presented every clock cycle
// and its result, error and flags appear alu_pkg::ALU_LATENCY (12) rising
// edges later. There is no reset; outputs are meaningful from the twelfth
// edge after the first operation. Unit code 11 gives result 0 and error 1.
//
// Ports, operation codes, unit selection and flag order follow the document;
// the pipeline depth and the handling of unused codes are this design's.
module alu_64bit
  import alu_pkg::*;
(
  input  logic        clk,
  input  logic [63:0] input1,
  input  logic [63:0] input2,
  input  logic [4:0]  alu_cont,
  output logic [63:0] alu_out,
  output logic [3:0]  flag_reg,
  output logic        error
);

  localparam int unsigned WIDTH = DATA_W;

  logic [WIDTH-1:0] a_out, l_out, s_out;
  logic             a_err, l_err, s_err;
  flags_t           a_flags, l_flags, s_flags;
  logic [1:0]       unit_d;

  logic [WIDTH-1:0] mux_out_q;
  logic             mux_err_q;
  flags_t           mux_flags_q;

  arith_unit #(.WIDTH(WIDTH)) comp_arith_unit (
    .clk(clk), .input1(input1), .input2(input2), .aunit_cont(alu_cont[2:0]),
    .aunit_out(a_out), .error(a_err), .flag_reg(a_flags)
  );

  logic_unit #(.WIDTH(WIDTH)) comp_logic_unit (
    .clk(clk), .input1(input1), .input2(input2), .lunit_cont(alu_cont[2:0]),
    .lunit_out(l_out), .error(l_err), .flag_reg(l_flags)
  );

  shift_rotate_unit #(.WIDTH(WIDTH)) comp_sr_unit (
    .clk(clk), .input1(input1), .input2(input2), .SRunit_cont(alu_cont[2:0]),
    .SRunit_out(s_out), .error(s_err), .flag_reg(s_flags)
  );

  pipe_delay #(.W(2), .DEPTH(UNIT_LAT)) u_unit_delay (
    .clk(clk), .d(alu_cont[4:3]), .q(unit_d)
  );

  // Top-level clocked multiplexer.
  always_ff @(posedge clk) begin
    case (unit_d)
      UNIT_ARITH: begin mux_out_q <= a_out; mux_err_q <= a_err; mux_flags_q <= a_flags; end
      UNIT_LOGIC: begin mux_out_q <= l_out; mux_err_q <= l_err; mux_flags_q <= l_flags; end
      UNIT_SHIFT: begin mux_out_q <= s_out; mux_err_q <= s_err; mux_flags_q <= s_flags; end
      default:    begin mux_out_q <= '0;    mux_err_q <= 1'b1;  mux_flags_q <= '0;      end
    endcase
  end

  // Output registers.
  always_ff @(posedge clk) begin
    alu_out  <= mux_out_q;
    error    <= mux_err_q;
    flag_reg <= mux_flags_q;
  end

endmodule
