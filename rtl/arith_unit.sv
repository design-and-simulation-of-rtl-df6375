// arith_unit: the signed arithmetic of the ALU (operation codes 00xxx):
// 000 ADD, 001 SUB, 010 MULT, 011 DIV, 100 MOD.
//
// Five components work on every operation in parallel: adds_64 and subs_64
// (pipelined conditional sum adders with overflow detection), mults_64
// (Booth multiplier on the low 32 bits of each operand), divs_64 and mods_64
// (pipelined restoring divider, quotient and remainder). All of them take
// alu_pkg::COMP_LAT (8) cycles. The operation code travels beside them; a
// clocked multiplexer then picks result, error and overflow of the selected
// component, and the output registers and flag_reg_set present them.
//
// Errors: ADD/SUB overflow (error and the overflow flag), MULT operand out of
// the 32-bit signed range, DIV/MOD by zero or most negative number by -1.
// Codes 101-111 are unused: result 0, error 1.
//
// Timing: one operation per cycle, result UNIT_LAT (10) cycles after the
// operands. The components, the multiplexer and the flag logic follow the
// document; register placement is this design's.
module arith_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] input1,
  input  logic [WIDTH-1:0] input2,
  input  logic [2:0]       aunit_cont,
  output logic [WIDTH-1:0] aunit_out,
  output logic             error,
  output flags_t           flag_reg
);

  logic [WIDTH-1:0] add_res, sub_res, mul_res, div_res, mod_res;
  logic             add_err, sub_err, mul_err, div_err, mod_err;
  logic             add_ovf, sub_ovf;
  logic [WIDTH-1:0] div_rem_unused;
  logic [2:0]       op_d;

  logic [WIDTH-1:0] mux_q;
  logic             mux_err_q;
  logic             mux_ovf_q;

  adds_64 #(.WIDTH(WIDTH)) comp_adder (
    .clk(clk), .in1(input1), .in2(input2),
    .sum1(add_res), .error(add_err), .ovf(add_ovf)
  );

  subs_64 #(.WIDTH(WIDTH)) comp_sub (
    .clk(clk), .bin(1'b0), .in1(input1), .in2(input2),
    .sub1(sub_res), .error(sub_err), .ovf(sub_ovf)
  );

  mults_64 #(.WIDTH(WIDTH), .STAGES(COMP_LAT)) comp_mult (
    .clk(clk), .M(input1), .Q(input2),
    .carpim(mul_res), .error(mul_err)
  );

  divs_64 #(.WIDTH(WIDTH), .STAGES(COMP_LAT)) comp_div (
    .clk(clk), .dividend(input1), .divisor(input2),
    .quotient(div_res), .remainder(div_rem_unused), .error(div_err)
  );

  mods_64 #(.WIDTH(WIDTH)) comp_mod (
    .clk(clk), .in1(input1), .in2(input2),
    .out1(mod_res), .error(mod_err)
  );

  pipe_delay #(.W(3), .DEPTH(COMP_LAT)) u_op_delay (
    .clk(clk), .d(aunit_cont), .q(op_d)
  );

  // Clocked multiplexer: result, error and overflow of the chosen component.
  always_ff @(posedge clk) begin
    mux_ovf_q <= 1'b0;
    case (op_d)
      AR_ADD: begin mux_q <= add_res; mux_err_q <= add_err; mux_ovf_q <= add_ovf; end
      AR_SUB: begin mux_q <= sub_res; mux_err_q <= sub_err; mux_ovf_q <= sub_ovf; end
      AR_MUL: begin mux_q <= mul_res; mux_err_q <= mul_err; end
      AR_DIV: begin mux_q <= div_res; mux_err_q <= div_err; end
      AR_MOD: begin mux_q <= mod_res; mux_err_q <= mod_err; end
      default: begin mux_q <= '0;     mux_err_q <= 1'b1;    end
    endcase
  end

  always_ff @(posedge clk) begin
    aunit_out <= mux_q;
    error     <= mux_err_q;
  end

  flag_reg_set #(.WIDTH(WIDTH)) comp_FG_set (
    .clk(clk), .in1(mux_q), .in2(mux_ovf_q), .flag_reg(flag_reg)
  );

endmodule
