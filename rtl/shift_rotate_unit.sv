// shift_rotate_unit: the six shift and rotate operations of the ALU
// (operation codes 10xxx).
//
// Six shifter_64 components (sll, srl, sla, sra, rotate left, rotate right)
// work on every operation in parallel; each shifts input1 by the signed
// count input2 and registers its result. A clocked multiplexer picks the one
// named by SRunit_cont, an output register and flag_reg_set present result
// and flags. Codes 110 and 111 are unused: the result is 0 and error = 1.
// Shifts set no overflow. A delay line between the multiplexer and the output
// register gives the unit the latency of the arithmetic unit,
// alu_pkg::UNIT_LAT (10 cycles).
//
// The components and the codes follow the document; the unused-code error
// and the alignment delay are this design's choices.
module shift_rotate_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] input1,
  input  logic [WIDTH-1:0] input2,
  input  logic [2:0]       SRunit_cont,
  output logic [WIDTH-1:0] SRunit_out,
  output logic             error,
  output flags_t           flag_reg
);

  localparam shift_op_e OPS [6] = '{SH_SLL, SH_SRL, SH_SLA, SH_SRA, SH_ROTL, SH_ROTR};

  logic [WIDTH-1:0] comp [6];
  logic [2:0]       op_q;
  logic [WIDTH-1:0] mux_q;
  logic             err_q;
  logic [WIDTH-1:0] mux_d;
  logic             err_d;

  for (genvar i = 0; i < 6; i++) begin : g_comp
    shifter_64 #(.WIDTH(WIDTH), .OP(OPS[i])) u_shift (
      .clk (clk),
      .in1 (input1),
      .shft(input2),
      .out1(comp[i])
    );
  end

  always_ff @(posedge clk)
    op_q <= SRunit_cont;

  // Clocked multiplexer.
  always_ff @(posedge clk) begin
    if (op_q <= 3'd5) begin
      mux_q <= comp[op_q];
      err_q <= 1'b0;
    end else begin
      mux_q <= '0;
      err_q <= 1'b1;
    end
  end

  pipe_delay #(.W(WIDTH + 1), .DEPTH(COMP_LAT - 1)) u_align (
    .clk(clk), .d({err_q, mux_q}), .q({err_d, mux_d})
  );

  always_ff @(posedge clk) begin
    SRunit_out <= mux_d;
    error      <= err_d;
  end

  flag_reg_set #(.WIDTH(WIDTH)) u_flags (
    .clk(clk), .in1(mux_d), .in2(1'b0), .flag_reg(flag_reg)
  );

endmodule
