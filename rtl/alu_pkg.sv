// alu_pkg: types and constants shared by the 64-bit pipelined ALU.
//
// The operation code is five bits wide. Bits [4:3] pick the unit (arithmetic,
// logic, shift/rotate) and bits [2:0] pick the operation inside that unit. The
// codes are the ALU's published operation table; the enum names are this
// design's own.
//
// Timing: every component (adder, subtractor, multiplier, divider, logic and
// shift components) delivers its result COMP_LAT cycles after its operands.
// A unit adds a clocked multiplexer and an output register (UNIT_LAT), and the
// top adds another clocked multiplexer and output register (ALU_LATENCY).
package alu_pkg;

  localparam int unsigned DATA_W      = 64;
  localparam int unsigned COMP_LAT    = 8;    // 1 + log2(64) COSA levels + 1 overflow stage
  localparam int unsigned UNIT_LAT    = COMP_LAT + 2;
  localparam int unsigned ALU_LATENCY = UNIT_LAT + 2;

  typedef enum logic [1:0] {
    UNIT_ARITH = 2'b00,
    UNIT_LOGIC = 2'b01,
    UNIT_SHIFT = 2'b10
  } unit_e;

  typedef enum logic [2:0] {
    AR_ADD = 3'b000,
    AR_SUB = 3'b001,
    AR_MUL = 3'b010,
    AR_DIV = 3'b011,
    AR_MOD = 3'b100
  } arith_op_e;

  typedef enum logic [2:0] {
    LG_AND  = 3'b000,
    LG_OR   = 3'b001,
    LG_XOR  = 3'b010,
    LG_NOTA = 3'b011,
    LG_NOTB = 3'b100,
    LG_NAND = 3'b101,
    LG_NOR  = 3'b110,
    LG_XNOR = 3'b111
  } logic_op_e;

  typedef enum logic [2:0] {
    SH_SLL  = 3'b000,
    SH_SRL  = 3'b001,
    SH_SLA  = 3'b010,
    SH_SRA  = 3'b011,
    SH_ROTL = 3'b100,
    SH_ROTR = 3'b101
  } shift_op_e;

  // Flag register, most significant bit first.
  typedef struct packed {
    logic parity;    // 1 when the result holds an even number of ones
    logic overflow;  // signed overflow of ADD / SUB
    logic sign;      // result bit 63
    logic zero;      // result is all zeros
  } flags_t;

endpackage
