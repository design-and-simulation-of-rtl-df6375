// mults_64: signed multiplication by radix-2 Booth recoding, the MULT
// component of the arithmetic unit.
//
// Only the low MUL_W = WIDTH/2 bits of each operand are multiplied, so the
// 2*MUL_W-bit product always fits the WIDTH-bit result. An operand whose value
// lies outside the signed MUL_W-bit range (its bits WIDTH-1 .. MUL_W-1 are not
// all equal) cannot be multiplied: error = 1 and the product reads 0.
//
// Booth step, repeated MUL_W times on the register {acc, mq, q_m1}:
// (mq[0], q_m1) = 01 adds the multiplicand to acc, 10 subtracts it, 00 and 11
// do nothing; then the whole register shifts right arithmetically. acc is one
// bit wider than the multiplicand so the most negative multiplicand cannot
// overflow it. The MUL_W steps are spread evenly over STAGES pipeline
// registers, so one multiplication can start every cycle and its product
// appears STAGES cycles later (8, the same as the adder).
//
// The use of Booth's algorithm, the 32-bit operand size and the size-out
// error follow the document; the pipelining and the exact range test are this
// design's choices.
module mults_64 #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned STAGES = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] M,
  input  logic [WIDTH-1:0] Q,
  output logic [WIDTH-1:0] carpim,
  output logic             error
);

  localparam int unsigned N  = WIDTH / 2;                  // operand bits used
  localparam int unsigned SP = (N + STAGES - 1) / STAGES;  // Booth steps per stage

  typedef struct packed {
    logic [N:0]   acc;   // upper part, N+1 bits
    logic [N-1:0] mq;    // multiplier, shifted out as the product shifts in
    logic         q_m1;  // bit to the right of the multiplier
    logic [N-1:0] mcand; // multiplicand, carried along
    logic         err;
  } booth_t;

  // Representable in N signed bits: bits WIDTH-1 .. N-1 (passed in) all equal.
  function automatic logic fits_half(input logic [WIDTH-N:0] upper);
    return (upper == '0) || (upper == '1);
  endfunction

  function automatic booth_t booth_step(input booth_t s);
    booth_t           r;
    logic [N:0]       m_ext;
    logic [2*N+1:0]   whole;
    r     = s;
    m_ext = {s.mcand[N-1], s.mcand};
    case ({s.mq[0], s.q_m1})
      2'b01:   r.acc = s.acc + m_ext;
      2'b10:   r.acc = s.acc - m_ext;
      default: r.acc = s.acc;
    endcase
    whole  = {r.acc, r.mq, r.q_m1};
    whole  = {whole[2*N+1], whole[2*N+1:1]};
    r.acc  = whole[2*N+1:N+1];
    r.mq   = whole[N:1];
    r.q_m1 = whole[0];
    return r;
  endfunction

  booth_t init;
  booth_t stage_q [STAGES];

  always_comb begin
    init       = '0;
    init.mq    = Q[N-1:0];
    init.mcand = M[N-1:0];
    init.err   = !fits_half(M[WIDTH-1:N-1]) || !fits_half(Q[WIDTH-1:N-1]);
  end

  // Stage s performs Booth steps s*SP .. s*SP+SP-1 and registers the result.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    booth_t d_in, d_out;

    if (s == 0) begin : g_first
      assign d_in = init;
    end else begin : g_next
      assign d_in = stage_q[s-1];
    end

    always_comb begin
      d_out = d_in;
      for (int k = 0; k < SP; k++)
        if (s * SP + k < N)
          d_out = booth_step(d_out);
    end

    always_ff @(posedge clk)
      stage_q[s] <= d_out;
  end

  // {acc, mq} after N steps holds the 2N+1-bit product; keep the low 2N bits.
  assign carpim = stage_q[STAGES-1].err ? '0
                : {stage_q[STAGES-1].acc[N-1:0], stage_q[STAGES-1].mq};
  assign error  = stage_q[STAGES-1].err;

endmodule
