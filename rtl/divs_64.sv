// divs_64: signed 64-bit division, the DIV component of the arithmetic unit;
// it also delivers the remainder, which the MOD component uses.
//
// Both operands are turned into magnitudes, divided by restoring long
// division (one quotient bit per step: shift the next dividend bit into the
// partial remainder, subtract the divisor when it fits), and the signs are put
// back: the quotient is negative when the operand signs differ and is
// truncated toward zero; the remainder takes the sign of the dividend.
//
// Errors: a zero divisor ("0/0" and "x/0") and the one overflowing case, the
// most negative number divided by -1. On error quotient and remainder read 0.
//
// Timing: the WIDTH steps are spread evenly over STAGES pipeline registers;
// one division can start every cycle and its result appears STAGES cycles
// later (8, the same as the adder). The document gives the function and the
// divide-by-zero errors; the algorithm and the pipelining are this design's.
module divs_64 #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned STAGES = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             error
);

  localparam int unsigned SP = (WIDTH + STAGES - 1) / STAGES;  // steps per stage

  typedef struct packed {
    logic [WIDTH:0]   rem;   // partial remainder, one guard bit
    logic [WIDTH-1:0] quo;   // dividend bits shift out, quotient bits shift in
    logic [WIDTH-1:0] dvs;   // divisor magnitude
    logic             neg_q;
    logic             neg_r;
    logic             err;
  } div_t;

  function automatic div_t div_step(input div_t s);
    div_t           r;
    logic [WIDTH:0] trial;
    r     = s;
    r.rem = {s.rem[WIDTH-1:0], s.quo[WIDTH-1]};
    r.quo = {s.quo[WIDTH-2:0], 1'b0};
    trial = r.rem - {1'b0, s.dvs};
    if (!trial[WIDTH]) begin
      r.rem    = trial;
      r.quo[0] = 1'b1;
    end
    return r;
  endfunction

  div_t init;
  div_t stage_q [STAGES];
  div_t last;
  logic [WIDTH-1:0] last_rem;

  always_comb begin
    init       = '0;
    init.quo   = dividend[WIDTH-1] ? -dividend : dividend;
    init.dvs   = divisor[WIDTH-1]  ? -divisor  : divisor;
    init.neg_q = dividend[WIDTH-1] ^ divisor[WIDTH-1];
    init.neg_r = dividend[WIDTH-1];
    init.err   = (divisor == '0) ||
                 ((dividend == {1'b1, {(WIDTH-1){1'b0}}}) && (divisor == '1));
  end

  // Stage s performs division steps s*SP .. s*SP+SP-1 and registers the result.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    div_t d_in, d_out;

    if (s == 0) begin : g_first
      assign d_in = init;
    end else begin : g_next
      assign d_in = stage_q[s-1];
    end

    always_comb begin
      d_out = d_in;
      for (int k = 0; k < SP; k++)
        if (s * SP + k < WIDTH)
          d_out = div_step(d_out);
    end

    always_ff @(posedge clk)
      stage_q[s] <= d_out;
  end

  assign last     = stage_q[STAGES-1];
  assign last_rem = last.rem[WIDTH-1:0];   // guard bit is 0 after the last step

  always_comb begin
    if (last.err) begin
      quotient  = '0;
      remainder = '0;
    end else begin
      quotient  = last.neg_q ? -last.quo : last.quo;
      remainder = last.neg_r ? -last_rem : last_rem;
    end
  end

  assign error = last.err;

endmodule
