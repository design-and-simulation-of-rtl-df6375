// pipe_delay: shift register that delays a W-bit word by DEPTH clock cycles.
//
// Used to carry operation codes, operand signs and early results alongside a
// longer path so that every input of a multiplexer belongs to the same
// operation. DEPTH = 0 is a plain wire. No reset: the contents are valid once
// DEPTH cycles of input have passed.
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];

    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++)
        stage[i] <= stage[i-1];
    end

    assign q = stage[DEPTH-1];
  end

endmodule
