// cosa: W-bit conditional sum adder, one pipeline register per level.
//
// Level 0 adds every bit twice with registered full adders, once assuming a
// carry-in of 0 and once of 1; bit 0 is added only once, with the real cin.
// Each later level joins neighbouring blocks in pairs: for each assumed
// carry into the pair, the low block's carry (under that assumption) picks,
// through a registered cosa_mux, which version of the high block (sum and
// carry out) is kept. After log2(W) levels one block remains and its version
// 0, which for block 0 is the real-cin result, is the sum. No carry ever
// ripples past one bit; the cost is two full adders per bit and two
// multiplexers per block per level. For block 0 both versions are the same
// signal.
//
// Interface: {cout, sum} = in1 + in2 + cin. Timing: a new addition may start
// every cycle; its result appears 1 + log2(W) rising edges later (7 for 64
// bits). W must be a power of two.
//
// The pair of full adders per bit and the carry-driven selection follow the
// published 4-bit conditional sum adder; at the top level the low 32 bits
// select one of two high-32-bit results, as in the published 64-bit adder,
// except that here the two high results share their lower levels instead of
// being two separate 32-bit adders. The register per level is this design's
// reading of its clocked components.
module cosa #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = $clog2(W);

  for (genvar k = 0; k <= L; k++) begin : g_lvl
    localparam int unsigned NB = W >> k;   // blocks at this level
    localparam int unsigned H  = 1 << k;   // width of a block at this level

    logic [W-1:0]  s0, s1;   // block sums assuming carry-in 0 / 1
    logic [NB-1:0] c0, c1;   // block carries assuming carry-in 0 / 1

    if (k == 0) begin : g_fa
      for (genvar i = 0; i < W; i++) begin : g_bit
        if (i == 0) begin : g_b0
          full_adder u_fa (
            .clk(clk), .a(in1[0]), .b(in2[0]), .cin(cin),
            .sum(s0[0]), .cout(c0[0])
          );
          assign s1[0] = s0[0];
          assign c1[0] = c0[0];
        end else begin : g_bn
          full_adder u_fa_nc (
            .clk(clk), .a(in1[i]), .b(in2[i]), .cin(1'b0),
            .sum(s0[i]), .cout(c0[i])
          );
          full_adder u_fa_c (
            .clk(clk), .a(in1[i]), .b(in2[i]), .cin(1'b1),
            .sum(s1[i]), .cout(c1[i])
          );
        end
      end
    end else begin : g_merge
      localparam int unsigned HP = H / 2;  // width of a block one level down

      for (genvar j = 0; j < NB; j++) begin : g_blk
        localparam int unsigned LO = 2 * j * HP;   // low sub-block offset
        localparam int unsigned HI = LO + HP;      // high sub-block offset

        // Version 0 of the joined block: low sub-block assumed carry-in 0.
        cosa_mux #(.W(HP + 1)) u_sel_nc (
          .clk   (clk),
          .sel   (g_lvl[k-1].c0[2*j]),
          .in1   ({g_lvl[k-1].c0[2*j+1], g_lvl[k-1].s0[HI +: HP]}),
          .in2   ({g_lvl[k-1].c1[2*j+1], g_lvl[k-1].s1[HI +: HP]}),
          .muxout({c0[j], s0[HI +: HP]})
        );

        always_ff @(posedge clk)
          s0[LO +: HP] <= g_lvl[k-1].s0[LO +: HP];

        if (j == 0) begin : g_real
          // Block 0 already carries the real cin: one version only.
          assign s1[HI +: HP] = s0[HI +: HP];
          assign s1[LO +: HP] = s0[LO +: HP];
          assign c1[j]        = c0[j];
        end else begin : g_alt
          // Version 1: low sub-block assumed carry-in 1.
          cosa_mux #(.W(HP + 1)) u_sel_c (
            .clk   (clk),
            .sel   (g_lvl[k-1].c1[2*j]),
            .in1   ({g_lvl[k-1].c0[2*j+1], g_lvl[k-1].s0[HI +: HP]}),
            .in2   ({g_lvl[k-1].c1[2*j+1], g_lvl[k-1].s1[HI +: HP]}),
            .muxout({c1[j], s1[HI +: HP]})
          );

          always_ff @(posedge clk)
            s1[LO +: HP] <= g_lvl[k-1].s1[LO +: HP];
        end
      end
    end
  end

  assign sum  = g_lvl[L].s0;
  assign cout = g_lvl[L].c0[0];

  // Elaboration-time guard: only powers of two split evenly.
  if ((1 << L) != W) begin : g_bad_width
    $error("cosa: W must be a power of two");
  end

endmodule
