// tb_cosa_widths: the conditional sum adder at the four word sizes of the
// adder comparison (8, 16, 32 and 64 bits). Each width adds random operands
// every cycle and is checked against the integer sum; a single addition
// between idle cycles then measures the latency, which must be 1 + log2(W)
// cycles: one more cycle per doubling of the word size. The measured
// latencies are printed in clock cycles and in ns at the 50 MHz test clock.
module tb_cosa_widths;
  localparam int NW = 4;
  localparam int WS [NW] = '{8, 16, 32, 64};
  localparam int N = 1000;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  initial begin
    repeat (NW * (N + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One checker per width; they run one after another through done[].
  logic done [NW + 1];
  initial done[0] = 1'b1;

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int W   = WS[g];
    localparam int LAT = 1 + $clog2(W);

    logic [W-1:0] a, b, s;
    logic         ci, co;
    logic [W:0]   exp_mem [N];

    initial done[g+1] = 1'b0;

    cosa #(.W(W)) dut (.clk(clk), .in1(a), .in2(b), .cin(ci), .sum(s), .cout(co));

    initial begin
      int seen;
      a = '0; b = '0; ci = 1'b0;
      wait (done[g] == 1'b1);
      for (int n = 0; n < N + LAT; n++) begin
        @(negedge clk);
        if (n >= LAT) begin
          checks++;
          if ({co, s} !== exp_mem[n-LAT]) begin
            failures++;
            if (failures < 10) $display("FAIL W=%0d op %0d got %h exp %h", W, n-LAT, {co, s}, exp_mem[n-LAT]);
          end
        end
        if (n < N) begin
          a  = W'({$urandom(), $urandom()});
          b  = ($urandom_range(0, 3) == 0) ? ~a : W'({$urandom(), $urandom()});
          ci = 1'($urandom());
          exp_mem[n] = (W+1)'(a) + (W+1)'(b) + (W+1)'(ci);
        end else begin
          a = '0; b = '0; ci = 1'b0;
        end
      end
      // Latency: all ones + carry-in, the longest carry chain.
      @(negedge clk);
      a = '1; b = '0; ci = 1'b1;
      @(negedge clk);
      a = '0; ci = 1'b0;
      seen = -1;
      for (int e = 1; e <= LAT + 4; e++) begin
        if ({co, s} == {1'b1, {W{1'b0}}} && seen < 0) seen = e;
        @(negedge clk);
      end
      checks++;
      if (seen != LAT) begin
        failures++;
        $display("FAIL W=%0d latency %0d expected %0d", W, seen, LAT);
      end else
        $display("W=%0d: latency %0d cycles = %0d ns at 50 MHz", W, seen, seen * 20);
      done[g+1] = 1'b1;
    end
  end

  initial begin
    wait (done[NW] == 1'b1);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
