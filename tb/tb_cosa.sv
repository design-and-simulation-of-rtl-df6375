// tb_cosa: checks the 64-bit pipelined conditional sum adder. A new random
// addition (operands biased to carry-chain corner cases, random carry-in) is
// presented every cycle; each result must appear exactly 7 rising edges
// later (1 + log2(64)) and equal the 65-bit arithmetic sum. A one-off test
// with a single addition between idle cycles confirms the latency directly.
module tb_cosa;
  import tb_util_pkg::*;
  localparam int LAT = 7;
  localparam int N   = 3000;

  logic        clk = 1'b0;
  logic [63:0] in1, in2, sum;
  logic        cin, cout;
  logic [64:0] exp_mem [N];
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  cosa #(.W(64)) dut (.clk(clk), .in1(in1), .in2(in2), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_seen;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        checks++;
        if ({cout, sum} !== exp_mem[n-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d got %h exp %h", n-LAT, {cout, sum}, exp_mem[n-LAT]);
        end
      end
      if (n < N) begin
        in1 = rnd64();
        in2 = ($urandom_range(0, 3) == 0) ? ~in1 : rnd64();   // long carry chains
        cin = 1'($urandom());
        exp_mem[n] = 65'(in1) + 65'(in2) + 65'(cin);
      end else begin
        in1 = '0; in2 = '0; cin = 1'b0;
      end
    end
    // Latency: one addition, then zeros; count edges until the result shows.
    @(negedge clk);
    in1 = 64'hffff_ffff_ffff_ffff; in2 = 64'd0; cin = 1'b1;
    @(negedge clk);
    in1 = '0; in2 = '0; cin = 1'b0;
    first_seen = -1;
    for (int e = 1; e <= 12; e++) begin
      if ({cout, sum} == 65'h1_0000_0000_0000_0000 && first_seen < 0) first_seen = e;
      @(negedge clk);
    end
    checks++;
    if (first_seen != LAT) begin
      failures++;
      $display("FAIL latency %0d expected %0d", first_seen, LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
