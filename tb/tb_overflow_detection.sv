// tb_overflow_detection: random sums (corner-biased operands) are given to
// the detector together with their operands; ovf and error must equal the
// overflow of the same addition computed from the true integer sum, one edge
// later.
module tb_overflow_detection;
  import tb_util_pkg::*;
  logic        clk = 1'b0;
  logic [63:0] in1, in2, sum;
  logic        ovf, error, exp_q;
  int          checks = 0, failures = 0, n_ovf = 0;

  always #10 clk = ~clk;

  overflow_detection #(.WIDTH(64)) dut (.clk(clk), .in1(in1), .in2(in2), .sum(sum),
                                        .ovf(ovf), .error(error));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic signed [64:0] wide;
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (ovf !== exp_q || error !== exp_q) begin
          failures++;
          $display("FAIL n=%0d ovf %b error %b exp %b", n, ovf, error, exp_q);
        end
      end
      in1 = rnd64();
      in2 = rnd64();
      sum = in1 + in2;
      wide = 65'(signed'(in1)) + 65'(signed'(in2));
      exp_q = (wide > 65'sd9223372036854775807) || (wide < -65'sd9223372036854775808);
      n_ovf += int'(exp_q);
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow case was generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
