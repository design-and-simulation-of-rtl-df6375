// tb_subs_64: one random signed subtraction a - b - bin per cycle, operands biased to the
// overflow corners. Each result, error and ovf must appear exactly 8 rising
// edges after its operands and match the 65-bit integer result: the low 64
// bits as result, overflow when the true value leaves the signed 64-bit range.
module tb_subs_64;
  import tb_util_pkg::*;
  localparam int LAT = 8;
  localparam int N   = 3000;

  logic        clk = 1'b0;
  logic [63:0] a, b, res;
  logic        bin;
  logic        error, ovf;
  logic [64:0] exp_mem [N];       // {overflow, result}
  int          checks = 0, failures = 0, n_ovf = 0;

  always #10 clk = ~clk;

  subs_64 #(.WIDTH(64)) dut (.clk(clk), .bin(bin), .in1(a), .in2(b), .sub1(res), .error(error), .ovf(ovf));

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N + LAT; n++) begin
      logic signed [64:0] wide;
      @(negedge clk);
      if (n >= LAT) begin
        checks++;
        if ({ovf, res} !== exp_mem[n-LAT] || error !== ovf) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d got %b %h exp %h", n-LAT, ovf, res, exp_mem[n-LAT]);
        end
      end
      if (n < N) begin
        a = rnd64();
        b = rnd64();
        bin = 1'($urandom_range(0, 3) == 0);
        wide = 65'(signed'(a)) - 65'(signed'(b)) - 65'(bin);
        exp_mem[n] = {(wide > 65'sd9223372036854775807) || (wide < -65'sd9223372036854775808),
                      wide[63:0]};
        n_ovf += int'(exp_mem[n][64]);
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow case was generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
