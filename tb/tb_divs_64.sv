// tb_divs_64: one random signed division per cycle, including zero divisors
// and the most negative number divided by -1. Quotient and remainder must
// match the language's truncating / and % (remainder has the dividend's
// sign), error must be set for a zero divisor or the overflowing case with
// both outputs 0, and everything must appear exactly 8 rising edges after
// the operands.
module tb_divs_64;
  import tb_util_pkg::*;
  localparam int LAT = 8;
  localparam int N   = 3000;

  logic        clk = 1'b0;
  logic [63:0] a, b, quo, rem;
  logic        error;
  logic [128:0] exp_mem [N];      // {error, quotient, remainder}
  int          checks = 0, failures = 0, n_err = 0;

  always #10 clk = ~clk;

  divs_64 #(.WIDTH(64)) dut (.clk(clk), .dividend(a), .divisor(b),
                             .quotient(quo), .remainder(rem), .error(error));

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        checks++;
        if ({error, quo, rem} !== exp_mem[n-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d got %b %h %h exp %h", n-LAT, error, quo, rem, exp_mem[n-LAT]);
        end
      end
      if (n < N) begin
        a = rnd64();
        b = ($urandom_range(0, 19) == 0) ? 64'd0 : rnd64();
        if (n == 5) begin a = MIN64; b = '1; end
        if (n == 6) begin a = 64'd0; b = 64'd0; end
        if (b == 0 || (a == MIN64 && b == '1)) begin
          exp_mem[n] = {1'b1, 128'd0};
          n_err++;
        end else begin
          exp_mem[n] = {1'b0, 64'(signed'(a) / signed'(b)), 64'(signed'(a) % signed'(b))};
        end
      end
    end
    checks++;
    if (n_err == 0) begin failures++; $display("FAIL no error case generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
