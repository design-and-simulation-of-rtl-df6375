// tb_mods_64: one random signed remainder per cycle, zero divisors
// included. The result must equal the language's % (sign of the dividend),
// error must be set for a zero divisor or the most negative number by -1
// with the result 0, and the result must appear 8 rising edges later.
module tb_mods_64;
  import tb_util_pkg::*;
  localparam int LAT = 8;
  localparam int N   = 3000;

  logic        clk = 1'b0;
  logic [63:0] a, b, r;
  logic        error;
  logic [64:0] exp_mem [N];
  int          checks = 0, failures = 0, n_err = 0, n_negrem = 0;

  always #10 clk = ~clk;

  mods_64 #(.WIDTH(64)) dut (.clk(clk), .in1(a), .in2(b), .out1(r), .error(error));

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
        if ({error, r} !== exp_mem[n-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d got %b %h exp %h", n-LAT, error, r, exp_mem[n-LAT]);
        end
      end
      if (n < N) begin
        a = rnd64();
        b = ($urandom_range(0, 19) == 0) ? 64'd0 : rnd64();
        if (b == 0 || (a == MIN64 && b == '1)) begin
          exp_mem[n] = {1'b1, 64'd0};
          n_err++;
        end else begin
          exp_mem[n] = {1'b0, 64'(signed'(a) % signed'(b))};
          n_negrem += int'(exp_mem[n][63]);
        end
      end
    end
    checks++;
    if (n_err == 0 || n_negrem == 0) begin failures++; $display("FAIL stimulus lacks a case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
