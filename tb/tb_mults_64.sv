// tb_mults_64: one random multiplication per cycle, operands biased to the
// edges of the signed 32-bit range. When both operands fit 32 signed bits the
// product must equal the 64-bit integer product and error = 0; otherwise
// error = 1 and the product reads 0. Results must appear exactly 8 rising
// edges after the operands.
module tb_mults_64;
  import tb_util_pkg::*;
  localparam int LAT = 8;
  localparam int N   = 3000;

  logic        clk = 1'b0;
  logic [63:0] m, q, p;
  logic        error;
  logic [64:0] exp_mem [N];       // {error, product}
  int          checks = 0, failures = 0, n_err = 0, n_ok = 0;

  always #10 clk = ~clk;

  mults_64 #(.WIDTH(64)) dut (.clk(clk), .M(m), .Q(q), .carpim(p), .error(error));

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
        if ({error, p} !== exp_mem[n-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d got %b %h exp %h", n-LAT, error, p, exp_mem[n-LAT]);
        end
      end
      if (n < N) begin
        m = rnd64();
        q = rnd64();
        if (fits32(m) && fits32(q)) begin
          exp_mem[n] = {1'b0, 64'(signed'(m) * signed'(q))};
          n_ok++;
        end else begin
          exp_mem[n] = {1'b1, 64'd0};
          n_err++;
        end
      end
    end
    checks++;
    if (n_err == 0 || n_ok == 0) begin failures++; $display("FAIL stimulus lacks a case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
