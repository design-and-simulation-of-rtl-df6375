// tb_full_adder: exhaustive check of the registered full adder. Every
// combination of a, b and cin is applied, repeated a few times in random
// order, and the sum and carry are compared one clock edge later with the
// arithmetic value a + b + cin.
module tb_full_adder;
  logic clk = 1'b0;
  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;
  logic [1:0] exp_q;

  always #10 clk = ~clk;

  full_adder dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if ({cout, sum} !== exp_q) begin
          failures++;
          $display("FAIL n=%0d got %b%b exp %b", n, cout, sum, exp_q);
        end
      end
      {a, b, cin} = (n < 8) ? 3'(n) : 3'($urandom_range(0, 7));
      exp_q = 2'(a) + 2'(b) + 2'(cin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
