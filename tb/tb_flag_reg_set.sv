// tb_flag_reg_set: random words (zero, negative, even and odd bit counts)
// with a random overflow input; the registered flags must equal
// {even parity, overflow, bit 63, all-zero} of the same word one edge later.
module tb_flag_reg_set;
  import tb_util_pkg::*;
  import alu_pkg::*;
  logic        clk = 1'b0;
  logic [63:0] in1;
  logic        in2;
  flags_t      flags;
  logic [3:0]  exp_q;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  flag_reg_set #(.WIDTH(64)) dut (.clk(clk), .in1(in1), .in2(in2), .flag_reg(flags));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (4'(flags) !== exp_q) begin
          failures++;
          $display("FAIL n=%0d got %b exp %b", n, flags, exp_q);
        end
      end
      in1 = rnd64();
      in2 = 1'($urandom());
      exp_q = {even_parity(in1), in2, in1[63], in1 == 64'd0};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
