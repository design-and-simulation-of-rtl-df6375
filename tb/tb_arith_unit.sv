// tb_arith_unit: one random operation of this unit per cycle, every operation code
// of the unit (unused codes included) in random order with corner-biased
// operands. Result, error and flags must match a reference model of the ALU
// exactly 10 rising edges (the unit latency) after the operands.
module tb_arith_unit;
  import tb_util_pkg::*;
  import alu_pkg::*;
  localparam int LAT = 10;
  localparam int N   = 4000;

  logic        clk = 1'b0;
  logic [63:0] a, b, res;
  logic [2:0]  op;
  logic        error;
  flags_t      flags;
  alu_res_t    exp_mem [N];
  int          checks = 0, failures = 0;
  int          op_seen [8];

  always #10 clk = ~clk;

  arith_unit #(.WIDTH(64)) dut (.clk(clk), .input1(a), .input2(b), .aunit_cont(op), .aunit_out(res), .error(error), .flag_reg(flags));

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
        if ({error, 4'(flags), res} !== exp_mem[n-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d got %b %b %h exp %h", n-LAT, error, flags, res, exp_mem[n-LAT]);
        end
      end
      if (n < N) begin
        a  = rnd64();
        b  = (2'b00 == 2'b10) ? 64'(signed'($urandom_range(0, 150)) - 70) : rnd64();
        if (2'b00 == 2'b10 && $urandom_range(0, 3) == 0) b = rnd64();
        op = 3'($urandom_range(0, 7));
        op_seen[op]++;
        exp_mem[n] = ref_alu({2'b00, op}, a, b);
      end
    end
    foreach (op_seen[i]) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL code %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
