// tb_shifter_64: instantiates the shift component once for each of its six
// operations and drives them all with the same random operand and signed
// count (small counts, negative counts, counts of 64 and beyond, the most
// negative count). Every output must equal a bit-by-bit reference of the
// operator one edge later.
module tb_shifter_64;
  import tb_util_pkg::*;
  import alu_pkg::*;
  logic        clk = 1'b0;
  logic [63:0] a, cnt;
  logic [63:0] out [6];
  logic [63:0] exp_q [6];
  int          checks = 0, failures = 0;

  localparam shift_op_e OPS [6] = '{SH_SLL, SH_SRL, SH_SLA, SH_SRA, SH_ROTL, SH_ROTR};

  always #10 clk = ~clk;

  for (genvar i = 0; i < 6; i++) begin : g_dut
    shifter_64 #(.WIDTH(64), .OP(OPS[i])) dut (.clk(clk), .in1(a), .shft(cnt), .out1(out[i]));
  end

  function automatic logic [63:0] rnd_count();
    case ($urandom_range(0, 7))
      0: return 64'(signed'($urandom_range(0, 140)) - 70);
      1: return 64'd64;
      2: return -64'd64;
      3: return MIN64;
      4: return {$urandom(), $urandom()};
      default: return 64'(signed'($urandom_range(0, 126)) - 63);
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        for (int i = 0; i < 6; i++) begin
          checks++;
          if (out[i] !== exp_q[i]) begin
            failures++;
            if (failures < 10)
              $display("FAIL op %0d a=%h cnt=%h got %h exp %h", i, a, cnt, out[i], exp_q[i]);
          end
        end
      end
      a   = ($urandom_range(0, 1) == 0) ? {$urandom(), $urandom()} : rnd64();
      cnt = rnd_count();
      for (int i = 0; i < 6; i++) exp_q[i] = ref_shift(i, a, cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
