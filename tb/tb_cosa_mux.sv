// tb_cosa_mux: random check of the registered selection multiplexer of the
// conditional sum adder; sel = 0 must pass in1 and sel = 1 in2, one edge
// later.
module tb_cosa_mux;
  logic        clk = 1'b0;
  logic        sel;
  logic [32:0] in1, in2, muxout, exp_q;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  cosa_mux #(.W(33)) dut (.clk(clk), .sel(sel), .in1(in1), .in2(in2), .muxout(muxout));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (muxout !== exp_q) begin
          failures++;
          $display("FAIL n=%0d got %h exp %h", n, muxout, exp_q);
        end
      end
      sel = 1'($urandom());
      in1 = {1'($urandom()), $urandom()};
      in2 = {1'($urandom()), $urandom()};
      exp_q = sel ? in2 : in1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
