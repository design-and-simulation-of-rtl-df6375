// tb_alu_64bit: end-to-end test of the 64-bit ALU at its default size.
//
// Phase 1 presents one operation, then idles, and counts rising edges until
// its result appears: it must be alu_pkg::ALU_LATENCY (12). Phase 2 runs a
// directed list of the document's operations (each of the 19 codes, signed
// operands of both signs, overflow of ADD and SUB, a multiplication beyond
// 32 bits, 0/0 and x/0 for DIV and MOD, unused codes). Phase 3 issues one
// random operation per cycle, switching unit and operation on every cycle.
// Every result, error and flag word is compared with a reference model
// exactly ALU_LATENCY edges after its operands. The testbench counts how
// often each mechanism occurred (each code, each error cause, each flag,
// unit switches between consecutive operations) and fails any that never
// occurred.
module tb_alu_64bit;
  import tb_util_pkg::*;
  import alu_pkg::*;
  localparam int LAT   = ALU_LATENCY;
  localparam int NRAND = 6000;
  localparam int NMAX  = NRAND + 64;

  logic        clk = 1'b0;
  logic [63:0] input1, input2, alu_out;
  logic [4:0]  alu_cont;
  logic [3:0]  flag_reg;
  logic        error;

  alu_res_t    exp_mem  [NMAX];
  logic [4:0]  cont_mem [NMAX];
  int          nops = 0;
  int          checks = 0, failures = 0;

  // Mechanism counters.
  int code_seen [32];
  int n_add_ovf = 0, n_sub_ovf = 0, n_mul_size = 0, n_div_zero = 0, n_div_00 = 0,
      n_mod_zero = 0, n_bad_code = 0, n_unit_switch = 0;
  int n_flag [4];

  always #10 clk = ~clk;

  alu_64bit dut (
    .clk(clk), .input1(input1), .input2(input2), .alu_cont(alu_cont),
    .alu_out(alu_out), .flag_reg(flag_reg), .error(error)
  );

  initial begin
    repeat (NMAX + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called at a falling edge: check the operation issued LAT cycles ago,
  // then present the next one.
  task automatic step(input logic [4:0] cont, input logic [63:0] a, input logic [63:0] b);
    if (nops >= LAT) check(nops - LAT);
    alu_cont = cont; input1 = a; input2 = b;
    cont_mem[nops] = cont;
    exp_mem[nops]  = ref_alu(cont, a, b);
    count(cont, a, b, exp_mem[nops]);
    if (nops > 0 && cont_mem[nops-1][4:3] != cont[4:3]) n_unit_switch++;
    nops++;
    @(negedge clk);
  endtask

  task automatic check(input int k);
    checks++;
    if ({error, flag_reg, alu_out} !== exp_mem[k]) begin
      failures++;
      if (failures < 10)
        $display("FAIL op %0d code %b got err=%b flags=%b out=%h exp err=%b flags=%b out=%h",
                 k, cont_mem[k], error, flag_reg, alu_out, exp_mem[k].err, exp_mem[k].flags,
                 exp_mem[k].res);
    end
  endtask

  task automatic count(input logic [4:0] cont, input logic [63:0] a, input logic [63:0] b,
                       input alu_res_t r);
    code_seen[cont]++;
    if (cont == 5'b00000 && r.err) n_add_ovf++;
    if (cont == 5'b00001 && r.err) n_sub_ovf++;
    if (cont == 5'b00010 && r.err) n_mul_size++;
    if (cont == 5'b00011 && b == 0 && a != 0) n_div_zero++;
    if (cont == 5'b00011 && b == 0 && a == 0) n_div_00++;
    if (cont == 5'b00100 && b == 0) n_mod_zero++;
    if ((cont[4:3] == 2'b00 && cont[2:0] > 3'd4) || (cont[4:3] == 2'b10 && cont[2:0] > 3'd5) ||
        cont[4:3] == 2'b11) n_bad_code++;
    for (int i = 0; i < 4; i++) n_flag[i] += int'(r.flags[i]);
  endtask

  initial begin
    int lat_seen;
    alu_cont = '0; input1 = '0; input2 = '0;

    // Phase 1: latency of a single signed addition (-7) + 3 = -4.
    repeat (LAT + 2) @(negedge clk);
    input1 = -64'sd7; input2 = 64'sd3; alu_cont = 5'b00000;
    @(negedge clk);
    input1 = '0; input2 = '0;
    lat_seen = -1;
    for (int e = 1; e <= LAT + 4; e++) begin
      if (alu_out == -64'sd4 && lat_seen < 0) lat_seen = e;
      @(negedge clk);
    end
    checks++;
    if (lat_seen != LAT) begin
      failures++;
      $display("FAIL latency %0d edges, expected %0d", lat_seen, LAT);
    end else $display("latency %0d clock cycles", lat_seen);

    // Phase 2: directed operations.
    step(5'b00000, 64'd15, 64'd3);                  // ADD positive
    step(5'b00000, -64'sd15, 64'd3);                // ADD negative
    step(5'b00000, MAX64, 64'd1);                   // ADD overflow
    step(5'b00001, 64'd3, 64'd15);                  // SUB to negative
    step(5'b00001, MIN64, 64'd1);                   // SUB overflow
    step(5'b00010, -64'sd12345, 64'd6789);          // MULT signed
    step(5'b00010, 64'h1_0000_0000, 64'd2);         // MULT size out
    step(5'b00010, 64'hffff_ffff_7fff_ffff, 64'd1); // MULT size out, negative
    step(5'b00011, -64'sd100, 64'd7);               // DIV
    step(5'b00011, 64'd5, 64'd0);                   // x/0
    step(5'b00011, 64'd0, 64'd0);                   // 0/0
    step(5'b00100, -64'sd100, 64'd7);               // MOD
    step(5'b00100, 64'd9, 64'd0);                   // MOD by 0
    for (int c = 8; c <= 15; c++)
      step(5'(c), 64'hf0f0_0000_ffff_1234, 64'h0ff0_ffff_0000_4321);
    for (int c = 16; c <= 21; c++) begin
      step(5'(c), -64'sd1000, 64'd3);
      step(5'(c), 64'h8000_0000_0000_0001, -64'sd4);
    end
    step(5'b00101, 64'd1, 64'd1);                   // unused arithmetic code
    step(5'b10110, 64'd1, 64'd1);                   // unused shift code
    step(5'b11000, 64'd1, 64'd1);                   // unused unit code
    step(5'b01000, 64'd0, 64'd0);                   // zero result

    // Phase 3: random stream, a new unit and operation every cycle.
    for (int n = 0; n < NRAND; n++) begin
      logic [4:0] c;
      case ($urandom_range(0, 9))
        0, 1, 2, 3: c = {2'b00, 3'($urandom_range(0, 4))};
        4, 5:       c = {2'b01, 3'($urandom_range(0, 7))};
        6, 7, 8:    c = {2'b10, 3'($urandom_range(0, 5))};
        default:    c = 5'($urandom());
      endcase
      if (c[4:3] == 2'b10)
        step(c, rnd64(), 64'(signed'($urandom_range(0, 150)) - 70));
      else if (c[4:3] == 2'b00 && c[2:0] >= 3'd3 && $urandom_range(0, 9) == 0)
        step(c, rnd64(), 64'd0);
      else
        step(c, rnd64(), rnd64());
    end

    // Drain the pipeline.
    for (int k = nops - LAT; k < nops; k++) begin
      check(k);
      @(negedge clk);
    end

    // Every operation of the operation table and every mechanism must have happened.
    for (int c = 0; c < 22; c++)
      if (c <= 4 || c >= 8) begin
        checks++;
        if (code_seen[c] == 0) begin failures++; $display("FAIL code %b never issued", 5'(c)); end
      end
    $display("mechanisms: add_ovf=%0d sub_ovf=%0d mul_size=%0d div_x0=%0d div_00=%0d mod_x0=%0d bad_code=%0d unit_switch=%0d",
             n_add_ovf, n_sub_ovf, n_mul_size, n_div_zero, n_div_00, n_mod_zero, n_bad_code, n_unit_switch);
    $display("flags set: zero=%0d sign=%0d overflow=%0d parity=%0d", n_flag[0], n_flag[1], n_flag[2], n_flag[3]);
    begin
      int mech [12];
      mech = '{n_add_ovf, n_sub_ovf, n_mul_size, n_div_zero, n_div_00, n_mod_zero, n_bad_code,
               n_unit_switch, n_flag[0], n_flag[1], n_flag[2], n_flag[3]};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
