// tb_util_pkg: stimulus and reference helpers shared by the testbenches.
//
// rnd64 returns 64-bit operands biased toward the cases that break
// arithmetic: 0, +-1, the extreme values, values around the 32-bit range,
// small numbers of either sign and fully random words. The reference
// functions are written bit by bit or with plain language operators so they
// do not share structure with the design under test.
package tb_util_pkg;

  localparam logic [63:0] MIN64 = 64'h8000_0000_0000_0000;
  localparam logic [63:0] MAX64 = 64'h7fff_ffff_ffff_ffff;

  function automatic logic [63:0] rnd64();
    logic [63:0] r;
    r = {$urandom(), $urandom()};
    case ($urandom_range(0, 11))
      0:  return 64'd0;
      1:  return 64'd1;
      2:  return '1;                                   // -1
      3:  return MIN64;
      4:  return MAX64;
      5:  return {{33{r[31]}}, r[30:0]};               // fits 32-bit signed
      6:  return 64'(signed'(32'($urandom_range(0, 200)) - 32'd100));
      7:  return {32'h0000_0000, 1'b1, r[30:0]};       // just above 32-bit range
      8:  return {32'hffff_ffff, 1'b0, r[30:0]};       // just below 32-bit range
      9:  return {r[63], r[63] ? 40'hff_ffff_ffff : 40'h0, r[22:0]};
      default: return r;
    endcase
  endfunction

  // Parity flag: 1 when the word holds an even number of ones.
  function automatic logic even_parity(input logic [63:0] x);
    int n;
    n = 0;
    for (int i = 0; i < 64; i++) n += int'(x[i]);
    return (n % 2) == 0;
  endfunction

  // Shift by a signed count with the semantics of the HDL operators sll, srl,
  // sla, sra, rol, ror, evaluated one bit position at a time.
  // op: 0 sll, 1 srl, 2 sla, 3 sra, 4 rotl, 5 rotr.
  function automatic logic [63:0] ref_shift(input int op, input logic [63:0] a,
                                            input logic [63:0] cnt);
    logic [63:0] r;
    logic        left, arith, rot, fill;
    longint      n;
    logic        neg;
    neg   = cnt[63];
    left  = (op == 0) || (op == 2) || (op == 4);
    arith = (op == 2) || (op == 3);
    rot   = (op >= 4);
    if (rot) begin
      n = longint'({58'd0, cnt[5:0]});             // count modulo 64
      if (!left) n = (64 - n) % 64;                 // rotate right = rotate left by 64-n
      for (int i = 0; i < 64; i++) r[(i + int'(n)) % 64] = a[i];
      return r;
    end
    if (neg) left = !left;
    // magnitude, saturating at 64
    if (neg) n = (cnt == MIN64) ? 64 : -longint'(cnt);
    else     n = (cnt[62:0] >= 63'd64) ? 64 : longint'(cnt);
    if (n > 64) n = 64;
    fill = arith ? (left ? a[0] : a[63]) : 1'b0;
    for (int i = 0; i < 64; i++) begin
      longint src;
      src = left ? longint'(i) - n : longint'(i) + n;
      r[i] = (src >= 0 && src < 64) ? a[int'(src)] : fill;
    end
    return r;
  endfunction

  // Value fits the signed 32-bit range.
  function automatic logic fits32(input logic [63:0] x);
    return $signed(x) >= -64'sd2147483648 && $signed(x) <= 64'sd2147483647;
  endfunction

  // Result of one ALU operation as the reference sees it.
  typedef struct packed {
    logic        err;
    logic [3:0]  flags;    // {parity, overflow, sign, zero}
    logic [63:0] res;
  } alu_res_t;

  // Reference model of the whole ALU for one operation code (unit in
  // cont[4:3], operation in cont[2:0]), built from language operators.
  function automatic alu_res_t ref_alu(input logic [4:0] cont, input logic [63:0] a,
                                       input logic [63:0] b);
    alu_res_t           r;
    logic signed [64:0] wide;
    logic               ovf;
    r   = '0;
    ovf = 1'b0;
    case (cont[4:3])
      2'b00: case (cont[2:0])
        3'd0, 3'd1: begin
          wide = (cont[2:0] == 3'd0) ? 65'(signed'(a)) + 65'(signed'(b))
                                     : 65'(signed'(a)) - 65'(signed'(b));
          r.res = wide[63:0];
          ovf   = (wide > 65'sd9223372036854775807) || (wide < -65'sd9223372036854775808);
          r.err = ovf;
        end
        3'd2: if (fits32(a) && fits32(b)) r.res = 64'(signed'(a) * signed'(b));
              else r.err = 1'b1;
        3'd3, 3'd4: if (b == 0 || (a == MIN64 && b == '1)) r.err = 1'b1;
              else r.res = (cont[2:0] == 3'd3) ? 64'(signed'(a) / signed'(b))
                                               : 64'(signed'(a) % signed'(b));
        default: r.err = 1'b1;
      endcase
      2'b01: case (cont[2:0])
        3'd0: r.res = a & b;
        3'd1: r.res = a | b;
        3'd2: r.res = a ^ b;
        3'd3: r.res = ~a;
        3'd4: r.res = ~b;
        3'd5: r.res = ~(a & b);
        3'd6: r.res = ~(a | b);
        default: r.res = ~(a ^ b);
      endcase
      2'b10: if (cont[2:0] <= 3'd5) r.res = ref_shift(int'(cont[2:0]), a, b);
             else r.err = 1'b1;
      default: begin
        r.err = 1'b1;
        return r;      // unused unit code: result 0, flags 0
      end
    endcase
    r.flags = {even_parity(r.res), ovf, r.res[63], r.res == 64'd0};
    return r;
  endfunction

endpackage
