// tb_nc_alu: self-checking test of the NC4000 ALU, Y multiplexer and shifter.
//
// Drives the ALU with the published single-cycle opcodes (NOOP, DROP, +, +c,
// -, -c, AND, OR, XOR, SWAP -, 2/, 2*, 0<, D2/, D2*) on random T, N and C
// and compares T (and N for the 32-bit shifts) with values computed here
// from integer arithmetic. Then runs complete step sequences the way the
// processor would under TIMES: 16 multiply steps (*') against a*b, D2*
// plus 15 divide steps (/') and one last divide step (/'') against / and %,
// 15 *' steps and a final *- against a signed-by-unsigned product,
// and 16 square-root steps (S') on a 32-bit radicand against the integer
// square root.
module tb_nc_alu;
  import nc_pkg::*;

  alu_instr_t  ins;
  logic [15:0] t, n, md, sr, t_out, n_out, sr_out;
  logic        c, n_we, c_out, sr_we;
  int checks = 0, failures = 0;

  nc_alu dut (.ins, .t, .n, .md, .sr, .c, .t_out, .n_out, .n_we, .c_out, .sr_out, .sr_we);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // apply one instruction and fold the result back into T, N, C, SR
  task automatic step(input logic [15:0] op);
    ins = alu_instr_t'(op);
    #1;
    t = t_out;
    c = c_out;
    if (n_we) n = n_out;
    if (sr_we) sr = sr_out;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b, s16;
    logic        ci;
    logic [31:0] prod, v;
    longint      r;
    md = 0; sr = 0;
    for (int k = 0; k < 200; k++) begin
      a = 16'($urandom); b = 16'($urandom); ci = 1'($urandom);
      if (k == 0) begin a = 16'h8000; b = 16'h8000; end
      // N = a, T = b
      n = a; t = b; c = ci; ins = alu_instr_t'(16'o100000); #1;
      check("NOOP", t_out, b);
      ins = alu_instr_t'(16'o107020); #1; check("DROP T", t_out, a);
      ins = alu_instr_t'(16'o104020); #1; check("+", t_out, 16'(a + b));
      check("+ carry", c_out, 32'((32'(a) + 32'(b)) >> 16));
      ins = alu_instr_t'(16'o104220); #1; check("+c", t_out, 16'(a + b + ci));
      ins = alu_instr_t'(16'o106020); #1; check("-", t_out, 16'(a - b));
      check("- not-borrow", c_out, (a >= b));
      ins = alu_instr_t'(16'o106220); #1; check("-c", t_out, 16'(a - b - 16'(!ci)));
      ins = alu_instr_t'(16'o102020); #1; check("SWAP -", t_out, 16'(b - a));
      ins = alu_instr_t'(16'o103020); #1; check("OR", t_out, a | b);
      ins = alu_instr_t'(16'o105020); #1; check("XOR", t_out, a ^ b);
      ins = alu_instr_t'(16'o101020); #1; check("AND", t_out, a & b);
      ins = alu_instr_t'(16'o100001); #1; check("2/", t_out, {b[15], b[15:1]});
      ins = alu_instr_t'(16'o100002); #1; check("2*", t_out, 16'(b << 1));
      ins = alu_instr_t'(16'o100003); #1; check("0<", t_out, b[15] ? 16'hFFFF : 16'h0);
      ins = alu_instr_t'(16'o104001); #1; s16 = a + b; check("+ 2/", t_out, {s16[15], s16[15:1]});
      ins = alu_instr_t'(16'o100011); #1;
      check("D2/", {t_out, n_out}, 32'($signed({b, a}) >>> 1)); check("D2/ nwe", n_we, 1);
      ins = alu_instr_t'(16'o100012); #1;
      check("D2*", {t_out, n_out}, {b, a} << 1); check("D2* carry", c_out, b[15]);
      ins = alu_instr_t'(16'o107100); #1; check("SWAP T", t_out, a); check("SWAP no N write", n_we, 0);

      // unsigned multiply: T = 0, N = a, MD = b, 16 x *'
      md = b; t = 0; n = a; c = 0;
      repeat (16) step(16'o104411);
      prod = 32'(a) * 32'(b);
      check("16x16 product", {t, n}, prod);

      // signed multiplier times unsigned multiplicand: 15 x *' then *-
      md = b; t = 0; n = a; c = 0;
      repeat (15) step(16'o104411);
      step(16'o102411);
      prod = 32'(longint'($signed(a)) * longint'(b));
      check("signed x unsigned product", {t, n}, prod);

      // division: dividend {hi, lo} with hi < divisor
      b = b | 16'h0001;
      a = 16'($urandom) % b;            // high word below divisor
      v = {a, 16'($urandom)};
      md = b; t = v[31:16]; n = v[15:0]; c = 0;
      step(16'o100012);                 // D2*
      repeat (15) step(16'o102416);     // /'
      step(16'o102414);                 // /''
      check("quotient", n, 32'(v / 32'(b)) & 32'hFFFF);
      check("remainder", t, v % 32'(b));
      check("quotient fits", 32'(v / 32'(b) < 32'h10000), 1);

      // square root of a 32-bit value, 8 steps on each half
      v = $urandom;
      if (k == 1) v = 32'hFFFF_FFFF;
      if (k == 2) v = 0;
      sr = 0; t = 0; n = v[31:16]; c = 0;
      repeat (8) step(16'o102616);
      n = v[15:0];
      repeat (8) step(16'o102616);
      r = longint'(sr);
      checks++;
      if (!(r * r <= longint'(v) && (r + 1) * (r + 1) > longint'(v))) begin
        failures++;
        $display("FAIL sqrt(%0d) gave %0d", v, r);
      end
      check("sqrt remainder", {15'd0, c, t}, 32'(longint'(v) - r * r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
