// tb_nc4000_system: end-to-end test of the NC4000 system (processor, 64K x 16
// main memory, two 256 x 16 stack memories) at its full size.
//
// For each of 12 random operand sets the testbench writes one program into
// main memory, resets the processor and lets it run until it reaches its
// final self-jump. The program
//   * multiplies two 16-bit numbers with MD and 16 TIMES-repeated *' steps,
//   * divides a 32-bit number by a 16-bit one with D2*, 15 /' and /'',
//   * takes the square root of a 32-bit number with 16 S' steps and SR,
//   * runs the two-level subroutine example ACTION = W DUP 2* ; whose
//     "DUP 2* ;" is the single word 100162 (octal), W ending in "+ ;",
//   * sums a #LOOP index from 9 down to 0,
//   * takes one of two IF branches depending on the operand's low bit,
//   * sets up the B port (direction, mask, compare) and writes and reads it,
//   * stores and fetches a word through an extended (X port) address,
//   * runs "@ SWAP -" as a single fetch instruction with a merged ALU function,
// and stores every result in memory. The testbench compares the results
// with values computed here, checks the published cycle counts (multiply in
// 20 cycles, divide within 25, square root within 27) and counts calls,
// merged returns, TIMES repeats, both IF outcomes, loop jumps, extended
// accesses, masked port writes, compared port reads and fetches with merged
// ALU work; each must occur.
module tb_nc4000_system;
  import nc_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0]  x_in, x_out, x_oe, mem_xaddr;
  logic [15:0] b_in, b_out, b_oe;
  logic [15:0] dbg_pc, dbg_t, dbg_n, dbg_i;
  logic [7:0]  dbg_dsp, dbg_rsp;
  logic        dbg_fetch;

  nc4000_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int pcg;
  task automatic emit(input logic [15:0] w);
    dut.u_mem.mem[pcg] = w;
    pcg++;
  endtask
  task automatic emit_lit(input logic [15:0] v);
    emit(LLIT); emit(v);
  endtask
  task automatic emit_store(input logic [15:0] a);   // ( n -- ) mem[a] = n
    emit_lit(a); emit(store());
  endtask

  // mechanism counters
  int n_call, n_ret, n_times_rep, n_if_taken, n_if_fall, n_loop_jump, n_ext, n_mask_wr,
      n_cmp_rd, n_llit, n_slit, n_fused;
  int cyc;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dbg_fetch) begin
      if (!dut.u_core.ins[15]) n_call++;
      if (dut.u_core.ins[15:12] == 4'b1000 && dut.u_core.ins[5] && !dut.u_core.repeat_ins) n_ret++;
      if (dut.u_core.ins[15:12] == 4'b1001) begin
        if (dbg_t == 0) n_if_taken++; else n_if_fall++;
      end
      if (dut.u_core.ins[15:12] == 4'b1011 && dbg_i != 0) n_loop_jump++;
      if (dut.u_core.ins[15:12] == 4'b1110) n_llit++;
      if (dut.u_core.ins[15:11] == 5'b11000 && dut.u_core.ins[8:6] != 0) n_fused++;
      if (dut.u_core.ins[15:11] == 5'b11010) n_slit++;
      if (dut.u_core.ins == wr(R_BDATA) && dut.u_core.u_bport.mask != 0) n_mask_wr++;
      if (dut.u_core.ins == rd(R_BDATA) && dut.u_core.u_bport.cmp != 0) n_cmp_rd++;
    end
    if (dut.u_core.repeat_ins) n_times_rep++;
    if (mem_xaddr != 0) n_ext++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b, d, q_lo, q_hi, cmpv, sum;
    logic [31:0] prod, dv, sq;
    longint      r;
    int mul_s, mul_e, div_s, div_e, sq_s, sq_e, halt, sub_w, sub_act;
    int c_mul_s, c_mul_e, c_div_s, c_div_e, c_sq_s, c_sq_e;
    n_call = 0; n_ret = 0; n_times_rep = 0; n_if_taken = 0; n_if_fall = 0; n_loop_jump = 0;
    n_ext = 0; n_mask_wr = 0; n_cmp_rd = 0; n_llit = 0; n_slit = 0; n_fused = 0;
    x_in = 0;
    for (int tcase = 0; tcase < 12; tcase++) begin
      a = 16'($urandom); b = 16'($urandom) | 16'd1;
      if (tcase == 0) begin a = 16'hFFFF; b = 16'hFFFF; end
      if (tcase == 1) b = 16'd2;
      d = 16'($urandom) | 16'h0001;
      q_hi = 16'($urandom) % d; q_lo = 16'($urandom);
      sq = $urandom;
      cmpv = 16'($urandom);
      b_in = 16'($urandom);

      // subroutines of the ACTION example
      sub_w = 16'h0800; sub_act = 16'h0810;
      pcg = sub_w;   emit(lit(3)); emit(lit(4)); emit(ADD | RET);
      pcg = sub_act; emit(call(16'(sub_w))); emit(16'o100162);

      pcg = 0;
      // multiply ( a b -- lo hi )
      emit_lit(a); emit_lit(b);
      mul_s = pcg;
      emit(wr(R_MD)); emit(lit(0)); emit(lit(16)); emit(wr(R_TIMES)); emit(MSTEP);
      mul_e = pcg;
      emit_store(16'h9000); emit_store(16'h9001);
      // divide ( lo hi d -- rem quot )
      emit_lit(q_lo); emit_lit(q_hi); emit_lit(d);
      div_s = pcg;
      emit(wr(R_MD)); emit(DSHL); emit(lit(15)); emit(wr(R_TIMES)); emit(DSTEP); emit(DLAST);
      div_e = pcg;
      emit_store(16'h9002); emit_store(16'h9003);
      // square root ( lo hi -- root )
      emit_lit(sq[15:0]); emit_lit(sq[31:16]);
      sq_s = pcg;
      emit(lit(0)); emit(wr(R_SR)); emit(lit(0)); emit(addlit(0));
      emit(lit(8)); emit(wr(R_TIMES)); emit(SSTEP); emit(NIP);
      emit(lit(8)); emit(wr(R_TIMES)); emit(SSTEP); emit(rd(R_SR));
      sq_e = pcg;
      emit_store(16'h9004); emit(DROP); emit(DROP);
      // ACTION: leaves 7 14
      emit(call(16'(sub_act)));
      emit_store(16'h9005); emit_store(16'h9006);
      // #LOOP: sum of I for I = 9 .. 0
      emit(lit(0)); emit(lit(9)); emit(TOR);
      emit(rd(R_I)); emit(ADD); emit(loop_(16'(pcg - 2)));
      emit_store(16'h9007);
      // IF on the low bit of a
      emit_lit(a); emit(lit(1)); emit(AND_); emit(if_(16'(pcg + 3)));
      emit(lit(5)); emit(jmp(16'(pcg + 2)));
      emit(lit(10));
      emit_store(16'h9008);
      // B port: low byte output, low nibble masked, compare register
      emit_lit(16'h00FF); emit(wr(R_BDIR));
      emit_lit(16'h000F); emit(wr(R_BMASK));
      emit_lit(a); emit(wr(R_BDATA));
      emit_lit(cmpv); emit(wr(R_BCMP));
      emit(rd(R_BDATA)); emit_store(16'h9009);
      // X port supplies address bits 20:16 of an extended store and fetch
      emit(lit(5'h15)); emit(wr(R_XDATA));
      emit_lit(b); emit_lit(16'h9100); emit(store(1));
      emit_lit(16'h9100); emit(fetch(1)); emit_store(16'h900A);
      // "@ SWAP -" as one instruction: ( x addr -- mem[addr]-x )
      emit_lit(a); emit_lit(16'h9001); emit(fetch(0, 3'd2, 1)); emit_store(16'h900B);
      halt = pcg;
      emit(jmp(16'(halt)));

      // run
      rst_n = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      cyc = 0;
      c_mul_s = -1; c_mul_e = -1; c_div_s = -1; c_div_e = -1; c_sq_s = -1; c_sq_e = -1;
      while (dbg_pc != 16'(halt)) begin
        @(negedge clk);
        if (c_mul_s < 0 && dbg_pc == 16'(mul_s)) c_mul_s = cyc;
        if (c_mul_e < 0 && dbg_pc == 16'(mul_e)) c_mul_e = cyc;
        if (c_div_s < 0 && dbg_pc == 16'(div_s)) c_div_s = cyc;
        if (c_div_e < 0 && dbg_pc == 16'(div_e)) c_div_e = cyc;
        if (c_sq_s < 0 && dbg_pc == 16'(sq_s)) c_sq_s = cyc;
        if (c_sq_e < 0 && dbg_pc == 16'(sq_e)) c_sq_e = cyc;
      end

      prod = 32'(a) * 32'(b);
      check("mul hi", dut.u_mem.mem[16'h9000], prod[31:16]);
      check("mul lo", dut.u_mem.mem[16'h9001], prod[15:0]);
      check("mul cycles", c_mul_e - c_mul_s, 20);
      dv = {q_hi, q_lo};
      check("div rem", dut.u_mem.mem[16'h9002], dv % 32'(d));
      check("div quot", dut.u_mem.mem[16'h9003], 32'(dv / 32'(d)) & 32'hFFFF);
      check("div within 25 cycles", 32'(c_div_e - c_div_s <= 25), 1);
      r = longint'(dut.u_mem.mem[16'h9004]);
      checks++;
      if (!(r * r <= longint'(sq) && (r + 1) * (r + 1) > longint'(sq))) begin
        failures++;
        $display("FAIL sqrt(%0d) = %0d", sq, r);
      end
      check("sqrt within 27 cycles", 32'(c_sq_e - c_sq_s <= 27), 1);
      check("ACTION T", dut.u_mem.mem[16'h9005], 14);
      check("ACTION N", dut.u_mem.mem[16'h9006], 7);
      sum = 0;
      for (int k = 9; k >= 0; k--) sum += 16'(k);
      check("loop sum", dut.u_mem.mem[16'h9007], sum);
      check("IF", dut.u_mem.mem[16'h9008], a[0] ? 5 : 10);
      check("B out", b_out, a & 16'hFFF0);
      check("B oe", b_oe, 16'h00FF);
      check("B in", dut.u_mem.mem[16'h9009], b_in ^ cmpv);
      check("X latch", x_out, 5'h15);
      check("extended fetch", dut.u_mem.mem[16'h900A], b);
      check("@ SWAP -", dut.u_mem.mem[16'h900B], 16'(prod[15:0] - a));
      check("return stack empty", dbg_rsp, 0);
    end
    $display("calls=%0d rets=%0d times_repeats=%0d if_taken=%0d if_fall=%0d loop_jumps=%0d ext=%0d mask_wr=%0d cmp_rd=%0d llit=%0d slit=%0d",
             n_call, n_ret, n_times_rep, n_if_taken, n_if_fall, n_loop_jump, n_ext, n_mask_wr,
             n_cmp_rd, n_llit, n_slit);
    check("calls happened", 32'(n_call > 0), 1);
    check("merged returns happened", 32'(n_ret > 0), 1);
    check("TIMES repeats happened", 32'(n_times_rep > 0), 1);
    check("IF taken happened", 32'(n_if_taken > 0), 1);
    check("IF fall-through happened", 32'(n_if_fall > 0), 1);
    check("loop jumps happened", 32'(n_loop_jump > 0), 1);
    check("extended accesses happened", 32'(n_ext > 0), 1);
    check("masked port writes happened", 32'(n_mask_wr > 0), 1);
    check("compared port reads happened", 32'(n_cmp_rd > 0), 1);
    check("long literals happened", 32'(n_llit > 0), 1);
    check("short literals happened", 32'(n_slit > 0), 1);
    check("fetches with merged ALU work happened", 32'(n_fused > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
