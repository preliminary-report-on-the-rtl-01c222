// tb_nc_core: self-checking test of the NC4000 processor core against an
// instruction-level model written in the testbench.
//
// Main memory and both stack memories are plain arrays here. The program is
// a random straight-line mix of the published ALU opcodes, short and long
// literals, "nn +", register reads and writes, >R / R>, stores, and
// fetches with and without a merged ALU function ("@ SWAP -"),
// followed by directed code for calls, returns merged into ALU
// instructions, IF taken and not taken, ELSE jumps, #LOOP and TIMES. At
// every instruction boundary the testbench compares PC, T, N, I and both
// stack pointers with the model, and the number of cycles the previous
// instruction took with the model's count (one cycle for calls, ALU,
// jumps, literals and registers, two for memory access and long literals,
// n for an ALU instruction repeated by TIMES n).
module tb_nc_core;
  import nc_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic [4:0]  mem_xaddr;
  logic        mem_we;
  logic [7:0]  ds_addr, rs_addr;
  logic [15:0] ds_wdata, ds_rdata, rs_wdata, rs_rdata;
  logic        ds_we, rs_we;
  logic [4:0]  x_in, x_out, x_oe;
  logic [15:0] b_in, b_out, b_oe;
  logic [15:0] dbg_pc, dbg_t, dbg_n, dbg_i;
  logic [7:0]  dbg_dsp, dbg_rsp;
  logic        dbg_fetch;

  logic [15:0] mem [65536];
  logic [15:0] dsm [256];
  logic [15:0] rsm [256];

  assign mem_rdata = mem[mem_addr];
  assign ds_rdata  = dsm[ds_addr];
  assign rs_rdata  = rsm[rs_addr];
  always @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (ds_we)  dsm[ds_addr]  <= ds_wdata;
    if (rs_we)  rsm[rs_addr]  <= rs_wdata;
  end

  nc_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pc %h: got %h expected %h", what, m_pc, got, exp);
    end
  endtask

  // ---------------- instruction-level model ----------------
  logic [15:0] m_pc, m_t, m_n, m_i, m_md, m_sr, m_times;
  logic        m_c;
  logic [7:0]  m_dsp, m_rsp;
  logic [15:0] m_ds[$], m_rs[$];
  logic [15:0] m_mem [int];
  logic [15:0] m_bcmp;

  function automatic logic [15:0] mread(input logic [15:0] a);
    return m_mem.exists(int'(a)) ? m_mem[int'(a)] : 16'd0;
  endfunction
  function automatic void dpush(input logic [15:0] v); m_ds.push_back(m_n); m_n = v; m_dsp++; endfunction
  function automatic void dpop();                      m_n = m_ds.pop_back(); m_dsp--; endfunction
  function automatic void rpush(input logic [15:0] v); m_rs.push_back(m_i); m_i = v; m_rsp++; endfunction
  function automatic void rpop();                      m_i = m_rs.pop_back(); m_rsp--; endfunction

  function automatic void alu_once(input logic [15:0] w);
    int unsigned y, r, cin, tt, nn;
    logic [15:0] a;
    logic        cy;
    tt = m_t; nn = m_n;
    case (w[8:7]) 2'd0, 2'd1: y = nn; 2'd2: y = m_md; default: y = m_sr; endcase
    cy = m_c;
    case (w[11:9])
      3'd0: a = m_t;
      3'd1: a = 16'(tt & y);
      3'd2: begin cin = (w[8:7] == 1) ? m_c : 1; r = tt + (y ^ 32'hFFFF) + cin; a = 16'(r); cy = r[16]; end
      3'd3: a = 16'(tt | y);
      3'd4: begin cin = (w[8:7] == 1) ? m_c : 0; r = tt + y + cin; a = 16'(r); cy = r[16]; end
      3'd5: a = 16'(tt ^ y);
      3'd6: begin cin = (w[8:7] == 1) ? m_c : 1; r = y + (tt ^ 32'hFFFF) + cin; a = 16'(r); cy = r[16]; end
      default: a = 16'(y);
    endcase
    m_c = cy;
    if (w == MSTEP) begin
      // unsigned multiply step: add MD only when N0 is set, shift 33 bits right
      r = (nn & 1) ? tt + m_md : tt;
      {m_t, m_n} = {r[16:0], 16'(nn)} >> 1;
      m_c = cy;
    end else if (w[3] && (w[1] ^ w[0])) begin
      if (w[0]) begin
        {m_t, m_n} = 32'($signed({a, m_n}) >>> 1);
      end else begin
        m_c = a[15];
        {m_t, m_n} = {a, m_n} << 1;
      end
    end else begin
      if (w[1] && w[0]) m_t = a[15] ? 16'hFFFF : 16'h0;
      else if (w[0])    m_t = 16'($signed(a) >>> 1);
      else if (w[1])    m_t = a << 1;
      else              m_t = a;
      if (w[6] && w[4]) dpush(16'(tt));
      else if (w[4])    dpop();
      else if (w[6])    m_n = 16'(tt);
    end
  endfunction

  // execute the instruction at m_pc; returns the cycles it should take
  function automatic int model_exec();
    logic [15:0] w, tgt, v;
    int cyc;
    w = mread(m_pc);
    tgt = {m_pc[15:12], w[11:0]};
    cyc = 1;
    if (!w[15]) begin
      rpush(m_pc + 1);
      m_pc = {1'b0, w[14:0]};
      return 1;
    end
    case (w[14:12])
      3'd0: begin
        cyc = (m_times > 1) ? int'(m_times) : 1;
        repeat (cyc) alu_once(w);
        m_times = 0;
        if (w[5]) begin m_pc = m_i; rpop(); end
        else m_pc++;
      end
      3'd1: begin
        m_pc = (m_t == 0) ? tgt : m_pc + 1;
        m_t = m_n; dpop();
      end
      3'd2: m_pc = tgt;
      3'd3: begin
        if (m_i != 0) begin m_i--; m_pc = tgt; end
        else begin rpop(); m_pc++; end
      end
      3'd4: begin
        cyc = 2;
        if (w[11]) begin
          m_mem[int'(m_t)] = m_n;
          m_t = m_ds[$]; void'(m_ds.pop_back()); m_dsp--;
          m_t = m_t; // T gets the word below N
          dpop();
        end else begin
          // fetched word combined with N by the ALU function in bits 8:6
          v = mread(m_t);
          case (w[8:6])
            3'd0: m_t = v;
            3'd1: m_t = v & m_n;
            3'd2: begin {m_c, m_t} = {1'b0, v} + {1'b0, ~m_n} + 17'd1; end
            3'd3: m_t = v | m_n;
            3'd4: begin {m_c, m_t} = {1'b0, v} + {1'b0, m_n}; end
            3'd5: m_t = v ^ m_n;
            3'd6: begin {m_c, m_t} = {1'b0, m_n} + {1'b0, ~v} + 17'd1; end
            default: m_t = m_n;
          endcase
          if (w[4]) dpop();
        end
        if (w[5]) begin m_pc = m_i; rpop(); end else m_pc++;
      end
      3'd5: begin
        if (!w[11]) begin
          if (w[10]) begin {m_c, m_t} = 17'(m_t) + 17'(w[4:0]); end
          else begin dpush(m_t); m_t = 16'(w[4:0]); end
        end else if (!w[10]) begin
          case (w[3:0])
            R_I: v = m_i; R_MD: v = m_md; R_SR: v = m_sr; R_TIMES: v = m_times;
            R_BDATA: v = b_in ^ m_bcmp; R_BCMP: v = m_bcmp;
            default: v = 0;
          endcase
          dpush(m_t); m_t = v;
          if (w[3:0] == R_I && w[9]) rpop();
        end else begin
          v = m_t;
          m_t = m_n; dpop();
          case (w[3:0])
            R_I: if (w[9]) rpush(v); else m_i = v;
            R_MD: m_md = v; R_SR: m_sr = v; R_TIMES: m_times = v;
            R_BCMP: m_bcmp = v;
            default: ;
          endcase
        end
        if (w[5] && !(w[11] && w[3:0] == R_I)) begin m_pc = m_i; rpop(); end
        else m_pc++;
      end
      3'd6: begin
        cyc = 2;
        dpush(m_t);
        m_t = mread(m_pc + 1);
        m_pc += 2;
      end
      default: m_pc++;
    endcase
    return cyc;
  endfunction

  // ---------------- program generation ----------------
  int pc_gen;
  task automatic emit(input logic [15:0] w);
    mem[pc_gen] = w;
    m_mem[pc_gen] = w;
    pc_gen++;
  endtask

  localparam logic [15:0] ALU_MIX [20] = '{NOOP, NIP, DROP, DUP, OVER, SWAP, ADD, ADDC, SUB,
    SUBC, OR_, XOR_, AND_, SHR, SHL, ZLT, DSHR, DSHL, OVERADD, SWAPSUB};

  int depth;   // data stack entries below N emitted so far (kept away from empty)

  task automatic gen_random(input int count);
    logic [15:0] w;
    int pick;
    for (int k = 0; k < count; k++) begin
      pick = int'($urandom_range(0, 14));
      if (depth < 4) pick = 1;
      if (depth > 100) pick = 0;
      case (pick)
        0, 4: begin   // ALU op, stack effect tracked from the fields
          w = ALU_MIX[$urandom_range(0, 19)];
          emit(w);
          if (!(w[3] && (w[1] ^ w[0]))) begin
            if (w[6] && w[4]) depth++;
            else if (w[4]) depth--;
          end
        end
        1: begin emit(lit(5'($urandom))); depth++; end
        2: emit(addlit(5'($urandom)));
        3: begin emit(LLIT); emit(16'($urandom)); depth++; end
        5: begin emit(wr(R_MD)); depth--; emit(rd(R_MD)); depth++; end
        6: begin emit(wr(R_SR)); depth--; emit(rd(R_SR)); depth++; end
        7: begin emit(TOR); depth--; emit(ALU_MIX[$urandom_range(0, 3)]); emit(FROMR); depth++;
                  // the ALU op between may change depth: keep it balanced
                  mem[pc_gen-2] = NOOP; m_mem[pc_gen-2] = NOOP; end
        8: begin   // store a value and fetch it back
          emit(LLIT); emit(16'h8000 | 16'($urandom_range(0, 63))); depth++;
          emit(store()); depth -= 2;
          emit(LLIT); emit(16'h8000 | 16'($urandom_range(0, 63))); depth++;
          pick = int'($urandom_range(0, 7));
          if (depth < 5) pick = 0;
          emit(fetch(0, 3'(pick), pick != 0));
          if (pick != 0) depth--;
        end
        9: begin emit(rd(R_BDATA)); depth++; end
        10: begin emit(wr(R_BCMP)); depth--; end
        11: begin emit(rd(R_I)); depth++; end
        default: begin emit(ADD | RET); emit(NOOP); end   // return bit tested in directed code
      endcase
      if (pick >= 12) begin
        // undo: replace the two words just emitted with a balanced pair
        mem[pc_gen-2] = DUP;  m_mem[pc_gen-2] = DUP;
        mem[pc_gen-1] = DROP; m_mem[pc_gen-1] = DROP;
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc_exp, cyc_seen, end_pc, sub_w, sub_a;
    int n_call = 0, n_ret = 0, n_iftaken = 0, n_ifnot = 0, n_loop = 0, n_times = 0, n_mem = 0;
    logic [15:0] w;
    for (int a = 0; a < 65536; a++) mem[a] = 16'd0;
    for (int a = 0; a < 256; a++) begin dsm[a] = 0; rsm[a] = 0; end
    b_in = 16'h5A3C; x_in = 5'h0A;
    pc_gen = 0; depth = 0;
    // directed: subroutines live at 0x0400 onwards
    // W: lit 3 lit 4 + ;  (ends with return merged into "+")
    sub_w = 16'h0400;
    mem[sub_w] = lit(3); mem[sub_w+1] = lit(4); mem[sub_w+2] = ADD | RET;
    // A: call W, DUP 2* ;  (ACTION of the report: "DUP 2* ;" is one word, 100162)
    sub_a = 16'h0410;
    mem[sub_a] = call(16'(sub_w)); mem[sub_a+1] = 16'o100162;
    for (int a = 16'h0400; a < 16'h0420; a++) m_mem[a] = mem[a];
    // main program
    emit(lit(1)); emit(lit(2)); emit(lit(3)); emit(lit(4)); emit(lit(5)); depth = 4;
    gen_random(400);
    // calls and returns
    emit(call(16'(sub_a)));  depth += 2;
    emit(call(16'(sub_w)));  depth += 1;
    // IF taken (T = 0) and not taken
    emit(lit(0)); emit(if_(16'(pc_gen + 3))); emit(lit(9)); emit(lit(7));
    emit(lit(1)); emit(if_(16'(pc_gen + 3))); emit(lit(9)); emit(lit(7));
    // ELSE jump over one instruction
    emit(jmp(16'(pc_gen + 2))); emit(lit(31));
    // #LOOP: count 3 kept in I, body adds 1 to T
    emit(lit(0)); emit(lit(3)); emit(TOR);
    emit(addlit(1)); emit(loop_(16'(pc_gen - 1)));
    // TIMES: SWAP 6 times, then DUP 2* repeated 5 times
    emit(lit(6)); emit(wr(R_TIMES)); emit(SWAP);
    emit(lit(5)); emit(wr(R_TIMES)); emit(SHL);
    // unsigned multiply 300 * 1000 under TIMES: ( a b -- lo hi )
    emit(LLIT); emit(16'd300); emit(LLIT); emit(16'd1000);
    emit(wr(R_MD)); emit(lit(0)); emit(lit(16)); emit(wr(R_TIMES)); emit(MSTEP);
    end_pc = pc_gen;
    emit(jmp(16'(end_pc)));

    // reset, model initial state
    m_pc = 0; m_t = 0; m_n = 0; m_i = 0; m_md = 0; m_sr = 0; m_times = 0; m_c = 0;
    m_dsp = 0; m_rsp = 0; m_bcmp = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cyc_seen = 0; cyc_exp = 0;
    forever begin
      // sample in the middle of the cycle, while the instruction is in flight
      #1;
      if (dbg_fetch) begin
        if (cyc_exp != 0) check("cycles", cyc_seen, cyc_exp);
        check("pc", dbg_pc, m_pc);
        check("T", dbg_t, m_t);
        check("N", dbg_n, m_n);
        check("I", dbg_i, m_i);
        check("DSP", dbg_dsp, m_dsp);
        check("RSP", dbg_rsp, m_rsp);
        if (m_pc == 16'(end_pc)) break;
        w = mread(m_pc);
        if (!w[15]) n_call++;
        if (w[15:12] == 4'b1000 && w[5]) n_ret++;
        if (w[15:12] == 4'b1001) begin if (m_t == 0) n_iftaken++; else n_ifnot++; end
        if (w[15:12] == 4'b1011) n_loop++;
        if (w[15:12] == 4'b1000 && m_times > 1) n_times++;
        if (w[15:12] == 4'b1100) n_mem++;
        cyc_exp = model_exec();
        cyc_seen = 0;
      end
      cyc_seen++;
      @(negedge clk);
    end
    check("multiply low", dbg_n, 32'(300 * 1000) & 32'hFFFF);
    check("multiply high", dbg_t, 32'(300 * 1000) >> 16);
    $display("calls=%0d rets=%0d if_taken=%0d if_not=%0d loops=%0d times=%0d mem=%0d",
             n_call, n_ret, n_iftaken, n_ifnot, n_loop, n_times, n_mem);
    checks++;
    if (n_call < 3 || n_ret < 2 || n_iftaken < 1 || n_ifnot < 1 || n_loop < 4 || n_times < 3 || n_mem < 2) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
