// nc_core: the NC4000 Forth processor.
//
// The chip executes Forth as its machine code. Most instructions take one
// clock cycle: the word at PC is read from main memory, decoded directly
// from its bits (there is no microcode) and executed in the same cycle.
// On chip are the top two data stack entries T and N, the top return stack
// entry I, the two 8-bit stack pointers (DSP, RSP), the multiply/divide
// register MD, the square-root register SR, the carry C, the repeat counter
// TIMES and PC. The rest of each stack lives in its own external 256 x 16
// memory, reached through two nc_stack_ctl units, so a push and a return
// stack pop can happen in the same cycle as an ALU operation.
//
// Instruction set (bit 15 = 0 is a call, see nc_pkg for the full layout):
//   call      : I is pushed onto the return stack, I <= PC+1, PC <= addr.
//               One cycle.
//   ALU       : fields of nc_alu plus Tn (copy T into N), SA (stack active:
//               push when Tn is set, pop into N otherwise) and ";" (return:
//               PC <= I and the return stack pops), all in one cycle.
//   IF        : jump when T is zero; the flag is dropped.
//   ELSE      : unconditional jump.
//   #LOOP     : when I is not zero, I is decremented and the jump is taken;
//               when I is zero the return stack pops and execution falls
//               through (count-down to zero held in one return stack entry).
//               Jump targets are bits 11:0 within the 4K page of the
//               instruction.
//   memory    : @ (T <= mem[T]) and ! (mem[T] <= N, both dropped); two
//               cycles, the second one using the memory bus for the data.
//               With the extended bit the X port latch drives address bits
//               20:16. A fetch may carry an ALU function of the fetched word
//               and N, and a pop of N, done in its second cycle by the same
//               ALU ("@ SWAP -", "@ +").
//   literal   : 5-bit short literal pushed, or added to T ("nn +"), in one
//               cycle; long literal (next word pushed) in two cycles.
//   register  : read (push) or write (pop) of I, MD, SR, TIMES and the
//               X and B port registers; I may also be moved with R> / >R.
// TIMES: writing n to TIMES makes the next ALU instruction execute n times
// (PC is held while the count runs down), which is how multiply, divide and
// square-root step sequences are run.
//
// What follows the source: the call/ALU/jump encodings, the ALU fields, the
// one-cycle call and return-merged-into-ALU, the 4K-page jumps, the single
// entry count-down loop, TIMES, the short literal width and the long literal
// taking a second word. This design's own choices: the encodings of the
// memory, literal and register classes, two cycles for memory and long
// literal instructions, jump when T is zero, the loop exit condition,
// the stack pointer conventions and a synchronous active-low reset that
// starts execution at address 0. Fetches can be merged with an ALU function
// on N and a return; stores, literals and register accesses only with a
// return.
//
// Timing: one instruction per rising clock edge; the main memory and stack
// memories are read combinationally within the cycle and written at the
// edge.
module nc_core
  import nc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // main memory
  output logic [15:0] mem_addr,
  output logic [4:0]  mem_xaddr,
  output logic [15:0] mem_wdata,
  output logic        mem_we,
  input  logic [15:0] mem_rdata,
  // external data stack
  output logic [7:0]  ds_addr,
  output logic [15:0] ds_wdata,
  output logic        ds_we,
  input  logic [15:0] ds_rdata,
  // external return stack
  output logic [7:0]  rs_addr,
  output logic [15:0] rs_wdata,
  output logic        rs_we,
  input  logic [15:0] rs_rdata,
  // X port
  input  logic [4:0]  x_in,
  output logic [4:0]  x_out,
  output logic [4:0]  x_oe,
  // B port
  input  logic [15:0] b_in,
  output logic [15:0] b_out,
  output logic [15:0] b_oe,
  // observation of the machine state
  output logic [15:0] dbg_pc,
  output logic [15:0] dbg_t,
  output logic [15:0] dbg_n,
  output logic [15:0] dbg_i,
  output logic [7:0]  dbg_dsp,
  output logic [7:0]  dbg_rsp,
  output logic        dbg_fetch    // high in a cycle that starts a new instruction
);

  typedef enum logic {ST_EXEC, ST_DATA} state_e;

  state_e      state, state_n;
  logic [15:0] pc, pc_n, t, t_n, md, md_n, sr, sr_n, times, times_n;
  logic [15:0] ir, ir_n, addr_q, addr_q_n;
  logic        c, c_n;
  logic [15:0] ins;
  cls_e        cls;
  alu_instr_t  ains;
  logic [15:0] page_target, alu_t_in;
  logic        fuse_fetch;

  // stack units
  logic        ds_push, ds_pop, ds_load;
  logic [15:0] ds_din, n;
  logic [7:0]  dsp;
  logic        rs_push, rs_pop, rs_load;
  logic [15:0] rs_din, i_reg;
  logic [7:0]  rsp;

  // ALU
  logic [15:0] alu_t, alu_n, alu_sr;
  logic        alu_nwe, alu_c, alu_srwe;

  // I/O ports
  logic        xp_we, bp_we;
  logic [2:0]  xp_addr, bp_addr;
  logic [4:0]  xp_rdata, x_latch;
  logic [15:0] bp_rdata, b_latch;

  // register access decode
  logic [3:0]  rsel;
  logic [15:0] reg_val;
  logic [16:0] lit_sum;
  logic        repeat_ins, repeat_ins_q;

  assign ins  = (state == ST_EXEC) ? mem_rdata : ir;
  assign cls  = cls_e'(ins[14:12]);
  assign page_target = {pc[15:12], ins[11:0]};
  assign rsel = ins[3:0];

  // A fetch can carry ALU work in its data cycle: the word read takes the
  // place of T as the ALU's T operand, Y is N, bits 8:6 give the ALU
  // function and bit 4 pops N (so "@ SWAP -" is one instruction).
  assign fuse_fetch = (state == ST_DATA) && (cls == CLS_MEM) && !ins[11];
  assign ains  = fuse_fetch ? alu_instr_t'({4'b1000, ins[8:6], 2'b00, 2'b00, ins[4], 4'b0000})
                            : alu_instr_t'(ins);
  assign alu_t_in = fuse_fetch ? mem_rdata : t;

  nc_alu u_alu (
    .ins   (ains),
    .t     (alu_t_in),
    .n     (n),
    .md    (md),
    .sr    (sr),
    .c     (c),
    .t_out (alu_t),
    .n_out (alu_n),
    .n_we  (alu_nwe),
    .c_out (alu_c),
    .sr_out(alu_sr),
    .sr_we (alu_srwe)
  );

  nc_stack_ctl #(.W(16), .AW(8)) u_dstack (
    .clk, .rst_n,
    .push(ds_push), .pop(ds_pop), .load(ds_load), .din(ds_din),
    .top(n), .sp(dsp),
    .st_addr(ds_addr), .st_wdata(ds_wdata), .st_we(ds_we), .st_rdata(ds_rdata)
  );

  nc_stack_ctl #(.W(16), .AW(8)) u_rstack (
    .clk, .rst_n,
    .push(rs_push), .pop(rs_pop), .load(rs_load), .din(rs_din),
    .top(i_reg), .sp(rsp),
    .st_addr(rs_addr), .st_wdata(rs_wdata), .st_we(rs_we), .st_rdata(rs_rdata)
  );

  nc_io_port #(.W(5)) u_xport (
    .clk, .rst_n, .addr(xp_addr), .we(xp_we), .wdata(t[4:0]), .rdata(xp_rdata),
    .pin_in(x_in), .pin_out(x_out), .pin_oe(x_oe), .latch(x_latch)
  );

  nc_io_port #(.W(16)) u_bport (
    .clk, .rst_n, .addr(bp_addr), .we(bp_we), .wdata(t), .rdata(bp_rdata),
    .pin_in(b_in), .pin_out(b_out), .pin_oe(b_oe), .latch(b_latch)
  );

  // register file read mux and port register addressing
  always_comb begin
    bp_addr = 3'(rsel - 4'(REG_B));
    xp_addr = 3'(rsel - 4'(REG_X));
    unique case (rsel)
      REG_I:      reg_val = i_reg;
      REG_MD:     reg_val = md;
      REG_SR:     reg_val = sr;
      REG_TIMES:  reg_val = times;
      4'd4, 4'd5, 4'd6, 4'd7, 4'd8:      reg_val = bp_rdata;
      4'd9, 4'd10, 4'd11, 4'd12, 4'd13:  reg_val = {11'd0, xp_rdata};
      default:    reg_val = '0;
    endcase
  end

  assign lit_sum = {1'b0, t} + {12'd0, ins[4:0]};

  // main memory bus: depends only on registered state, so the instruction
  // word read back does not loop into its own address
  always_comb begin
    mem_addr  = pc;
    mem_xaddr = '0;
    mem_wdata = t;
    mem_we    = 1'b0;
    if (state == ST_DATA && cls_e'(ir[14:12]) == CLS_MEM) begin
      mem_addr  = addr_q;
      mem_xaddr = ir[10] ? x_latch : 5'd0;
      mem_we    = ir[11];
    end
  end

  always_comb begin
    state_n  = ST_EXEC;
    pc_n     = pc + 16'd1;
    t_n      = t;
    c_n      = c;
    md_n     = md;
    sr_n     = sr;
    times_n  = times;
    ir_n     = ir;
    addr_q_n = addr_q;
    ds_push  = 1'b0; ds_pop = 1'b0; ds_load = 1'b0; ds_din = t;
    rs_push  = 1'b0; rs_pop = 1'b0; rs_load = 1'b0; rs_din = pc + 16'd1;
    xp_we = 1'b0;
    bp_we = 1'b0;
    repeat_ins = 1'b0;

    if (state == ST_DATA) begin
      unique case (cls)
        CLS_MEM: begin
          if (ins[11]) begin
            // store, second cycle: data (already in T) to memory, drop it
            t_n    = n;
            ds_pop = 1'b1;
          end else begin
            // fetch, with the optional merged ALU function and pop
            t_n = alu_t;
            c_n = alu_c;
            if (ins[4]) ds_pop = 1'b1;
          end
          if (ins[5]) begin
            pc_n   = i_reg;
            rs_pop = 1'b1;
          end
        end
        default: begin
          // long literal, second cycle: the word at PC is pushed
          t_n     = mem_rdata;
          ds_push = 1'b1;
          ds_din  = t;
        end
      endcase
    end else if (!ins[15]) begin
      // subroutine call
      rs_push = 1'b1;
      rs_din  = pc + 16'd1;
      pc_n    = {1'b0, ins[14:0]};
    end else begin
      unique case (cls)
        CLS_ALU: begin
          t_n = alu_t;
          c_n = alu_c;
          if (alu_srwe) sr_n = alu_sr;
          if (alu_nwe) begin
            ds_load = 1'b1;
            ds_din  = alu_n;
          end else if (ains.sa && ains.tn) begin
            ds_push = 1'b1;
            ds_din  = t;
          end else if (ains.sa) begin
            ds_pop = 1'b1;
          end else if (ains.tn) begin
            ds_load = 1'b1;
            ds_din  = t;
          end
          if (times > 16'd1) begin
            repeat_ins = 1'b1;
            pc_n    = pc;
            times_n = times - 16'd1;
          end else begin
            times_n = '0;
            if (ains.ret) begin
              pc_n   = i_reg;
              rs_pop = 1'b1;
            end
          end
        end
        CLS_IF: begin
          if (t == 16'd0) pc_n = page_target;
          t_n    = n;
          ds_pop = 1'b1;
        end
        CLS_JMP: pc_n = page_target;
        CLS_LOOP: begin
          if (i_reg != 16'd0) begin
            rs_load = 1'b1;
            rs_din  = i_reg - 16'd1;
            pc_n    = page_target;
          end else begin
            rs_pop = 1'b1;
          end
        end
        CLS_MEM: begin
          state_n  = ST_DATA;
          ir_n     = ins;
          pc_n     = pc;
          addr_q_n = t;
          if (ins[11]) begin
            // store, first cycle: address captured, data moves up into T
            t_n    = n;
            ds_pop = 1'b1;
          end
        end
        CLS_LIT: begin
          if (!ins[11]) begin
            if (ins[10]) begin
              t_n = lit_sum[15:0];
              c_n = lit_sum[16];
            end else begin
              t_n     = {11'd0, ins[4:0]};
              ds_push = 1'b1;
              ds_din  = t;
            end
          end else if (!ins[10]) begin
            // register read: push
            t_n     = reg_val;
            ds_push = 1'b1;
            ds_din  = t;
            if (rsel == REG_I && ins[9]) rs_pop = 1'b1;
          end else begin
            // register write: pop
            t_n    = n;
            ds_pop = 1'b1;
            unique case (rsel)
              REG_I: begin
                rs_din = t;
                if (ins[9]) rs_push = 1'b1;
                else        rs_load = 1'b1;
              end
              REG_MD:    md_n    = t;
              REG_SR:    sr_n    = t;
              REG_TIMES: times_n = t;
              4'd4, 4'd5, 4'd6, 4'd7, 4'd8:     bp_we = 1'b1;
              4'd9, 4'd10, 4'd11, 4'd12, 4'd13: xp_we = 1'b1;
              default: ;
            endcase
          end
          if (ins[5] && !(ins[11] && rsel == REG_I)) begin
            pc_n   = i_reg;
            rs_pop = 1'b1;
          end
        end
        CLS_LLIT: begin
          state_n = ST_DATA;
          ir_n    = ins;
        end
        default: ;  // reserved: no operation
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ST_EXEC;
      pc     <= '0;
      t      <= '0;
      c      <= 1'b0;
      md     <= '0;
      sr     <= '0;
      times  <= '0;
      ir     <= '0;
      addr_q <= '0;
    end else begin
      state  <= state_n;
      pc     <= pc_n;
      t      <= t_n;
      c      <= c_n;
      md     <= md_n;
      sr     <= sr_n;
      times  <= times_n;
      ir     <= ir_n;
      addr_q <= addr_q_n;
    end
  end

  assign dbg_pc    = pc;
  assign dbg_t     = t;
  assign dbg_n     = n;
  assign dbg_i     = i_reg;
  assign dbg_dsp   = dsp;
  assign dbg_rsp   = rsp;
  assign dbg_fetch = (state == ST_EXEC) && !repeat_ins_q;

  always_ff @(posedge clk) begin
    if (!rst_n) repeat_ins_q <= 1'b0;
    else        repeat_ins_q <= repeat_ins;
  end

  // a memory instruction never writes main memory in its first cycle
  a_mem_we_data_only: assert property (@(posedge clk) disable iff (!rst_n)
                                       mem_we |-> state == ST_DATA);

endmodule
