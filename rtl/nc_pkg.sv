// nc_pkg: types and constants shared by the NC4000 processor model.
//
// The NC4000 is a 16-bit stack processor whose machine code is Forth. Every
// instruction is one 16-bit word. Bit 15 clear means a subroutine call to the
// address held in bits 14:0. With bit 15 set, bits 14:12 select the class:
//   000 ALU instruction (octal 10xxxx), fields as defined by alu_instr_t
//   001 conditional jump (11xxxx), 010 unconditional jump (12xxxx),
//   011 #LOOP (13xxxx): bits 11:0 are an absolute address in the current
//       4K-word page.
// The ALU field layout and the jump classes follow the published NC4000
// format. The encodings of the remaining classes (memory access, short
// literal, register access, long literal) are not published in the source
// this model was written from; the layouts below are this design's own.
//   100 memory access   : bit 11 store(1)/fetch(0), bit 10 extended address
//                          (X port supplies address bits 20:16), bit 5 return;
//                          for a fetch, bits 8:6 an ALU function applied to
//                          the fetched word (as T) and N (as Y), bit 4 pops N
//   101 literal/register: bit 11 = 0 : short literal, bits 4:0 the literal,
//                                      bit 10 = 1 adds it to T ("nn +"),
//                                      bit 10 = 0 pushes it
//                          bit 11 = 1 : register access, bits 3:0 register,
//                                      bit 10 write(1)/read(0), bit 9 moves
//                                      the value through the return stack
//                                      (R> / >R) when the register is I,
//                          bit 5 return (ignored when the register is I)
//   110 long literal    : the next word is pushed onto the data stack
//   111 reserved        : executes as a no-operation
package nc_pkg;

  // Instruction classes, bits 15:12.
  typedef enum logic [2:0] {
    CLS_ALU  = 3'd0,
    CLS_IF   = 3'd1,
    CLS_JMP  = 3'd2,
    CLS_LOOP = 3'd3,
    CLS_MEM  = 3'd4,
    CLS_LIT  = 3'd5,
    CLS_LLIT = 3'd6,
    CLS_RSVD = 3'd7
  } cls_e;

  // ALU decode (3-bit field, bits 11:9).
  typedef enum logic [2:0] {
    ALU_T    = 3'd0,   // T
    ALU_AND  = 3'd1,   // T AND Y
    ALU_TSY  = 3'd2,   // T - Y
    ALU_OR   = 3'd3,   // T OR Y
    ALU_ADD  = 3'd4,   // T + Y
    ALU_XOR  = 3'd5,   // T XOR Y
    ALU_YST  = 3'd6,   // Y - T
    ALU_Y    = 3'd7    // Y
  } alu_op_e;

  // "Who is Y?" (2-bit field, bits 8:7).
  typedef enum logic [1:0] {
    Y_N  = 2'd0,       // N
    Y_NC = 2'd1,       // N with carry
    Y_MD = 2'd2,       // multiply/divide register
    Y_SR = 2'd3        // square root register
  } ysel_e;

  // ALU instruction word, bit 15 down to bit 0.
  typedef struct packed {
    logic [3:0] cls;   // 4'b1000
    alu_op_e    alu;   // 11:9
    ysel_e      ysel;  // 8:7
    logic       tn;    // 6  copy T into N
    logic       ret;   // 5  return from subroutine
    logic       sa;    // 4  stack active (push when tn, else pop)
    logic       d32;   // 3  32-bit shift of T:N
    logic       div;   // 2  divide (conditional subtract) step
    logic       sl;    // 1  shift left
    logic       sr;    // 0  shift right (both set: propagate sign bit)
  } alu_instr_t;

  // Register numbers of the register-access instruction.
  typedef enum logic [3:0] {
    REG_I     = 4'd0,
    REG_MD    = 4'd1,
    REG_SR    = 4'd2,
    REG_TIMES = 4'd3,
    REG_B     = 4'd4,   // B port: 4..8 = data, dir, tri, compare, mask
    REG_X     = 4'd9    // X port: 9..13 = data, dir, tri, compare, mask
  } reg_e;

  // Register offsets inside one I/O port.
  typedef enum logic [2:0] {
    PORT_DATA = 3'd0,
    PORT_DIR  = 3'd1,
    PORT_TRI  = 3'd2,
    PORT_CMP  = 3'd3,
    PORT_MASK = 3'd4
  } port_reg_e;

endpackage
