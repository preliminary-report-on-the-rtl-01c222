// nc_asm_pkg: instruction encodings for NC4000 test programs.
//
// Constants for the published ALU opcodes (octal) and helper functions that
// build calls, jumps, memory, literal and register instructions in the
// layout used by this design (see nc_pkg).
package nc_asm_pkg;

  localparam logic [15:0] NOOP   = 16'o100000;
  localparam logic [15:0] NIP    = 16'o100020;
  localparam logic [15:0] DROP   = 16'o107020;
  localparam logic [15:0] DUP    = 16'o100120;
  localparam logic [15:0] OVER   = 16'o107120;
  localparam logic [15:0] SWAP   = 16'o107100;
  localparam logic [15:0] ADD    = 16'o104020;
  localparam logic [15:0] ADDC   = 16'o104220;
  localparam logic [15:0] SUB    = 16'o106020;
  localparam logic [15:0] SUBC   = 16'o106220;
  localparam logic [15:0] OR_    = 16'o103020;
  localparam logic [15:0] XOR_   = 16'o105020;
  localparam logic [15:0] AND_   = 16'o101020;
  localparam logic [15:0] SHR    = 16'o100001;   // 2/
  localparam logic [15:0] SHL    = 16'o100002;   // 2*
  localparam logic [15:0] ZLT    = 16'o100003;   // 0<
  localparam logic [15:0] DSHR   = 16'o100011;   // D2/
  localparam logic [15:0] DSHL   = 16'o100012;   // D2*
  localparam logic [15:0] MSTEP  = 16'o104411;   // *'
  localparam logic [15:0] SMSTEP = 16'o102411;   // *-
  localparam logic [15:0] DSTEP  = 16'o102416;   // /'
  localparam logic [15:0] DLAST  = 16'o102414;   // /''
  localparam logic [15:0] SSTEP  = 16'o102616;   // S'
  localparam logic [15:0] OVERADD = 16'o104000;  // OVER +
  localparam logic [15:0] SWAPSUB = 16'o102020;  // SWAP -
  localparam logic [15:0] RET    = 16'o000040;   // ";" bit

  localparam logic [3:0] R_I = 4'd0, R_MD = 4'd1, R_SR = 4'd2, R_TIMES = 4'd3;
  localparam logic [3:0] R_BDATA = 4'd4, R_BDIR = 4'd5, R_BTRI = 4'd6, R_BCMP = 4'd7,
                         R_BMASK = 4'd8;
  localparam logic [3:0] R_XDATA = 4'd9, R_XDIR = 4'd10;

  function automatic logic [15:0] call(input logic [15:0] a);
    return {1'b0, a[14:0]};
  endfunction
  function automatic logic [15:0] if_(input logic [15:0] a);
    return 16'o110000 | {4'd0, a[11:0]};
  endfunction
  function automatic logic [15:0] jmp(input logic [15:0] a);
    return 16'o120000 | {4'd0, a[11:0]};
  endfunction
  function automatic logic [15:0] loop_(input logic [15:0] a);
    return 16'o130000 | {4'd0, a[11:0]};
  endfunction
  // fetch; alu_op (0..7, the ALU decode) combines the fetched word (as T)
  // with N, pop_n drops N: fetch(0, 3'd2, 1) is "@ SWAP -"
  function automatic logic [15:0] fetch(input bit ext = 0, input logic [2:0] alu_op = 3'd0,
                                        input bit pop_n = 0);
    return 16'hC000 | (ext ? 16'h0400 : 16'h0) | {7'd0, alu_op, 1'b0, pop_n, 4'd0};
  endfunction
  function automatic logic [15:0] store(input bit ext = 0);
    return 16'hC800 | (ext ? 16'h0400 : 16'h0);
  endfunction
  function automatic logic [15:0] lit(input logic [4:0] v);
    return 16'hD000 | {11'd0, v};
  endfunction
  function automatic logic [15:0] addlit(input logic [4:0] v);
    return 16'hD400 | {11'd0, v};
  endfunction
  function automatic logic [15:0] rd(input logic [3:0] r);
    return 16'hD800 | {12'd0, r};
  endfunction
  function automatic logic [15:0] wr(input logic [3:0] r);
    return 16'hDC00 | {12'd0, r};
  endfunction
  localparam logic [15:0] FROMR = 16'hDA00;   // R>
  localparam logic [15:0] TOR   = 16'hDE00;   // >R
  localparam logic [15:0] LLIT  = 16'hE000;   // followed by the literal word

endpackage
