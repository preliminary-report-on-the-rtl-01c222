// nc4000_system: an NC4000 Forth processor with its three external memories.
//
// The processor has separate buses for main memory, the data stack and the
// return stack, so an instruction can fetch, push or pop both stacks and
// return from a subroutine in one cycle. This module wires nc_core to a
// 64K x 16 main memory (program and data) and to two 256 x 16 stack
// memories, as in the reference system, and brings out the 5-bit X port and
// the 16-bit B port, the address bits 20:16 that the X port supplies during
// extended memory accesses, and the core's observation signals. The
// processor starts at address 0 after the synchronous active-low reset;
// the program is placed in u_mem.mem before reset is released.
module nc4000_system (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  x_in,
  output logic [4:0]  x_out,
  output logic [4:0]  x_oe,
  input  logic [15:0] b_in,
  output logic [15:0] b_out,
  output logic [15:0] b_oe,
  output logic [4:0]  mem_xaddr,
  output logic [15:0] dbg_pc,
  output logic [15:0] dbg_t,
  output logic [15:0] dbg_n,
  output logic [15:0] dbg_i,
  output logic [7:0]  dbg_dsp,
  output logic [7:0]  dbg_rsp,
  output logic        dbg_fetch
);

  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_we;
  logic [7:0]  ds_addr, rs_addr;
  logic [15:0] ds_wdata, ds_rdata, rs_wdata, rs_rdata;
  logic        ds_we, rs_we;

  nc_core u_core (
    .clk, .rst_n,
    .mem_addr, .mem_xaddr, .mem_wdata, .mem_we, .mem_rdata,
    .ds_addr, .ds_wdata, .ds_we, .ds_rdata,
    .rs_addr, .rs_wdata, .rs_we, .rs_rdata,
    .x_in, .x_out, .x_oe, .b_in, .b_out, .b_oe,
    .dbg_pc, .dbg_t, .dbg_n, .dbg_i, .dbg_dsp, .dbg_rsp, .dbg_fetch
  );

  nc_memory #(.W(16), .DEPTH(65536)) u_mem (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .we(mem_we), .rdata(mem_rdata)
  );

  nc_stack_ram #(.W(16), .DEPTH(256)) u_dstack_ram (
    .clk, .addr(ds_addr), .wdata(ds_wdata), .we(ds_we), .rdata(ds_rdata)
  );

  nc_stack_ram #(.W(16), .DEPTH(256)) u_rstack_ram (
    .clk, .addr(rs_addr), .wdata(rs_wdata), .we(rs_we), .rdata(rs_rdata)
  );

endmodule
