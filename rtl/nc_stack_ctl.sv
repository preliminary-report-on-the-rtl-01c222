// nc_stack_ctl: on-chip top-of-stack register and stack pointer for one of
// the NC4000's two external stacks.
//
// The NC4000 keeps the top entries of its stacks on chip and the rest in a
// dedicated external 256 x 16 memory with an 8-bit pointer. The same unit is
// used twice: for the data stack it holds NEXT (N) and DSP, for the return
// stack it holds I and RSP. The register value is called `top` here.
//   push : the old `top` is written to the external memory at SP+1, SP is
//          incremented and `top` takes `din`.
//   pop  : `top` takes the external memory word at SP and SP is decremented.
//   load : `top` takes `din`, SP unchanged.
// Push and pop in the same cycle are not allowed (asserted); push wins.
// The external memory is read asynchronously at `st_addr` during the cycle
// and written at the clock edge, which models the chip's read in the first
// half cycle and write in the second. SP points at the topmost word held in
// memory; a synchronous active-low reset sets SP and `top` to 0 (this reset choice is the design's
// own, the source does not describe reset). The pointer wraps at 256.
module nc_stack_ctl #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic          pop,
  input  logic          load,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  top,
  output logic [AW-1:0] sp,
  // external stack memory
  output logic [AW-1:0] st_addr,
  output logic [W-1:0]  st_wdata,
  output logic          st_we,
  input  logic [W-1:0]  st_rdata
);

  assign st_addr  = push ? sp + AW'(1) : sp;
  assign st_wdata = top;
  assign st_we    = push;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      top <= '0;
      sp  <= '0;
    end else if (push) begin
      top <= din;
      sp  <= sp + AW'(1);
    end else if (pop) begin
      top <= st_rdata;
      sp  <= sp - AW'(1);
    end else if (load) begin
      top <= din;
    end
  end

  a_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
