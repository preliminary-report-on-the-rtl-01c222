// nc_stack_ram: the external 256 x 16 stack memory of the NC4000 (one for the
// data stack, one for the return stack).
//
// The chip reads a stack in the first half of its cycle and writes it in the
// second, so the memory is modelled with an asynchronous read of `addr` and a
// write of `wdata` at the rising clock edge when `we` is high. The size
// follows the 256 x 16 stacks of the design; the timing model is this
// design's own reading of "read on the first half cycle, write on the
// second". Contents are cleared at time zero so that simulation is
// deterministic; the real part powers up undefined.
module nc_stack_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  input  logic          we,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

endmodule
