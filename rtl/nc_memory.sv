// nc_memory: the external 64K x 16 main memory of the NC4000 system, holding
// both program and data.
//
// The processor drives a word address and reads the addressed word within
// the same cycle (asynchronous read, the 35 ns RAM of the reference system
// answers in the first half cycle); a write takes place at the rising clock
// edge when `we` is high (second half cycle). The size, 64K words of 16 bits,
// is the system's; the single-port timing model is this design's own.
// Contents are cleared at time zero; a testbench loads a program by writing
// the `mem` array hierarchically.
module nc_memory #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 65536,
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
