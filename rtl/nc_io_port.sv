// nc_io_port: one bidirectional I/O port of the NC4000, used for the 5-bit X
// port (W = 5, also the upper address bits of extended memory accesses) and
// the 16-bit B port (W = 16).
//
// Each bit can be a latched output, a tri-state output or a normal input.
// Inputs are read as the exclusive OR of the pin and a user-set compare
// register, so reading a status field directly yields a truth value. On
// output a mask register protects chosen bits, so that a bit field of the
// port can be written without disturbing the others. These behaviours follow
// the NC4000 description; the register set and the meaning of the mode bits
// are this design's own:
//   register 0 DATA : write -> latch <= (latch & MASK) | (wdata & ~MASK)
//                     read  -> pin_in ^ CMP
//   register 1 DIR  : 1 = bit is an output
//   register 2 TRI  : 1 = an output bit is tri-state: it is driven only in
//                     the cycle after a DATA write, released otherwise
//   register 3 CMP  : input compare value
//   register 4 MASK : 1 = bit is protected from DATA writes
// Registers 1..4 read back their contents. All registers are written at the
// rising clock edge when `we` is high and clear on the synchronous
// active-low reset (every bit an input). `rdata` is combinational.
module nc_io_port #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [2:0]   addr,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata,
  // pins
  input  logic [W-1:0] pin_in,
  output logic [W-1:0] pin_out,
  output logic [W-1:0] pin_oe,
  // latched output value, for use as extended address bits
  output logic [W-1:0] latch
);

  logic [W-1:0] dir, tri_q, cmp, mask;
  logic         strobe;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      latch  <= '0;
      dir    <= '0;
      tri_q  <= '0;
      cmp    <= '0;
      mask   <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= we && addr == 3'd0;
      if (we) begin
        unique case (addr)
          3'd0: latch <= (latch & mask) | (wdata & ~mask);
          3'd1: dir   <= wdata;
          3'd2: tri_q <= wdata;
          3'd3: cmp   <= wdata;
          3'd4: mask  <= wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      3'd0:    rdata = pin_in ^ cmp;
      3'd1:    rdata = dir;
      3'd2:    rdata = tri_q;
      3'd3:    rdata = cmp;
      3'd4:    rdata = mask;
      default: rdata = '0;
    endcase
  end

  assign pin_out = latch;
  assign pin_oe  = dir & (~tri_q | {W{strobe}});

endmodule
