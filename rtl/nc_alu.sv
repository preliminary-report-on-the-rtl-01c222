// nc_alu: Y multiplexer, ALU and shifter of the NC4000 (purely combinational).
//
// An ALU instruction carries independent fields that all act in the same
// cycle: a 2-bit Y select (N, N with carry, MD, SR), a 3-bit ALU function of
// T and Y, and a shifter after the ALU (shift left, shift right, both = fill
// T with the sign bit). The D? bit makes the shift act on the 32-bit pair
// T:N instead of T alone, and the % bit turns the instruction into a divide
// (or, with Y = SR, square-root) step. All of this follows the published
// instruction layout. The arithmetic inside the multiply, divide and
// square-root steps is not spelled out there; this design uses:
//   multiply step (D? set, Y = MD, % clear): the ALU result is used only when
//     N bit 0 is 1, otherwise T passes unchanged; the 17-bit result (carry
//     for T+Y, sign for T-Y / Y-T) is then shifted with N. Sixteen T+MD
//     right-shift steps (*') from T = 0 leave the unsigned product in T:N.
//     With T-Y (*-) the 17-bit difference is signed; fifteen *' steps and a
//     final *- multiply a signed N by an unsigned MD (the multiplier's top
//     bit weighs -2^15).
//   divide step (%, Y = MD): the 17-bit value C:T is compared with MD and MD
//     subtracted when not smaller; the quotient bit enters N bit 0. With the
//     shift-left bit set T:N then shift left and the bit shifted out of T is
//     kept in C (/'), without it only N shifts (last step, /'').
//   square-root step (%, Y = SR): C:T holds the partial remainder, the top
//     two bits of N are brought in, the trial value 4*SR+1 is subtracted when
//     possible and the new root bit is shifted into SR.
// Carry C is the carry out of T+Y and the not-borrow of T-Y / Y-T; "N with
// carry" adds C (add) or uses C as not-borrow (subtract). Logic functions
// leave C alone.
//
// Interface: instruction fields in, T, N, MD, SR and C in; next T, next C,
// next N with a write enable (only 32-bit and step instructions write N
// here), next SR with a write enable.
module nc_alu
  import nc_pkg::*;
(
  input  alu_instr_t  ins,
  input  logic [15:0] t,
  input  logic [15:0] n,
  input  logic [15:0] md,
  input  logic [15:0] sr,
  input  logic        c,
  output logic [15:0] t_out,
  output logic [15:0] n_out,
  output logic        n_we,
  output logic        c_out,
  output logic [15:0] sr_out,
  output logic        sr_we
);

  logic [15:0] y;
  logic        cin_add, cin_sub;
  logic [16:0] sum17, tsy17, yst17, a17, s17, m17;
  logic        arith, signed_op;
  logic [15:0] a;

  // divide / square-root step intermediates
  logic [16:0] p17, r17;
  logic        q;
  logic [18:0] p19, trial19, d19;

  always_comb begin
    unique case (ins.ysel)
      Y_N, Y_NC: y = n;
      Y_MD:      y = md;
      default:   y = sr;
    endcase
    cin_add = (ins.ysel == Y_NC) ? c : 1'b0;
    cin_sub = (ins.ysel == Y_NC) ? c : 1'b1;

    sum17 = {1'b0, t} + {1'b0, y} + {16'd0, cin_add};
    tsy17 = {1'b0, t} + {1'b0, ~y} + {16'd0, cin_sub};
    yst17 = {1'b0, y} + {1'b0, ~t} + {16'd0, cin_sub};

    arith     = 1'b0;
    signed_op = 1'b0;
    unique case (ins.alu)
      ALU_T:   a17 = {c, t};
      ALU_AND: a17 = {c, t & y};
      ALU_TSY: begin a17 = tsy17; arith = 1'b1; signed_op = 1'b1; end
      ALU_OR:  a17 = {c, t | y};
      ALU_ADD: begin a17 = sum17; arith = 1'b1; end
      ALU_XOR: a17 = {c, t ^ y};
      ALU_YST: begin a17 = yst17; arith = 1'b1; signed_op = 1'b1; end
      default: a17 = {c, y};
    endcase
    a = a17[15:0];

    // 17-bit two's complement result of a multiply step with a subtracting
    // ALU: the partial product in T is non-negative, so the difference of
    // the zero-extended operands is exact and bit 16 is its sign
    unique case (ins.alu)
      ALU_TSY: s17 = {1'b0, t} - {1'b0, y};
      ALU_YST: s17 = {1'b0, y} - {1'b0, t};
      default: s17 = a17;
    endcase

    // divide step
    p17 = {c, t};
    q   = (p17 >= {1'b0, y});
    r17 = q ? (p17 - {1'b0, y}) : p17;

    // square-root step
    p19     = {c, t, n[15:14]};
    trial19 = {1'b0, sr, 2'b01};
    d19     = p19 - trial19;

    m17    = '0;
    t_out  = a;
    n_out  = n;
    n_we   = 1'b0;
    c_out  = arith ? a17[16] : c;
    sr_out = sr;
    sr_we  = 1'b0;

    if (ins.div && ins.ysel == Y_SR) begin
      // square-root step
      n_we  = 1'b1;
      sr_we = 1'b1;
      if (p19 >= trial19) begin
        t_out  = d19[15:0];
        c_out  = d19[16];
        sr_out = {sr[14:0], 1'b1};
      end else begin
        t_out  = p19[15:0];
        c_out  = p19[16];
        sr_out = {sr[14:0], 1'b0};
      end
      n_out = {n[13:0], 2'b00};
    end else if (ins.div) begin
      // divide step
      n_we  = 1'b1;
      n_out = {n[14:0], q};
      if (ins.sl) begin
        t_out = {r17[14:0], n[15]};
        c_out = r17[15];
      end else begin
        t_out = r17[15:0];
        c_out = 1'b0;
      end
    end else if (ins.d32 && ins.ysel == Y_MD) begin
      // multiply step: ALU result only when N0 is set
      if (n[0]) m17 = signed_op ? s17 : a17;
      else      m17 = {1'b0, t};
      n_we = 1'b1;
      if (ins.sr && !ins.sl) begin
        t_out = m17[16:1];
        n_out = {m17[0], n[15:1]};
      end else if (ins.sl && !ins.sr) begin
        t_out = {m17[14:0], n[15]};
        n_out = {n[14:0], 1'b0};
        c_out = m17[15];
      end else begin
        t_out = m17[15:0];
        n_we  = 1'b0;
      end
    end else if (ins.d32) begin
      // 32-bit shift of T:N
      if (ins.sr && ins.sl) begin
        t_out = {16{a[15]}};
        n_out = {16{a[15]}};
        n_we  = 1'b1;
      end else if (ins.sr) begin
        t_out = {a[15], a[15:1]};
        n_out = {a[0], n[15:1]};
        n_we  = 1'b1;
      end else if (ins.sl) begin
        t_out = {a[14:0], n[15]};
        n_out = {n[14:0], 1'b0};
        n_we  = 1'b1;
        c_out = a[15];
      end
    end else begin
      // 16-bit shifter on T
      if (ins.sr && ins.sl) t_out = {16{a[15]}};
      else if (ins.sr)      t_out = {a[15], a[15:1]};
      else if (ins.sl)      t_out = {a[14:0], 1'b0};
    end

  end

endmodule
