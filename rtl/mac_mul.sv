// MAC multiply unit (MUL).
//
// Takes its two binary32 operands (already read from the register file and
// passed through the bypass) and forms their exact product in unrounded
// form: the sign is the exclusive or of the signs, the exponent the sum of
// the biased exponents less the bias, the significand the full 48-bit
// product of the significands, aligned to FRAC fraction bits. No rounding
// happens here; RND does it.
// A zero or subnormal operand gives a zero product. Combinational.
//
// Interface: x, y binary32 in; p unrounded product (ufp_t) out.
// Document: MUL feeds ADD and RND unrounded (Fig. 4.10).
// Own choice: the unrounded format, its widths and the zero handling.
module mac_mul
  import mac_pkg::*;
(
  input  logic [31:0] x,
  input  logic [31:0] y,
  output ufp_t        p
);
  ufp_t ux, uy;
  logic [23:0] mx, my;
  assign ux = unpack32(x);
  assign uy = unpack32(y);
  assign mx = {1'b1, x[22:0]};
  assign my = {1'b1, y[22:0]};

  always_comb begin
    p.sign = ux.sign ^ uy.sign;
    if (ux.mant == '0 || uy.mant == '0) begin
      p.exp  = '0;
      p.mant = '0;
    end else begin
      p.exp  = ux.exp + uy.exp - 12'sd127;
      p.mant = MW'(mx * my) << (FRAC - 46);   // 1.23 x 1.23 = 2.46
    end
  end

endmodule
