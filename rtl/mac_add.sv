// MAC add unit (ADD).
//
// Adds two unrounded values: for A = B + C both come from registers, for
// A = B + C * D one is the product from MUL. The operands are ordered by
// exponent and the one with the smaller exponent is shifted right to
// align; bits shifted out are kept as a sticky bit in the least significant
// position. That is enough for RND to round correctly: a shift of three
// places or fewer drops only zero bits, and after a larger shift the sum
// keeps its leading one within one place of the larger operand's, far
// above the sticky position. Equal signs add; different signs subtract the
// smaller magnitude from the larger and take the larger's sign. Because a
// product's significand may exceed 2, the operand with the smaller
// exponent can be the larger one (only with a one-place gap, so exactly);
// the subtraction direction is chosen after alignment. An exact zero is
// positive unless both operands are negative zeros. The sum is not
// normalised. Combinational. The alignment scheme is this design's choice;
// the document only assigns addition to ADD and rounding to RND.
module mac_add
  import mac_pkg::*;
(
  input  ufp_t x,
  input  ufp_t y,
  output ufp_t s
);
  ufp_t hi, lo;
  logic [MW-1:0] sh, al;
  logic          sticky;
  logic [11:0]   diff;

  always_comb begin
    // order by magnitude: exponent first (zeros count as smallest)
    if (y.mant == '0 || (x.mant != '0 && (x.exp > y.exp || (x.exp == y.exp && x.mant >= y.mant)))) begin
      hi = x; lo = y;
    end else begin
      hi = y; lo = x;
    end
    diff = (lo.mant == '0) ? 12'd0 : 12'(hi.exp - lo.exp);
    if (diff >= 12'(MW)) begin
      sh     = '0;
      sticky = |lo.mant;
    end else begin
      sh     = lo.mant >> diff;
      sticky = |(lo.mant & ~(~MW'(0) << diff));
    end
    al = sh | MW'(sticky);

    s.exp = hi.exp;
    if (hi.sign == lo.sign) begin
      s.mant = hi.mant + al;
      s.sign = hi.sign;
    end else if (hi.mant >= al) begin
      s.mant = hi.mant - al;
      s.sign = hi.sign;
    end else begin
      // a product with the smaller exponent field can still be larger (its
      // significand lies in [2,4)); the gap is then one place, so exact
      s.mant = al - hi.mant;
      s.sign = lo.sign;
    end
    if (s.mant == '0) s.sign = x.sign & y.sign;
  end

endmodule
