// MAC round unit (RND).
//
// Turns an unrounded value from MUL or ADD into binary32: normalisation
// shifts the leading one to the top of the significand and adjusts the
// exponent, rounding keeps 24 bits and rounds to nearest, ties to even,
// using the round bit and the OR of all lower bits, and renormalisation
// shifts once more if rounding carried out of the significand. Results
// whose exponent falls below the normal range flush to zero; results above
// it become infinity (this design supports no subnormals or NaNs).
// Combinational.
//
// Interface: u unrounded value (ufp_t) in; r binary32 out.
// Document: a RND unit after MUL and ADD (Fig. 4.9).
// Own choice: the number format (binary32, nearest even, flush to zero,
// overflow to infinity); the document does not give one.
module mac_rnd
  import mac_pkg::*;
(
  input  ufp_t        u,
  output logic [31:0] r
);
  logic [$clog2(MW+1)-1:0] lz;
  logic [MW-1:0]  norm;
  logic [24:0]    sig;       // 24 kept bits plus carry
  logic           rbit, sticky, inc;
  logic signed [12:0] e;

  always_comb begin
    lz = '0;
    for (int i = 0; i < int'(MW); i++) begin
      if (u.mant[i]) lz = ($clog2(MW+1))'(int'(MW) - 1 - i);
    end
  end

  always_comb begin
    norm   = u.mant << lz;                                   // normalise
    rbit   = norm[MW-25];
    sticky = |norm[MW-26:0];
    inc    = rbit && (sticky || norm[MW-24]);                // nearest, ties to even
    sig    = {1'b0, norm[MW-1:MW-24]} + 25'(inc);
    // exponent of the leading one: mant bit FRAC has weight 2^(exp-127)
    e      = 13'(u.exp) + 13'(int'(MW) - 1 - int'(FRAC)) - 13'(lz);
    if (sig[24]) begin                                        // renormalise
      sig = sig >> 1;
      e   = e + 13'sd1;
    end
    if (u.mant == '0 || e <= 0)  r = {u.sign, 31'd0};
    else if (e >= 255)           r = {u.sign, 8'hFF, 23'd0};
    else                         r = {u.sign, e[7:0], sig[22:0]};
  end

endmodule
