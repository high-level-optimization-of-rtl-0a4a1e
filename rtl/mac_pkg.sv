// Shared types of the floating-point multiply accumulator (MAC) pipeline.
//
// The MAC performs A = B + C, A = B * C and A = B + C * D on single
// precision (IEEE-754 binary32) registers. MUL and ADD produce unrounded
// intermediate values (ufp_t); RND normalises, rounds to nearest-even and
// renormalises them into binary32. The number format, the width of the
// intermediate significand and the register count are this design's
// choices.
//
// ufp_t value = (-1)^sign * mant * 2^(exp - 127 - FRAC). A binary32 number
// 1.f * 2^(e-127) enters with mant = {1,f} << (FRAC-23), exp = e. A product
// of two such significands is exact in MW bits and leaves the three lowest
// bits zero, so an alignment shift of up to three places (the only shifts
// after which the sum can cancel heavily) loses nothing; larger shifts keep
// the bits shifted out as a sticky bit in the LSB.
package mac_pkg;

  localparam int unsigned NREG = 32;            // floating-point registers
  localparam int unsigned RA_W = 5;
  localparam int unsigned FRAC = 49;            // fraction bits of mant
  localparam int unsigned MW   = 53;            // mant width: 4 integer bits

  typedef enum logic [1:0] { M_NOP, M_ADD, M_MUL, M_MAC } mop_e;

  // One MAC instruction: a = b + c | a = b * c | a = b + c * d
  typedef struct packed {
    logic            valid;
    mop_e            op;
    logic [RA_W-1:0] a;
    logic [RA_W-1:0] b;
    logic [RA_W-1:0] c;
    logic [RA_W-1:0] d;
  } minstr_t;

  typedef struct packed {
    logic               sign;
    logic signed [11:0] exp;
    logic [MW-1:0]      mant;
  } ufp_t;

  // Instruction with the value a unit has produced for it.
  typedef struct packed {
    minstr_t     ins;
    ufp_t        v;       // product (after MUL) or sum (after ADD)
  } mparcel_t;

  // Result leaving RND.
  typedef struct packed {
    logic            valid;
    logic [RA_W-1:0] a;
    logic [31:0]     value;
  } mres_t;

  // binary32 -> unrounded form (zero and subnormal inputs become zero)
  function automatic ufp_t unpack32(logic [31:0] x);
    ufp_t u;
    u.sign = x[31];
    u.exp  = {4'd0, x[30:23]};
    u.mant = (x[30:23] == 8'd0) ? '0 : (MW'({1'b1, x[22:0]}) << (FRAC - 23));
    return u;
  endfunction

endpackage
