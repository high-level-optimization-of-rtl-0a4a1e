// Test program and exact reference model for the MAC pipeline testbenches.
//
// build() makes one program (a list of instructions in program order) plus
// the initial register values, and runs the reference model over it, which
// gives the expected sequence of register writes and the final register
// file. The reference works on exact big integers: every binary32 operand
// is M * 2^k with a 24-bit integer M, so a sum or product of them is an
// exact integer times a power of two, which is then rounded once to
// nearest, ties to even. This is a different method from the hardware's
// sticky-bit datapath. Results are kept in a moderate exponent range by
// re-drawing instructions whose result would leave it, so no overflow or
// flush ever occurs in the random part.
//
// Interface: package, no ports.
// Document: the behaviour checked follows the MAC instructions A = B + C, B * C, B + C * D.
// Own choice: the stimulus, the reference model and the set of checks.
package mac_tb_pkg;
  import mac_pkg::*;

  localparam int MAXP = 1024;

  minstr_t     prog [MAXP];
  int          prog_len;
  logic [31:0] init_rf [NREG];
  logic [31:0] exp_val [MAXP];     // expected written value of prog[i]
  logic [31:0] final_rf [NREG];
  int          n_directed;

  int unsigned lcg_state;
  function automatic int unsigned rnd32();
    lcg_state = lcg_state * 1664525 + 1013904223;
    return lcg_state;
  endfunction
  function automatic int unsigned urand(int unsigned n);
    return (rnd32() >> 8) % n;
  endfunction

  // binary32 -> exact M * 2^k (M = 0 for zero)
  function automatic void split(logic [31:0] x, output logic [255:0] m, output int k);
    if (x[30:23] == 8'd0) begin
      m = '0; k = 0;
    end else begin
      m = 256'({1'b1, x[22:0]});
      k = int'(x[30:23]) - 150;
    end
  endfunction

  // round s * m * 2^k to binary32, nearest even; flush below, infinity above
  function automatic logic [31:0] round32(bit s, logic [255:0] m, int k);
    int p, e;
    logic [24:0] sig;
    bit g, st;
    if (m == '0) return {s, 31'd0};
    p = 0;
    for (int i = 0; i < 256; i++) if (m[i]) p = i;
    e = p + k + 127;
    if (p >= 23) begin
      sig = 25'(m >> (p - 23));
      g   = (p >= 24) ? m[p-24] : 1'b0;
      st  = (p >= 25) ? |(m & ((256'(1) << (p - 24)) - 1)) : 1'b0;
    end else begin
      sig = 25'(m << (23 - p));
      g = 0; st = 0;
    end
    if (g && (st || sig[0])) sig = sig + 1;
    if (sig[24]) begin sig = sig >> 1; e = e + 1; end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), sig[22:0]};
  endfunction

  // exact s1*m1*2^k1 + s2*m2*2^k2, then round; zero sum is -0 only if both are -
  function automatic logic [31:0] add_round(bit s1, logic [255:0] m1, int k1,
                                            bit s2, logic [255:0] m2, int k2);
    int kmin;
    logic [255:0] a1, a2, r;
    bit rs;
    if (m1 == '0 && m2 == '0) return {s1 & s2, 31'd0};
    if (m1 == '0) return round32(s2, m2, k2);
    if (m2 == '0) return round32(s1, m1, k1);
    kmin = (k1 < k2) ? k1 : k2;
    a1 = m1 << (k1 - kmin);
    a2 = m2 << (k2 - kmin);
    if (s1 == s2) begin
      r = a1 + a2; rs = s1;
    end else if (a1 >= a2) begin
      r = a1 - a2; rs = s1;
    end else begin
      r = a2 - a1; rs = s2;
    end
    if (r == '0) return {s1 & s2, 31'd0};
    return round32(rs, r, kmin);
  endfunction

  function automatic logic [31:0] ref_op(mop_e op, logic [31:0] b, logic [31:0] c, logic [31:0] d);
    logic [255:0] mb, mc, md;
    int kb, kc, kd;
    split(b, mb, kb);
    split(c, mc, kc);
    split(d, md, kd);
    case (op)
      M_ADD:   return add_round(b[31], mb, kb, c[31], mc, kc);
      M_MUL:   return (mb == '0 || mc == '0) ? {b[31] ^ c[31], 31'd0}
                                             : round32(b[31] ^ c[31], mb * mc, kb + kc);
      default: return add_round(b[31], mb, kb, c[31] ^ d[31],
                                (mc == '0 || md == '0) ? 256'd0 : mc * md, kc + kd);
    endcase
  endfunction

  function automatic minstr_t mk(mop_e op, int a, int b, int c, int d);
    minstr_t i;
    i.valid = 1'b1;
    i.op = op;
    i.a = RA_W'(a); i.b = RA_W'(b); i.c = RA_W'(c); i.d = RA_W'(d);
    return i;
  endfunction

  // Registers: r1..r12 random working set, r18, r20..r25 rounding constants,
  // r26..r31 directed results, r19 stays zero.
  function automatic void build(int unsigned seed, int n_random);
    logic [31:0] rf [NREG];
    minstr_t i;
    logic [31:0] v;
    int tries;
    lcg_state = seed;
    for (int r = 0; r < int'(NREG); r++) init_rf[r] = '0;
    for (int r = 1; r <= 12; r++)
      init_rf[r] = {1'(urand(2)), 8'(120 + urand(15)), 23'(rnd32() >> 9)};
    init_rf[20] = 32'h3F800000;   // 1.0
    init_rf[21] = 32'h33800000;   // 2^-24, half an ulp of 1.0
    init_rf[22] = 32'h3F800001;   // 1 + 2^-23
    init_rf[23] = 32'h33800080;   // 2^-24 * (1 + 2^-16), just over half an ulp
    init_rf[24] = 32'hBF800000;   // -1.0
    init_rf[25] = 32'h3F800000;   // 1.0
    init_rf[18] = 32'hBF7FFFFF;   // -(1 - 2^-24)
    prog_len = 0;
    // directed rounding and cancellation cases
    prog[prog_len++] = mk(M_ADD, 26, 20, 21, 0);   // 1 + 2^-24: tie, stays 1.0
    prog[prog_len++] = mk(M_ADD, 27, 22, 21, 0);   // tie, rounds up to even
    prog[prog_len++] = mk(M_ADD, 28, 20, 23, 0);   // just above tie, rounds up
    prog[prog_len++] = mk(M_MAC, 29, 20, 21, 25);  // 1 + 2^-24 * 1 through MUL
    prog[prog_len++] = mk(M_MAC, 30, 20, 24, 25);  // 1 + (-1 * 1) = +0
    prog[prog_len++] = mk(M_MAC, 31, 22, 21, 23);  // tiny product: sticky only
    prog[prog_len++] = mk(M_MUL, 26, 22, 22, 0);   // (1+2^-23)^2 rounds
    prog[prog_len++] = mk(M_MAC, 27, 24, 22, 25);  // -1 + (1+2^-23): exact 2^-23
    prog[prog_len++] = mk(M_MAC, 29, 22, 22, 18);  // near cancellation after a 1-place
                                                   // shift: exact 2^-24 + 2^-47
    n_directed = prog_len;
    for (int r = 0; r < int'(NREG); r++) rf[r] = init_rf[r];
    for (int n = 0; n < n_directed; n++) begin
      exp_val[n] = ref_op(prog[n].op, rf[prog[n].b], rf[prog[n].c], rf[prog[n].d]);
      rf[prog[n].a] = exp_val[n];
    end
    // random part: mostly the working set, dependences come from reuse
    for (int n = 0; n < n_random && prog_len < MAXP; n++) begin
      tries = 0;
      do begin
        i = mk(mop_e'(1 + urand(3)), 1 + urand(12), 1 + urand(12), 1 + urand(12), 1 + urand(12));
        v = ref_op(i.op, rf[i.b], rf[i.c], rf[i.d]);
        tries++;
      end while (tries < 50 && v[30:0] != '0 && (v[30:23] < 8'd100 || v[30:23] > 8'd154));
      if (tries >= 50) begin
        i = mk(M_ADD, int'(i.a), int'(i.b), 19, 0);     // copy: b + 0
        v = ref_op(i.op, rf[i.b], rf[19], rf[0]);
      end
      exp_val[prog_len] = v;
      prog[prog_len++] = i;
      rf[i.a] = v;
    end
    for (int r = 0; r < int'(NREG); r++) final_rf[r] = rf[r];
  endfunction

endpackage
