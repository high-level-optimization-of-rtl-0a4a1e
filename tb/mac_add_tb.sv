// Unit testbench of mac_add: sums of two register operands and of a
// register operand and an exact product, with random signs and exponent
// gaps from 0 to beyond the significand width, plus directed near-tie,
// sticky and cancellation cases. The adder's output is unrounded, so the
// check is that rounding it exactly gives the correctly rounded sum, and
// that an exact zero has the right sign.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows an ADD unit taking a register or the unrounded product.
// Own choice: the stimulus, the reference model and the set of checks.
module mac_add_tb;
  import mac_pkg::*;
  import mac_tb_pkg::*;
  ufp_t x, y, s;
  int checks = 0, failures = 0;

  mac_add dut (.x, .y, .s);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic ufp_t prod(logic [31:0] a, logic [31:0] b);
    ufp_t u;
    u.sign = a[31] ^ b[31];
    u.exp  = 12'(int'(a[30:23]) + int'(b[30:23]) - 127);
    u.mant = MW'({1'b1, a[22:0]} * {1'b1, b[22:0]}) << (FRAC - 46);
    return u;
  endfunction

  // one case: value b + c (c_is_prod: c = c1 * c2)
  task automatic one(logic [31:0] b, logic [31:0] c1, logic [31:0] c2, bit c_is_prod);
    logic [31:0] want, got;
    x = unpack32(b);
    y = c_is_prod ? prod(c1, c2) : unpack32(c1);
    #1;
    got  = round32(s.sign, 256'(s.mant), int'(s.exp) - 127 - int'(FRAC));
    want = c_is_prod ? ref_op(M_MAC, b, c1, c2) : ref_op(M_ADD, b, c1, 0);
    check(got == want, $sformatf("%h + %s%h%s%h: rounds to %h, expected %h", b,
          c_is_prod ? "" : "(", c1, c_is_prod ? "*" : ")", c2, got, want));
  endtask

  function automatic logic [31:0] rf(int ebase, int espan);
    return {1'($urandom), 8'(ebase + $urandom % espan), 23'($urandom)};
  endfunction

  initial begin
    for (int n = 0; n < 6000; n++) begin
      case (n % 4)
        0: one(rf(120, 60), rf(120, 60), 0, 0);
        1: one(rf(125, 6), rf(125, 6), 0, 0);           // close exponents: cancellation
        2: one(rf(100, 56), rf(110, 20), rf(110, 20), 1);
        default: one(rf(126, 3), rf(126, 3), rf(126, 3), 1);
      endcase
    end
    one(32'h3F800000, 32'h33800000, 0, 0);              // exact tie
    one(32'h3F800001, 32'h33800000, 0, 0);              // tie to even, up
    one(32'h3F800000, 32'h33800080, 0, 0);              // just above tie
    one(32'h3F800000, 32'h33800000, 32'h3F800001, 1);   // tie plus tiny product bits
    one(32'h3F800000, 32'hB3800000, 32'h3F800001, 1);   // just below 1
    one(32'h3F800001, 32'h3F800001, 32'hBF7FFFFF, 1);   // heavy cancellation, 1-place shift
    one(32'h3F800000, 32'hBF800000, 32'h3F800000, 1);   // exact zero
    one(32'hBF800000, 32'hBF800000, 0, 0);              // -1 + -1
    // product exactly on a tie, broken only by an addend far below it
    one(32'hA1800000, 32'h3F800001, 32'h3FC00000, 1);   // -2^-60 + tie: rounds down
    one(32'h21800000, 32'h3F800001, 32'h3FC00000, 1);   // +2^-60 + tie: rounds up
    one(32'hA1800000, 32'h3F800003, 32'h3FC00000, 1);   // odd neighbour
    for (int n = 0; n < 200; n++)                       // random ties, random tiny addends
      one({1'($urandom), 8'(40 + $urandom % 40), 23'($urandom)},
          {1'($urandom), 8'(127), 22'($urandom), 1'b1}, 32'h3FC00000, 1);
    x = unpack32(32'h80000000); y = unpack32(32'h80000000);
    #1 check(s.sign && s.mant == 0, "-0 + -0 = -0");
    x = unpack32(32'h80000000); y = unpack32(32'h00000000);
    #1 check(!s.sign && s.mant == 0, "-0 + +0 = +0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
