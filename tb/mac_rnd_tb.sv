// Unit testbench of mac_rnd: unrounded values with random significands
// (random leading-one positions) and exponents are rounded and compared
// with the exact reference rounding: nearest, ties to even, carry out of
// the significand, flush to zero below the normal range and infinity
// above it. Directed exact ties check both tie directions.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows a RND unit.
// Own choice: the stimulus, the reference model and the set of checks.
module mac_rnd_tb;
  import mac_pkg::*;
  import mac_tb_pkg::*;
  ufp_t u;
  logic [31:0] r;
  int checks = 0, failures = 0;

  mac_rnd dut (.u, .r);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic one(bit sg, int e, logic [MW-1:0] m);
    logic [31:0] want;
    u.sign = sg; u.exp = 12'(e); u.mant = m;
    #1;
    want = round32(sg, 256'(m), e - 127 - int'(FRAC));
    check(r == want, $sformatf("sign %0d exp %0d mant %h: %h expected %h", sg, e, m, r, want));
  endtask

  initial begin
    logic [MW-1:0] m;
    for (int n = 0; n < 6000; n++) begin
      m = {$urandom, $urandom};
      m = m >> ($urandom % 30);
      if (n % 5 == 0) m[MW-25:0] = 0;            // exact values
      if (n % 7 == 0) m = m | ((MW'(1) << (MW - 27)) - 1);   // trailing ones: carries
      one($urandom % 2, (n % 50 == 0) ? int'($urandom % 300) : 60 + int'($urandom % 140), m);
    end
    // ties with leading one at bit 48 (value in [1,2)): round bit 24 below
    one(0, 127, (MW'(1) << 49) | (MW'(1) << 25));                  // 1 + half ulp: stays
    one(0, 127, (MW'(1) << 49) | (MW'(1) << 26) | (MW'(1) << 25)); // odd + half ulp: up
    one(1, 127, (MW'(1) << 49) | (MW'(1) << 25) | MW'(1));         // above tie: up
    one(0, 127, {MW{1'b1}} >> (MW - 50));                          // all ones: carry out
    one(0, 10, 0);                                                  // zero
    one(0, 1, MW'(1) << 49);                                        // smallest normal
    one(0, 0, MW'(1) << 49);                                        // flushes
    one(0, 254, {MW{1'b1}} >> (MW - 50));                           // rounds up to infinity
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
