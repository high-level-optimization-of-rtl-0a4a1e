// Unit testbench of mac_mul: random binary32 operands (including zeros and
// both signs) are multiplied and the unrounded product is checked exactly:
// sign, exponent and significand, and, through the exact reference
// rounding, that it rounds to the correctly rounded product.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows a MUL unit feeding ADD and RND.
// Own choice: the stimulus, the reference model and the set of checks.
module mac_mul_tb;
  import mac_pkg::*;
  import mac_tb_pkg::*;
  logic [31:0] x, y;
  ufp_t p;
  int checks = 0, failures = 0;

  mac_mul dut (.x, .y, .p);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] rand_f();
    if ($urandom % 10 == 0) return {1'($urandom), 31'd0};
    return {1'($urandom), 8'(100 + $urandom % 56), 23'($urandom)};
  endfunction

  initial begin
    logic [255:0] m;
    logic [47:0] em;
    for (int n = 0; n < 5000; n++) begin
      x = rand_f(); y = rand_f();
      #1;
      check(p.sign == (x[31] ^ y[31]), $sformatf("sign %h*%h", x, y));
      if (x[30:0] == 0 || y[30:0] == 0) begin
        check(p.mant == 0, "zero operand gives zero");
      end else begin
        em = {1'b1, x[22:0]} * {1'b1, y[22:0]};
        check(p.exp == 12'(int'(x[30:23]) + int'(y[30:23]) - 127), $sformatf("exponent %h*%h", x, y));
        check(p.mant == (MW'(em) << (FRAC - 46)), $sformatf("significand %h*%h", x, y));
        m = 256'(p.mant);
        check(round32(p.sign, m, int'(p.exp) - 127 - int'(FRAC)) == ref_op(M_MUL, x, y, 0),
              $sformatf("rounds correctly %h*%h", x, y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
