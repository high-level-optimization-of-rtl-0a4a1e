// Unit testbench of dlx_detect: a stream of instructions passes the unit;
// it must stall (and turn the instruction into a bubble) exactly when the
// instruction it let through in the previous cycle is a load whose
// destination (not r0) this instruction reads through rs1 or rs2. Checked
// against a model with its own history, plus directed rs1 and rs2 cases.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #200000 with a failure.
// Document: the behaviour checked follows the load-use stall condition (Sec. 2.5.2).
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_detect_tb;
  import dlx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, stall;
  parcel_t in, out, hist;
  int checks = 0, failures = 0, n_stall = 0;

  dlx_detect dut (.clk, .rst, .in, .out, .stall);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic parcel_t mk(op_e op, int rd, int rs1, int rs2, bit u1, bit u2);
    parcel_t p = BUBBLE;
    p.valid = 1; p.op = op; p.rd = 5'(rd); p.rs1 = 5'(rs1); p.rs2 = 5'(rs2);
    p.use_rs1 = u1; p.use_rs2 = u2; p.wr_rd = (op == OP_LW || op == OP_ADD) && rd != 0;
    return p;
  endfunction

  task automatic step(parcel_t p, string what);
    bit exp_stall;
    in = p;
    #1;
    exp_stall = in.valid && hist.valid && hist.op == OP_LW && hist.wr_rd && hist.rd != 0 &&
                ((in.use_rs1 && in.rs1 == hist.rd) || (in.use_rs2 && in.rs2 == hist.rd));
    check(stall == exp_stall, $sformatf("%s: stall %0d expected %0d", what, stall, exp_stall));
    check(out.valid == (in.valid && !exp_stall), $sformatf("%s: out valid", what));
    if (stall) n_stall++;
    hist = exp_stall ? BUBBLE : in;
    @(negedge clk);
  endtask

  initial begin
    rst = 1; in = BUBBLE; hist = BUBBLE;
    @(negedge clk); rst = 0;
    step(mk(OP_LW, 5, 1, 0, 1, 0), "load r5");
    step(mk(OP_ADD, 6, 2, 5, 1, 1), "use r5 as rs2");
    step(mk(OP_ADD, 6, 2, 5, 1, 1), "retry after bubble");
    step(mk(OP_LW, 7, 1, 0, 1, 0), "load r7");
    step(mk(OP_ADD, 8, 7, 3, 1, 1), "use r7 as rs1");
    step(mk(OP_ADD, 8, 7, 3, 1, 1), "retry");
    step(mk(OP_LW, 0, 1, 0, 1, 0), "load r0");
    step(mk(OP_ADD, 8, 0, 0, 1, 1), "r0 never stalls");
    step(mk(OP_LW, 9, 1, 0, 1, 0), "load r9");
    step(mk(OP_ADD, 8, 3, 4, 1, 1), "independent");
    step(mk(OP_ADD, 8, 9, 4, 1, 1), "two cycles later: no stall");
    for (int n = 0; n < 2000; n++) begin
      parcel_t p;
      p = mk(($urandom % 2) ? OP_LW : OP_ADD, $urandom % 4, $urandom % 4, $urandom % 4,
             $urandom % 2, $urandom % 2);
      p.valid = ($urandom % 6) != 0;
      step(p, "random");
    end
    check(n_stall > 100, $sformatf("enough stalls seen (%0d)", n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
