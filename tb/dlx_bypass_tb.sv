// Unit testbench of dlx_bypass: random instruction pairs (the one in ID and
// the source further down) are compared with the forwarding rule: an
// operand the instruction uses is replaced by the source's result when the
// source is valid, writes that register (not r0) and has its result ready.
// Directed pairs hit rs1 alone, rs2 alone and both.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows the forwarding rule.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_bypass_tb;
  import dlx_pkg::*;
  parcel_t cur, src, out;
  logic hit;
  int checks = 0, failures = 0;

  dlx_bypass dut (.cur, .src, .out, .hit);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic one();
    bit ok_src, m1, m2;
    ok_src = cur.valid && src.valid && src.wr_rd && src.res_ready && src.rd != 0;
    m1 = ok_src && cur.use_rs1 && cur.rs1 == src.rd;
    m2 = ok_src && cur.use_rs2 && cur.rs2 == src.rd;
    #1;
    check(out.val1 == (m1 ? src.result : cur.val1), $sformatf("val1 (match %0d)", m1));
    check(out.val2 == (m2 ? src.result : cur.val2), $sformatf("val2 (match %0d)", m2));
    check(hit == (m1 || m2), "hit");
    check(out.rs1 == cur.rs1 && out.op == cur.op && out.valid == cur.valid, "other fields pass");
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      cur = {8{$urandom}}; src = {8{$urandom}};
      cur.valid = ($urandom % 8) != 0; src.valid = ($urandom % 8) != 0;
      cur.rs1 = 5'($urandom % 4); cur.rs2 = 5'($urandom % 4); src.rd = 5'($urandom % 4);
      case (n % 3)
        0: begin cur.rs1 = src.rd; cur.rs2 = src.rd + 1; end
        1: begin cur.rs2 = src.rd; cur.rs1 = src.rd + 1; end
        default: ;
      endcase
      one();
    end
    // directed: forward into rs2 only
    cur = BUBBLE; src = BUBBLE;
    cur.valid = 1; cur.use_rs1 = 1; cur.use_rs2 = 1; cur.rs1 = 3; cur.rs2 = 7; cur.val2 = 1;
    src.valid = 1; src.wr_rd = 1; src.res_ready = 1; src.rd = 7; src.result = 99;
    #1 check(out.val2 == 99 && hit, "directed rs2 forward");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
