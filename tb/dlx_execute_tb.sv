// Unit testbench of dlx_execute: random operands for every operation are
// compared with a reference for the result, the result-ready flag, the
// effective address of loads and stores, and the redirect and target of
// branches (taken and not taken); a bubble never redirects.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows the units of Table 1.1.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_execute_tb;
  import dlx_pkg::*;
  parcel_t in, out;
  int checks = 0, failures = 0;

  dlx_execute dut (.in, .out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [XLEN-1:0] a, b, imm, exp_r, exp_t;
    bit exp_rdy, exp_redir, has_r;
    op_e op;
    for (int n = 0; n < 4000; n++) begin
      op = op_e'(1 + $urandom % 13);
      a = ($urandom % 3 == 0) ? '0 : $urandom;
      b = $urandom;
      if (n % 7 == 0) b = a;
      imm = XLEN'($signed(16'($urandom)));
      in = BUBBLE;
      in.valid = ($urandom % 8) != 0;
      in.op = op; in.val1 = a; in.val2 = b; in.imm = imm;
      in.pc = XLEN'($urandom % 256);
      exp_r = '0; has_r = 1; exp_rdy = 0; exp_redir = 0; exp_t = in.pc + 1 + imm;
      case (op)
        OP_ADD:  begin exp_r = a + b; exp_rdy = 1; end
        OP_SUB:  begin exp_r = a - b; exp_rdy = 1; end
        OP_AND:  begin exp_r = a & b; exp_rdy = 1; end
        OP_OR:   begin exp_r = a | b; exp_rdy = 1; end
        OP_XOR:  begin exp_r = a ^ b; exp_rdy = 1; end
        OP_SLT:  begin exp_r = XLEN'($signed(a) < $signed(b)); exp_rdy = 1; end
        OP_MUL:  begin exp_r = a * b; exp_rdy = 1; end
        OP_ADDI: begin exp_r = a + imm; exp_rdy = 1; end
        OP_LW, OP_SW: exp_r = a + imm;
        OP_BEQZ: begin exp_redir = in.valid && a == 0; has_r = 0; end
        OP_BNEZ: begin exp_redir = in.valid && a != 0; has_r = 0; end
        default: has_r = 0;
      endcase
      #1;
      if (has_r) check(out.result == exp_r, $sformatf("%s %h %h imm %h: result %h expected %h", op.name(), a, b, imm, out.result, exp_r));
      check(out.res_ready == exp_rdy, $sformatf("%s res_ready", op.name()));
      if (op inside {OP_BEQZ, OP_BNEZ}) begin
        check(out.redirect == exp_redir, $sformatf("%s a=%h redirect %0d", op.name(), a, out.redirect));
        if (exp_redir) check(out.target == exp_t, $sformatf("%s target %h expected %h", op.name(), out.target, exp_t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
