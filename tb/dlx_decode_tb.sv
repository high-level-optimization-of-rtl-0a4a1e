// Unit testbench of dlx_decode: every instruction kind is encoded with
// random fields and the decoded operation, register fields, use and write
// flags, immediate, read addresses, operand values and jump redirect are
// compared with the expected decoding.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows the units of Table 1.1.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_decode_tb;
  import dlx_pkg::*;
  parcel_t in, out;
  logic [RA_W-1:0] ra1, ra2;
  logic [XLEN-1:0] rd1, rd2;
  int checks = 0, failures = 0;

  dlx_decode dut (.in, .rf_raddr1(ra1), .rf_raddr2(ra2), .rf_rdata1(rd1), .rf_rdata2(rd2), .out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    op_e op, eop;
    logic [4:0] s1, s2, d;
    logic [15:0] imm;
    logic [25:0] jt;
    bit u1, u2, w;
    logic [4:0] erd;
    for (int n = 0; n < 2000; n++) begin
      s1 = 5'($urandom); s2 = 5'($urandom); d = 5'($urandom);
      imm = 16'($urandom); jt = 26'($urandom);
      in = BUBBLE;
      in.valid = 1;
      in.pc = XLEN'($urandom % 256);
      rd1 = $urandom; rd2 = $urandom;
      eop = op_e'(1 + $urandom % 13);
      u1 = 0; u2 = 0; w = 0; erd = 0;
      case (eop)
        OP_ADD:  begin in.instr = enc_r(FN_ADD, d, s1, s2); u1 = 1; u2 = 1; w = 1; erd = d; end
        OP_SUB:  begin in.instr = enc_r(FN_SUB, d, s1, s2); u1 = 1; u2 = 1; w = 1; erd = d; end
        OP_AND:  begin in.instr = enc_r(FN_AND, d, s1, s2); u1 = 1; u2 = 1; w = 1; erd = d; end
        OP_OR:   begin in.instr = enc_r(FN_OR,  d, s1, s2); u1 = 1; u2 = 1; w = 1; erd = d; end
        OP_XOR:  begin in.instr = enc_r(FN_XOR, d, s1, s2); u1 = 1; u2 = 1; w = 1; erd = d; end
        OP_SLT:  begin in.instr = enc_r(FN_SLT, d, s1, s2); u1 = 1; u2 = 1; w = 1; erd = d; end
        OP_MUL:  begin in.instr = enc_r(FN_MUL, d, s1, s2); u1 = 1; u2 = 1; w = 1; erd = d; end
        OP_ADDI: begin in.instr = enc_i(OPC_ADDI, d, s1, imm); u1 = 1; w = 1; erd = d; end
        OP_LW:   begin in.instr = enc_i(OPC_LW, d, s1, imm); u1 = 1; w = 1; erd = d; end
        OP_SW:   begin in.instr = enc_i(OPC_SW, d, s1, imm); u1 = 1; u2 = 1; end
        OP_BEQZ: begin in.instr = enc_i(OPC_BEQZ, d, s1, imm); u1 = 1; end
        OP_BNEZ: begin in.instr = enc_i(OPC_BNEZ, d, s1, imm); u1 = 1; end
        default: begin in.instr = enc_j(jt); end
      endcase
      if (erd == 0) w = 0;
      #1;
      op = out.op;
      check(op == eop, $sformatf("op %s decoded as %s", eop.name(), op.name()));
      check(ra1 == s1 && ra2 == (eop inside {OP_ADDI, OP_LW, OP_SW, OP_BEQZ, OP_BNEZ} ? d : s2)
            || eop == OP_J, $sformatf("%s read addresses %0d %0d", eop.name(), ra1, ra2));
      if (u1) check(out.rs1 == s1 && out.val1 == rd1, $sformatf("%s rs1/val1", eop.name()));
      if (u2) check(out.rs2 == (eop == OP_SW ? d : s2) && out.val2 == rd2, $sformatf("%s rs2/val2", eop.name()));
      check(out.use_rs1 == u1 && out.use_rs2 == u2, $sformatf("%s use flags %0d%0d", eop.name(), out.use_rs1, out.use_rs2));
      check(out.wr_rd == w && (!w || out.rd == erd), $sformatf("%s rd=%0d wr=%0d expected %0d/%0d", eop.name(), out.rd, out.wr_rd, erd, w));
      if (eop inside {OP_ADDI, OP_LW, OP_SW, OP_BEQZ, OP_BNEZ})
        check(out.imm == {{16{imm[15]}}, imm}, $sformatf("%s immediate", eop.name()));
      check(out.redirect == (eop == OP_J) && (eop != OP_J || out.target == XLEN'(jt)),
            $sformatf("%s redirect %0d target %h", eop.name(), out.redirect, out.target));
      check(out.pc == in.pc && out.valid, "pc and valid pass through");
    end
    // a bubble holding a jump word redirects nothing
    in = BUBBLE; in.instr = enc_j(26'd5);
    #1 check(!out.redirect, "bubble does not redirect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
