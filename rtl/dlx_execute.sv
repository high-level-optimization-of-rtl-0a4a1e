// DLX execute unit (EX).
//
// Performs the ALU operation of the parcel on its (already forwarded)
// operand values, computes the effective address of loads and stores, and
// resolves conditional branches: BEQZ/BNEZ test rs1 against zero and, when
// taken, set redirect with the pc-relative target pc+1+imm (the document
// places relative branch target calculation in EX). A jump arrives with its
// redirect already set by ID and passes through unchanged. ALU results are
// final here (res_ready); a load's result is not ready until MEM1.
// Branches are predicted not taken, so redirect marks a misprediction.
// Multiplication keeps the low 32 bits. Purely combinational.
module dlx_execute
  import dlx_pkg::*;
(
  input  parcel_t in,
  output parcel_t out
);
  logic signed [XLEN-1:0] a, b;
  assign a = in.val1;
  assign b = in.val2;

  always_comb begin
    out = in;
    out.res_ready = 1'b0;
    unique case (in.op)
      OP_ADD:  begin out.result = in.val1 + in.val2;            out.res_ready = 1'b1; end
      OP_SUB:  begin out.result = in.val1 - in.val2;            out.res_ready = 1'b1; end
      OP_AND:  begin out.result = in.val1 & in.val2;            out.res_ready = 1'b1; end
      OP_OR:   begin out.result = in.val1 | in.val2;            out.res_ready = 1'b1; end
      OP_XOR:  begin out.result = in.val1 ^ in.val2;            out.res_ready = 1'b1; end
      OP_SLT:  begin out.result = XLEN'(a < b);                 out.res_ready = 1'b1; end
      OP_MUL:  begin out.result = in.val1 * in.val2;            out.res_ready = 1'b1; end
      OP_ADDI: begin out.result = in.val1 + in.imm;             out.res_ready = 1'b1; end
      OP_LW, OP_SW: out.result = in.val1 + in.imm;              // effective address
      OP_BEQZ: begin
        out.redirect = in.valid && (in.val1 == '0);
        out.target   = in.pc + XLEN'(1) + in.imm;
      end
      OP_BNEZ: begin
        out.redirect = in.valid && (in.val1 != '0);
        out.target   = in.pc + XLEN'(1) + in.imm;
      end
      default: ;
    endcase
    if (!in.valid) out.redirect = 1'b0;
  end

endmodule
