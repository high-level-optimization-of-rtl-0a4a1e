// DLX instruction decode (ID).
//
// Splits the instruction word of the incoming parcel into its fields,
// reads the source operands from the register file through two
// combinational read ports, and for a direct-addressed jump computes the
// new pc (the document's ID unit both needs register values and computes
// the pc). The register file is write-before-read, so the values read here
// already include the write done by the instruction in writeback.
//
// Field layout (usual DLX formats): R-type rs1[25:21] rs2[20:16] rd[15:11]
// fn[5:0]; I-type rs1[25:21] rd[20:16] imm[15:0] (for SW, [20:16] names the
// register whose value is stored); J-type target[25:0]. The jump target is
// the 26-bit field taken as an absolute word address, as the document calls
// ID's jumps direct-addressed. Unknown encodings decode as no-ops. Purely
// combinational.
module dlx_decode
  import dlx_pkg::*;
(
  input  parcel_t             in,
  output logic [RA_W-1:0]     rf_raddr1,
  output logic [RA_W-1:0]     rf_raddr2,
  input  logic [XLEN-1:0]     rf_rdata1,
  input  logic [XLEN-1:0]     rf_rdata2,
  output parcel_t             out
);
  logic [5:0] opc, fn;
  assign opc = in.instr[31:26];
  assign fn  = in.instr[5:0];

  always_comb begin
    out         = in;
    out.rs1     = in.instr[25:21];
    out.rs2     = in.instr[20:16];
    out.rd      = '0;
    out.imm     = {{(XLEN-16){in.instr[15]}}, in.instr[15:0]};
    out.op      = OP_NOP;
    out.use_rs1 = 1'b0;
    out.use_rs2 = 1'b0;
    out.wr_rd   = 1'b0;
    out.res_ready = 1'b0;
    out.redirect  = 1'b0;
    out.target    = '0;
    unique case (opc)
      OPC_RTYPE: begin
        out.rd = in.instr[15:11];
        unique case (fn)
          FN_ADD:  out.op = OP_ADD;
          FN_SUB:  out.op = OP_SUB;
          FN_AND:  out.op = OP_AND;
          FN_OR:   out.op = OP_OR;
          FN_XOR:  out.op = OP_XOR;
          FN_SLT:  out.op = OP_SLT;
          FN_MUL:  out.op = OP_MUL;
          default: out.op = OP_NOP;
        endcase
        if (out.op != OP_NOP) begin
          out.use_rs1 = 1'b1;
          out.use_rs2 = 1'b1;
          out.wr_rd   = 1'b1;
        end
      end
      OPC_ADDI: begin out.op = OP_ADDI; out.rd = in.instr[20:16]; out.use_rs1 = 1'b1; out.wr_rd = 1'b1; end
      OPC_LW:   begin out.op = OP_LW;   out.rd = in.instr[20:16]; out.use_rs1 = 1'b1; out.wr_rd = 1'b1; end
      OPC_SW:   begin out.op = OP_SW;   out.use_rs1 = 1'b1; out.use_rs2 = 1'b1; end
      OPC_BEQZ: begin out.op = OP_BEQZ; out.use_rs1 = 1'b1; end
      OPC_BNEZ: begin out.op = OP_BNEZ; out.use_rs1 = 1'b1; end
      OPC_J: begin
        out.op       = OP_J;
        out.redirect = in.valid;   // computes the pc
        out.target   = {{(XLEN-26){1'b0}}, in.instr[25:0]};
      end
      default: out.op = OP_NOP;
    endcase
    if (out.rd == '0) out.wr_rd = 1'b0;   // r0 is never written
    out.val1 = rf_rdata1;
    out.val2 = rf_rdata2;
  end

  assign rf_raddr1 = in.instr[25:21];
  assign rf_raddr2 = in.instr[20:16];

endmodule
