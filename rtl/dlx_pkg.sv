// Shared types and constants of the DLX universal pipeline.
//
// An instruction travels down the pipeline as a "parcel": the instruction
// word and its pc, the decoded fields, the source operand values as they
// stand at that point, the result once some unit has computed it, and the
// redirect (new pc) of a jump or taken branch. Functional units and hazard
// units all take parcels in and hand parcels on; a bubble is a parcel whose
// valid bit is clear.
//
// The instruction set is a small DLX subset. The field layout follows the
// usual DLX formats (6-bit opcode, 5-bit register fields, 16-bit immediate,
// 26-bit jump field); the exact opcode values, the word-addressed pc and
// the direct (absolute) jump target are this design's choices.
package dlx_pkg;

  localparam int unsigned XLEN = 32;   // data and instruction width
  localparam int unsigned NREG = 32;   // architectural registers, r0 reads as zero
  localparam int unsigned RA_W = 5;    // register address width

  // Primary opcodes, instruction bits [31:26]
  localparam logic [5:0] OPC_RTYPE = 6'h00;
  localparam logic [5:0] OPC_J     = 6'h02;
  localparam logic [5:0] OPC_BEQZ  = 6'h04;
  localparam logic [5:0] OPC_BNEZ  = 6'h05;
  localparam logic [5:0] OPC_ADDI  = 6'h08;
  localparam logic [5:0] OPC_LW    = 6'h23;
  localparam logic [5:0] OPC_SW    = 6'h2B;

  // R-type function codes, instruction bits [5:0]
  localparam logic [5:0] FN_MUL = 6'h0E;
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_XOR = 6'h26;
  localparam logic [5:0] FN_SLT = 6'h2A;

  typedef enum logic [3:0] {
    OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_MUL,
    OP_ADDI, OP_LW, OP_SW, OP_BEQZ, OP_BNEZ, OP_J
  } op_e;

  typedef struct packed {
    logic              valid;     // 0 = bubble
    logic [XLEN-1:0]   pc;        // word address of the instruction
    logic [XLEN-1:0]   instr;     // raw instruction word
    op_e               op;
    logic [RA_W-1:0]   rs1;
    logic [RA_W-1:0]   rs2;       // second source (R-type) or store data (SW)
    logic [RA_W-1:0]   rd;
    logic              use_rs1;
    logic              use_rs2;
    logic              wr_rd;     // writes rd (regVal)
    logic [XLEN-1:0]   imm;       // sign-extended immediate
    logic [XLEN-1:0]   val1;      // value of rs1
    logic [XLEN-1:0]   val2;      // value of rs2
    logic [XLEN-1:0]   result;    // ALU result, effective address, or loaded data
    logic              res_ready; // result holds the final value of rd
    logic              redirect;  // jump or taken branch: fetch must go to target
    logic [XLEN-1:0]   target;
  } parcel_t;

  // What the pc selector tells the fetch unit for the current cycle.
  typedef struct packed {
    logic            redirect;  // fetch from target this cycle
    logic [XLEN-1:0] target;
  } pcsel_t;

  localparam parcel_t BUBBLE = '0;

  // Instruction encoders, used by testbenches and handy for writing programs.
  function automatic logic [XLEN-1:0] enc_r(logic [5:0] fn, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return {OPC_RTYPE, rs1, rs2, rd, 5'd0, fn};
  endfunction
  function automatic logic [XLEN-1:0] enc_i(logic [5:0] opc, logic [4:0] rd, logic [4:0] rs1, logic [15:0] imm);
    return {opc, rs1, rd, imm};
  endfunction
  function automatic logic [XLEN-1:0] enc_j(logic [25:0] target);
    return {OPC_J, target};
  endfunction

endpackage
