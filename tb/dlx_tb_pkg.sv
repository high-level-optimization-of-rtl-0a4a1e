// Test programs for the DLX pipeline testbenches.
//
// build() fills prog[] with a directed prologue that reproduces the
// document's hazard examples (R3 <- R1+R2 then R4 <- R3+R2 needing a bypass;
// R1 <- MEM[8+R2] then R4 <- R1+R3 needing a stall and bypass; a counted
// loop with a taken backward branch; a direct jump with an instruction in
// its shadow), followed by pseudo-random instructions (forward branches
// and jumps only, so the program always ends) and a jump-to-self that
// marks the end. A small linear congruential generator makes the program
// the same in every checker that reads it.
package dlx_tb_pkg;
  import dlx_pkg::*;

  localparam int unsigned PROG_MAX = 256;
  logic [31:0] prog [PROG_MAX];
  int unsigned prog_len;
  int unsigned halt_pc;
  int unsigned lcg_state;

  // pcs of the directed hazard cases (consumer, producer pairs)
  localparam int unsigned PC_BYP_PROD = 6,  PC_BYP_CONS = 7;
  localparam int unsigned PC_LD       = 9,  PC_LD_USE   = 10;
  localparam int unsigned PC_BNEZ     = 14, PC_LOOP     = 12;
  localparam int unsigned PC_J        = 15, PC_J_TGT    = 17, PC_SHADOW = 16;

  function automatic int unsigned rnd(int unsigned n);
    lcg_state = lcg_state * 1103515245 + 12345;
    return (lcg_state >> 8) % n;
  endfunction

  function automatic logic [4:0] rreg();
    return 5'(1 + rnd(7));          // r1..r7: plenty of dependences
  endfunction

  function automatic void build(int unsigned seed, int unsigned n_random);
    int unsigned pc;
    lcg_state = seed;
    for (int i = 0; i < int'(PROG_MAX); i++) prog[i] = '0;
    prog[0]  = enc_i(OPC_ADDI, 5'd1, 5'd0, 16'd1);
    prog[1]  = enc_i(OPC_ADDI, 5'd2, 5'd0, 16'd4);
    prog[2]  = enc_i(OPC_ADDI, 5'd3, 5'd0, 16'd6);
    prog[3]  = enc_i(OPC_ADDI, 5'd4, 5'd0, 16'd3);
    prog[4]  = enc_i(OPC_ADDI, 5'd9, 5'd0, 16'd10);
    prog[5]  = enc_i(OPC_SW,   5'd9, 5'd0, 16'd12);        // MEM[12] = 10
    prog[6]  = enc_r(FN_ADD, 5'd3, 5'd1, 5'd2);            // R3 = 5
    prog[7]  = enc_r(FN_ADD, 5'd4, 5'd3, 5'd2);            // R4 = 9 (bypass)
    prog[8]  = enc_i(OPC_ADDI, 5'd3, 5'd0, 16'd6);         // R3 = 6 again
    prog[9]  = enc_i(OPC_LW,   5'd1, 5'd2, 16'd8);         // R1 = MEM[8+R2] = 10
    prog[10] = enc_r(FN_ADD, 5'd4, 5'd1, 5'd3);            // R4 = 16 (stall + bypass)
    prog[11] = enc_i(OPC_ADDI, 5'd5, 5'd0, 16'd3);         // loop counter
    prog[12] = enc_i(OPC_ADDI, 5'd6, 5'd6, 16'd2);         // loop body
    prog[13] = enc_i(OPC_ADDI, 5'd5, 5'd5, 16'hFFFF);      // counter - 1
    prog[14] = enc_i(OPC_BNEZ, 5'd0, 5'd5, 16'hFFFD);      // back to 12
    prog[15] = enc_j(26'd17);                              // direct jump
    prog[16] = enc_i(OPC_ADDI, 5'd7, 5'd0, 16'd99);        // in the jump's shadow
    pc = 17;
    for (int k = 0; k < int'(n_random); k++) begin
      int unsigned kind = rnd(20);
      logic [31:0] w;
      if (kind < 7) begin
        logic [5:0] fns [7] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_SLT, FN_MUL};
        w = enc_r(fns[rnd(7)], rreg(), rreg(), rreg());
      end else if (kind < 10) w = enc_i(OPC_ADDI, rreg(), rreg(), 16'(rnd(64)) - 16'd20);
      else if (kind < 13)     w = enc_i(OPC_LW, rreg(), (rnd(2) != 0) ? 5'd0 : rreg(), 16'(rnd(32)));
      else if (kind < 15)     w = enc_i(OPC_SW, rreg(), (rnd(2) != 0) ? 5'd0 : rreg(), 16'(rnd(32)));
      else if (kind < 17)     w = enc_i(OPC_BEQZ, 5'd0, rreg(), 16'(rnd(4)));
      else if (kind < 19)     w = enc_i(OPC_BNEZ, 5'd0, rreg(), 16'(rnd(4)));
      else                    w = enc_j(26'(pc + 1 + rnd(4)));
      prog[pc] = w;
      pc++;
    end
    // landing pad for forward branches/jumps, then the end marker
    for (int k = 0; k < 5; k++) begin
      prog[pc] = enc_i(OPC_ADDI, 5'd8, 5'd8, 16'd1);
      pc++;
    end
    halt_pc  = pc;
    prog[pc] = enc_j(26'(pc));
    prog_len = pc + 1;
  endfunction

endpackage
