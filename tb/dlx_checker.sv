// Scoreboard for one DLX pipeline configuration.
//
// Drives reset and loads the test program from dlx_tb_pkg through the
// instruction memory port, then follows the retire port. An instruction
// set model executes the same program one instruction at a time; every
// retired instruction must have the pc the model expects next and, if it
// writes a register, the value the model computes. When the end marker
// retires, all registers and the first 64 data memory words are compared
// through the debug ports. It also checks the cycle cost of the directed
// hazard cases against the configuration: a dependent instruction right
// after a load retires 1 + STALLPEN cycles after it, a taken branch or
// jump is followed by its target 1 + IF1ID + IDEX cycles later, and a
// bypassed dependent ALU instruction follows its producer in the next
// cycle. Hazard events seen on the DUT's event outputs are counted.
//
// Interface: module instantiated by the testbenches.
// Document: the behaviour checked follows the placement rules and the cycle costs they imply.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_checker
  import dlx_pkg::*;
  import dlx_tb_pkg::*;
#(
  parameter bit IF1ID  = 1'b1,
  parameter bit IDEX   = 1'b1,
  parameter bit EXMEM1 = 1'b1
) (
  input  logic            clk,
  input  logic            start,
  output logic            rst,
  output logic            imem_we,
  output logic [XLEN-1:0] imem_waddr,
  output logic [XLEN-1:0] imem_wdata,
  input  parcel_t         retire,
  output logic [RA_W-1:0] rf_dbg_addr,
  input  logic [XLEN-1:0] rf_dbg_data,
  output logic [XLEN-1:0] dmem_dbg_addr,
  input  logic [XLEN-1:0] dmem_dbg_data,
  input  logic            ev_stall,
  input  logic            ev_kill,
  input  logic            ev_byp_ex,
  input  logic            ev_byp_mem,
  output logic            done,
  output int              checks,
  output int              failures,
  output int              n_stall,
  output int              n_kill,
  output int              n_byp_ex,
  output int              n_byp_mem,
  output int              n_retired,
  output int              run_cycles
);
  localparam int STALLPEN = (IDEX && EXMEM1) ? 1 : 0;
  localparam int KILLPEN  = int'(IF1ID) + int'(IDEX);

  // instruction set model state
  logic [31:0] m_rf  [32];
  logic [31:0] m_mem [256];
  logic [31:0] m_pc;

  int  last_cycle, cyc;
  int  prev_pc;
  bit  running, halted;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL [%0d%0d%0d] %s", IF1ID, IDEX, EXMEM1, what);
    end
  endtask

  function automatic logic [31:0] sext16(logic [15:0] x);
    return {{16{x[15]}}, x};
  endfunction

  // execute one instruction in the model; returns whether it writes rd and the value
  task automatic model_step(output bit wr, output logic [4:0] rd, output logic [31:0] val);
    logic [31:0] w, a, b, imm, npc;
    logic [5:0] opc, fn;
    w   = prog[m_pc[7:0]];
    opc = w[31:26]; fn = w[5:0];
    a   = m_rf[w[25:21]]; b = m_rf[w[20:16]];
    imm = sext16(w[15:0]);
    npc = m_pc + 1;
    wr = 0; rd = 0; val = 0;
    case (opc)
      OPC_RTYPE: begin
        rd = w[15:11]; wr = 1;
        case (fn)
          FN_ADD: val = a + b;
          FN_SUB: val = a - b;
          FN_AND: val = a & b;
          FN_OR:  val = a | b;
          FN_XOR: val = a ^ b;
          FN_SLT: val = ($signed(a) < $signed(b)) ? 1 : 0;
          FN_MUL: val = a * b;
          default: wr = 0;
        endcase
      end
      OPC_ADDI: begin rd = w[20:16]; wr = 1; val = a + imm; end
      OPC_LW:   begin rd = w[20:16]; wr = 1; val = m_mem[8'(a + imm)]; end
      OPC_SW:   m_mem[8'(a + imm)] = b;
      OPC_BEQZ: if (a == 0) npc = m_pc + 1 + imm;
      OPC_BNEZ: if (a != 0) npc = m_pc + 1 + imm;
      OPC_J:    npc = {6'd0, w[25:0]};
      default: ;
    endcase
    if (rd == 0) wr = 0;
    if (wr) m_rf[rd] = val;
    m_pc = npc;
  endtask

  initial begin
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0; done = 0;
    checks = 0; failures = 0; n_stall = 0; n_kill = 0; n_byp_ex = 0; n_byp_mem = 0;
    n_retired = 0; run_cycles = 0; running = 0; halted = 0;
    rf_dbg_addr = 0; dmem_dbg_addr = 0; prev_pc = -1; last_cycle = 0; cyc = 0;
    wait (start);
    foreach (m_rf[i])  m_rf[i] = 0;
    foreach (m_mem[i]) m_mem[i] = 0;
    m_pc = 0;
    @(negedge clk);
    for (int i = 0; i < int'(prog_len); i++) begin
      imem_we = 1; imem_waddr = i; imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    rst = 0;
    running = 1;
    wait (halted);
    running = 0;
    // final state through the debug ports
    for (int r = 0; r < 32; r++) begin
      rf_dbg_addr = 5'(r);
      #1;
      check(rf_dbg_data == m_rf[r], $sformatf("final r%0d = %0h, model %0h", r, rf_dbg_data, m_rf[r]));
    end
    for (int a = 0; a < 64; a++) begin
      dmem_dbg_addr = a;
      #1;
      check(dmem_dbg_data == m_mem[a], $sformatf("final mem[%0d] = %0h, model %0h", a, dmem_dbg_data, m_mem[a]));
    end
    done = 1;
  end

  always @(posedge clk) begin
    if (running && !halted) begin
      cyc++;
      if (ev_stall)   n_stall++;
      if (ev_kill)    n_kill++;
      if (ev_byp_ex)  n_byp_ex++;
      if (ev_byp_mem) n_byp_mem++;
      if (retire.valid) begin
        bit wr; logic [4:0] rd; logic [31:0] val; logic [31:0] exp_pc;
        int gap;
        exp_pc = m_pc;
        gap = cyc - last_cycle;
        model_step(wr, rd, val);
        check(retire.pc == exp_pc, $sformatf("retired pc %0d, model expects %0d", retire.pc, exp_pc));
        check(retire.wr_rd == wr, $sformatf("pc %0d writes-register flag", exp_pc));
        if (wr) check(retire.rd == rd && retire.result == val,
                      $sformatf("pc %0d wrote r%0d=%0h, model r%0d=%0h", exp_pc, retire.rd, retire.result, rd, val));
        check(retire.pc != PC_SHADOW, "instruction in a jump's shadow retired");
        if (prev_pc == int'(PC_BYP_PROD) && exp_pc == PC_BYP_CONS)
          check(gap == 1, $sformatf("bypassed pair gap %0d", gap));
        if (prev_pc == int'(PC_LD) && exp_pc == PC_LD_USE)
          check(gap == 1 + STALLPEN, $sformatf("load-use gap %0d, expected %0d", gap, 1 + STALLPEN));
        if (prev_pc == int'(PC_BNEZ) && exp_pc == PC_LOOP)
          check(gap == 1 + KILLPEN, $sformatf("taken branch gap %0d, expected %0d", gap, 1 + KILLPEN));
        if (prev_pc == int'(PC_J) && exp_pc == PC_J_TGT)
          check(gap == 1 + KILLPEN, $sformatf("jump gap %0d, expected %0d", gap, 1 + KILLPEN));
        if (exp_pc == PC_LD_USE) check(val == 32'd16, "load-use example result R4 = 16");
        if (exp_pc == PC_BYP_CONS) check(val == 32'd9, "bypass example result R4 = 9");
        prev_pc    = int'(exp_pc);
        last_cycle = cyc;
        n_retired++;
        if (exp_pc == halt_pc) begin
          halted     = 1;
          run_cycles = cyc;
        end
      end
    end
  end

endmodule
