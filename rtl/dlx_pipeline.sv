// DLX universal pipeline.
//
// The DLX datapath IF -> ID -> EX -> MEM -> WB, where three of the four
// pipeline registers are optional (IF1ID, IDEX, EXMEM1) and the fourth,
// MEM1WB, is always present because the register file is write-before-read.
// Each parameter is one of the Boolean presence variables; its eight
// settings give the eight DLX pipeline configurations, from unpipelined
// (all 0) to fully pipelined (all 1, the default).
//
// The hazard hardware each configuration needs follows from the data
// dependencies of the units (ID needs register values and computes the pc
// of jumps; EX computes register values and the pc of branches; MEM1
// computes register values of loads; WB writes them) and five placement
// rules:
//   Rules 1-3 (bypass): EXBypID, from the EX output, iff IDEX and EXMEM1;
//     MEM1BypID, from the MEM1 output, iff IDEX or EXMEM1 (when only EXMEM1
//     is present this is the delayed forward that avoids a combinational
//     loop through EX). The MEM1 bypass comes first, the EX bypass second.
//   Rule 4 (stall): when MEM1 is two stages after ID (IDEX and EXMEM1), a
//     detect unit with a history register at the end of ID's stage, a
//     stall unit in front of IF1ID (when that register exists) and a stall
//     input to the pc selector. Stalls last one cycle.
//   Rule 5 (kill): when EX is in a later stage than IF, a kill unit in
//     front of each present register between IF and EX, fed from the end
//     of EX's stage (the EX output, or the MEM1 output when EXMEM1 is
//     absent and MEM1 shares EX's stage), and a one-register delay from
//     that point to the pc selector. Branches are predicted not taken.
// Within ID's stage the order is bypasses, kill, detect, as the document
// places them. The pc selector also receives the register that follows EX
// (EXMEM1, or MEM1WB when EXMEM1 is absent), the document's distinguished
// pc signal.
//
// Choices of this design: direct jumps, whose target ID computes, take the
// redirect path from EX together with branches (the document's drawings of
// the configurations show kill units fed only from EX's stage); the detect unit
// sits at the end of ID's stage in every configuration and looks at the
// next stage through its history register.
//
// Timing (fully pipelined): one instruction per cycle; a load followed by a
// dependent instruction costs one bubble; a taken branch or jump costs two
// killed instructions. An instruction retires (leaves MEM1WB) 4 cycles after
// it is fetched, fewer when registers are absent.
module dlx_pipeline
  import dlx_pkg::*;
#(
  parameter bit          IF1ID      = 1'b1,
  parameter bit          IDEX       = 1'b1,
  parameter bit          EXMEM1     = 1'b1,
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic            clk,
  input  logic            rst,
  // instruction memory load port
  input  logic            imem_we,
  input  logic [XLEN-1:0] imem_waddr,
  input  logic [XLEN-1:0] imem_wdata,
  // retired instruction: the parcel in MEM1WB, being written back
  output parcel_t         retire,
  // debug read ports
  input  logic [RA_W-1:0] rf_dbg_addr,
  output logic [XLEN-1:0] rf_dbg_data,
  input  logic [XLEN-1:0] dmem_dbg_addr,
  output logic [XLEN-1:0] dmem_dbg_data,
  // hazard events, one pulse per cycle in which they act
  output logic            ev_stall,
  output logic            ev_kill,
  output logic            ev_byp_ex,
  output logic            ev_byp_mem
);
  // Hazard hardware present in this configuration (rules 1-5)
  localparam bit HAS_BYP_EX  = IDEX && EXMEM1;
  localparam bit HAS_BYP_MEM = IDEX || EXMEM1;
  localparam bit HAS_STALL   = IDEX && EXMEM1;
  localparam bit HAS_KILL_IF = IF1ID;   // kill unit in front of IF1ID
  localparam bit HAS_KILL_ID = IDEX;    // kill unit in front of IDEX
  localparam bit HAS_KILL    = HAS_KILL_IF || HAS_KILL_ID;

  parcel_t if_out, if_k, if_s, if1id_q;
  parcel_t id_out, id_b1, id_b2, id_k, id_det, idex_q;
  parcel_t ex_out, exmem_q, mem_out, mem1wb_q, killdel_q, dist_q;
  parcel_t ex_stage;   // end of the stage EX belongs to: the kill source
  pcsel_t  sel;
  logic    hold;
  logic    stall, kill_if, kill_id, byp_ex, byp_mem;
  logic [RA_W-1:0] ra1, ra2;
  logic [XLEN-1:0] rd1, rd2;

  // ---------------- IF ----------------
  dlx_fetch #(.IMEM_WORDS(IMEM_WORDS)) u_fetch (
    .clk, .rst, .sel, .hold, .out(if_out),
    .imem_we, .imem_waddr, .imem_wdata
  );

  if (HAS_KILL_IF) begin : g_kill_if
    dlx_kill u_kill_if (.cur(if_out), .killer(ex_stage), .out(if_k), .fired(kill_if));
  end else begin : g_no_kill_if
    assign if_k = if_out;
    assign kill_if = 1'b0;
  end

  if (HAS_STALL && IF1ID) begin : g_stall
    dlx_stall u_stall (.in(if_k), .held(if1id_q), .stall(stall), .out(if_s));
  end else begin : g_no_stall
    assign if_s = if_k;
  end

  dlx_pipe_reg #(.PRESENT(IF1ID)) u_if1id (.clk, .rst, .hold(1'b0), .d(if_s), .q(if1id_q));

  // ---------------- ID ----------------
  dlx_decode u_decode (
    .in(if1id_q), .rf_raddr1(ra1), .rf_raddr2(ra2),
    .rf_rdata1(rd1), .rf_rdata2(rd2), .out(id_out)
  );

  if (HAS_BYP_MEM) begin : g_byp_mem
    dlx_bypass u_byp_mem (.cur(id_out), .src(mem_out), .out(id_b1), .hit(byp_mem));
  end else begin : g_no_byp_mem
    assign id_b1 = id_out;
    assign byp_mem = 1'b0;
  end

  if (HAS_BYP_EX) begin : g_byp_ex
    dlx_bypass u_byp_ex (.cur(id_b1), .src(ex_out), .out(id_b2), .hit(byp_ex));
  end else begin : g_no_byp_ex
    assign id_b2 = id_b1;
    assign byp_ex = 1'b0;
  end

  if (HAS_KILL_ID) begin : g_kill_id
    dlx_kill u_kill_id (.cur(id_b2), .killer(ex_stage), .out(id_k), .fired(kill_id));
  end else begin : g_no_kill_id
    assign id_k = id_b2;
    assign kill_id = 1'b0;
  end

  if (HAS_STALL) begin : g_detect
    dlx_detect u_detect (.clk, .rst, .in(id_k), .out(id_det), .stall(stall));
  end else begin : g_no_detect
    assign id_det = id_k;
    assign stall  = 1'b0;
  end

  dlx_pipe_reg #(.PRESENT(IDEX)) u_idex (.clk, .rst, .hold(1'b0), .d(id_det), .q(idex_q));

  // ---------------- EX ----------------
  dlx_execute u_execute (.in(idex_q), .out(ex_out));

  dlx_pipe_reg #(.PRESENT(EXMEM1)) u_exmem1 (.clk, .rst, .hold(1'b0), .d(ex_out), .q(exmem_q));

  // ---------------- MEM ----------------
  dlx_memory #(.DMEM_WORDS(DMEM_WORDS)) u_memory (
    .clk, .rst, .in(exmem_q), .out(mem_out),
    .dbg_addr(dmem_dbg_addr), .dbg_data(dmem_dbg_data)
  );

  dlx_pipe_reg #(.PRESENT(1'b1)) u_mem1wb (.clk, .rst, .hold(1'b0), .d(mem_out), .q(mem1wb_q));

  // ---------------- WB ----------------
  dlx_regfile u_regfile (
    .clk, .rst, .wb(mem1wb_q),
    .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
    .dbg_addr(rf_dbg_addr), .dbg_data(rf_dbg_data)
  );

  // ---------------- pc selection ----------------
  if (HAS_KILL) begin : g_killdel
    dlx_pipe_reg #(.PRESENT(1'b1)) u_killdel (.clk, .rst, .hold(1'b0), .d(ex_stage), .q(killdel_q));
  end else begin : g_no_killdel
    assign killdel_q = BUBBLE;
  end

  assign ex_stage = EXMEM1 ? ex_out : mem_out;
  assign dist_q   = EXMEM1 ? exmem_q : mem1wb_q;

  dlx_selector #(.HAS_KILL(HAS_KILL)) u_sel (
    .fix_kill(killdel_q), .fix_dist(dist_q), .stall(stall), .sel(sel), .hold(hold)
  );

  assign retire     = mem1wb_q;
  assign ev_stall   = stall;
  assign ev_kill    = kill_if || kill_id;
  assign ev_byp_ex  = byp_ex;
  assign ev_byp_mem = byp_mem;

  // A kill and a stall never meet: a stall needs a load at the EX output,
  // a kill a jump or taken branch there.
  assert property (@(posedge clk) disable iff (rst) !(stall && ex_out.valid && ex_out.redirect))
    else $error("dlx_pipeline: stall and kill in the same cycle");

endmodule
