// End-to-end testbench of pipeline_top at its default parameters: the fully
// pipelined DLX (IF1ID, IDEX, EXMEM1 present) and the fully pipelined MAC
// (MULDEL, ADDDEL present).
//
// The DLX runs a program of directed hazard cases and random instructions,
// checked instruction by instruction and at the end against an instruction
// set model, with the stall and branch costs of the configuration checked
// too. The MAC then runs a scheduled floating-point program checked against
// an exact reference model. Every hazard mechanism the two configurations
// contain is counted, and the test fails if any of them never acted:
// load-use stalls, kills of wrongly fetched instructions, EX bypasses and
// MEM1 bypasses into ID, and RND bypasses into MUL and into ADD.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after 30000 cycles with a failure.
// Document: the behaviour checked follows the fully pipelined universal pipelines.
// Own choice: the stimulus, the reference model and the set of checks.
module pipeline_top_tb;
  import dlx_pkg::*;
  import mac_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic mac_start = 0;

  logic rst, mac_rst_unused;
  logic we;
  logic [dlx_pkg::XLEN-1:0] wa, wd, dbga, dbgd, rfd;
  logic [dlx_pkg::RA_W-1:0] rfa;
  parcel_t ret;
  logic es, ek, ebe, ebm;
  minstr_t minp;
  mres_t mwb;
  logic mld_we;
  logic [mac_pkg::RA_W-1:0] mld_addr, mdbg_addr;
  logic [31:0] mld_data, mdbg_data;
  logic bm, ba;

  logic d_done, m_done;
  int d_chk, d_fail, m_chk, m_fail;
  int nst, nki, nbe, nbm, nret, ncyc, nbmul, nbadd, mcyc;
  int checks, failures;

  pipeline_top dut (
    .clk, .rst,
    .dlx_imem_we(we), .dlx_imem_waddr(wa), .dlx_imem_wdata(wd), .dlx_retire(ret),
    .dlx_rf_dbg_addr(rfa), .dlx_rf_dbg_data(rfd),
    .dlx_dmem_dbg_addr(dbga), .dlx_dmem_dbg_data(dbgd),
    .dlx_ev_stall(es), .dlx_ev_kill(ek), .dlx_ev_byp_ex(ebe), .dlx_ev_byp_mem(ebm),
    .mac_inp(minp), .mac_wb(mwb),
    .mac_rf_ld_we(mld_we), .mac_rf_ld_addr(mld_addr), .mac_rf_ld_data(mld_data),
    .mac_rf_dbg_addr(mdbg_addr), .mac_rf_dbg_data(mdbg_data),
    .mac_ev_byp_mul(bm), .mac_ev_byp_add(ba)
  );

  dlx_checker #(.IF1ID(1'b1), .IDEX(1'b1), .EXMEM1(1'b1)) u_dchk (
    .clk, .start, .rst, .imem_we(we), .imem_waddr(wa), .imem_wdata(wd), .retire(ret),
    .rf_dbg_addr(rfa), .rf_dbg_data(rfd), .dmem_dbg_addr(dbga), .dmem_dbg_data(dbgd),
    .ev_stall(es), .ev_kill(ek), .ev_byp_ex(ebe), .ev_byp_mem(ebm),
    .done(d_done), .checks(d_chk), .failures(d_fail), .n_stall(nst), .n_kill(nki),
    .n_byp_ex(nbe), .n_byp_mem(nbm), .n_retired(nret), .run_cycles(ncyc));

  // the MAC starts once the DLX checker has released the shared reset
  mac_checker #(.MULDEL(1'b1), .ADDDEL(1'b1)) u_mchk (
    .clk, .start(mac_start), .rst(mac_rst_unused), .inp(minp), .wb(mwb),
    .rf_ld_we(mld_we), .rf_ld_addr(mld_addr), .rf_ld_data(mld_data),
    .rf_dbg_addr(mdbg_addr), .rf_dbg_data(mdbg_data), .ev_byp_mul(bm), .ev_byp_add(ba),
    .done(m_done), .checks(m_chk), .failures(m_fail),
    .n_byp_mul(nbmul), .n_byp_add(nbadd), .n_cycles(mcyc));

  task automatic need(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    dlx_tb_pkg::build(32'd4242, 220);
    mac_tb_pkg::build(32'd1234, 300);
    start = 1;
    wait (rst == 1'b1);
    wait (rst == 1'b0);
    mac_start = 1;
    wait (d_done && m_done);
    checks   += d_chk + m_chk;
    failures += d_fail + m_fail;
    need(nst,   "DLX load-use stall");
    need(nki,   "DLX kill");
    need(nbe,   "DLX EX bypass to ID");
    need(nbm,   "DLX MEM1 bypass to ID");
    need(nbmul, "MAC RND bypass to MUL");
    need(nbadd, "MAC RND bypass to ADD");
    need(nret,  "DLX retirement");
    $display("DLX: %0d instructions in %0d cycles, stalls %0d kills %0d byp_ex %0d byp_mem %0d",
             nret, ncyc, nst, nki, nbe, nbm);
    $display("MAC: %0d instructions in %0d cycles, byp_mul %0d byp_add %0d",
             mac_tb_pkg::prog_len, mcyc, nbmul, nbadd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
