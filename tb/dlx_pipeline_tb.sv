// Testbench of the DLX universal pipeline in all eight configurations.
//
// Eight instances, one per setting of the IF1ID / IDEX / EXMEM1 presence
// parameters, run the same program side by side, each followed by a
// dlx_checker that compares every retired instruction and the final
// architectural state with an instruction set model and checks the stall
// and branch costs the configuration implies. It also requires that each
// configuration's hazard hardware acted: a stall where the rules place a
// detect unit, kills where they place kill units, EX and MEM1 bypasses
// where they place those.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after 20000 cycles with a failure.
// Document: the behaviour checked follows the placement rules and the cycle costs they imply.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_pipeline_tb;
  import dlx_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic start = 0;

  int checks, failures;
  int chk   [8];
  int fail  [8];
  logic dn  [8];
  int nst [8], nki [8], nbe [8], nbm [8], nret [8], ncyc [8];

  for (genvar g = 0; g < 8; g++) begin : g_cfg
    localparam bit P_IF1ID  = g[2];
    localparam bit P_IDEX   = g[1];
    localparam bit P_EXMEM1 = g[0];
    logic rst, we;
    logic [XLEN-1:0] wa, wd, dbga, dbgd, rfd;
    logic [RA_W-1:0] rfa;
    parcel_t ret;
    logic es, ek, ebe, ebm;
    dlx_pipeline #(.IF1ID(P_IF1ID), .IDEX(P_IDEX), .EXMEM1(P_EXMEM1)) dut (
      .clk, .rst, .imem_we(we), .imem_waddr(wa), .imem_wdata(wd), .retire(ret),
      .rf_dbg_addr(rfa), .rf_dbg_data(rfd), .dmem_dbg_addr(dbga), .dmem_dbg_data(dbgd),
      .ev_stall(es), .ev_kill(ek), .ev_byp_ex(ebe), .ev_byp_mem(ebm));
    dlx_checker #(.IF1ID(P_IF1ID), .IDEX(P_IDEX), .EXMEM1(P_EXMEM1)) chkr (
      .clk, .start, .rst, .imem_we(we), .imem_waddr(wa), .imem_wdata(wd), .retire(ret),
      .rf_dbg_addr(rfa), .rf_dbg_data(rfd), .dmem_dbg_addr(dbga), .dmem_dbg_data(dbgd),
      .ev_stall(es), .ev_kill(ek), .ev_byp_ex(ebe), .ev_byp_mem(ebm),
      .done(dn[g]), .checks(chk[g]), .failures(fail[g]), .n_stall(nst[g]), .n_kill(nki[g]),
      .n_byp_ex(nbe[g]), .n_byp_mem(nbm[g]), .n_retired(nret[g]), .run_cycles(ncyc[g]));
  end

  task automatic expect_events(int g);
    bit stall_hw = g[1] && g[0];
    bit kill_hw  = g[2] || g[1];
    bit bex_hw   = g[1] && g[0];
    bit bmem_hw  = g[1] || g[0];
    checks += 4;
    if (stall_hw ? nst[g] == 0 : nst[g] != 0) begin failures++; $display("FAIL cfg %0d stall count %0d", g, nst[g]); end
    if (kill_hw  ? nki[g] == 0 : nki[g] != 0) begin failures++; $display("FAIL cfg %0d kill count %0d", g, nki[g]); end
    if (bex_hw   ? nbe[g] == 0 : nbe[g] != 0) begin failures++; $display("FAIL cfg %0d EX bypass count %0d", g, nbe[g]); end
    if (bmem_hw  ? nbm[g] == 0 : nbm[g] != 0) begin failures++; $display("FAIL cfg %0d MEM bypass count %0d", g, nbm[g]); end
  endtask

  initial begin
    checks = 0; failures = 0;
    dlx_tb_pkg::build(32'd2003, 200);
    start = 1;
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5] && dn[6] && dn[7]);
    for (int g = 0; g < 8; g++) begin
      checks   += chk[g];
      failures += fail[g];
      expect_events(g);
      $display("cfg IF1ID=%0d IDEX=%0d EXMEM1=%0d: %0d instructions in %0d cycles, stalls %0d kills %0d byp_ex %0d byp_mem %0d",
               g[2], g[1], g[0], nret[g], ncyc[g], nst[g], nki[g], nbe[g], nbm[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
