// Testbench of the MAC universal pipeline in all four configurations
// (MULDEL, ADDDEL each absent or present). One program with directed
// rounding cases and random dependent instructions is scheduled for each
// configuration and checked against the exact reference model; each
// configuration must use exactly the bypasses it has.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #200000 with a failure.
// Document: the behaviour checked follows the MAC bypass rule and timing.
// Own choice: the stimulus, the reference model and the set of checks.
module mac_pipeline_tb;
  import mac_pkg::*;
  import mac_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int chk [4], fl [4];
  logic dn [4];

  for (genvar g = 0; g < 4; g++) begin : g_cfg
    localparam bit MD = g[1];
    localparam bit AD = g[0];
    logic rst, ld_we;
    minstr_t inp;
    mres_t wb;
    logic [RA_W-1:0] ld_addr, dbg_addr;
    logic [31:0] ld_data, dbg_data;
    logic bm, ba;
    int nbm, nba, ncyc;

    mac_pipeline #(.MULDEL(MD), .ADDDEL(AD)) dut (
      .clk, .rst, .inp, .wb, .rf_ld_we(ld_we), .rf_ld_addr(ld_addr), .rf_ld_data(ld_data),
      .rf_dbg_addr(dbg_addr), .rf_dbg_data(dbg_data), .ev_byp_mul(bm), .ev_byp_add(ba)
    );
    mac_checker #(.MULDEL(MD), .ADDDEL(AD)) chkr (
      .clk, .start(1'b1), .rst, .inp, .wb, .rf_ld_we(ld_we), .rf_ld_addr(ld_addr), .rf_ld_data(ld_data),
      .rf_dbg_addr(dbg_addr), .rf_dbg_data(dbg_data), .ev_byp_mul(bm), .ev_byp_add(ba),
      .done(dn[g]), .checks(chk[g]), .failures(fl[g]),
      .n_byp_mul(nbm), .n_byp_add(nba), .n_cycles(ncyc)
    );
    always @(posedge dn[g])
      $display("mac MULDEL=%0d ADDDEL=%0d: %0d instructions in %0d cycles, bypasses mul=%0d add=%0d, checks=%0d failures=%0d",
               MD, AD, prog_len, ncyc, nbm, nba, chk[g], fl[g]);
  end

  initial begin
    build(32'd7919, 400);
  end

  initial begin
    int c, f;
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    c = 0; f = 0;
    for (int g = 0; g < 4; g++) begin c += chk[g]; f += fl[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    #200000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
