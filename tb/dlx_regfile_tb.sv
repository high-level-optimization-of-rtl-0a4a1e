// Unit testbench of dlx_regfile: random write-backs against a register
// model, checking write-before-read (a read of the register being written
// returns the new value in the same cycle), r0 reading as zero, parcels that
// do not write (bubbles, no rd) being ignored, reset and the debug port.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #200000 with a failure.
// Document: the behaviour checked follows the write-before-read register file.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_regfile_tb;
  import dlx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  parcel_t wb;
  logic [RA_W-1:0] ra1, ra2, dbga;
  logic [XLEN-1:0] rd1, rd2, dbgd;
  logic [XLEN-1:0] model [32];
  int checks = 0, failures = 0;

  dlx_regfile dut (.clk, .rst, .wb, .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
                   .dbg_addr(dbga), .dbg_data(dbgd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [XLEN-1:0] expect_rd(logic [4:0] r);
    if (r == 0) return 0;
    if (wb.valid && wb.wr_rd && wb.rd == r) return wb.result;
    return model[r];
  endfunction

  initial begin
    rst = 1; wb = BUBBLE; ra1 = 0; ra2 = 0; dbga = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      wb = BUBBLE;
      wb.valid  = ($urandom % 5) != 0;
      wb.wr_rd  = ($urandom % 5) != 0;
      wb.rd     = 5'(1 + $urandom % 31);
      wb.result = $urandom;
      ra1 = ($urandom % 2) ? wb.rd : 5'($urandom);
      ra2 = ($urandom % 8 == 0) ? 5'd0 : 5'($urandom);
      #1;
      check(rd1 == expect_rd(ra1), $sformatf("read1 r%0d=%h expected %h", ra1, rd1, expect_rd(ra1)));
      check(rd2 == expect_rd(ra2), $sformatf("read2 r%0d=%h expected %h", ra2, rd2, expect_rd(ra2)));
      if (wb.valid && wb.wr_rd) model[wb.rd] = wb.result;
      @(negedge clk);
    end
    wb = BUBBLE;
    for (int i = 0; i < 32; i++) begin
      dbga = 5'(i);
      #1 check(dbgd == (i == 0 ? 0 : model[i]), $sformatf("debug r%0d", i));
    end
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      dbga = 5'(i);
      #1 check(dbgd == 0, $sformatf("reset clears r%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
