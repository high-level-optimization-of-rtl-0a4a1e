// Unit testbench of mac_regfile: random write-backs and loads against a
// register model, with all four read ports checked every cycle. A read of
// the register being written back returns the new value in the same cycle
// (write-before-read); a write-back wins over a load in the same cycle;
// reset clears every register.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #200000 with a failure.
// Document: the behaviour checked follows the write-before-read register file.
// Own choice: the stimulus, the reference model and the set of checks.
module mac_regfile_tb;
  import mac_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, ld_we;
  mres_t wb;
  logic [RA_W-1:0] ld_addr, dbga;
  logic [31:0] ld_data, dbgd;
  logic [RA_W-1:0] raddr [4];
  logic [31:0] rdata [4];
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  mac_regfile dut (.clk, .rst, .wb, .ld_we, .ld_addr, .ld_data, .raddr, .rdata,
                   .dbg_addr(dbga), .dbg_data(dbgd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] e;
    rst = 1; wb = '0; ld_we = 0; ld_addr = 0; ld_data = 0; dbga = 0;
    for (int p = 0; p < 4; p++) raddr[p] = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      wb.valid = ($urandom % 3) == 0; wb.a = 5'($urandom % 8); wb.value = $urandom;
      ld_we = ($urandom % 3) == 0; ld_addr = 5'($urandom % 8); ld_data = $urandom;
      for (int p = 0; p < 4; p++) raddr[p] = ($urandom % 2) ? wb.a : 5'($urandom % 8);
      #1;
      for (int p = 0; p < 4; p++) begin
        e = (wb.valid && wb.a == raddr[p]) ? wb.value : model[raddr[p]];
        check(rdata[p] == e, $sformatf("port %0d r%0d=%h expected %h", p, raddr[p], rdata[p], e));
      end
      if (wb.valid) model[wb.a] = wb.value;
      else if (ld_we) model[ld_addr] = ld_data;
      @(negedge clk);
    end
    wb = '0; ld_we = 0;
    for (int i = 0; i < 8; i++) begin
      dbga = 5'(i);
      #1 check(dbgd == model[i], $sformatf("debug r%0d", i));
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
