// Unit testbench of dlx_fetch: sequential fetch from pc 0 after reset, the
// instruction word read at the fetch pc, a redirect taking effect in the
// same cycle, and a hold repeating the same pc in the next cycle.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows the fetch unit and the selector's effect on it.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_fetch_tb;
  import dlx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, hold, we;
  pcsel_t sel;
  parcel_t out;
  logic [XLEN-1:0] wa, wd;
  int checks = 0, failures = 0;

  dlx_fetch #(.IMEM_WORDS(256)) dut (.clk, .rst, .sel, .hold, .out,
    .imem_we(we), .imem_waddr(wa), .imem_wdata(wd));

  function automatic logic [XLEN-1:0] word(int a);
    return XLEN'(32'h1234_0000 + a * 3 + 7);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic expect_pc(int pc, string what);
    #1;
    check(out.valid && out.pc == XLEN'(pc) && out.instr == word(pc),
          $sformatf("%s: pc=%0d instr=%h valid=%0d, expected pc %0d", what, out.pc, out.instr, out.valid, pc));
  endtask

  initial begin
    rst = 1; hold = 0; sel = '0; we = 0; wa = '0; wd = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; wa = XLEN'(a); wd = word(a);
    end
    @(negedge clk); we = 0;
    #1 check(!out.valid, "no valid instruction during reset");
    @(negedge clk); rst = 0;
    for (int i = 0; i < 5; i++) begin
      expect_pc(i, "sequential");
      @(negedge clk);
    end
    // redirect: target fetched in this cycle, then target+1
    sel.redirect = 1; sel.target = 40;
    expect_pc(40, "redirect same cycle");
    @(negedge clk); sel = '0;
    expect_pc(41, "after redirect");
    // hold: pc 42 fetched again in the next cycle
    @(negedge clk);
    expect_pc(42, "before hold");
    hold = 1;
    @(negedge clk); hold = 0;
    expect_pc(42, "held pc repeats");
    @(negedge clk);
    expect_pc(43, "after hold");
    // random redirects and holds against a model
    begin
      int pc = 44;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        sel.redirect = ($urandom % 4) == 0;
        sel.target   = XLEN'($urandom % 256);
        hold         = !sel.redirect && ($urandom % 4) == 0;
        if (sel.redirect) pc = int'(sel.target);
        expect_pc(pc, "random");
        if (!hold) pc = (pc + 1) % 256;
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
