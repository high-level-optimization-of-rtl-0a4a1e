// Unit testbench of dlx_kill: the instruction passing the unit becomes a
// bubble exactly when the killer (the end of EX's stage) is a valid jump or taken
// branch; fired reports a valid instruction being killed. An invalid
// killer whose redirect bit happens to be set kills nothing.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows kill units under predict-not-taken (Sec. 2.5.3).
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_kill_tb;
  import dlx_pkg::*;
  parcel_t cur, killer, out;
  logic fired;
  int checks = 0, failures = 0;

  dlx_kill dut (.cur, .killer, .out, .fired);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    bit k;
    for (int n = 0; n < 2000; n++) begin
      cur = {8{$urandom}}; killer = {8{$urandom}};
      cur.valid = $urandom % 2; killer.valid = $urandom % 2; killer.redirect = $urandom % 2;
      k = killer.valid && killer.redirect;
      #1;
      check(out.valid == (cur.valid && !k), $sformatf("valid out %0d (kill %0d)", out.valid, k));
      check(fired == (k && cur.valid), "fired");
      check(out.pc == cur.pc && out.instr == cur.instr, "fields pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
