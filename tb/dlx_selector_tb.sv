// Unit testbench of dlx_selector, with and without kill hardware: the
// redirect from the register after EX wins over the delayed kill redirect,
// which wins over a stall; only a stall with no redirect holds the pc.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows the selector precedence (Sec. 1.1.1).
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_selector_tb;
  import dlx_pkg::*;
  parcel_t fk, fd;
  logic st;
  pcsel_t sel1, sel0;
  logic hold1, hold0;
  int checks = 0, failures = 0;

  dlx_selector #(.HAS_KILL(1'b1)) u_k  (.fix_kill(fk), .fix_dist(fd), .stall(st), .sel(sel1), .hold(hold1));
  dlx_selector #(.HAS_KILL(1'b0)) u_nk (.fix_kill(fk), .fix_dist(fd), .stall(st), .sel(sel0), .hold(hold0));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic expect_sel(bit has_kill, pcsel_t s, logic h);
    bit d = fd.valid && fd.redirect;
    bit k = has_kill && fk.valid && fk.redirect;
    check(s.redirect == (d || k), $sformatf("kill=%0d redirect (d=%0d k=%0d st=%0d)", has_kill, d, k, st));
    if (d)      check(s.target == fd.target, "distinguished target wins");
    else if (k) check(s.target == fk.target, "kill target");
    check(h == (!d && !k && st), $sformatf("kill=%0d hold (d=%0d k=%0d st=%0d)", has_kill, d, k, st));
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      fk = {8{$urandom}}; fd = {8{$urandom}}; st = $urandom % 2;
      fk.valid = $urandom % 2; fd.valid = $urandom % 2;
      fk.redirect = $urandom % 2; fd.redirect = ($urandom % 3) == 0;
      #1;
      expect_sel(1, sel1, hold1);
      expect_sel(0, sel0, hold0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
