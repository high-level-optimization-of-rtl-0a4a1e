// Unit testbench of mac_bypass: the operand is the RND output when RND
// holds a valid result for the register being read, else the register
// file value; hit reports the forward.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows RND bypasses into MUL and ADD.
// Own choice: the stimulus, the reference model and the set of checks.
module mac_bypass_tb;
  import mac_pkg::*;
  logic [RA_W-1:0] raddr;
  logic [31:0] rfv, value;
  mres_t res;
  logic hit;
  int checks = 0, failures = 0;

  mac_bypass dut (.raddr, .rf_value(rfv), .res, .value, .hit);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    bit h;
    for (int n = 0; n < 3000; n++) begin
      raddr = 5'($urandom % 4); rfv = $urandom;
      res.valid = $urandom % 2; res.a = 5'($urandom % 4); res.value = $urandom;
      h = res.valid && res.a == raddr;
      #1;
      check(hit == h, "hit");
      check(value == (h ? res.value : rfv), $sformatf("value (hit %0d)", h));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
