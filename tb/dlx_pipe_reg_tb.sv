// Unit testbench of dlx_pipe_reg, present and absent: a present register
// delays its input by one cycle, keeps its value under hold and resets to a
// bubble; an absent one passes its input straight through.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows optional pipeline registers.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_pipe_reg_tb;
  import dlx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, hold;
  parcel_t d, q1, q0, prev;
  int checks = 0, failures = 0;

  dlx_pipe_reg #(.PRESENT(1'b1)) u_reg  (.clk, .rst, .hold, .d, .q(q1));
  dlx_pipe_reg #(.PRESENT(1'b0)) u_wire (.clk, .rst, .hold, .d, .q(q0));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; hold = 0; d = '1;
    @(negedge clk);
    check(q1 == BUBBLE, "reset gives a bubble");
    rst = 0;
    prev = BUBBLE;
    for (int n = 0; n < 500; n++) begin
      d = {8{$urandom}};
      hold = ($urandom % 4) == 0;
      #1 check(q0 == d, "absent register is a wire");
      check(q1 == prev, "present register holds the last captured value");
      @(negedge clk);
      if (!hold) prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
