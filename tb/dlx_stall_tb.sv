// Unit testbench of dlx_stall: without a stall the arriving instruction
// passes; with a stall the unit feeds back the following register's output
// so that register keeps its instruction. Checked with random parcels and
// with the unit closing a loop around a real register.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #100000 with a failure.
// Document: the behaviour checked follows the stall unit's "sit still" behaviour.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_stall_tb;
  import dlx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  parcel_t in, held, out, q;
  logic stall, rst;
  int checks = 0, failures = 0;

  dlx_stall dut (.in, .held, .stall, .out);
  // second instance in front of a register, as in the pipeline
  parcel_t in2, out2;
  logic stall2;
  dlx_stall u_loop (.in(in2), .held(q), .stall(stall2), .out(out2));
  dlx_pipe_reg #(.PRESENT(1'b1)) u_reg (.clk, .rst, .hold(1'b0), .d(out2), .q(q));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    parcel_t exp_q;
    for (int n = 0; n < 1000; n++) begin
      in = {8{$urandom}}; held = {8{$urandom}}; stall = $urandom % 2;
      #1 check(out == (stall ? held : in), $sformatf("stall=%0d selects the wrong parcel", stall));
    end
    rst = 1; in2 = BUBBLE; stall2 = 0;
    @(negedge clk); rst = 0;
    exp_q = BUBBLE;
    for (int n = 0; n < 300; n++) begin
      in2 = {8{$urandom}}; stall2 = ($urandom % 3) == 0;
      #1 check(q == exp_q, "register behind the stall unit");
      if (!stall2) exp_q = in2;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
