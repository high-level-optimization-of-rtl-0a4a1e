// Unit testbench of dlx_memory: random stores and loads against a memory
// model. A store writes at the clock edge (MEM2); a load reads in the same
// cycle (MEM1) and marks its result ready; bubbles and other operations
// leave memory alone; reset clears it; the debug port reads any word.
//
// Interface: none (top-level testbench).
// Timing: 10-unit clock where clocked; a watchdog ends the run after #200000 with a failure.
// Document: the behaviour checked follows the units of Table 1.1.
// Own choice: the stimulus, the reference model and the set of checks.
module dlx_memory_tb;
  import dlx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  parcel_t in, out;
  logic [XLEN-1:0] dbga, dbgd;
  logic [XLEN-1:0] model [256];
  int checks = 0, failures = 0;

  dlx_memory #(.DMEM_WORDS(256)) dut (.clk, .rst, .in, .out, .dbg_addr(dbga), .dbg_data(dbgd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int a;
    rst = 1; in = BUBBLE; dbga = 0;
    for (int i = 0; i < 256; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      a = $urandom % 32;
      in = BUBBLE;
      in.valid = ($urandom % 6) != 0;
      case ($urandom % 3)
        0: in.op = OP_SW;
        1: in.op = OP_LW;
        default: in.op = OP_ADD;
      endcase
      in.result = XLEN'(a); in.val1 = $urandom; in.val2 = $urandom;
      #1;
      if (in.op == OP_LW)
        check(out.result == model[a] && out.res_ready, $sformatf("load [%0d]=%h expected %h", a, out.result, model[a]));
      else
        check(out.result == in.result && out.res_ready == in.res_ready, "non-load passes through");
      if (in.valid && in.op == OP_SW) model[a] = in.val2;
      @(negedge clk);
    end
    in = BUBBLE;
    for (int i = 0; i < 32; i++) begin
      dbga = XLEN'(i);
      #1 check(dbgd == model[i], $sformatf("debug [%0d]", i));
    end
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      dbga = XLEN'(i);
      #1 check(dbgd == 0, $sformatf("reset clears [%0d]", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
