// Detect unit with history register.
//
// The history register holds the parcel the unit handed on in the previous
// cycle, i.e. the instruction now one stage further down the pipeline.
// If that instruction is a valid load and the current valid instruction
// reads the register it loads, the loaded value cannot reach the current
// instruction in time: the unit outputs a bubble in its place and raises
// stall, which makes the stall unit re-present the instruction and the pc
// selector hold the pc. Because the bubble is what enters the history
// register, the retried instruction proceeds on the next cycle and picks
// the loaded value up through the bypass from MEM1. This gives the 1-cycle
// stall the document's rules produce for the DLX. The history register
// (the document's Figure 2.11) clears to a bubble on reset.
module dlx_detect
  import dlx_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  parcel_t in,
  output parcel_t out,
  output logic    stall
);
  parcel_t hist;

  always_ff @(posedge clk) begin
    if (rst) hist <= BUBBLE;
    else     hist <= out;
  end

  logic load_prev, dep1, dep2;
  assign load_prev = hist.valid && (hist.op == OP_LW) && hist.wr_rd && (hist.rd != '0);
  assign dep1      = in.use_rs1 && (in.rs1 == hist.rd);
  assign dep2      = in.use_rs2 && (in.rs2 == hist.rd);
  assign stall     = in.valid && load_prev && (dep1 || dep2);

  always_comb begin
    out = in;
    if (stall) out.valid = 1'b0;
  end

endmodule
