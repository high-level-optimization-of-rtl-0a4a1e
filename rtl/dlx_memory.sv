// DLX memory access: MEM1, MEM2 and the data memory state (mem).
//
// MEM1 reads the data memory combinationally at the effective address a
// load computed in EX and makes the loaded word the parcel's result
// (res_ready). MEM2 writes the store data (val2) at the effective address;
// the data memory array captures it at the clock edge, so a load in the
// next cycle sees it. Other instructions pass through unchanged.
//
// The MEM1/MEM2/mem split is the document's; the word addressing, the
// memory size (address taken modulo the size) and clearing the memory on
// reset are this design's choices. A read-only debug port lets a testbench
// inspect the memory.
module dlx_memory
  import dlx_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic            clk,
  input  logic            rst,
  input  parcel_t         in,
  output parcel_t         out,
  input  logic [XLEN-1:0] dbg_addr,
  output logic [XLEN-1:0] dbg_data
);
  localparam int unsigned AW = $clog2(DMEM_WORDS);

  logic [XLEN-1:0] mem [DMEM_WORDS];
  logic [AW-1:0]   addr;
  assign addr = in.result[AW-1:0];

  // MEM2 and the memory state register
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DMEM_WORDS); i++) mem[i] <= '0;
    end else if (in.valid && in.op == OP_SW) begin
      mem[addr] <= in.val2;
    end
  end

  // MEM1
  always_comb begin
    out = in;
    if (in.op == OP_LW) begin
      out.result    = mem[addr];
      out.res_ready = 1'b1;
    end
  end

  assign dbg_data = mem[dbg_addr[AW-1:0]];

endmodule
