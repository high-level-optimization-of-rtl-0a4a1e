// DLX instruction fetch: IF3, IF1, IF2 and the pc register.
//
// IF3 chooses the pc to fetch this cycle: the redirect target from the pc
// selector when a jump or taken branch has just been resolved, otherwise the
// pc register. IF1 reads the instruction memory at that pc and emits a valid
// parcel carrying the pc and instruction word. IF2 increments the fetch pc
// and the pc register captures it at the clock edge; when the selector asks
// for a stall (hold), the register captures the unincremented fetch pc so
// the same instruction is fetched again. The fetch pc never depends on hold,
// which keeps the stall path free of combinational loops in configurations
// where IF, ID and the detect unit share a stage.
//
// The split into IF1/IF2/IF3/pc follows the document's DLX circuit
// description. The word-addressed pc, the instruction memory size and its
// load port (written while the pipeline is held in reset) are this design's
// choices. The memory read is combinational, as IF1 sits in the same
// segment as IF3.
module dlx_fetch
  import dlx_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256
) (
  input  logic            clk,
  input  logic            rst,        // synchronous, active high; pc <- 0
  input  pcsel_t          sel,        // redirect from the pc selector
  input  logic            hold,       // stall from the pc selector
  output parcel_t         out,        // fetched instruction (IF1 output)
  // instruction memory load port
  input  logic            imem_we,
  input  logic [XLEN-1:0] imem_waddr,
  input  logic [XLEN-1:0] imem_wdata
);
  localparam int unsigned AW = $clog2(IMEM_WORDS);

  logic [XLEN-1:0] imem [IMEM_WORDS];
  logic            unused_waddr;
  assign unused_waddr = ^imem_waddr[XLEN-1:AW];   // address taken modulo the size
  logic [XLEN-1:0] pc_q;       // pc register
  logic [XLEN-1:0] fetch_pc;   // IF3 output
  logic [XLEN-1:0] pc_inc;     // IF2 output

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_waddr[AW-1:0]] <= imem_wdata;
  end

  // IF3
  assign fetch_pc = sel.redirect ? sel.target : pc_q;
  // IF2
  assign pc_inc = fetch_pc + XLEN'(1);

  always_ff @(posedge clk) begin
    if (rst)           pc_q <= '0;
    else if (hold) pc_q <= fetch_pc;
    else               pc_q <= pc_inc;
  end

  // IF1
  always_comb begin
    out       = BUBBLE;
    out.valid = !rst;
    out.pc    = fetch_pc;
    out.instr = imem[fetch_pc[AW-1:0]];
  end

endmodule
