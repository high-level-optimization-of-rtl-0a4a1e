// DLX writeback (WB) and write-before-read register file (rf).
//
// WB takes the parcel leaving the MEM1WB pipeline register and, when it is
// valid and writes a register, stores its result at the clock edge. The
// register file is write-before-read, as the document requires: a read of
// the register being written in the same cycle returns the new value, so
// an instruction in ID never needs forwarding from writeback. r0 always
// reads as zero. Three combinational read ports: two for ID, one for debug.
// Registers clear on reset (reset behaviour is this design's choice).
module dlx_regfile
  import dlx_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  parcel_t         wb,          // MEM1WB output
  input  logic [RA_W-1:0] raddr1,
  output logic [XLEN-1:0] rdata1,
  input  logic [RA_W-1:0] raddr2,
  output logic [XLEN-1:0] rdata2,
  input  logic [RA_W-1:0] dbg_addr,
  output logic [XLEN-1:0] dbg_data
);
  logic [XLEN-1:0] rf [NREG];
  logic            we;
  assign we = wb.valid && wb.wr_rd && (wb.rd != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREG); i++) rf[i] <= '0;
    end else if (we) begin
      rf[wb.rd] <= wb.result;
    end
  end

  function automatic logic [XLEN-1:0] rd_port(logic [RA_W-1:0] a);
    if (a == '0)                return '0;
    else if (we && a == wb.rd)  return wb.result;   // write before read
    else                        return rf[a];
  endfunction

  assign rdata1   = rd_port(raddr1);
  assign rdata2   = rd_port(raddr2);
  assign dbg_data = rd_port(dbg_addr);

endmodule
