// MAC writeback (WB) and write-before-read floating-point register file.
//
// WB writes the result leaving the RNDWB register into the register file
// at the clock edge. Reads are combinational and write-before-read: a read
// of the register being written this cycle returns the new value. MUL and
// ADD each read two registers, so there are four read ports, plus one for
// debug. Registers clear to +0.0 on reset. A load port sets initial
// register values while the pipeline is idle (the document's MAC has no
// load instruction); a writeback in the same cycle wins. Reset, the load
// port and the register count are this design's choices.
module mac_regfile
  import mac_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  mres_t           wb,
  input  logic            ld_we,
  input  logic [RA_W-1:0] ld_addr,
  input  logic [31:0]     ld_data,
  input  logic [RA_W-1:0] raddr [4],
  output logic [31:0]     rdata [4],
  input  logic [RA_W-1:0] dbg_addr,
  output logic [31:0]     dbg_data
);
  logic [31:0] rf [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREG); i++) rf[i] <= '0;
    end else if (wb.valid) begin
      rf[wb.a] <= wb.value;
    end else if (ld_we) begin
      rf[ld_addr] <= ld_data;
    end
  end

  function automatic logic [31:0] rd_port(logic [RA_W-1:0] a);
    return (wb.valid && wb.a == a) ? wb.value : rf[a];
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++) rdata[i] = rd_port(raddr[i]);
  end
  assign dbg_data = rd_port(dbg_addr);

endmodule
