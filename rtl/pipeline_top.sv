// Top level: the two pipelines of the case studies, side by side.
//
// The DLX universal pipeline (five functional units with the bypass, stall,
// detect, kill and pc-selector hardware its configuration requires) and the
// floating-point multiply accumulator universal pipeline (MUL, ADD, RND,
// WB with RND bypasses) share only clock and reset; each brings out its own
// ports. The configuration parameters are the Boolean presence variables
// of the optional pipeline registers; the defaults give both pipelines
// fully pipelined. See dlx_pipeline and mac_pipeline for the interfaces and
// timing.
//
// Document: both case studies and their universal pipelines (Ch. 4).
// Own choice: putting them in one top with a shared clock and reset, the
// load and debug ports, and the hazard event outputs.
module pipeline_top
  import dlx_pkg::*;
  import mac_pkg::*;
#(
  parameter bit          DLX_IF1ID      = 1'b1,
  parameter bit          DLX_IDEX       = 1'b1,
  parameter bit          DLX_EXMEM1     = 1'b1,
  parameter int unsigned DLX_IMEM_WORDS = 256,
  parameter int unsigned DLX_DMEM_WORDS = 256,
  parameter bit          MAC_MULDEL     = 1'b1,
  parameter bit          MAC_ADDDEL     = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst,
  // DLX
  input  logic                     dlx_imem_we,
  input  logic [dlx_pkg::XLEN-1:0] dlx_imem_waddr,
  input  logic [dlx_pkg::XLEN-1:0] dlx_imem_wdata,
  output parcel_t                  dlx_retire,
  input  logic [dlx_pkg::RA_W-1:0] dlx_rf_dbg_addr,
  output logic [dlx_pkg::XLEN-1:0] dlx_rf_dbg_data,
  input  logic [dlx_pkg::XLEN-1:0] dlx_dmem_dbg_addr,
  output logic [dlx_pkg::XLEN-1:0] dlx_dmem_dbg_data,
  output logic                     dlx_ev_stall,
  output logic                     dlx_ev_kill,
  output logic                     dlx_ev_byp_ex,
  output logic                     dlx_ev_byp_mem,
  // MAC
  input  minstr_t                  mac_inp,
  output mres_t                    mac_wb,
  input  logic                     mac_rf_ld_we,
  input  logic [mac_pkg::RA_W-1:0] mac_rf_ld_addr,
  input  logic [31:0]              mac_rf_ld_data,
  input  logic [mac_pkg::RA_W-1:0] mac_rf_dbg_addr,
  output logic [31:0]              mac_rf_dbg_data,
  output logic                     mac_ev_byp_mul,
  output logic                     mac_ev_byp_add
);

  dlx_pipeline #(
    .IF1ID(DLX_IF1ID), .IDEX(DLX_IDEX), .EXMEM1(DLX_EXMEM1),
    .IMEM_WORDS(DLX_IMEM_WORDS), .DMEM_WORDS(DLX_DMEM_WORDS)
  ) u_dlx (
    .clk, .rst,
    .imem_we(dlx_imem_we), .imem_waddr(dlx_imem_waddr), .imem_wdata(dlx_imem_wdata),
    .retire(dlx_retire),
    .rf_dbg_addr(dlx_rf_dbg_addr), .rf_dbg_data(dlx_rf_dbg_data),
    .dmem_dbg_addr(dlx_dmem_dbg_addr), .dmem_dbg_data(dlx_dmem_dbg_data),
    .ev_stall(dlx_ev_stall), .ev_kill(dlx_ev_kill),
    .ev_byp_ex(dlx_ev_byp_ex), .ev_byp_mem(dlx_ev_byp_mem)
  );

  mac_pipeline #(.MULDEL(MAC_MULDEL), .ADDDEL(MAC_ADDDEL)) u_mac (
    .clk, .rst, .inp(mac_inp), .wb(mac_wb),
    .rf_ld_we(mac_rf_ld_we), .rf_ld_addr(mac_rf_ld_addr), .rf_ld_data(mac_rf_ld_data),
    .rf_dbg_addr(mac_rf_dbg_addr), .rf_dbg_data(mac_rf_dbg_data),
    .ev_byp_mul(mac_ev_byp_mul), .ev_byp_add(mac_ev_byp_add)
  );

endmodule
