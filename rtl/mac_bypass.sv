// MAC bypass.
//
// Forwards the result RND is producing this cycle to an operand that MUL or
// ADD reads in the same cycle: if the RND result is valid and targets the
// register being read, its value replaces the register file value. The
// document draws the bypass right after the unit that needs the value; here
// it acts on the operand on its way into the unit, since a product or sum
// formed from a stale operand could not be repaired afterwards. hit
// reports a forward. Combinational.
module mac_bypass
  import mac_pkg::*;
(
  input  logic [RA_W-1:0] raddr,
  input  logic [31:0]     rf_value,
  input  mres_t           res,      // RND output
  output logic [31:0]     value,
  output logic            hit
);
  assign hit   = res.valid && (res.a == raddr);
  assign value = hit ? res.value : rf_value;

endmodule
