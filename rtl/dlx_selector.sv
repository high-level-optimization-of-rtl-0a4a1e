// pc selector.
//
// Combines the sources of a new pc for the fetch unit (IF3):
//   - fix_kill: the instruction passed back to the kill units, delayed by
//     one register because it changes the pc in the following cycle;
//   - fix_dist: the distinguished pc signal, the pipeline register that
//     follows the last unit computing the pc (EX);
//   - stall:    from the detect unit, undelayed, since the pc must be held
//     in the same cycle the stall is detected.
// A valid parcel with redirect set sends fetch to its target. Kill sources
// take precedence over the stall, and later pipeline sources over earlier
// ones; fix_kill and fix_dist carry the same instruction, so their order
// only matters for precedence. HAS_KILL=0 removes the kill-delay input, as
// in configurations without kill units. Combinational.
//
// Interface: fix_kill, fix_dist parcels and stall in; sel (pc selection) and
// hold out. Parameter HAS_KILL.
// Document: the selector inputs, the delay on the kill input and the
// precedence (Sec. 1.1.1).
// Own choice: the pcsel_t encoding and the hold output to the fetch unit.
module dlx_selector
  import dlx_pkg::*;
#(
  parameter bit HAS_KILL = 1'b1
) (
  input  parcel_t fix_kill,
  input  parcel_t fix_dist,
  input  logic    stall,
  output pcsel_t  sel,
  output logic    hold
);
  logic k, d;
  assign k = HAS_KILL && fix_kill.valid && fix_kill.redirect;
  assign d = fix_dist.valid && fix_dist.redirect;

  always_comb begin
    sel  = '0;
    hold = 1'b0;
    if (d) begin
      sel.redirect = 1'b1;
      sel.target   = fix_dist.target;
    end else if (k) begin
      sel.redirect = 1'b1;
      sel.target   = fix_kill.target;
    end else if (stall) begin
      hold         = 1'b1;
    end
  end

endmodule
