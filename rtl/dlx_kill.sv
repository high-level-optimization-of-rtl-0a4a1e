// Kill unit.
//
// Takes the parcel currently flowing through its stage and the parcel
// passed back from the stage that computes the pc. If the passed-back
// instruction is a mispredicted branch (under predict-not-taken: any valid
// jump or taken branch, flagged by redirect), the current instruction lies
// in its shadow and is turned into a bubble; otherwise it passes unchanged.
// fired reports that a valid instruction was killed. Combinational.
//
// Interface: cur (parcel in this stage) and killer (parcel at the end of
// EX's stage) in; out parcel and fired out.
// Document: kill units and predict-not-taken (Sec. 2.5.3, Fig. 2.23).
// Own choice: the redirect flag carried in the parcel as the misprediction
// signal, and the fired output.
module dlx_kill
  import dlx_pkg::*;
(
  input  parcel_t cur,
  input  parcel_t killer,
  output parcel_t out,
  output logic    fired
);
  logic kill;
  assign kill  = killer.valid && killer.redirect;
  assign fired = kill && cur.valid;

  always_comb begin
    out = cur;
    if (kill) out.valid = 1'b0;
  end

endmodule
