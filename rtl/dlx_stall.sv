// Stall unit.
//
// Sits in front of a pipeline register. While the detect unit signals a
// stall, it feeds the register its own output (the instruction processed
// last cycle) instead of the incoming instruction, so the stage "sits
// still" and the instruction is processed again next cycle; otherwise the
// incoming instruction passes. The incoming instruction dropped during a
// stall is fetched again because the pc selector holds the pc in the same
// cycle. Combinational.
//
// Interface: in (arriving parcel), held (output of the following register)
// and stall in; out parcel.
// Document: the stall unit and the "sit still" behaviour (Sec. 2.5.2).
// Own choice: how the stall is done (a feedback multiplexer in front of
// the register); the document does not say.
module dlx_stall
  import dlx_pkg::*;
(
  input  parcel_t in,       // instruction arriving from the previous unit
  input  parcel_t held,     // output of the following pipeline register
  input  logic    stall,    // from the detect unit
  output parcel_t out
);
  assign out = stall ? held : in;

endmodule
