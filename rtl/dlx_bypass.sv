// Bypass (forwarding) unit.
//
// Takes the parcel flowing through its stage (cur) and a parcel passed
// back from a later stage (src). If src is a valid instruction whose result
// is already computed (res_ready) and that writes a register cur reads,
// the corresponding operand value of cur is replaced with src's result;
// otherwise cur passes unchanged. hit reports that a value was forwarded.
// A load seen at the EX output has no result yet, so it is not forwarded;
// the detect unit stalls that case instead. When several bypasses are
// chained, the one fed from the nearest (youngest) older instruction comes
// last so that its value wins. Purely combinational.
//
// Interface: cur and src parcels in, out parcel and hit out.
// Document: the bypass unit and its placement rules (Sec. 2.5.1, Fig. 2.23).
// Own choice: the res_ready flag that keeps a load at EX from being
// forwarded, and the hit output.
module dlx_bypass
  import dlx_pkg::*;
(
  input  parcel_t cur,
  input  parcel_t src,
  output parcel_t out,
  output logic    hit
);
  logic fwd_ok, m1, m2;
  assign fwd_ok = cur.valid && src.valid && src.wr_rd && src.res_ready && (src.rd != '0);
  assign m1     = fwd_ok && cur.use_rs1 && (cur.rs1 == src.rd);
  assign m2     = fwd_ok && cur.use_rs2 && (cur.rs2 == src.rd);

  always_comb begin
    out = cur;
    if (m1) out.val1 = src.result;
    if (m2) out.val2 = src.result;
  end
  assign hit = m1 || m2;

endmodule
