// Optional pipeline register (delay) of the universal pipeline.
//
// The universal pipeline contains a register at every place one may go;
// a Boolean per place decides whether it is there. With PRESENT=1 this is
// a parcel register that clears to a bubble on reset and, when hold is
// asserted, keeps its contents (used by the stall unit's "sit still").
// With PRESENT=0 it is a plain wire and hold is ignored, which is how the
// document's generated code treats an absent register.
module dlx_pipe_reg
  import dlx_pkg::*;
#(
  parameter bit PRESENT = 1'b1
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    hold,
  input  parcel_t d,
  output parcel_t q
);
  if (PRESENT) begin : g_reg
    parcel_t r;
    always_ff @(posedge clk) begin
      if (rst)        r <= BUBBLE;
      else if (!hold) r <= d;
    end
    assign q = r;
  end else begin : g_wire
    assign q = d;
  end

endmodule
