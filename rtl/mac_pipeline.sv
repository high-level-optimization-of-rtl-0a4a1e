// Floating-point multiply accumulator (MAC) universal pipeline.
//
// Four functional units in a fork and join: an instruction enters MUL and
// ADD together; MUL feeds ADD (for B + C * D) and RND (for B * C); ADD feeds
// RND; RND feeds the RNDWB register and WB writes the register file. RNDWB
// is always present (write-before-read register file). Two further
// registers are optional, one after MUL (MULDEL) and one after ADD
// (ADDDEL); the four settings are the four MAC configurations and the
// default, both present, is the fully pipelined MAC, which here is also the
// universal pipeline. The only hazard hardware the rules place is bypasses
// from the RND output: to MUL's operands when MULDEL is present and to
// ADD's operands when ADDDEL is present.
//
// Scheduling. ADD takes the instruction coming out of the MUL path when it
// is a multiply-add, otherwise the newly issued instruction if that is an
// add. RND takes the ADD path when it carries an add or multiply-add,
// otherwise the MUL path when it carries a multiply. A multiply-add reads
// C and D in MUL in its issue cycle and B in ADD MULDEL cycles later, and
// reaches RND MULDEL+ADDDEL cycles after issue; a multiply reaches RND
// MULDEL cycles after issue, an add ADDDEL cycles after. As in the
// document, structural hazards (two instructions wanting ADD or RND in one
// cycle) and dependences the bypasses cannot cover are left to the
// instruction schedule; assertions flag a schedule that breaks the first.
// A result is visible to a read in the cycle RND produces it when that
// reader has a bypass, and from the next cycle on otherwise.
module mac_pipeline
  import mac_pkg::*;
#(
  parameter bit MULDEL = 1'b1,
  parameter bit ADDDEL = 1'b1
) (
  input  logic            clk,
  input  logic            rst,
  input  minstr_t         inp,          // one instruction per cycle (or invalid)
  output mres_t           wb,           // result being written back (RNDWB)
  input  logic            rf_ld_we,     // register load port (use while idle)
  input  logic [RA_W-1:0] rf_ld_addr,
  input  logic [31:0]     rf_ld_data,
  input  logic [RA_W-1:0] rf_dbg_addr,
  output logic [31:0]     rf_dbg_data,
  output logic            ev_byp_mul,   // a MUL operand was forwarded
  output logic            ev_byp_add    // an ADD operand was forwarded
);
  logic [RA_W-1:0] raddr [4];
  logic [31:0]     rdata [4];
  mparcel_t mul_out, mul_q, add_out, add_q;
  mres_t    rnd_out, rndwb_q;
  minstr_t  add_ins;
  logic [31:0] mx, my, ax, ay;
  logic [1:0]  hm, ha;
  ufp_t        prod, sum, add_lhs, add_rhs, rnd_in;
  logic        add_from_mul, rnd_from_add, rnd_from_mul;

  // ---------------- MUL ----------------
  // MUL reads b,c for a multiply and c,d for a multiply-add
  assign raddr[0] = (inp.op == M_MAC) ? inp.c : inp.b;
  assign raddr[1] = (inp.op == M_MAC) ? inp.d : inp.c;

  if (MULDEL) begin : g_byp_mul
    mac_bypass u_bm0 (.raddr(raddr[0]), .rf_value(rdata[0]), .res(rnd_out), .value(mx), .hit(hm[0]));
    mac_bypass u_bm1 (.raddr(raddr[1]), .rf_value(rdata[1]), .res(rnd_out), .value(my), .hit(hm[1]));
  end else begin : g_no_byp_mul
    assign mx = rdata[0];
    assign my = rdata[1];
    assign hm = '0;
  end

  mac_mul u_mul (.x(mx), .y(my), .p(prod));

  always_comb begin
    mul_out.ins       = inp;
    mul_out.ins.valid = inp.valid && (inp.op == M_MUL || inp.op == M_MAC);
    mul_out.v         = prod;
  end

  if (MULDEL) begin : g_muldel
    always_ff @(posedge clk) begin
      if (rst) mul_q <= '0;
      else     mul_q <= mul_out;
    end
  end else begin : g_no_muldel
    assign mul_q = mul_out;
  end

  // ---------------- ADD ----------------
  assign add_from_mul = mul_q.ins.valid && (mul_q.ins.op == M_MAC);
  always_comb begin
    if (add_from_mul) begin
      add_ins = mul_q.ins;
    end else begin
      add_ins       = inp;
      add_ins.valid = inp.valid && (inp.op == M_ADD);
    end
  end
  assign raddr[2] = add_ins.b;
  assign raddr[3] = add_ins.c;

  if (ADDDEL) begin : g_byp_add
    mac_bypass u_ba0 (.raddr(raddr[2]), .rf_value(rdata[2]), .res(rnd_out), .value(ax), .hit(ha[0]));
    mac_bypass u_ba1 (.raddr(raddr[3]), .rf_value(rdata[3]), .res(rnd_out), .value(ay), .hit(ha[1]));
  end else begin : g_no_byp_add
    assign ax = rdata[2];
    assign ay = rdata[3];
    assign ha = '0;
  end

  assign add_lhs = unpack32(ax);
  assign add_rhs = add_from_mul ? mul_q.v : unpack32(ay);

  mac_add u_add (.x(add_lhs), .y(add_rhs), .s(sum));

  always_comb begin
    add_out.ins = add_ins;
    add_out.v   = sum;
  end

  if (ADDDEL) begin : g_adddel
    always_ff @(posedge clk) begin
      if (rst) add_q <= '0;
      else     add_q <= add_out;
    end
  end else begin : g_no_adddel
    assign add_q = add_out;
  end

  // ---------------- RND ----------------
  assign rnd_from_add = add_q.ins.valid;
  assign rnd_from_mul = mul_q.ins.valid && (mul_q.ins.op == M_MUL);
  assign rnd_in       = rnd_from_add ? add_q.v : mul_q.v;

  mac_rnd u_rnd (.u(rnd_in), .r(rnd_out.value));
  assign rnd_out.valid = rnd_from_add || rnd_from_mul;
  assign rnd_out.a     = rnd_from_add ? add_q.ins.a : mul_q.ins.a;

  always_ff @(posedge clk) begin
    if (rst) rndwb_q <= '0;
    else     rndwb_q <= rnd_out;
  end

  // ---------------- WB ----------------
  mac_regfile u_rf (
    .clk, .rst, .wb(rndwb_q), .ld_we(rf_ld_we), .ld_addr(rf_ld_addr), .ld_data(rf_ld_data),
    .raddr(raddr), .rdata(rdata),
    .dbg_addr(rf_dbg_addr), .dbg_data(rf_dbg_data)
  );

  assign wb         = rndwb_q;
  assign ev_byp_mul = mul_out.ins.valid && (|hm);
  assign ev_byp_add = add_ins.valid && (|ha);

  // Structural hazards are the schedule's responsibility.
  assert property (@(posedge clk) disable iff (rst)
      !(add_from_mul && inp.valid && inp.op == M_ADD))
    else $error("mac_pipeline: two instructions want ADD in one cycle");
  assert property (@(posedge clk) disable iff (rst) !(rnd_from_add && rnd_from_mul))
    else $error("mac_pipeline: two instructions want RND in one cycle");

endmodule
