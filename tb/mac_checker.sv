// Drives one MAC pipeline configuration through the program of mac_tb_pkg
// and checks it.
//
// The checker first loads the initial register values, then schedules the
// program for this configuration the way the document leaves it to the
// compiler: each instruction issues, in program order, in the earliest
// cycle where it needs no unit another instruction holds (ADD, RND), where
// every operand is readable (a result can be read in the cycle RND makes
// it only by a unit that has a bypass, otherwise from the next cycle on),
// and where its result cannot overtake an older write or be seen by an
// older read of the same register. It then feeds that schedule cycle by
// cycle and compares every write-back, in order, with the reference, and
// the final register file. It also checks the issue-to-write latency and
// that the schedule reaches the bypasses.
module mac_checker
  import mac_pkg::*;
  import mac_tb_pkg::*;
#(
  parameter bit MULDEL = 1'b1,
  parameter bit ADDDEL = 1'b1
) (
  input  logic            clk,
  input  logic            start,
  output logic            rst,
  output minstr_t         inp,
  input  mres_t           wb,
  output logic            rf_ld_we,
  output logic [RA_W-1:0] rf_ld_addr,
  output logic [31:0]     rf_ld_data,
  output logic [RA_W-1:0] rf_dbg_addr,
  input  logic [31:0]     rf_dbg_data,
  input  logic            ev_byp_mul,
  input  logic            ev_byp_add,
  output logic            done,
  output int              checks,
  output int              failures,
  output int              n_byp_mul,
  output int              n_byp_add,
  output int              n_cycles
);
  localparam int MAXC = 6 * MAXP;
  localparam int NEG  = -1000;

  minstr_t sched [MAXC];
  int      issue_at [MAXP];
  int      sched_len;

  // cycle in which the instruction reaches RND
  function automatic int rnd_off(mop_e op);
    case (op)
      M_ADD:   return int'(ADDDEL);
      M_MUL:   return int'(MULDEL);
      default: return int'(MULDEL) + int'(ADDDEL);
    endcase
  endfunction

  function automatic bit readable(int r_cycle, int w_cycle, bit byp);
    return (r_cycle > w_cycle) || (byp && r_cycle == w_cycle);
  endfunction

  task automatic make_schedule();
    bit add_busy [MAXC];
    bit rnd_busy [MAXC];
    int wr_rnd [NREG];      // RND cycle of the latest writer of each register
    int last_rd [NREG];     // latest cycle any scheduled instruction reads it
    int t, last_rnd, tr, ta;
    bit ok;
    minstr_t i;
    for (int c = 0; c < MAXC; c++) begin
      add_busy[c] = 0; rnd_busy[c] = 0; sched[c] = '0;
    end
    for (int r = 0; r < int'(NREG); r++) begin
      wr_rnd[r] = NEG; last_rd[r] = NEG;
    end
    t = 0;
    last_rnd = NEG;
    for (int n = 0; n < prog_len; n++) begin
      i = prog[n];
      forever begin
        ok = 1;
        tr = t + rnd_off(i.op);
        ta = (i.op == M_MAC) ? t + int'(MULDEL) : t;
        if (rnd_busy[tr] || tr <= last_rnd) ok = 0;
        if (i.op != M_MUL && add_busy[ta]) ok = 0;
        case (i.op)
          M_ADD: ok &= readable(t, wr_rnd[i.b], ADDDEL) && readable(t, wr_rnd[i.c], ADDDEL);
          M_MUL: ok &= readable(t, wr_rnd[i.b], MULDEL) && readable(t, wr_rnd[i.c], MULDEL);
          default: ok &= readable(t, wr_rnd[i.c], MULDEL) && readable(t, wr_rnd[i.d], MULDEL)
                         && readable(ta, wr_rnd[i.b], ADDDEL);
        endcase
        if (tr <= last_rd[i.a]) ok = 0;
        if (ok) break;
        t++;
      end
      sched[t] = i;
      issue_at[n] = t;
      rnd_busy[tr] = 1;
      if (i.op != M_MUL) add_busy[ta] = 1;
      last_rnd = tr;
      case (i.op)
        M_ADD: begin
          if (t > last_rd[i.b]) last_rd[i.b] = t;
          if (t > last_rd[i.c]) last_rd[i.c] = t;
        end
        M_MUL: begin
          if (t > last_rd[i.b]) last_rd[i.b] = t;
          if (t > last_rd[i.c]) last_rd[i.c] = t;
        end
        default: begin
          if (t > last_rd[i.c]) last_rd[i.c] = t;
          if (t > last_rd[i.d]) last_rd[i.d] = t;
          if (ta > last_rd[i.b]) last_rd[i.b] = ta;
        end
      endcase
      wr_rnd[i.a] = tr;
      t++;
    end
    sched_len = t + 4;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 10)
        $display("FAIL mac(MULDEL=%0d ADDDEL=%0d): %s", MULDEL, ADDDEL, what);
    end
  endtask

  int wr_seen;
  int cyc;

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (ev_byp_mul) n_byp_mul <= n_byp_mul + 1;
      if (ev_byp_add) n_byp_add <= n_byp_add + 1;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    n_byp_mul = 0; n_byp_add = 0; n_cycles = 0;
    wr_seen = 0; cyc = 0;
    rst = 1; inp = '0;
    rf_ld_we = 0; rf_ld_addr = '0; rf_ld_data = '0; rf_dbg_addr = '0;
    #1;            // the program is built at time 0
    make_schedule();
    wait (start);
    repeat (2) @(negedge clk);
    rst = 0;
    // load the initial registers while idle
    for (int r = 0; r < int'(NREG); r++) begin
      rf_ld_we = 1; rf_ld_addr = RA_W'(r); rf_ld_data = init_rf[r];
      @(negedge clk);
    end
    rf_ld_we = 0;
    // run the schedule: drive at negedge, sample writes before the next drive
    for (int c = 0; c < sched_len; c++) begin
      inp = (c < MAXC) ? sched[c] : '0;
      @(posedge clk);
      #1;
      if (wb.valid) begin
        if (wr_seen < prog_len) begin
          check(wb.a == prog[wr_seen].a && wb.value == exp_val[wr_seen],
                $sformatf("write %0d: r%0d=%h, expected r%0d=%h", wr_seen, wb.a, wb.value,
                          prog[wr_seen].a, exp_val[wr_seen]));
          // issued at cycle s, RND at s+off, in RNDWB right after that cycle's edge
          check(c == issue_at[wr_seen] + rnd_off(prog[wr_seen].op),
                $sformatf("write %0d latency: cycle %0d, issued %0d", wr_seen, c, issue_at[wr_seen]));
        end else begin
          check(0, "extra write");
        end
        wr_seen++;
      end
      @(negedge clk);
    end
    inp = '0;
    repeat (3) @(negedge clk);
    check(wr_seen == prog_len, $sformatf("%0d writes for %0d instructions", wr_seen, prog_len));
    for (int r = 0; r < int'(NREG); r++) begin
      rf_dbg_addr = RA_W'(r);
      #1;
      check(rf_dbg_data == final_rf[r], $sformatf("final r%0d=%h expected %h", r, rf_dbg_data, final_rf[r]));
    end
    // every bypass the configuration has must have been used, none otherwise
    check(MULDEL ? n_byp_mul > 0 : n_byp_mul == 0, "MUL bypass count");
    check(ADDDEL ? n_byp_add > 0 : n_byp_add == 0, "ADD bypass count");
    n_cycles = cyc;
    done = 1;
  end
endmodule
