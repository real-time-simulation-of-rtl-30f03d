// solver: one simulation step of the three-branch rectifier model per start.
//
// The model's state is x = (i_as1, i_as2, i_as3, u_d); its inputs are the
// secondary voltages (p_i * u_ap), the load current and the diode and
// transistor forward voltages. At step_start the solver copies the present
// inputs, parameters and gate signals into its register file and runs the
// step program of solver_pkg (transformer, Euler step over the sparse
// matrices, branch-by-branch state switching with open-state correction,
// matrix rebuild, output equation, primary current). It then raises
// step_done for one clock and presents all results in mo.
//
// Datapath: two binary64 multipliers and two binary64 adders (fully
// pipelined, operation_nd/rdy handshake), a register file of NRF words and
// the 52 matrix elements held in mat_q. Up to two arithmetic instructions
// issue per clock, in program order; a scoreboard bit per register stalls an
// instruction whose sources or destination still wait for a result, and the
// destination of every operation in flight travels in a small tag FIFO
// beside each unit, popped on rdy. The state switch and the matrix rebuild
// wait until no operation is in flight. Step latency depends only on the
// unit latencies (148 clocks with 6-cycle units); a step_start that
// arrives while a step is running is ignored and reported on overrun.
// The two-multiplier, two-adder budget, the sparse evaluation and the order
// of the step follow the model; the dual-issue scoreboard scheduler is this
// design's way of ordering the operations onto the units.
module solver
  import fp_pkg::*;
  import rect_pkg::*;
  import solver_pkg::*;
#(
  parameter int unsigned MUL_LATENCY = 6,
  parameter int unsigned ADD_LATENCY = 6
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            step_start,
  input  model_par_t      par,
  input  conn_par_t       cpar,
  input  fp64_t           uap,
  input  pwm_t [NBR-1:0]  pwm,
  output logic            busy,
  output logic            step_done,
  output logic            overrun,
  output logic [15:0]     step_cycles,  // clocks used by the last step
  output model_out_t      mo
);

  // ------------------------------------------------------------------
  // state
  fp64_t            rf [NRF];
  logic [NRF-1:0]   pend;
  mat_t             mat_q, mat_d;
  state_idx_t [NBR-1:0] st_q;
  pwm_t [NBR-1:0]   pwm_q;
  logic [NBR-1:0]   conn_q;
  fp64_t            imin_q;
  logic [7:0]       pc;
  logic [15:0]      cyc;

  // ------------------------------------------------------------------
  // operand read: registers, then matrix elements
  function automatic fp64_t src(raddr_t a);
    if (int'(a) >= MAT_BASE) return mat_q[64 * (int'(a) - MAT_BASE) +: 64];
    if (int'(a) < NRF) return rf[7'(a)];
    return FP_ZERO;
  endfunction

  function automatic logic is_pend(raddr_t a);
    return (int'(a) < NRF) && pend[7'(a)];
  endfunction

  function automatic logic is_arith(op_e op);
    return op == OP_MUL || op == OP_ADD || op == OP_SUB || op == OP_SUBC;
  endfunction

  function automatic logic is_mul(op_e op);
    return op == OP_MUL;
  endfunction

  // ------------------------------------------------------------------
  // matrix builder and switching managers (combinational)
  fp64_t [NBR-1:0] hl_v, hrl_v, r_v;
  state_idx_t [NBR-1:0] nxt;
  logic [NBR-1:0] open_n;

  always_comb begin
    for (int i = 0; i < NBR; i++) begin
      hl_v[i]  = rf[7'(r(R_HL, i))];
      hrl_v[i] = rf[7'(r(R_HRL, i))];
      r_v[i]   = rf[7'(r(R_REFF, i))];
    end
  end

  matrix_builder u_mb (
    .state(st_q), .h_over_l(hl_v), .hr_over_l(hrl_v), .r(r_v),
    .h_over_c(rf[7'(R_HC)]), .mat(mat_d)
  );

  for (genvar g = 0; g < NBR; g++) begin : g_sw
    switch_manager u_sm (
      .prev_state(st_q[g]), .connected(conn_q[g]), .pwm(pwm_q[g]),
      .ias(rf[7'(R_X + g)]), .v(rf[7'(R_V + g)]), .uas(rf[7'(R_UAS + g)]),
      .thr_d2(rf[7'(R_THD)]), .thr_t2(rf[7'(R_THT)]), .thr_dt(rf[7'(R_UDUT)]),
      .i_min(imin_q), .next_state(nxt[g]), .open_now(open_n[g])
    );
  end

  // ------------------------------------------------------------------
  // issue logic
  instr_t i0, i1;
  logic   rdy0, rdy1, iss0, iss1, drained, fin;

  assign i0 = PROG[pc];
  assign i1 = PROG[(int'(pc) + 1) % PROG_LEN];
  assign drained = (pend == '0);

  always_comb begin
    rdy0 = 1'b0;
    rdy1 = 1'b0;
    if (is_arith(i0.op))
      rdy0 = !is_pend(i0.a) && !is_pend(i0.b) && !is_pend(i0.dst);
    else
      rdy0 = drained;
    if (is_arith(i0.op) && is_arith(i1.op))
      rdy1 = !is_pend(i1.a) && !is_pend(i1.b) && !is_pend(i1.dst) &&
             i1.a != i0.dst && i1.b != i0.dst && i1.dst != i0.dst;
    iss0 = busy && rdy0 && i0.op != OP_END;
    iss1 = iss0 && rdy1;
    fin  = busy && rdy0 && i0.op == OP_END;
  end

  // operand preparation for one issued instruction
  function automatic fp64_t opb(instr_t x, state_idx_t [NBR-1:0] st);
    fp64_t v = src(x.b);
    case (x.op)
      OP_SUB:  return fp_neg(v);
      OP_SUBC: return (st[x.br] == ST_OPEN) ? fp_neg(v) : FP_ZERO;
      default: return v;
    endcase
  endfunction

  // unit inputs: slot 0 uses unit 0 of its kind; slot 1 uses unit 1 of its
  // kind if both slots are of the same kind, else unit 0 of its own kind.
  fp64_t mul_a [2], mul_b [2], add_a [2], add_b [2];
  logic  [1:0] mul_nd, add_nd;
  raddr_t mul_tag [2], add_tag [2];

  always_comb begin
    for (int u = 0; u < 2; u++) begin
      mul_a[u] = FP_ZERO; mul_b[u] = FP_ZERO; mul_tag[u] = R_ZERO;
      add_a[u] = FP_ZERO; add_b[u] = FP_ZERO; add_tag[u] = R_ZERO;
    end
    mul_nd = '0;
    add_nd = '0;
    if (iss0) begin
      if (is_mul(i0.op)) begin
        mul_nd[0] = 1'b1; mul_a[0] = src(i0.a); mul_b[0] = opb(i0, st_q); mul_tag[0] = i0.dst;
      end else begin
        add_nd[0] = 1'b1; add_a[0] = src(i0.a); add_b[0] = opb(i0, st_q); add_tag[0] = i0.dst;
      end
    end
    if (iss1) begin
      if (is_mul(i1.op)) begin
        if (is_mul(i0.op)) begin
          mul_nd[1] = 1'b1; mul_a[1] = src(i1.a); mul_b[1] = opb(i1, st_q); mul_tag[1] = i1.dst;
        end else begin
          mul_nd[0] = 1'b1; mul_a[0] = src(i1.a); mul_b[0] = opb(i1, st_q); mul_tag[0] = i1.dst;
        end
      end else begin
        if (!is_mul(i0.op)) begin
          add_nd[1] = 1'b1; add_a[1] = src(i1.a); add_b[1] = opb(i1, st_q); add_tag[1] = i1.dst;
        end else begin
          add_nd[0] = 1'b1; add_a[0] = src(i1.a); add_b[0] = opb(i1, st_q); add_tag[0] = i1.dst;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // arithmetic units and their destination tag FIFOs
  logic  [3:0] u_rdy;
  fp64_t       u_res [4];
  raddr_t      u_tag [4];
  logic  [3:0] tag_empty;

  for (genvar u = 0; u < 2; u++) begin : g_units
    logic rfd_m, rfd_a, full_m, full_a;
    fp_mul #(.LATENCY(MUL_LATENCY)) u_mul (
      .clk(clk), .sclr(rst), .ce(1'b1), .a(mul_a[u]), .b(mul_b[u]),
      .operation_nd(mul_nd[u]), .operation_rfd(rfd_m), .rdy(u_rdy[u]), .result(u_res[u])
    );
    fp_add #(.LATENCY(ADD_LATENCY)) u_add (
      .clk(clk), .sclr(rst), .ce(1'b1), .a(add_a[u]), .b(add_b[u]),
      .operation_nd(add_nd[u]), .operation_rfd(rfd_a), .rdy(u_rdy[2+u]), .result(u_res[2+u])
    );
    sync_fifo #(.WIDTH(8), .DEPTH(16)) u_tag_m (
      .clk(clk), .rst(rst), .wr_en(mul_nd[u]), .wr_data(mul_tag[u]), .full(full_m),
      .rd_en(u_rdy[u]), .rd_data(u_tag[u]), .empty(tag_empty[u]), .count()
    );
    sync_fifo #(.WIDTH(8), .DEPTH(16)) u_tag_a (
      .clk(clk), .rst(rst), .wr_en(add_nd[u]), .wr_data(add_tag[u]), .full(full_a),
      .rd_en(u_rdy[2+u]), .rd_data(u_tag[2+u]), .empty(tag_empty[2+u]), .count()
    );
    a_rfd_m: assert property (@(posedge clk) disable iff (rst) mul_nd[u] |-> rfd_m);
    a_rfd_a: assert property (@(posedge clk) disable iff (rst) add_nd[u] |-> rfd_a);
    // a unit never holds more operations than its tag FIFO has room for
    a_tag_m: assert property (@(posedge clk) disable iff (rst) mul_nd[u] |-> !full_m);
    a_tag_a: assert property (@(posedge clk) disable iff (rst) add_nd[u] |-> !full_a);
  end

  // every result must have an outstanding destination
  for (genvar u = 0; u < 4; u++) begin : g_chk
    a_tag: assert property (@(posedge clk) disable iff (rst) u_rdy[u] |-> !tag_empty[u]);
  end

  // ------------------------------------------------------------------
  // sequencer, register file, scoreboard
  logic [NRF-1:0] set_m, clr_m;

  always_comb begin
    set_m = '0;
    clr_m = '0;
    if (iss0 && is_arith(i0.op)) set_m[7'(i0.dst)] = 1'b1;
    if (iss1) set_m[7'(i1.dst)] = 1'b1;
    for (int u = 0; u < 4; u++) if (u_rdy[u]) clr_m[7'(u_tag[u])] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < NRF; j++) rf[7'(j)] <= FP_ZERO;
      pend        <= '0;
      mat_q       <= '0;
      st_q        <= {NBR{ST_OPEN}};
      pwm_q       <= '0;
      conn_q      <= '0;
      imin_q      <= FP_ZERO;
      pc          <= '0;
      cyc         <= '0;
      busy        <= 1'b0;
      step_done   <= 1'b0;
      overrun     <= 1'b0;
      step_cycles <= '0;
      mo          <= '0;
    end else begin
      step_done <= 1'b0;
      overrun   <= 1'b0;
      pend      <= (pend & ~clr_m) | set_m;
      // results
      for (int u = 0; u < 4; u++) if (u_rdy[u]) rf[7'(u_tag[u])] <= u_res[u];
      if (busy) cyc <= cyc + 1'b1;

      if (step_start && busy) overrun <= 1'b1;
      if (step_start && !busy) begin
        busy   <= 1'b1;
        pc     <= '0;
        cyc    <= 16'd1;
        pwm_q  <= pwm;
        conn_q <= cpar.conn;
        imin_q <= par.ias_min;
        rf[7'(R_UAP)] <= uap;
        rf[7'(R_IL)]  <= cpar.il_eff;
        rf[7'(R_UDF)] <= par.ud_fwd;
        rf[7'(R_UTF)] <= par.ut_fwd;
        rf[7'(R_HC)]  <= par.h_over_c;
        for (int i = 0; i < NBR; i++) begin
          rf[7'(r(R_RAS, i))] <= par.br[i].ras;
          rf[7'(r(R_RCE, i))] <= cpar.rc_eff[i];
          rf[7'(r(R_HL, i))]  <= par.br[i].h_over_l;
          rf[7'(r(R_PE, i))]  <= cpar.p_eff[i];
          rf[7'(r(R_P, i))]   <= par.br[i].p;
        end
      end

      if (iss0) begin
        case (i0.op)
          OP_SW: begin
            st_q[i0.br] <= nxt[i0.br];
            if (open_n[i0.br]) rf[7'(r(R_X, int'(i0.br)))] <= FP_ZERO;
          end
          OP_BUILD: mat_q <= mat_d;
          default: ;
        endcase
        pc <= pc + (iss1 ? 8'd2 : 8'd1);
      end

      if (fin) begin
        busy        <= 1'b0;
        step_done   <= 1'b1;
        step_cycles <= cyc;
        for (int i = 0; i < NBR; i++) begin
          mo.ias[i] <= rf[7'(r(R_X, i))];
          mo.uav[i] <= rf[7'(r(R_UAV, i))];
          mo.ur[i]  <= rf[7'(r(R_UR, i))];
          mo.ul[i]  <= rf[7'(r(R_UL, i))];
        end
        mo.ud    <= rf[7'(R_XD)];
        mo.id    <= rf[7'(R_ID)];
        mo.iap   <= rf[7'(R_IAP)];
        mo.uap   <= rf[7'(R_UAP)];
        mo.state <= st_q;
        mo.pwm   <= pwm_q;
      end
    end
  end

  a_no_issue_idle: assert property (@(posedge clk) disable iff (rst) iss0 |-> busy);

endmodule
