// tb_solver: end-to-end check of the solver against the real-valued reference.
//
// Drives the solver with the model constants of a small traction-converter
// branch set (L = 3/3.3/2.7 mH, R_as = 0.2 ohm, R_c = 10 ohm, C1 = 2 mF,
// U_D = 1.2 V, U_T = 1.5 V, h = 6.25 us), a 50 Hz primary voltage and
// sine-triangle gate signals, and walks through the connection sequence:
// charging over R_c, R_c bridged, load connected with the bridges switching,
// one branch disconnected. After every step all outputs and the three
// state indices are compared with rect_ref_pkg::step. It also checks that a
// step fits in the 250-clock step period, that a start during a step is
// refused with overrun, and that every state 1..7, a change of current
// direction through the vanishing open state and the open-state correction
// all occur.
module tb_solver;
  import fp_pkg::*;
  import rect_pkg::*;
  import rect_ref_pkg::*;

  localparam int    STEPS = 3000;
  localparam real   H     = 6.25e-6;

  logic clk = 1'b0;
  logic rst, step_start, busy, step_done, overrun;
  logic [15:0] step_cycles;
  model_par_t par;
  conn_par_t  cpar;
  fp64_t      uap;
  pwm_t [NBR-1:0] pwm;
  model_out_t mo;

  int checks = 0, failures = 0;
  int seen_state [8];
  int n_trans = 0, n_corr = 0, n_overrun = 0, max_cycles = 0;

  solver dut (
    .clk(clk), .rst(rst), .step_start(step_start), .par(par), .cpar(cpar), .uap(uap),
    .pwm(pwm), .busy(busy), .step_done(step_done), .overrun(overrun),
    .step_cycles(step_cycles), .mo(mo)
  );

  always #5 clk = ~clk;

  function automatic fp64_t d(real x);
    return $realtobits(x);
  endfunction
  function automatic real rl(fp64_t x);
    return $bitstoreal(x);
  endfunction

  task automatic chk(string what, real got, real exp_v);
    checks++;
    if (!close(got, exp_v)) begin
      failures++;
      if (failures < 20) $display("%s: got %g expected %g", what, got, exp_v);
    end
  endtask

  ref_in_t in;
  ref_st_t rs;
  real lval [3] = '{3.0e-3, 3.3e-3, 2.7e-3};

  initial begin
    bit tr[3], co[3];
    real t;
    rst = 1'b1; step_start = 1'b0;
    foreach (seen_state[j]) seen_state[j] = 0;
    // constants
    in.ud_f = 1.2; in.ut_f = 1.5; in.hc = H / 2.0e-3; in.imin = 0.01;
    for (int i = 0; i < 3; i++) begin
      in.ras[i] = 0.2; in.hl[i] = H / lval[i]; in.p[i] = 0.5;
      par.br[i].ras = d(in.ras[i]); par.br[i].rc = d(10.0);
      par.br[i].h_over_l = d(in.hl[i]); par.br[i].p = d(in.p[i]);
      rs.x[i] = 0; rs.st[i] = 1; rs.uav[i] = 0; rs.ur[i] = 0; rs.ul[i] = 0;
    end
    rs.ud = 0; rs.id = 0; rs.iap = 0;
    par.ud_fwd = d(in.ud_f); par.ut_fwd = d(in.ut_f);
    par.h_over_c = d(in.hc); par.ias_min = d(in.imin);
    cpar = '0; uap = '0; pwm = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    for (int n = 0; n < STEPS; n++) begin
      t = n * H;
      // connection sequence
      for (int i = 0; i < 3; i++) begin
        automatic bit s1 = 1;
        automatic bit s2 = (n >= 600);
        in.conn[i]   = s1 | s2;
        if (i == 2 && n >= 2400) in.conn[i] = 0;     // branch 3 taken out
        in.rc_eff[i] = s2 ? 0.0 : 10.0;
        in.p_eff[i]  = in.p[i];
        in.pwm[i]    = (n >= 1000) ? pwm_gen(t, 50.0, 900.0, 0.9, -0.3, i / 3.0) : 4'b0000;
        cpar.conn[i]   = in.conn[i];
        cpar.rc_eff[i] = d(in.rc_eff[i]);
        cpar.p_eff[i]  = d(in.p_eff[i]);
        pwm[i]         = in.pwm[i];
      end
      in.il  = (n >= 900) ? 6.65 : 0.0;
      in.uap = 500.0 * $sin(2.0 * 3.14159265358979 * 50.0 * t);
      cpar.il_eff = d(in.il);
      uap = d(in.uap);
      // start the step
      step_start = 1'b1;
      @(negedge clk);
      step_start = 1'b0;
      if (n == 5) begin
        // a second start while busy must be refused
        repeat (3) @(negedge clk);
        step_start = 1'b1;
        @(negedge clk);
        step_start = 1'b0;
        checks++;
        if (!overrun) failures++;
        else n_overrun++;
      end
      while (!step_done) @(negedge clk);
      rs = step(rs, in, tr, co);
      for (int i = 0; i < 3; i++) begin
        chk($sformatf("n=%0d ias%0d", n, i + 1), rl(mo.ias[i]), rs.x[i]);
        chk($sformatf("n=%0d uav%0d", n, i + 1), rl(mo.uav[i]), rs.uav[i]);
        chk($sformatf("n=%0d ur%0d", n, i + 1), rl(mo.ur[i]), rs.ur[i]);
        chk($sformatf("n=%0d ul%0d", n, i + 1), rl(mo.ul[i]), rs.ul[i]);
        checks++;
        if (int'(mo.state[i]) != rs.st[i]) begin
          failures++;
          if (failures < 20) $display("n=%0d state%0d got %0d expected %0d", n, i + 1, mo.state[i], rs.st[i]);
        end
        seen_state[rs.st[i]]++;
        n_trans += tr[i];
        n_corr  += co[i];
      end
      chk($sformatf("n=%0d ud", n), rl(mo.ud), rs.ud);
      chk($sformatf("n=%0d id", n), rl(mo.id), rs.id);
      chk($sformatf("n=%0d iap", n), rl(mo.iap), rs.iap);
      chk($sformatf("n=%0d uap", n), rl(mo.uap), in.uap);
      checks++;
      if (step_cycles > 16'd250 || step_cycles == 0) begin
        failures++;
        $display("step took %0d clocks", step_cycles);
      end
      if (int'(step_cycles) > max_cycles) max_cycles = step_cycles;
      // the timing of the next start is irrelevant to the solver
      @(negedge clk);
      // keep the state of the reference in sync when hardware and reference
      // disagree, so that one error is not reported on every later step
      if (failures > 0) begin
        for (int i = 0; i < 3; i++) begin
          rs.x[i] = rl(mo.ias[i]); rs.st[i] = mo.state[i];
          rs.ur[i] = rl(mo.ur[i]); rs.ul[i] = rl(mo.ul[i]);
        end
        rs.ud = rl(mo.ud);
      end
    end

    for (int s = 1; s <= 7; s++) begin
      checks++;
      if (seen_state[s] == 0) begin
        failures++;
        $display("state %0d never reached", s);
      end
    end
    checks += 3;
    if (n_trans == 0) begin failures++; $display("no direction change through open state"); end
    if (n_corr == 0)  begin failures++; $display("no open-state correction"); end
    if (n_overrun == 0) failures++;
    $display("states 1..7 visited: %0d %0d %0d %0d %0d %0d %0d; direction changes %0d; corrections %0d; max step %0d clocks; u_d = %g V",
             seen_state[1], seen_state[2], seen_state[3], seen_state[4], seen_state[5],
             seen_state[6], seen_state[7], n_trans, n_corr, max_cycles, rl(mo.ud));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (STEPS * 300 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
