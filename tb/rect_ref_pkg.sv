// rect_ref_pkg: behavioural reference of the rectifier model for testbenches.
//
// Computes one simulation step with the simulator's real (binary64)
// arithmetic, written directly from the circuit equations: per-branch
// bridge voltage coefficients, explicit Euler step, the grouped state
// selection with the vanishing open state, the open-state correction of u_d,
// and the outputs with the new states. Sums are taken in the same order as
// the hardware program so that results agree to the last bit in normal
// operation; testbenches still compare with a small relative tolerance.
package rect_ref_pkg;

  typedef struct {
    real ras[3], rc_eff[3], hl[3], p[3], p_eff[3];
    real ud_f, ut_f, hc, imin, il, uap;
    bit  conn[3];
    bit [3:0] pwm[3];
  } ref_in_t;

  typedef struct {
    real x[3], ud;
    int  st[3];
    real uav[3], ur[3], ul[3], id, iap;
  } ref_st_t;

  function automatic int kk(int s);
    return (s == 2 || s == 6) ? 1 : (s == 3 || s == 7) ? -1 : 0;
  endfunction
  function automatic int aS(int s);
    return s == 1 ? 1 : 0;
  endfunction
  function automatic int aD(int s);
    case (s) 2: return 2; 3: return -2; 4: return -1; 5: return 1; default: return 0; endcase
  endfunction
  function automatic int aT(int s);
    case (s) 4: return -1; 5: return 1; 6: return -2; 7: return 2; default: return 0; endcase
  endfunction

  // one group of states: positive (g=1) or negative (g=2) branch current
  function automatic int grp(int g, real i, real v, real ud, real udf, real utf,
                             real imin, bit [3:0] pwm);
    int s = 1;
    bit t1 = pwm[0], t2 = pwm[1], t3 = pwm[2], t4 = pwm[3];
    if (g == 1) begin
      bit fl = (i != 0.0) && (i >= imin);
      if (fl || v >= ud + 2.0 * udf) s = 2;
      if ((t2 || t3) && (fl || v >= udf + utf)) s = 5;
      if ((t2 && t3) && (fl || v >= -(ud - 2.0 * utf))) s = 7;
    end else begin
      bit fl = (i != 0.0) && (i <= -imin);
      if (fl || v <= -(ud + 2.0 * udf)) s = 3;
      if ((t1 || t4) && (fl || v <= -(udf + utf))) s = 4;
      if ((t1 && t4) && (fl || v <= ud - 2.0 * utf)) s = 6;
    end
    return s;
  endfunction

  function automatic int choose(int prev, real i, real v, real uas, real ud,
                                real udf, real utf, real imin, bit [3:0] pwm, bit conn);
    int n, a, b;
    if (!conn) return 1;
    if (prev == 2 || prev == 5 || prev == 7) begin
      n = grp(1, i, v, ud, udf, utf, imin, pwm);
      if (n == 1) n = grp(2, 0.0, uas, ud, udf, utf, imin, pwm);
    end else if (prev == 3 || prev == 4 || prev == 6) begin
      n = grp(2, i, v, ud, udf, utf, imin, pwm);
      if (n == 1) n = grp(1, 0.0, uas, ud, udf, utf, imin, pwm);
    end else begin
      a = grp(1, i, v, ud, udf, utf, imin, pwm);
      b = grp(2, i, v, ud, udf, utf, imin, pwm);
      n = a > b ? a : b;
    end
    return n;
  endfunction

  // One step. Returns the state after the step; trans[i] is set when
  // branch i changed current direction through the vanishing open state,
  // corr[i] when branch i was forced open with non-zero current.
  function automatic ref_st_t step(ref_st_t s, ref_in_t in, output bit trans[3],
                                   output bit corr[3]);
    ref_st_t o = s;
    real uas[3], r[3], hrl[3], v[3], q[3], q4, ud2, udut, ut2, td, t5, t6, xn[3];
    real a4[3];
    for (int i = 0; i < 3; i++) begin
      trans[i] = 0;
      corr[i]  = 0;
      uas[i] = in.p_eff[i] * in.uap;
      r[i]   = in.ras[i] + in.rc_eff[i];
      hrl[i] = in.hl[i] * r[i];
      v[i]   = (uas[i] - s.ur[i]) - s.ul[i];
    end
    ud2  = in.ud_f + in.ud_f;
    udut = in.ud_f + in.ut_f;
    ut2  = in.ut_f + in.ut_f;
    // Euler step with the matrices of the present states
    for (int i = 0; i < 3; i++) begin
      a4[i] = kk(s.st[i]) * in.hc;
      q[i]  = a4[i] * s.x[i];
    end
    q4 = -in.hc * in.il;
    for (int i = 0; i < 3; i++) begin
      real t0, t1, t2, t3, t4;
      bit op = (s.st[i] == 1);
      t0 = (op ? 0.0 : -hrl[i]) * s.x[i];
      t1 = (-kk(s.st[i]) * in.hl[i]) * s.ud;
      t2 = (op ? 0.0 : in.hl[i]) * uas[i];
      t3 = (-aD(s.st[i]) * in.hl[i]) * in.ud_f;
      t4 = (-aT(s.st[i]) * in.hl[i]) * in.ut_f;
      t5 = (t0 + t1) + t4;
      t6 = (t2 + t3) + s.x[i];
      xn[i] = t5 + t6;
    end
    td = (q[0] + q[1]) + (q[2] + q4);
    o.ud = s.ud + td;
    for (int i = 0; i < 3; i++) o.x[i] = xn[i];
    // state switching, branch after branch
    for (int i = 0; i < 3; i++) begin
      int n;
      real thd = o.ud + ud2, tht = o.ud - ut2;
      n = choose(s.st[i], o.x[i], v[i], uas[i], o.ud, in.ud_f, in.ut_f, in.imin,
                 in.pwm[i], in.conn[i]);
      if (((s.st[i] == 2 || s.st[i] == 5 || s.st[i] == 7) && (n == 3 || n == 4 || n == 6)) ||
          ((s.st[i] == 3 || s.st[i] == 4 || s.st[i] == 6) && (n == 2 || n == 5 || n == 7)))
        trans[i] = 1;
      if (n == 1) begin
        if (o.x[i] != 0.0) corr[i] = 1;
        o.x[i] = 0.0;
        o.ud = o.ud - q[i];
      end
      o.st[i] = n;
    end
    // outputs with the new states
    for (int i = 0; i < 3; i++) begin
      int n = o.st[i];
      bit op = (n == 1);
      o.uav[i] = (kk(n) * o.ud + aS(n) * uas[i]) + (aD(n) * in.ud_f + aT(n) * in.ut_f);
      o.ur[i]  = r[i] * o.x[i];
      o.ul[i]  = (((op ? 0.0 : -r[i]) * o.x[i] + (-kk(n)) * o.ud) + (-aT(n)) * in.ut_f) +
                 ((1 - aS(n)) * uas[i] + (-aD(n)) * in.ud_f);
    end
    o.id  = (kk(o.st[0]) * o.x[0] + kk(o.st[1]) * o.x[1]) + kk(o.st[2]) * o.x[2];
    o.iap = (in.p[0] * o.x[0] + in.p[1] * o.x[1]) + in.p[2] * o.x[2];
    return o;
  endfunction

  // Test stimulus: unipolar sine-triangle modulation of one bridge at
  // carrier frequency fc, carrier shifted by 'shift' periods per branch.
  // Leg A: T1 = ref > carrier, T2 = not T1; leg B: T3 = -ref > carrier,
  // T4 = not T3. Returns bit 0 = T1 ... bit 3 = T4.
  function automatic bit [3:0] pwm_gen(real t, real f, real fc, real m, real phi,
                                       real shift);
    real ph, car, rf;
    rf  = m * $sin(2.0 * 3.14159265358979 * f * t + phi);
    ph  = t * fc + shift;
    ph  = ph - $floor(ph);
    car = (ph < 0.5) ? (4.0 * ph - 1.0) : (3.0 - 4.0 * ph);
    return {!(-rf > car), (-rf > car), !(rf > car), (rf > car)};
  endfunction

  function automatic bit close(real a, real b);
    real d = a - b;
    real m = (a < 0 ? -a : a);
    if (d < 0) d = -d;
    return d <= 1.0e-9 * (m > 1.0 ? m : 1.0);
  endfunction

endpackage
