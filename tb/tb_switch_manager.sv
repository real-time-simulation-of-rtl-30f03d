// tb_switch_manager: random and directed check of the branch state chooser.
//
// Random previous states, branch currents near and away from the threshold
// I_min, source voltages spread around every state's voltage bound, random
// gate words and connection flags are applied; the chosen state is compared
// with rect_ref_pkg::choose, an independent real-valued statement of the
// same rules. Directed cases: the published state 3 condition (current
// continuing negative, or zero current with -u_as + u_R + u_L - u_d >= 2U_D),
// a current reversal out of state 5 through the vanishing open state into
// state 3, and a disconnected branch.
module tb_switch_manager;
  import fp_pkg::*;
  import rect_pkg::*;
  import rect_ref_pkg::*;

  state_idx_t prev, nxt;
  logic conn, open_now;
  pwm_t pwm;
  fp64_t ias, v, uas, thd, tht, thdt, imin;

  int checks = 0, failures = 0;
  int seen [8];

  switch_manager dut (
    .prev_state(prev), .connected(conn), .pwm(pwm), .ias(ias), .v(v), .uas(uas),
    .thr_d2(thd), .thr_t2(tht), .thr_dt(thdt), .i_min(imin), .next_state(nxt),
    .open_now(open_now)
  );

  real ud, udf, utf, im;

  task automatic apply(int p, real i, real vv, real ua, bit [3:0] g, bit c, int expect_s = 0);
    int e;
    prev = 3'(p); ias = $realtobits(i); v = $realtobits(vv); uas = $realtobits(ua);
    pwm = g; conn = c;
    thd = $realtobits(ud + 2.0 * udf); tht = $realtobits(ud - 2.0 * utf);
    thdt = $realtobits(udf + utf); imin = $realtobits(im);
    #1;
    e = choose(p, i, vv, ua, ud, udf, utf, im, g, c);
    checks += 2;
    if (int'(nxt) != e) begin
      failures++;
      if (failures < 20) $display("prev=%0d i=%g v=%g uas=%g pwm=%b conn=%0d: got %0d expected %0d",
                                  p, i, vv, ua, g, c, nxt, e);
    end
    if (open_now != (e == 1)) failures++;
    if (expect_s != 0) begin
      checks++;
      if (int'(nxt) != expect_s) begin
        failures++;
        $display("directed case: got %0d expected %0d", nxt, expect_s);
      end
    end
    seen[nxt]++;
  endtask

  function automatic real pick_v();
    real bounds [6];
    bounds = '{ud + 2 * udf, udf + utf, 2 * utf - ud, -(ud + 2 * udf), -(udf + utf), ud - 2 * utf};
    return bounds[$urandom_range(0, 5)] + ($urandom_range(0, 2000) - 1000.0) / 100.0;
  endfunction

  initial begin
    foreach (seen[j]) seen[j] = 0;
    udf = 1.2; utf = 1.5; im = 0.01; ud = 300.0;
    // directed: the published state 3 rules
    apply(3, -5.0, 0.0, 0.0, 4'b0000, 1, 3);                 // continuing negative current
    apply(1, 0.0, -(ud + 2 * udf) - 0.1, -310.0, 4'b0000, 1, 3);   // voltage starts D3, D2
    apply(1, 0.0, -(ud + 2 * udf) + 0.1, -300.0, 4'b0000, 1, 1);   // just too low: stays open
    // reversal out of state 5 (T2 on, current crossed zero) into state 3
    apply(5, -0.5, -305.0, -305.0, 4'b0010, 1, 3);
    // disconnected branch
    apply(2, 10.0, 400.0, 400.0, 4'b0000, 0, 1);
    // random
    for (int n = 0; n < 40000; n++) begin
      real i, vv, ua;
      ud = $urandom_range(0, 600);
      case ($urandom_range(0, 3))
        0: i = 0.0;
        1: i = ($urandom_range(0, 400) - 200.0) / 10000.0;    // around I_min
        default: i = ($urandom_range(0, 2000) - 1000.0) / 10.0;
      endcase
      vv = pick_v();
      ua = ($urandom_range(0, 1)) ? vv + ($urandom_range(0, 200) - 100.0) / 10.0 : pick_v();
      apply($urandom_range(1, 7), i, vv, ua, 4'($urandom), ($urandom_range(0, 9) != 0));
    end
    for (int s = 1; s <= 7; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("state %0d never chosen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
