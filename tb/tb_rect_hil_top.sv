// tb_rect_hil_top: end-to-end run of the whole real-time model at its
// default size (250-clock step, 10-step output loops, 1024-word host FIFOs).
//
// The testbench plays three parts. As the host it streams a 50 Hz primary
// voltage of 500 V amplitude and a 6.65 A load current, one frame per step,
// reads the target-to-host stream (pausing long enough for the FIFO to fill
// and frames to be dropped) and operates the contactors through the
// connection sequence, including both failure states. As the control unit
// it drives 900 Hz sine-triangle gate signals with the three carriers offset
// by a third of a period, and once shorts a bridge leg. Contactors and host
// frames change right after a step ends, so each step sees settled inputs;
// the gate signals run freely. As checker it recomputes every step with
// rect_ref_pkg from the inputs it applied and the gate words the model
// reports in mo (checked to have been on the pins during that step period),
// compares all outputs and states, checks each logged frame
// against the step it reports, checks the analog codes against the step
// they were taken from, and checks that exactly one step completes every
// 250 clocks. Each mechanism of the design is counted and must occur.
module tb_rect_hil_top;
  import fp_pkg::*;
  import rect_pkg::*;
  import rect_ref_pkg::*;

  localparam int  STEPS = 3200;
  localparam int  TICKS = 250;
  localparam real TCLK  = 25.0e-9;
  localparam real H     = TICKS * TCLK;
  localparam int  NCH   = 7;

  logic clk = 1'b0;
  logic rst;
  pwm_t [NBR-1:0] pwm_pin;
  logic signed [15:0] ao_code [NCH];
  logic ao_update;
  logic [3:0] sw;
  model_par_t par;
  logic signed [7:0] ao_shift [NCH];
  logic fault_clr;
  fp64_t h2t_data, t2h_data;
  logic h2t_valid, h2t_ready, t2h_valid, t2h_ready;
  model_out_t mo;
  logic step_done;
  logic [31:0] step_no, overruns, h2t_frames, t2h_frames, t2h_dropped;
  logic [15:0] step_cycles;
  logic [2:0] sys_state;
  logic failure;
  logic [NBR-1:0] shoot_through, pwm_fault;

  rect_hil_top dut (
    .clk(clk), .rst(rst), .pwm_pin(pwm_pin), .ao_code(ao_code), .ao_update(ao_update),
    .sw(sw), .par(par), .ao_shift(ao_shift), .fault_clr(fault_clr),
    .h2t_data(h2t_data), .h2t_valid(h2t_valid), .h2t_ready(h2t_ready),
    .t2h_data(t2h_data), .t2h_valid(t2h_valid), .t2h_ready(t2h_ready),
    .mo(mo), .step_done(step_done), .step_no(step_no), .step_cycles(step_cycles),
    .overruns(overruns), .sys_state(sys_state), .failure(failure),
    .shoot_through(shoot_through), .pwm_fault(pwm_fault), .h2t_frames(h2t_frames),
    .t2h_frames(t2h_frames), .t2h_dropped(t2h_dropped)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int seen_state [8];
  int seen_sys [8];
  int n_trans = 0, n_corr = 0, n_st = 0, n_ao = 0, n_frames_ok = 0, n_fail = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 25) $display("[%0d] %s", cycle, msg);
  endtask

  task automatic chk(string what, real got, real e);
    checks++;
    if (!close(got, e)) fail($sformatf("%s: got %g expected %g", what, got, e));
  endtask

  // ------------------------------------------------------------------
  // model constants
  ref_in_t in;
  ref_st_t rs;
  real lval [3] = '{3.0e-3, 3.3e-3, 2.7e-3};

  // inputs of the step in progress: set by the testbench right after the
  // previous step ended, so they are stable when the next step starts
  ref_in_t cur_in;
  longint  last_done = -1;

  // per-step results, for the logger and analog output checks
  model_out_t hist [int];

  // ------------------------------------------------------------------
  // control unit: gate signals, asynchronous to the steps; the pin values
  // of the last 512 clocks are kept to check the gate words a step used
  int pwm_on = 0, short_leg = 0;
  pwm_t [NBR-1:0] pin_hist [512];
  always @(negedge clk) begin
    pin_hist[cycle % 512] = pwm_pin;
    cycle++;
    for (int i = 0; i < NBR; i++) begin
      pwm_pin[i] <= pwm_on ? pwm_gen(cycle * TCLK, 50.0, 900.0, 0.9, -0.3, i / 3.0) : 4'b0000;
    end
    if (short_leg) pwm_pin[0] <= 4'b0011;
  end

  // effective model inputs for contactor word w
  function automatic ref_in_t inputs_for(ref_in_t base, logic [3:0] w, real il, real uap);
    ref_in_t r = base;
    for (int i = 0; i < NBR; i++) begin
      r.conn[i]   = w[1] | w[2];
      r.rc_eff[i] = w[2] ? 0.0 : 10.0;
      r.p_eff[i]  = w[0] ? r.p[i] : 0.0;
    end
    r.il  = w[3] ? il : 0.0;
    r.uap = uap;
    return r;
  endfunction

  // ------------------------------------------------------------------
  // check of one completed step against the reference
  task automatic check_step();
    bit tr[3], co[3];
    ref_in_t u = cur_in;
    chk($sformatf("step %0d uap", step_no), $bitstoreal(mo.uap), cur_in.uap);
    for (int i = 0; i < NBR; i++) begin
      // the gate word must be one the pins carried during this step period
      bit found = 0;
      for (int k = 1; k <= TICKS + 8; k++)
        if (pin_hist[(cycle - k) % 512][i] == mo.pwm[i]) found = 1;
      checks++;
      if (!found) fail($sformatf("step %0d branch %0d used a gate word never applied", step_no, i + 1));
      u.pwm[i] = mo.pwm[i];
    end
    rs = step(rs, u, tr, co);
    for (int i = 0; i < NBR; i++) begin
      chk($sformatf("step %0d ias%0d", step_no, i + 1), $bitstoreal(mo.ias[i]), rs.x[i]);
      chk($sformatf("step %0d uav%0d", step_no, i + 1), $bitstoreal(mo.uav[i]), rs.uav[i]);
      chk($sformatf("step %0d ur%0d", step_no, i + 1), $bitstoreal(mo.ur[i]), rs.ur[i]);
      chk($sformatf("step %0d ul%0d", step_no, i + 1), $bitstoreal(mo.ul[i]), rs.ul[i]);
      checks++;
      if (int'(mo.state[i]) != rs.st[i])
        fail($sformatf("step %0d state%0d got %0d expected %0d", step_no, i + 1, mo.state[i], rs.st[i]));
      seen_state[rs.st[i]]++;
      n_trans += tr[i];
      n_corr  += co[i];
    end
    chk("ud", $bitstoreal(mo.ud), rs.ud);
    chk("id", $bitstoreal(mo.id), rs.id);
    chk("iap", $bitstoreal(mo.iap), rs.iap);
    // resynchronise the reference after a mismatch
    if (failures > 0) begin
      for (int i = 0; i < NBR; i++) begin
        rs.x[i] = $bitstoreal(mo.ias[i]); rs.st[i] = mo.state[i];
        rs.ur[i] = $bitstoreal(mo.ur[i]); rs.ul[i] = $bitstoreal(mo.ul[i]);
      end
      rs.ud = $bitstoreal(mo.ud);
    end
    // real-time rate: one step per TICKS clocks, each within its period
    checks += 2;
    if (last_done >= 0 && cycle - last_done != TICKS)
      fail($sformatf("steps %0d clocks apart", cycle - last_done));
    if (step_cycles > 16'(TICKS) || step_cycles == 0) fail("step longer than its period");
    last_done = cycle;
    hist[int'(step_no)] = mo;
  endtask

  // ------------------------------------------------------------------
  // analog outputs: codes of the step that completed just before
  always @(negedge clk) begin
    if (!rst && ao_update) begin
      automatic model_out_t m = hist[int'(step_no) - 1];
      automatic fp64_t v [NCH];
      n_ao++;
      v = '{m.uap, m.iap, m.ias[0], m.ias[1], m.ias[2], m.id, m.ud};
      checks++;
      if (int'(step_no) % 10 != 0) fail("analog update off the 10-step grid");
      for (int c = 0; c < NCH; c++) begin
        automatic real x = $bitstoreal(v[c]) * (2.0 ** ao_shift[c]);
        automatic real r = (x >= 0) ? $floor(x + 0.5) : -$floor(-x + 0.5);
        if (r > 32767.0) r = 32767.0;
        if (r < -32768.0) r = -32768.0;
        checks++;
        if (int'(ao_code[c]) != int'(r))
          fail($sformatf("analog ch%0d got %0d expected %0d", c, ao_code[c], int'(r)));
      end
    end
  end

  // ------------------------------------------------------------------
  // host: target-to-host reader
  int host_reading = 1;
  fp64_t frame [17];
  int widx = 0;
  assign t2h_ready = host_reading != 0;

  always @(negedge clk) begin
    if (!rst && t2h_valid && t2h_ready) begin
      frame[widx] = t2h_data;
      widx++;
      if (widx == 1 && t2h_data[63:56] != 8'hA5) begin
        fail("frame without sync byte");
        widx = 0;
      end
      if (widx == 17) begin
        automatic int sn = int'(frame[0][31:0]);
        automatic model_out_t m;
        automatic fp64_t e [17];
        widx = 0;
        checks++;
        if (!hist.exists(sn)) begin
          fail($sformatf("frame for unknown step %0d", sn));
        end else begin
          m = hist[sn];
          e = '{frame[0], m.ias[0], m.ias[1], m.ias[2], m.ud, m.uav[0], m.uav[1], m.uav[2],
                m.ur[0], m.ur[1], m.ur[2], m.ul[0], m.ul[1], m.ul[2], m.id, m.iap, m.uap};
          for (int w = 1; w < 17; w++) begin
            checks++;
            if (frame[w] !== e[w]) fail($sformatf("frame of step %0d word %0d", sn, w));
          end
          checks++;
          if (frame[0][42:34] !== {m.state[2], m.state[1], m.state[0]}) fail("frame states");
          checks++;
          if (sn % 10 != 9) fail("frame off the 10-step grid");
          n_frames_ok++;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // host: input stream, one (u_ap, i_l) frame per step period
  task automatic host_send(fp64_t w);
    h2t_valid = 1'b1;
    h2t_data  = w;
    @(posedge clk);
    while (!h2t_ready) @(posedge clk);
    @(negedge clk);
    h2t_valid = 1'b0;
  endtask

  initial begin
    automatic int sent = 0;
    rst = 1'b1; sw = 4'b0000; fault_clr = 1'b0;
    h2t_valid = 1'b0; h2t_data = '0;
    foreach (seen_state[j]) seen_state[j] = 0;
    foreach (seen_sys[j]) seen_sys[j] = 0;
    for (int c = 0; c < NCH; c++) ao_shift[c] = 8'sd5;
    in.ud_f = 1.2; in.ut_f = 1.5; in.hc = H / 2.0e-3; in.imin = 0.01;
    par = '0;
    for (int i = 0; i < NBR; i++) begin
      in.ras[i] = 0.2; in.hl[i] = H / lval[i]; in.p[i] = 0.5;
      par.br[i].ras = $realtobits(in.ras[i]); par.br[i].rc = $realtobits(10.0);
      par.br[i].h_over_l = $realtobits(in.hl[i]); par.br[i].p = $realtobits(in.p[i]);
      rs.x[i] = 0; rs.st[i] = 1; rs.uav[i] = 0; rs.ur[i] = 0; rs.ul[i] = 0;
    end
    rs.ud = 0; rs.id = 0; rs.iap = 0;
    par.ud_fwd = $realtobits(in.ud_f); par.ut_fwd = $realtobits(in.ut_f);
    par.h_over_c = $realtobits(in.hc); par.ias_min = $realtobits(in.imin);
    repeat (5) @(negedge clk);
    rst = 1'b0;

    cur_in = inputs_for(in, sw, 0.0, 0.0);
    while (step_no < STEPS) begin
      automatic int n;
      automatic real uap_next;
      @(negedge clk iff step_done);
      check_step();
      // settings for the next step, applied well before it starts
      n = int'(step_no) + 1;
      if (n < 100)       sw = 4'b0000;   // nothing simulated
      else if (n < 200)  sw = 4'b0001;   // primary voltage only
      else if (n < 230)  sw = 4'b0101;   // failure: charging over small resistance
      else if (n < 600)  sw = 4'b0011;   // charging over R_c
      else if (n < 900)  sw = 4'b0111;   // R_c bridged
      else if (n < 2900) sw = 4'b1111;   // load connected, operation
      else if (n < 2950) sw = 4'b1011;   // failure: charging with load
      else               sw = 4'b1111;
      pwm_on    = (n >= 1000);
      short_leg = (n >= 950 && n < 955);
      fault_clr = (n == 980);
      host_reading = !(n >= 1500 && n < 2300);
      uap_next = 500.0 * $sin(2.0 * 3.14159265358979 * 50.0 * n * H);
      host_send($realtobits(uap_next));
      host_send($realtobits(6.65));
      sent++;
      cur_in = inputs_for(in, sw, 6.65, uap_next);
      seen_sys[sys_state]++;
      if (failure) n_fail++;
      if (shoot_through != 0) n_st++;
    end
    repeat (2 * TICKS) @(negedge clk);
    host_reading = 1;
    repeat (20 * 17 * 5) @(negedge clk);

    // every mechanism must have occurred
    for (int s = 1; s <= 7; s++) begin
      checks++;
      if (seen_state[s] == 0) fail($sformatf("circuit state %0d never reached", s));
    end
    for (int s = 0; s <= 6; s++) begin
      checks++;
      if (seen_sys[s] == 0) fail($sformatf("system state %0d never set", s));
    end
    checks += 9;
    if (n_trans == 0) fail("no current reversal through the vanishing open state");
    if (n_corr == 0) fail("no open-state correction");
    if (n_st == 0 || pwm_fault != 0) fail("shoot-through not flagged or fault not cleared");
    if (n_fail == 0) fail("failure state not flagged");
    if (n_ao < STEPS / 10 - 1) fail("too few analog updates");
    if (t2h_dropped == 0) fail("no frame dropped while the host was not reading");
    if (n_frames_ok != int'(t2h_frames) || n_frames_ok == 0) fail("logged frames lost");
    if (int'(h2t_frames) != sent) fail("host frames miscounted");
    if (overruns != 0) fail("solver overran its step period");
    $display("states 1..7: %0d %0d %0d %0d %0d %0d %0d | reversals %0d corrections %0d | shoot-through steps %0d failure steps %0d",
             seen_state[1], seen_state[2], seen_state[3], seen_state[4], seen_state[5],
             seen_state[6], seen_state[7], n_trans, n_corr, n_st, n_fail);
    $display("analog updates %0d | frames logged %0d dropped %0d | host frames %0d | step %0d clocks | u_d %g V",
             n_ao, t2h_frames, t2h_dropped, h2t_frames, step_cycles, $bitstoreal(mo.ud));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((STEPS + 20) * TICKS + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
