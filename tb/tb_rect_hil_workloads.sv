// tb_rect_hil_workloads: the two operating cases the model is meant for, run
// on the whole design at its default size and judged from what the host
// receives (every tenth step, 16 kHz).
//
// Case A, one rectifier: branches 2 and 3 are removed the usual way for this
// model (series resistance 1e10 ohm, transformation ratio 0, gates off). The
// remaining branch gets a 50 Hz secondary voltage of 250 V amplitude
// (primary 500 V, p = 0.5) and a 6.65 A load, and is driven by 900 Hz
// sine-triangle modulation. Checked: the removed branches carry no current,
// i_ap = p1 * i_as1 in every frame, the DC link settles to a voltage above
// the secondary peak, and over the measuring window the charge balance of
// the DC link holds (mean i_d - i_l against C1 * du_d/dt).
// Cases B and C, two rectifiers (branch 3 removed) with equal inductances:
// first with both carriers in phase, then with the second carrier shifted by
// a quarter period. From the logged primary current, a DFT over 0.1 s
// (5 mains periods) gives the ripple around twice the carrier frequency;
// the shifted carriers must reduce it to less than half.
// Every case starts from reset and goes through the connection sequence
// (charging over R_c, R_c bridged, load on). Windows and thresholds are this
// testbench's choices; the per-step arithmetic is verified in
// tb_rect_hil_top and tb_solver.
module tb_rect_hil_workloads;
  import fp_pkg::*;
  import rect_pkg::*;
  import rect_ref_pkg::*;

  localparam int  TICKS  = 250;
  localparam real TCLK   = 25.0e-9;
  localparam real H      = TICKS * TCLK;
  localparam int  NCH    = 7;
  localparam int  SETTLE = 6400;            // steps before measuring (40 ms)
  localparam int  WIN    = 16000;           // measured steps (0.1 s)
  localparam real FC     = 900.0;
  localparam real C1     = 2.0e-3;

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

  task automatic fail(string msg);
    failures++;
    if (failures < 25) $display("[%0d] %s", cycle, msg);
  endtask

  // ------------------------------------------------------------------
  // gate signals
  bit   active [NBR];
  real  shift  [NBR];
  int   pwm_on = 0;
  always @(negedge clk) begin
    cycle++;
    for (int i = 0; i < NBR; i++)
      pwm_pin[i] <= (pwm_on != 0 && active[i]) ? pwm_gen(cycle * TCLK, 50.0, FC, 0.9, -0.3, shift[i])
                                               : 4'b0000;
  end

  // ------------------------------------------------------------------
  // host side: collect logged frames of the measuring window
  assign t2h_ready = 1'b1;
  fp64_t frame [17];
  int    widx = 0;
  int    meas_from = 0;
  real   s_iap [$], s_id [$], s_ud [$];
  int    n_bad_frame = 0, n_branch_leak = 0, n_iap_err = 0;

  always @(negedge clk) begin
    if (!rst && t2h_valid) begin
      frame[widx] = t2h_data;
      widx = (widx == 16) ? 0 : widx + 1;
      if (widx == 0) begin
        automatic int sn = int'(frame[0][31:0]);
        if (frame[0][63:56] != 8'hA5) n_bad_frame++;
        if (!active[1] && frame[2] != FP_ZERO) n_branch_leak++;
        if (!active[2] && frame[3] != FP_ZERO) n_branch_leak++;
        if (sn >= meas_from && sn < meas_from + WIN) begin
          s_iap.push_back($bitstoreal(frame[15]));
          s_id.push_back($bitstoreal(frame[14]));
          s_ud.push_back($bitstoreal(frame[4]));
          if (!active[1] && !active[2] &&
              !close($bitstoreal(frame[15]), 0.5 * $bitstoreal(frame[1])))
            n_iap_err++;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  task automatic host_send(fp64_t w);
    h2t_valid = 1'b1;
    h2t_data  = w;
    @(posedge clk);
    while (!h2t_ready) @(posedge clk);
    @(negedge clk);
    h2t_valid = 1'b0;
  endtask

  // one case from reset: n_act branches active, carrier shifts as given
  task automatic run_case(int n_act, real sh1);
    s_iap.delete(); s_id.delete(); s_ud.delete();
    n_bad_frame = 0; n_branch_leak = 0; n_iap_err = 0;
    pwm_on = 0;
    for (int i = 0; i < NBR; i++) begin
      active[i] = (i < n_act);
      shift[i]  = (i == 1) ? sh1 : 0.0;
      par.br[i].ras      = $realtobits(active[i] ? 0.2 : 1.0e10);
      par.br[i].rc       = $realtobits(10.0);
      par.br[i].h_over_l = $realtobits(H / 3.0e-3);
      par.br[i].p        = $realtobits(active[i] ? 0.5 : 0.0);
    end
    par.ud_fwd = $realtobits(1.2); par.ut_fwd = $realtobits(1.5);
    par.h_over_c = $realtobits(H / C1); par.ias_min = $realtobits(0.01);
    sw = 4'b0000;
    rst = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    widx = 0;
    meas_from = SETTLE;
    while (step_no < SETTLE + WIN + 20) begin
      automatic int n;
      @(negedge clk iff step_done);
      n = int'(step_no) + 1;
      if (n < 50)        sw = 4'b0001;
      else if (n < 1600) sw = 4'b0011;
      else if (n < 2400) sw = 4'b0111;
      else               sw = 4'b1111;
      pwm_on = (n >= 2400);
      host_send($realtobits(500.0 * $sin(2.0 * 3.14159265358979 * 50.0 * n * H)));
      host_send($realtobits(6.65));
    end
    repeat (40 * 17) @(negedge clk);
    checks += 3;
    if (n_bad_frame != 0) fail("frames without sync byte");
    if (n_branch_leak != 0) fail($sformatf("%0d frames with current in a removed branch", n_branch_leak));
    if (t2h_dropped != 0 || overruns != 0) fail("frames dropped or steps overrun");
    checks++;
    if (s_iap.size() != WIN / 10) fail($sformatf("%0d frames in the window, %0d expected", s_iap.size(), WIN / 10));
  endtask

  // ripple of the logged primary current around 2*FC (DFT, 10 Hz bins)
  function automatic real ripple_2fc();
    real e = 0.0;
    int  n = s_iap.size();
    for (int f = int'(2 * FC) - 300; f <= int'(2 * FC) + 300; f += 10) begin
      real re = 0.0, im = 0.0;
      for (int k = 0; k < n; k++) begin
        real ph = 2.0 * 3.14159265358979 * f * k * (10.0 * H);
        re += s_iap[k] * $cos(ph);
        im -= s_iap[k] * $sin(ph);
      end
      e += (re * re + im * im) / (n * n);
    end
    return e;
  endfunction

  initial begin
    real e_b, e_c, mean_id, dud, bal;
    rst = 1'b1; sw = 4'b0000; fault_clr = 1'b0;
    h2t_valid = 1'b0; h2t_data = '0; par = '0;
    for (int c = 0; c < NCH; c++) ao_shift[c] = 8'sd5;

    // A: one rectifier
    run_case(1, 0.0);
    mean_id = 0.0;
    foreach (s_id[k]) mean_id += s_id[k];
    mean_id /= s_id.size();
    dud = s_ud[s_ud.size() - 1] - s_ud[0];
    bal = C1 * dud / (s_ud.size() * 10.0 * H);      // C1 du_d/dt = i_d - i_l
    checks += 3;
    if (n_iap_err != 0) fail($sformatf("i_ap differs from p1*i_as1 in %0d frames", n_iap_err));
    if (s_ud[s_ud.size() - 1] < 250.0 || s_ud[s_ud.size() - 1] > 600.0)
      fail($sformatf("DC link at %g V", s_ud[s_ud.size() - 1]));
    if ((mean_id - 6.65 - bal) > 0.05 * 6.65 || (mean_id - 6.65 - bal) < -0.05 * 6.65)
      fail($sformatf("charge balance: mean i_d %g A, i_l 6.65 A, C1 du_d/dt %g A", mean_id, bal));
    $display("A one rectifier: u_d %g V at the end, mean i_d %g A, C1 du_d/dt %g A",
             s_ud[s_ud.size() - 1], mean_id, bal);

    // B: two rectifiers, carriers in phase
    run_case(2, 0.0);
    e_b = ripple_2fc();
    // C: two rectifiers, second carrier shifted by a quarter period
    run_case(2, 0.25);
    e_c = ripple_2fc();
    checks++;
    if (!(e_c < 0.5 * e_b)) fail($sformatf("offset did not reduce the ripple: %g -> %g", e_b, e_c));
    $display("B/C two rectifiers: primary current ripple power around %0d Hz %g A^2 in phase, %g A^2 shifted",
             int'(2 * FC), e_b, e_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (SETTLE + WIN + 100) * TICKS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
