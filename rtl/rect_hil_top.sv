// rect_hil_top: real-time model of three parallel single-phase PWM
// rectifiers for hardware-in-the-loop testing of a converter control unit.
//
// The control unit under test drives the twelve gate signals of the three
// H-bridges (pwm_pin) and reads back the simulated primary voltage and
// current, branch currents, DC-link current and DC-link voltage as analog
// codes (ao_code). A host streams the primary voltage u_ap and the load
// current i_l in (h2t_*) and receives every tenth step's full set of model
// quantities (t2h_*). The contactors S0..S3 of the connection sequence are
// set through sw.
//
// Inside: a step timer starts the solver every STEP_TICKS clocks (250 clocks
// of 40 MHz = 6.25 us simulation step h, so the model runs in real time);
// pwm_input synchronises the gate signals; connection_logic turns the
// contactor positions into effective model parameters; the solver computes
// one step in 148 clocks on two double multipliers and two double
// adders; analog_output and host_logger run every DECIM = 10 steps (16 kHz).
// The host must supply h/L, h/C1 and the other constants with the same h as
// STEP_TICKS * clock period.
// Timing: gate signals and host inputs are sampled at the start of a step;
// results of that step are visible on mo one step-duration later at most.
// The step length of 250 clocks and the tenfold slower output loops follow
// the model; the port formats are this design's own.
module rect_hil_top
  import fp_pkg::*;
  import rect_pkg::*;
#(
  parameter int unsigned STEP_TICKS  = 250,
  parameter int unsigned DECIM       = 10,
  parameter int unsigned MUL_LATENCY = 6,
  parameter int unsigned ADD_LATENCY = 6,
  parameter int unsigned H2T_DEPTH   = 1024,
  parameter int unsigned T2H_DEPTH   = 1024,
  parameter int unsigned NCH         = 7
) (
  input  logic              clk,
  input  logic              rst,
  // control unit side
  input  pwm_t [NBR-1:0]    pwm_pin,
  output logic signed [15:0] ao_code [NCH],
  output logic              ao_update,
  // operator / host settings
  input  logic [3:0]        sw,            // sw[j] = S_j
  input  model_par_t        par,
  input  logic signed [7:0] ao_shift [NCH],
  input  logic              fault_clr,
  // host-to-target stream
  input  fp64_t             h2t_data,
  input  logic              h2t_valid,
  output logic              h2t_ready,
  // target-to-host stream
  output fp64_t             t2h_data,
  output logic              t2h_valid,
  input  logic              t2h_ready,
  // status
  output model_out_t        mo,
  output logic              step_done,
  output logic [31:0]       step_no,
  output logic [15:0]       step_cycles,
  output logic [31:0]       overruns,
  output logic [2:0]        sys_state,
  output logic              failure,
  output logic [NBR-1:0]    shoot_through,
  output logic [NBR-1:0]    pwm_fault,
  output logic [31:0]       h2t_frames,
  output logic [31:0]       t2h_frames,
  output logic [31:0]       t2h_dropped
);

  // step timer
  logic [$clog2(STEP_TICKS)-1:0] tick;
  logic step_start, overrun;

  always_ff @(posedge clk) begin
    if (rst) begin
      tick       <= '0;
      step_start <= 1'b0;
    end else begin
      step_start <= (tick == '0);
      tick       <= (tick == $clog2(STEP_TICKS)'(STEP_TICKS - 1)) ? '0 : tick + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      step_no  <= '0;
      overruns <= '0;
    end else begin
      if (step_done) step_no <= step_no + 1'b1;
      if (overrun)   overruns <= overruns + 1'b1;
    end
  end

  // inputs
  pwm_t [NBR-1:0] pwm;
  fp64_t uap, il;
  conn_par_t cpar;

  pwm_input u_pwm (
    .clk(clk), .rst(rst), .pwm_pin(pwm_pin), .fault_clr(fault_clr),
    .pwm(pwm), .shoot_through(shoot_through), .fault(pwm_fault)
  );

  host_input #(.DEPTH(H2T_DEPTH)) u_host_in (
    .clk(clk), .rst(rst), .h2t_data(h2t_data), .h2t_valid(h2t_valid),
    .h2t_ready(h2t_ready), .uap(uap), .il(il), .frames(h2t_frames)
  );

  connection_logic u_conn (
    .sw(sw), .par(par), .il(il), .cpar(cpar), .sys_state(sys_state), .failure(failure)
  );

  // model
  solver #(.MUL_LATENCY(MUL_LATENCY), .ADD_LATENCY(ADD_LATENCY)) u_solver (
    .clk(clk), .rst(rst), .step_start(step_start), .par(par), .cpar(cpar),
    .uap(uap), .pwm(pwm), .busy(), .step_done(step_done), .overrun(overrun),
    .step_cycles(step_cycles), .mo(mo)
  );

  // outputs
  analog_output #(.DECIM(DECIM), .NCH(NCH)) u_ao (
    .clk(clk), .rst(rst), .step_done(step_done), .mo(mo), .shift(ao_shift),
    .code(ao_code), .update(ao_update)
  );

  host_logger #(.DECIM(DECIM), .DEPTH(T2H_DEPTH)) u_log (
    .clk(clk), .rst(rst), .step_done(step_done), .mo(mo), .step_no(step_no),
    .sys_state(sys_state), .failure(failure), .overrun(overruns != 0),
    .shoot_through(shoot_through), .t2h_data(t2h_data), .t2h_valid(t2h_valid),
    .t2h_ready(t2h_ready), .frames(t2h_frames), .dropped(t2h_dropped)
  );

endmodule
