// pwm_input: digital input stage for the gate signals from the control unit.
//
// The twelve gate signals (four transistors in each of three bridges) arrive
// asynchronously from the optical receivers. Each passes a SYNC_STAGES-deep
// synchroniser; the synchronised word is what the solver samples at the
// start of a simulation step. A branch whose two transistors of one leg are
// gated on together (T1&T2 or T3&T4) would short the DC link; that
// combination is excluded from the model, so it is flagged per branch in
// shoot_through (live) and in fault (sticky until fault_clr).
// Latency: SYNC_STAGES clocks from pin to pwm. The synchroniser depth and the
// sticky fault flag are this design's choices.
module pwm_input
  import rect_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  pwm_t [NBR-1:0]   pwm_pin,
  input  logic             fault_clr,
  output pwm_t [NBR-1:0]   pwm,
  output logic [NBR-1:0]   shoot_through,
  output logic [NBR-1:0]   fault
);

  pwm_t [NBR-1:0] sync_q [SYNC_STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < SYNC_STAGES; s++) sync_q[s] <= '0;
    end else begin
      sync_q[0] <= pwm_pin;
      for (int s = 1; s < SYNC_STAGES; s++) sync_q[s] <= sync_q[s-1];
    end
  end

  assign pwm = sync_q[SYNC_STAGES-1];

  always_comb begin
    for (int i = 0; i < NBR; i++)
      shoot_through[i] = (pwm[i][0] & pwm[i][1]) | (pwm[i][2] & pwm[i][3]);
  end

  always_ff @(posedge clk) begin
    if (rst || fault_clr) fault <= '0;
    else                  fault <= fault | shoot_through;
  end

endmodule
