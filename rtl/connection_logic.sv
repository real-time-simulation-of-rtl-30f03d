// connection_logic: switch logic of the connection sequence.
//
// Combinational. Four switches drive the model: S0 (start voltage, connects
// the primary), S1 (charging contactor, branch over R_c), S2 (line contactor,
// bridges R_c) and S3 (load contactor). The same S1/S2 positions apply to all
// three branches. Every switch combination reduces to the same state-space
// model with different parameters:
//   S0 = 0       -> p_eff = 0, so all secondary voltages are zero
//   S1 | S2 = 0  -> branch disconnected, held in the open state
//   S2 = 0       -> R_c in series with R_as (rc_eff = R_c), else rc_eff = 0
//   S3 = 0       -> load current i_l forced to 0
// The named system states of the connection sequence are decoded for
// display, and the two failure states (S1 off with S2 on: charging over the
// small resistance; S2 off with S3 on: charging with load connected) are
// flagged. Combinations outside the published table are reported as
// SYS_OTHER and simulated with the same rules.
module connection_logic
  import fp_pkg::*;
  import rect_pkg::*;
(
  input  logic [3:0]  sw,          // sw[j] = S_j
  input  model_par_t  par,
  input  fp64_t       il,          // load current demand
  output conn_par_t   cpar,
  output logic [2:0]  sys_state,   // see the SYS_* codes below
  output logic        failure
);

  localparam logic [2:0] SYS_OFF = 3'd0, SYS_PRIMARY = 3'd1, SYS_CHARGING = 3'd2,
                         SYS_BRIDGED = 3'd3, SYS_OPERATION = 3'd4,
                         SYS_FAIL_SMALL_R = 3'd5, SYS_FAIL_LOAD = 3'd6, SYS_OTHER = 3'd7;

  always_comb begin
    for (int i = 0; i < NBR; i++) begin
      cpar.conn[i]   = sw[1] | sw[2];
      cpar.rc_eff[i] = sw[2] ? FP_ZERO : par.br[i].rc;
      cpar.p_eff[i]  = sw[0] ? par.br[i].p : FP_ZERO;
    end
    cpar.il_eff = sw[3] ? il : FP_ZERO;
    case (sw)
      4'b0000: sys_state = SYS_OFF;
      4'b0001: sys_state = SYS_PRIMARY;
      4'b0011: sys_state = SYS_CHARGING;
      4'b0111: sys_state = SYS_BRIDGED;
      4'b1111: sys_state = SYS_OPERATION;
      4'b0101: sys_state = SYS_FAIL_SMALL_R;
      4'b1011: sys_state = SYS_FAIL_LOAD;
      default: sys_state = SYS_OTHER;
    endcase
    failure = (sys_state == SYS_FAIL_SMALL_R) || (sys_state == SYS_FAIL_LOAD);
  end

endmodule
