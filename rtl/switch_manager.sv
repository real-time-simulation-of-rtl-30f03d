// switch_manager: next circuit state of one rectifier branch.
//
// Combinational. The seven states are split into group 1 (positive current:
// 2, 5, 7) and group 2 (negative current: 3, 4, 6); state 1 (open) belongs to
// neither. Each group function starts from state 1 and walks its states in
// rising index order, keeping the highest one whose condition holds. A state
// holds when the current keeps flowing in its direction (|i_as| >= I_min with
// the right sign) or, from zero current, when the source-side voltage
//   v = u_as - u_R(previous step) - u_L(previous step)
// exceeds the bridge voltage of that state, and the state's transistors are
// gated on. Selection by the previous state:
//   in group g:  the group-g function with the real i_as and v; if it returns
//                1, the other group's function with i_as = 0, u_R = u_L = 0
//                (an open state of vanishing length lets the current change
//                sign within the step);
//   state 1:     both functions with the real inputs, the larger index wins.
// This grouping, the rule order and the state 3 condition are the model's
// published algorithm; the conditions of the other states are derived here
// from the bridge topology in the same form. A branch whose contactors are
// both open is forced to state 1.
//
// Inputs: thr_d2 = u_d + 2U_D, thr_t2 = u_d - 2U_T, thr_dt = U_D + U_T (all
// computed by the solver with the current u_d), i_min > 0. The voltage
// bounds of the states are  2: v >= u_d+2U_D   5: v >= U_D+U_T
// 7: v >= 2U_T-u_d   3: v <= -(u_d+2U_D)   4: v <= -(U_D+U_T)   6: v <= u_d-2U_T.
module switch_manager
  import fp_pkg::*;
  import rect_pkg::*;
(
  input  state_idx_t prev_state,
  input  logic       connected,
  input  pwm_t       pwm,          // bit 0 = T1 ... bit 3 = T4
  input  fp64_t      ias,          // branch current after the Euler step
  input  fp64_t      v,            // u_as - u_R_old - u_L_old
  input  fp64_t      uas,          // u_as (v with u_R = u_L = 0)
  input  fp64_t      thr_d2,
  input  fp64_t      thr_t2,
  input  fp64_t      thr_dt,
  input  fp64_t      i_min,
  output state_idx_t next_state,
  output logic       open_now      // next_state is the open state
);

  function automatic state_idx_t group1(fp64_t i, fp64_t vv);
    state_idx_t s = ST_OPEN;
    logic flow = !fp_is_zero(i) && fp_ge(i, i_min);
    if (flow || fp_ge(vv, thr_d2)) s = 3'd2;
    if ((pwm[1] || pwm[2]) && (flow || fp_ge(vv, thr_dt))) s = 3'd5;
    if ((pwm[1] && pwm[2]) && (flow || fp_ge(vv, fp_neg(thr_t2)))) s = 3'd7;
    return s;
  endfunction

  function automatic state_idx_t group2(fp64_t i, fp64_t vv);
    state_idx_t s = ST_OPEN;
    logic flow = !fp_is_zero(i) && fp_le(i, fp_neg(i_min));
    if (flow || fp_le(vv, fp_neg(thr_d2))) s = 3'd3;
    if ((pwm[0] || pwm[3]) && (flow || fp_le(vv, fp_neg(thr_dt)))) s = 3'd4;
    if ((pwm[0] && pwm[3]) && (flow || fp_le(vv, thr_t2))) s = 3'd6;
    return s;
  endfunction

  state_idx_t g1, g2, g1z, g2z;

  always_comb begin
    g1  = group1(ias, v);
    g2  = group2(ias, v);
    g1z = group1(FP_ZERO, uas);
    g2z = group2(FP_ZERO, uas);
    case (prev_state)
      3'd2, 3'd5, 3'd7: next_state = (g1 != ST_OPEN) ? g1 : g2z;
      3'd3, 3'd4, 3'd6: next_state = (g2 != ST_OPEN) ? g2 : g1z;
      default:          next_state = (g1 > g2) ? g1 : g2;
    endcase
    if (!connected) next_state = ST_OPEN;
    open_now = (next_state == ST_OPEN);
  end

endmodule
