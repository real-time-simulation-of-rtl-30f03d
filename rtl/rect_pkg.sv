// rect_pkg: types and constants of the three-branch PWM rectifier model.
//
// Each rectifier branch is always in one of seven circuit states, named by
// index 1..7 after the semiconductors that conduct:
//   1 open (nothing conducts)       2 D1&D4   3 D3&D2   4 D3&T1 (or D2&T4)
//   5 T2&D4 (or D1&T3)              6 T4&T1   7 T2&T3
// States 2, 5, 7 carry positive branch current (group 1), states 3, 4, 6
// negative current (group 2). For every state the bridge input voltage is
//   u_av = k*u_d + aS*u_as + aD*U_D + aT*U_T
// with the coefficients returned below; k is also the weight of the branch
// current in the DC-link current i_d = k1*i_as1 + k2*i_as2 + k3*i_as3.
// The k values are the model's published ones; aS, aD and aT follow from
// the bridge topology (diode drop U_D, transistor drop U_T per device).
package rect_pkg;
  import fp_pkg::*;

  localparam int NBR = 3;                 // parallel rectifier branches

  typedef logic [2:0] state_idx_t;        // 1..7
  localparam state_idx_t ST_OPEN = 3'd1;

  // Gate signals of one full bridge: bit 0 = T1 ... bit 3 = T4
  typedef logic [3:0] pwm_t;

  // Model constants supplied by the host (all binary64)
  typedef struct packed {
    fp64_t ras;        // R_as, series resistance of the secondary branch
    fp64_t rc;         // R_c, charging resistance
    fp64_t h_over_l;   // h / L_as
    fp64_t p;          // transformation ratio p_1i
  } branch_par_t;

  typedef struct packed {
    branch_par_t [NBR-1:0] br;
    fp64_t ud_fwd;     // U_D, diode forward voltage
    fp64_t ut_fwd;     // U_T, transistor forward voltage
    fp64_t h_over_c;   // h / C_1
    fp64_t ias_min;    // I_as_min, current threshold of the switching rules
  } model_par_t;

  // Parameters after the switch logic of the connection sequence
  typedef struct packed {
    logic  [NBR-1:0] conn;        // branch connected to its secondary winding
    fp64_t [NBR-1:0] rc_eff;      // R_c when in circuit, else 0
    fp64_t [NBR-1:0] p_eff;       // p when primary voltage on, else 0
    fp64_t           il_eff;      // load current when load connected, else 0
  } conn_par_t;

  // Possibly non-zero matrix elements belonging to one branch (Table of
  // sparse coordinates: rows i of hA/hB, rows 3i-2..3i of C/D, column i of
  // row 4 of hA and of row 10 of C)
  typedef struct packed {
    fp64_t a_ii, a_i4, b_i1, b_i5, b_i6;   // hA(i,i) hA(i,4) hB(i,i) hB(i,5) hB(i,6)
    fp64_t cav4, dav1, dav5, dav6;         // u_av row of C and D
    fp64_t cr;                             // u_R row of C
    fp64_t cl1, cl4, dl1, dl5, dl6;        // u_L row of C and D
    fp64_t a_4i;                           // hA(4,i)
    fp64_t c_di;                           // C(10,i)
  } br_mat_t;

  typedef struct packed {
    br_mat_t [NBR-1:0] br;
    fp64_t             b44;                // hB(4,4) = -h/C1
  } mat_t;


  // Model results of one simulation step
  typedef struct packed {
    fp64_t [NBR-1:0] ias;
    fp64_t           ud;
    fp64_t [NBR-1:0] uav;
    fp64_t [NBR-1:0] ur;
    fp64_t [NBR-1:0] ul;
    fp64_t           id;
    fp64_t           iap;
    fp64_t           uap;
    state_idx_t [NBR-1:0] state;
    pwm_t       [NBR-1:0] pwm;      // gate words the step was computed with
  } model_out_t;

  function automatic logic signed [2:0] coef_k(state_idx_t s);
    case (s)
      3'd2, 3'd6: return 3'sd1;
      3'd3, 3'd7: return -3'sd1;
      default:    return 3'sd0;
    endcase
  endfunction

  function automatic logic signed [2:0] coef_as(state_idx_t s);
    return (s == ST_OPEN) ? 3'sd1 : 3'sd0;
  endfunction

  function automatic logic signed [2:0] coef_ad(state_idx_t s);
    case (s)
      3'd2:    return 3'sd2;
      3'd3:    return -3'sd2;
      3'd4:    return -3'sd1;
      3'd5:    return 3'sd1;
      default: return 3'sd0;
    endcase
  endfunction

  function automatic logic signed [2:0] coef_at(state_idx_t s);
    case (s)
      3'd4:    return -3'sd1;
      3'd5:    return 3'sd1;
      3'd6:    return -3'sd2;
      3'd7:    return 3'sd2;
      default: return 3'sd0;
    endcase
  endfunction

endpackage
