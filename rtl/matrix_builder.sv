// matrix_builder: state matrices of the model for the current branch states.
//
// Combinational. Only the 52 elements of hA, hB, C and D that can be
// non-zero in some state combination are produced (9 of hA, 10 of hB, 15 of
// C, 18 of D); all others are zero by construction and never computed.
// Each branch fills its own rows (row i of hA and hB, rows 3i-2..3i of C and
// D) from its own state alone, and contributes column i of the DC-link rows
// through its coefficient k_i. With the branch equation
//   L di/dt = u_as - R i - u_av,   u_av = k u_d + aS u_as + aD U_D + aT U_T
// and C1 du_d/dt = sum k_i i_i - i_l this gives, per branch i:
//   hA(i,i) = -hR/L   hA(i,4) = -k h/L   hB(i,i) = h/L
//   hB(i,5) = -aD h/L hB(i,6) = -aT h/L  (row i all zero in the open state)
//   C(u_av) = [k at u_d],  D(u_av) = [aS, aD, aT]
//   C(u_R)  = [R at i_i]
//   C(u_L)  = [-R at i_i, -k at u_d], D(u_L) = [1-aS, -aD, -aT]
//   hA(4,i) = k h/C1,   C(10,i) = k,   and hB(4,4) = -h/C1.
// The rows of u_d, the k coefficients and the sparse layout are the
// model's own; the remaining rows are written out here from the circuit.
// All scalings are by 0, +-1 or +-2 and are done exactly, without a
// multiplier.
module matrix_builder
  import fp_pkg::*;
  import rect_pkg::*;
(
  input  state_idx_t [NBR-1:0] state,
  input  fp64_t      [NBR-1:0] h_over_l,   // h / L_as,i
  input  fp64_t      [NBR-1:0] hr_over_l,  // h * R_i / L_as,i
  input  fp64_t      [NBR-1:0] r,          // effective series resistance R_i
  input  fp64_t                h_over_c,   // h / C1
  output mat_t                 mat
);

  always_comb begin
    for (int i = 0; i < NBR; i++) begin
      logic signed [2:0] k, as_, ad, at;
      logic open_s;
      k      = coef_k(state[i]);
      as_    = coef_as(state[i]);
      ad     = coef_ad(state[i]);
      at     = coef_at(state[i]);
      open_s = (state[i] == ST_OPEN);
      mat.br[i].a_ii = open_s ? FP_ZERO : fp_neg(hr_over_l[i]);
      mat.br[i].a_i4 = fp_scale2(h_over_l[i], -k);
      mat.br[i].b_i1 = open_s ? FP_ZERO : h_over_l[i];
      mat.br[i].b_i5 = fp_scale2(h_over_l[i], -ad);
      mat.br[i].b_i6 = fp_scale2(h_over_l[i], -at);
      mat.br[i].cav4 = fp_const(k);
      mat.br[i].dav1 = fp_const(as_);
      mat.br[i].dav5 = fp_const(ad);
      mat.br[i].dav6 = fp_const(at);
      mat.br[i].cr   = r[i];
      mat.br[i].cl1  = open_s ? FP_ZERO : fp_neg(r[i]);
      mat.br[i].cl4  = fp_const(-k);
      mat.br[i].dl1  = fp_const(3'sd1 - as_);
      mat.br[i].dl5  = fp_const(-ad);
      mat.br[i].dl6  = fp_const(-at);
      mat.br[i].a_4i = fp_scale2(h_over_c, k);
      mat.br[i].c_di = fp_const(k);
    end
    mat.b44 = fp_neg(h_over_c);
  end

endmodule
