// tb_matrix_builder: element-by-element check of the state matrices.
//
// For all 343 combinations of the three branch states, with random per-branch
// h/L, hR/L, R and a random h/C1, every one of the 52 elements is compared
// with the value written out from the branch equation
//   L di/dt = u_as - R i - u_av,  u_av = k u_d + aS u_as + aD U_D + aT U_T,
// and C1 du_d/dt = sum k_i i_i - i_l, with k from the published table of
// coefficients and aS, aD, aT from the bridge topology.
module tb_matrix_builder;
  import fp_pkg::*;
  import rect_pkg::*;
  import rect_ref_pkg::*;

  state_idx_t [NBR-1:0] st;
  fp64_t [NBR-1:0] hl, hrl, r;
  fp64_t hc;
  mat_t mat;

  int checks = 0, failures = 0;

  matrix_builder dut (.state(st), .h_over_l(hl), .hr_over_l(hrl), .r(r), .h_over_c(hc), .mat(mat));

  task automatic ck(string w, fp64_t got, real e);
    checks++;
    if ($bitstoreal(got) != e) begin
      failures++;
      if (failures < 20) $display("%s: got %g expected %g", w, $bitstoreal(got), e);
    end
  endtask

  initial begin
    real rhl[3], rhrl[3], rr[3], rhc;
    for (int a = 1; a <= 7; a++)
      for (int b = 1; b <= 7; b++)
        for (int c = 1; c <= 7; c++) begin
          int s[3];
          s = '{a, b, c};
          rhc = $urandom_range(1, 10000) * 1.0e-6;
          for (int i = 0; i < 3; i++) begin
            rhl[i]  = $urandom_range(1, 10000) * 1.0e-6;
            rr[i]   = $urandom_range(1, 1000) * 1.0e-2;
            rhrl[i] = rhl[i] * rr[i];
            st[i] = 3'(s[i]); hl[i] = $realtobits(rhl[i]); hrl[i] = $realtobits(rhrl[i]);
            r[i] = $realtobits(rr[i]);
          end
          hc = $realtobits(rhc);
          #1;
          for (int i = 0; i < 3; i++) begin
            automatic int n = s[i];
            automatic bit op = (n == 1);
            automatic string w = $sformatf("states %0d%0d%0d br%0d", a, b, c, i);
            ck({w, " hA(i,i)"}, mat.br[i].a_ii, op ? 0.0 : -rhrl[i]);
            ck({w, " hA(i,4)"}, mat.br[i].a_i4, -kk(n) * rhl[i]);
            ck({w, " hB(i,i)"}, mat.br[i].b_i1, op ? 0.0 : rhl[i]);
            ck({w, " hB(i,5)"}, mat.br[i].b_i5, -aD(n) * rhl[i]);
            ck({w, " hB(i,6)"}, mat.br[i].b_i6, -aT(n) * rhl[i]);
            ck({w, " C uav"}, mat.br[i].cav4, kk(n));
            ck({w, " D uav uas"}, mat.br[i].dav1, aS(n));
            ck({w, " D uav UD"}, mat.br[i].dav5, aD(n));
            ck({w, " D uav UT"}, mat.br[i].dav6, aT(n));
            ck({w, " C uR"}, mat.br[i].cr, rr[i]);
            ck({w, " C uL i"}, mat.br[i].cl1, op ? 0.0 : -rr[i]);
            ck({w, " C uL ud"}, mat.br[i].cl4, -kk(n));
            ck({w, " D uL uas"}, mat.br[i].dl1, 1 - aS(n));
            ck({w, " D uL UD"}, mat.br[i].dl5, -aD(n));
            ck({w, " D uL UT"}, mat.br[i].dl6, -aT(n));
            ck({w, " hA(4,i)"}, mat.br[i].a_4i, kk(n) * rhc);
            ck({w, " C(10,i)"}, mat.br[i].c_di, kk(n));
          end
          ck("hB(4,4)", mat.b44, -rhc);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
