// solver_pkg: register map, instruction set and step program of the solver.
//
// The solver evaluates one simulation step as a fixed list of operations
// on a register file of binary64 words. Arithmetic instructions go to one of
// two multipliers or two adders; a few control instructions run dedicated
// logic (state switching, matrix rebuild). The program below is built by a
// constant function, so the list reads as the algorithm:
//
//  1. transformer and parameters: u_as,i = p_i*u_ap, R_i = R_as,i + R_c,
//     hR_i/L_i, 2U_D, U_D+U_T, 2U_T, and v_i = u_as,i - u_R,i - u_L,i with the
//     previous step's u_R and u_L; rebuild the matrices (new R, same states)
//  2. Euler step x += hA x + hB u over the sparse elements only; the products
//     hA(4,i)*i_as,i are kept for the open-state correction
//  3. for each branch in turn: thresholds from the present u_d, choose the
//     next state, and if it is open subtract the kept product from u_d
//     (the branch current itself is cleared by the state switch)
//  4. rebuild the matrices for the new states
//  5. outputs y = Cx + Du with the new matrices, and i_ap = sum p_i*i_as,i
//
// Every instruction names its destination and two sources; an address below
// NRF is a register, MAT_BASE and up are the 52 matrix elements.
package solver_pkg;

  typedef logic [7:0] raddr_t;

  typedef enum logic [2:0] {
    OP_END   = 3'd0,   // wait for all results, step complete
    OP_MUL   = 3'd1,   // dst = a * b
    OP_ADD   = 3'd2,   // dst = a + b
    OP_SUB   = 3'd3,   // dst = a - b
    OP_SUBC  = 3'd4,   // dst = a - b if branch br is open, else dst = a + 0
    OP_SW    = 3'd5,   // choose next state of branch br (waits for all results)
    OP_BUILD = 3'd6    // rebuild the matrices (waits for all results)
  } op_e;

  typedef struct packed {
    op_e        op;
    raddr_t     dst;
    raddr_t     a;
    raddr_t     b;
    logic [1:0] br;
  } instr_t;

  // ---- register file ----
  localparam raddr_t R_ZERO = 8'd0;     // constant 0 (never written)
  localparam raddr_t R_UAP  = 8'd1;
  localparam raddr_t R_IL   = 8'd2;
  localparam raddr_t R_UDF  = 8'd3;     // U_D
  localparam raddr_t R_UTF  = 8'd4;     // U_T
  localparam raddr_t R_HC   = 8'd5;     // h / C1
  localparam raddr_t R_RAS  = 8'd8;     // +i
  localparam raddr_t R_RCE  = 8'd11;    // +i
  localparam raddr_t R_HL   = 8'd14;    // +i
  localparam raddr_t R_PE   = 8'd17;    // +i, p gated by S0
  localparam raddr_t R_P    = 8'd20;    // +i
  localparam raddr_t R_X    = 8'd24;    // +i, i_as,i
  localparam raddr_t R_XD   = 8'd27;    // u_d
  localparam raddr_t R_UAS  = 8'd28;    // +i
  localparam raddr_t R_REFF = 8'd31;    // +i
  localparam raddr_t R_HRL  = 8'd34;    // +i
  localparam raddr_t R_V    = 8'd37;    // +i
  localparam raddr_t R_Q    = 8'd40;    // +i, hA(4,i)*i_as,i
  localparam raddr_t R_Q4   = 8'd43;    // hB(4,4)*i_l
  localparam raddr_t R_2UD  = 8'd44;
  localparam raddr_t R_UDUT = 8'd45;
  localparam raddr_t R_2UT  = 8'd46;
  localparam raddr_t R_THD  = 8'd47;    // u_d + 2U_D
  localparam raddr_t R_THT  = 8'd48;    // u_d - 2U_T
  localparam raddr_t R_UAV  = 8'd49;    // +i
  localparam raddr_t R_UR   = 8'd52;    // +i
  localparam raddr_t R_UL   = 8'd55;    // +i
  localparam raddr_t R_ID   = 8'd58;
  localparam raddr_t R_IAP  = 8'd59;
  localparam raddr_t R_T    = 8'd60;    // 13 temporaries per branch
  localparam raddr_t R_TD   = 8'd99;    // 4 temporaries for i_d / u_d
  localparam raddr_t R_TP   = 8'd103;   // 4 temporaries for i_ap
  localparam int     NRF    = 108;

  // ---- matrix elements (read only) ----
  localparam int MAT_BASE = 112;
  // field numbers in declaration order of rect_pkg::br_mat_t
  localparam int F_A_II = 0,  F_A_I4 = 1,  F_B_I1 = 2,  F_B_I5 = 3,  F_B_I6 = 4,
                 F_CAV4 = 5,  F_DAV1 = 6,  F_DAV5 = 7,  F_DAV6 = 8,  F_CR   = 9,
                 F_CL1  = 10, F_CL4  = 11, F_DL1  = 12, F_DL5  = 13, F_DL6  = 14,
                 F_A_4I = 15, F_C_DI = 16;

  // element j of the packed rect_pkg::mat_t, j = 0 being its lowest word
  function automatic raddr_t m(int i, int f);
    return raddr_t'(MAT_BASE + 1 + 17 * i + (16 - f));
  endfunction
  localparam raddr_t M_B44 = raddr_t'(MAT_BASE);

  function automatic raddr_t r(raddr_t base, int i);
    return raddr_t'(base + raddr_t'(i));
  endfunction

  function automatic raddr_t t(int i, int k);
    return raddr_t'(int'(R_T) + 13 * i + k);
  endfunction

  function automatic instr_t ins(op_e op, raddr_t d, raddr_t a, raddr_t b, int br = 0);
    instr_t x;
    x.op  = op;
    x.dst = d;
    x.a   = a;
    x.b   = b;
    x.br  = 2'(br);
    return x;
  endfunction

  localparam int PROG_LEN = 136;
  typedef instr_t [PROG_LEN-1:0] prog_t;

  function automatic prog_t build_prog();
    prog_t p;
    int n;
    for (int j = 0; j < PROG_LEN; j++) p[j] = ins(OP_END, R_ZERO, R_ZERO, R_ZERO);
    n = 0;
    // 1. transformer, parameters, source voltages
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_MUL, r(R_UAS, i), r(R_PE, i), R_UAP); n++; end
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_ADD, r(R_REFF, i), r(R_RAS, i), r(R_RCE, i)); n++; end
    p[n] = ins(OP_ADD, R_2UD, R_UDF, R_UDF); n++;
    p[n] = ins(OP_ADD, R_UDUT, R_UDF, R_UTF); n++;
    p[n] = ins(OP_ADD, R_2UT, R_UTF, R_UTF); n++;
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_MUL, r(R_HRL, i), r(R_HL, i), r(R_REFF, i)); n++; end
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_SUB, r(R_V, i), r(R_UAS, i), r(R_UR, i)); n++; end
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_SUB, r(R_V, i), r(R_V, i), r(R_UL, i)); n++; end
    p[n] = ins(OP_BUILD, R_ZERO, R_ZERO, R_ZERO); n++;
    // 2. Euler step on the sparse elements
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_MUL, r(R_Q, i), m(i, F_A_4I), r(R_X, i)); n++; end
    p[n] = ins(OP_MUL, R_Q4, M_B44, R_IL); n++;
    for (int i = 0; i < 3; i++) begin
      p[n] = ins(OP_MUL, t(i, 0), m(i, F_A_II), r(R_X, i)); n++;
      p[n] = ins(OP_MUL, t(i, 1), m(i, F_A_I4), R_XD); n++;
      p[n] = ins(OP_MUL, t(i, 2), m(i, F_B_I1), r(R_UAS, i)); n++;
      p[n] = ins(OP_MUL, t(i, 3), m(i, F_B_I5), R_UDF); n++;
      p[n] = ins(OP_MUL, t(i, 4), m(i, F_B_I6), R_UTF); n++;
    end
    p[n] = ins(OP_ADD, R_TD, r(R_Q, 0), r(R_Q, 1)); n++;
    p[n] = ins(OP_ADD, r(R_TD, 1), r(R_Q, 2), R_Q4); n++;
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_ADD, t(i, 5), t(i, 0), t(i, 1)); n++; end
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_ADD, t(i, 6), t(i, 2), t(i, 3)); n++; end
    p[n] = ins(OP_ADD, R_TD, R_TD, r(R_TD, 1)); n++;
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_ADD, t(i, 5), t(i, 5), t(i, 4)); n++; end
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_ADD, t(i, 6), t(i, 6), r(R_X, i)); n++; end
    p[n] = ins(OP_ADD, R_XD, R_XD, R_TD); n++;
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_ADD, r(R_X, i), t(i, 5), t(i, 6)); n++; end
    // 3. state switching with open-state correction, branch after branch
    for (int i = 0; i < 3; i++) begin
      p[n] = ins(OP_ADD, R_THD, R_XD, R_2UD); n++;
      p[n] = ins(OP_SUB, R_THT, R_XD, R_2UT); n++;
      p[n] = ins(OP_SW, R_ZERO, R_ZERO, R_ZERO, i); n++;
      p[n] = ins(OP_SUBC, R_XD, R_XD, r(R_Q, i), i); n++;
    end
    // 4. matrices for the new states
    p[n] = ins(OP_BUILD, R_ZERO, R_ZERO, R_ZERO); n++;
    // 5. outputs
    for (int i = 0; i < 3; i++) begin
      p[n] = ins(OP_MUL, t(i, 0), m(i, F_CAV4), R_XD); n++;
      p[n] = ins(OP_MUL, t(i, 1), m(i, F_DAV1), r(R_UAS, i)); n++;
      p[n] = ins(OP_MUL, t(i, 2), m(i, F_DAV5), R_UDF); n++;
      p[n] = ins(OP_MUL, t(i, 3), m(i, F_DAV6), R_UTF); n++;
      p[n] = ins(OP_MUL, r(R_UR, i), m(i, F_CR), r(R_X, i)); n++;
      p[n] = ins(OP_MUL, t(i, 4), m(i, F_CL1), r(R_X, i)); n++;
      p[n] = ins(OP_MUL, t(i, 5), m(i, F_CL4), R_XD); n++;
      p[n] = ins(OP_MUL, t(i, 6), m(i, F_DL1), r(R_UAS, i)); n++;
      p[n] = ins(OP_MUL, t(i, 7), m(i, F_DL5), R_UDF); n++;
      p[n] = ins(OP_MUL, t(i, 8), m(i, F_DL6), R_UTF); n++;
    end
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_MUL, r(R_TD, i), m(i, F_C_DI), r(R_X, i)); n++; end
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_MUL, r(R_TP, i), r(R_P, i), r(R_X, i)); n++; end
    for (int i = 0; i < 3; i++) begin
      p[n] = ins(OP_ADD, t(i, 9), t(i, 0), t(i, 1)); n++;
      p[n] = ins(OP_ADD, t(i, 10), t(i, 2), t(i, 3)); n++;
      p[n] = ins(OP_ADD, t(i, 11), t(i, 4), t(i, 5)); n++;
      p[n] = ins(OP_ADD, t(i, 12), t(i, 6), t(i, 7)); n++;
    end
    p[n] = ins(OP_ADD, r(R_TD, 3), R_TD, r(R_TD, 1)); n++;
    p[n] = ins(OP_ADD, r(R_TP, 3), R_TP, r(R_TP, 1)); n++;
    for (int i = 0; i < 3; i++) begin
      p[n] = ins(OP_ADD, r(R_UAV, i), t(i, 9), t(i, 10)); n++;
      p[n] = ins(OP_ADD, t(i, 11), t(i, 11), t(i, 8)); n++;
    end
    p[n] = ins(OP_ADD, R_ID, r(R_TD, 3), r(R_TD, 2)); n++;
    p[n] = ins(OP_ADD, R_IAP, r(R_TP, 3), r(R_TP, 2)); n++;
    for (int i = 0; i < 3; i++) begin p[n] = ins(OP_ADD, r(R_UL, i), t(i, 11), t(i, 12)); n++; end
    p[n] = ins(OP_END, R_ZERO, R_ZERO, R_ZERO); n++;
    return p;
  endfunction

  localparam prog_t PROG = build_prog();

endpackage
