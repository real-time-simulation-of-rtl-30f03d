// tb_connection_logic: all sixteen contactor combinations.
//
// For each S0..S3 setting checks the connected flags, the charging
// resistance in circuit, the gated transformation ratios and load current,
// the decoded system state of the published switching table and the
// failure flag of its two failure rows.
module tb_connection_logic;
  import fp_pkg::*;
  import rect_pkg::*;

  logic [3:0] sw;
  model_par_t par;
  fp64_t il;
  conn_par_t cpar;
  logic [2:0] sys;
  logic failure;

  int checks = 0, failures = 0;

  connection_logic dut (.sw(sw), .par(par), .il(il), .cpar(cpar), .sys_state(sys), .failure(failure));

  task automatic ck(bit ok, string w);
    checks++;
    if (!ok) begin failures++; $display("sw=%b: %s", sw, w); end
  endtask

  initial begin
    par = '0;
    for (int i = 0; i < NBR; i++) begin
      par.br[i].rc = $realtobits(10.0 + i);
      par.br[i].p  = $realtobits(0.5 + i);
    end
    il = $realtobits(6.65);
    for (int v = 0; v < 16; v++) begin
      int e;
      sw = 4'(v);
      #1;
      for (int i = 0; i < NBR; i++) begin
        ck(cpar.conn[i] == (sw[1] | sw[2]), "conn");
        ck($bitstoreal(cpar.rc_eff[i]) == (sw[2] ? 0.0 : 10.0 + i), "rc_eff");
        ck($bitstoreal(cpar.p_eff[i]) == (sw[0] ? 0.5 + i : 0.0), "p_eff");
      end
      ck($bitstoreal(cpar.il_eff) == (sw[3] ? 6.65 : 0.0), "il_eff");
      case (v)
        0: e = 0; 1: e = 1; 3: e = 2; 7: e = 3; 15: e = 4; 5: e = 5; 11: e = 6;
        default: e = 7;
      endcase
      ck(int'(sys) == e, "system state");
      ck(failure == (v == 5 || v == 11), "failure flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
