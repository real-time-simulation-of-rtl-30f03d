// tb_pwm_input: synchroniser delay and short-circuit flags.
//
// Random gate words are applied every clock; the synchronised word must
// equal the pin word of SYNC_STAGES clocks earlier, the live shoot-through
// flags must match that word's T1&T2 / T3&T4 pairs, and the sticky fault
// must collect them until fault_clr.
module tb_pwm_input;
  import rect_pkg::*;

  localparam int S = 2;
  logic clk = 1'b0;
  logic rst, clr;
  pwm_t [NBR-1:0] pin, pwm;
  logic [NBR-1:0] st, fault, acc;
  pwm_t [NBR-1:0] hist [$];

  int checks = 0, failures = 0, n_st = 0;

  pwm_input #(.SYNC_STAGES(S)) dut (
    .clk(clk), .rst(rst), .pwm_pin(pin), .fault_clr(clr), .pwm(pwm),
    .shoot_through(st), .fault(fault)
  );

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; clr = 1'b0; pin = '0; acc = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      // mostly legal complementary words, sometimes a shorted leg
      for (int i = 0; i < NBR; i++) begin
        automatic logic a = 1'($urandom);
        automatic logic b = 1'($urandom);
        pin[i] = {~b, b, ~a, a};
        if ($urandom_range(0, 19) == 0) pin[i] = 4'($urandom);
      end
      clr = (n % 500 == 499);
      hist.push_back(pin);
      @(negedge clk);
      if (hist.size() > S) void'(hist.pop_front());
      if (hist.size() == S) begin
        automatic pwm_t [NBR-1:0] e = hist[0];
        logic [NBR-1:0] est;
        for (int i = 0; i < NBR; i++) est[i] = (e[i][0] & e[i][1]) | (e[i][2] & e[i][3]);
        checks += 2;
        if (pwm !== e) failures++;
        if (st !== est) failures++;
        if (est != 0) n_st++;
      end
      // sticky fault: check right after a clear and that flags are held
      checks++;
      if (clr) begin
        if (fault !== '0) failures++;
        acc = '0;
      end else begin
        if ((fault & acc) !== acc) failures++;
      end
      acc = acc | st;
    end
    checks++;
    if (n_st == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
