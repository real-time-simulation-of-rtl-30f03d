// tb_fp_add: self-checking test of the double-precision fp_add operator.
//
// Streams random binary64 operand pairs (normal range, both signs, widely
// spread exponents) plus hand-picked edge cases into the unit one per clock,
// then a second burst with gaps in operation_nd. Each result is compared with
// the simulator's own IEEE-754 real arithmetic, and every result must leave
// the unit exactly LATENCY clocks after its operands went in.
module tb_fp_add;
  import fp_pkg::*;

  localparam int LAT = 6;
  localparam int N   = 4000;

  logic  clk = 1'b0;
  logic  sclr, ce, nd, rfd, rdy;
  fp64_t a, b, res;

  int checks = 0, failures = 0;
  fp64_t exp_q [$];
  int    t_q [$];
  int    cycle = 0;

  fp_add #(.LATENCY(LAT)) dut (
    .clk(clk), .sclr(sclr), .ce(ce), .a(a), .b(b), .operation_nd(nd),
    .operation_rfd(rfd), .rdy(rdy), .result(res)
  );

  always #5 clk = ~clk;
  // timestamp of the clock cycle in which operation_nd is sampled high
  always @(posedge clk) begin
    if (nd) t_q.push_back(cycle);
    cycle++;
  end

  function automatic fp64_t rnd_fp(int espan);
    fp64_t r;
    r[63]    = $urandom_range(0, 1);
    r[62:52] = 11'(1023 - espan + $urandom_range(0, 2 * espan));
    r[51:32] = 20'($urandom);
    r[31:0]  = $urandom;
    return r;
  endfunction

  function automatic fp64_t model(fp64_t x, fp64_t y);
    real rx, ry;
    rx = $bitstoreal(x);
    ry = $bitstoreal(y);
    return $realtobits(rx + ry);
  endfunction

  // inputs change on the falling edge, away from the sampling edge
  task automatic issue(fp64_t x, fp64_t y);
    @(negedge clk);
    a  = x;
    b  = y;
    nd = 1'b1;
    exp_q.push_back(model(x, y));
  endtask

  task automatic idle();
    @(negedge clk);
    nd = 1'b0;
  endtask

  // checker: sampled mid-cycle so that cycle counts compare cleanly
  always @(negedge clk) begin
    if (rdy) begin
      fp64_t e;
      int t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected rdy");
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (res !== e && !(fp_is_zero(res) && fp_is_zero(e))) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", res, e);
        end
        checks++;
        if (cycle - t != LAT) begin
          failures++;
          if (failures < 10) $display("latency %0d, expected %0d", cycle - t, LAT);
        end
      end
    end
  end

  initial begin
    fp64_t x, y;
    sclr = 1'b1; ce = 1'b1; nd = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    sclr = 1'b0;
    @(posedge clk);
    // edge cases
    issue(FP_ZERO, FP_ONE);
    issue(FP_ONE, FP_ZERO);
    issue(FP_ONE, fp_neg(FP_ONE));
    issue($realtobits(1.0), $realtobits(1.0e-17));
    issue($realtobits(3.0), $realtobits(-2.9999999999));
    issue($realtobits(6.25e-6), $realtobits(1.0/3.0e-3));
    issue($realtobits(250.0), $realtobits(-249.75));
    for (int i = 0; i < N; i++) begin
      x = rnd_fp(i < N/2 ? 60 : 3);
      y = (i % 3 == 0) ? {~x[63], x[62:52], 52'($urandom)} : rnd_fp(i < N/2 ? 60 : 3);
      issue(x, y);
      if (i % 7 == 0) idle();
    end
    idle();
    repeat (LAT + 3) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    if (rfd !== 1'b1) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
