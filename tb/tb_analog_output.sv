// tb_analog_output: decimation, scaling, rounding and saturation of the
// analog output codes.
//
// Random model results arrive with step_done pulses; the codes must change
// only on every DECIM-th pulse (with a one-clock update strobe) and then
// equal round(value * 2^shift) saturated to 16 bits, computed here with real
// arithmetic. Values are chosen to hit both saturation limits, exact halves
// and small numbers.
module tb_analog_output;
  import fp_pkg::*;
  import rect_pkg::*;

  localparam int DECIM = 10, NCH = 7;
  logic clk = 1'b0;
  logic rst, step_done, update;
  model_out_t mo;
  logic signed [7:0] shift [NCH];
  logic signed [15:0] code [NCH];
  int checks = 0, failures = 0, n_upd = 0, n_sat = 0;

  analog_output #(.DECIM(DECIM), .NCH(NCH)) dut (
    .clk(clk), .rst(rst), .step_done(step_done), .mo(mo), .shift(shift),
    .code(code), .update(update)
  );

  always #5 clk = ~clk;

  function automatic int expect_code(real v, int sh);
    real x = v * (2.0 ** sh);
    real r = (x >= 0) ? $floor(x + 0.5) : -$floor(-x + 0.5);
    if (r > 32767.0) return 32767;
    if (r < -32768.0) return -32768;
    return int'(r);
  endfunction

  function automatic real rnd_val();
    case ($urandom_range(0, 3))
      0: return ($urandom_range(0, 2000000) - 1000000.0) / 8.0;   // exact halves/eighths
      1: return ($urandom_range(0, 2000) - 1000.0) * 100.0;        // saturating
      2: return ($urandom_range(0, 2000) - 1000.0) / 1.0e5;        // small
      default: return ($urandom_range(0, 20000) - 10000.0) / 3.0;
    endcase
  endfunction

  initial begin
    real vals [NCH];
    rst = 1'b1; step_done = 0; mo = '0;
    for (int c = 0; c < NCH; c++) shift[c] = 8'(c - 2);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      for (int c = 0; c < NCH; c++) vals[c] = rnd_val();
      mo.uap = $realtobits(vals[0]); mo.iap = $realtobits(vals[1]);
      mo.ias[0] = $realtobits(vals[2]); mo.ias[1] = $realtobits(vals[3]);
      mo.ias[2] = $realtobits(vals[4]); mo.id = $realtobits(vals[5]);
      mo.ud = $realtobits(vals[6]);
      step_done = 1'b1;
      @(negedge clk);
      step_done = 1'b0;
      checks++;
      if (update !== (n % DECIM == DECIM - 1)) failures++;
      if (update) begin
        n_upd++;
        for (int c = 0; c < NCH; c++) begin
          automatic int e = expect_code(vals[c], c - 2);
          checks++;
          if (int'(code[c]) != e) begin
            failures++;
            if (failures < 10) $display("ch%0d v=%g: got %0d expected %0d", c, vals[c], code[c], e);
          end
          if (e == 32767 || e == -32768) n_sat++;
        end
      end
      repeat ($urandom_range(1, 4)) @(negedge clk);
      checks++;
      if (update) failures++;
    end
    checks++;
    if (n_upd != 50 || n_sat == 0) failures++;
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
