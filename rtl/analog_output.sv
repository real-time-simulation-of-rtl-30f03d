// analog_output: slow analog output loop towards the control unit.
//
// Every DECIM-th completed simulation step, the seven quantities the
// control unit measures on the real converter (u_ap, i_ap, i_as1..3, i_d,
// u_d) are converted from binary64 to signed 16-bit DAC codes and
// presented together with a one-clock update strobe. Channel c is scaled by
// 2^shift[c] (the host's adjustment of each signal to the DAC range),
// rounded to nearest and saturated. Codes hold between updates.
// DECIM = 10 follows the model (output loop ten times slower than the
// solver); the power-of-two scaling and the 16-bit code are this design's
// choices.
module analog_output
  import fp_pkg::*;
  import rect_pkg::*;
#(
  parameter int unsigned DECIM = 10,
  parameter int unsigned NCH   = 7
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    step_done,
  input  model_out_t              mo,
  input  logic signed [7:0]       shift [NCH],
  output logic signed [15:0]      code [NCH],
  output logic                    update
);

  localparam int CW = $clog2(DECIM + 1);
  logic [CW-1:0] cnt;
  fp64_t ch [NCH];

  always_comb begin
    for (int c = 0; c < NCH; c++) ch[c] = FP_ZERO;
    ch[0] = mo.uap;
    ch[1] = mo.iap;
    ch[2] = mo.ias[0];
    ch[3] = mo.ias[1];
    ch[4] = mo.ias[2];
    ch[5] = mo.id;
    ch[6] = mo.ud;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      update <= 1'b0;
      for (int c = 0; c < NCH; c++) code[c] <= '0;
    end else begin
      update <= 1'b0;
      if (step_done) begin
        if (cnt == CW'(DECIM - 1)) begin
          cnt    <= '0;
          update <= 1'b1;
          for (int c = 0; c < NCH; c++) code[c] <= fp_to_fix16(ch[c], shift[c]);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
