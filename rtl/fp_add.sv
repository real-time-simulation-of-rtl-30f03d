// fp_add: pipelined double-precision (IEEE-754 binary64) adder.
//
// Stands in for the vendor floating-point add operator of the model's
// datapath, with the same pin set as fp_mul: a, b, operation_nd,
// operation_rfd, sclr, ce, rdy, result. A subtraction is an addition with
// the sign of b flipped by the caller. One operand pair per enabled clock;
// the sum appears with rdy LATENCY enabled clocks later, in issue order.
//
// Arithmetic: operands are ordered by magnitude, the smaller one is aligned
// with guard, round and sticky bits, the sum or difference is normalised and
// rounded to nearest, ties to even. Subnormals are read and produced as zero,
// an exact cancellation gives +0, overflow gives infinity. Latency 6 and the
// single-stage arithmetic followed by a delay line are this design's choice.
module fp_add
  import fp_pkg::*;
#(
  parameter int unsigned LATENCY = 6
) (
  input  logic  clk,
  input  logic  sclr,
  input  logic  ce,
  input  fp64_t a,
  input  fp64_t b,
  input  logic  operation_nd,
  output logic  operation_rfd,
  output logic  rdy,
  output fp64_t result
);

  function automatic fp64_t add64(fp64_t x, fp64_t y);
    fp64_t       big, sml;
    logic [12:0] e;
    logic [11:0] d;
    logic [56:0] ma, mb, sm;
    logic        st;
    int          lz;
    logic [53:0] mr;
    if (fp_is_zero(y)) return fp_is_zero(x) ? {x[63] & y[63], 63'd0} : x;
    if (fp_is_zero(x)) return y;
    if (x[62:0] >= y[62:0]) begin big = x; sml = y; end
    else                    begin big = y; sml = x; end
    e  = {2'b00, big[62:52]};
    d  = {1'b0, big[62:52]} - {1'b0, sml[62:52]};
    ma = {1'b0, 1'b1, big[51:0], 3'b000};
    mb = {1'b0, 1'b1, sml[51:0], 3'b000};
    if (d > 12'd56) begin
      mb = 57'd1;                                   // only sticky survives
    end else begin
      st = 1'b0;
      for (int i = 0; i < 57; i++) if (i < int'(d) && mb[i]) st = 1'b1;
      mb = (mb >> d) | {56'd0, st};
    end
    if (big[63] == sml[63]) sm = ma + mb;
    else                    sm = ma - mb;
    if (sm == 57'd0) return FP_ZERO;
    if (sm[56]) begin
      sm = (sm >> 1) | {56'd0, sm[0]};
      e  = e + 13'd1;
    end else begin
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (sm[i]) break;
        lz++;
      end
      sm = sm << lz;
      e  = e - 13'(lz);
    end
    mr = {1'b0, sm[55:3]} + {53'd0, sm[2] & (sm[1] | sm[0] | sm[3])};
    if (mr[53]) begin
      mr = mr >> 1;
      e  = e + 13'd1;
    end
    if (e[12] || e == 13'd0) return {big[63], 63'd0};
    if (e >= 13'd2047) return {big[63], 11'h7FF, 52'd0};
    return {big[63], e[10:0], mr[51:0]};
  endfunction

  logic  [LATENCY-1:0] vld_q;
  fp64_t               res_q [LATENCY];

  always_ff @(posedge clk) begin
    if (sclr) begin
      vld_q <= '0;
    end else if (ce) begin
      vld_q[0] <= operation_nd;
      for (int i = 1; i < LATENCY; i++) vld_q[i] <= vld_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      res_q[0] <= add64(a, b);
      for (int i = 1; i < LATENCY; i++) res_q[i] <= res_q[i-1];
    end
  end

  assign operation_rfd = ~sclr;
  assign rdy           = vld_q[LATENCY-1];
  assign result        = res_q[LATENCY-1];

endmodule
