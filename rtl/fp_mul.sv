// fp_mul: pipelined double-precision (IEEE-754 binary64) multiplier.
//
// Stands in for the vendor floating-point multiply operator of the model's
// datapath and keeps that operator's pin set: a, b, operation_nd (new data),
// operation_rfd (ready for data), sclr (synchronous clear), ce (clock
// enable), rdy (result valid) and result. A new operand pair may be
// presented on every enabled clock; its product appears with rdy exactly
// LATENCY enabled clocks later, in issue order.
//
// Arithmetic: round to nearest, ties to even. Subnormal inputs are read as
// zero and results below the normal range are flushed to signed zero;
// results above it become infinity. The product is formed in the first
// stage and then carried through a plain delay line; how the work is spread
// over the stages and the latency of 6 are this design's choice, since only
// the operator's function and handshake are fixed by the model.
module fp_mul
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

  function automatic fp64_t mul64(fp64_t x, fp64_t y);
    logic         s;
    logic [12:0]  e;
    logic [105:0] p;
    logic [52:0]  m;
    logic         g, st;
    logic [53:0]  mr;
    s = x[63] ^ y[63];
    if (fp_is_zero(x) || fp_is_zero(y)) return {s, 63'd0};
    e = {2'b00, x[62:52]} + {2'b00, y[62:52]} - 13'd1023;
    p = {1'b1, x[51:0]} * {1'b1, y[51:0]};
    if (p[105]) begin
      m  = p[105:53];
      g  = p[52];
      st = |p[51:0];
      e  = e + 13'd1;
    end else begin
      m  = p[104:52];
      g  = p[51];
      st = |p[50:0];
    end
    mr = {1'b0, m} + {53'd0, g & (st | m[0])};
    if (mr[53]) begin
      mr = mr >> 1;
      e  = e + 13'd1;
    end
    if (e[12] || e == 13'd0) return {s, 63'd0};          // underflow
    if (e >= 13'd2047) return {s, 11'h7FF, 52'd0};       // overflow
    return {s, e[10:0], mr[51:0]};
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
      res_q[0] <= mul64(a, b);
      for (int i = 1; i < LATENCY; i++) res_q[i] <= res_q[i-1];
    end
  end

  assign operation_rfd = ~sclr;
  assign rdy           = vld_q[LATENCY-1];
  assign result        = res_q[LATENCY-1];

endmodule
