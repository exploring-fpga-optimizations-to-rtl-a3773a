// fp32_mul: single-precision floating-point multiplier, combinational.
//
// Forms the 48-bit product of the two 24-bit significands, normalises it by
// at most one place and rounds to nearest, ties to even. Denormal operands
// count as zero and results below the normal range are flushed to signed
// zero; overflow gives a signed infinity; NaN operands and 0 x inf give the
// quiet NaN 0x7fc00000. These flush-to-zero rules are this design's choice;
// the solver only needs an IEEE float product l_ij * x_j.
//
// Ports: a, b operands, y = a * b. No clock: the result is valid in the same
// cycle (the compute kernel registers it).
module fp32_mul
  import sptrsv_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp_class_t ca, cb;
  logic        s;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, inc;
  logic [24:0] mr;
  logic signed [10:0] e;

  always_comb begin
    ca = fp_classify(a[30:0]);
    cb = fp_classify(b[30:0]);
    s  = a[31] ^ b[31];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e  = 11'(signed'({3'b0, a[30:23]})) + 11'(signed'({3'b0, b[30:23]})) - 11'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 11'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    inc = g & (st | m[0]);
    mr  = {1'b0, m} + 25'(inc);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end

    if (ca == FP_NAN || cb == FP_NAN ||
        (ca == FP_INF && cb == FP_ZERO) || (ca == FP_ZERO && cb == FP_INF))
      y = FP32_QNAN;
    else if (ca == FP_INF || cb == FP_INF)
      y = {s, 8'hff, 23'd0};
    else if (ca == FP_ZERO || cb == FP_ZERO)
      y = {s, 31'd0};
    else if (e >= 11'sd255)
      y = {s, 8'hff, 23'd0};
    else if (e <= 11'sd0)
      y = {s, 31'd0};
    else
      y = {s, e[7:0], mr[22:0]};
  end

endmodule
