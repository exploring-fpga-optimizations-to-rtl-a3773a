// fp32_add: single-precision floating-point adder, combinational.
//
// Orders the operands by magnitude, aligns the smaller significand with
// guard, round and sticky bits, adds or subtracts, renormalises with a
// leading-zero count and rounds to nearest, ties to even. Subtraction is
// done by the caller flipping the sign bit of b. Denormals count as zero
// and tiny results flush to signed zero; an exact zero difference is +0.
// inf - inf and NaN operands give the quiet NaN 0x7fc00000. The rounding and
// flush rules are this design's choice; the solver only needs IEEE float sums.
//
// Ports: a, b operands, y = a + b, valid in the same cycle.
module fp32_add
  import sptrsv_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp_class_t ca, cb;
  fp32_t big, sml;
  logic [7:0]  d;
  logic [26:0] mb, ms, msh;   // 1.f followed by guard, round, sticky
  logic        stk;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [23:0] m;
  logic        g, rs, inc;
  logic [24:0] mr;
  logic signed [10:0] e;
  logic        s;
  logic        found;

  always_comb begin
    ca = fp_classify(a[30:0]);
    cb = fp_classify(b[30:0]);
    if (a[30:0] >= b[30:0]) begin
      big = a; sml = b;
    end else begin
      big = b; sml = a;
    end
    s  = big[31];
    e  = 11'(signed'({3'b0, big[30:23]}));
    d  = big[30:23] - sml[30:23];
    mb = {1'b1, big[22:0], 3'b000};
    ms = {1'b1, sml[22:0], 3'b000};
    // Align the smaller operand; bits shifted out collect in the sticky bit.
    if (d >= 8'd27) begin
      msh = 27'd1;
      stk = 1'b1;
    end else begin
      msh = ms >> d;
      stk = |(ms & ((27'd1 << d) - 27'd1));
      msh[0] = msh[0] | stk;
    end
    found = 1'b0;
    lz    = '0;
    if (big[31] == sml[31]) begin
      sum = {1'b0, mb} + {1'b0, msh};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 11'sd1;
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, msh};
      // Renormalise so that the leading one sits at bit 26.
      for (int i = 26; i >= 0; i--) begin
        if (sum[i] && !found) begin
          lz    = 5'(26 - i);
          found = 1'b1;
        end
      end
      sum = sum << lz;
      e   = e - 11'(signed'({6'b0, lz}));
    end
    m   = sum[26:3];
    g   = sum[2];
    rs  = sum[1] | sum[0];
    inc = g & (rs | m[0]);
    mr  = {1'b0, m} + 25'(inc);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end

    if (ca == FP_NAN || cb == FP_NAN || (ca == FP_INF && cb == FP_INF && a[31] != b[31]))
      y = FP32_QNAN;
    else if (ca == FP_INF)
      y = {a[31], 8'hff, 23'd0};
    else if (cb == FP_INF)
      y = {b[31], 8'hff, 23'd0};
    else if (ca == FP_ZERO && cb == FP_ZERO)
      y = {a[31] & b[31], 31'd0};
    else if (ca == FP_ZERO)
      y = b;
    else if (cb == FP_ZERO)
      y = a;
    else if (sum == 28'd0)
      y = FP32_ZERO;
    else if (e >= 11'sd255)
      y = {s, 8'hff, 23'd0};
    else if (e <= 11'sd0)
      y = {s, 31'd0};
    else
      y = {s, e[7:0], mr[22:0]};
  end

endmodule
