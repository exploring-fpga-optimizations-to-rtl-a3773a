// fp32_div: single-precision floating-point divider, sequential.
//
// Restoring division of the 24-bit significands, one quotient bit per clock:
// after `start` it runs 26 iterations (24 significand bits, a guard bit and
// the normalisation bit), forms the sticky bit from the final remainder and
// rounds to nearest, ties to even. Denormals count as zero and tiny results
// flush to signed zero; x/0 gives signed infinity, 0/0, inf/inf and NaN
// operands give the quiet NaN 0x7fc00000. A bit-serial divider is this
// design's choice: the solver divides once per row, by the diagonal l_ii,
// so division is far off the critical throughput path.
//
// Ports: start (one cycle, ignored while busy) latches a (dividend) and
// b (divisor); done pulses for one cycle with y valid, 28 cycles after start.
// y holds its value until the next division completes.
module fp32_div
  import sptrsv_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  localparam int unsigned QBITS = 26;

  logic               s_q;
  logic signed [10:0] e_q;
  logic [24:0]        rem_q;     // partial remainder, < 2 * divisor
  logic [23:0]        dvs_q;
  logic [QBITS-1:0]   quo_q;
  logic [4:0]         cnt_q;
  logic               special_q;
  fp32_t              special_y_q;
  logic               fin_q;

  // Special-case decode at start.
  fp_class_t ca, cb;
  logic      sp;
  fp32_t     sp_y;
  always_comb begin
    ca   = fp_classify(a[30:0]);
    cb   = fp_classify(b[30:0]);
    sp   = 1'b1;
    sp_y = FP32_QNAN;
    if (ca == FP_NAN || cb == FP_NAN || (ca == FP_ZERO && cb == FP_ZERO) ||
        (ca == FP_INF && cb == FP_INF))
      sp_y = FP32_QNAN;
    else if (ca == FP_INF || cb == FP_ZERO)
      sp_y = {a[31] ^ b[31], 8'hff, 23'd0};
    else if (ca == FP_ZERO || cb == FP_INF)
      sp_y = {a[31] ^ b[31], 31'd0};
    else
      sp = 1'b0;
  end

  // Final normalisation and rounding of the raw quotient. quo_q holds the
  // quotient of 1.fa / 1.fb scaled by 2^25; it lies in [2^24, 2^26).
  logic [23:0]        m;
  logic               g, st, inc;
  logic [24:0]        mr;
  logic signed [10:0] e;
  fp32_t              res;
  always_comb begin
    e  = e_q;
    st = (rem_q != 25'd0);
    if (quo_q[QBITS-1]) begin
      m  = quo_q[25:2];
      g  = quo_q[1];
      st = st | quo_q[0];
    end else begin
      m  = quo_q[24:1];
      g  = quo_q[0];
      e  = e - 11'sd1;
    end
    inc = g & (st | m[0]);
    mr  = {1'b0, m} + 25'(inc);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end
    if (special_q)
      res = special_y_q;
    else if (e >= 11'sd255)
      res = {s_q, 8'hff, 23'd0};
    else if (e <= 11'sd0)
      res = {s_q, 31'd0};
    else
      res = {s_q, e[7:0], mr[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      fin_q       <= 1'b0;
      y           <= FP32_ZERO;
      s_q         <= 1'b0;
      e_q         <= '0;
      rem_q       <= '0;
      dvs_q       <= '0;
      quo_q       <= '0;
      cnt_q       <= '0;
      special_q   <= 1'b0;
      special_y_q <= FP32_ZERO;
    end else begin
      done  <= 1'b0;
      fin_q <= 1'b0;
      if (start && !busy) begin
        busy        <= 1'b1;
        s_q         <= a[31] ^ b[31];
        e_q         <= 11'(signed'({3'b0, a[30:23]})) - 11'(signed'({3'b0, b[30:23]})) + 11'sd127;
        rem_q       <= {1'b0, 1'b1, a[22:0]};
        dvs_q       <= {1'b1, b[22:0]};
        quo_q       <= '0;
        cnt_q       <= 5'(QBITS);
        special_q   <= sp;
        special_y_q <= sp_y;
      end else if (busy && cnt_q != 5'd0) begin
        if (rem_q >= {1'b0, dvs_q}) begin
          rem_q <= (rem_q - {1'b0, dvs_q}) << 1;
          quo_q <= {quo_q[QBITS-2:0], 1'b1};
        end else begin
          rem_q <= rem_q << 1;
          quo_q <= {quo_q[QBITS-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 5'd1;
        if (cnt_q == 5'd1) fin_q <= 1'b1;
      end else if (fin_q) begin
        y    <= res;
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end

endmodule
