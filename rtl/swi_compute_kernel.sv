// swi_compute_kernel: the compute kernel of the channel-based single-work-item
// SPTRSV solver. It does all the arithmetic and never touches memory.
//
// For each row it takes one beat from the row channel (row number i and its
// entry count), then consumes matching beats from the coefficient and x
// channels, UF lanes at a time, until that many entries have arrived. The
// inner loop is unrolled UF times: UF multipliers form l_ij * x_j for the
// off-diagonal lanes in one cycle (registered), and the next cycle a chain of
// UF adders adds them to the running sum in column order, the order of the
// serial loop. One beat is accepted per cycle (initiation interval 1). The
// lane flagged as diagonal carries l_ii in the coefficient channel and b_i in
// the x channel; they are kept aside. When the row is complete the kernel
// forms b_i - sum, divides it by l_ii in the bit-serial divider and sends
// (i, x_i) down the result channel.
//
// Timing per row: one cycle to take the row beat, one cycle per beat, two
// cycles to drain the multiply and add stages, 28 cycles of division and at
// least one cycle to hand over the result. A new row is taken only after the
// previous result has left, so division is not overlapped with the next row;
// that and the bit-serial divider are this design's choices.
module swi_compute_kernel
  import sptrsv_pkg::*;
#(
  parameter int unsigned UF = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // row channel
  input  logic           row_valid,
  output logic           row_ready,
  input  row_beat_t      row_data,
  // coefficient channel
  input  logic           coef_valid,
  output logic           coef_ready,
  input  logic [UF-1:0]  coef_lane_valid,
  input  logic [UF-1:0]  coef_lane_diag,
  input  fp32_t [UF-1:0] coef_val,
  // x channel
  input  logic           xch_valid,
  output logic           xch_ready,
  input  fp32_t [UF-1:0] xch_val,
  // result channel
  output logic           res_valid,
  input  logic           res_ready,
  output res_beat_t      res_data,
  // status
  output logic           busy
);

  typedef enum logic [2:0] {C_IDLE, C_MAC, C_DRAIN, C_SUB, C_DIV, C_OUT} cstate_t;
  cstate_t st;

  idx_t  row, remaining;
  fp32_t acc, bi, diag;

  // stage 1: products
  fp32_t [UF-1:0] prod_c, prod_q;
  logic           prod_v;
  for (genvar l = 0; l < UF; l++) begin : g_mul
    fp32_mul u_mul (.a(coef_val[l]), .b(xch_val[l]), .y(prod_c[l]));
  end

  // stage 2: in-order adder chain onto the running sum
  fp32_t [UF:0] chain;
  assign chain[0] = acc;
  for (genvar l = 0; l < UF; l++) begin : g_add
    fp32_add u_add (.a(chain[l]), .b(prod_q[l]), .y(chain[l+1]));
  end

  // b_i - sum, then division by the diagonal
  fp32_t diff;
  fp32_add u_sub (.a(bi), .b({~acc[31], acc[30:0]}), .y(diff));

  logic  div_start, div_done;
  fp32_t div_y;
  fp32_div u_div (
    .clk, .rst_n, .start(div_start), .a(diff), .b(diag),
    .busy(), .done(div_done), .y(div_y)
  );

  logic beat_fire;
  idx_t beat_cnt;
  assign beat_cnt = idx_t'($countones(coef_lane_valid));

  assign row_ready  = (st == C_IDLE);
  assign coef_ready = (st == C_MAC) && xch_valid;
  assign xch_ready  = (st == C_MAC) && coef_valid;
  assign beat_fire  = (st == C_MAC) && coef_valid && xch_valid;
  assign div_start  = (st == C_SUB);
  assign res_valid  = (st == C_OUT);
  assign busy       = (st != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; row <= '0; remaining <= '0; acc <= FP32_ZERO;
      bi <= FP32_ZERO; diag <= FP32_ZERO; prod_q <= '0; prod_v <= 1'b0;
      res_data <= '0;
    end else begin
      // stage 2 runs whenever stage 1 holds products
      prod_v <= 1'b0;
      if (prod_v) acc <= chain[UF];
      unique case (st)
        C_IDLE: if (row_valid) begin
          row       <= row_data.row;
          remaining <= row_data.nnz;
          acc       <= FP32_ZERO;
          bi        <= FP32_ZERO;
          diag      <= FP32_ZERO;
          st        <= (row_data.nnz == '0) ? C_DRAIN : C_MAC;
        end
        C_MAC: if (beat_fire) begin
          for (int l = 0; l < UF; l++) begin
            prod_q[l] <= (coef_lane_valid[l] && !coef_lane_diag[l]) ? prod_c[l] : FP32_ZERO;
            if (coef_lane_valid[l] && coef_lane_diag[l]) begin
              diag <= coef_val[l];
              bi   <= xch_val[l];
            end
          end
          prod_v    <= 1'b1;
          remaining <= remaining - beat_cnt;
          if (remaining <= beat_cnt) st <= C_DRAIN;
        end
        C_DRAIN: if (!prod_v) st <= C_SUB;
        C_SUB:   st <= C_DIV;
        C_DIV:   if (div_done) begin
          res_data.row <= row;
          res_data.x   <= div_y;
          st           <= C_OUT;
        end
        C_OUT:   if (res_ready) st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
