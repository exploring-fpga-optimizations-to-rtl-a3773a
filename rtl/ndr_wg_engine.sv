// ndr_wg_engine: one compute unit of the NDRange SPTRSV kernels. It executes
// work-groups, one per matrix row, with BS work-items each.
//
// As in a compiled NDRange kernel, the work-items of a group do not run on
// separate hardware. They pass one after another through a single pipeline
// (one multiplier, one adder), and each keeps its own partial sum in local
// storage. For the row i taken from position p of iorder, work-item t handles
// the off-diagonal entries rs+t, rs+t+BS, rs+t+2*BS, ... of the row, where
// rs = row_ptr[i]. Each step gives every work-item one entry. The work-item
// reads col_idx, val and x[col], multiplies and adds to its partial sum. After
// the last step the BS partial sums are reduced in a tree (stride BS/2, BS/4,
// ... 1), as a local-memory reduction with barriers would do. Work-item 0 then
// forms x_i = (b_i - sum) / l_ii and writes it to global memory.
//
// WAIT = 1 gives the waiting variant, for a single launch over all rows with
// x preloaded to +infinity. A work-item whose x[col] still reads +inf leaves
// its flag clear and does nothing. The step repeats, re-reading the x values
// that were not ready, until the flags of all work-items are set; only then
// does the group move to the next step. WAIT = 0 gives the per-level variant:
// the host launches one level at a time, so every x read is already solved
// and no check is made.
//
// Interfaces. The engine asks the row dispatcher for work with row_req and
// gets row_gnt with row_pos (a position in iorder), or row_empty when the
// launch has no rows left; launch restarts it. Global memory: one request at a
// time (valid/ready), read data returned with rsp_valid. The diagonal is taken
// to be the last entry of each row. What follows the source description: a
// work-group per row, the BS-strided loop, the flags and +inf test, the
// reduction and the single writer of x. This design's own choices: the
// sequential single-pipeline timing, re-reading col and val on a repeated
// step, and the tree order of the reduction.
module ndr_wg_engine
  import sptrsv_pkg::*;
#(
  parameter int unsigned BS   = 4,
  parameter bit          WAIT = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   launch,
  output logic   busy,
  output logic   row_req,
  input  logic   row_gnt,
  input  logic   row_empty,
  input  idx_t   row_pos,
  input  gaddr_t iorder_base,
  input  gaddr_t row_ptr_base,
  input  gaddr_t col_idx_base,
  input  gaddr_t val_base,
  input  gaddr_t b_base,
  input  gaddr_t x_base,
  output logic   gm_req_valid,
  input  logic   gm_req_ready,
  output logic   gm_req_we,
  output gaddr_t gm_req_addr,
  output logic [31:0] gm_req_wdata,
  input  logic   gm_rsp_valid,
  input  logic [31:0] gm_rsp_data,
  output logic   spin            // a step had to be repeated (WAIT only)
);

  localparam int unsigned TW = (BS > 1) ? $clog2(BS) : 1;
  localparam fp32_t       FP32_INF = 32'h7f80_0000;

  typedef enum logic [3:0] {
    E_IDLE, E_GET, E_RD_REQ, E_RD_WAIT, E_ROWHDR, E_STEP, E_ITEM, E_MAC,
    E_STEP_END, E_REDUCE, E_SUB, E_DIV, E_WRITE
  } estate_t;
  typedef enum logic [2:0] {D_ROW, D_RS, D_RE, D_B, D_DIAG, D_COL, D_VAL, D_X} dst_t;

  estate_t st;
  dst_t    dst;
  gaddr_t  rd_addr;

  idx_t  row, rs, re, base, col;
  fp32_t bi, diag, v, xv;
  fp32_t part [BS];
  logic [BS-1:0] flag;
  logic [TW-1:0] t;
  logic [TW:0]   stride, r;
  fp32_t xres;

  // shared arithmetic: one multiplier and one adder for all work-items
  fp32_t mul_y, add_a, add_b, add_y, diff;
  fp32_mul u_mul (.a(v), .b(xv), .y(mul_y));
  fp32_add u_add (.a(add_a), .b(add_b), .y(add_y));
  fp32_add u_sub (.a(bi), .b({~part[0][31], part[0][30:0]}), .y(diff));
  always_comb begin
    if (st == E_REDUCE) begin
      add_a = part[r[TW-1:0]];
      add_b = part[TW'(r + stride)];
    end else begin
      add_a = part[t];
      add_b = mul_y;
    end
  end

  logic  div_start, div_done;
  fp32_t div_y;
  fp32_div u_div (.clk, .rst_n, .start(div_start), .a(diff), .b(diag),
                  .busy(), .done(div_done), .y(div_y));
  assign div_start = (st == E_SUB);

  // k of the current work-item, and whether it has an off-diagonal entry
  idx_t k;
  logic has_entry;
  assign k         = base + idx_t'(t);
  assign has_entry = (k + 1 < re);

  assign row_req      = (st == E_GET);
  assign busy         = (st != E_IDLE);
  assign gm_req_valid = (st == E_RD_REQ) || (st == E_WRITE);
  assign gm_req_we    = (st == E_WRITE);
  assign gm_req_addr  = (st == E_WRITE) ? x_base + gaddr_t'(row) : rd_addr;
  assign gm_req_wdata = xres;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; dst <= D_ROW; rd_addr <= '0;
      row <= '0; rs <= '0; re <= '0; base <= '0; col <= '0;
      bi <= '0; diag <= '0; v <= '0; xv <= '0; flag <= '0; t <= '0;
      stride <= '0; r <= '0; xres <= '0; spin <= 1'b0;
      for (int w = 0; w < BS; w++) part[w] <= FP32_ZERO;
    end else begin
      spin <= 1'b0;
      unique case (st)
        E_IDLE: if (launch) st <= E_GET;
        E_GET: begin
          if (row_gnt) begin
            rd_addr <= iorder_base + gaddr_t'(row_pos);
            dst <= D_ROW; st <= E_RD_REQ;
          end else if (row_empty) st <= E_IDLE;
        end
        E_RD_REQ: if (gm_req_ready) st <= E_RD_WAIT;
        E_RD_WAIT: if (gm_rsp_valid) begin
          unique case (dst)
            D_ROW: begin row <= gm_rsp_data; rd_addr <= row_ptr_base + gaddr_t'(gm_rsp_data); dst <= D_RS; st <= E_RD_REQ; end
            D_RS:  begin rs <= gm_rsp_data; rd_addr <= row_ptr_base + gaddr_t'(row) + gaddr_t'(1); dst <= D_RE; st <= E_RD_REQ; end
            D_RE:  begin re <= gm_rsp_data; rd_addr <= b_base + gaddr_t'(row); dst <= D_B; st <= E_RD_REQ; end
            D_B:   begin bi <= gm_rsp_data; rd_addr <= val_base + gaddr_t'(re) - gaddr_t'(1); dst <= D_DIAG; st <= E_RD_REQ; end
            D_DIAG: begin diag <= gm_rsp_data; st <= E_ROWHDR; end
            D_COL: begin col <= gm_rsp_data; rd_addr <= val_base + gaddr_t'(k); dst <= D_VAL; st <= E_RD_REQ; end
            D_VAL: begin v <= gm_rsp_data; rd_addr <= x_base + gaddr_t'(col); dst <= D_X; st <= E_RD_REQ; end
            D_X:   begin xv <= gm_rsp_data; st <= E_MAC; end
            default: st <= E_IDLE;
          endcase
        end
        E_ROWHDR: begin
          for (int w = 0; w < BS; w++) part[w] <= FP32_ZERO;
          base <= rs;
          flag <= '0;
          st   <= E_STEP;
        end
        E_STEP: begin
          // start of a step; finished when no work-item has an entry left
          if (!(base + 1 < re)) begin
            stride <= (TW+1)'(BS / 2);
            r      <= '0;
            st     <= (BS > 1) ? E_REDUCE : E_SUB;
          end else begin
            t  <= '0;
            st <= E_ITEM;
          end
        end
        E_ITEM: begin
          if (flag[t] || !has_entry) begin
            flag[t] <= 1'b1;
            st <= E_STEP_END;
          end else begin
            rd_addr <= col_idx_base + gaddr_t'(k);
            dst <= D_COL; st <= E_RD_REQ;
          end
        end
        E_MAC: begin
          if (!(WAIT && xv == FP32_INF)) begin
            part[t] <= add_y;
            flag[t] <= 1'b1;
          end
          st <= E_STEP_END;
        end
        E_STEP_END: begin
          if (int'(t) != BS - 1) begin
            t  <= t + 1'b1;
            st <= E_ITEM;
          end else if (&flag) begin
            base <= base + idx_t'(BS);
            flag <= '0;
            st   <= E_STEP;
          end else begin
            spin <= 1'b1;        // some x not solved yet: repeat the step
            t    <= '0;
            st   <= E_ITEM;
          end
        end
        E_REDUCE: begin
          part[r[TW-1:0]] <= add_y;
          if (r + 1 == stride) begin
            r <= '0;
            if (stride == 1) st <= E_SUB;
            else stride <= stride >> 1;
          end else r <= r + 1'b1;
        end
        E_SUB: st <= E_DIV;
        E_DIV: if (div_done) begin xres <= div_y; st <= E_WRITE; end
        E_WRITE: if (gm_req_ready) st <= E_GET;
        default: st <= E_IDLE;
      endcase
    end
  end

endmodule
