// swi_mem_kernel: the memory kernel of the channel-based single-work-item
// SPTRSV solver. It does every global-memory access of the solve.
//
// Three nested loops walk the level schedule. The outer loop takes the levels
// one by one from ilevels (ilevels[l] is the position in iorder of the first
// row of level l, ilevels[n_levels] one past the last). The middle loop takes
// the rows of the level from iorder; for row i it reads row_ptr[i],
// row_ptr[i+1] and b[i] and sends the row number and its entry count down the
// row channel. The inner loop reads col_idx[k] and val[k] for each stored
// entry, fetches x[col] and packs UF entries per beat into the coefficient
// channel (values plus lane-valid and diagonal flags) and the x channel. For
// the diagonal entry the x lane carries b[i] instead of an unknown.
//
// Rows of one level are issued back to back without waiting for their
// results (rows of a level never depend on each other). At the end of each
// level the kernel waits until every row it issued has come back through the
// result channel and been written: this level barrier is what guarantees that
// the next level reads only solved unknowns.
//
// Solved unknowns are written by a separate write-back path that drains the
// result channel. With USE_HASH, unknowns with index < HASH_DEPTH go to the
// local x store (x_hash) and are read from it; the rest go to global memory.
// With WRITE_THROUGH = 0 the local store is copied to global memory after
// the last level; with WRITE_THROUGH = 1 every unknown is also written to
// global memory when it is solved. USE_HASH = 0 gives the variant that keeps
// x only in global memory.
//
// Global memory port: a request (valid/ready, we, word address, wdata) and an
// in-order read response (rsp_valid, rsp_data); writes have no response. One
// read is outstanding at a time. The write-back path has priority on the port.
// Kernel arguments are sampled while start is high and must stay stable until
// done pulses. What follows the source description: the loop structure, the
// level barrier, the channels, the local x store and its two write policies.
// This design's own choices: the port protocol, one outstanding read, the
// index window kept locally and sending b[i] in the diagonal lane.
module swi_mem_kernel
  import sptrsv_pkg::*;
#(
  parameter int unsigned UF            = 4,
  parameter bit          USE_HASH      = 1'b1,
  parameter bit          WRITE_THROUGH = 1'b0,
  parameter int unsigned HASH_DEPTH    = 8192,
  localparam int unsigned HAW          = $clog2(HASH_DEPTH)
) (
  input  logic   clk,
  input  logic   rst_n,
  // kernel launch
  input  logic   start,
  output logic   busy,
  output logic   done,
  input  idx_t   n_rows,
  input  idx_t   n_levels,
  input  gaddr_t ilevels_base,
  input  gaddr_t iorder_base,
  input  gaddr_t row_ptr_base,
  input  gaddr_t col_idx_base,
  input  gaddr_t val_base,
  input  gaddr_t b_base,
  input  gaddr_t x_base,
  // global memory
  output logic   gm_req_valid,
  input  logic   gm_req_ready,
  output logic   gm_req_we,
  output gaddr_t gm_req_addr,
  output logic [31:0] gm_req_wdata,
  input  logic   gm_rsp_valid,
  input  logic [31:0] gm_rsp_data,
  // row channel
  output logic      row_valid,
  input  logic      row_ready,
  output row_beat_t row_data,
  // coefficient channel
  output logic             coef_valid,
  input  logic             coef_ready,
  output logic [UF-1:0]    coef_lane_valid,
  output logic [UF-1:0]    coef_lane_diag,
  output fp32_t [UF-1:0]   coef_val,
  // x channel
  output logic           xch_valid,
  input  logic           xch_ready,
  output fp32_t [UF-1:0] xch_val,
  // result channel
  input  logic      res_valid,
  output logic      res_ready,
  input  res_beat_t res_data,
  // local x store
  output logic           hash_rd_en,
  output logic [HAW-1:0] hash_rd_addr,
  input  fp32_t          hash_rd_data,
  output logic           hash_wr_en,
  output logic [HAW-1:0] hash_wr_addr,
  output fp32_t          hash_wr_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_RD_REQ, S_RD_WAIT, S_LEV, S_ROW, S_ROW_PUSH, S_ELEM, S_ELEM_X,
    S_HASH_WAIT, S_PUT, S_BEAT_PUSH, S_BARRIER, S_FLUSH_RD, S_FLUSH_WR, S_DONE
  } state_t;

  typedef enum logic [3:0] {
    R_LSTART, R_LEND, R_ROW, R_RS, R_RE, R_B, R_COL, R_VAL, R_X
  } rd_step_t;

  state_t   st;
  rd_step_t step;
  gaddr_t   rd_addr;

  idx_t lev, lstart, lend, p, row, rs, re, k, col, flush_idx;
  fp32_t bi, v, xv;
  logic  isdiag;
  idx_t  rows_issued, rows_written;
  logic [$clog2(UF+1)-1:0] lane;

  // ---------------------------------------------------------------- write-back
  logic wb_local, wb_global, wb_fire;
  always_comb begin
    wb_local  = USE_HASH && (res_data.row < idx_t'(HASH_DEPTH));
    wb_global = !wb_local || WRITE_THROUGH;
    res_ready = wb_global ? gm_req_ready : 1'b1;
    wb_fire   = res_valid && res_ready;
    hash_wr_en   = res_valid && res_ready && wb_local;
    hash_wr_addr = HAW'(res_data.row);
    hash_wr_data = res_data.x;
  end

  // ------------------------------------------------------ global memory port
  logic rd_issue, fl_issue;
  always_comb begin
    rd_issue = (st == S_RD_REQ);
    fl_issue = (st == S_FLUSH_WR);
    if (res_valid && wb_global) begin
      gm_req_valid = 1'b1;
      gm_req_we    = 1'b1;
      gm_req_addr  = x_base + gaddr_t'(res_data.row);
      gm_req_wdata = res_data.x;
    end else if (fl_issue) begin
      gm_req_valid = 1'b1;
      gm_req_we    = 1'b1;
      gm_req_addr  = x_base + gaddr_t'(flush_idx);
      gm_req_wdata = hash_rd_data;
    end else begin
      gm_req_valid = rd_issue;
      gm_req_we    = 1'b0;
      gm_req_addr  = rd_addr;
      gm_req_wdata = '0;
    end
  end
  logic own_grant;
  assign own_grant = gm_req_ready && !(res_valid && wb_global);

  // ------------------------------------------------------------ channel pushes
  assign row_valid     = (st == S_ROW_PUSH);
  assign row_data.row  = row;
  assign row_data.nnz  = re - rs;
  // Both beat channels move together: each offers its beat only when the
  // other can take it, so they never fall out of step.
  assign coef_valid = (st == S_BEAT_PUSH) && xch_ready;
  assign xch_valid  = (st == S_BEAT_PUSH) && coef_ready;

  assign hash_rd_en   = (st == S_ELEM_X && USE_HASH && !(col == row) && col < idx_t'(HASH_DEPTH)) ||
                        (st == S_FLUSH_RD && flush_idx < n_rows && flush_idx < idx_t'(HASH_DEPTH));
  assign hash_rd_addr = (st == S_FLUSH_RD) ? HAW'(flush_idx) : HAW'(col);

  assign busy = (st != S_IDLE);

  // -------------------------------------------------------------- main loop
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; step <= R_LSTART; rd_addr <= '0;
      lev <= '0; lstart <= '0; lend <= '0; p <= '0; row <= '0; rs <= '0; re <= '0;
      k <= '0; col <= '0; flush_idx <= '0; bi <= '0; v <= '0; xv <= '0; isdiag <= 1'b0;
      rows_issued <= '0; lane <= '0; done <= 1'b0;
      coef_lane_valid <= '0; coef_lane_diag <= '0; coef_val <= '0; xch_val <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          lev         <= '0;
          rows_issued <= '0;
          if (n_levels == '0) st <= S_DONE;
          else begin
            rd_addr <= ilevels_base;
            step    <= R_LSTART;
            st      <= S_RD_REQ;
          end
        end
        S_RD_REQ: if (own_grant) st <= S_RD_WAIT;
        S_RD_WAIT: if (gm_rsp_valid) begin
          unique case (step)
            R_LSTART: begin lstart <= gm_rsp_data; st <= S_LEV; end
            R_LEND:   begin lend <= gm_rsp_data; p <= lstart; st <= S_ROW; end
            R_ROW:    begin
              row <= gm_rsp_data;
              rd_addr <= row_ptr_base + gaddr_t'(gm_rsp_data);
              step <= R_RS; st <= S_RD_REQ;
            end
            R_RS:     begin
              rs <= gm_rsp_data;
              rd_addr <= row_ptr_base + gaddr_t'(row) + gaddr_t'(1);
              step <= R_RE; st <= S_RD_REQ;
            end
            R_RE:     begin
              re <= gm_rsp_data;
              rd_addr <= b_base + gaddr_t'(row);
              step <= R_B; st <= S_RD_REQ;
            end
            R_B:      begin bi <= gm_rsp_data; st <= S_ROW_PUSH; end
            R_COL:    begin
              col <= gm_rsp_data;
              rd_addr <= val_base + gaddr_t'(k);
              step <= R_VAL; st <= S_RD_REQ;
            end
            R_VAL:    begin v <= gm_rsp_data; st <= S_ELEM_X; end
            R_X:      begin xv <= gm_rsp_data; isdiag <= 1'b0; st <= S_PUT; end
            default:  st <= S_IDLE;
          endcase
        end
        S_LEV: begin
          rd_addr <= ilevels_base + gaddr_t'(lev) + gaddr_t'(1);
          step    <= R_LEND;
          st      <= S_RD_REQ;
        end
        S_ROW: begin
          if (p == lend) st <= S_BARRIER;
          else begin
            rd_addr <= iorder_base + gaddr_t'(p);
            step    <= R_ROW;
            st      <= S_RD_REQ;
          end
        end
        S_ROW_PUSH: if (row_ready) begin
          rows_issued <= rows_issued + 1;
          k    <= rs;
          lane <= '0;
          st   <= S_ELEM;
        end
        S_ELEM: begin
          if (k == re) begin
            p  <= p + 1;
            st <= S_ROW;
          end else begin
            rd_addr <= col_idx_base + gaddr_t'(k);
            step    <= R_COL;
            st      <= S_RD_REQ;
          end
        end
        S_ELEM_X: begin
          if (col == row) begin
            xv <= bi; isdiag <= 1'b1; st <= S_PUT;
          end else if (USE_HASH && col < idx_t'(HASH_DEPTH)) begin
            st <= S_HASH_WAIT;
          end else begin
            rd_addr <= x_base + gaddr_t'(col);
            step    <= R_X;
            st      <= S_RD_REQ;
          end
        end
        S_HASH_WAIT: begin
          xv <= hash_rd_data; isdiag <= 1'b0; st <= S_PUT;
        end
        S_PUT: begin
          for (int l = 0; l < UF; l++) begin
            if (l == int'(lane)) begin
              coef_val[l]        <= v;
              xch_val[l]         <= xv;
              coef_lane_valid[l] <= 1'b1;
              coef_lane_diag[l]  <= isdiag;
            end
          end
          k <= k + 1;
          if (int'(lane) == UF - 1 || k + 1 == re) st <= S_BEAT_PUSH;
          else begin
            lane <= lane + 1'b1;
            st   <= S_ELEM;
          end
        end
        S_BEAT_PUSH: if (coef_valid && coef_ready) begin
          coef_lane_valid <= '0;
          coef_lane_diag  <= '0;
          lane            <= '0;
          st              <= S_ELEM;
        end
        S_BARRIER: if (rows_written == rows_issued && !res_valid) begin
          lstart <= lend;
          lev    <= lev + 1;
          if (lev + 1 == n_levels) begin
            flush_idx <= '0;
            st <= (USE_HASH && !WRITE_THROUGH) ? S_FLUSH_RD : S_DONE;
          end else st <= S_LEV;
        end
        S_FLUSH_RD: begin
          if (flush_idx >= n_rows || flush_idx >= idx_t'(HASH_DEPTH)) st <= S_DONE;
          else st <= S_FLUSH_WR;
        end
        S_FLUSH_WR: if (own_grant) begin
          flush_idx <= flush_idx + 1;
          st        <= S_FLUSH_RD;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Count solved rows written back, for the level barrier.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rows_written <= '0;
    else if (st == S_IDLE && start) rows_written <= '0;
    else if (wb_fire) rows_written <= rows_written + 1;
  end

  // A read response only arrives while a read is awaited.
  a_rsp: assert property (@(posedge clk) disable iff (!rst_n) gm_rsp_valid |-> st == S_RD_WAIT)
    else $error("unexpected global-memory read response");

endmodule
