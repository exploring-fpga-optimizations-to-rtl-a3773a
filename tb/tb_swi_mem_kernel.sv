// Self-checking test of swi_mem_kernel (UF = 4, local x store of 32 entries)
// against a behavioural compute kernel. The host side (sptrsv_harness) builds a
// random system and its level schedule in the global-memory model, which
// stalls and delays at random. The behavioural compute kernel checks every
// beat the memory kernel sends: rows must arrive in iorder order with the
// right entry count, coefficient lanes must hold val[k] in order with the
// diagonal flagged, and x lanes must hold b_i on the diagonal and otherwise
// the value already returned for that column (a value not yet returned means
// the level barrier failed). It then forms x_i in single precision; a second
// process returns the results in order after random delays, while the first
// keeps accepting rows. At the end the harness checks x in global memory,
// which needs both the direct global writes and the copy-out of the store.
module tb_swi_mem_kernel;
  import sptrsv_pkg::*;
  import fp_ref_pkg::*;

  localparam int UF = 4;
  localparam int HD = 32;
  localparam int N  = 150;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done;
  idx_t n_rows, n_levels;
  gaddr_t ilevels_base, iorder_base, row_ptr_base, col_idx_base, val_base, b_base, x_base;
  logic gm_req_valid, gm_req_ready, gm_req_we, gm_rsp_valid;
  gaddr_t gm_req_addr;
  logic [31:0] gm_req_wdata, gm_rsp_data;
  logic row_valid, row_ready = 1'b0;
  row_beat_t row_data;
  logic coef_valid, coef_ready = 1'b0;
  logic [UF-1:0] coef_lane_valid, coef_lane_diag;
  fp32_t [UF-1:0] coef_val;
  logic xch_valid, xch_ready = 1'b0;
  fp32_t [UF-1:0] xch_val;
  logic res_valid = 1'b0, res_ready;
  res_beat_t res_data = '0;
  logic hash_rd_en, hash_wr_en;
  logic [$clog2(HD)-1:0] hash_rd_addr, hash_wr_addr;
  fp32_t hash_rd_data, hash_wr_data;

  int h_checks, h_failures;
  bit h_finished;
  longint h_cycles;

  swi_mem_kernel #(.UF(UF), .HASH_DEPTH(HD)) dut (.*);

  x_hash #(.DEPTH(HD)) u_hash (
    .clk, .rd_en(hash_rd_en), .rd_addr(hash_rd_addr), .rd_data(hash_rd_data),
    .wr_en(hash_wr_en), .wr_addr(hash_wr_addr), .wr_data(hash_wr_data));

  sptrsv_harness #(.N(N), .MAXNZ(9), .W(12), .WORDS(1 << 14), .STALL_PCT(20)) h (
    .clk, .rst_n, .start, .done, .n_rows, .n_levels, .ilevels_base, .iorder_base,
    .row_ptr_base, .col_idx_base, .val_base, .b_base, .x_base,
    .gm_req_valid, .gm_req_ready, .gm_req_we, .gm_req_addr, .gm_req_wdata,
    .gm_rsp_valid, .gm_rsp_data,
    .checks(h_checks), .failures(h_failures), .finished(h_finished), .solve_cycles(h_cycles));

  int checks = 0, failures = 0;
  fp32_t returned [N];
  bit    ret_ok   [N];

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  // behavioural compute kernel
  initial begin
    foreach (ret_ok[i]) ret_ok[i] = 1'b0;
    wait (rst_n);
    for (int p = 0; p < N; p++) begin
      int i, nnz, k;
      fp32_t acc, diag, bi, x;
      logic [UF-1:0] lv, ld;
      fp32_t [UF-1:0] cv, xv;
      @(negedge clk) row_ready = 1'b1;
      do @(posedge clk); while (!row_valid);
      i = int'(row_data.row);
      nnz = int'(row_data.nnz);
      @(negedge clk) row_ready = 1'b0;
      checks += 2;
      if (i != h.iorder[p]) fail($sformatf("row %0d at position %0d, expected %0d", i, p, h.iorder[p]));
      if (nnz != h.row_ptr[i + 1] - h.row_ptr[i]) fail($sformatf("row %0d count %0d", i, nnz));
      acc = 32'h0; diag = 32'h0; bi = 32'h0;
      k = 0;
      while (k < nnz) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        coef_ready = 1'b1; xch_ready = 1'b1;
        do @(posedge clk); while (!(coef_valid && xch_valid));
        lv = coef_lane_valid; ld = coef_lane_diag; cv = coef_val; xv = xch_val;
        for (int l = 0; l < UF; l++) begin
          checks++;
          if (lv[l] !== (k < nnz)) fail($sformatf("row %0d lane %0d valid", i, l));
          if (k < nnz) begin
            int kk, c;
            kk = h.row_ptr[i] + k;
            c  = h.col_idx[kk];
            checks += 3;
            if (cv[l] !== h.val[kk]) fail($sformatf("row %0d entry %0d value", i, k));
            if (ld[l] !== (c == i)) fail($sformatf("row %0d entry %0d diag flag", i, k));
            if (c == i) begin
              if (xv[l] !== h.b[i]) fail($sformatf("row %0d: b lane %h", i, xv[l]));
              diag = cv[l]; bi = xv[l];
            end else begin
              if (!ret_ok[c] || xv[l] !== returned[c])
                fail($sformatf("row %0d: x[%0d] lane %h, solved=%0d", i, c, xv[l], ret_ok[c]));
              acc = r2f(f2r(acc) + f2r(r2f(f2r(cv[l]) * f2r(xv[l]))));
            end
            k++;
          end
        end
        @(negedge clk) begin coef_ready = 1'b0; xch_ready = 1'b0; end
      end
      x = r2f(f2r(r2f(f2r(bi) - f2r(acc))) / f2r(diag));
      pend_row.push_back(i);
      pend_x.push_back(x);
    end
  end

  // Results go back from a separate process after random delays, so the
  // memory kernel can run ahead into the next rows of a level (and, if its
  // barrier failed, into the next level) while results are outstanding.
  int    pend_row [$];
  fp32_t pend_x   [$];
  initial begin
    forever begin
      @(negedge clk);
      if (pend_row.size() > 0) begin
        repeat ($urandom_range(0, 150)) @(negedge clk);
        res_valid = 1'b1; res_data = '{row: pend_row[0], x: pend_x[0]};
        do @(posedge clk); while (!res_ready);
        returned[pend_row[0]] = pend_x[0]; ret_ok[pend_row[0]] = 1'b1;
        void'(pend_row.pop_front());
        void'(pend_x.pop_front());
        @(negedge clk) res_valid = 1'b0;
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog: memory kernel did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures + 1);
    $finish;
  end

  initial begin
    wait (h_finished);
    checks++;
    if (busy) fail("busy after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end

endmodule
