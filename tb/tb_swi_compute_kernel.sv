// Self-checking test of swi_compute_kernel (UF = 4). Random rows of 1 to 13
// entries (diagonal last) are streamed through the three input channels with
// random gaps, and results are taken with random back-pressure. Each result
// must carry the right row number and match, bit for bit, the single-precision
// value (b_i - sum_j l_ij x_j) / l_ii with the sum formed in column order. A
// second phase feeds rows back to back and checks the row latency: the result
// appears nb + 32 cycles after the row beat is taken, nb being the row's beats.
module tb_swi_compute_kernel;
  import sptrsv_pkg::*;
  import fp_ref_pkg::*;

  localparam int UF = 4;
  localparam int NROWS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           row_valid = 1'b0, row_ready;
  row_beat_t      row_data = '0;
  logic           coef_valid = 1'b0, coef_ready;
  logic [UF-1:0]  coef_lane_valid = '0, coef_lane_diag = '0;
  fp32_t [UF-1:0] coef_val = '0;
  logic           xch_valid = 1'b0, xch_ready;
  fp32_t [UF-1:0] xch_val = '0;
  logic           res_valid, res_ready = 1'b0, busy;
  res_beat_t      res_data;

  swi_compute_kernel #(.UF(UF)) dut (.*);

  int checks = 0, failures = 0;
  fp32_t exp_x [2*NROWS];
  int    exp_nb [2*NROWS];
  int    rows_sent = 0, rows_got = 0;
  bit    gaps = 1'b1;
  longint cyc = 0, t_row [2*NROWS];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  task automatic gap();
    if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  // Sends one random row; returns the expected result.
  task automatic send_row(int r);
    int nnz, nb;
    fp32_t v [], xv [];
    fp32_t acc, x;
    nnz = int'($urandom_range(1, 13));
    v = new[nnz];
    xv = new[nnz];
    acc = 32'h0;
    for (int k = 0; k < nnz - 1; k++) begin
      v[k]  = rand_f(118, 127);
      xv[k] = rand_f(118, 130);
      acc = r2f(f2r(acc) + f2r(r2f(f2r(v[k]) * f2r(xv[k]))));
    end
    v[nnz-1]  = {1'b0, 8'(130 + $urandom_range(0, 2)), 23'($urandom)};
    xv[nnz-1] = rand_f(120, 130);
    x = r2f(f2r(r2f(f2r(xv[nnz-1]) - f2r(acc))) / f2r(v[nnz-1]));
    nb = (nnz + UF - 1) / UF;
    exp_x[r] = x;
    exp_nb[r] = nb;
    gap();
    @(negedge clk);
    row_valid = 1'b1; row_data = '{row: r, nnz: nnz};
    do @(posedge clk); while (!row_ready);
    t_row[r] = cyc;
    @(negedge clk) row_valid = 1'b0;
    for (int bt = 0; bt < nb; bt++) begin
      gap();
      coef_lane_valid = '0; coef_lane_diag = '0; coef_val = '0; xch_val = '0;
      for (int l = 0; l < UF; l++) begin
        int k = bt * UF + l;
        if (k < nnz) begin
          coef_lane_valid[l] = 1'b1;
          coef_lane_diag[l]  = (k == nnz - 1);
          coef_val[l] = v[k];
          xch_val[l]  = xv[k];
        end
      end
      coef_valid = 1'b1; xch_valid = 1'b1;
      do @(posedge clk); while (!(coef_ready && xch_ready));
      @(negedge clk) begin coef_valid = 1'b0; xch_valid = 1'b0; end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // result sink with random back-pressure in the first phase
  always @(negedge clk) res_ready <= gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) begin
    if (res_valid && res_ready) begin
      checks += 2;
      if (int'(res_data.row) != rows_got) fail($sformatf("row %0d, expected %0d", res_data.row, rows_got));
      else if (res_data.x !== exp_x[rows_got])
        fail($sformatf("row %0d x=%h, expected %h", rows_got, res_data.x, exp_x[rows_got]));
      rows_got++;
    end
  end
  // latency check in the back-to-back phase: first cycle of res_valid per row
  logic res_valid_d = 1'b0;
  always @(posedge clk) begin
    res_valid_d <= res_valid;
    if (!gaps && res_valid && !res_valid_d) begin
      checks++;
      if (cyc - t_row[res_data.row] != longint'(exp_nb[res_data.row] + 32))
        fail($sformatf("row %0d latency %0d, expected %0d", res_data.row,
                       cyc - t_row[res_data.row], exp_nb[res_data.row] + 32));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NROWS; r++) send_row(r);
    wait (rows_got == NROWS);
    gaps = 1'b0;
    for (int r = NROWS; r < 2 * NROWS; r++) send_row(r);
    wait (rows_got == 2 * NROWS);
    repeat (3) @(posedge clk);
    checks++;
    if (busy) fail("busy after the last row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
