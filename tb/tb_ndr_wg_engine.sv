// Self-checking test of one ndr_wg_engine (BS = 4, waiting variant) driving
// the global-memory model directly. A behavioural dispatcher hands out the
// positions of iorder in order. The host side (sptrsv_harness, mode 2)
// presets x to +infinity, launches once and checks x bit for bit against
// single-precision forward substitution with four strided partial sums and a
// tree reduction. Also checks that the engine is idle once all rows are done.
module tb_ndr_wg_engine;
  import sptrsv_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, done = 1'b0, busy, spin;
  idx_t n_rows, n_levels, first, last, next = '0, row_pos;
  gaddr_t ilevels_base, iorder_base, row_ptr_base, col_idx_base, val_base, b_base, x_base;
  logic gm_req_valid, gm_req_ready, gm_req_we, gm_rsp_valid;
  gaddr_t gm_req_addr;
  logic [31:0] gm_req_wdata, gm_rsp_data;
  logic row_req, row_gnt, row_empty;
  int h_checks, h_failures;
  bit h_finished;
  longint h_cycles;

  ndr_wg_engine #(.BS(4), .WAIT(1'b1)) dut (
    .clk, .rst_n, .launch(start), .busy, .row_req, .row_gnt, .row_empty, .row_pos,
    .iorder_base, .row_ptr_base, .col_idx_base, .val_base, .b_base, .x_base,
    .gm_req_valid, .gm_req_ready, .gm_req_we, .gm_req_addr, .gm_req_wdata,
    .gm_rsp_valid, .gm_rsp_data, .spin);

  sptrsv_harness #(.N(120), .MAXNZ(11), .W(20), .WORDS(1 << 13), .MODE(2), .BS(4)) h (
    .clk, .rst_n, .start, .done, .n_rows, .n_levels, .first, .last, .ilevels_base, .iorder_base,
    .row_ptr_base, .col_idx_base, .val_base, .b_base, .x_base,
    .gm_req_valid, .gm_req_ready, .gm_req_we, .gm_req_addr, .gm_req_wdata,
    .gm_rsp_valid, .gm_rsp_data,
    .checks(h_checks), .failures(h_failures), .finished(h_finished), .solve_cycles(h_cycles));

  // behavioural dispatcher and completion detection
  assign row_empty = (next >= last);
  assign row_gnt   = row_req && !row_empty;
  assign row_pos   = next;
  logic was_busy = 1'b0;
  always @(posedge clk) begin
    if (start) next <= first;
    else if (row_gnt) next <= next + 1;
    was_busy <= busy;
    done <= was_busy && !busy;
  end

  int checks = 0, failures = 0, spins = 0;
  always @(posedge clk) if (spin) spins++;

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures + 1);
    $finish;
  end

  initial begin
    wait (h_finished);
    checks += 2;
    if (busy) failures++;
    // rows come in schedule order to a single engine: nothing to wait for
    if (spins != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end
endmodule
