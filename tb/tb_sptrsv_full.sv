// Full-size run of sptrsv_top with every parameter at its default.
// The three organisations run side by side, each on its own random lower
// triangular system held in its own model of global memory (random response
// latency and random refusals). The channel-based solver gets the level
// pointers; the per-level NDRange solver is launched once per level; the
// waiting solver is launched once over all rows after x has been preset to
// +infinity. Each x is compared bit for bit with single-precision forward
// substitution done in the order the solver adds (column order for the
// channel-based solver; strided partial sums then a tree for the NDRange
// solvers). The test also counts how often each mechanism of the design
// occurred: local and global x reads and result writes, copy-out, level
// barrier waits, the compute kernel waiting on its channels, partly filled
// and multi-beat rows, memory port stalls, launches, memory port contention
// between compute units, "no rows left" answers and tree-reduction adds.
// A mechanism that never occurred counts as a failure. Waiting work-groups
// that repeat a step need two compute units and are tested in tb_sptrsv_ndr.
// Each system has the dimension of the smallest test matrix of the evaluation,
// 30237 rows, with up to five off-diagonal entries per row.
module tb_sptrsv_full;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 3;
  int     checks   [NC];
  int     failures [NC];
  bit     finished [NC];
  longint cycles   [NC];
  logic   rst_n_h  [NC];

  logic rst_n;
  assign rst_n = rst_n_h[0] & rst_n_h[1] & rst_n_h[2];

  logic        swi_start, swi_busy, swi_done, swi_spin;
  logic [31:0] swi_n_rows, swi_n_levels, swi_first, swi_last;
  logic [27:0] swi_ilevels_base, swi_iorder_base, swi_row_ptr_base, swi_col_idx_base;
  logic [27:0] swi_val_base, swi_b_base, swi_x_base, swi_gm_req_addr;
  logic        swi_gm_req_valid, swi_gm_req_ready, swi_gm_req_we, swi_gm_rsp_valid;
  logic [31:0] swi_gm_req_wdata, swi_gm_rsp_data;
  logic        ndrm_start, ndrm_busy, ndrm_done, ndrm_spin;
  logic [31:0] ndrm_n_rows, ndrm_n_levels, ndrm_first, ndrm_last;
  logic [27:0] ndrm_ilevels_base, ndrm_iorder_base, ndrm_row_ptr_base, ndrm_col_idx_base;
  logic [27:0] ndrm_val_base, ndrm_b_base, ndrm_x_base, ndrm_gm_req_addr;
  logic        ndrm_gm_req_valid, ndrm_gm_req_ready, ndrm_gm_req_we, ndrm_gm_rsp_valid;
  logic [31:0] ndrm_gm_req_wdata, ndrm_gm_rsp_data;
  logic        ndrw_start, ndrw_busy, ndrw_done, ndrw_spin;
  logic [31:0] ndrw_n_rows, ndrw_n_levels, ndrw_first, ndrw_last;
  logic [27:0] ndrw_ilevels_base, ndrw_iorder_base, ndrw_row_ptr_base, ndrw_col_idx_base;
  logic [27:0] ndrw_val_base, ndrw_b_base, ndrw_x_base, ndrw_gm_req_addr;
  logic        ndrw_gm_req_valid, ndrw_gm_req_ready, ndrw_gm_req_we, ndrw_gm_rsp_valid;
  logic [31:0] ndrw_gm_req_wdata, ndrw_gm_rsp_data;

  sptrsv_top dut (
    .clk, .rst_n,
    .swi_start, .swi_busy, .swi_done, .swi_n_rows, .swi_n_levels, .swi_ilevels_base, .swi_iorder_base, .swi_row_ptr_base, .swi_col_idx_base, .swi_val_base, .swi_b_base, .swi_x_base, .swi_gm_req_valid, .swi_gm_req_ready, .swi_gm_req_we, .swi_gm_req_addr, .swi_gm_req_wdata, .swi_gm_rsp_valid, .swi_gm_rsp_data,
    .ndrm_start, .ndrm_busy, .ndrm_done, .ndrm_first, .ndrm_last, .ndrm_spin, .ndrm_iorder_base, .ndrm_row_ptr_base, .ndrm_col_idx_base, .ndrm_val_base, .ndrm_b_base, .ndrm_x_base, .ndrm_gm_req_valid, .ndrm_gm_req_ready, .ndrm_gm_req_we, .ndrm_gm_req_addr, .ndrm_gm_req_wdata, .ndrm_gm_rsp_valid, .ndrm_gm_rsp_data,
    .ndrw_start, .ndrw_busy, .ndrw_done, .ndrw_first, .ndrw_last, .ndrw_spin, .ndrw_iorder_base, .ndrw_row_ptr_base, .ndrw_col_idx_base, .ndrw_val_base, .ndrw_b_base, .ndrw_x_base, .ndrw_gm_req_valid, .ndrw_gm_req_ready, .ndrw_gm_req_we, .ndrw_gm_req_addr, .ndrw_gm_req_wdata, .ndrw_gm_rsp_valid, .ndrw_gm_rsp_data
  );

  assign swi_spin = 1'b0;
  assign swi_first = 32'd0;
  assign swi_last = 32'd0;

  sptrsv_harness #(.N(30237), .MAXNZ(5), .W(64), .FAR_DIV(8), .WORDS(1 << 19), .MODE(0), .BS(1)) h0 (
    .clk, .rst_n(rst_n_h[0]), .start(swi_start), .done(swi_done),
    .n_rows(swi_n_rows), .n_levels(swi_n_levels), .first(swi_first), .last(swi_last),
    .ilevels_base(swi_ilevels_base), .iorder_base(swi_iorder_base), .row_ptr_base(swi_row_ptr_base),
    .col_idx_base(swi_col_idx_base), .val_base(swi_val_base), .b_base(swi_b_base), .x_base(swi_x_base),
    .gm_req_valid(swi_gm_req_valid), .gm_req_ready(swi_gm_req_ready), .gm_req_we(swi_gm_req_we),
    .gm_req_addr(swi_gm_req_addr), .gm_req_wdata(swi_gm_req_wdata), .gm_rsp_valid(swi_gm_rsp_valid),
    .gm_rsp_data(swi_gm_rsp_data), .checks(checks[0]), .failures(failures[0]),
    .finished(finished[0]), .solve_cycles(cycles[0]));

  sptrsv_harness #(.N(30237), .MAXNZ(5), .W(64), .FAR_DIV(8), .WORDS(1 << 19), .MODE(1), .BS(1)) h1 (
    .clk, .rst_n(rst_n_h[1]), .start(ndrm_start), .done(ndrm_done),
    .n_rows(ndrm_n_rows), .n_levels(ndrm_n_levels), .first(ndrm_first), .last(ndrm_last),
    .ilevels_base(ndrm_ilevels_base), .iorder_base(ndrm_iorder_base), .row_ptr_base(ndrm_row_ptr_base),
    .col_idx_base(ndrm_col_idx_base), .val_base(ndrm_val_base), .b_base(ndrm_b_base), .x_base(ndrm_x_base),
    .gm_req_valid(ndrm_gm_req_valid), .gm_req_ready(ndrm_gm_req_ready), .gm_req_we(ndrm_gm_req_we),
    .gm_req_addr(ndrm_gm_req_addr), .gm_req_wdata(ndrm_gm_req_wdata), .gm_rsp_valid(ndrm_gm_rsp_valid),
    .gm_rsp_data(ndrm_gm_rsp_data), .checks(checks[1]), .failures(failures[1]),
    .finished(finished[1]), .solve_cycles(cycles[1]));

  sptrsv_harness #(.N(30237), .MAXNZ(5), .W(64), .FAR_DIV(8), .WORDS(1 << 19), .MODE(2), .BS(4)) h2 (
    .clk, .rst_n(rst_n_h[2]), .start(ndrw_start), .done(ndrw_done),
    .n_rows(ndrw_n_rows), .n_levels(ndrw_n_levels), .first(ndrw_first), .last(ndrw_last),
    .ilevels_base(ndrw_ilevels_base), .iorder_base(ndrw_iorder_base), .row_ptr_base(ndrw_row_ptr_base),
    .col_idx_base(ndrw_col_idx_base), .val_base(ndrw_val_base), .b_base(ndrw_b_base), .x_base(ndrw_x_base),
    .gm_req_valid(ndrw_gm_req_valid), .gm_req_ready(ndrw_gm_req_ready), .gm_req_we(ndrw_gm_req_we),
    .gm_req_addr(ndrw_gm_req_addr), .gm_req_wdata(ndrw_gm_req_wdata), .gm_rsp_valid(ndrw_gm_rsp_valid),
    .gm_rsp_data(ndrw_gm_rsp_data), .checks(checks[2]), .failures(failures[2]),
    .finished(finished[2]), .solve_cycles(cycles[2]));

  // mechanism counters
  int n_hash_x, n_glob_x, n_hash_wr, n_glob_wr, n_flush_wr, n_barrier, n_starve;
  int n_partial, n_multibeat, n_gm_stall, n_launch, n_reduce, n_contend, n_empty;

  always @(posedge clk) begin
    // channel-based solver
    if (dut.u_swi.h_rd_en && dut.u_swi.u_mem.st.name() == "S_ELEM_X") n_hash_x++;
    if (dut.u_swi.u_mem.st.name() == "S_RD_WAIT" && dut.u_swi.u_mem.step.name() == "R_X" &&
        swi_gm_rsp_valid) n_glob_x++;
    if (dut.u_swi.h_wr_en) n_hash_wr++;
    if (dut.u_swi.u_mem.wb_fire && dut.u_swi.u_mem.wb_global) n_glob_wr++;
    if (dut.u_swi.u_mem.st.name() == "S_FLUSH_WR" && dut.u_swi.u_mem.own_grant) n_flush_wr++;
    if (dut.u_swi.u_mem.st.name() == "S_BARRIER" &&
        dut.u_swi.u_mem.rows_written != dut.u_swi.u_mem.rows_issued) n_barrier++;
    if (dut.u_swi.u_cmp.st.name() == "C_MAC" && !(dut.u_swi.ck_coef_valid && dut.u_swi.ck_x_valid)) n_starve++;
    if (dut.u_swi.mk_coef_valid && dut.u_swi.mk_coef_ready && !(&dut.u_swi.mk_coef.lane_valid)) n_partial++;
    if (dut.u_swi.mk_row_valid && dut.u_swi.mk_row_ready && dut.u_swi.mk_row_data.nnz > 4) n_multibeat++;
    if (swi_gm_req_valid && !swi_gm_req_ready) n_gm_stall++;
    // per-level NDRange solver
    if (ndrm_start) n_launch++;
    if (&dut.u_ndr_multi.q_valid) n_contend++;
    if (dut.u_ndr_multi.g_cu[1].u_eng.row_req && dut.u_ndr_multi.empty) n_empty++;
    // waiting NDRange solver
    if (dut.u_ndr_wait.g_cu[0].u_eng.st.name() == "E_REDUCE") n_reduce++;
  end

  int tc, tf;

  task automatic mech(string name, int n);
    tc++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin
      tf++;
      $display("FAIL mechanism %s never occurred", name);
    end
  endtask

  task automatic report(bit timeout);
    string nm [NC] = '{"channel-based", "NDRange per level", "NDRange waiting"};
    tc = 0; tf = 0;
    for (int i = 0; i < NC; i++) begin
      tc += checks[i];
      tf += failures[i];
      $display("%-18s %0d checks, %0d failures, %0d cycles", nm[i], checks[i], failures[i], cycles[i]);
    end
    mech("local x read", n_hash_x);
    mech("global x read", n_glob_x);
    mech("local result write", n_hash_wr);
    mech("global result write", n_glob_wr);
    mech("copy-out write", n_flush_wr);
    mech("level barrier wait", n_barrier);
    mech("compute waits on channel", n_starve);
    mech("partly filled beat", n_partial);
    mech("row over several beats", n_multibeat);
    mech("memory port stall", n_gm_stall);
    mech("per-level launch", n_launch);
    mech("memory port contention", n_contend);
    mech("no rows left", n_empty);
    mech("tree reduction add", n_reduce);
    if (timeout) tf++;
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  endtask

  initial begin
    repeat (60000000) @(posedge clk);
    $display("watchdog: solve did not finish");
    report(1'b1);
  end

  initial begin
    wait (finished[0] && finished[1] && finished[2]);
    report(1'b0);
  end

endmodule
