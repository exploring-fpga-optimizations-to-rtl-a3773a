// End-to-end test of sptrsv_swi_hash. Five solvers run side by side on their
// own random systems and memories:
//   c0  default organisation (UF = 4, local x store with copy-out at the end)
//       with a store of 64 entries, so unknowns live both locally and in
//       global memory;
//   c1  the same with write-through of every unknown;
//   c2  without the local x store (x only in global memory);
//   c3  UF = 2 and one-entry channels, so the row channel fills up;
//   c4  UF = 1, one-entry beat channels and short rows, so the coefficient
//       and x channels fill up while the compute kernel divides.
// Each x is compared bit for bit with a single-precision serial forward
// substitution. The test also counts how often each mechanism occurred: local
// and global x reads, local and global result writes, copy-out writes, level
// barrier waits, full and empty channels, partly filled beats, rows spanning
// several beats and stalls of the global-memory port. A mechanism that never
// occurred counts as a failure.
module tb_sptrsv_swi_hash;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 5;
  int     checks   [NC];
  int     failures [NC];
  bit     finished [NC];
  longint cycles   [NC];

  // mechanism counters
  int n_hash_x, n_glob_x, n_hash_wr, n_glob_wr, n_flush_wr, n_barrier;
  int n_coef_full, n_row_full, n_starve, n_partial, n_multibeat, n_gm_stall, n_wt_wr;
  int n_c2_glob_x;

`define SOLVER(IDX, INST, PARAMS, HPARAMS)                                              \
  logic        rst_n_``IDX, start_``IDX, busy_``IDX, done_``IDX;                       \
  logic [31:0] nr_``IDX, nl_``IDX;                                                      \
  logic [27:0] a0_``IDX, a1_``IDX, a2_``IDX, a3_``IDX, a4_``IDX, a5_``IDX, a6_``IDX;    \
  logic        qv_``IDX, qr_``IDX, qw_``IDX, rv_``IDX;                                  \
  logic [27:0] qa_``IDX;                                                                \
  logic [31:0] qd_``IDX, rd_``IDX;                                                      \
  sptrsv_swi_hash PARAMS INST (                                                         \
    .clk, .rst_n(rst_n_``IDX), .start(start_``IDX), .busy(busy_``IDX),                 \
    .done(done_``IDX), .n_rows(nr_``IDX), .n_levels(nl_``IDX),                          \
    .ilevels_base(a0_``IDX), .iorder_base(a1_``IDX), .row_ptr_base(a2_``IDX),          \
    .col_idx_base(a3_``IDX), .val_base(a4_``IDX), .b_base(a5_``IDX),                   \
    .x_base(a6_``IDX), .gm_req_valid(qv_``IDX), .gm_req_ready(qr_``IDX),               \
    .gm_req_we(qw_``IDX), .gm_req_addr(qa_``IDX), .gm_req_wdata(qd_``IDX),             \
    .gm_rsp_valid(rv_``IDX), .gm_rsp_data(rd_``IDX));                                  \
  sptrsv_harness HPARAMS h_``IDX (                                                      \
    .clk, .rst_n(rst_n_``IDX), .start(start_``IDX), .done(done_``IDX),                 \
    .n_rows(nr_``IDX), .n_levels(nl_``IDX), .ilevels_base(a0_``IDX),                   \
    .iorder_base(a1_``IDX), .row_ptr_base(a2_``IDX), .col_idx_base(a3_``IDX),          \
    .val_base(a4_``IDX), .b_base(a5_``IDX), .x_base(a6_``IDX),                         \
    .gm_req_valid(qv_``IDX), .gm_req_ready(qr_``IDX), .gm_req_we(qw_``IDX),            \
    .gm_req_addr(qa_``IDX), .gm_req_wdata(qd_``IDX), .gm_rsp_valid(rv_``IDX),          \
    .gm_rsp_data(rd_``IDX), .checks(checks[IDX]), .failures(failures[IDX]),            \
    .finished(finished[IDX]), .solve_cycles(cycles[IDX]));

  `SOLVER(0, dut0, #(.HASH_DEPTH(64)), #(.N(300), .MAXNZ(9)))
  `SOLVER(1, dut1, #(.HASH_DEPTH(64), .WRITE_THROUGH(1'b1)), #(.N(200), .MAXNZ(6)))
  `SOLVER(2, dut2, #(.USE_HASH(1'b0)), #(.N(200), .MAXNZ(6)))
  `SOLVER(3, dut3, #(.UF(2), .HASH_DEPTH(128), .CH_DEPTH(1), .ROW_CH_DEPTH(1)), #(.N(200), .MAXNZ(12), .STALL_PCT(0), .LAT_MAX(1)))
  `SOLVER(4, dut4, #(.UF(1), .CH_DEPTH(1), .ROW_CH_DEPTH(4)), #(.N(200), .MAXNZ(1), .STALL_PCT(0), .LAT_MAX(1)))

  always @(posedge clk) begin
    // c0: reads of x from the local store during the solve and from global memory
    if (dut0.h_rd_en && dut0.u_mem.st.name() == "S_ELEM_X") n_hash_x++;
    if (dut0.u_mem.st.name() == "S_RD_WAIT" && dut0.u_mem.step.name() == "R_X" &&
        dut0.gm_rsp_valid) n_glob_x++;
    if (dut0.h_wr_en) n_hash_wr++;
    if (dut0.u_mem.wb_fire && dut0.u_mem.wb_global) n_glob_wr++;
    if (dut0.u_mem.st.name() == "S_FLUSH_WR" && dut0.u_mem.own_grant) n_flush_wr++;
    if (dut0.u_mem.st.name() == "S_BARRIER" &&
        dut0.u_mem.rows_written != dut0.u_mem.rows_issued) n_barrier++;
    if (dut0.u_cmp.st.name() == "C_MAC" && !(dut0.ck_coef_valid && dut0.ck_x_valid)) n_starve++;
    if (dut0.mk_coef_valid && dut0.mk_coef_ready && !(&dut0.mk_coef.lane_valid)) n_partial++;
    if (dut0.mk_row_valid && dut0.mk_row_ready && dut0.mk_row_data.nnz > 4) n_multibeat++;
    if (dut0.gm_req_valid && !dut0.gm_req_ready) n_gm_stall++;
    // c1: write-through writes both places
    if (dut1.h_wr_en && dut1.u_mem.wb_global) n_wt_wr++;
    // c2: no local store, every x read goes to global memory
    if (dut2.u_mem.st.name() == "S_RD_WAIT" && dut2.u_mem.step.name() == "R_X" &&
        dut2.gm_rsp_valid) n_c2_glob_x++;
    // c3: full channels
    if (dut4.u_mem.st.name() == "S_BEAT_PUSH" && !(dut4.mk_coef_ready && dut4.mk_x_ready)) n_coef_full++;
    if (dut3.mk_row_valid && !dut3.mk_row_ready) n_row_full++;
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
    tc = 0; tf = 0;
    for (int i = 0; i < NC; i++) begin
      tc += checks[i];
      tf += failures[i];
      $display("config %0d: %0d checks, %0d failures, %0d cycles", i, checks[i], failures[i], cycles[i]);
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
    mech("write-through write", n_wt_wr);
    mech("global x read, no store", n_c2_glob_x);
    mech("coefficient/x channel full", n_coef_full);
    mech("row channel full", n_row_full);
    if (timeout) tf++;
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: solve did not finish");
    report(1'b1);
  end

  initial begin
    wait (finished[0] && finished[1] && finished[2] && finished[3] && finished[4]);
    report(1'b0);
  end

endmodule
