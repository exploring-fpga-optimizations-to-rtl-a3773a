// End-to-end test of sptrsv_ndr, the NDRange organisation. Four solvers run
// side by side on their own random systems:
//   n0  defaults: per-level launches, BS = 1, two compute units;
//   n1  waiting variant, BS = 4, one compute unit;
//   n2  waiting variant, BS = 4, two compute units, so one unit must wait for
//       x values the other has not written yet;
//   n3  per-level launches, BS = 2, two compute units.
// Each x is compared bit for bit with single-precision forward substitution
// done in the solver's order (BS strided partial sums, then a tree
// reduction). The test also counts launches, repeated steps of waiting
// work-groups, tree-reduction additions, cycles in which both compute units
// wanted the memory port, and requests answered with "no rows left"; each
// must occur.
module tb_sptrsv_ndr;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  int     checks   [NC];
  int     failures [NC];
  bit     finished [NC];
  longint cycles   [NC];

  int n_launch, n_spin, n_reduce, n_contend, n_empty;

`define NDR(IDX, INST, PARAMS, HPARAMS)                                                 \
  logic        rst_n_``IDX, start_``IDX, busy_``IDX, done_``IDX, spin_``IDX;           \
  logic [31:0] nr_``IDX, nl_``IDX, f_``IDX, l_``IDX;                                    \
  logic [27:0] a0_``IDX, a1_``IDX, a2_``IDX, a3_``IDX, a4_``IDX, a5_``IDX, a6_``IDX;    \
  logic        qv_``IDX, qr_``IDX, qw_``IDX, rv_``IDX;                                  \
  logic [27:0] qa_``IDX;                                                                \
  logic [31:0] qd_``IDX, rd_``IDX;                                                      \
  sptrsv_ndr PARAMS INST (                                                              \
    .clk, .rst_n(rst_n_``IDX), .start(start_``IDX), .busy(busy_``IDX),                 \
    .done(done_``IDX), .first(f_``IDX), .last(l_``IDX),                                 \
    .iorder_base(a1_``IDX), .row_ptr_base(a2_``IDX),                                    \
    .col_idx_base(a3_``IDX), .val_base(a4_``IDX), .b_base(a5_``IDX),                   \
    .x_base(a6_``IDX), .gm_req_valid(qv_``IDX), .gm_req_ready(qr_``IDX),               \
    .gm_req_we(qw_``IDX), .gm_req_addr(qa_``IDX), .gm_req_wdata(qd_``IDX),             \
    .gm_rsp_valid(rv_``IDX), .gm_rsp_data(rd_``IDX), .spin(spin_``IDX));               \
  sptrsv_harness HPARAMS h_``IDX (                                                      \
    .clk, .rst_n(rst_n_``IDX), .start(start_``IDX), .done(done_``IDX),                 \
    .n_rows(nr_``IDX), .n_levels(nl_``IDX), .first(f_``IDX), .last(l_``IDX),           \
    .ilevels_base(a0_``IDX),                                                            \
    .iorder_base(a1_``IDX), .row_ptr_base(a2_``IDX), .col_idx_base(a3_``IDX),          \
    .val_base(a4_``IDX), .b_base(a5_``IDX), .x_base(a6_``IDX),                         \
    .gm_req_valid(qv_``IDX), .gm_req_ready(qr_``IDX), .gm_req_we(qw_``IDX),            \
    .gm_req_addr(qa_``IDX), .gm_req_wdata(qd_``IDX), .gm_rsp_valid(rv_``IDX),          \
    .gm_rsp_data(rd_``IDX), .checks(checks[IDX]), .failures(failures[IDX]),            \
    .finished(finished[IDX]), .solve_cycles(cycles[IDX]));

  `NDR(0, ndr0, , #(.N(200), .MAXNZ(6), .MODE(1), .BS(1)))
  `NDR(1, ndr1, #(.BS(4), .CU(1), .WAIT(1'b1)), #(.N(150), .MAXNZ(9), .MODE(2), .BS(4)))
  `NDR(2, ndr2, #(.BS(4), .CU(2), .WAIT(1'b1)), #(.N(150), .MAXNZ(9), .W(4), .MODE(2), .BS(4)))
  `NDR(3, ndr3, #(.BS(2), .CU(2)), #(.N(150), .MAXNZ(7), .MODE(1), .BS(2)))

  always @(posedge clk) begin
    if (start_0) n_launch++;
    if (spin_2) n_spin++;
    if (ndr3.g_cu[0].u_eng.st.name() == "E_REDUCE") n_reduce++;
    if (&ndr0.q_valid) n_contend++;
    if (ndr0.g_cu[1].u_eng.row_req && ndr0.empty) n_empty++;
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
    mech("per-level launch", n_launch);
    mech("waiting step repeated", n_spin);
    mech("tree reduction add", n_reduce);
    mech("memory port contention", n_contend);
    mech("no rows left", n_empty);
    if (timeout) tf++;
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog: solve did not finish");
    report(1'b1);
  end

  initial begin
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    report(1'b0);
  end

endmodule
