// sptrsv_harness: host side of the solver testbenches.
//
// Generates a random sparse lower-triangular system of N rows with up to
// MAXNZ off-diagonal entries per row, drawn from the W preceding columns or,
// for one row in FAR_DIV, from anywhere above. It runs the level-set analysis
// (level(i) = 1 + max level(j) over the entries l_ij), builds iorder and
// ilevels, lays every array out in its global-memory model (gmem_model), fills x with a
// marker pattern, launches the solver and waits for done. The expected x is
// worked out by serial forward substitution in which every product, sum,
// difference and quotient is rounded to single precision in column order,
// the order the solver's adder chain uses, so x must match bit for bit.
// Off-diagonal magnitudes are below 1 and each diagonal exceeds the row's
// entry count, so the system is well conditioned and values stay normal.
module sptrsv_harness
  import fp_ref_pkg::*;
#(
  parameter int unsigned N       = 100,
  parameter int unsigned MAXNZ   = 6,
  parameter int unsigned W       = 16,
  parameter int unsigned FAR_DIV = 4,
  parameter int unsigned WORDS   = 1 << 16,
  parameter int unsigned LAT_MAX = 4,
  parameter int unsigned STALL_PCT = 10,
  parameter int unsigned MODE    = 0,
  parameter int unsigned BS      = 1
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        start,
  input  logic        done,
  output logic [31:0] n_rows,
  output logic [31:0] n_levels,
  output logic [31:0] first,
  output logic [31:0] last,
  output logic [27:0] ilevels_base,
  output logic [27:0] iorder_base,
  output logic [27:0] row_ptr_base,
  output logic [27:0] col_idx_base,
  output logic [27:0] val_base,
  output logic [27:0] b_base,
  output logic [27:0] x_base,
  input  logic        gm_req_valid,
  output logic        gm_req_ready,
  input  logic        gm_req_we,
  input  logic [27:0] gm_req_addr,
  input  logic [31:0] gm_req_wdata,
  output logic        gm_rsp_valid,
  output logic [31:0] gm_rsp_data,
  output int          checks,
  output int          failures,
  output bit          finished,
  output longint      solve_cycles
);

  localparam logic [31:0] MARK = 32'h7fbad0ff;

  gmem_model #(.WORDS(WORDS), .LAT_MAX(LAT_MAX), .STALL_PCT(STALL_PCT)) gm (
    .clk, .rst_n,
    .req_valid(gm_req_valid), .req_ready(gm_req_ready), .req_we(gm_req_we),
    .req_addr(gm_req_addr), .req_wdata(gm_req_wdata),
    .rsp_valid(gm_rsp_valid), .rsp_data(gm_rsp_data)
  );

  int          row_ptr [];
  int          col_idx [$];
  logic [31:0] val     [$];
  logic [31:0] b       [];
  logic [31:0] xref    [];
  int          lvl     [];
  int          iorder  [];
  int          ilevels [];
  int          nlev;

  task automatic gen_matrix();
    int cols [$];
    row_ptr = new[N + 1];
    b       = new[N];
    lvl     = new[N];
    row_ptr[0] = 0;
    for (int i = 0; i < int'(N); i++) begin
      int nd, lo, ndiag;
      cols.delete();
      nd = (i == 0) ? 0 : int'($urandom_range(0, MAXNZ));
      lo = (($urandom_range(0, FAR_DIV - 1) == 0) || i < int'(W)) ? 0 : i - int'(W);
      if (nd > i - lo) nd = i - lo;
      while (cols.size() < nd) begin
        int c, dup;
        c = lo + int'($urandom_range(0, i - lo - 1));
        dup = 0;
        foreach (cols[q]) if (cols[q] == c) dup = 1;
        if (dup == 0) cols.push_back(c);
      end
      cols.sort();
      lvl[i] = 0;
      foreach (cols[q]) begin
        col_idx.push_back(cols[q]);
        val.push_back(rand_f(120, 126));
        if (lvl[cols[q]] + 1 > lvl[i]) lvl[i] = lvl[cols[q]] + 1;
      end
      // diagonal: positive, larger than the number of entries in the row
      ndiag = $clog2(nd + 2) + 1;
      col_idx.push_back(i);
      val.push_back({1'b0, 8'(127 + ndiag), 23'($urandom)});
      row_ptr[i + 1] = col_idx.size();
      b[i] = rand_f(125, 128);
    end
  endtask

  task automatic level_sets();
    int cnt [];
    nlev = 0;
    for (int i = 0; i < int'(N); i++) if (lvl[i] + 1 > nlev) nlev = lvl[i] + 1;
    cnt     = new[nlev];
    ilevels = new[nlev + 1];
    iorder  = new[N];
    foreach (cnt[l]) cnt[l] = 0;
    for (int i = 0; i < int'(N); i++) cnt[lvl[i]]++;
    ilevels[0] = 0;
    for (int l = 0; l < nlev; l++) ilevels[l + 1] = ilevels[l] + cnt[l];
    foreach (cnt[l]) cnt[l] = ilevels[l];
    for (int i = 0; i < int'(N); i++) begin
      iorder[cnt[lvl[i]]] = i;
      cnt[lvl[i]]++;
    end
  endtask

  task automatic reference();
    xref = new[N];
    for (int i = 0; i < int'(N); i++) begin
      logic [31:0] diff;
      logic [31:0] part [];
      int nb;
      nb = (MODE == 0) ? 1 : int'(BS);
      part = new[nb];
      foreach (part[t]) part[t] = 32'h0;
      for (int k = row_ptr[i]; k < row_ptr[i + 1] - 1; k++) begin
        int t;
        t = (k - row_ptr[i]) % nb;
        part[t] = r2f(f2r(part[t]) + f2r(r2f(f2r(val[k]) * f2r(xref[col_idx[k]]))));
      end
      for (int st = nb / 2; st >= 1; st = st / 2)
        for (int r = 0; r < st; r++) part[r] = r2f(f2r(part[r]) + f2r(part[r + st]));
      diff = r2f(f2r(b[i]) - f2r(part[0]));
      xref[i] = r2f(f2r(diff) / f2r(val[row_ptr[i + 1] - 1]));
    end
  endtask

  task automatic load_memory();
    int a, nnz;
    nnz = col_idx.size();
    a = 0;
    ilevels_base = 28'(a); a += nlev + 1;
    iorder_base  = 28'(a); a += int'(N);
    row_ptr_base = 28'(a); a += int'(N) + 1;
    col_idx_base = 28'(a); a += nnz;
    val_base     = 28'(a); a += nnz;
    b_base       = 28'(a); a += int'(N);
    x_base       = 28'(a); a += int'(N);
    if (a > int'(WORDS)) begin
      $display("harness: system needs %0d words, memory has %0d", a, WORDS);
      failures++;
    end
    for (int l = 0; l <= nlev; l++) gm.mem[int'(ilevels_base) + l] = ilevels[l];
    for (int i = 0; i < int'(N); i++) begin
      gm.mem[int'(iorder_base) + i] = iorder[i];
      gm.mem[int'(b_base) + i]      = b[i];
      gm.mem[int'(x_base) + i]      = (MODE == 2) ? 32'h7f800000 : MARK;
    end
    for (int i = 0; i <= int'(N); i++) gm.mem[int'(row_ptr_base) + i] = row_ptr[i];
    for (int k = 0; k < nnz; k++) begin
      gm.mem[int'(col_idx_base) + k] = col_idx[k];
      gm.mem[int'(val_base) + k]     = val[k];
    end
    n_rows   = N;
    n_levels = nlev;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; checks = 0; failures = 0; finished = 1'b0;
    first = '0; last = '0;
    solve_cycles = 0;
    {n_rows, n_levels, ilevels_base, iorder_base, row_ptr_base} = '0;
    {col_idx_base, val_base, b_base, x_base} = '0;
    gen_matrix();
    level_sets();
    reference();
    load_memory();
    $display("harness: n=%0d nnz=%0d levels=%0d", N, col_idx.size(), nlev);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int l = 0; l < ((MODE == 1) ? nlev : 1); l++) begin
      first = (MODE == 1) ? ilevels[l] : 0;
      last  = (MODE == 1) ? ilevels[l + 1] : int'(N);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      solve_cycles++;
      while (!done) begin
        @(negedge clk);
        solve_cycles++;
      end
    end
    repeat (2) @(posedge clk);
    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (gm.mem[int'(x_base) + i] !== xref[i]) begin
        failures++;
        if (failures < 10)
          $display("harness: x[%0d] = %h, expected %h", i, gm.mem[int'(x_base) + i], xref[i]);
      end
    end
    checks++;
    if (gm.bad_addr != 0) begin
      failures++;
      $display("harness: %0d accesses outside memory", gm.bad_addr);
    end
    $display("harness: solved in %0d cycles", solve_cycles);
    finished = 1'b1;
  end

endmodule
