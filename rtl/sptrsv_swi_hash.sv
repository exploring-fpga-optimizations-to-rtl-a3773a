// sptrsv_swi_hash: level-scheduled sparse lower-triangular solver (SPTRSV)
// built as two single-work-item kernels joined by channels, with a local
// store for the solution vector.
//
// The host stores L in CSR form (row_ptr, col_idx, val; entries of a row in
// column order, diagonal last), the right-hand side b, and the level schedule
// (iorder: rows sorted by level; ilevels: start of each level in iorder, with
// n_levels+1 entries) in global memory, passes their word base addresses as
// kernel arguments and pulses start. The memory kernel walks the schedule,
// streams each row's entries and the matching x values through the channels,
// and writes back solved unknowns. The compute kernel multiplies and
// accumulates UF entries per cycle, subtracts the sum from b_i and divides by
// the diagonal. Unknowns with index < HASH_DEPTH are kept in the local x
// store and copied to x in global memory at the end (WRITE_THROUGH = 0) or
// written to both at once (WRITE_THROUGH = 1). done pulses when x in global
// memory is complete.
//
// Channels (all channel_fifo; CH_DEPTH entries, ROW_CH_DEPTH for the row
// channel): rows (row number and entry
// count), coefficients (UF values with lane-valid and diagonal flags), x
// values (UF values; b_i in the diagonal lane) and results (row, x_i), the
// last being the return direction of the x exchange between the kernels.
//
// Global memory port: word addressed, request valid/ready with write enable,
// read data returned in request order with rsp_valid. The global memory
// itself (DRAM and its controller) is outside this module.
//
// Defaults: UF = 4 and the hash enabled with write-back at the end, the
// fastest configuration for most of the larger test matrices. HASH_DEPTH and
// CH_DEPTH are this design's choices.
module sptrsv_swi_hash
  import sptrsv_pkg::*;
#(
  parameter int unsigned UF            = 4,
  parameter bit          USE_HASH      = 1'b1,
  parameter bit          WRITE_THROUGH = 1'b0,
  parameter int unsigned HASH_DEPTH    = 8192,
  parameter int unsigned CH_DEPTH      = 16,
  parameter int unsigned ROW_CH_DEPTH  = CH_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
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
  output logic   gm_req_valid,
  input  logic   gm_req_ready,
  output logic   gm_req_we,
  output gaddr_t gm_req_addr,
  output logic [31:0] gm_req_wdata,
  input  logic   gm_rsp_valid,
  input  logic [31:0] gm_rsp_data
);

  localparam int unsigned HAW = $clog2(HASH_DEPTH);

  typedef struct packed {
    logic [UF-1:0]  lane_valid;
    logic [UF-1:0]  lane_diag;
    fp32_t [UF-1:0] val;
  } coef_beat_t;
  typedef fp32_t [UF-1:0] x_beat_t;

  // memory kernel side of the channels
  logic       mk_row_valid, mk_row_ready;
  row_beat_t  mk_row_data;
  logic       mk_coef_valid, mk_coef_ready;
  coef_beat_t mk_coef;
  logic       mk_x_valid, mk_x_ready;
  x_beat_t    mk_x;
  logic       mk_res_valid, mk_res_ready;
  res_beat_t  mk_res;
  // compute kernel side
  logic       ck_row_valid, ck_row_ready;
  row_beat_t  ck_row_data;
  logic       ck_coef_valid, ck_coef_ready;
  coef_beat_t ck_coef;
  logic       ck_x_valid, ck_x_ready;
  x_beat_t    ck_x;
  logic       ck_res_valid, ck_res_ready;
  res_beat_t  ck_res;
  logic       ck_busy;


  logic           h_rd_en, h_wr_en;
  logic [HAW-1:0] h_rd_addr, h_wr_addr;
  fp32_t          h_rd_data, h_wr_data;
  logic           mk_busy;

  swi_mem_kernel #(
    .UF(UF), .USE_HASH(USE_HASH), .WRITE_THROUGH(WRITE_THROUGH), .HASH_DEPTH(HASH_DEPTH)
  ) u_mem (
    .clk, .rst_n, .start, .busy(mk_busy), .done,
    .n_rows, .n_levels, .ilevels_base, .iorder_base, .row_ptr_base, .col_idx_base,
    .val_base, .b_base, .x_base,
    .gm_req_valid, .gm_req_ready, .gm_req_we, .gm_req_addr, .gm_req_wdata,
    .gm_rsp_valid, .gm_rsp_data,
    .row_valid(mk_row_valid), .row_ready(mk_row_ready), .row_data(mk_row_data),
    .coef_valid(mk_coef_valid), .coef_ready(mk_coef_ready),
    .coef_lane_valid(mk_coef.lane_valid), .coef_lane_diag(mk_coef.lane_diag),
    .coef_val(mk_coef.val),
    .xch_valid(mk_x_valid), .xch_ready(mk_x_ready), .xch_val(mk_x),
    .res_valid(mk_res_valid), .res_ready(mk_res_ready), .res_data(mk_res),
    .hash_rd_en(h_rd_en), .hash_rd_addr(h_rd_addr), .hash_rd_data(h_rd_data),
    .hash_wr_en(h_wr_en), .hash_wr_addr(h_wr_addr), .hash_wr_data(h_wr_data)
  );

  channel_fifo #(.T(row_beat_t), .DEPTH(ROW_CH_DEPTH)) u_ch_row (
    .clk, .rst_n,
    .in_valid(mk_row_valid), .in_ready(mk_row_ready), .in_data(mk_row_data),
    .out_valid(ck_row_valid), .out_ready(ck_row_ready), .out_data(ck_row_data),
    .level()
  );
  channel_fifo #(.T(coef_beat_t), .DEPTH(CH_DEPTH)) u_ch_coef (
    .clk, .rst_n,
    .in_valid(mk_coef_valid), .in_ready(mk_coef_ready), .in_data(mk_coef),
    .out_valid(ck_coef_valid), .out_ready(ck_coef_ready), .out_data(ck_coef),
    .level()
  );
  channel_fifo #(.T(x_beat_t), .DEPTH(CH_DEPTH)) u_ch_x (
    .clk, .rst_n,
    .in_valid(mk_x_valid), .in_ready(mk_x_ready), .in_data(mk_x),
    .out_valid(ck_x_valid), .out_ready(ck_x_ready), .out_data(ck_x),
    .level()
  );
  channel_fifo #(.T(res_beat_t), .DEPTH(CH_DEPTH)) u_ch_res (
    .clk, .rst_n,
    .in_valid(ck_res_valid), .in_ready(ck_res_ready), .in_data(ck_res),
    .out_valid(mk_res_valid), .out_ready(mk_res_ready), .out_data(mk_res),
    .level()
  );

  swi_compute_kernel #(.UF(UF)) u_cmp (
    .clk, .rst_n,
    .row_valid(ck_row_valid), .row_ready(ck_row_ready), .row_data(ck_row_data),
    .coef_valid(ck_coef_valid), .coef_ready(ck_coef_ready),
    .coef_lane_valid(ck_coef.lane_valid), .coef_lane_diag(ck_coef.lane_diag),
    .coef_val(ck_coef.val),
    .xch_valid(ck_x_valid), .xch_ready(ck_x_ready), .xch_val(ck_x),
    .res_valid(ck_res_valid), .res_ready(ck_res_ready), .res_data(ck_res),
    .busy(ck_busy)
  );

  x_hash #(.DEPTH(HASH_DEPTH)) u_hash (
    .clk,
    .rd_en(h_rd_en), .rd_addr(h_rd_addr), .rd_data(h_rd_data),
    .wr_en(h_wr_en), .wr_addr(h_wr_addr), .wr_data(h_wr_data)
  );

  assign busy = mk_busy || ck_busy;

endmodule
