// sptrsv_top: the three sparse triangular solver organisations side by side.
//
//   swi_*   sptrsv_swi_hash: memory kernel and compute kernel joined by
//           channels, with the on-chip x store (UF = 4). The fastest
//           organisation for most large systems.
//   ndrm_*  sptrsv_ndr, per-level NDRange variant (BS = 1, two compute units):
//           the host launches it once per level.
//   ndrw_*  sptrsv_ndr, waiting NDRange variant (BS = 4, one compute unit):
//           one launch, x preset to +infinity, work-groups wait for unsolved x.
//
// The organisations are alternatives for the same job; which is fastest
// depends on the matrix. Each has its own launch signals and its own
// global-memory port, with the protocol described in sptrsv_swi_hash. In a
// system they would share one DRAM controller; that controller, the DRAM and
// the host processor are outside this design.
module sptrsv_top
  import sptrsv_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // swi_: channel-based solver
  input  logic   swi_start,
  output logic   swi_busy,
  output logic   swi_done,
  input  idx_t   swi_n_rows,
  input  idx_t   swi_n_levels,
  input  gaddr_t swi_ilevels_base,
  input  gaddr_t swi_iorder_base,
  input  gaddr_t swi_row_ptr_base,
  input  gaddr_t swi_col_idx_base,
  input  gaddr_t swi_val_base,
  input  gaddr_t swi_b_base,
  input  gaddr_t swi_x_base,
  output logic   swi_gm_req_valid,
  input  logic   swi_gm_req_ready,
  output logic   swi_gm_req_we,
  output gaddr_t swi_gm_req_addr,
  output logic [31:0] swi_gm_req_wdata,
  input  logic   swi_gm_rsp_valid,
  input  logic [31:0] swi_gm_rsp_data,
  // ndrm_: NDRange solver
  input  logic   ndrm_start,
  output logic   ndrm_busy,
  output logic   ndrm_done,
  input  idx_t   ndrm_first,
  input  idx_t   ndrm_last,
  output logic   ndrm_spin,
  input  gaddr_t ndrm_iorder_base,
  input  gaddr_t ndrm_row_ptr_base,
  input  gaddr_t ndrm_col_idx_base,
  input  gaddr_t ndrm_val_base,
  input  gaddr_t ndrm_b_base,
  input  gaddr_t ndrm_x_base,
  output logic   ndrm_gm_req_valid,
  input  logic   ndrm_gm_req_ready,
  output logic   ndrm_gm_req_we,
  output gaddr_t ndrm_gm_req_addr,
  output logic [31:0] ndrm_gm_req_wdata,
  input  logic   ndrm_gm_rsp_valid,
  input  logic [31:0] ndrm_gm_rsp_data,
  // ndrw_: NDRange solver
  input  logic   ndrw_start,
  output logic   ndrw_busy,
  output logic   ndrw_done,
  input  idx_t   ndrw_first,
  input  idx_t   ndrw_last,
  output logic   ndrw_spin,
  input  gaddr_t ndrw_iorder_base,
  input  gaddr_t ndrw_row_ptr_base,
  input  gaddr_t ndrw_col_idx_base,
  input  gaddr_t ndrw_val_base,
  input  gaddr_t ndrw_b_base,
  input  gaddr_t ndrw_x_base,
  output logic   ndrw_gm_req_valid,
  input  logic   ndrw_gm_req_ready,
  output logic   ndrw_gm_req_we,
  output gaddr_t ndrw_gm_req_addr,
  output logic [31:0] ndrw_gm_req_wdata,
  input  logic   ndrw_gm_rsp_valid,
  input  logic [31:0] ndrw_gm_rsp_data
);

  sptrsv_swi_hash u_swi (
    .clk, .rst_n,
    .start(swi_start),
    .busy(swi_busy),
    .done(swi_done),
    .n_rows(swi_n_rows),
    .n_levels(swi_n_levels),
    .ilevels_base(swi_ilevels_base),
    .iorder_base(swi_iorder_base),
    .row_ptr_base(swi_row_ptr_base),
    .col_idx_base(swi_col_idx_base),
    .val_base(swi_val_base),
    .b_base(swi_b_base),
    .x_base(swi_x_base),
    .gm_req_valid(swi_gm_req_valid),
    .gm_req_ready(swi_gm_req_ready),
    .gm_req_we(swi_gm_req_we),
    .gm_req_addr(swi_gm_req_addr),
    .gm_req_wdata(swi_gm_req_wdata),
    .gm_rsp_valid(swi_gm_rsp_valid),
    .gm_rsp_data(swi_gm_rsp_data)
  );

  sptrsv_ndr #(.BS(1), .CU(2), .WAIT(1'b0)) u_ndr_multi (
    .clk, .rst_n,
    .start(ndrm_start),
    .busy(ndrm_busy),
    .done(ndrm_done),
    .first(ndrm_first),
    .last(ndrm_last),
    .spin(ndrm_spin),
    .iorder_base(ndrm_iorder_base),
    .row_ptr_base(ndrm_row_ptr_base),
    .col_idx_base(ndrm_col_idx_base),
    .val_base(ndrm_val_base),
    .b_base(ndrm_b_base),
    .x_base(ndrm_x_base),
    .gm_req_valid(ndrm_gm_req_valid),
    .gm_req_ready(ndrm_gm_req_ready),
    .gm_req_we(ndrm_gm_req_we),
    .gm_req_addr(ndrm_gm_req_addr),
    .gm_req_wdata(ndrm_gm_req_wdata),
    .gm_rsp_valid(ndrm_gm_rsp_valid),
    .gm_rsp_data(ndrm_gm_rsp_data)
  );

  sptrsv_ndr #(.BS(4), .CU(1), .WAIT(1'b1)) u_ndr_wait (
    .clk, .rst_n,
    .start(ndrw_start),
    .busy(ndrw_busy),
    .done(ndrw_done),
    .first(ndrw_first),
    .last(ndrw_last),
    .spin(ndrw_spin),
    .iorder_base(ndrw_iorder_base),
    .row_ptr_base(ndrw_row_ptr_base),
    .col_idx_base(ndrw_col_idx_base),
    .val_base(ndrw_val_base),
    .b_base(ndrw_b_base),
    .x_base(ndrw_x_base),
    .gm_req_valid(ndrw_gm_req_valid),
    .gm_req_ready(ndrw_gm_req_ready),
    .gm_req_we(ndrw_gm_req_we),
    .gm_req_addr(ndrw_gm_req_addr),
    .gm_req_wdata(ndrw_gm_req_wdata),
    .gm_rsp_valid(ndrw_gm_rsp_valid),
    .gm_rsp_data(ndrw_gm_rsp_data)
  );

endmodule
