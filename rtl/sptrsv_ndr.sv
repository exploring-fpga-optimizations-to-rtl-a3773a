// sptrsv_ndr: the NDRange organisation of the level-scheduled sparse
// triangular solver. CU replicated compute units (ndr_wg_engine), each
// running work-groups of BS work-items, take rows from a shared dispatcher
// and share one global-memory port through ndr_mem_arbiter.
//
// WAIT = 0, per-level variant: the host launches the kernel once per level,
// with first/last set to that level's range of iorder (from ilevels). All
// rows of earlier levels are then solved, so no x is checked. WAIT = 1,
// waiting variant: the host fills x with +infinity, launches once with the
// whole of iorder, and each work-group waits on its unsolved x values.
//
// Launch: pulse start with the arguments set; done pulses when every row of
// the launch has been written and all units are idle. Global memory port as
// in sptrsv_swi_hash: word addressed, valid/ready request, in-order read
// response. Defaults (BS = 1, CU = 2, per-level) are the per-level variant's
// best configuration on the smallest test matrix. The waiting variant's best
// configuration is BS = 4, CU = 1, WAIT = 1.
module sptrsv_ndr
  import sptrsv_pkg::*;
#(
  parameter int unsigned BS   = 1,
  parameter int unsigned CU   = 2,
  parameter bit          WAIT = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  input  idx_t   first,
  input  idx_t   last,
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
  input  logic [31:0] gm_rsp_data,
  output logic   spin
);

  logic [CU-1:0]       u_busy, u_req, u_gnt, u_spin;
  logic                empty;
  idx_t                pos;
  logic [CU-1:0]       q_valid, q_ready, q_we, r_valid;
  gaddr_t [CU-1:0]     q_addr;
  logic [CU-1:0][31:0] q_wdata;
  logic [31:0]         r_data;

  ndr_row_dispatcher #(.CU(CU)) u_disp (
    .clk, .rst_n, .launch(start), .first, .last,
    .row_req(u_req), .row_gnt(u_gnt), .row_empty(empty), .row_pos(pos));

  for (genvar c = 0; c < CU; c++) begin : g_cu
    ndr_wg_engine #(.BS(BS), .WAIT(WAIT)) u_eng (
      .clk, .rst_n, .launch(start), .busy(u_busy[c]),
      .row_req(u_req[c]), .row_gnt(u_gnt[c]), .row_empty(empty), .row_pos(pos),
      .iorder_base, .row_ptr_base, .col_idx_base, .val_base, .b_base, .x_base,
      .gm_req_valid(q_valid[c]), .gm_req_ready(q_ready[c]), .gm_req_we(q_we[c]),
      .gm_req_addr(q_addr[c]), .gm_req_wdata(q_wdata[c]),
      .gm_rsp_valid(r_valid[c]), .gm_rsp_data(r_data), .spin(u_spin[c]));
  end

  ndr_mem_arbiter #(.CU(CU)) u_arb (
    .clk, .rst_n,
    .u_req_valid(q_valid), .u_req_ready(q_ready), .u_req_we(q_we), .u_req_addr(q_addr),
    .u_req_wdata(q_wdata), .u_rsp_valid(r_valid), .u_rsp_data(r_data),
    .gm_req_valid, .gm_req_ready, .gm_req_we, .gm_req_addr, .gm_req_wdata,
    .gm_rsp_valid, .gm_rsp_data);

  // done: the launch was running and now every unit is idle
  logic running;
  assign busy = running;
  assign spin = |u_spin;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) running <= 1'b1;
      else if (running && u_busy == '0) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

endmodule
