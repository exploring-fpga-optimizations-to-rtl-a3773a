// ndr_mem_arbiter: shares one global-memory port among CU compute units.
//
// Each cycle the port is free, a round-robin choice picks one requesting
// unit and forwards its request; the pointer then moves past that unit. For
// a read, the unit's number is queued, and as the in-order read responses
// come back each is routed to the unit at the head of that queue. Writes get
// no response. Every unit keeps at most one read outstanding, so the queue
// needs CU entries. Round-robin order and the in-order routing queue are this
// design's choices; replicated compute units only need some fair access to
// global memory.
module ndr_mem_arbiter
  import sptrsv_pkg::*;
#(
  parameter int unsigned CU = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // compute-unit side
  input  logic [CU-1:0]     u_req_valid,
  output logic [CU-1:0]     u_req_ready,
  input  logic [CU-1:0]     u_req_we,
  input  gaddr_t [CU-1:0]   u_req_addr,
  input  logic [CU-1:0][31:0] u_req_wdata,
  output logic [CU-1:0]     u_rsp_valid,
  output logic [31:0]       u_rsp_data,
  // memory side
  output logic              gm_req_valid,
  input  logic              gm_req_ready,
  output logic              gm_req_we,
  output gaddr_t            gm_req_addr,
  output logic [31:0]       gm_req_wdata,
  input  logic              gm_rsp_valid,
  input  logic [31:0]       gm_rsp_data
);

  localparam int unsigned IW = (CU > 1) ? $clog2(CU) : 1;

  logic [IW-1:0] rr;          // unit with the highest priority this cycle
  logic [IW-1:0] sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int j = 0; j < CU; j++) begin
      int c;
      c = (int'(rr) + j) % CU;
      if (!any && u_req_valid[c]) begin
        any = 1'b1;
        sel = IW'(c);
      end
    end
  end

  assign gm_req_valid = any;
  assign gm_req_we    = u_req_we[sel];
  assign gm_req_addr  = u_req_addr[sel];
  assign gm_req_wdata = u_req_wdata[sel];

  always_comb begin
    u_req_ready = '0;
    if (any) u_req_ready[sel] = gm_req_ready;
  end

  // routing queue of read owners
  logic [IW-1:0] owner [CU];
  logic [IW-1:0] wp, rp;
  logic          push, pop;
  assign push = any && gm_req_ready && !u_req_we[sel];
  assign pop  = gm_rsp_valid;

  function automatic logic [IW-1:0] nxt(logic [IW-1:0] p);
    return (int'(p) == CU - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    u_rsp_valid = '0;
    if (gm_rsp_valid) u_rsp_valid[owner[rp]] = 1'b1;
  end
  assign u_rsp_data = gm_rsp_data;

  always_ff @(posedge clk) begin
    if (push) owner[wp] <= sel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0; wp <= '0; rp <= '0;
    end else begin
      if (any && gm_req_ready) rr <= nxt(sel);
      if (push) wp <= nxt(wp);
      if (pop)  rp <= nxt(rp);
    end
  end

endmodule
