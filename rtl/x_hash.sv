// x_hash: on-chip store for the first DEPTH entries of the solution x.
//
// A simple dual-port memory: one synchronous read port (data one cycle after
// rd_en) used by the memory kernel to fetch x_j, and one write port used to
// store each x_i as it is solved. Unknowns with an index of DEPTH or more are
// not held here and live only in global memory. The store replaces slow
// global-memory reads of x with one-cycle local reads; at the end of a solve
// the memory kernel copies it out through the read port. Which part of x is
// kept (a direct index window starting at 0) and DEPTH are this design's
// choices: only "a portion of the x values" in local memory is specified.
module x_hash
  import sptrsv_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output fp32_t                    rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  fp32_t                    wr_data
);

  fp32_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
