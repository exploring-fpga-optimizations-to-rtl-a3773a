// ndr_row_dispatcher: hands out the work-groups of an NDRange launch, one row
// position of iorder at a time, in increasing order.
//
// A launch covers positions [first, last) of iorder: one level for the
// per-level variant, all rows for the waiting variant. The next position is a
// counter advanced once per grant, so no position is given out twice and the
// rows start in schedule order, which is what the atomic increment of a
// shared counter achieves in the kernel. Requests from several compute units
// in the same cycle are served lowest unit first, one per cycle. When the
// counter reaches `last`, requests are answered with row_empty. Keeping the
// counter in a register next to the units, instead of in global memory, is
// this design's choice.
module ndr_row_dispatcher
  import sptrsv_pkg::*;
#(
  parameter int unsigned CU = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          launch,
  input  idx_t          first,
  input  idx_t          last,
  input  logic [CU-1:0] row_req,
  output logic [CU-1:0] row_gnt,
  output logic          row_empty,
  output idx_t          row_pos
);

  idx_t next;

  assign row_empty = (next >= last);
  assign row_pos   = next;

  always_comb begin
    row_gnt = '0;
    if (!row_empty) begin
      for (int c = CU - 1; c >= 0; c--) begin
        if (row_req[c]) row_gnt = CU'(1) << c;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) next <= '0;
    else if (launch) next <= first;
    else if (|row_gnt) next <= next + 1;
  end

endmodule
