// channel_fifo: a kernel-to-kernel channel, built as a synchronous FIFO.
//
// Carries payloads of type T from a writer kernel to a reader kernel with
// valid/ready flow control on both sides: a beat moves when valid and ready
// are both high on a clock edge. A full channel stalls the writer (in_ready
// low) and an empty one stalls the reader (out_valid low). The FIFO storage
// is a circular buffer of DEPTH entries read combinationally from the head,
// so a beat written in one cycle can be read in the next. DEPTH is this
// design's choice; the channels are only required to pass data between the
// kernels with low latency and to synchronise them.
module channel_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                           mem [DEPTH];
  logic [AW-1:0]              wp, rp;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  logic push, pop;
  assign in_ready  = (cnt != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (cnt != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];
  assign level     = cnt;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= next_ptr(wp);
      if (pop)  rp <= next_ptr(rp);
      cnt <= cnt + $bits(cnt)'(push) - $bits(cnt)'(pop);
    end
  end

  // A writer must hold its beat until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) in_valid && !in_ready |=> in_valid && $stable(in_data);
  endproperty
  a_hold: assert property (p_hold) else $error("channel writer dropped a stalled beat");

endmodule
