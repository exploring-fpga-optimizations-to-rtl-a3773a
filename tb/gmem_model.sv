// gmem_model: behavioural model of the accelerator's global memory (DRAM
// behind its controller). Word addressed, WORDS words. Accepts one request
// per cycle when req_ready is high; with STALL_PCT > 0 it drops req_ready at
// random in that percentage of cycles. Writes take effect on acceptance.
// Reads return their data in request order, each after a random latency of
// 1 to LAT_MAX cycles counted from acceptance.
module gmem_model #(
  parameter int unsigned WORDS     = 1 << 16,
  parameter int unsigned LAT_MAX   = 4,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [27:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        rsp_valid,
  output logic [31:0] rsp_data
);

  logic [31:0] mem [WORDS];
  logic [31:0] q_data [$];
  longint      q_due  [$];
  longint      cyc;
  int          bad_addr = 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      cyc       <= 0;
    end else begin
      cyc       <= cyc + 1;
      rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        if (req_addr >= 28'(WORDS)) bad_addr <= bad_addr + 1;
        else if (req_we) mem[req_addr] <= req_wdata;
        else begin
          q_data.push_back(mem[req_addr]);
          q_due.push_back(cyc + longint'($urandom_range(1, LAT_MAX)));
        end
      end
      if (q_due.size() > 0 && q_due[0] <= cyc) begin
        rsp_valid <= 1'b1;
        rsp_data  <= q_data.pop_front();
        void'(q_due.pop_front());
      end
      req_ready <= ($urandom_range(0, 99) >= STALL_PCT);
    end
  end

endmodule
