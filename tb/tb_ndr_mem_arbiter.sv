// Self-checking test of ndr_mem_arbiter (CU = 3) in front of the global-memory
// model. Each unit issues random reads and writes to its own address range,
// one read outstanding at a time, and checks every read against its own copy
// of the data; a response routed to the wrong unit shows as a wrong value or
// an unexpected response. Also checks round-robin fairness: a waiting unit is
// served before any other unit is served twice.
module tb_ndr_mem_arbiter;
  import sptrsv_pkg::*;

  localparam int CU = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [CU-1:0]       u_req_valid, u_req_ready, u_req_we, u_rsp_valid;
  gaddr_t [CU-1:0]     u_req_addr;
  logic [CU-1:0][31:0] u_req_wdata;
  logic [31:0]         u_rsp_data;
  logic gm_req_valid, gm_req_ready, gm_req_we, gm_rsp_valid;
  gaddr_t gm_req_addr;
  logic [31:0] gm_req_wdata, gm_rsp_data;

  ndr_mem_arbiter #(.CU(CU)) dut (.*);
  gmem_model #(.WORDS(4096), .LAT_MAX(5), .STALL_PCT(20)) gm (
    .clk, .rst_n, .req_valid(gm_req_valid), .req_ready(gm_req_ready), .req_we(gm_req_we),
    .req_addr(gm_req_addr), .req_wdata(gm_req_wdata), .rsp_valid(gm_rsp_valid), .rsp_data(gm_rsp_data));

  int checks = 0, failures = 0;
  int served_since [CU];   // grants to others while this unit waited

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  for (genvar c = 0; c < CU; c++) begin : g_unit
    logic [31:0] shadow [256];
    bit          pending = 1'b0;
    bit          fin = 1'b0;
    logic [31:0] want;
    initial begin
      u_req_valid[c] = 1'b0; u_req_we[c] = 1'b0; u_req_addr[c] = '0; u_req_wdata[c] = '0;
      for (int a = 0; a < 256; a++) shadow[a] = 32'(c * 1000 + a);
      for (int a = 0; a < 256; a++) gm.mem[c * 256 + a] = shadow[a];
      wait (rst_n);
      for (int n = 0; n < 400; n++) begin
        int a;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        @(negedge clk);
        a = int'($urandom_range(0, 255));
        u_req_valid[c] = 1'b1;
        u_req_we[c]    = ($urandom_range(0, 2) == 0);
        u_req_addr[c]  = gaddr_t'(c * 256 + a);
        u_req_wdata[c] = $urandom;
        do @(posedge clk); while (!u_req_ready[c]);
        if (u_req_we[c]) shadow[a] = u_req_wdata[c];
        else begin
          pending = 1'b1;
          want = shadow[a];
        end
        @(negedge clk) u_req_valid[c] = 1'b0;
        while (pending) @(negedge clk);
      end
      fin = 1'b1;
    end
    always @(posedge clk) begin
      if (u_rsp_valid[c]) begin
        checks++;
        if (!pending) fail($sformatf("unit %0d: response without a read", c));
        else if (u_rsp_data !== want) fail($sformatf("unit %0d: read %h, expected %h", c, u_rsp_data, want));
        pending <= 1'b0;
      end
    end
  end

  // fairness
  always @(posedge clk) begin
    if (rst_n && gm_req_valid && gm_req_ready) begin
      for (int c = 0; c < CU; c++) begin
        if (u_req_ready[c]) served_since[c] = 0;
        else if (u_req_valid[c]) begin
          served_since[c]++;
          checks++;
          if (served_since[c] > CU - 1) fail($sformatf("unit %0d starved", c));
        end
      end
    end
  end

  initial begin
    foreach (served_since[c]) served_since[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (60000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (g_unit[0].fin && g_unit[1].fin && g_unit[2].fin);
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
