// Self-checking test of x_hash: random writes and reads against a reference
// array, checking that read data appears exactly one cycle after rd_en, is
// held while rd_en is low, and that a write and a read of different
// addresses in the same cycle do not disturb each other.
module tb_x_hash;

  localparam int DEPTH = 256;

  logic clk = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [7:0] rd_addr = '0, wr_addr = '0;
  logic [31:0] rd_data, wr_data = '0;
  logic [31:0] model [DEPTH];
  logic [31:0] expect_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  x_hash #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // fill every entry first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 8'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk) wr_en = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      rd_en   = ($urandom_range(0, 3) != 0);
      rd_addr = 8'($urandom);
      wr_en   = ($urandom_range(0, 1) != 0);
      wr_addr = 8'($urandom);
      if (wr_en && wr_addr == rd_addr) wr_addr = wr_addr + 8'd1;
      wr_data = $urandom;
      if (rd_en) expect_q = model[rd_addr];
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL read %h, expected %h", rd_data, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
