// Self-checking test of ndr_row_dispatcher (CU = 3). Random request patterns
// over several launches. Checks that at most one unit is granted per cycle,
// that it is the lowest requesting unit, that positions come out in order
// from `first` with none skipped or repeated, and that row_empty rises exactly
// when `last` is reached.
module tb_ndr_row_dispatcher;
  import sptrsv_pkg::*;

  localparam int CU = 3;
  logic clk = 1'b0, rst_n = 1'b0, launch = 1'b0;
  idx_t first = '0, last = '0, row_pos;
  logic [CU-1:0] row_req = '0, row_gnt;
  logic row_empty;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ndr_row_dispatcher #(.CU(CU)) dut (.*);

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int expect_pos, lowest;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 50; run++) begin
      @(negedge clk);
      first = idx_t'($urandom_range(0, 1000));
      last  = first + idx_t'($urandom_range(0, 40));
      launch = 1'b1;
      @(negedge clk) launch = 1'b0;
      expect_pos = int'(first);
      for (int cyc = 0; cyc < 120; cyc++) begin
        row_req = CU'($urandom);
        #1;
        lowest = -1;
        for (int c = CU - 1; c >= 0; c--) if (row_req[c]) lowest = c;
        checks += 3;
        if (row_empty !== (expect_pos >= int'(last))) fail("row_empty");
        if ($countones(row_gnt) > 1) fail("several grants");
        if (!row_empty && lowest >= 0) begin
          if (row_gnt !== (CU'(1) << lowest)) fail($sformatf("grant %b for requests %b", row_gnt, row_req));
          if (int'(row_pos) != expect_pos) fail($sformatf("position %0d, expected %0d", row_pos, expect_pos));
          expect_pos++;
        end else if (row_gnt != '0) fail("grant without request or rows");
        @(negedge clk);
      end
      checks++;
      if (expect_pos != int'(last)) fail("not all positions handed out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
