// Self-checking test of fp32_div: random normal operands and special values
// against the reference quotient rounded once to single precision. Checks
// also that each result arrives exactly 28 cycles after start.
module tb_fp32_div;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic [31:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp32_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .y);

  task automatic check(logic [31:0] av, logic [31:0] bv, logic [31:0] ev);
    int cyc = 0;
    @(negedge clk);
    a = av; b = bv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (y !== ev) begin
      failures++;
      if (failures < 10) $display("FAIL div %h / %h = %h, expected %h", av, bv, y, ev);
    end
    if (cyc != 28) begin
      failures++;
      if (failures < 10) $display("FAIL div latency %0d cycles", cyc);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] av, bv;
      av = rand_f(20, 230);
      bv = rand_f(20, 230);
      check(av, bv, r2f(f2r(av) / f2r(bv)));
    end
    check(32'h40400000, 32'h40400000, 32'h3f800000);   // 3 / 3 = 1
    check(32'h3f800000, 32'h40400000, 32'h3eaaaaab);   // 1 / 3
    check(32'h3f800000, 32'h00000000, 32'h7f800000);   // 1 / 0
    check(32'h00000000, 32'h00000000, 32'h7fc00000);   // 0 / 0
    check(32'h00000000, 32'h40400000, 32'h00000000);
    check(32'hc0000000, 32'h7f800000, 32'h80000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
