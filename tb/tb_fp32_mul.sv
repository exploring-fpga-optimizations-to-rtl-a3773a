// Self-checking test of fp32_mul: random normal operands (including products
// that overflow and underflow) and the special values, against the reference
// product rounded once to single precision.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, expv;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  task automatic check(logic [31:0] av, logic [31:0] bv, logic [31:0] ev);
    a = av; b = bv;
    #1;
    checks++;
    if (y !== ev) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", av, bv, y, ev);
    end
  endtask

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] av, bv;
      av = rand_f(64, 190);
      bv = rand_f(64, 190);
      check(av, bv, r2f(f2r(av) * f2r(bv)));
    end
    // exact small products
    check(32'h3fc00000, 32'h40000000, 32'h40400000);   // 1.5 * 2 = 3
    check(32'hbf800000, 32'h3f800000, 32'hbf800000);   // -1 * 1
    // overflow, underflow, specials
    check(32'h7f000000, 32'h7f000000, 32'h7f800000);
    check(32'h00800000, 32'h00800000, 32'h00000000);
    check(32'h00000000, 32'h40000000, 32'h00000000);
    check(32'h80000000, 32'h40000000, 32'h80000000);
    check(32'h7f800000, 32'hc0000000, 32'hff800000);
    check(32'h7f800000, 32'h00000000, 32'h7fc00000);
    check(32'h7fc00000, 32'h3f800000, 32'h7fc00000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
