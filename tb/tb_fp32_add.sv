// Self-checking test of fp32_add: random operand pairs with near, far and
// equal exponents, both signs (so additions, subtractions and massive
// cancellation all occur), and the special values, against the reference sum
// rounded once to single precision.
module tb_fp32_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a, .b, .y);

  task automatic check(logic [31:0] av, logic [31:0] bv, logic [31:0] ev);
    a = av; b = bv;
    #1;
    checks++;
    if (y !== ev) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", av, bv, y, ev);
    end
  endtask

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      logic [31:0] av, bv;
      int ea;
      ea = int'($urandom_range(40, 200));
      av = rand_f(ea, ea);
      case (i % 4)
        0: bv = rand_f(ea, ea);                                   // same exponent
        1: bv = rand_f(ea - 3 < 1 ? 1 : ea - 3, ea + 3);          // near
        2: bv = rand_f(ea - 40 < 1 ? 1 : ea - 40, ea);            // far
        default: bv = {~av[31], av[30:0] ^ 31'($urandom_range(0, 7))}; // cancellation
      endcase
      check(av, bv, r2f(f2r(av) + f2r(bv)));
    end
    check(32'h3f800000, 32'hbf800000, 32'h00000000);   // 1 - 1 = +0
    check(32'h40000000, 32'h3f800000, 32'h40400000);   // 2 + 1 = 3
    check(32'h7f7fffff, 32'h7f7fffff, 32'h7f800000);   // overflow
    check(32'h00000000, 32'hc0a00000, 32'hc0a00000);
    check(32'h80000000, 32'h80000000, 32'h80000000);
    check(32'h7f800000, 32'hff800000, 32'h7fc00000);
    check(32'h7f800000, 32'h3f800000, 32'h7f800000);
    check(32'h00800001, 32'h80800000, 32'h00000000);   // tiny difference flushes
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
