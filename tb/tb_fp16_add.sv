// tb_fp16_add: self-checking testbench for fp16_add. Drives directed
// corner cases (zeros, subnormals, infinities, NaN, overflow, rounding
// ties) and random operands, and compares every result with a
// double-precision reference rounded to half precision.
module tb_fp16_add;
  import fp16_ref_pkg::*;
  logic [15:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp16_add dut (.a(a), .b(b), .y(y));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] ta, logic [15:0] tb_);
    a = ta; b = tb_;
    #1;
    exp_y = ref_add(ta, tb_);
    checks++;
    if (!same(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h add %h: got %h expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    logic [15:0] r0, r1;
    check(16'h3c00, 16'h3c00);   // 1, 1
    check(16'h4000, 16'hc000);   // 2, -2
    check(16'h0000, 16'h3c00);
    check(16'h8000, 16'h0000);
    check(16'h0001, 16'h3c00);   // subnormal
    check(16'h7c00, 16'h3c00);   // inf
    check(16'h7c00, 16'hfc00);
    check(16'h7c00, 16'h0000);
    check(16'h7e00, 16'h3c00);   // NaN
    check(16'h7bff, 16'h7bff);   // max normal
    check(16'h0400, 16'h0400);   // min normal
    check(16'h0400, 16'h8401);
    check(16'h3c01, 16'h3c01);
    check(16'h3c00, 16'h1000);   // rounding near 1
    check(16'h3c00, 16'h9000);
    check(16'h6400, 16'h3c00);   // ties
    check(16'h6401, 16'h3c00);
    check(16'h3555, 16'hb554);
    for (int i = 0; i < 20000; i++) begin
      r0 = 16'($urandom);
      r1 = 16'($urandom);
      if (i % 2 == 0) r1[14:10] = 5'(int'(r0[14:10]) + int'($urandom_range(0, 6)) - 3);
      check(r0, r1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
