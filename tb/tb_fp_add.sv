// tb_fp_add: checks fp_add against correctly rounded double-precision
// reference results: random operands of both signs over a range of
// exponents, operands with equal or nearby exponents (cancellation),
// exact negation, zeros, infinities and NaN.
module tb_fp_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .sub, .y);

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic ts, logic [31:0] exp);
    a = ta; b = tb_; sub = ts;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h: got %h expected %h", ta, ts ? "-" : "+", tb_, y, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z;
    logic s;
    for (int i = 0; i < 20000; i++) begin
      x = rand_f32(100, 150);
      z = (i % 3 == 0) ? {1'($urandom), x[30:23], 23'($urandom)} :   // equal exponents
          (i % 3 == 1) ? {1'($urandom), 8'(x[30:23] - ($urandom % 30)), 23'($urandom)} :
                         rand_f32(100, 150);
      s = 1'($urandom);
      check(x, z, s, s ? fsub(x, z) : fadd(x, z));
    end
    // exact results and special values
    check(32'h3F80_0000, 32'h3F80_0000, 1'b1, 32'h0000_0000);   // 1 - 1 = +0
    check(32'h3F80_0000, 32'h3F80_0000, 1'b0, 32'h4000_0000);   // 1 + 1 = 2
    check(32'h3F60_0000, 32'h3E00_0000, 1'b0, 32'h3F80_0000);   // 0.875 + 0.125
    check(32'h0000_0000, 32'h3E00_0000, 1'b1, 32'hBE00_0000);   // 0 - 0.125
    check(32'h8000_0000, 32'h8000_0000, 1'b0, 32'h8000_0000);   // -0 + -0
    check(32'h3F80_0000, 32'h3380_0000, 1'b0, 32'h3F80_0000);   // 1 + 2^-24: tie, to even
    check(32'h3F80_0001, 32'h3380_0000, 1'b0, 32'h3F80_0002);   // tie, rounds up to even
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0, 32'h7F80_0000);   // overflow
    check(32'h7F80_0000, 32'h3F80_0000, 1'b0, 32'h7F80_0000);   // inf + 1
    check(32'h7F80_0000, 32'h7F80_0000, 1'b1, 32'h7FC0_0000);   // inf - inf
    check(32'h7FC0_0001, 32'h3F80_0000, 1'b0, 32'h7FC0_0000);   // NaN
    check(32'h0080_0001, 32'h0080_0000, 1'b1, 32'h0000_0000);   // subnormal result flushed
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
