// tb_fp_mul: checks fp_mul against correctly rounded double-precision
// reference products: random operands over a range of exponents, exact
// products, the 0.707 twiddle and the 1/8 scaling used by the transforms,
// zeros, overflow, underflow, infinities and NaN.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] exp);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", ta, tb_, y, exp);
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
    for (int i = 0; i < 20000; i++) begin
      x = rand_f32(80, 170);
      z = (i % 2) ? rand_f32(80, 170) : 32'h3F34_FDF4;
      check(x, z, fmul(x, z));
    end
    check(32'h3F80_0000, 32'h3F34_FDF4, 32'h3F34_FDF4);   // 1 * 0.707
    check(32'hBF80_0000, 32'h3F34_FDF4, 32'hBF34_FDF4);   // -1 * 0.707
    check(32'h3F34_FDF4, 32'h3F34_FDF4, fmul(32'h3F34_FDF4, 32'h3F34_FDF4));
    check(32'h3F40_0000, 32'h3E00_0000, 32'h3DC0_0000);   // 0.75 / 8 = 0.09375
    check(32'h4040_0000, 32'h4040_0000, 32'h4110_0000);   // 3 * 3 = 9
    check(32'h0000_0000, 32'hBF80_0000, 32'h8000_0000);   // 0 * -1 = -0
    check(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);   // overflow
    check(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);   // underflow flushed
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);   // inf * 0
    check(32'hFF80_0000, 32'h4000_0000, 32'hFF80_0000);   // -inf * 2
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
