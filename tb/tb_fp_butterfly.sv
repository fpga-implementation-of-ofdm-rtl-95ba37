// tb_fp_butterfly: checks the four kinds of butterfly (W = 1, +j, -j and a
// general twiddle 0.707 - j0.707) against the reference butterfly built from
// correctly rounded operations, with random complex inputs.
module tb_fp_butterfly;
  import ofdm_pkg::*;
  import fp_ref_pkg::*;

  cplx_t a, b;
  cplx_t p [4], q [4];
  int checks = 0, failures = 0;

  fp_butterfly #(.KIND(TW_ONE)) u_one (.a, .b, .p(p[0]), .q(q[0]));
  fp_butterfly #(.KIND(TW_PJ))  u_pj  (.a, .b, .p(p[1]), .q(q[1]));
  fp_butterfly #(.KIND(TW_MJ))  u_mj  (.a, .b, .p(p[2]), .q(q[2]));
  fp_butterfly #(.KIND(TW_GEN), .WR(32'h3F34_FDF4), .WI(32'hBF34_FDF4))
                                u_gen (.a, .b, .p(p[3]), .q(q[3]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpx ra, rb, ep, eq;
    for (int i = 0; i < 5000; i++) begin
      ra = '{re: rand_f32(110, 128), im: rand_f32(110, 128)};
      rb = '{re: rand_f32(110, 128), im: rand_f32(110, 128)};
      if (i == 0) begin  // 1 + 0.707(1 - j)... on unit inputs
        ra = '{re: 32'h3F80_0000, im: 32'h0000_0000};
        rb = '{re: 32'h3F80_0000, im: 32'h3F80_0000};
      end
      a = '{re: ra.re, im: ra.im};
      b = '{re: rb.re, im: rb.im};
      #1;
      for (int k = 0; k < 4; k++) begin
        bfly(ra, rb, k, 32'h3F34_FDF4, 32'hBF34_FDF4, ep, eq);
        checks++;
        if (p[k] !== {ep.re, ep.im} || q[k] !== {eq.re, eq.im}) begin
          failures++;
          if (failures < 10)
            $display("FAIL kind %0d: p=%h q=%h expected %h%h %h%h", k, p[k], q[k], ep.re, ep.im, eq.re, eq.im);
        end
      end
    end
    // (1+j0) + W(1+j1) with W = 0.707 - j0.707: t = 1.414 + j0, p = 2.414
    a = '{re: 32'h3F80_0000, im: 32'h0000_0000};
    b = '{re: 32'h3F80_0000, im: 32'h3F80_0000};
    #1;
    checks++;
    if ((f2r(p[3].re) - 2.414) > 1e-6 || (f2r(p[3].re) - 2.414) < -1e-6 || p[3].im != 32'h0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
