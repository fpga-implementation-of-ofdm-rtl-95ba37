// fp_butterfly: radix-2 decimation-in-time butterfly in single precision.
//
// p = a + W*b and q = a - W*b, where the twiddle factor W is fixed by
// parameters. For W = 1 the product is skipped; for W = +j or -j it is an
// exact swap of real and imaginary parts with one sign change; any other W
// takes four fp_mul and two fp_add (t.re = b.re*W.re - b.im*W.im,
// t.im = b.re*W.im + b.im*W.re), followed by the two complex fp_add/sub.
// The butterfly structure follows the design's radix-2 FFT; the choice of
// exact handling for W = 1 and W = +-j is this implementation's.
// Combinational.
module fp_butterfly
  import ofdm_pkg::*;
#(
  parameter tw_kind_e KIND = TW_GEN,
  parameter fp32_t    WR   = FP_ONE,   // used only when KIND == TW_GEN
  parameter fp32_t    WI   = FP_ZERO
) (
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t p,
  output cplx_t q
);

  cplx_t t;

  if (KIND == TW_GEN) begin : g_gen
    fp32_t rr, ii, ri, ir;
    fp_mul u_rr (.a(b.re), .b(WR), .y(rr));
    fp_mul u_ii (.a(b.im), .b(WI), .y(ii));
    fp_mul u_ri (.a(b.re), .b(WI), .y(ri));
    fp_mul u_ir (.a(b.im), .b(WR), .y(ir));
    fp_add u_tre (.a(rr), .b(ii), .sub(1'b1), .y(t.re));
    fp_add u_tim (.a(ri), .b(ir), .sub(1'b0), .y(t.im));
  end else if (KIND == TW_PJ) begin : g_pj
    // (x + jy) * j = -y + jx
    assign t = '{re: fp_neg(b.im), im: b.re};
  end else if (KIND == TW_MJ) begin : g_mj
    // (x + jy) * -j = y - jx
    assign t = '{re: b.im, im: fp_neg(b.re)};
  end else begin : g_one
    assign t = b;
  end

  fp_add u_pre (.a(a.re), .b(t.re), .sub(1'b0), .y(p.re));
  fp_add u_pim (.a(a.im), .b(t.im), .sub(1'b0), .y(p.im));
  fp_add u_qre (.a(a.re), .b(t.re), .sub(1'b1), .y(q.re));
  fp_add u_qim (.a(a.im), .b(t.im), .sub(1'b1), .y(q.im));

endmodule
