// ifft8: 8-point inverse FFT in IEEE 754 single precision.
//
// Turns the eight QPSK symbols of a frame (frequency domain) into eight
// time-domain samples, x(n) = 1/8 * sum_k X(k) W_8^(-nk). It is a radix-2
// decimation-in-time network: the inputs are taken in bit-reversed order,
// three stages of four fp_butterfly each combine them with the twiddles
// W_8^-k, and a final fp_mul by 1/8 applies the scaling. The diagonal
// twiddles use the magnitude TWIDDLE, by default 0.707 in single precision,
// which reproduces the sample values the design was published with (for
// example -0.176750 = 32'hBE34FDF4 in x(1) for the data word 4); the exact
// value 1/sqrt(2) can be set instead. The structure (8 points, radix-2,
// IEEE 754, 1/N scaling) follows the design; the bit-reversed DIT ordering is
// the one that reproduces its published values. Combinational: y follows x
// with no clock.
module ifft8
  import ofdm_pkg::*;
#(
  parameter fp32_t TWIDDLE = FP_TWIDDLE_0707
) (
  input  cplx_t x [NFFT],
  output cplx_t y [NFFT]
);

  localparam bit INVERSE = 1'b1;

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    localparam int SPAN = 1 << s;
    cplx_t vi [NFFT];  // stage input
    cplx_t vo [NFFT];  // stage output

    if (s == 0) begin : g_first
      // bit-reversed input order
      for (genvar n = 0; n < NFFT; n++) begin : g_rev
        localparam int REV = ((n & 1) << 2) | (n & 2) | ((n >> 2) & 1);
        assign vi[n] = x[REV];
      end
    end else begin : g_next
      assign vi = g_stage[s-1].vo;
    end

    for (genvar blk = 0; blk < NFFT; blk += 2 * SPAN) begin : g_blk
      for (genvar k = 0; k < SPAN; k++) begin : g_bf
        localparam int TW = (NFFT / (2 * SPAN)) * k;
        fp_butterfly #(
          .KIND (tw_kind(TW, INVERSE)),
          .WR   (tw_re(TW, TWIDDLE)),
          .WI   (tw_im(TW, INVERSE, TWIDDLE))
        ) u_bf (
          .a (vi[blk + k]),
          .b (vi[blk + k + SPAN]),
          .p (vo[blk + k]),
          .q (vo[blk + k + SPAN])
        );
      end
    end
  end

  // 1/N scaling
  for (genvar n = 0; n < NFFT; n++) begin : g_scale
    fp_mul u_sre (.a(g_stage[LOG2N-1].vo[n].re), .b(FP_EIGHTH), .y(y[n].re));
    fp_mul u_sim (.a(g_stage[LOG2N-1].vo[n].im), .b(FP_EIGHTH), .y(y[n].im));
  end

endmodule
