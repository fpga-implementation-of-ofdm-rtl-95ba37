// fft8: 8-point forward FFT in IEEE 754 single precision.
//
// Turns the eight received time-domain samples of a frame back into eight
// subcarrier symbols, X(k) = sum_n x(n) W_8^(nk), with no scaling. It is a
// radix-2 decimation-in-time network: inputs in bit-reversed order, then
// three stages of four fp_butterfly with the twiddles W_8^k. The diagonal
// twiddles use the magnitude TWIDDLE, by default 0.707 in single precision;
// with it, the transmitted +1 on a subcarrier comes back as 0.999698 or
// 0.999849 (32'h3F7FEC36, 32'h3F7FF61B) with a small leakage such as
// 32'h391E5000 on a neighbour, which are the values the design was published
// with. The structure follows the design; the DIT ordering is the one that
// reproduces those values. Combinational: y follows x with no clock.
module fft8
  import ofdm_pkg::*;
#(
  parameter fp32_t TWIDDLE = FP_TWIDDLE_0707
) (
  input  cplx_t x [NFFT],
  output cplx_t y [NFFT]
);

  localparam bit INVERSE = 1'b0;

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

  assign y = g_stage[LOG2N-1].vo;

endmodule
