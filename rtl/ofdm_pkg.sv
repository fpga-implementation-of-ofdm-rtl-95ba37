// ofdm_pkg: types and constants shared by the OFDM transceiver.
//
// Samples are IEEE 754 single-precision numbers (fp32_t). A complex sample
// is a packed struct of a real (I) and an imaginary (Q) part. A frame is
// NFFT = 8 complex samples, one per subcarrier, carrying two bits each, so
// one frame carries a WORD_W = 16-bit data word. Eight subcarriers, QPSK and
// the 16-bit word are the design's figures; the constant encodings below
// are plain IEEE 754.
package ofdm_pkg;

  localparam int NFFT   = 8;   // subcarriers per OFDM frame
  localparam int LOG2N  = 3;   // radix-2 stages
  localparam int WORD_W = 16;  // data bits per frame (2 per subcarrier)

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;   // I channel
    fp32_t im;   // Q channel
  } cplx_t;

  typedef cplx_t frame_t [NFFT];

  localparam fp32_t FP_ZERO   = 32'h0000_0000;  //  0.0
  localparam fp32_t FP_ONE    = 32'h3F80_0000;  //  1.0
  localparam fp32_t FP_MONE   = 32'hBF80_0000;  // -1.0
  localparam fp32_t FP_EIGHTH = 32'h3E00_0000;  //  1/8, IFFT scaling
  localparam fp32_t FP_QNAN   = 32'h7FC0_0000;  // canonical quiet NaN

  // Twiddle magnitude cos(pi/4) as the design uses it: 0.707 rounded to
  // single precision (an exact 1/sqrt(2) would be 32'h3F3504F3).
  localparam fp32_t FP_TWIDDLE_0707 = 32'h3F34_FDF4;

  // How a butterfly applies its twiddle factor W to the lower input b:
  // TW_ONE (W = 1, no product), TW_PJ (W = +j, a swap and sign change),
  // TW_MJ (W = -j, likewise) and TW_GEN (a full complex product).
  typedef enum logic [1:0] {TW_ONE, TW_PJ, TW_MJ, TW_GEN} tw_kind_e;

  // Twiddle W_8^k (forward) or W_8^-k (inverse) for k = 0..3, with the
  // magnitude of the diagonal twiddles given by c.
  function automatic tw_kind_e tw_kind(int k, bit inverse);
    case (k)
      0:       return TW_ONE;
      2:       return inverse ? TW_PJ : TW_MJ;
      default: return TW_GEN;
    endcase
  endfunction

  function automatic fp32_t tw_re(int k, fp32_t c);
    case (k)
      0:       return FP_ONE;
      1:       return c;
      2:       return FP_ZERO;
      default: return {1'b1, c[30:0]};
    endcase
  endfunction

  function automatic fp32_t tw_im(int k, bit inverse, fp32_t c);
    case (k)
      1, 3:    return inverse ? c : {1'b1, c[30:0]};
      2:       return inverse ? FP_ONE : FP_MONE;
      default: return FP_ZERO;
    endcase
  endfunction

  function automatic fp32_t fp_neg(fp32_t x);
    return {~x[31], x[30:0]};
  endfunction

endpackage
