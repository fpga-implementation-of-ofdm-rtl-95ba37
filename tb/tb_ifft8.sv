// tb_ifft8: applies the QPSK frames of all 65536 data words and checks the
// 8-point IFFT bit-exactly against the reference radix-2 model built from
// correctly rounded operations, and within 1e-3 against a direct inverse
// DFT in double precision with exact twiddles. It also checks the
// published output values for the words 4 and 9.
module tb_ifft8;
  import ofdm_pkg::*;
  import fp_ref_pkg::*;

  cplx_t x [NFFT], y [NFFT];
  int checks = 0, failures = 0;

  ifft8 dut (.x, .y);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cpx sym_of(int v);
    case (v)
      0: return '{re: 32'h3F80_0000, im: 32'h0};
      1: return '{re: 32'h0, im: 32'h3F80_0000};
      2: return '{re: 32'hBF80_0000, im: 32'h0};
      default: return '{re: 32'h0, im: 32'hBF80_0000};
    endcase
  endfunction

  initial begin
    cpx rx[8], ry[8];
    real xr[8], xi[8], yr[8], yi[8];
    logic [31:0] pub4_re [8] = '{32'h3F60_0000, 32'hBE34_FDF4, 32'hBE00_0000, 32'h0,
                                 32'h3E00_0000, 32'h3E34_FDF4, 32'h3E00_0000, 32'h0};
    logic [31:0] pub9_re [8] = '{32'h3F20_0000, 32'hBE9A_7EFA, 32'hBE00_0000, 32'h3D53_F7D0,
                                 32'h3E00_0000, 32'h3D53_F7D0, 32'hBE00_0000, 32'hBE9A_7EFA};
    logic [31:0] pub9_im [8] = '{32'h3E00_0000, 32'hBD53_F7D0, 32'hBE00_0000, 32'hBD53_F7D0,
                                 32'h3E00_0000, 32'h3E9A_7EFA, 32'h3EC0_0000, 32'h3E9A_7EFA};
    for (int w = 0; w < 65536; w++) begin
      for (int k = 0; k < 8; k++) begin
        rx[k] = sym_of((w >> (2 * k)) & 3);
        x[k]  = '{re: rx[k].re, im: rx[k].im};
        xr[k] = f2r(rx[k].re);
        xi[k] = f2r(rx[k].im);
      end
      #1;
      fft8_ref(rx, 1'b1, 32'h3F34_FDF4, ry);
      dft8_real(xr, xi, 1'b1, yr, yi);
      for (int n = 0; n < 8; n++) begin
        automatic real er = f2r(y[n].re) - yr[n], ei = f2r(y[n].im) - yi[n];
        checks++;
        if (y[n] !== {ry[n].re, ry[n].im} || er > 1e-3 || er < -1e-3 || ei > 1e-3 || ei < -1e-3) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d x(%0d) = %h, model %h %h", w, n, y[n], ry[n].re, ry[n].im);
        end
      end
      if (w == 4 || w == 9) begin
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (w == 4 ? (y[n].re !== pub4_re[n]) : (y[n].re !== pub9_re[n] || y[n].im !== pub9_im[n])) begin
            failures++;
            $display("FAIL published value, word %0d x(%0d) = %h", w, n, y[n]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
