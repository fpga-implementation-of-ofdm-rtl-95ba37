// tb_fft8: checks the 8-point FFT bit-exactly against the reference
// radix-2 model and within 1e-3 (relative to the input size) against a
// direct DFT in double precision, for random frames and for the IFFT
// frames of 4096 data words, where it also checks that the word's symbols
// come back within 1e-3. The published receiver values for the words 4 and 9
// (0.999849 = 3f7ff61b, leakage 391e5000, -0.999698 = bf7fec36) are checked
// exactly.
module tb_fft8;
  import ofdm_pkg::*;
  import fp_ref_pkg::*;

  cplx_t x [NFFT], y [NFFT];
  int checks = 0, failures = 0;

  fft8 dut (.x, .y);

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

  task automatic run(cpx rx[8], real tol);
    cpx ry[8];
    real xr[8], xi[8], yr[8], yi[8];
    for (int k = 0; k < 8; k++) begin
      x[k] = '{re: rx[k].re, im: rx[k].im};
      xr[k] = f2r(rx[k].re);
      xi[k] = f2r(rx[k].im);
    end
    #1;
    fft8_ref(rx, 1'b0, 32'h3F34_FDF4, ry);
    dft8_real(xr, xi, 1'b0, yr, yi);
    for (int n = 0; n < 8; n++) begin
      automatic real er = f2r(y[n].re) - yr[n], ei = f2r(y[n].im) - yi[n];
      checks++;
      if (y[n] !== {ry[n].re, ry[n].im} || er > tol || er < -tol || ei > tol || ei < -tol) begin
        failures++;
        if (failures < 10) $display("FAIL X(%0d) = %h, model %h %h, dft %f %f", n, y[n], ry[n].re, ry[n].im, yr[n], yi[n]);
      end
    end
  endtask

  initial begin
    cpx rx[8], sy[8];
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < 8; k++) rx[k] = '{re: rand_f32(110, 126), im: rand_f32(110, 126)};
      run(rx, 8 * 1e-3);
    end
    for (int w = 0; w < 65536; w += 16) begin
      for (int k = 0; k < 8; k++) sy[k] = sym_of((w >> (2 * k)) & 3);
      fft8_ref(sy, 1'b1, 32'h3F34_FDF4, rx);
      run(rx, 1e-3);
      for (int k = 0; k < 8; k++) begin
        automatic real dr = f2r(y[k].re) - f2r(sy[k].re), di = f2r(y[k].im) - f2r(sy[k].im);
        checks++;
        if (dr > 1e-3 || dr < -1e-3 || di > 1e-3 || di < -1e-3) failures++;
      end
    end
    // published receiver values
    foreach (sy[k]) sy[k] = sym_of((4 >> (2 * k)) & 3);
    fft8_ref(sy, 1'b1, 32'h3F34_FDF4, rx);
    run(rx, 1e-3);
    checks++;
    if (y[1] !== {32'h391E_5000, 32'h3F7F_F61B} || y[5] !== {32'h3F7F_F61B, 32'h391E_5000}) begin
      failures++;
      $display("FAIL published values, word 4: %h %h", y[1], y[5]);
    end
    foreach (sy[k]) sy[k] = sym_of((9 >> (2 * k)) & 3);
    fft8_ref(sy, 1'b1, 32'h3F34_FDF4, rx);
    run(rx, 1e-3);
    checks++;
    if (y[0] !== {32'h0, 32'h3F80_0000} || y[1].re !== 32'hBF7F_EC36 || y[5].re !== 32'h3F7F_EC36) begin
      failures++;
      $display("FAIL published values, word 9: %h %h %h", y[0], y[1], y[5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
