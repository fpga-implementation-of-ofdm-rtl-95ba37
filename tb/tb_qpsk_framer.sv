// tb_qpsk_framer: applies every 16-bit word and checks each subcarrier
// against the QPSK table (00 -> 1, 01 -> j, 10 -> -1, 11 -> -j), computed
// here as exp(j*pi/2*v) for the two-bit value v, and the published framer
// waveform values for the words 0, 1 and 2.
module tb_qpsk_framer;
  import ofdm_pkg::*;
  import fp_ref_pkg::*;

  logic [15:0] data;
  cplx_t       sym [NFFT];
  int checks = 0, failures = 0;

  qpsk_framer dut (.data, .sym);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi = 3.14159265358979323846;
    for (int w = 0; w < 65536; w++) begin
      data = 16'(w);
      #1;
      for (int k = 0; k < NFFT; k++) begin
        automatic int v = (w >> (2 * k)) & 3;
        automatic real er = $cos(pi / 2.0 * v), ei = $sin(pi / 2.0 * v);
        // the exact values are 0 and +-1: round away the error of cos and sin
        er = (er > 0.5) ? 1.0 : (er < -0.5) ? -1.0 : 0.0;
        ei = (ei > 0.5) ? 1.0 : (ei < -0.5) ? -1.0 : 0.0;
        checks++;
        if (f2r(sym[k].re) != er || f2r(sym[k].im) != ei || sym[k].re[31] != (er < 0.0) || sym[k].im[31] != (ei < 0.0)) begin
          failures++;
          if (failures < 10) $display("FAIL word %h sc %0d: %h %h", w, k, sym[k].re, sym[k].im);
        end
      end
    end
    // published values: word 0 -> all 3f800000 + j0; word 1 -> oxi0 = 3f800000, oxr0 = 0;
    // word 2 -> oxr0 = bf800000
    data = 16'd0; #1; checks++; if (sym[0] !== {32'h3F80_0000, 32'h0} || sym[7] !== {32'h3F80_0000, 32'h0}) failures++;
    data = 16'd1; #1; checks++; if (sym[0] !== {32'h0, 32'h3F80_0000} || sym[1] !== {32'h3F80_0000, 32'h0}) failures++;
    data = 16'd2; #1; checks++; if (sym[0] !== {32'hBF80_0000, 32'h0}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
