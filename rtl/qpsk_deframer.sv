// qpsk_deframer: decides the eight received symbols of a frame back into a
// 16-bit word and registers it.
//
// Each FFT output is assigned to the nearest point of the framer's
// constellation {1, j, -1, -j}: if |re| >= |im| the symbol is 1 (bits 00)
// when re is positive and -1 (10) when negative, otherwise j (01) or -j
// (11) by the sign of im. Magnitudes are compared on the IEEE 754 bits
// [30:0], which order like the magnitudes for all non-NaN numbers. Symbol k
// gives bits [2k+1:2k] of the word. When in_valid is high, data is loaded at
// the clock edge and out_valid is high for the following cycle. The design
// gives the bit mapping and the 16-bit output; the nearest-point rule and
// the output register are this implementation's. Synchronous
// active-high reset clears data and out_valid.
module qpsk_deframer
  import ofdm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  cplx_t             sym [NFFT],
  input  logic              in_valid,
  output logic [WORD_W-1:0] data,
  output logic              out_valid
);

  logic [WORD_W-1:0] decided;

  for (genvar k = 0; k < NFFT; k++) begin : g_dec
    always_comb begin
      if (sym[k].re[30:0] >= sym[k].im[30:0])
        decided[2*k +: 2] = sym[k].re[31] ? 2'b10 : 2'b00;
      else
        decided[2*k +: 2] = sym[k].im[31] ? 2'b11 : 2'b01;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) data <= decided;
    end
  end

endmodule
