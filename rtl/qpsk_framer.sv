// qpsk_framer: maps a 16-bit data word onto the eight subcarriers of a frame.
//
// Bits [2k+1:2k] of the word go to subcarrier k (so bits [1:0] to
// subcarrier 0) and are mapped, in IEEE 754 single precision, as
//   00 -> 1 + j0,  01 -> 0 + j1,  10 -> -1 + j0,  11 -> 0 - j1.
// The mapping table, the eight symbols and the pair-to-subcarrier order
// (word 1 gives 0 + j1 on subcarrier 0) follow the design. Combinational.
module qpsk_framer
  import ofdm_pkg::*;
(
  input  logic [WORD_W-1:0] data,
  output cplx_t             sym [NFFT]
);

  for (genvar k = 0; k < NFFT; k++) begin : g_map
    always_comb begin
      unique case (data[2*k +: 2])
        2'b00: sym[k] = '{re: FP_ONE,  im: FP_ZERO};
        2'b01: sym[k] = '{re: FP_ZERO, im: FP_ONE};
        2'b10: sym[k] = '{re: FP_MONE, im: FP_ZERO};
        2'b11: sym[k] = '{re: FP_ZERO, im: FP_MONE};
      endcase
    end
  end

endmodule
