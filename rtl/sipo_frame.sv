// sipo_frame: serial-in parallel-out shift register for one OFDM frame.
//
// Each clock with in_valid high shifts one complex sample (I and Q words)
// in at the top of an eight-entry register; after eight samples the first
// one received sits in frame[0] and the last in frame[7], and frame_valid is
// high for one cycle. The frame then stays unchanged until the next sample
// arrives. Samples are counted from reset, so frames are aligned to the
// first sample after reset. The SP block follows the design; the strobe
// and the count-based frame alignment are this implementation's.
// Synchronous active-high reset.
module sipo_frame
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp32_t in_i,
  input  fp32_t in_q,
  input  logic  in_valid,
  output cplx_t frame [NFFT],
  output logic  frame_valid
);

  cplx_t            sreg [NFFT];
  logic [LOG2N-1:0] count;  // samples of the current frame received so far

  always_ff @(posedge clk) begin
    if (rst) begin
      count       <= '0;
      frame_valid <= 1'b0;
      for (int n = 0; n < NFFT; n++) sreg[n] <= '{re: FP_ZERO, im: FP_ZERO};
    end else begin
      frame_valid <= 1'b0;
      if (in_valid) begin
        for (int n = 0; n < NFFT - 1; n++) sreg[n] <= sreg[n+1];
        sreg[NFFT-1] <= '{re: in_i, im: in_q};
        count        <= count + 1'b1;
        frame_valid  <= (count == LOG2N'(NFFT - 1));
      end
    end
  end

  assign frame = sreg;

endmodule
