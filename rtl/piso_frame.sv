// piso_frame: parallel-in serial-out shift register for one OFDM frame.
//
// On load the eight complex samples of a frame are captured; then one
// sample per clock is sent, sample 0 first, as an I (real) and a Q
// (imaginary) 32-bit word with out_valid high. A frame takes NFFT = 8
// cycles: after a load at edge t the samples are on the outputs in the
// eight cycles that follow it. A new load may come when at most one
// sample is still to be sent, so frames can follow each other every 8
// cycles. The PS block and its separate I and Q outputs follow the
// design; sending a whole complex sample per clock of the fast system clock
// while frames come at the divided rate is this implementation's timing.
// Synchronous active-high reset empties the register.
module piso_frame
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  cplx_t frame [NFFT],
  output fp32_t out_i,
  output fp32_t out_q,
  output logic  out_valid
);

  cplx_t          sreg [NFFT];
  logic [LOG2N:0] left;  // samples still to send, including the one shown

  always_ff @(posedge clk) begin
    if (rst) begin
      left <= '0;
      for (int n = 0; n < NFFT; n++) sreg[n] <= '{re: FP_ZERO, im: FP_ZERO};
    end else if (load) begin
      sreg <= frame;
      left <= (LOG2N+1)'(NFFT);
    end else if (left != '0) begin
      for (int n = 0; n < NFFT - 1; n++) sreg[n] <= sreg[n+1];
      sreg[NFFT-1] <= '{re: FP_ZERO, im: FP_ZERO};
      left <= left - 1'b1;
    end
  end

  assign out_i     = sreg[0].re;
  assign out_q     = sreg[0].im;
  assign out_valid = (left != '0);

  // a frame must not be overwritten before its last sample is on the line
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) load |-> left <= 1)
    else $error("piso_frame: load while %0d samples are still to be sent", left);

endmodule
