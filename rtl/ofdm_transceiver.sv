// ofdm_transceiver: back-to-back OFDM transmitter and receiver.
//
// Transmitter: data_counter -> qpsk_framer -> ifft8 -> piso_frame.
// Receiver:    sipo_frame -> fft8 -> qpsk_deframer.
// The serial I/Q output of the transmitter drives the receiver directly
// (no radio in between) and is also brought out for observation. Every
// tick of the clock_divider (once per 2^n board cycles, n = 4, 5 or 6 from
// rate_sw) the IFFT of the counter's current word is loaded into the PS and
// the counter advances; the PS sends the eight samples in the next eight
// cycles, the SP collects them, and the FFT and deframer recover the word.
// rx_valid pulses with rx_data 10 board cycles after the tick that sent it,
// and the 8 MSBs of rx_data drive the LEDs. tx_data holds the word of the
// frame being sent. The chain of blocks, the 16-bit word, 8 subcarriers,
// QPSK, IEEE 754 arithmetic and the LED connection follow the design; the
// single-clock timing with an enable and the 10-cycle latency are this
// implementation's. All registers use a synchronous active-high reset.
// Only the 16 counter bits selected by DATA_LSB carry data; the other
// counter bits are left unread on purpose, as the counter is 32 bits wide.
module ofdm_transceiver
  import ofdm_pkg::*;
#(
  parameter int    CTR_W    = 32,
  parameter int    DATA_LSB = 0,              // word = count[DATA_LSB +: 16]
  parameter fp32_t TWIDDLE  = FP_TWIDDLE_0707
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [2:0]        rate_sw,
  output logic              frame_clk,
  output logic [3:0]        div_n,
  output logic [WORD_W-1:0] tx_data,
  output fp32_t             ser_i,
  output fp32_t             ser_q,
  output logic              ser_valid,
  output logic [WORD_W-1:0] rx_data,
  output logic              rx_valid,
  output logic [7:0]        led
);

  logic             tick;
  logic [CTR_W-1:0] count;
  logic [WORD_W-1:0] word;
  cplx_t            tx_sym  [NFFT];
  cplx_t            tx_time [NFFT];
  cplx_t            rx_time [NFFT];
  cplx_t            rx_sym  [NFFT];
  logic             rx_frame_valid;

  clock_divider u_div (
    .clk, .rst, .rate_sw,
    .tick, .div_clk(frame_clk), .div_n
  );

  data_counter #(.CTR_W(CTR_W)) u_ctr (
    .clk, .rst, .inc(tick), .count
  );

  assign word = count[DATA_LSB +: WORD_W];

  // ---- transmitter ----
  qpsk_framer u_framer (.data(word), .sym(tx_sym));

  ifft8 #(.TWIDDLE(TWIDDLE)) u_ifft (.x(tx_sym), .y(tx_time));

  piso_frame u_ps (
    .clk, .rst, .load(tick), .frame(tx_time),
    .out_i(ser_i), .out_q(ser_q), .out_valid(ser_valid)
  );

  always_ff @(posedge clk) begin
    if (rst)       tx_data <= '0;
    else if (tick) tx_data <= word;
  end

  // ---- receiver ----
  sipo_frame u_sp (
    .clk, .rst, .in_i(ser_i), .in_q(ser_q), .in_valid(ser_valid),
    .frame(rx_time), .frame_valid(rx_frame_valid)
  );

  fft8 #(.TWIDDLE(TWIDDLE)) u_fft (.x(rx_time), .y(rx_sym));

  qpsk_deframer u_deframer (
    .clk, .rst, .sym(rx_sym), .in_valid(rx_frame_valid),
    .data(rx_data), .out_valid(rx_valid)
  );

  // ---- display ----
  assign led = rx_data[WORD_W-1 -: 8];

endmodule
