// tb_ofdm_transceiver: end-to-end test of the back-to-back transceiver with
// every parameter at its default.
//
// At 32 Mbit/s all 65536 data words are sent once and the word counter
// wraps to 0; the rate switches then select 16 and 8 Mbit/s and finally no
// switch at all. For every frame the test checks that the received word
// equals the word sent (the counter sequence 0, 1, 2, ...), that rx_valid
// comes 10 cycles after the frame's tick (9 after its first serial
// sample), that frames follow each other every 2^n board cycles for the
// selected n, that each frame is eight consecutive serial samples and that
// the LEDs show the 8 MSBs. The serial samples of the words 4 and 9 are
// compared with the published IFFT values. Each mechanism (each of the
// three rates, a rate switch, the word wrap-around) is counted and must
// occur at least once.
module tb_ofdm_transceiver;
  import ofdm_pkg::*;

  logic        clk = 0, rst = 1;
  logic [2:0]  rate_sw = 3'b100;
  logic        frame_clk, ser_valid, rx_valid;
  logic [3:0]  div_n;
  logic [15:0] tx_data, rx_data;
  fp32_t       ser_i, ser_q;
  logic [7:0]  led;
  int checks = 0, failures = 0;

  ofdm_transceiver dut (.clk, .rst, .rate_sw, .frame_clk, .div_n, .tx_data,
                        .ser_i, .ser_q, .ser_valid, .rx_data, .rx_valid, .led);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL at cycle %0t: %s", $time / 10, msg);
  endtask

  // ---- monitor, sampling between clock edges ----
  longint cycle = 0;
  longint start_q [$];       // cycle of each frame's first serial sample
  int     word_q  [$];       // word sent in that frame
  int     next_word = 0;     // counter sequence
  longint last_start = -1;
  int     sample_idx = 0;
  logic   prev_ser_valid = 0;
  int     frames_rx = 0;
  int     frames_at_rate [3] = '{0, 0, 0};   // 32, 16, 8 Mbit/s
  int     rate_switches = 0, word_wraps = 0;
  logic [3:0] last_n = 0;

  always @(negedge clk) begin
    cycle++;
    if (!rst) begin
      // start of a frame on the serial link
      if (ser_valid && !prev_ser_valid) begin
        checks++;
        if (tx_data !== 16'(next_word)) fail($sformatf("tx_data %0d expected %0d", tx_data, next_word));
        if (last_start >= 0 && div_n == last_n) begin
          checks++;
          if (cycle - last_start != (64'd1 << div_n))
            fail($sformatf("frame spacing %0d expected %0d", cycle - last_start, 1 << div_n));
        end
        if (last_start >= 0 && div_n != last_n) rate_switches++;
        if (next_word == 0 && last_start >= 0) word_wraps++;
        last_n     = div_n;
        last_start = cycle;
        start_q.push_back(cycle);
        word_q.push_back(next_word);
        next_word  = (next_word + 1) & 16'hFFFF;
        sample_idx = 0;
      end
      if (ser_valid) begin
        if (sample_idx == 1 && word_q.size() > 0) begin
          if (word_q[$] == 4) begin
            checks++;
            if (ser_i !== 32'hBE34_FDF4 || ser_q !== 32'h0) fail($sformatf("word 4 x(1) = %h %h", ser_i, ser_q));
          end
          if (word_q[$] == 9) begin
            checks++;
            if (ser_i !== 32'hBE9A_7EFA || ser_q !== 32'hBD53_F7D0) fail($sformatf("word 9 x(1) = %h %h", ser_i, ser_q));
          end
        end
        sample_idx++;
      end else if (prev_ser_valid) begin
        checks++;
        if (sample_idx != NFFT) fail($sformatf("frame of %0d serial samples", sample_idx));
      end
      prev_ser_valid = ser_valid;

      if (rx_valid) begin
        checks++;
        if (start_q.size() == 0) fail("rx_valid with no frame sent");
        else begin
          automatic longint st = start_q.pop_front();
          automatic int     w  = word_q.pop_front();
          if (rx_data !== 16'(w)) fail($sformatf("rx_data %h expected %h", rx_data, w));
          if (cycle - st != 9) fail($sformatf("latency %0d expected 9 after first sample", cycle - st));
          if (led !== rx_data[15:8]) fail("led");
          frames_rx++;
          case (div_n)
            4'd4: frames_at_rate[0]++;
            4'd5: frames_at_rate[1]++;
            4'd6: frames_at_rate[2]++;
            default: fail("unexpected division");
          endcase
        end
      end
    end
  end

  task automatic wait_frames(int n);
    automatic int target = frames_rx + n;
    while (frames_rx < target) @(posedge clk);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    rate_sw = 3'b100;            // 32 Mbit/s: every word once, then wrap
    wait_frames(65536 + 8);
    @(negedge clk) rate_sw = 3'b010;   // 16 Mbit/s
    wait_frames(200);
    @(negedge clk) rate_sw = 3'b001;   // 8 Mbit/s
    wait_frames(200);
    @(negedge clk) rate_sw = 3'b000;   // no switch: 8 Mbit/s
    wait_frames(20);
    repeat (100) @(posedge clk);
    checks++;
    if (start_q.size() != 0) fail("frames sent but not received");
    $display("frames received %0d: 32 Mbit/s %0d, 16 Mbit/s %0d, 8 Mbit/s %0d; rate switches %0d; word wraps %0d",
             frames_rx, frames_at_rate[0], frames_at_rate[1], frames_at_rate[2], rate_switches, word_wraps);
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (frames_at_rate[r] == 0) fail($sformatf("no frame at rate %0d", r));
    end
    checks++;
    if (rate_switches < 2) fail("rate switch not exercised");
    checks++;
    if (word_wraps == 0) fail("word wrap-around not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
