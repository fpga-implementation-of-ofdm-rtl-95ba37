// tb_sipo_frame: shifts in samples with random gaps and checks that after
// every eighth sample frame_valid is high for exactly one cycle with the
// eight samples in arrival order in frame[0..7], and low otherwise.
module tb_sipo_frame;
  import ofdm_pkg::*;

  logic  clk = 0, rst = 1, in_valid = 0;
  fp32_t in_i = '0, in_q = '0;
  cplx_t frame [NFFT];
  logic  frame_valid;
  int checks = 0, failures = 0;

  sipo_frame dut (.clk, .rst, .in_i, .in_q, .in_valid, .frame, .frame_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t sent [NFFT];
    int frames = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 400; f++) begin
      for (int k = 0; k < NFFT; k++) begin
        sent[k] = '{re: $urandom, im: $urandom};
        // random idle cycles before the sample
        for (int g = int'($urandom % 3); g > 0; g--) begin
          in_valid = 0;
          @(posedge clk);
          #1;
          checks++;
          if (frame_valid !== 1'b0) failures++;
        end
        in_valid = 1;
        in_i = sent[k].re;
        in_q = sent[k].im;
        @(posedge clk);
        #1;
        in_valid = 0;
        checks++;
        if (frame_valid !== (k == NFFT - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL frame_valid %b after sample %0d", frame_valid, k);
        end
      end
      for (int k = 0; k < NFFT; k++) begin
        checks++;
        if (frame[k] !== sent[k]) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d sample %0d", f, k);
        end
      end
      frames++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (frame_valid !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
