// tb_piso_frame: loads frames of random samples, with gaps between frames
// and back to back every 8 cycles, and checks that each frame comes out as
// eight consecutive valid samples in order, sample 0 first, in the eight
// cycles after the load, and that out_valid is low otherwise.
module tb_piso_frame;
  import ofdm_pkg::*;

  logic  clk = 0, rst = 1, load = 0;
  cplx_t frame [NFFT];
  fp32_t out_i, out_q;
  logic  out_valid;
  int checks = 0, failures = 0;

  piso_frame dut (.clk, .rst, .load, .frame, .out_i, .out_q, .out_valid);

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
    int gap;
    for (int k = 0; k < NFFT; k++) frame[k] = '{re: 32'h0, im: 32'h0};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) failures++;
    for (int f = 0; f < 500; f++) begin
      for (int k = 0; k < NFFT; k++) sent[k] = '{re: $urandom, im: $urandom};
      frame = sent;
      load  = 1;
      @(posedge clk);
      #1;
      load = 0;
      gap = (f % 2) ? 0 : int'($urandom % 10);
      for (int k = 0; k < NFFT; k++) begin
        checks++;
        if (out_valid !== 1'b1 || out_i !== sent[k].re || out_q !== sent[k].im) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d sample %0d: %b %h %h", f, k, out_valid, out_i, out_q);
        end
        if (k == NFFT - 1 && gap == 0) break;  // next load in the last sample's cycle
        @(posedge clk);
        #1;
      end
      if (gap != 0) begin
        for (int g = 0; g < gap; g++) begin
          checks++;
          if (out_valid !== 1'b0) failures++;
          @(posedge clk);
          #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
