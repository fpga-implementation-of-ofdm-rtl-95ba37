// tb_qpsk_deframer: drives frames of noisy QPSK symbols (each component
// disturbed by up to +-0.4) and checks the registered 16-bit decision, that
// out_valid follows in_valid by one cycle, and that the word holds while
// in_valid is low. Also checks the near-unit values the receiver produces
// (0.999698 and leakage 1.5e-4).
module tb_qpsk_deframer;
  import ofdm_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 0, rst = 1, in_valid = 0;
  cplx_t       sym [NFFT];
  logic [15:0] data;
  logic        out_valid;
  int checks = 0, failures = 0;

  qpsk_deframer dut (.clk, .rst, .sym, .in_valid, .data, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real noise();
    return (real'($urandom % 8001) - 4000.0) / 10000.0;
  endfunction

  initial begin
    logic [15:0] w, prev;
    for (int k = 0; k < NFFT; k++) sym[k] = '{re: FP_ZERO, im: FP_ZERO};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++;
    if (out_valid !== 1'b0 || data !== 16'h0) failures++;
    prev = 16'h0;
    for (int i = 0; i < 3000; i++) begin
      w = 16'($urandom);
      for (int k = 0; k < NFFT; k++) begin
        automatic int  v  = (w >> (2 * k)) & 3;
        automatic real re = (v == 0) ? 1.0 : (v == 2) ? -1.0 : 0.0;
        automatic real im = (v == 1) ? 1.0 : (v == 3) ? -1.0 : 0.0;
        sym[k] = '{re: r2f(re + noise()), im: r2f(im + noise())};
      end
      if (i == 0) begin  // receiver values for word 9: 0 + j1, -0.999698 + j0, ...
        w = 16'd9;
        sym[0] = '{re: 32'h0, im: 32'h3F80_0000};
        sym[1] = '{re: 32'hBF7F_EC36, im: 32'h0};
        sym[5] = '{re: 32'h3F7F_EC36, im: 32'h391E_5000};
        for (int k = 2; k < NFFT; k++) if (k != 5) sym[k] = '{re: 32'h3F80_0000, im: 32'h0};
      end
      in_valid <= (i % 3 != 2);
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (i % 3 != 2) begin
        if (out_valid !== 1'b1 || data !== w) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d: data %h expected %h valid %b", i, data, w, out_valid);
        end
        prev = w;
      end else if (out_valid !== 1'b0 || data !== prev) begin
        failures++;
        if (failures < 10) $display("FAIL hold %0d: data %h expected %h valid %b", i, data, prev, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
