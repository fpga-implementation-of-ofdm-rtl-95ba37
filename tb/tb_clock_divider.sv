// tb_clock_divider: for each rate switch setting checks the division
// n (4, 5, 6 for 32, 16, 8 Mbit/s; no switch gives 8 Mbit/s; the highest
// rate wins), that tick comes every 2^n cycles and lasts one cycle, and
// that div_clk is a square wave of period 2^n. With the 33 MHz board clock
// this gives 2.06, 1.03 and 0.52 MHz frames and 33, 16.5 and 8.25 Mbit/s
// of 16-bit words.
module tb_clock_divider;
  logic       clk = 0, rst = 1;
  logic [2:0] rate_sw = 3'b000;
  logic       tick, div_clk;
  logic [3:0] div_n;
  int checks = 0, failures = 0;

  clock_divider dut (.clk, .rst, .rate_sw, .tick, .div_clk, .div_n);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(logic [2:0] sw, int n);
    int last = -1, cyc = 0, high = 0, ticks = 0, edges = 0;
    logic prev_div;
    rate_sw = sw;
    @(posedge clk);
    #1;
    checks++;
    if (div_n !== 4'(n)) begin
      failures++;
      $display("FAIL switches %b: n = %0d expected %0d", sw, div_n, n);
    end
    // synchronise to a tick
    while (!tick) begin @(posedge clk); #1; end
    prev_div = div_clk;
    for (cyc = 0; cyc < 16 * (1 << n); cyc++) begin
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != (1 << n)) begin
            failures++;
            $display("FAIL switches %b: tick period %0d expected %0d", sw, cyc - last, 1 << n);
          end
        end
        last = cyc;
        ticks++;
      end
      if (div_clk) high++;
      if (div_clk && !prev_div) edges++;
      prev_div = div_clk;
      @(posedge clk);
      #1;
    end
    checks++;
    if (ticks != 16 || high != 8 * (1 << n) || edges != 16) begin
      failures++;
      $display("FAIL switches %b: %0d ticks, div_clk high %0d cycles, %0d rising edges", sw, ticks, high, edges);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    measure(3'b100, 4);
    measure(3'b010, 5);
    measure(3'b001, 6);
    measure(3'b000, 6);
    measure(3'b111, 4);
    measure(3'b011, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
