// tb_data_counter: drives inc at random and checks the count of the
// default 32-bit counter against a software count, and its reset. A second,
// 4-bit instance shows the wrap-around.
module tb_data_counter;
  logic        clk = 0, rst = 1, inc = 0;
  logic [31:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;

  data_counter dut (.clk, .rst, .inc, .count);
  data_counter #(.CTR_W(4)) dut4 (.clk, .rst, .inc, .count(count4));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned model = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (count !== 32'd0 || count4 !== 4'd0) failures++;
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      inc = 1'($urandom);
      @(posedge clk);
      #1;
      if (inc) model++;
      checks++;
      if (count !== 32'(model) || count4 !== 4'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: %0d / %0d expected %0d", i, count, count4, model);
      end
    end
    rst = 1;
    @(posedge clk);
    #1;
    checks++;
    if (count !== 32'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
