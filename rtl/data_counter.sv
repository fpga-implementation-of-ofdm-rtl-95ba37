// data_counter: source of the transmitted data.
//
// A CTR_W-bit up-counter that advances by one on each clock with inc high
// (once per frame, from the clock divider) and wraps around. Its low 16
// bits are the word sent in the next frame, so successive frames carry
// 0, 1, 2, ... The counter as data source, its 32-bit width and the 16-bit
// word taken from it follow the design; synchronous active-high reset to
// zero is this implementation's.
module data_counter #(
  parameter int CTR_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc,
  output logic [CTR_W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)      count <= '0;
    else if (inc) count <= count + 1'b1;
  end

endmodule
