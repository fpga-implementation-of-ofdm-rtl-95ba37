// clock_divider: derives the frame rate from the on-board clock.
//
// A free-running DIV_W-bit counter runs on the board clock (33 MHz). Bit
// n-1 of it is a clock of the board frequency / 2^n, as the design
// prescribes, with n picked by the rate switches: rate_sw[2] (32 Mbit/s)
// gives n = 4 (2.06 MHz), rate_sw[1] (16 Mbit/s) n = 5 (1.03 MHz) and
// rate_sw[0] (8 Mbit/s) n = 6 (0.52 MHz). One 16-bit word is sent per
// period, hence the data rates. Rather than clocking logic with the divided
// clock, the rest of the design runs on the board clock and uses tick, high
// for one board cycle per period (when the low n counter bits are all
// ones), as its enable; div_clk is the divided square wave itself. The
// formula and the three frequencies follow the design; the switch encoding
// (highest rate wins, none set means 8 Mbit/s) and the enable-based timing
// are this implementation's. rate_sw[0] selects the same rate as no switch
// at all, so the logic never needs to read it. Synchronous active-high reset.
module clock_divider #(
  parameter int DIV_W = 8,
  parameter int N_32M = 4,   // 33 MHz / 2^4 = 2.06 MHz
  parameter int N_16M = 5,   // 33 MHz / 2^5 = 1.03 MHz
  parameter int N_8M  = 6    // 33 MHz / 2^6 = 0.52 MHz
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] rate_sw,
  output logic       tick,
  output logic       div_clk,
  output logic [3:0] div_n     // n in use: frame period is 2^n board cycles
);

  logic [DIV_W-1:0] cnt;
  logic [DIV_W-1:0] low_mask;

  always_comb begin
    if (rate_sw[2])      div_n = 4'(N_32M);
    else if (rate_sw[1]) div_n = 4'(N_16M);
    else                 div_n = 4'(N_8M);
    low_mask = DIV_W'((1 << div_n) - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign tick    = ((cnt & low_mask) == low_mask);
  assign div_clk = cnt[3'(div_n - 1'b1)];

endmodule
