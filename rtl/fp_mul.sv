// fp_mul: combinational IEEE 754 single-precision multiplier.
//
// The 24-bit significands are multiplied to a 48-bit product, normalised by
// at most one place, and rounded to nearest, ties to even, using the guard
// bit and the OR of the bits below it. Subnormal inputs are read as zero,
// results below the normal range are flushed to signed zero, overflow gives
// infinity, and NaN or 0 * inf gives the canonical quiet NaN. The number
// format follows the design's use of IEEE 754 arithmetic; rounding and the
// flush-to-zero rule are this implementation's choice. Combinational.
module fp_mul
  import ofdm_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [47:0] prod;
  logic [23:0] sig;
  logic        g, st, round_up;
  logic [24:0] rounded;
  logic signed [9:0] e_res;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_nan  = (ea == 8'hFF) && (a[22:0] != '0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != '0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == '0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == '0);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};

    prod  = ma * mb;
    e_res = signed'({2'b00, ea}) + signed'({2'b00, eb}) - 10'sd127;
    if (prod[47]) begin
      sig   = prod[47:24];
      g     = prod[23];
      st    = |prod[22:0];
      e_res = e_res + 10'sd1;
    end else begin
      sig   = prod[46:23];
      g     = prod[22];
      st    = |prod[21:0];
    end
    round_up = g & (st | sig[0]);
    rounded  = {1'b0, sig} + 25'(round_up);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e_res   = e_res + 10'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) y = FP_QNAN;
    else if (a_inf || b_inf)                                    y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero)                                  y = {s, 31'd0};
    else if (e_res >= 10'sd255)                                 y = {s, 8'hFF, 23'd0};
    else if (e_res <= 10'sd0)                                   y = {s, 31'd0};
    else                                                        y = {s, e_res[7:0], rounded[22:0]};
  end

endmodule
