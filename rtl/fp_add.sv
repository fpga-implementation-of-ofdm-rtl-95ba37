// fp_add: combinational IEEE 754 single-precision adder/subtractor.
//
// y = a + b, or a - b when sub = 1. The operand of larger magnitude is
// aligned against the smaller one, which is shifted right with guard, round
// and sticky bits; the sum or difference is normalised and rounded to
// nearest, ties to even. Subnormal inputs are read as zero and results
// below the normal range are flushed to signed zero; an overflow gives
// infinity, and NaN inputs or inf - inf give the canonical quiet NaN.
// The floating-point format follows the design's use of IEEE 754
// arithmetic; rounding mode and the flush-to-zero rule are this
// implementation's choice. Purely combinational, no clock.
module fp_add
  import ofdm_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb, sx, sy_n;
  logic [7:0]  ea, eb, ex, ey_n;
  logic [23:0] ma, mb, mx, my_n;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic [4:0]  d_lo;
  logic [7:0]  diff_e;
  logic [26:0] hi_sig, lo_sig, lo_sh;
  logic        sticky;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [9:0] e_res;
  logic [24:0] rounded;
  logic        round_up;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    a_nan = (ea == 8'hFF) && (a[22:0] != '0);
    b_nan = (eb == 8'hFF) && (b[22:0] != '0);
    a_inf = (ea == 8'hFF) && (a[22:0] == '0);
    b_inf = (eb == 8'hFF) && (b[22:0] == '0);
    // subnormals read as zero
    ma = (ea == 8'h00) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'h00) ? 24'd0 : {1'b1, b[22:0]};

    // order by magnitude: x is the larger operand
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sx = sa; ex = ea; mx = ma;
      sy_n = sb; ey_n = eb; my_n = mb;
    end else begin
      sx = sb; ex = eb; mx = mb;
      sy_n = sa; ey_n = ea; my_n = ma;
    end

    diff_e   = ex - ey_n;
    hi_sig      = {mx, 3'b000};
    lo_sig    = {my_n, 3'b000};
    d_lo  = (diff_e > 8'd26) ? 5'd27 : diff_e[4:0];
    lo_sh = lo_sig >> d_lo;
    sticky   = ((lo_sh << d_lo) != lo_sig);
    lo_sh[0] = lo_sh[0] | sticky;

    if (sx == sy_n) sum = {1'b0, hi_sig} + {1'b0, lo_sh};
    else            sum = {1'b0, hi_sig} - {1'b0, lo_sh};

    e_res = signed'({2'b00, ex});
    norm  = '0;
    lz    = '0;
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      e_res = e_res + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i] && (norm == '0)) begin
          lz   = 5'(26 - i);
          norm = sum[26:0] << (26 - i);
        end
      end
      e_res = e_res - signed'({5'b0, lz});
    end

    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    rounded  = {1'b0, norm[26:3]} + 25'(round_up);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e_res   = e_res + 10'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) y = FP_QNAN;
    else if (a_inf)                                      y = {sa, 8'hFF, 23'd0};
    else if (b_inf)                                      y = {sb, 8'hFF, 23'd0};
    else if (sum == '0)                                  y = (sa & sb) ? 32'h8000_0000 : FP_ZERO;
    else if (e_res >= 10'sd255)                          y = {sx, 8'hFF, 23'd0};
    else if (e_res <= 10'sd0)                            y = {sx, 31'd0};
    else                                                 y = {sx, e_res[7:0], rounded[22:0]};
  end

endmodule
