// karatsuba_cmult: complex product y = b * w with three real multipliers.
//
// w is a twiddle factor in Q1.15. The three products are m1 = br*wr, m2 = bi*wi and
// m3 = (br+bi)*(wr+wi); the result is re = m1 - m2, im = m3 - m1 - m2, rounded back to
// the 16-bit sample grid (shift by 15) and saturated. This is the Karatsuba arrangement the
// modem uses inside each butterfly stage, and its four clock phases are kept:
//   phase 1  register operands and form the pre-sums br+bi, wr+wi
//   phase 2  the three products
//   phase 3  assemble re and im
//   phase 4  round and saturate
// With `unity` set the operand b passes through unchanged (w = 1, which Q1.15 cannot hold
// exactly) with the same four-phase latency. The pipeline moves only when `en` is high, so
// latency is four enabled cycles; `en` lets the enclosing SDF pipeline stall as a whole.
module karatsuba_cmult
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  cplx_t b,
  input  cplx_t w,
  input  logic  unity,
  output cplx_t y
);
  // phase 1
  logic signed [15:0] br1, bi1, wr1, wi1;
  logic signed [16:0] bs1, ws1;
  logic               u1;
  // phase 2
  logic signed [31:0] m1_2, m2_2;
  logic signed [33:0] m3_2;
  logic signed [15:0] br2, bi2;
  logic               u2;
  // phase 3
  logic signed [34:0] re3, im3;
  logic signed [15:0] br3, bi3;
  logic               u3;

  always_ff @(posedge clk) begin
    if (en) begin
      br1 <= b.re;  bi1 <= b.im;
      wr1 <= w.re;  wi1 <= w.im;
      bs1 <= 17'(b.re) + 17'(b.im);
      ws1 <= 17'(w.re) + 17'(w.im);
      u1  <= unity;

      m1_2 <= br1 * wr1;
      m2_2 <= bi1 * wi1;
      m3_2 <= bs1 * ws1;
      br2 <= br1;  bi2 <= bi1;  u2 <= u1;

      re3 <= 35'(m1_2) - 35'(m2_2);
      im3 <= 35'(m3_2) - 35'(m1_2) - 35'(m2_2);
      br3 <= br2;  bi3 <= bi2;  u3 <= u2;

      if (u3) begin
        y.re <= br3;
        y.im <= bi3;
      end else begin
        y.re <= sat16((40'(re3) + 40'sd16384) >>> 15);
        y.im <= sat16((40'(im3) + 40'sd16384) >>> 15);
      end
    end
  end
endmodule
