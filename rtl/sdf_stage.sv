// sdf_stage: one radix-2 decimation-in-frequency stage of a single-path delay feedback
// (SDF) pipeline.
//
// The stage holds a feedback buffer of L = N / 2^(STAGE+1) complex words. Samples arrive one
// per enabled clock. During the first L samples of each 2L-block the input is parked in the
// buffer while the buffer's previous contents (the differences of the last block) leave
// through the twiddle multiplier. During the second L samples the butterfly combines the
// parked sample a with the arriving sample b: a + b leaves at once (twiddle = 1) and a - b
// goes back into the buffer. Difference m of a block is multiplied by W_N^(m * 2^STAGE)
// from twiddle_rom; the multiplier is the four-phase Karatsuba unit. Sums and difference 0
// (W = 1) bypass the multiplication but not its latency.
// When SCALE is set, the butterfly divides both results by two (rounded); otherwise they
// are saturated to 16 bits. Which stages scale is chosen by the enclosing core.
// Timing: latency L + 4 enabled clocks; the stage advances only when `en` is high.
// PRE_LAT is the latency of the stages in front, so that the local block counter starts
// aligned with the first sample of a frame entering the core after reset.
module sdf_stage
  import ofdm_pkg::*;
#(
  parameter int unsigned N       = 1024,
  parameter int unsigned STAGE   = 0,
  parameter int unsigned PRE_LAT = 0,
  parameter bit          SCALE   = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  inverse,   // conjugate twiddles: inverse transform
  input  cplx_t din,
  output cplx_t dout
);
  localparam int unsigned L  = N >> (STAGE + 1);
  localparam int unsigned LB = (L > 1) ? $clog2(L) : 1;   // buffer index width
  localparam int unsigned CB = $clog2(2 * L);              // block counter width
  localparam int unsigned CNT_INIT = (2 * L - (PRE_LAT % (2 * L))) % (2 * L);

  logic [CB-1:0] cnt;
  logic          second_half;
  logic [LB-1:0] ptr, ptr_next;
  cplx_t         buf_q [L];
  cplx_t         a, to_buf, to_mul, w;
  logic signed [16:0] s_re, s_im, d_re, d_im;

  assign second_half = (L == 1) ? cnt[0] : cnt[CB-1];
  assign ptr      = (L == 1) ? '0 : LB'(cnt);
  assign ptr_next = (L == 1) ? '0 : LB'(cnt + 1'b1);
  assign a        = buf_q[ptr];

  always_comb begin
    s_re = 17'(a.re) + 17'(din.re);
    s_im = 17'(a.im) + 17'(din.im);
    d_re = 17'(a.re) - 17'(din.re);
    d_im = 17'(a.im) - 17'(din.im);
    if (second_half) begin
      if (SCALE) begin
        to_mul.re = 16'((s_re + 17'sd1) >>> 1);
        to_mul.im = 16'((s_im + 17'sd1) >>> 1);
        to_buf.re = 16'((d_re + 17'sd1) >>> 1);
        to_buf.im = 16'((d_im + 17'sd1) >>> 1);
      end else begin
        to_mul.re = sat16(40'(s_re));
        to_mul.im = sat16(40'(s_im));
        to_buf.re = sat16(40'(d_re));
        to_buf.im = sat16(40'(d_im));
      end
    end else begin
      to_mul = a;      // difference from the previous block, to be twiddled
      to_buf = din;    // park the first half
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= CB'(CNT_INIT);
    else if (en) cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) buf_q[ptr] <= to_buf;
  end

  twiddle_rom #(.STRIDE_LOG2(STAGE), .AW(LB)) u_rom (
    .clk(clk), .en(en), .addr(ptr_next), .conj(inverse), .w(w)
  );

  karatsuba_cmult u_mul (
    .clk(clk), .en(en), .b(to_mul), .w(w), .unity(second_half || ptr == '0), .y(dout)
  );
endmodule
