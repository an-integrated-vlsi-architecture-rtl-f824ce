// qam_demapper: hard-decision demapper for BPSK, QPSK, 16-, 64- and 256-QAM, the inverse
// of qam_mapper.
//
// A threshold network works on each axis with the order's amplitude unit s = qam_scale(mod):
// the sign gives bit a0; then, for i = 1 .. k-1 (k bits per axis), a_i = (r > 2^(k-i)*s) and
// r is replaced by |r - 2^(k-i)*s|, starting from r = |x|. Because the constellation is Gray
// coded this reproduces the mapper's bits exactly at every decision region. Axis bits are
// interleaved as in the mapper (I on even bit positions, Q on odd). BPSK decides on I + Q.
// Unused high bits of `out_bits` are zero.
// Timing: one symbol per clock, one clock of latency, no back-pressure.
module qam_demapper
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mod_t       mod,
  input  logic       in_valid,
  input  cplx_t      in_sym,
  output logic       out_valid,
  output logic [7:0] out_bits
);
  function automatic logic [3:0] axis_bits(logic signed [15:0] x, int k, logic [11:0] s);
    logic [3:0] a;
    int r, t;
    a = '0;
    a[0] = x < 0;
    r = (x < 0) ? -int'(x) : int'(x);
    for (int i = 1; i < 4; i++) begin
      if (i < k) begin
        t = (1 << (k - i)) * int'(s);
        a[i] = r > t;
        r = (r > t) ? r - t : t - r;
      end
    end
    return a;
  endfunction

  logic [7:0] bits;
  always_comb begin
    logic [3:0] ai, aq;
    int k;
    logic signed [16:0] sum;
    case (mod)
      MOD_BPSK, MOD_QPSK: k = 1;
      MOD_QAM16:          k = 2;
      MOD_QAM64:          k = 3;
      default:            k = 4;
    endcase
    ai = axis_bits(in_sym.re, k, qam_scale(mod));
    aq = axis_bits(in_sym.im, k, qam_scale(mod));
    bits = '0;
    sum = 17'(in_sym.re) + 17'(in_sym.im);
    if (mod == MOD_BPSK) begin
      bits[0] = sum < 0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        if (i < k) begin
          bits[2 * i]     = ai[i];
          bits[2 * i + 1] = aq[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bits <= bits;
    end
  end
endmodule
