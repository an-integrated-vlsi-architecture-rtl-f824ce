// fde_equalizer: single-tap frequency-domain equaliser, X = Y / H per subcarrier.
//
// The complex division is done as X = Y * conj(H) / |H|^2 with H in Q3.12. |H|^2 goes
// through the Newton-Raphson reciprocal unit (three clocks) while Y * conj(H) waits in a
// matching delay line; the fourth clock multiplies by the reciprocal and restores the
// scale: X = Y conj(H) * 4096 * m * 2^-(16 + e), rounded and saturated to 16 bits.
// The subcarrier kind and the frame marker travel alongside.
// Timing: one subcarrier per clock, latency four clocks.
module fde_equalizer
  import ofdm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  logic     in_first,
  input  sc_kind_t in_kind,
  input  cplx_t    in_y,
  input  cplx_t    in_h,
  output logic     out_valid,
  output logic     out_first,
  output sc_kind_t out_kind,
  output cplx_t    out_x
);
  logic [31:0] den;
  assign den = 32'(32'(in_h.re * in_h.re) + 32'(in_h.im * in_h.im));

  logic [17:0] m;
  logic [5:0]  e;
  nr_recip u_nr (.clk(clk), .d(den), .m(m), .e(e));

  logic signed [33:0] nre [3], nim [3];
  logic [2:0]         v, f;
  sc_kind_t           k [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      f <= '0;
      for (int i = 0; i < 3; i++) begin
        k[i] <= SC_NULL; nre[i] <= '0; nim[i] <= '0;
      end
    end else begin
      v <= {v[1:0], in_valid};
      f <= {f[1:0], in_valid && in_first};
      k[0] <= in_kind;
      nre[0] <= 34'(in_y.re) * 34'(in_h.re) + 34'(in_y.im) * 34'(in_h.im);
      nim[0] <= 34'(in_y.im) * 34'(in_h.re) - 34'(in_y.re) * 34'(in_h.im);
      for (int i = 1; i < 3; i++) begin
        k[i] <= k[i-1]; nre[i] <= nre[i-1]; nim[i] <= nim[i-1];
      end
    end
  end

  function automatic logic signed [15:0] fin(logic signed [33:0] n, logic [17:0] mm,
                                             logic [5:0] ee);
    logic signed [55:0] q;
    int sh;
    q = 56'(n) * 56'(signed'({1'b0, mm}));
    sh = 16 + int'(ee) - 12;
    if (sh > 0) q = (q + (56'sd1 <<< (sh - 1))) >>> sh;
    else q = q <<< (-sh);
    return sat16(40'(q > 56'sd549755813887 ? 56'sd549755813887 :
                     q < -56'sd549755813888 ? -56'sd549755813888 : q));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_kind  <= SC_NULL;
      out_x     <= '0;
    end else begin
      out_valid <= v[2];
      out_first <= f[2];
      out_kind  <= k[2];
      out_x.re  <= fin(nre[2], m, e);
      out_x.im  <= fin(nim[2], m, e);
    end
  end
endmodule
