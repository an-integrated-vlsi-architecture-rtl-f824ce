// schmidl_cox_sync: symbol timing and carrier-frequency-offset (CFO) recovery with the
// Schmidl-Cox method, plus the NCO that removes the offset from the sample stream.
//
// The preamble is an OFDM symbol whose two halves (L = N/2 samples each) are identical.
// For the newest sample r(t) the unit keeps two sliding sums over the last N samples:
//   P(t) = sum_{m=0}^{L-1} conj(r(t-N+1+m)) * r(t-L+1+m)     (half-symbol autocorrelation)
//   R(t) = sum_{m=0}^{L-1} |r(t-L+1+m)|^2                     (energy of the newer half)
// updated recursively from a 1024-deep sample delay line (taps at L and N). Products are
// shifted right by PSH bits before summing. The timing metric M = |P|^2 / R^2 is compared
// with THR/256 without a divider (|P|^2 * 256 >= THR * R^2). With a cyclic prefix of
// TRAIN_CP samples the metric forms a plateau that is symmetric about its centre (R over
// the newer half only makes the ramps on both sides alike when the preamble and the data
// symbols carry the same energy, which the transmitter ensures), so the
// unit records the first sample t1 at or above the threshold and the first sample t2 below
// it again, and places the first sample of the following data symbol (its CP start) at
//   S = (t1 + t2 - 1)/2 + 1 + TRAIN_CP/2.
// P is summed over the plateau; a vectoring CORDIC turns the sum into the angle phi (one
// turn = 65536) of the phase advance over L samples. The NCO then advances by -phi/L per
// sample (32-bit phase accumulator) and a rotating CORDIC applies it to the outgoing
// stream, starting from phase 0 at sample S.
// Output stream: the input delayed by L samples (the N/2 latency of the unit) plus the
// 18-clock CORDIC, all advancing on `in_valid`; `out_sym_start` flags sample S - BACKOFF.
// The back-off moves the receiver's FFT window a few samples into the cyclic prefix, so
// that an estimate a little late, or the tail of the channel, does not reach into the
// next symbol; the small phase slope across subcarriers it causes is removed with the
// channel by the pilot-based equaliser.
// After `arm`, one preamble is searched for; `locked` stays high until the next `arm`.
// Unused by design: the angle output of the rotating CORDIC and the magnitude outputs of
// the vectoring one.
module schmidl_cox_sync
  import ofdm_pkg::*;
#(
  parameter int unsigned N        = 1024,
  parameter int unsigned TRAIN_CP = 160,
  parameter int unsigned THR      = 248,   // threshold on M, in 1/256 (0.97)
  parameter int unsigned PSH      = 8,     // right shift of each product
  parameter int unsigned BACKOFF  = 3      // start flag placed this many samples before S
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        arm,
  input  logic        in_valid,
  input  cplx_t       in_sample,
  output logic        out_valid,
  output cplx_t       out_sample,
  output logic        out_sym_start,
  output logic        locked,
  output logic signed [15:0] cfo_phase,   // phi: phase advance over L samples, 65536 = 2 pi
  output logic [31:0] timing_est          // S, counted in input samples since `arm`
);
  localparam int unsigned L   = N / 2;
  localparam int unsigned LB  = $clog2(N);
  localparam int unsigned LL  = $clog2(L);
  localparam int unsigned CRD = 18;        // CORDIC latency

  // sample delay line
  cplx_t         dl [N];
  logic [LB-1:0] wp;
  cplx_t         r0, rL, rN;

  logic [31:0] t;   // input samples since `arm`

  // taps older than the arming point count as zero, so the sums start clean
  assign r0 = in_sample;
  assign rL = (t >= 32'(L)) ? dl[LB'(wp - LB'(L))] : '0;
  assign rN = (t >= 32'(N)) ? dl[wp] : '0;   // written N samples ago

  // products: conj(a) * b, scaled
  function automatic logic signed [33:0] cre(cplx_t a, cplx_t b);
    return (34'(a.re) * 34'(b.re) + 34'(a.im) * 34'(b.im)) >>> PSH;
  endfunction
  function automatic logic signed [33:0] cim(cplx_t a, cplx_t b);
    return (34'(a.re) * 34'(b.im) - 34'(a.im) * 34'(b.re)) >>> PSH;
  endfunction

  logic signed [47:0] p_re, p_im, r_sum;
  logic signed [47:0] p_re_n, p_im_n, r_sum_n;

  always_comb begin
    // new term: conj(r(t-L)) r(t); leaving term: conj(r(t-N)) r(t-L)
    p_re_n  = p_re + 48'(cre(rL, r0)) - 48'(cre(rN, rL));
    p_im_n  = p_im + 48'(cim(rL, r0)) - 48'(cim(rN, rL));
    // energy over the newest L samples
    r_sum_n = r_sum + 48'(cre(r0, r0)) - 48'(cre(rL, rL));
  end

  // metric comparison on the registered sums (values reduced to keep products narrow)
  logic signed [31:0] pq_re, pq_im, rq;
  logic [79:0] lhs, rhs;
  logic        above;
  assign pq_re = 32'(p_re >>> 12);
  assign pq_im = 32'(p_im >>> 12);
  assign rq    = 32'(r_sum >>> 12);
  assign lhs   = (80'(64'(pq_re * pq_re)) + 80'(64'(pq_im * pq_im))) << 8;
  assign rhs   = 80'(THR) * 80'(64'(rq * rq));
  assign above = (lhs >= rhs) && (rq > 0);

  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_PLATEAU, S_LOCKED} st_t;
  st_t st;

  logic [31:0] t1, s_pos, out_idx;
  logic signed [63:0] acc_re, acc_im;
  logic        vec_go;
  logic [4:0]  vec_cnt;
  logic signed [31:0] vx, vy, vxo, vyo;
  logic signed [15:0] vzo;
  logic signed [31:0] nco_inc, nco_ph;
  logic        nco_on;

  always_ff @(posedge clk) begin
    if (in_valid) dl[wp] <= in_sample;
  end

  // normalise the plateau sum so that both parts fit in 30 bits for the vectoring CORDIC
  logic [5:0] nsh;
  always_comb begin
    logic [63:0] m;
    m = (acc_re[63] ? 64'(-acc_re) : 64'(acc_re)) | (acc_im[63] ? 64'(-acc_im) : 64'(acc_im));
    nsh = '0;
    for (int i = 34; i >= 0; i--)
      if ((m >> i) >= 64'(1 << 29) && nsh == '0) nsh = 6'(i + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      p_re <= '0; p_im <= '0; r_sum <= '0;
      st <= S_IDLE;
      t <= '0; t1 <= '0; s_pos <= '0;
      acc_re <= '0; acc_im <= '0;
      vec_go <= 1'b0; vec_cnt <= '0;
      cfo_phase <= '0;
      nco_inc <= '0;
      locked <= 1'b0;
      timing_est <= '0;
    end else begin
      if (arm) begin
        st <= S_SEARCH;
        t <= '0;
        p_re <= '0; p_im <= '0; r_sum <= '0;
        locked <= 1'b0;
        vec_go <= 1'b0;
      end else if (in_valid) begin
        wp    <= wp + 1'b1;
        p_re  <= p_re_n;
        p_im  <= p_im_n;
        r_sum <= r_sum_n;
        t     <= t + 1;
        // samples before arming count as zeros, so the metric is usable once the
        // half-symbol tap holds arrived samples
        case (st)
          S_SEARCH:
            if (above && t >= 32'(L + 1)) begin
              st <= S_PLATEAU;
              t1 <= t - 1;              // metric refers to the sums of sample t-1
              acc_re <= 64'(p_re);
              acc_im <= 64'(p_im);
            end
          S_PLATEAU:
            if (above) begin
              acc_re <= acc_re + 64'(p_re);
              acc_im <= acc_im + 64'(p_im);
            end else begin
              st <= S_LOCKED;
              s_pos <= ((t1 + (t - 1) - 1) >> 1) + 1 + TRAIN_CP / 2 - BACKOFF;
              timing_est <= ((t1 + (t - 1) - 1) >> 1) + 1 + TRAIN_CP / 2;
              vec_go <= 1'b1;
              vec_cnt <= '0;
            end
          default: ;
        endcase
        if (vec_go) begin
          vec_cnt <= vec_cnt + 1'b1;
          if (vec_cnt == 5'(CRD)) begin
            vec_go <= 1'b0;
            cfo_phase <= vzo;
            // NCO step = -phi / L, in a 32-bit turn
            nco_inc <= -((32'(vzo) <<< 16) >>> LL);
            locked <= 1'b1;
          end
        end
      end
    end
  end

  assign vx = 32'(acc_re >>> nsh);
  assign vy = 32'(acc_im >>> nsh);

  cordic #(.W(32), .VECTORING(1'b1)) u_vec (
    .clk(clk), .en(in_valid), .xi(vx), .yi(vy), .zi(16'sd0),
    .xo(vxo), .yo(vyo), .zo(vzo)
  );

  // NCO and output rotation. Output index of the delayed stream = t - L.
  logic signed [17:0] ox, oy, rx, ry;
  logic signed [15:0] rz;
  logic [CRD:0]       vpipe, spipe;
  logic               at_s;

  assign out_idx = t - L;
  assign at_s    = locked && (out_idx == s_pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nco_ph <= '0;
      nco_on <= 1'b0;
      vpipe <= '0;
      spipe <= '0;
    end else begin
      if (arm) begin
        nco_on <= 1'b0;
        nco_ph <= '0;
      end else if (in_valid) begin
        if (at_s) begin
          nco_on <= 1'b1;
          nco_ph <= nco_inc;
        end else if (nco_on) begin
          nco_ph <= nco_ph + nco_inc;
        end
        vpipe <= {vpipe[CRD-1:0], (t >= 32'(L))};
        spipe <= {spipe[CRD-1:0], at_s};
      end
    end
  end

  assign ox = 18'(rL.re);
  assign oy = 18'(rL.im);
  assign rz = (nco_on && !at_s) ? nco_ph[31:16] : 16'sd0;

  cordic #(.W(18), .VECTORING(1'b0)) u_rot (
    .clk(clk), .en(in_valid), .xi(ox), .yi(oy), .zi(rz),
    .xo(rx), .yo(ry), .zo()
  );

  assign out_valid     = in_valid && vpipe[CRD-1];
  assign out_sym_start = in_valid && spipe[CRD-1];
  assign out_sample.re = sat16(40'(rx));
  assign out_sample.im = sat16(40'(ry));
endmodule
