// ls_chest: pilot-aided least-squares channel estimator with linear interpolation across
// frequency.
//
// Input: the received frequency-domain symbol in natural bin order, one bin per clock, as
// a gap-free burst of 1024 samples (`in_first` on bin 0). For every DMRS pilot bin the
// estimate is H = Y / Xp = Y * conj(Xp) / |Xp|^2. The reciprocals 1/|Xp|^2 of all 72 known
// pilots are kept in a table that a background sweep refreshes through the Newton-Raphson
// unit (nr_recip), so that a pilot's division needs only two clocks once it arrives: the
// complex product (clock 1) and the scaling by the reciprocal (clock 2).
// Every other active bin gets H by linear interpolation between the pilots on either side,
// H = Hl + (Hr - Hl) * j / 12 for the j-th bin after the left pilot (the 1/12 steps come from
// a 12-entry Q12 coefficient table). The 11 bins just below DC lie between the last pilot
// below DC and the first pilot above it, 13 bins apart across the empty DC bin; they use
// steps of j / 13. In the natural bin order that right-hand pilot (bin 1) comes at the start
// of the symbol, so its estimate is copied into a holding register in mid-symbol, before
// the next symbol can overwrite it. The 11 highest bins of the band have no pilot above;
// they continue the parabola through the last three pilots Hl'' , Hl', Hl:
// H = Hl + x (Hl - Hl') + x (x + 1) / 2 (Hl - 2 Hl' + Hl''), x = j / 12 (a second 12-entry
// Q12 table holds x (x + 1) / 2). A straight line through two pilots would miss the
// curvature of the channel's phase over those bins. H is Q3.12 (4096 = 1.0).
// To have the right-hand pilot available, the stream is delayed by one pilot spacing plus
// the two clocks of the pilot division: latency Np + 2 = 14 clocks, fixed.
// DMRS values: a 72-word register file with the same reset contents as the transmitter's
// (dmrs_default) and its own write port.
module ls_chest
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  cplx_t      in_y,
  // DMRS register file write port
  input  logic       dmrs_we,
  input  logic [6:0] dmrs_addr,
  input  cplx_t      dmrs_wdata,
  output logic       out_valid,
  output logic       out_first,
  output sc_kind_t   out_kind,
  output cplx_t      out_y,
  output cplx_t      out_h
);
  localparam int unsigned D = PILOT_SP + 2;   // 14

  cplx_t       dmrs_rf [N_PILOT];
  logic [17:0] rc_m [N_PILOT];
  logic [5:0]  rc_e [N_PILOT];
  cplx_t       hp [N_PILOT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PILOT; i++) dmrs_rf[i] <= dmrs_default(i);
    end else if (dmrs_we) begin
      dmrs_rf[dmrs_addr] <= dmrs_wdata;
    end
  end

  // ---- background reciprocal sweep: 1/|Xp|^2 for pilot sw, written 3 clocks later
  logic [6:0]  sw, sw_d [3];
  logic [31:0] pw;
  logic [17:0] nm;
  logic [5:0]  ne;
  logic [2:0]  swv;
  assign pw = 32'(32'(dmrs_rf[sw].re * dmrs_rf[sw].re) + 32'(dmrs_rf[sw].im * dmrs_rf[sw].im));

  nr_recip u_nr (.clk(clk), .d(pw), .m(nm), .e(ne));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw <= '0;
      swv <= '0;
      for (int i = 0; i < 3; i++) sw_d[i] <= '0;
    end else begin
      sw <= (sw == 7'(N_PILOT - 1)) ? '0 : sw + 1'b1;
      sw_d[0] <= sw;
      sw_d[1] <= sw_d[0];
      sw_d[2] <= sw_d[1];
      swv <= {swv[1:0], 1'b1};
    end
  end

  always_ff @(posedge clk) begin
    if (swv[2]) begin
      rc_m[sw_d[2]] <= nm;
      rc_e[sw_d[2]] <= ne;
    end
  end

  // ---- input side: bin counter and pilot division
  logic [LOG2N-1:0] bin;
  logic [LOG2N-1:0] bin_cur;
  assign bin_cur = in_first ? '0 : bin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bin <= '0;
    else if (in_valid) bin <= bin_cur + 1'b1;
  end

  logic              p1_v;
  logic [6:0]        p1_n;
  logic signed [33:0] p1_re, p1_im;
  cplx_t             xp;
  assign xp = dmrs_rf[pilot_number(bin_cur)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_v <= 1'b0;
      p1_n <= '0;
      p1_re <= '0;
      p1_im <= '0;
    end else begin
      p1_v <= in_valid && (sc_kind(bin_cur) == SC_PILOT);
      p1_n <= pilot_number(bin_cur);
      // Y * conj(Xp)
      p1_re <= 34'(in_y.re) * 34'(xp.re) + 34'(in_y.im) * 34'(xp.im);
      p1_im <= 34'(in_y.im) * 34'(xp.re) - 34'(in_y.re) * 34'(xp.im);
    end
  end

  // H * 4096 = p1 * m * 2^-16 * 2^-e * 4096
  function automatic logic signed [15:0] scale_h(logic signed [33:0] p, logic [17:0] m,
                                                 logic [5:0] e);
    logic signed [53:0] q;
    int sh;
    q = 54'(p) * 54'(signed'({1'b0, m}));
    sh = 16 + int'(e) - 12;
    if (sh > 0) q = (q + (54'sd1 <<< (sh - 1))) >>> sh;
    return sat16(40'(q));
  endfunction

  always_ff @(posedge clk) begin
    if (p1_v) begin
      hp[p1_n].re <= scale_h(p1_re, rc_m[p1_n], rc_e[p1_n]);
      hp[p1_n].im <= scale_h(p1_im, rc_m[p1_n], rc_e[p1_n]);
    end
  end

  // ---- delay line (D-1 stages, the output register is the last)
  logic             dv [D-1];
  logic             df [D-1];
  cplx_t            dy [D-1];
  logic [LOG2N-1:0] db [D-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D - 1; i++) begin
        dv[i] <= 1'b0;
        df[i] <= 1'b0;
        dy[i] <= '0;
        db[i] <= '0;
      end
    end else begin
      dv[0] <= in_valid;
      df[0] <= in_valid && in_first;
      dy[0] <= in_y;
      db[0] <= bin_cur;
      for (int i = 1; i < D - 1; i++) begin
        dv[i] <= dv[i-1];
        df[i] <= df[i-1];
        dy[i] <= dy[i-1];
        db[i] <= db[i-1];
      end
    end
  end

  // ---- interpolation at the end of the delay line
  localparam logic [12:0] COEF [PILOT_SP] = '{
    13'd0, 13'd341, 13'd683, 13'd1024, 13'd1365, 13'd1707, 13'd2048, 13'd2389, 13'd2731,
    13'd3072, 13'd3413, 13'd3755
  };
  localparam logic [12:0] COEF13 [PILOT_SP] = '{
    13'd0, 13'd315, 13'd630, 13'd945, 13'd1260, 13'd1575, 13'd1890, 13'd2206, 13'd2521,
    13'd2836, 13'd3151, 13'd3466
  };
  localparam logic [12:0] COEFQ [PILOT_SP] = '{
    13'd0, 13'd185, 13'd398, 13'd640, 13'd910, 13'd1209, 13'd1536, 13'd1892, 13'd2276, 13'd2688, 13'd3129, 13'd3598
  };
  localparam int unsigned P_DC = HALF_ACT / PILOT_SP;   // first pilot above DC (36)

  // estimate of the first pilot above DC, held for the bins just below DC
  cplx_t hp_dc;
  always_ff @(posedge clk) begin
    if (dv[D-2] && db[D-2] == LOG2N'(NFFT / 2)) hp_dc <= hp[P_DC];
  end

  logic [LOG2N-1:0] ob;
  sc_kind_t         okind;
  int               oa, oj, opl;
  logic             has_right;
  cplx_t            hl, hr, hpv, hpv2, hint;
  logic signed [17:0] qre, qim;
  logic signed [31:0] ure, uim;
  logic signed [18:0] sre, sim;
  logic signed [16:0] dre, dim;
  logic signed [30:0] tre, tim;
  logic [12:0]        cf;

  always_comb begin
    ob    = db[D-2];
    okind = sc_kind(ob);
    oa    = active_index(int'(ob));
    if (oa < 0) oa = 0;
    oj    = oa % PILOT_SP;
    opl   = oa / PILOT_SP;
    has_right = (opl + 1) * PILOT_SP < int'(N_ACTIVE);
    hl = hp[7'(opl)];
    hr = (opl + 1 == int'(P_DC)) ? hp_dc : hp[7'(opl + 1)];
    cf = (opl + 1 == int'(P_DC)) ? COEF13[oj] : COEF[oj];
    hpv = hp[7'(opl - 1)];
    hpv2 = hp[7'(opl - 2)];
    qre = has_right ? '0 : 18'(hl.re) - 18'(hpv.re) - 18'(hpv.re) + 18'(hpv2.re);
    qim = has_right ? '0 : 18'(hl.im) - 18'(hpv.im) - 18'(hpv.im) + 18'(hpv2.im);
    ure = 32'(qre) * 32'(signed'({1'b0, COEFQ[oj]}));
    uim = 32'(qim) * 32'(signed'({1'b0, COEFQ[oj]}));
    dre = has_right ? 17'(hr.re) - 17'(hl.re) : 17'(hl.re) - 17'(hpv.re);
    dim = has_right ? 17'(hr.im) - 17'(hl.im) : 17'(hl.im) - 17'(hpv.im);
    tre = 31'(dre) * 31'(signed'({1'b0, cf}));
    tim = 31'(dim) * 31'(signed'({1'b0, cf}));
    sre = 19'(hl.re) + 19'((tre + 31'sd2048) >>> 12) + 19'((ure + 32'sd2048) >>> 12);
    sim = 19'(hl.im) + 19'((tim + 31'sd2048) >>> 12) + 19'((uim + 32'sd2048) >>> 12);
    hint.re = sat16(40'(sre));
    hint.im = sat16(40'(sim));
    if (okind == SC_NULL) hint = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_kind  <= SC_NULL;
      out_y     <= '0;
      out_h     <= '0;
    end else begin
      out_valid <= dv[D-2];
      out_first <= df[D-2];
      out_kind  <= okind;
      out_y     <= dy[D-2];
      out_h     <= hint;
    end
  end
endmodule
