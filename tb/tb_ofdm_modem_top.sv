// tb_ofdm_modem_top: end-to-end test of the modem at its default (full) size.
//
// For each of several frames (256-QAM with 8 data symbols, 16-QAM with 2, QPSK with 1,
// BPSK with 1, and a long 256-QAM frame of 162 symbols, about one million bits) the test:
//   1. transmits random bits (tx_start), recording the DAC stream;
//   2. passes the stream through a channel model: a 50-sample timing offset, three
//      multipath taps (delays 0, 3 and 7 samples), a carrier offset of 0.2333 subcarrier
//      spacings (3.5 kHz at 15 kHz spacing) and white noise about 35 dB below the signal;
//   3. receives it (rx_start) and compares every demapped bit with what was sent
//      (no errors allowed for BPSK, QPSK and 16-QAM; a bit error rate up to 1e-3 for 256-QAM).
// It also checks the synchroniser's timing estimate (within 3 samples of the true start of
// the first data symbol's prefix, shifted by the channel's mean delay) and its carrier
// offset estimate (within 2 %), the DAC frame length (CP 160 on symbols 0 and 7, 144
// otherwise), and counts the mechanisms the design relies on: direction switches of the
// shared FFT core, pipeline flushes, CP-buffer back-pressure on the FFT, long and normal
// prefixes, pilot and PTRS insertion, interpolated and edge-extrapolated channel estimates, CFO
// correction. A mechanism that never occurred counts as a failure.
`timescale 1ns/1ps
module tb_ofdm_modem_top;
  import ofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  mod_t        mod;
  logic [15:0] num_sym;
  logic        tx_start, rx_start, busy, tx_done, rx_done;
  logic        dmrs_we;
  logic [6:0]  dmrs_addr;
  cplx_t       dmrs_wdata;
  logic        tx_bits_valid, tx_bits_ready;
  logic [7:0]  tx_bits;
  logic        dac_valid, dac_first;
  cplx_t       dac_sample;
  logic        adc_valid;
  cplx_t       adc_sample;
  logic        rx_bits_valid;
  logic [7:0]  rx_bits;
  logic        sync_locked;
  logic signed [15:0] sync_cfo_phase;
  logic [31:0] sync_timing;

  ofdm_modem_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- mechanism counters
  int n_mode_switch = 0, n_flush = 0, n_backpressure = 0, n_long_cp = 0, n_norm_cp = 0;
  int n_pilot = 0, n_ptrs = 0, n_interp = 0, n_hold = 0, n_cfo_rot = 0, n_lock = 0;
  logic prev_inv = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fft.inverse != prev_inv) n_mode_switch++;
    prev_inv <= dut.u_fft.inverse;
    if (dut.u_fft.adv && !dut.u_fft.in_valid) n_flush++;
    if (dut.u_fft.u_reorder.full[dut.u_fft.u_reorder.rb] && !dut.u_fft.u_reorder.reading &&
        !dut.u_fft.out_ready) n_backpressure++;
    if (dut.u_cpi.state == 2'd0 && dut.u_cpi.nsym != 0)
      if (dut.u_cpi.longf[dut.u_cpi.sr]) n_long_cp++; else n_norm_cp++;
    if (dut.u_pi.adv && !dut.u_pi.training && dut.u_pi.kind == SC_PILOT) n_pilot++;
    if (dut.u_pi.adv && !dut.u_pi.training && dut.u_pi.kind == SC_PTRS) n_ptrs++;
    if (dut.u_chest.dv[12] && dut.u_chest.okind == SC_DATA) begin
      if (dut.u_chest.has_right && dut.u_chest.oj != 0) n_interp++;
      if (!dut.u_chest.has_right) n_hold++;
    end
    if (dut.u_sync.nco_on && dut.u_sync.rz != 0) n_cfo_rot++;
  end

  // ---------------- stimulus storage
  localparam int MAXS = 170 * 1200 + 4000;
  int          dac_n;
  real         dac_re [MAXS], dac_im [MAXS];
  int          adc_n;
  int          adc_re [MAXS], adc_im [MAXS];
  logic [7:0]  sent [$];
  int          nrx, nbiterr;
  int          frame_len_exp;

  always @(posedge clk) begin
    if (dac_valid && dac_n < MAXS) begin
      dac_re[dac_n] = dac_sample.re;
      dac_im[dac_n] = dac_sample.im;
      dac_n++;
    end
  end

  // gaussian noise (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000)) + 1.0) / 1000002.0;
    u2 = real'($urandom_range(1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  task automatic run_frame(mod_t m, int ns);
    int nwords, bps, sent_idx, offs;
    real eps, ph, pw, sig_pow, nstd, yr, yi, cr, ci;
    real hre [3], him [3];
    int  hdl [3];
    int  exp_s, exp_phi;
    logic [7:0] mask;

    mod = m;
    num_sym = 16'(ns);
    bps = bits_per_symbol(m);
    mask = 8'((1 << bps) - 1);
    nwords = N_DATA * ns;
    sent.delete();
    dac_n = 0;

    // ---- transmit
    @(posedge clk);
    tx_start <= 1;
    @(posedge clk);
    tx_start <= 0;
    sent_idx = 0;
    while (!tx_done) begin
      if (sent_idx < nwords) begin
        tx_bits_valid <= 1;
        tx_bits <= 8'($urandom);
      end else tx_bits_valid <= 0;
      @(posedge clk);
      if (tx_bits_valid && tx_bits_ready) begin
        sent.push_back(tx_bits & mask);
        sent_idx++;
      end
    end
    tx_bits_valid <= 0;
    // frame length: preamble (CP 160) + data symbols (CP 160 on symbol 7)
    frame_len_exp = 0;
    for (int l = 0; l <= ns; l++) frame_len_exp += NFFT + ((l % LONG_CP_PERIOD == 0) ? 160 : 144);
    checks++;
    if (dac_n != frame_len_exp || sent.size() != nwords) begin
      failures++;
      $display("TX: %0d DAC samples (expected %0d), %0d words (expected %0d)",
               dac_n, frame_len_exp, sent.size(), nwords);
    end

    // ---- channel
    offs = 50;
    eps = 0.23333;                          // CFO in subcarrier spacings
    hre = '{0.9, 0.0, 0.12};  him = '{0.0, 0.3, -0.08};  hdl = '{0, 3, 7};
    sig_pow = 0;
    for (int n = 0; n < dac_n; n++) sig_pow += dac_re[n] * dac_re[n] + dac_im[n] * dac_im[n];
    sig_pow /= dac_n;
    nstd = $sqrt(sig_pow * 0.77 / 2.0 * $pow(10.0, -3.5));
    adc_n = offs + dac_n + 3000;
    for (int n = 0; n < adc_n; n++) begin
      int k;
      k = n - offs;
      yr = 0; yi = 0;
      for (int t = 0; t < 3; t++)
        if (k - hdl[t] >= 0 && k - hdl[t] < dac_n) begin
          yr += hre[t] * dac_re[k - hdl[t]] - him[t] * dac_im[k - hdl[t]];
          yi += hre[t] * dac_im[k - hdl[t]] + him[t] * dac_re[k - hdl[t]];
        end
      ph = 2.0 * 3.14159265358979 * eps * n / NFFT;
      cr = yr * $cos(ph) - yi * $sin(ph);
      ci = yr * $sin(ph) + yi * $cos(ph);
      adc_re[n] = $rtoi(cr + nstd * gauss() + 100000.5) - 100000;
      adc_im[n] = $rtoi(ci + nstd * gauss() + 100000.5) - 100000;
    end

    // ---- receive
    nrx = 0; nbiterr = 0;
    @(posedge clk);
    rx_start <= 1;
    @(posedge clk);
    rx_start <= 0;
    @(posedge clk);
    for (int n = 0; !rx_done; n++) begin
      adc_valid <= 1;
      adc_sample.re <= (n < adc_n) ? 16'(adc_re[n]) : 16'sd0;
      adc_sample.im <= (n < adc_n) ? 16'(adc_im[n]) : 16'sd0;
      @(posedge clk);
    end
    adc_valid <= 0;
    // BPSK to 16-QAM must be error-free; 256-QAM at this SNR is allowed a bit error rate
    // of at most 1e-3 (the errors sit mostly on the highest subcarriers, whose estimates are
    // extrapolated, and in the channel's deepest fade)
    checks++;
    if (nrx != nwords || (m == MOD_QAM256 ? nbiterr * 1000 > nwords * 8 : nbiterr != 0)) begin
      failures++;
    end
    $display("mod %0d, %0d symbols: %0d words received of %0d, %0d bit errors", m, ns, nrx,
             nwords, nbiterr);
    // timing: first data symbol starts at offs + 160 + 1024; the channel's energy-weighted
    // delay is below one sample here
    exp_s = offs + 160 + NFFT;
    checks++;
    if (int'(sync_timing) - exp_s > 3 || exp_s - int'(sync_timing) > 3) begin
      failures++;
    end
    exp_phi = $rtoi(eps * 0.5 * 65536.0);
    checks++;
    if ((int'(sync_cfo_phase) - exp_phi) * 50 > exp_phi || (exp_phi - int'(sync_cfo_phase)) * 50 > exp_phi)
      failures++;
    $display("sync: timing %0d (true %0d), phase over N/2 %0d (true %0d)", sync_timing, exp_s,
             sync_cfo_phase, exp_phi);
    if (sync_locked) n_lock++;
  endtask

  always @(posedge clk) begin
    if (rx_bits_valid) begin
      if (nrx < sent.size()) nbiterr += $countones(rx_bits ^ sent[nrx]);
      nrx++;
    end
  end

  initial begin
    mod = MOD_QAM256; num_sym = 1; tx_start = 0; rx_start = 0;
    dmrs_we = 0; dmrs_addr = 0; dmrs_wdata = '0;
    tx_bits_valid = 0; tx_bits = 0; adc_valid = 0; adc_sample = '0;
    dac_n = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    run_frame(MOD_QAM256, 8);
    run_frame(MOD_QAM16, 2);
    run_frame(MOD_QPSK, 1);
    run_frame(MOD_BPSK, 1);
    run_frame(MOD_QAM256, 162);   // 162 x 774 x 8 = 1,003,104 bits
    $display("mechanisms: mode switches %0d, flush advances %0d, back-pressure clocks %0d,",
             n_mode_switch, n_flush, n_backpressure);
    $display("  long CP %0d, normal CP %0d, pilots %0d, PTRS %0d, interpolated %0d, extrapolated %0d,",
             n_long_cp, n_norm_cp, n_pilot, n_ptrs, n_interp, n_hold);
    $display("  CFO-rotated samples %0d, locks %0d", n_cfo_rot, n_lock);
    checks += 11;
    if (n_mode_switch == 0) failures++;
    if (n_flush == 0) failures++;
    if (n_backpressure == 0) failures++;
    if (n_long_cp == 0) failures++;
    if (n_norm_cp == 0) failures++;
    if (n_pilot == 0) failures++;
    if (n_ptrs == 0) failures++;
    if (n_interp == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_cfo_rot == 0) failures++;
    if (n_lock != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
