// tb_schmidl_cox_sync: timing and carrier-offset recovery on a synthetic frame.
//
// The frame is: a few samples of noise, a preamble made of two identical random halves of
// 512 samples behind a 160-sample prefix, then three random 1024-sample symbols with
// 144-sample prefixes. A carrier offset of eps subcarrier spacings and white noise are added.
// For several offsets (including a negative one) and start positions the test checks:
//   - lock is reported, and the timing estimate is within 2 samples of the first sample of
//     the symbol after the preamble;
//   - the phase estimate is within 2 % of pi * eps (or of 0.002 spacings if eps is tiny);
//   - from the flagged start sample on (BACKOFF samples before the estimate), the output
//     equals the transmitted samples (before the offset) up to one constant phase, within
//     a small error.
`timescale 1ns/1ps
module tb_schmidl_cox_sync;
  import ofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        arm, in_valid, out_valid, out_sym_start, locked;
  cplx_t       in_sample, out_sample;
  logic signed [15:0] cfo_phase;
  logic [31:0] timing_est;

  schmidl_cox_sync dut (.*);

  int checks = 0, failures = 0;

  localparam int LEN = 6000;
  real tx_re [LEN], tx_im [LEN];
  int  rx_re [LEN], rx_im [LEN];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000)) + 1.0) / 1000002.0;
    u2 = real'($urandom_range(1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  task automatic run(int offs, real eps, real snr_db);
    int s_true, phi_true, ptol, pos, nout, nbad, got_start;
    real amp, nstd, ph, c0r, c0i, er, ei, yr, yi, a;
    amp = 3000.0;
    nstd = amp * $pow(10.0, -snr_db / 20.0);
    for (int n = 0; n < LEN; n++) begin tx_re[n] = 0; tx_im[n] = 0; end
    // preamble body at offs+160, its two halves equal
    for (int m = 0; m < 512; m++) begin
      tx_re[offs + 160 + m] = amp * gauss();
      tx_im[offs + 160 + m] = amp * gauss();
      tx_re[offs + 160 + 512 + m] = tx_re[offs + 160 + m];
      tx_im[offs + 160 + 512 + m] = tx_im[offs + 160 + m];
    end
    for (int m = 0; m < 160; m++) begin
      tx_re[offs + m] = tx_re[offs + 1024 + m];
      tx_im[offs + m] = tx_im[offs + 1024 + m];
    end
    pos = offs + 1184;
    for (int l = 0; l < 3; l++) begin
      for (int m = 0; m < 1024; m++) begin
        tx_re[pos + 144 + m] = amp * gauss();
        tx_im[pos + 144 + m] = amp * gauss();
      end
      for (int m = 0; m < 144; m++) begin
        tx_re[pos + m] = tx_re[pos + 1024 + m];
        tx_im[pos + m] = tx_im[pos + 1024 + m];
      end
      pos += 1168;
    end
    for (int n = 0; n < LEN; n++) begin
      ph = 2.0 * 3.14159265358979 * eps * n / 1024.0;
      yr = tx_re[n] * $cos(ph) - tx_im[n] * $sin(ph) + nstd * gauss();
      yi = tx_re[n] * $sin(ph) + tx_im[n] * $cos(ph) + nstd * gauss();
      rx_re[n] = $rtoi(yr + 100000.5) - 100000;
      rx_im[n] = $rtoi(yi + 100000.5) - 100000;
    end
    s_true = offs + 1184;
    phi_true = $rtoi(eps * 32768.0);
    // 2 % of the offset, but no tighter than 0.002 subcarrier spacings
    ptol = (phi_true < 0) ? -phi_true : phi_true;
    if (ptol < 3277) ptol = 3277;

    @(posedge clk); arm <= 1;
    @(posedge clk); arm <= 0;
    nout = 0; nbad = 0; got_start = 0;
    for (int n = 0; n < LEN; n++) begin
      // one idle clock in eight, to exercise the input gaps
      if (n % 8 == 3) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      in_sample.re <= 16'(rx_re[n]);
      in_sample.im <= 16'(rx_im[n]);
      @(posedge clk);
      if (out_valid && out_sym_start) begin
        got_start = 1;
        nout = 0;
      end
      if (out_valid && got_start) begin
        int k;
        k = int'(timing_est) - int'(dut.BACKOFF) + nout;
        if (nout == 0) begin
          // constant phase between transmitted and corrected samples
          a = $sqrt(tx_re[k] * tx_re[k] + tx_im[k] * tx_im[k]) + 1.0;
          c0r = (out_sample.re * tx_re[k] + out_sample.im * tx_im[k]) / (a * a);
          c0i = (out_sample.im * tx_re[k] - out_sample.re * tx_im[k]) / (a * a);
        end
        er = out_sample.re - (c0r * tx_re[k] - c0i * tx_im[k]);
        ei = out_sample.im - (c0r * tx_im[k] + c0i * tx_re[k]);
        if (nout < 3000 && $sqrt(er * er + ei * ei) > 0.12 * amp * 4.0) nbad++;
        nout++;
      end
    end
    in_valid <= 0;
    checks++;
    if (!locked || (int'(timing_est) - s_true) > 2 || (s_true - int'(timing_est)) > 2) begin
      failures++;
      $display("FAIL timing: locked %0d, estimate %0d, true %0d (t1 %0d)", locked, timing_est,
               s_true, dut.t1);
    end
    checks++;
    if ((int'(cfo_phase) - phi_true) * 50 > ptol || (phi_true - int'(cfo_phase)) * 50 > ptol) begin
      failures++;
      $display("FAIL cfo: estimate %0d, true %0d", cfo_phase, phi_true);
    end
    checks++;
    if (!got_start || nbad > 30 || nout < 3000) begin
      failures++;
      $display("FAIL output: start seen %0d, %0d outputs, %0d off", got_start, nout, nbad);
    end
    $display("offs %0d eps %f: timing %0d (true %0d), phase %0d (true %0d), bad %0d",
             offs, eps, timing_est, s_true, cfo_phase, phi_true, nbad);
  endtask

  initial begin
    arm = 0; in_valid = 0; in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run(50, 0.0, 60.0);
    run(50, 0.23333, 30.0);
    run(200, -0.41, 25.0);
    run(7, 0.1, 35.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
