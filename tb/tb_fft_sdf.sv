// tb_fft_sdf: self-checking test of the streaming FFT/IFFT core.
// Three random frames are streamed back to back in forward mode, then the core is flushed,
// switched to inverse mode and three more frames are run, plus a single-tone frame (bin 100).
// Every output bin is compared with a double-precision DFT scaled by 1/32 (five halving
// stages): worst error within 12 LSB and SNR above 55 dB for full-scale random frames, and
// the tone frame (bin 100) must put 65 dB more power in bin 100 than in all other bins. The clock count
// from the first input sample of a frame to its first output sample is checked against
// 2N + 4 log2(N) + 1.
`timescale 1ns/1ps
module tb_fft_sdf;
  import ofdm_pkg::*;
  localparam int N = 1024;
  localparam int NF = 3;
  localparam int EXP_LAT = 2 * N + 4 * 10 + 1;

  logic clk = 0, rst_n = 0;
  logic inverse, flush, idle, in_valid, in_ready, out_ready, out_valid, out_first, out_last;
  cplx_t din, dout;
  always #1 clk = ~clk;

  fft_sdf #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real cs [N], sn [N];
  int  xin_re [NF+1][N], xin_im [NF+1][N];
  int  first_in_cyc [NF+1];
  int  nf_in, nf_out, k_out;
  real err_pow, sig_pow, max_err;
  int  lat_checked;
  real tone_pow, spur_pow;

  task automatic check_bin(int f, int k, cplx_t y, bit inv);
    real acc_re, acc_im, e_re, e_im, ang_sign;
    acc_re = 0; acc_im = 0;
    ang_sign = inv ? 1.0 : -1.0;
    for (int n = 0; n < N; n++) begin
      int idx;
      idx = (n * k) % N;
      acc_re += xin_re[f][n] * cs[idx] - ang_sign * xin_im[f][n] * sn[idx];
      acc_im += xin_im[f][n] * cs[idx] + ang_sign * xin_re[f][n] * sn[idx];
    end
    acc_re /= 32.0; acc_im /= 32.0;
    e_re = y.re - acc_re; e_im = y.im - acc_im;
    err_pow += e_re * e_re + e_im * e_im;
    sig_pow += acc_re * acc_re + acc_im * acc_im;
    if (e_re > max_err) max_err = e_re;
    if (-e_re > max_err) max_err = -e_re;
    if (e_im > max_err) max_err = e_im;
    if (-e_im > max_err) max_err = -e_im;
  endtask

  // collects one direction: NF frames
  task automatic run_dir(bit inv, bit tone_last);
    nf_in = 0; nf_out = 0; tone_pow = 0; spur_pow = 1.0e-3; k_out = 0; err_pow = 0; sig_pow = 0; max_err = 0;
    inverse = inv;
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        if (tone_last && f == NF - 1) begin
          xin_re[f][n] = int'($rtoi(1000.0 * cs[(100 * n) % N] + 1000.5)) - 1000;
          xin_im[f][n] = int'($rtoi(1000.0 * sn[(100 * n) % N] + 1000.5)) - 1000;
        end else begin
          xin_re[f][n] = int'($urandom_range(4000)) - 2000;
          xin_im[f][n] = int'($urandom_range(4000)) - 2000;
        end
      end
    fork
      begin : feeder
        for (int f = 0; f < NF; f++)
          for (int n = 0; n < N; n++) begin
            in_valid <= 1'b1;
            din.re <= 16'(xin_re[f][n]);
            din.im <= 16'(xin_im[f][n]);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
            if (n == 0) first_in_cyc[f] = cyc - 1;
          end
        in_valid <= 1'b0;
        flush <= 1'b1;
        @(posedge clk);
        while (!idle) @(posedge clk);
        flush <= 1'b0;
      end
      begin : collector
        while (nf_out < NF) begin
          @(posedge clk);
          if (out_valid) begin
            if (out_first) begin
              k_out = 0;
              if (!lat_checked) begin
                checks++;
                if (cyc - 1 - first_in_cyc[nf_out] != EXP_LAT) begin
                  failures++;
                  $display("latency %0d expected %0d", cyc - 1 - first_in_cyc[nf_out], EXP_LAT);
                end
                lat_checked = 1;
              end
            end
            check_bin(nf_out, k_out, dout, inv);
            if (tone_last && nf_out == NF - 1) begin
              if (k_out == 100) tone_pow = real'(dout.re) * dout.re + real'(dout.im) * dout.im;
              else spur_pow += real'(dout.re) * dout.re + real'(dout.im) * dout.im;
            end
            k_out++;
            if (out_last) nf_out++;
          end
        end
      end
    join
    checks++;
    if (max_err > 12.0 || 10.0 * $log10(sig_pow / err_pow) < 55.0) failures++;
    if (tone_last) begin
      checks++;
      $display("single tone at bin 100: tone-to-rest %f dB", 10.0 * $log10(tone_pow / spur_pow));
      if (10.0 * $log10(tone_pow / spur_pow) < 65.0) failures++;
    end
    $display("inverse=%0d max_err=%f SNR=%f dB", inv, max_err, 10.0 * $log10(sig_pow / err_pow));
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      cs[i] = $cos(2.0 * 3.14159265358979 * i / N);
      sn[i] = $sin(2.0 * 3.14159265358979 * i / N);
    end
    in_valid = 0; flush = 0; inverse = 0; out_ready = 1; din = '0; lat_checked = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_dir(1'b0, 1'b1);
    checks++;
    if (!idle) failures++;
    run_dir(1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
