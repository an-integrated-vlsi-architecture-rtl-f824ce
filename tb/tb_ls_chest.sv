// tb_ls_chest: least-squares channel estimate with linear interpolation.
//
// Three back-to-back symbols (gap-free 1024-bin bursts) pass through a known channel, a
// different one for each symbol,
// H(k) = c + 0.3 exp(-j 2 pi 4 k / 1024) (c = 0.8, -0.5, 1.1) (k the signed frequency index), with random
// data and the default pilot values (before the third symbol one pilot is rewritten on both
// sides). The test model computes, independently, the value the estimator should produce:
//   - pilot bins: H at the pilot;
//   - other active bins between two pilots: the straight line between the two pilot values
//     (across DC, the 13-bin gap between the last pilot below DC and the first above);
//   - active bins above the last pilot of the band: the parabola through the last three
//     pilots;
//   - DC and guard bins: zero.
// It checks each output against this within 6 LSB of Q3.12 (about 0.15 %), checks that Y,
// the kind and the frame marker come out unchanged 14 clocks after the input, and that the
// number of outputs matches.
`timescale 1ns/1ps
module tb_ls_chest;
  import ofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic       in_valid, in_first, dmrs_we, out_valid, out_first;
  cplx_t      in_y, dmrs_wdata, out_y, out_h;
  logic [6:0] dmrs_addr;
  sc_kind_t   out_kind;

  ls_chest dut (.*);

  int checks = 0, failures = 0;
  logic [1023:0] prbs;
  int dm_re [72], dm_im [72];
  real h_re [1024], h_im [1024];
  real e_re [$], e_im [$];
  int  e_yr [$], e_yi [$], e_k [$], e_f [$], e_t [$];
  int  cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int act(int b);
    if (b >= 1 && b <= 432) return 431 + b;
    if (b >= 592) return b - 592;
    return -1;
  endfunction
  function automatic int bin_of(int a);
    return (a >= 432) ? a - 431 : a + 592;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    real xr, xi;
    int yr, yi, k, f, tt;
    checks++;
    if (e_re.size() == 0) begin
      failures++;
    end else begin
      xr = e_re.pop_front(); xi = e_im.pop_front(); yr = e_yr.pop_front(); yi = e_yi.pop_front();
      k = e_k.pop_front(); f = e_f.pop_front(); tt = e_t.pop_front();
      if (out_h.re - xr > 6.0 || xr - out_h.re > 6.0 || out_h.im - xi > 6.0 ||
          xi - out_h.im > 6.0 || int'(out_y.re) != yr || int'(out_y.im) != yi ||
          int'(out_kind) != k || int'(out_first) != f || cyc - tt != 14) begin
        failures++;
        if (failures < 10) $display("got H (%0d,%0d), expected (%f,%f); kind %0d/%0d, latency %0d",
                                    out_h.re, out_h.im, xr, xi, out_kind, k, cyc - tt);
      end
    end
  end

  task automatic symbol(real c);
    real pr [72], pi [72];
    for (int b = 0; b < 1024; b++) begin
      int k;
      k = (b < 512) ? b : b - 1024;
      h_re[b] = c + 0.3 * $cos(2.0 * 3.14159265358979 * 4.0 * k / 1024.0);
      h_im[b] = -0.3 * $sin(2.0 * 3.14159265358979 * 4.0 * k / 1024.0);
    end
    // reference estimate at the pilots and along the lines
    for (int p = 0; p < 72; p++) begin
      pr[p] = h_re[bin_of(12 * p)] * 4096.0;
      pi[p] = h_im[bin_of(12 * p)] * 4096.0;
    end
    for (int b = 0; b < 1024; b++) begin
      int a, p, j, xr, xi, kind;
      real yr, yi, er, ei;
      a = act(b);
      kind = (a < 0) ? 0 : (a % 12 == 0) ? 2 : (a % 48 == 30) ? 3 : 1;
      if (a < 0) begin
        er = 0; ei = 0; xr = 0; xi = 0;
      end else begin
        p = a / 12; j = a % 12;
        if (j == 0) begin er = pr[p]; ei = pi[p]; end
        else if (p == 35) begin
          er = pr[p] + (pr[p + 1] - pr[p]) * j / 13.0; ei = pi[p] + (pi[p + 1] - pi[p]) * j / 13.0;
        end else if (12 * (p + 1) < 864) begin
          er = pr[p] + (pr[p + 1] - pr[p]) * j / 12.0; ei = pi[p] + (pi[p + 1] - pi[p]) * j / 12.0;
        end else begin
          real x;
          x = j / 12.0;
          er = pr[p] + (pr[p] - pr[p - 1]) * x + (pr[p] - 2 * pr[p - 1] + pr[p - 2]) * x * (x + 1) / 2;
          ei = pi[p] + (pi[p] - pi[p - 1]) * x + (pi[p] - 2 * pi[p - 1] + pi[p - 2]) * x * (x + 1) / 2;
        end
        if (kind == 2) begin xr = dm_re[p]; xi = dm_im[p]; end
        else begin xr = int'($urandom_range(8000)) - 4000; xi = int'($urandom_range(8000)) - 4000; end
      end
      yr = $rtoi(h_re[b] * xr - h_im[b] * xi + 100000.5) - 100000;
      yi = $rtoi(h_re[b] * xi + h_im[b] * xr + 100000.5) - 100000;
      @(negedge clk);
      in_valid = 1; in_first = (b == 0);
      in_y.re = 16'($rtoi(yr)); in_y.im = 16'($rtoi(yi));
      e_re.push_back(er); e_im.push_back(ei); e_yr.push_back($rtoi(yr)); e_yi.push_back($rtoi(yi));
      e_k.push_back(kind); e_f.push_back(b == 0); e_t.push_back(cyc + 1);
    end
  endtask

  initial begin
    logic [8:0] s;
    s = '1;
    for (int i = 0; i < 1024; i++) begin
      prbs[i] = s[8];
      s = {s[7:0], s[8] ^ s[4]};
    end
    for (int p = 0; p < 72; p++) begin
      dm_re[p] = prbs[2 * p] ? -3328 : 3328;
      dm_im[p] = prbs[2 * p + 1] ? -3328 : 3328;
    end
    in_valid = 0; in_first = 0; in_y = '0; dmrs_we = 0; dmrs_addr = 0; dmrs_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);   // the reciprocal table fills after reset
    symbol(0.8);
    symbol(-0.5);
    @(negedge clk);
    in_valid = 0;
    dmrs_we = 1; dmrs_addr = 40; dmrs_wdata.re = 16'sd2000; dmrs_wdata.im = -16'sd1500;
    dm_re[40] = 2000; dm_im[40] = -1500;
    @(negedge clk);
    dmrs_we = 0;
    repeat (100) @(negedge clk);
    symbol(1.1);
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (e_re.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
