// tb_fde_equalizer: the one-tap equaliser, X = Y / H, including its reciprocal unit.
//
// Random channel values H (magnitude 0.25 to 2.5, any phase, Q3.12) and random symbols X are
// combined into Y = H * X (rounded to integers), fed with random gaps in the input. The test
// checks that each output comes four clocks after its input, that the kind and frame marker
// travel with it, and that the result equals Y / H computed exactly to within 4 LSB plus
// 0.1 % of its size. Very small and very large channel values (reciprocal near the ends of
// its range) are included.
`timescale 1ns/1ps
module tb_fde_equalizer;
  import ofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic     in_valid, in_first, out_valid, out_first;
  sc_kind_t in_kind, out_kind;
  cplx_t    in_y, in_h, out_x;

  fde_equalizer dut (.*);

  int checks = 0, failures = 0;
  real exp_re [$], exp_im [$];
  int  exp_k [$], exp_f [$], exp_t [$];
  int  cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    real er, ei, tol, xr, xi;
    int k, f, tt;
    xr = exp_re.pop_front(); xi = exp_im.pop_front();
    k = exp_k.pop_front(); f = exp_f.pop_front(); tt = exp_t.pop_front();
    er = out_x.re - xr; ei = out_x.im - xi;
    tol = 4.0 + 0.001 * $sqrt(xr * xr + xi * xi);
    checks++;
    if (er > tol || er < -tol || ei > tol || ei < -tol || int'(out_kind) != k ||
        int'(out_first) != f || cyc - tt != 4) begin
      failures++;
      if (failures < 10)
        $display("mismatch: got (%0d,%0d) expected (%f,%f), kind %0d/%0d, latency %0d",
                 out_x.re, out_x.im, xr, xi, out_kind, k, cyc - tt);
    end
  end

  initial begin
    real mag, ang, hr, hi, xr, xi, yr, yi, d;
    in_valid = 0; in_first = 0; in_kind = SC_NULL; in_y = '0; in_h = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        in_valid = 0;
      end else begin
        mag = (n % 97 == 0) ? 0.25 : (n % 89 == 0) ? 2.5 : 0.25 + 2.25 * ($urandom_range(1000) / 1000.0);
        ang = 6.2831853 * ($urandom_range(1000) / 1000.0);
        hr = $rtoi(mag * 4096.0 * $cos(ang)); hi = $rtoi(mag * 4096.0 * $sin(ang));
        xr = real'($urandom_range(10000)) - 5000.0; xi = real'($urandom_range(10000)) - 5000.0;
        yr = $rtoi((hr * xr - hi * xi) / 4096.0); yi = $rtoi((hr * xi + hi * xr) / 4096.0);
        in_valid = 1;
        in_first = ($urandom_range(9) == 0);
        in_kind  = sc_kind_t'($urandom_range(3));
        in_h.re = 16'($rtoi(hr)); in_h.im = 16'($rtoi(hi));
        in_y.re = 16'($rtoi(yr)); in_y.im = 16'($rtoi(yi));
        d = hr * hr + hi * hi;
        exp_re.push_back(4096.0 * (yr * hr + yi * hi) / d);
        exp_im.push_back(4096.0 * (yi * hr - yr * hi) / d);
        exp_k.push_back(int'(in_kind)); exp_f.push_back(int'(in_first)); exp_t.push_back(cyc + 1);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) failures++;
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
