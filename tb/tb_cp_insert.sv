// tb_cp_insert: prefix insertion over 9 symbols.
//
// Symbols are written as gap-free 1024-sample bursts, each started only when `in_ready` is
// high (as the FFT does), and with a random pause of 0 to 300 clocks before some of them.
// Sample m of symbol s carries (m, s). Symbols 0 and 7 ask for the long prefix. The test
// checks that every symbol leaves as its last 160 (long) or 144 samples followed by all
// 1024 samples, in order, with `out_first` on the first prefix sample and no gap inside a
// symbol, that back-pressure (`in_ready` low while a symbol waits) happened, and that
// `busy` falls once everything has left.
`timescale 1ns/1ps
module tb_cp_insert;
  import ofdm_pkg::*;

  logic  clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic  in_valid, in_first, in_last, in_long_cp, in_ready, out_valid, out_first, busy;
  cplx_t in_data, out_data;

  cp_insert dut (.*);

  int checks = 0, failures = 0;
  int exp_m [$], exp_s [$], exp_f [$];
  int waits = 0, gaps = 0;
  logic in_sym = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      int m, s, f;
      checks++;
      if (exp_m.size() == 0) begin
        failures++;
      end else begin
        m = exp_m.pop_front(); s = exp_s.pop_front(); f = exp_f.pop_front();
        if (int'(out_data.re) != m || int'(out_data.im) != s || int'(out_first) != f) begin
          failures++;
          if (failures < 10) $display("got (%0d,%0d) first %0d, expected (%0d,%0d) %0d",
                                      out_data.re, out_data.im, out_first, m, s, f);
        end
      end
      in_sym <= (exp_f.size() != 0) && (exp_f[0] == 0);
    end else if (in_sym) gaps++;
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_long_cp = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 9; s++) begin
      int cp;
      cp = (s % 7 == 0) ? 160 : 144;
      for (int m = 1024 - cp; m < 1024; m++) begin
        exp_m.push_back(m); exp_s.push_back(s); exp_f.push_back(m == 1024 - cp);
      end
      for (int m = 0; m < 1024; m++) begin
        exp_m.push_back(m); exp_s.push_back(s); exp_f.push_back(0);
      end
    end
    for (int s = 0; s < 9; s++) begin
      if (s % 3 == 1) repeat ($urandom_range(300)) @(negedge clk);
      @(negedge clk);
      while (!in_ready) begin waits++; @(negedge clk); end
      for (int m = 0; m < 1024; m++) begin
        in_valid = 1; in_first = (m == 0); in_last = (m == 1023);
        in_long_cp = (s % 7 == 0);
        in_data.re = 16'(m); in_data.im = 16'(s);
        @(negedge clk);
      end
      in_valid = 0; in_first = 0; in_last = 0;
    end
    repeat (3000) @(posedge clk);
    checks += 3;
    if (exp_m.size() != 0) begin failures++; $display("%0d samples missing", exp_m.size()); end
    if (waits == 0 || gaps != 0) begin
      failures++; $display("waits %0d, gaps inside symbols %0d", waits, gaps);
    end
    if (busy) failures++;
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
