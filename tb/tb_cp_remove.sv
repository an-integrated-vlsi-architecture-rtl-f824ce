// tb_cp_remove: prefix removal over a frame of 8 symbols.
//
// The input is a counting sample stream (sample n carries n) with gaps, and `in_sym_start`
// is raised on sample 100. Symbols 1 to 8 follow from there with prefixes of 144 samples,
// except symbol 7, whose prefix is 160. The test checks that exactly the 1024 body samples
// of every symbol come out, in order, with the first and last markers on the right samples,
// and that `done` pulses once, after the last one. A second frame with 2 symbols follows.
`timescale 1ns/1ps
module tb_cp_remove;
  import ofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        in_valid, in_sym_start, out_valid, out_first, out_last, done;
  cplx_t       in_sample, out_sample;
  logic [15:0] num_sym;

  cp_remove dut (.*);

  int checks = 0, failures = 0;
  int exp_n [$], exp_first [$], exp_last [$];
  int ndone;

  always @(posedge clk) if (rst_n) begin
    if (done) ndone++;
    if (out_valid) begin
      int n, f, l;
      checks++;
      if (exp_n.size() == 0) begin
        failures++;
        $display("unexpected output %0d", out_sample.re);
      end else begin
        n = exp_n.pop_front(); f = exp_first.pop_front(); l = exp_last.pop_front();
        if (int'(out_sample.re) != (n % 30000) || int'(out_sample.im) != -(n % 30000) ||
            int'(out_first) != f || int'(out_last) != l) begin
          failures++;
          if (failures < 10) $display("got %0d (first %0d last %0d), expected %0d (%0d %0d)",
                                      out_sample.re, out_first, out_last, n, f, l);
        end
      end
    end
  end

  task automatic frame(int ns, int start);
    int pos, len;
    exp_n.delete(); exp_first.delete(); exp_last.delete();
    pos = start;
    for (int l = 1; l <= ns; l++) begin
      pos += (l % 7 == 0) ? 160 : 144;
      for (int m = 0; m < 1024; m++) begin
        exp_n.push_back(pos + m);
        exp_first.push_back(m == 0);
        exp_last.push_back(m == 1023);
      end
      pos += 1024;
    end
    len = pos + 300;
    num_sym = 16'(ns);
    ndone = 0;
    for (int n = 0; n < len; n++) begin
      if ($urandom_range(4) == 0) begin
        @(negedge clk); in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1;
      in_sym_start = (n == start);
      in_sample.re = 16'(n % 30000);
      in_sample.im = 16'(-(n % 30000));
    end
    @(negedge clk); in_valid = 0; in_sym_start = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_n.size() != 0 || ndone != 1) begin
      failures++;
      $display("frame of %0d: %0d samples missing, done pulses %0d", ns, exp_n.size(), ndone);
    end
  endtask

  initial begin
    in_valid = 0; in_sym_start = 0; in_sample = '0; num_sym = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(8, 100);
    frame(2, 7);
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
