// tb_pilot_insert: resource-element map of the preamble and of data symbols.
//
// The test keeps its own model of the map: active bins 1..432 (active index 432..863) and
// 592..1023 (0..431), pilots at active index multiple of 12, PTRS at index 30 modulo 48
// carrying the value of the pilot below, data elsewhere, zero on DC and the guard bins.
// Default pilot values come from a PRBS-9 generator written here (x^9 + x^5 + 1, seed all
// ones, two bits per pilot, magnitude 3328). The preamble carries PRBS QPSK values of
// magnitude 3504 on even active bins only.
// Sequence: a preamble, a data symbol, a rewrite of pilot 5, another data symbol. The data
// source and the consumer both stall at random. Every output bin is checked, the data
// symbols must be consumed exactly once each and `out_last` must mark bin 1023.
`timescale 1ns/1ps
module tb_pilot_insert;
  import ofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic       cmd_valid, cmd_ready, cmd_training, data_valid, data_ready;
  cplx_t      data_sym, dmrs_wdata, out_sym;
  logic       dmrs_we, out_valid, out_ready, out_last;
  logic [6:0] dmrs_addr;

  pilot_insert dut (.*);

  int checks = 0, failures = 0;
  logic [1023:0] prbs;
  int dm_re [72], dm_im [72];
  int mode;            // 1: preamble being checked, 0: data symbol
  int bin_o, data_o, data_i;

  function automatic int act(int b);
    if (b >= 1 && b <= 432) return 431 + b;
    if (b >= 592) return b - 592;
    return -1;
  endfunction

  // data symbol k carries (k, -k)
  always @(posedge clk) if (rst_n && data_valid && data_ready) data_i++;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int a, er, ei;
    a = act(bin_o);
    er = 0; ei = 0;
    if (mode == 1) begin
      if (a >= 0 && bin_o % 2 == 0) begin
        er = prbs[bin_o] ? -3504 : 3504;
        ei = prbs[bin_o + 1] ? -3504 : 3504;
      end
    end else if (a >= 0) begin
      if (a % 12 == 0 || a % 48 == 30) begin
        er = dm_re[a / 12]; ei = dm_im[a / 12];
      end else begin
        er = data_o % 30000; ei = -(data_o % 30000);
        data_o++;
      end
    end
    checks++;
    if (int'(out_sym.re) != er || int'(out_sym.im) != ei || out_last != (bin_o == 1023)) begin
      failures++;
      if (failures < 10) $display("bin %0d: got (%0d,%0d), expected (%0d,%0d)", bin_o,
                                  out_sym.re, out_sym.im, er, ei);
    end
    bin_o = (bin_o + 1) % 1024;
  end

  always @(negedge clk) begin
    out_ready = ($urandom_range(4) != 0);
    data_valid = ($urandom_range(5) != 0);
    data_sym.re = 16'(data_i % 30000);
    data_sym.im = 16'(-(data_i % 30000));
  end

  task automatic symbol(int training);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    mode = training;
    cmd_valid = 1; cmd_training = training[0];
    @(negedge clk);
    cmd_valid = 0;
    while (bin_o != 0 || !cmd_ready) @(negedge clk);
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
    cmd_valid = 0; cmd_training = 0; dmrs_we = 0; dmrs_addr = 0; dmrs_wdata = '0;
    bin_o = 0; data_o = 0; data_i = 0; mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    symbol(1);
    symbol(0);
    @(negedge clk);
    dmrs_we = 1; dmrs_addr = 5; dmrs_wdata.re = 16'sd1234; dmrs_wdata.im = -16'sd777;
    dm_re[5] = 1234; dm_im[5] = -777;
    @(negedge clk);
    dmrs_we = 0;
    symbol(0);
    repeat (5) @(posedge clk);
    checks++;
    if (data_o != 2 * 774 || data_i != 2 * 774) begin
      failures++;
      $display("data symbols: %0d checked, %0d consumed", data_o, data_i);
    end
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
