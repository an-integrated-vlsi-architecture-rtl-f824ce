// tb_modem_ctrl: the frame sequencer against simple models of the units it drives.
//
// Models: the pilot inserter takes a command and is then busy for 20 clocks; the FFT emits
// one symbol-end marker 50 clocks after each command (transmit) or each received symbol
// (receive) and reports idle when nothing is pending; the CP inserter stays busy 30 clocks
// after the last marker. The test runs a transmit frame of 8 data symbols and a receive
// frame of 3 and checks: the FFT direction (inverse while transmitting, forward while
// receiving); exactly 9 commands, the first one for the preamble; flush only after the last
// command; the long-prefix flag on output symbols 0 and 7 only; one `tx_done` pulse after
// the CP inserter went idle; one synchroniser arm pulse; one `rx_done` pulse after all 3
// symbols and the drain time; `busy` low at the end.
`timescale 1ns/1ps
module tb_modem_ctrl;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        tx_start, rx_start, pi_cmd_valid, pi_cmd_ready, pi_cmd_training;
  logic        fft_inverse, fft_flush, fft_idle, fft_out_valid, fft_out_last, tx_long_cp;
  logic        cpi_busy, sync_arm, cpr_done, busy, tx_mode, tx_done, rx_done;
  logic [15:0] num_sym;

  modem_ctrl dut (.*);

  int checks = 0, failures = 0;
  int pi_cnt = 0, ncmd = 0, ntrain_first = 0, pend = 0, nlast = 0, cpi_cnt = 0;
  int long_bad = 0, flush_early = 0, arms = 0, txd = 0, rxd = 0, dir_bad = 0;
  int tq [$];
  int cyc = 0;

  assign pi_cmd_ready = (pi_cnt == 0);
  assign fft_idle = (tq.size() == 0);
  assign cpi_busy = (cpi_cnt != 0);

  // The DUT's outputs are sampled on the falling edge (they are stable then) and the models
  // update just after the rising edge, so that tb and DUT never race on an edge.
  logic s_cmd, s_train, s_flush, s_ovl, s_long, s_arm, s_txd, s_rxd, s_busy, s_txm, s_inv;
  always @(negedge clk) begin
    s_cmd = pi_cmd_valid && pi_cmd_ready; s_train = pi_cmd_training; s_flush = fft_flush;
    s_ovl = fft_out_valid && fft_out_last; s_long = tx_long_cp; s_arm = sync_arm;
    s_txd = tx_done; s_rxd = rx_done; s_busy = busy; s_txm = tx_mode; s_inv = fft_inverse;
  end

  always @(posedge clk) begin
    #0.1;
    cyc++;
    if (pi_cnt != 0) pi_cnt--;
    if (cpi_cnt != 0) cpi_cnt--;
    if (rst_n) begin
      if (s_cmd) begin
        if (ncmd == 0 && s_train) ntrain_first++;
        if (ncmd != 0 && s_train) ntrain_first = -100;
        ncmd++;
        pi_cnt = 20;
        tq.push_back(cyc + 50);
      end
      if (s_flush && s_txm && ncmd < 9) flush_early++;
      if (s_ovl) begin
        void'(tq.pop_front());
        if (s_txm && s_long != (nlast % 7 == 0)) long_bad++;
        nlast++;
        cpi_cnt = 30;
      end
      if (s_arm) arms++;
      if (s_txd) txd++;
      if (s_rxd) rxd++;
      if (s_busy && (s_txm != s_inv)) dir_bad++;
    end
  end

  // FFT output model: a marker when the oldest pending symbol is due
  always_comb begin
    fft_out_valid = (tq.size() != 0) && (tq[0] <= cyc);
    fft_out_last  = fft_out_valid;
  end

  initial begin
    tx_start = 0; rx_start = 0; num_sym = 8; cpr_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); tx_start = 1; @(negedge clk); tx_start = 0;
    checks++;
    if (!fft_inverse) begin failures++; $display("FFT not inverse in transmit"); end
    while (!tx_done && cyc < 5000) @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 5;
    if (ncmd != 9 || ntrain_first != 1) begin failures++; $display("commands %0d", ncmd); end
    if (flush_early != 0) begin failures++; $display("flush before the last command"); end
    if (long_bad != 0 || nlast != 9) begin failures++; $display("long-CP flags wrong %0d", long_bad); end
    if (txd != 1 || cpi_busy) begin failures++; $display("tx_done pulses %0d", txd); end
    if (busy) failures++;
    // receive: 3 symbols, each reaching the FFT 1168 clocks apart
    num_sym = 3; nlast = 0;
    @(negedge clk); rx_start = 1; @(negedge clk); rx_start = 0;
    @(negedge clk);
    checks++;
    if (fft_inverse || arms != 1) begin failures++; $display("receive start wrong"); end
    for (int l = 0; l < 3; l++) begin
      repeat (100) @(negedge clk);
      tq.push_back(cyc + 50);
    end
    @(negedge clk); cpr_done = 1; @(negedge clk); cpr_done = 0;
    checks++;
    if (rx_done) failures++;
    while (!rx_done && cyc < 10000) @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 2;
    if (rxd != 1 || nlast != 3) begin failures++; $display("rx_done pulses %0d, symbols %0d", rxd, nlast); end
    if (busy || dir_bad != 0) begin failures++; $display("busy %0d, direction errors %0d", busy, dir_bad); end
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
