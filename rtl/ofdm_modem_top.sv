// ofdm_modem_top: half-duplex 5G NR style OFDM baseband modem, 1024-point FFT.
//
// Transmit chain:  tx bits -> qam_mapper -> pilot_insert -> fft_sdf (inverse) -> cp_insert
//                  -> DAC samples
// Receive chain:   ADC samples -> schmidl_cox_sync -> cp_remove -> fft_sdf (forward)
//                  -> ls_chest -> fde_equalizer -> qam_demapper -> rx bits
// Transmitter and receiver share the single FFT/IFFT core: modem_ctrl sets its direction
// (conjugated twiddles for the IFFT) and drains the pipeline before every switch.
// A transmit frame (`tx_start`) is one Schmidl-Cox preamble symbol followed by `num_sym`
// data symbols of N_DATA = 774 data subcarriers each, modulated with `mod`; the modem pulls
// exactly 774 * num_sym bit words (bits_per_symbol(mod) bits in each) from the tx bit port.
// A receive frame (`rx_start`) arms the synchroniser, which finds the preamble,
// estimates and removes the carrier offset; `num_sym` data symbols are then equalised and
// demapped and their data-subcarrier bits leave on the rx bit port in the order they were
// sent. The DMRS pilot values are programmable through one write port that updates the
// transmitter's and the receiver's copies together.
// All stream interfaces run at one complex sample per clock.
// Some symbol markers of the sub-units are left unread here (pilot inserter and CP remover
// last/first flags, equaliser first flag): the FFT and the controller count samples
// themselves, so these outputs exist for stand-alone use of the units only.
module ofdm_modem_top
  import ofdm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration and commands
  input  mod_t        mod,
  input  logic [15:0] num_sym,
  input  logic        tx_start,
  input  logic        rx_start,
  output logic        busy,
  output logic        tx_done,
  output logic        rx_done,
  // DMRS programming
  input  logic        dmrs_we,
  input  logic [6:0]  dmrs_addr,
  input  cplx_t       dmrs_wdata,
  // transmit bits
  input  logic        tx_bits_valid,
  output logic        tx_bits_ready,
  input  logic [7:0]  tx_bits,
  // DAC side
  output logic        dac_valid,
  output logic        dac_first,
  output cplx_t       dac_sample,
  // ADC side
  input  logic        adc_valid,
  input  cplx_t       adc_sample,
  // received bits
  output logic        rx_bits_valid,
  output logic [7:0]  rx_bits,
  // synchroniser status
  output logic        sync_locked,
  output logic signed [15:0] sync_cfo_phase,
  output logic [31:0] sync_timing
);
  // ---------------- control
  logic pi_cmd_valid, pi_cmd_ready, pi_cmd_training;
  logic fft_inverse, fft_flush, fft_idle, tx_long_cp, cpi_busy, sync_arm, cpr_done, tx_mode;

  // ---------------- transmit chain
  logic  map_valid, map_ready;
  cplx_t map_sym;
  logic  pi_valid, pi_ready, pi_last;
  cplx_t pi_sym;

  qam_mapper u_map (
    .clk(clk), .rst_n(rst_n), .mod(mod),
    .in_valid(tx_bits_valid), .in_ready(tx_bits_ready), .in_bits(tx_bits),
    .out_valid(map_valid), .out_ready(map_ready), .out_sym(map_sym)
  );

  pilot_insert u_pi (
    .clk(clk), .rst_n(rst_n),
    .cmd_valid(pi_cmd_valid), .cmd_ready(pi_cmd_ready), .cmd_training(pi_cmd_training),
    .data_valid(map_valid), .data_ready(map_ready), .data_sym(map_sym),
    .dmrs_we(dmrs_we), .dmrs_addr(dmrs_addr), .dmrs_wdata(dmrs_wdata),
    .out_valid(pi_valid), .out_ready(pi_ready), .out_sym(pi_sym), .out_last(pi_last)
  );

  // ---------------- receive front end
  logic  sc_valid, sc_start;
  cplx_t sc_sample;
  logic  cr_valid, cr_first, cr_last;
  cplx_t cr_sample;

  schmidl_cox_sync u_sync (
    .clk(clk), .rst_n(rst_n), .arm(sync_arm),
    .in_valid(adc_valid && !tx_mode), .in_sample(adc_sample),
    .out_valid(sc_valid), .out_sample(sc_sample), .out_sym_start(sc_start),
    .locked(sync_locked), .cfo_phase(sync_cfo_phase), .timing_est(sync_timing)
  );

  cp_remove u_cpr (
    .clk(clk), .rst_n(rst_n),
    .in_valid(sc_valid), .in_sym_start(sc_start), .in_sample(sc_sample),
    .num_sym(num_sym),
    .out_valid(cr_valid), .out_first(cr_first), .out_last(cr_last), .out_sample(cr_sample),
    .done(cpr_done)
  );

  // ---------------- shared FFT / IFFT core
  logic  f_in_valid, f_in_ready, f_out_ready, f_out_valid, f_out_first, f_out_last;
  cplx_t f_din, f_dout;
  logic  cpi_ready;

  assign f_in_valid  = tx_mode ? pi_valid : cr_valid;
  assign f_din       = tx_mode ? pi_sym   : cr_sample;
  assign pi_ready    = tx_mode && f_in_ready;
  assign f_out_ready = tx_mode ? cpi_ready : 1'b1;

  fft_sdf u_fft (
    .clk(clk), .rst_n(rst_n), .inverse(fft_inverse), .flush(fft_flush), .idle(fft_idle),
    .in_valid(f_in_valid), .in_ready(f_in_ready), .din(f_din),
    .out_ready(f_out_ready), .out_valid(f_out_valid), .out_first(f_out_first),
    .out_last(f_out_last), .dout(f_dout)
  );

  // ---------------- transmit back end
  cp_insert u_cpi (
    .clk(clk), .rst_n(rst_n),
    .in_valid(tx_mode && f_out_valid), .in_first(f_out_first), .in_last(f_out_last),
    .in_long_cp(tx_long_cp), .in_data(f_dout), .in_ready(cpi_ready),
    .out_valid(dac_valid), .out_first(dac_first), .out_data(dac_sample), .busy(cpi_busy)
  );

  // ---------------- receive back end
  logic     ce_valid, ce_first, eq_valid, eq_first;
  sc_kind_t ce_kind, eq_kind;
  cplx_t    ce_y, ce_h, eq_x;

  ls_chest u_chest (
    .clk(clk), .rst_n(rst_n),
    .in_valid(!tx_mode && f_out_valid), .in_first(f_out_first), .in_y(f_dout),
    .dmrs_we(dmrs_we), .dmrs_addr(dmrs_addr), .dmrs_wdata(dmrs_wdata),
    .out_valid(ce_valid), .out_first(ce_first), .out_kind(ce_kind), .out_y(ce_y), .out_h(ce_h)
  );

  fde_equalizer u_eq (
    .clk(clk), .rst_n(rst_n),
    .in_valid(ce_valid), .in_first(ce_first), .in_kind(ce_kind), .in_y(ce_y), .in_h(ce_h),
    .out_valid(eq_valid), .out_first(eq_first), .out_kind(eq_kind), .out_x(eq_x)
  );

  qam_demapper u_demap (
    .clk(clk), .rst_n(rst_n), .mod(mod),
    .in_valid(eq_valid && eq_kind == SC_DATA), .in_sym(eq_x),
    .out_valid(rx_bits_valid), .out_bits(rx_bits)
  );

  // ---------------- sequencing
  modem_ctrl #(.LONG_PERIOD(LONG_CP_PERIOD)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .tx_start(tx_start), .rx_start(rx_start), .num_sym(num_sym),
    .pi_cmd_valid(pi_cmd_valid), .pi_cmd_ready(pi_cmd_ready), .pi_cmd_training(pi_cmd_training),
    .fft_inverse(fft_inverse), .fft_flush(fft_flush), .fft_idle(fft_idle),
    .fft_out_valid(f_out_valid), .fft_out_last(f_out_last), .tx_long_cp(tx_long_cp),
    .cpi_busy(cpi_busy), .sync_arm(sync_arm), .cpr_done(cpr_done),
    .busy(busy), .tx_mode(tx_mode), .tx_done(tx_done), .rx_done(rx_done)
  );
endmodule
