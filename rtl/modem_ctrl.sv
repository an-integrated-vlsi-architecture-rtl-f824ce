// modem_ctrl: frame sequencer of the half-duplex modem.
//
// Transmit (`tx_start`): the FFT core is set to inverse mode and the pilot inserter is
// given one preamble command followed by `num_sym` data-symbol commands. When all are
// issued, the FFT is flushed until it is idle, and transmission ends when the CP inserter
// has emitted everything (`tx_done` pulse). The controller counts the symbols leaving the
// IFFT and flags symbol l for the long cyclic prefix when l is a multiple of LONG_PERIOD
// (the preamble is symbol 0).
// Receive (`rx_start`): the FFT core is set to forward mode and the synchroniser is armed.
// Once the CP remover has delivered `num_sym` symbols, the FFT is flushed, and reception
// ends (`rx_done` pulse) when `num_sym` transforms have come out of the FFT and the
// equaliser and demapper pipeline (DRAIN clocks) has emptied.
// The FFT direction only changes in IDLE, when the shared core has been drained; this is
// how the transmitter and the receiver share one FFT/IFFT core.
module modem_ctrl #(
  parameter int unsigned LONG_PERIOD = 7,
  parameter int unsigned DRAIN       = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_start,
  input  logic        rx_start,
  input  logic [15:0] num_sym,
  // pilot inserter commands
  output logic        pi_cmd_valid,
  input  logic        pi_cmd_ready,
  output logic        pi_cmd_training,
  // shared FFT core
  output logic        fft_inverse,
  output logic        fft_flush,
  input  logic        fft_idle,
  input  logic        fft_out_valid,
  input  logic        fft_out_last,
  output logic        tx_long_cp,      // for the IFFT output symbol now starting
  // CP inserter
  input  logic        cpi_busy,
  // receiver
  output logic        sync_arm,
  input  logic        cpr_done,
  // status
  output logic        busy,
  output logic        tx_mode,
  output logic        tx_done,
  output logic        rx_done
);
  typedef enum logic [2:0] {
    C_IDLE, C_TX_RUN, C_TX_FLUSH, C_TX_TAIL, C_RX_RUN, C_RX_FLUSH, C_RX_TAIL
  } cst_t;
  cst_t st;

  logic [15:0] issued, nout;
  logic [2:0]  lmod;
  logic [5:0]  drain;

  assign busy = (st != C_IDLE);
  assign pi_cmd_valid    = (st == C_TX_RUN);
  assign pi_cmd_training = (issued == 16'd0);
  // in transmit, flush only once the pilot inserter has finished the last symbol
  assign fft_flush = ((st == C_TX_FLUSH) && pi_cmd_ready) || (st == C_RX_FLUSH);
  assign tx_long_cp = (lmod == 3'd0);
  assign tx_mode = fft_inverse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE;
      issued <= '0;
      nout <= '0;
      lmod <= '0;
      drain <= '0;
      fft_inverse <= 1'b0;
      sync_arm <= 1'b0;
      tx_done <= 1'b0;
      rx_done <= 1'b0;
    end else begin
      sync_arm <= 1'b0;
      tx_done <= 1'b0;
      rx_done <= 1'b0;
      if (fft_out_valid && fft_out_last) begin
        nout <= nout + 1'b1;
        lmod <= (lmod == 3'(LONG_PERIOD - 1)) ? '0 : lmod + 1'b1;
      end
      case (st)
        C_IDLE: begin
          issued <= '0;
          nout <= '0;
          lmod <= '0;
          if (tx_start) begin
            st <= C_TX_RUN;
            fft_inverse <= 1'b1;
          end else if (rx_start) begin
            st <= C_RX_RUN;
            fft_inverse <= 1'b0;
            sync_arm <= 1'b1;
          end
        end
        C_TX_RUN:
          if (pi_cmd_ready) begin
            issued <= issued + 1'b1;
            if (issued == num_sym) st <= C_TX_FLUSH;
          end
        C_TX_FLUSH:
          if (fft_idle && nout == num_sym + 16'd1) st <= C_TX_TAIL;
        C_TX_TAIL:
          if (!cpi_busy) begin
            st <= C_IDLE;
            tx_done <= 1'b1;
          end
        C_RX_RUN:
          if (cpr_done) st <= C_RX_FLUSH;
        C_RX_FLUSH:
          if (fft_idle && nout == num_sym) begin
            st <= C_RX_TAIL;
            drain <= 6'(DRAIN);
          end
        default: begin
          drain <= drain - 1'b1;
          if (drain == '0) begin
            st <= C_IDLE;
            rx_done <= 1'b1;
          end
        end
      endcase
    end
  end
endmodule
