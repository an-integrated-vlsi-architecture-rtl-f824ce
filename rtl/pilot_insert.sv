// pilot_insert: resource-element mapper that builds the 1024 IFFT inputs of one OFDM symbol.
//
// On each accepted command the unit walks the FFT bins 0..1023 in order and emits one
// sample per bin (see ofdm_pkg::sc_kind for the map):
//   DC and guard bins      zero
//   DMRS pilot bins        the entry of the 72-word DMRS register file for that pilot
//                          (active index a with a % 12 == 0)
//   PTRS bins              the DMRS value of the nearest pilot below
//   data bins              the next mapped symbol from the data input (it waits for it)
// An address comparator (sc_kind) selects the source per bin. A command with `cmd_training`
// set instead builds the synchronisation preamble: a fixed pseudo-random QPSK sequence on the
// even bins of the active band and zero on the odd bins, so that the time-domain symbol
// consists of two identical halves, as the Schmidl-Cox receiver requires.
// The DMRS register file resets to QPSK values from a PRBS-9 sequence (x^9 + x^5 + 1, seed
// all ones, two bits per pilot) with I/Q magnitude PILOT_AMP and can be rewritten through
// the write port.
// Timing: one bin per clock when data and the consumer keep up; output valid/ready.
module pilot_insert
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // symbol command
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic       cmd_training,
  // mapped data symbols
  input  logic       data_valid,
  output logic       data_ready,
  input  cplx_t      data_sym,
  // DMRS register file write port
  input  logic       dmrs_we,
  input  logic [6:0] dmrs_addr,
  input  cplx_t      dmrs_wdata,
  // frequency-domain samples, bin order
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_sym,
  output logic       out_last
);
  cplx_t dmrs_rf [N_PILOT];

  logic             busy, training;
  logic [LOG2N-1:0] bin;
  sc_kind_t         kind;
  logic [6:0]       pnum;
  logic             adv, need_data;
  cplx_t            nxt;
  logic [1:0]       tb;

  assign kind      = sc_kind(bin);
  assign pnum      = pilot_number(bin);   // for PTRS: the pilot just below
  assign need_data = !training && (kind == SC_DATA);
  assign adv       = busy && (!out_valid || out_ready) && (!need_data || data_valid);
  assign data_ready = busy && (!out_valid || out_ready) && need_data;
  assign cmd_ready = !busy;
  assign tb        = prbs_pair(int'(bin[LOG2N-1:1]));   // preamble signs, per even bin

  always_comb begin
    nxt = '0;
    if (training) begin
      if (kind != SC_NULL && !bin[0]) begin
        nxt.re = tb[0] ? -TRAIN_AMP : TRAIN_AMP;
        nxt.im = tb[1] ? -TRAIN_AMP : TRAIN_AMP;
      end
    end else begin
      case (kind)
        SC_DATA:  nxt = data_sym;
        SC_PILOT, SC_PTRS: nxt = dmrs_rf[pnum];
        default:  nxt = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PILOT; i++) dmrs_rf[i] <= dmrs_default(i);
    end else if (dmrs_we) begin
      dmrs_rf[dmrs_addr] <= dmrs_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      training <= 1'b0;
      bin <= '0;
      out_valid <= 1'b0;
      out_sym <= '0;
      out_last <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!busy) begin
        if (cmd_valid) begin
          busy <= 1'b1;
          training <= cmd_training;
          bin <= '0;
        end
      end else if (adv) begin
        out_valid <= 1'b1;
        out_sym <= nxt;
        out_last <= (bin == LOG2N'(NFFT - 1));
        bin <= bin + 1'b1;
        if (bin == LOG2N'(NFFT - 1)) busy <= 1'b0;
      end
    end
  end
endmodule
