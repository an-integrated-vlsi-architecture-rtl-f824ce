// qam_mapper: Gray-coded constellation mapper for BPSK, QPSK, 16-, 64- and 256-QAM.
//
// Each accepted word carries up to eight bits, bit 0 first; the low bits_per_symbol(mod) bits
// are used. A ROM of 256 entries per order (contents computed at start-up) gives the 5-bit
// signed axis levels LI, LQ in {+-1, +-3, ..., +-15}, following the 3GPP TS 38.211
// bit-to-level rules: even bits b0, b2, b4, b6 select I and odd bits select Q, e.g. for
// 256-QAM  LI = (1-2b0)(8-(1-2b2)(4-(1-2b4)(2-(1-2b6)))). BPSK uses LI = LQ = 1-2b0.
// The levels are then multiplied by the order's amplitude unit qam_scale(mod), which gives
// every order about the same mean energy, into the 16-bit I/Q samples of the IFFT input.
// Timing: one symbol per clock, one clock of latency; valid/ready handshake on both sides.
module qam_mapper
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mod_t       mod,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_bits,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_sym
);
  // Gray level of one axis from its k bits a[0..k-1] (a[0] is the sign bit)
  function automatic int axis_level(logic [3:0] a, int k);
    int v;
    v = 1;
    for (int i = k - 1; i >= 1; i--) v = (1 << (k - i)) - (a[i] ? -v : v);
    return a[0] ? -v : v;
  endfunction

  // {LI[4:0], LQ[4:0]} of bit word w for order m
  function automatic logic [9:0] lut_entry(int m, logic [7:0] w);
    int li, lq, k;
    k = (m == 0) ? 1 : m;   // bits per axis: BPSK 1 (shared), QPSK 1, 16Q 2, 64Q 3, 256Q 4
    li = axis_level({w[6], w[4], w[2], w[0]}, k);
    lq = (m == 0) ? li : axis_level({w[7], w[5], w[3], w[1]}, k);
    return {5'(li), 5'(lq)};
  endfunction

  // the constellation ROM: 256 entries per order, contents fixed at start-up
  logic [9:0] rom [5][256];
  initial begin
    for (int m = 0; m < 5; m++)
      for (int w = 0; w < 256; w++) rom[m][w] = lut_entry(m, 8'(w));
  end

  logic [9:0]  lv;
  logic [7:0]  mask;
  logic signed [12:0] sc;

  always_comb begin
    case (mod)
      MOD_BPSK:  mask = 8'h01;
      MOD_QPSK:  mask = 8'h03;
      MOD_QAM16: mask = 8'h0f;
      MOD_QAM64: mask = 8'h3f;
      default:   mask = 8'hff;
    endcase
    lv = rom[(mod > MOD_QAM256) ? 3'd4 : mod][in_bits & mask];
    sc = signed'({1'b0, qam_scale(mod)});
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym.re <= 16'($signed(lv[9:5]) * sc);
        out_sym.im <= 16'($signed(lv[4:0]) * sc);
      end
    end
  end
endmodule
