// ofdm_pkg: types, sizes and subcarrier-map functions shared by the whole modem.
//
// Samples are complex numbers with 16-bit signed I and Q (two's complement integers;
// constellation points are small odd integers scaled by a per-order factor, see
// qam_scale). The 1024-point transform, the 144/160-sample cyclic prefixes, the 12-subcarrier
// pilot spacing and the 72 pilots / 864 active subcarriers follow the modem description; the
// placement of the active band around DC, the PTRS positions and all fixed-point scalings
// are this design's own choices and are documented next to each item.
package ofdm_pkg;

  localparam int unsigned NFFT       = 1024;  // transform size
  localparam int unsigned LOG2N      = 10;
  localparam int unsigned CP_NORMAL  = 144;   // cyclic prefix, normal symbols
  localparam int unsigned CP_LONG    = 160;   // cyclic prefix, first symbol of a group
  localparam int unsigned CP_BUF     = 1184;  // CP buffer depth = NFFT + CP_LONG
  localparam int unsigned N_ACTIVE   = 864;   // active subcarriers (72 pilots x 12)
  localparam int unsigned HALF_ACT   = N_ACTIVE / 2;
  localparam int unsigned PILOT_SP   = 12;    // DMRS pilot spacing in active subcarriers
  localparam int unsigned N_PILOT    = N_ACTIVE / PILOT_SP;  // 72
  localparam int unsigned PTRS_SP    = 48;    // one PTRS tone every 48 active subcarriers
  localparam int unsigned PTRS_OFS   = 30;    // PTRS offset inside each 48-block
  localparam int unsigned N_PTRS     = N_ACTIVE / PTRS_SP;   // 18
  localparam int unsigned N_DATA     = N_ACTIVE - N_PILOT - N_PTRS;  // 774 data subcarriers
  localparam int unsigned LONG_CP_PERIOD = 7; // every 7th symbol (index 0, 7, ...) uses CP_LONG
  localparam logic signed [15:0] PILOT_AMP = 16'sd3328;  // DMRS I and Q magnitude (data +3 dB)
  localparam logic signed [15:0] TRAIN_AMP = 16'sd3504;  // training I/Q magnitude (same symbol energy)

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx_t;

  // Modulation order, in increasing order of bits per symbol (1, 2, 4, 6, 8); use
  // bits_per_symbol() for the bit count.
  typedef enum logic [2:0] {
    MOD_BPSK  = 3'd0,
    MOD_QPSK  = 3'd1,
    MOD_QAM16 = 3'd2,
    MOD_QAM64 = 3'd3,
    MOD_QAM256 = 3'd4
  } mod_t;

  typedef enum logic [1:0] {
    SC_NULL  = 2'd0,
    SC_DATA  = 2'd1,
    SC_PILOT = 2'd2,
    SC_PTRS  = 2'd3
  } sc_kind_t;

  function automatic logic [3:0] bits_per_symbol(mod_t m);
    case (m)
      MOD_BPSK:  return 4'd1;
      MOD_QPSK:  return 4'd2;
      MOD_QAM16: return 4'd4;
      MOD_QAM64: return 4'd6;
      default:   return 4'd8;
    endcase
  endfunction

  // Per-axis amplitude unit s of each order. A constellation coordinate is L*s with L an
  // odd integer; s equalises the mean symbol energy (about 1.11e7) across the orders.
  function automatic logic [11:0] qam_scale(mod_t m);
    case (m)
      MOD_BPSK:  return 12'd2360;
      MOD_QPSK:  return 12'd2360;
      MOD_QAM16: return 12'd1056;
      MOD_QAM64: return 12'd515;
      default:   return 12'd256;
    endcase
  endfunction

  // Active-subcarrier index (0..863) of FFT bin b, or -1 when b is DC or guard band.
  // Active indices 0..431 sit on the negative frequencies (bins 592..1023), 432..863 on the
  // positive ones (bins 1..432).
  function automatic int active_index(int unsigned b);
    if (b >= 1 && b <= HALF_ACT) return int'(HALF_ACT + b - 1);
    if (b >= NFFT - HALF_ACT)    return int'(b - (NFFT - HALF_ACT));
    return -1;
  endfunction

  function automatic sc_kind_t sc_kind(logic [LOG2N-1:0] bin);
    int a;
    a = active_index(int'(bin));
    if (a < 0) return SC_NULL;
    if (a % PILOT_SP == 0) return SC_PILOT;
    if (a % PTRS_SP == PTRS_OFS) return SC_PTRS;
    return SC_DATA;
  endfunction

  // Pilot number (0..71) of a pilot bin.
  function automatic logic [6:0] pilot_number(logic [LOG2N-1:0] bin);
    int a;
    a = active_index(int'(bin));
    return 7'(a / PILOT_SP);
  endfunction

  // First 1024 output bits of a PRBS-9 sequence (x^9 + x^5 + 1, register seeded with all
  // ones), bit i of the stream at position i.
  localparam logic [1023:0] PRBS9_BITS =
    1024'hc3dc2cdbd0e6122baf25ce0774f528155f5a0ddb582ef8f34d71a2fe96298c066564fda49bf2d4289d97b0d5390c42011191d5b1c4a8d9f3c5b94826747de0ff87b859b7a1cc24575e4b9c0ee9ea502abeb41bb6b05df1e69ae345fd2c53180ccac9fb4937e5a8513b2f61aa721884022323ab638951b3e78b72904ce8fbc1ff;

  // Bits 2*idx (returned in [0], the I sign) and 2*idx+1 (in [1], the Q sign) of the stream.
  function automatic logic [1:0] prbs_pair(int idx);
    return {PRBS9_BITS[2 * idx + 1], PRBS9_BITS[2 * idx]};
  endfunction

  // Reset value of DMRS pilot i: QPSK with I/Q magnitude PILOT_AMP, signs from prbs_pair(i).
  function automatic cplx_t dmrs_default(int i);
    cplx_t c;
    logic [1:0] b;
    b = prbs_pair(i);
    c.re = b[0] ? -PILOT_AMP : PILOT_AMP;
    c.im = b[1] ? -PILOT_AMP : PILOT_AMP;
    return c;
  endfunction

  function automatic logic [LOG2N-1:0] bitrev(logic [LOG2N-1:0] x);
    logic [LOG2N-1:0] r;
    for (int i = 0; i < LOG2N; i++) r[i] = x[LOG2N-1-i];
    return r;
  endfunction

  // Saturate a wide signed value to 16 bits.
  function automatic logic signed [15:0] sat16(logic signed [39:0] v);
    if (v > 40'sd32767)  return 16'sd32767;
    if (v < -40'sd32768) return -16'sd32768;
    return v[15:0];
  endfunction

endpackage
