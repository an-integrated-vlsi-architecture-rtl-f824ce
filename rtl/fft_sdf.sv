// fft_sdf: streaming N-point FFT / IFFT, radix-2 decimation in frequency, single-path delay
// feedback (SDF) pipeline of log2(N) stages followed by a natural-order output buffer.
//
// One complex sample enters per clock while the pipeline advances. Stage s has a feedback
// buffer of N/2^(s+1) words (N - 1 words in all) and a four-phase Karatsuba twiddle
// multiplier. The same core computes both directions: `inverse` conjugates every twiddle
// factor (transmitter IFFT), otherwise it computes the forward FFT (receiver). `inverse`
// may only change while `idle` is high.
// Fixed-point scaling: the stages whose bit is set in SCALE_MASK halve their butterfly
// outputs (five of ten by default), so IFFT followed by FFT has unit gain: the IFFT returns
// x[n] = (1/32) sum X[k] W^-nk and the FFT returns X[k] = (1/32) sum x[n] W^nk.
// Overflow in unscaled stages saturates.
//
// Flow control: the pipeline advances when `in_valid && in_ready`, or, while `flush` is
// held, with zero samples until every accepted sample has left and the input is back at a
// frame boundary (`idle`). Frames are N consecutive accepted samples, the first one after
// reset starting a frame. Output comes from fft_reorder in gap-free bursts of N samples in
// natural bin order; a burst starts only when `out_ready` (room for a whole frame) is high.
// Latency: the SDF part is sum(N/2^(s+1) + 4) = N - 1 + 4*log2(N) advances (1063 for
// N = 1024); the first output sample of a frame follows the last input sample by that
// many advances plus two clocks. With a continuous input the first output sample of a frame
// thus appears 2*N + 4*log2(N) + 1 clocks after its first input sample.
module fft_sdf
  import ofdm_pkg::*;
#(
  parameter int unsigned     N          = 1024,
  parameter logic [31:0]     SCALE_MASK = 32'b1010101010
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inverse,
  input  logic  flush,
  output logic  idle,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t din,
  input  logic  out_ready,
  output logic  out_valid,
  output logic  out_first,
  output logic  out_last,
  output cplx_t dout
);
  localparam int unsigned S   = $clog2(N);
  localparam int unsigned LAT = N - 1 + 4 * S;   // SDF latency in advances

  function automatic int unsigned pre_lat(int unsigned s);
    int unsigned acc = 0;
    for (int unsigned j = 0; j < s; j++) acc += (N >> (j + 1)) + 4;
    return acc;
  endfunction

  logic          adv, can_accept, draining;
  logic [S-1:0]  in_idx;
  logic [15:0]   inflight;
  cplx_t         stage_in [S+1];

  // valid flag of every sample, delayed by the pipeline latency
  logic          vdl [LAT];
  logic [$clog2(LAT)-1:0] vptr;
  logic          primed, v_out;
  logic [$clog2(LAT+1)-1:0] adv_cnt;

  assign draining = (inflight != 16'd0) || (in_idx != '0);
  assign in_ready = can_accept;
  assign adv      = can_accept && (in_valid || (flush && draining));
  assign idle     = !draining;
  assign stage_in[0] = in_valid ? din : '0;
  assign v_out    = primed && vdl[vptr];

  always_ff @(posedge clk) begin
    if (adv) vdl[vptr] <= in_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_idx   <= '0;
      inflight <= '0;
      vptr     <= '0;
      adv_cnt  <= '0;
      primed   <= 1'b0;
    end else if (adv) begin
      in_idx  <= in_idx + 1'b1;
      vptr    <= (vptr == ($clog2(LAT))'(LAT - 1)) ? '0 : vptr + 1'b1;
      if (!primed) begin
        adv_cnt <= adv_cnt + 1'b1;
        if (adv_cnt == ($clog2(LAT+1))'(LAT - 1)) primed <= 1'b1;
      end
      inflight <= inflight + 16'(in_valid) - 16'(v_out);
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    sdf_stage #(
      .N(N), .STAGE(s), .PRE_LAT(pre_lat(s)), .SCALE(SCALE_MASK[s])
    ) u_stage (
      .clk(clk), .rst_n(rst_n), .en(adv), .inverse(inverse),
      .din(stage_in[s]), .dout(stage_in[s+1])
    );
  end

  fft_reorder #(.N(N), .INIT((N - (LAT % N)) % N)) u_reorder (
    .clk(clk), .rst_n(rst_n), .en(adv), .in_valid(v_out), .din(stage_in[S]),
    .can_accept(can_accept), .out_ready(out_ready),
    .out_valid(out_valid), .out_first(out_first), .out_last(out_last), .dout(dout)
  );
endmodule
