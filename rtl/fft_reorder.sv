// fft_reorder: turns the bit-reversed output of the SDF pipeline into natural order and
// emits each transform as one gap-free burst.
//
// Two banks of N complex words are used in ping-pong. The write side follows the SDF
// pipeline: on every enabled clock it stores the sample at address bitrev(index), where the
// index counter starts at INIT so that it is aligned with the pipeline's frame boundaries.
// When the last sample of a frame lands and the frame carried real data (`in_valid` of that
// sample), the bank is marked full and the write side moves to the other bank. A full bank
// is read out in natural order, one sample per clock, starting when `out_ready` says the
// consumer has room for a whole frame. `can_accept` is low while the bank being written is
// still full, which stalls the pipeline in front.
// Timing: a frame's first output sample follows its last input sample by one clock (when
// the consumer is ready); output bursts are exactly N clocks long.
module fft_reorder
  import ofdm_pkg::*;
#(
  parameter int unsigned N    = 1024,
  parameter int unsigned INIT = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,          // pipeline advance: a sample is presented on `din`
  input  logic  in_valid,    // that sample belongs to real data (not flush)
  input  cplx_t din,
  output logic  can_accept,
  input  logic  out_ready,   // consumer has room for a complete frame
  output logic  out_valid,
  output logic  out_first,
  output logic  out_last,
  output cplx_t dout
);
  localparam int unsigned AW = $clog2(N);

  cplx_t mem [2][N];
  logic [AW-1:0] widx, ridx, widx_rev;
  logic          wb, rb, reading;
  logic [1:0]    full;

  always_comb
    for (int i = 0; i < AW; i++) widx_rev[i] = widx[AW-1-i];

  assign can_accept = !full[wb];

  always_ff @(posedge clk) begin
    if (en && can_accept) mem[wb][widx_rev] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx <= AW'(INIT);
      wb   <= 1'b0;
      rb   <= 1'b0;
      full <= '0;
      reading <= 1'b0;
      ridx <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      dout <= '0;
    end else begin
      // write side
      if (en && can_accept) begin
        widx <= widx + 1'b1;
        if (widx == AW'(N - 1)) begin
          if (in_valid) begin
            full[wb] <= 1'b1;
            wb <= ~wb;
          end
        end
      end
      // read side
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      if (!reading) begin
        if (full[rb] && out_ready) begin
          reading <= 1'b1;
          ridx <= '0;
        end
      end else begin
        dout <= mem[rb][ridx];
        out_valid <= 1'b1;
        out_first <= (ridx == '0);
        out_last  <= (ridx == AW'(N - 1));
        ridx <= ridx + 1'b1;
        if (ridx == AW'(N - 1)) begin
          reading <= 1'b0;
          full[rb] <= 1'b0;
          rb <= ~rb;
        end
      end
    end
  end
endmodule
