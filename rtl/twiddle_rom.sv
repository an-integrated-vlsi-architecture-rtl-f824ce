// twiddle_rom: read-only store of the 1024-point twiddle factors W^k = exp(-j*2*pi*k/1024),
// k = 0..511, in Q1.15 (16-bit I and Q).
//
// Entry k holds {round(32768*cos(2*pi*k/1024)), round(-32768*sin(2*pi*k/1024))}, saturated
// to 16 bits, and is loaded from twiddle_rom.hex. Half a period is enough because a radix-2
// DIF stage only needs exponents below N/2. An SDF stage s reads exponent m * 2^s, so the
// `addr` input is the stage-local index m and STRIDE_LOG2 = s.
// The read is synchronous (one enabled clock): the stage presents the index of the next
// sample, so the registered output acts as the prefetch buffer that hides the ROM access.
// `conj` returns the complex conjugate, which turns the forward transform into the inverse
// one; this is the conjugation bit through which transmitter and receiver share one core.
module twiddle_rom
  import ofdm_pkg::*;
#(
  parameter int unsigned STRIDE_LOG2 = 0,
  parameter int unsigned AW = 9            // width of the stage-local index
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  input  logic          conj,
  output cplx_t         w
);
  localparam int unsigned DEPTH = 512;
  logic [31:0] rom [DEPTH];

  initial $readmemh("rtl/twiddle_rom.hex", rom);

  logic [8:0] k;
  assign k = 9'(32'(addr) << STRIDE_LOG2);

  logic signed [15:0] im_raw;
  assign im_raw = rom[k][15:0];

  always_ff @(posedge clk) begin
    if (en) begin
      w.re <= rom[k][31:16];
      // -(-32768) does not fit: the conjugate of that entry saturates to +32767
      if (!conj)                     w.im <= im_raw;
      else if (im_raw == -16'sd32768) w.im <= 16'sd32767;
      else                           w.im <= -im_raw;
    end
  end
endmodule
