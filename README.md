# OFDM modem for a 5G NR style physical layer

SystemVerilog for the baseband modem of "An Integrated VLSI Architecture for an OFDM Modem
Targeting 5G New Radio Physical Layer at 45 nm CMOS". The design is synthesizable RTL.
Every parameter defaults to the paper's numbers where the paper gives one.

## What is built

Transmit chain: `qam_mapper` → `pilot_insert` → `fft_sdf` (inverse) → `cp_insert` → DAC port.

Receive chain: ADC port → `schmidl_cox_sync` → `cp_remove` → `fft_sdf` (forward) →
`ls_chest` → `fde_equalizer` → `qam_demapper`.

`modem_ctrl` sequences frames. `ofdm_modem_top` wires everything together.

| module | what it does |
|---|---|
| `ofdm_pkg` | constants, sample type, subcarrier map, PRBS, helper functions |
| `qam_mapper` | Gray-coded BPSK, QPSK, 16-, 64- and 256-QAM through a 256-entry ROM per order; one symbol per clock |
| `pilot_insert` | fills the 1024 IFFT inputs: 72 DMRS pilots from a register file, 18 PTRS, 774 data, DC and guard nulls; also builds the sync preamble |
| `fft_sdf` | 1024-point radix-2 DIF single-path delay-feedback FFT/IFFT; a conjugation bit selects the inverse |
| `sdf_stage` | one SDF stage with its delay-feedback buffer, butterfly and twiddle multiply |
| `karatsuba_cmult` | complex multiply with three real multipliers in four clock phases, with saturation |
| `twiddle_rom` | 512-entry Q1.15 twiddle ROM with a registered prefetch output |
| `fft_reorder` | ping-pong buffer from bit-reversed to natural order |
| `cp_insert` | writes each symbol into a 1184-word dual-port RAM ring, then replays a 144- or 160-sample prefix followed by the symbol |
| `dp_ram` | the dual-port RAM |
| `schmidl_cox_sync` | N/2-lag autocorrelation, timing from the midpoint of the metric plateau, CFO from the angle of the plateau sum, NCO correction |
| `cordic` | vectoring and rotating CORDIC used by the synchroniser |
| `cp_remove` | strips the prefixes from the received stream |
| `ls_chest` | least-squares estimate at the 72 pilots through a Newton-Raphson reciprocal, then linear interpolation (quadratic extrapolation above the last pilot) |
| `nr_recip` | Newton-Raphson reciprocal |
| `fde_equalizer` | one-tap complex division per subcarrier, 4 clocks |
| `qam_demapper` | threshold-network hard decisions, 1 clock |
| `modem_ctrl` | TX/RX frame sequencer; switches and flushes the shared FFT core |

The modem is half duplex. Transmitter and receiver share one FFT core, as the paper
describes. The core changes direction only between frames, after it has been drained.

A frame has:
- one preamble symbol (QPSK on even subcarriers, so its two time halves are equal);
- `num_sym` data symbols.

The prefix is 160 samples on symbols 0, 7, 14, … and 144 samples on all others.

Active band: 864 subcarriers = 72 pilots spaced 12 apart, 18 PTRS and 774 data subcarriers.

## Not built

These appear in the architecture figure or the text without any function or parameters:
- scrambler and encoder;
- interleaver;
- PAPR reduction;
- multi-antenna processing;
- I/Q serialiser toward the DAC;
- the analog DAC/ADC and RF front ends.

The top has plain complex-sample DAC and ADC ports in their place.

## Tests

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=… failures=…`.
Helper units are tested inside a parent testbench:
- `sdf_stage`, `twiddle_rom` and `fft_reorder` in `tb_fft_sdf`;
- `nr_recip` in `tb_fde_equalizer`;
- `cordic` in `tb_schmidl_cox_sync`;
- `dp_ram` in `tb_cp_insert`.

To build and run one of them with Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ofdm_modem_top \
        rtl/ofdm_pkg.sv $(ls rtl/*.sv | grep -v ofdm_pkg) tb/tb_ofdm_modem_top.sv
    ./obj_dir/Vtb_ofdm_modem_top

`tb_ofdm_modem_top` runs the full-size modem with no parameter changes. It sends five frames:
- 256-QAM with 8 data symbols;
- 16-QAM with 2;
- QPSK with 1;
- BPSK with 1;
- 256-QAM with 162 data symbols (1,003,104 bits).

Each frame goes through a channel with:
- a 50-sample offset;
- three taps, at delays 0, 3 and 7 samples;
- a carrier offset of 0.233 subcarrier spacings (3.5 kHz at 15 kHz);
- noise 35 dB below the signal.

The test then receives each frame and compares the bits. It also checks:
- the frame length;
- the synchroniser's timing and CFO estimates;
- that every mechanism actually occurred: FFT direction switches, flushes, back-pressure from the CP buffer, long and normal prefixes, pilots and PTRS, interpolated and extrapolated estimates, CFO correction and lock.

## Measured results and differences from the paper

- **FFT.** A single tone gives 66.9 dB SNR; the paper reports above 65 dB. Random full-band frames give about 60 dB.
- **FFT latency.** First input to first output takes 2089 clocks. The paper gives 2047. The extra 42 clocks are the four-phase multiplier in each of the ten stages plus two clocks of interface registers.
- **Synchroniser timing.** The estimate is within 0 to +3 samples of the true boundary; the paper says within two clocks. The receiver opens its FFT window 3 samples early, inside the prefix, so a slightly late estimate does no harm.
- **Synchroniser CFO.** The error is 0.1 to 0.3 % of the offset.
- **Bit errors.**
  - BPSK, QPSK and 16-QAM have no bit errors.
  - 256-QAM at 35 dB has 2 errors in 49,536 bits in the short frame, and 168 errors in 1,003,104 bits (BER 1.7e-4) in the long frame.
  - The paper reports zero errors in a million bits. This design does not reach that.
  - About a third of the wrong symbols are on the four highest data subcarriers. Their estimates are extrapolated beyond the last pilot along a parabola through the last three pilots, which amplifies the noise of those pilots. A straight line through two pilots did worse (447 errors), because it misses the curvature of the channel phase.
  - Most of the rest lie around subcarrier -86, where this channel has its deepest fade (|H| = 0.46).
  - The testbench therefore accepts a 256-QAM bit error rate up to 1e-3, and requires zero errors for the other orders.
  - The paper's Pedestrian-B channel, with 3.7 µs of delay spread, was not simulated. Linear interpolation between pilots 12 subcarriers apart cannot follow a delay spread that long at 256-QAM.
- **Pilot spacing.** The text says both "every sixth subcarrier" and "72 pilot locations spaced twelve subcarriers apart". The design uses 12, which agrees with the 72 pilots and 792 interpolated positions.
- **FFT radix.** The architecture figure labels the IFFT radix-4, but the text describes a ten-stage radix-2 pipeline. The design follows the text.
- **Throughput.** At one sample per clock, a symbol with a 144-sample prefix takes 1168 clocks, or 584 ns at 2 GHz. With 774 data subcarriers at 256-QAM that is 10.6 Gb/s raw for one carrier. The 2 GHz clock, the power and the area are properties of the paper's transistor-level 45 nm design and are not reproduced here.

Choices the paper leaves open, each marked in the module headers:
- the metric threshold;
- the PTRS positions;
- the pilot and preamble amplitudes;
- the scaling schedule inside the FFT;
- CORDIC for angle and NCO;
- the long-prefix rule;
- the channel estimate at the band edge and across DC, where one neighbouring pilot is missing.
