# Frequency-multiplexed read-out front end for a Kinetic Inductance Detector array

A Kinetic Inductance Detector (KID) is a superconducting resonator. A photon that
hits it changes its inductance, which moves its resonance and changes the
amplitude and phase of a tone passing it at its resonant frequency. An array of
KIDs can be read through a single feed line if every pixel is built to resonate at
its own frequency. The line carries a *comb*, the sum of one sinusoid per pixel.
Each pixel affects only its own tone, and demodulating the returning signal tone by
tone gives every pixel's amplitude and phase at once.

This RTL is the FPGA side of such a read-out for 128 pixels:

* 128 **sinusoid generators**, one per tone, each a direct digital synthesiser;
* an **adder** that sums them into the 15-bit comb for the DAC;
* 128 **lock-ins**, which multiply the digitised read-out signal by their tone's
  cosine and sine and average the products (in-phase and quadrature means);
* a **Frequency Loader**, a small AXI4-Lite peripheral through which an embedded
  processor writes the 128 tone frequencies with a simple strobe protocol;
* the control that starts the generators on a new frequency set and cuts the
  lock-in stream into averaging windows.

The processor, its bus, the DDR3 memory, the PCI Express link to the host PC,
the UART, the DAC, the ADC and the detector are not part of this RTL. The top
module brings out the ports where they connect.

```
             AXI4-Lite                      kid_clk domain
  processor ──────────► frequency_loader ──buf_we/addr/data──► freq_buffer ──► 128 x sinusoid_generator
                         │  (s_axi_aclk │                                         │ sin         │ sin, cos
                         │   domain)    └──frequencies_ok──► lockin_control       ▼             ▼
                         │                                   │ write_enable   comb_adder    128 x lock_in ◄── adc_data
                         │                                   │ windows           │              │ I, Q means
                         │                                   └──────────────────►│──────────────┤
                                                                          comb_signal ──► DAC   rd_ch/rd_i/rd_q,
                                                                                                data_available
```

## Loading a frequency set

The processor writes one 32-bit word per tone into register `0x0` of the Frequency
Loader (`frequencies_to_kid`):

| bits  | field         | meaning                                 |
|-------|---------------|-----------------------------------------|
| 19..0 | Data Register | frequency (tuning) word of the tone     |
| 27..20| Address Register | tone number, 0..127                 |
| 30..28| reserved      | ignored                                 |
| 31    | Data Strobe   | validates the word                      |

The protocol for each tone is:

1. write the word with bit 31 clear (frequency and address);
2. write the same word with bit 31 set;
3. keep the strobe high for a while (480 ns in the reference software, 120 sample
   clocks at 250 MHz), then write the word with bit 31 clear.

After all 128 words, the processor sets bit 0 of register `0x4` (`flags_to_kid`).
The Frequency Loader turns the rising edge of that bit into a one-clock
`frequencies_ok` pulse. It clears it again before the next set. Both registers
read back what was written, and byte strobes are honoured.

The long strobe lets the peripheral cross clock domains without a handshake. The
register bank runs on the processor clock `s_axi_aclk`, and the state machine that
writes the buffer runs on the sample clock `kid_clk`. The strobe bit and the flag
bit each pass through a two-flop synchroniser. The data and address fields are not
synchronised. The state machine reads them only after the synchronised strobe has
been high for a clock, and the protocol keeps them unchanged for as long as the
strobe is high. The state machine writes the buffer once and then waits for the
strobe to go low, so a long strobe never writes twice. The strobe must stay high
for at least three `kid_clk` periods plus one `s_axi_aclk` period. 480 ns is far
more than that. `words_loaded` counts the words written since the last
`frequencies_ok`.

A word addressed to a tone ≥ 128 is dropped by the buffer.

Paced at 1.7 µs per word, the processor moves the whole set in about 218 µs.

## Starting the generators: Write Enable

`frequencies_ok` becomes `write_enable` exactly one `kid_clk` later. On the edge
that samples `write_enable`, every generator copies its word from the buffer and
resets its phase to zero. The buffer can therefore be rewritten while the old set
keeps playing, and all tones switch to the new set on the same clock, phase-aligned.
Before the first `write_enable` the generators output zero and the comb is silent.

## Sinusoid generators and the comb

Each generator is a 20-bit phase accumulator that adds its frequency word every
clock. Its top 10 bits address a 1024-entry sine ROM, and the same address plus a
quarter period gives the cosine. Outputs are 14-bit two's complement, amplitude
8191. The tone frequency is

    f = word × f_clk / 2^20        (238.4 Hz per step at f_clk = 250 MHz)

The largest useful word is just under 2^19, which is Nyquist. The ROM contents,
round(8191 · sin(2πk/1024)), are computed at elaboration time by a constant
function in `kid_pkg`, so there is no data file.

The comb adder sums the 128 sines at full precision (21 bits) in a pipelined
binary tree. It then divides by 64 (arithmetic shift) to fit the 15-bit DAC word.
The worst case, all tones at full scale at once, still fits, so there is no
saturation. The comb trails the generators by log2(128) = 7 clocks.

## Lock-ins and averaging windows

All lock-ins see the same ADC sample. Lock-in *k* multiplies it by tone *k*'s
cosine and sine. It sums each product over a window of 2^`AVG_LOG2` samples
(default 1024, 4.1 µs at 250 MHz) and outputs the sums divided by the window length
(floor):

    I_k = floor( Σ adc[n]·cos_k[n] / 2^AVG_LOG2 ),   Q_k = floor( Σ adc[n]·sin_k[n] / 2^AVG_LOG2 )

If the read-out holds A·cos(ω_k n + φ) at tone *k*'s frequency, then
I_k ≈ 4096·A·cos φ and Q_k ≈ −4096·A·sin φ. Components at other tones average
towards zero; they cancel exactly when a window holds a whole number of their beat
periods. The delay of the DAC → detector → ADC loop is not compensated. It rotates
each tone's (I, Q) by a constant angle and leaves √(I²+Q²) unchanged.

Timing, counted from the clock in which `write_enable` is high (clock 0):

| clock                     | event                                              |
|---------------------------|----------------------------------------------------|
| 1                         | generators load; output still zero                 |
| 2                         | generator sample 0; lock-in sample 0 of window 0   |
| 2 + 7                     | comb sample of generator sample 0 on `comb_signal` |
| 2 + W·L + (L−1)           | last sample of window W (L = 2^AVG_LOG2)           |
| 2 + W·L + (L−1) + 2       | means of window W ready: `data_available` rises    |

The windows run back to back. When a window ends, its means replace the previous
ones in the lock-in output registers, and `data_available` goes high. It stays high
until `data_ack`. The means are read with `rd_ch` (tone) → `rd_i`, `rd_q`
(combinational, 32-bit two's complement; an out-of-range tone reads zero).
`window_count` counts windows since the last `write_enable`. If a window ends while
`data_available` is still high and not being acknowledged, the sticky `overrun` flag
is set. This means the reader lost a window. The next `write_enable` clears it.
The reader has one window (4.1 µs at the defaults) to copy the 256 words of a
window before they are overwritten.

## Ports of `kid_frontend_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `s_axi_*` | | | AXI4-Lite slave, clock `s_axi_aclk`, reset `s_axi_aresetn` (4-bit address, 32-bit data) |
| `kid_clk`, `kid_rst_n` | in | 1 | sample clock and its asynchronous, active-low reset |
| `comb_signal` | out | 15 | comb to the DAC, signed |
| `adc_data` | in | 14 | read-out sample from the ADC, signed |
| `frequencies_to_kid`, `flags_to_kid` | out | 32 | the two loader registers (processor clock domain) |
| `frequencies_ok`, `write_enable` | out | 1 | the two start pulses |
| `words_loaded` | out | 9 | words written since the last `frequencies_ok` |
| `acquiring` | out | 1 | lock-ins integrating |
| `data_available`, `data_ack`, `overrun` | out/in/out | 1 | result handshake |
| `window_count` | out | 32 | windows since `write_enable` |
| `rd_ch`, `rd_i`, `rd_q` | in/out/out | 8/32/32 | result read port |

Parameters: `N` (tones, default 128, a power of two) and `AVG_LOG2` (default 10).
The field widths are in `kid_pkg`.

## What the surrounding system does

In the reference system a soft processor runs a loop. It polls a "new frequencies
available" flag that the host PC sets in DDR3 after writing a frequency set there.
It copies the set into the Frequency Loader with the protocol above. It polls for new
lock-in data, copies the means to DDR3 and sets a "data available" code in a status
word there. The PC fetches the data over PCI Express DMA. The DDR3 layout has a
512-word data area and a 512-word control area: a PC status word, a system status
word and frequency words. All of that is software and vendor IP. Here the processor
side is the AXI4-Lite port, and the data side is the `rd_*`/`data_available` port,
which a processor or a DMA engine would read. One window's 256 means (128 × I, Q)
fit the 512-word data area.

## Where this RTL makes its own choices

The following are specified by the reference design and followed here:

* the block structure;
* 128 tones;
* the 20/8/1-bit fields at bits 19..0, 27..20 and 31 of the loader word;
* the strobe protocol;
* Write Enable one clock after Frequencies OK;
* 14-bit sine/cosine and the 15-bit comb;
* the 4 ns sample clock used in the benches.

Not specified there, and chosen here:

* the DDS itself: 20-bit phase, 1024-entry table, so the mapping from word to Hz is
  this design's;
* which output, the sine, feeds the adder, and the scaling of the sum;
* the ADC width (14 bits);
* the use of both I and Q references in each lock-in;
* the window length and the back-to-back windows;
* the 32-bit result format;
* the data-available/acknowledge/overrun handshake and the read port;
* the register offsets and the use of bit 0 of a second register as the
  Frequencies OK request;
* the two-flop synchronisers and the separate processor and sample clocks;
* reset values, which are all zero.

The reference simulation shows a constant idle comb value of `0x7F80` before the
generators start. Its origin is not explained, and here the idle comb is 0.

Sizes after coarse synthesis of the full top: about 4,000 word-level cells, about
37,900 flip-flop bits and 128 sine ROMs of 1024 × 14 bits (1.8 Mbit in total, which
block RAM would hold). Timing closure at 250 MHz has not been checked.

## Simulation

All files are SystemVerilog 2017. `rtl/kid_pkg.sv` must be read first. Each
testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_kid_frontend_top rtl/kid_pkg.sv tb/tb_kid_frontend_top.sv
./obj_dir/Vtb_kid_frontend_top
```

`-y rtl -y tb` lets verilator find every module by its file name; only the package
and the testbench are named. Swap in any other testbench name.

| testbench | what it covers |
|-----------|----------------|
| `tb_kid_frontend_top` | the whole front end at full size, 128 tones and 1024-sample windows (see below) |
| `tb_frequency_loader` | AXI4-Lite writes on a 100 MHz clock against a 250 MHz sample clock; one buffer write per strobe; `frequencies_ok` on flag edges; read-back; byte strobes |
| `tb_freq_buffer` | random writes, including tones ≥ 128 |
| `tb_sinusoid_generator` | sine and cosine sample by sample against `$sin`/`$cos`, for several words; load timing; restart |
| `tb_comb_adder` | random and full-scale inputs, exact sum and 7-clock latency |
| `tb_lock_in` | random windows with gaps and aborted windows; exact means; 2-clock result latency |
| `tb_lockin_control` | clock-by-clock Write Enable, window, data-available and overrun timing |
| `tb_daq_core` | 4 tones, 256-sample windows: every comb sample and every mean against a model; overrun; reload |
| `tb_pixel_hit` | full size; detector modelled pixel by pixel (`tb/kid_resonator_model.sv`); a change of one pixel's amplitude and phase shows up in its own lock-in only (see below) |

`tb_kid_frontend_top` takes about 10 s of simulation.

* **Transfer.** A bus-master model transfers 128 frequencies at 1.7 µs per word
  (tone 0 = 0x1FE, tone 1 = 0x38E, tone 127 = 0xC86E), plus one word for a tone that
  does not exist. It then raises Frequencies OK.
* **Loop-back.** The comb is looped back through `tb/kid_array_model.sv`: one clock
  of delay at half amplitude, a stand-in for DAC, detector and ADC.
* **Checks.** The bench checks comb samples and all 256 means of several windows
  against its own model. It checks Write Enable timing and an overrun.
* **Reload.** A second frequency set is loaded during acquisition, with results
  checked after the reload.
* **Coverage.** It counts each of these events and fails if one never happened.

`tb_pixel_hit` places the 128 tones on the window grid. Tone *k* makes 3(k+1)
whole cycles per 1024-sample window, so the tones are 0.73 MHz apart, up to
94 MHz. Each tone returns from the detector model with a per-pixel gain and phase
shift. The bench changes one pixel as a photon absorption would. It then checks that
the pixel's lock-in reports the new amplitude ratio within 1 % and the phase shift
within 0.5°, and that the other 127 lock-ins change by less than 0.2 % of full
scale.
