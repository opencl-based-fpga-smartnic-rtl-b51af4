# 5G DU Low-PHY on an FPGA SmartNIC: IFFT/FFT and cyclic prefix in RTL

The lowest part of the physical layer of a 5G distributed unit (DU) is
mostly Fourier transforms:

- **Downlink.** Each OFDM symbol arrives as N frequency-domain IQ samples. It
  goes through an N-point inverse FFT. The last N/12.8 time-domain samples are
  then copied in front of it as a cyclic prefix (CP).
- **Uplink.** The CP is dropped and an N-point FFT returns the samples to the
  frequency domain.

This RTL puts both chains on one FPGA. The FPGA also acts as the network card
(a "SmartNIC"), so the downlink can send finished symbols straight to the
radio unit instead of back to the host. Two downlink sources are supported and
can be switched symbol by symbol:

- symbols the host has placed in the board's DDR4 memory (functional split
  option 2, where the DU software runs on the host);
- symbols that arrive from the network (split option 7-1, where the frequency-
  domain samples come from a remote unit).

Sizes of 4 to 2048 points are chosen at run time. The 5G sizes are 128 to
2048 points, with CP lengths of 10, 20, 40, 80 and 160 samples.

## Data path

```
 DDR4 ──avm──► gmem_reader ─┐
                            ├─(per-symbol select)─► fft_core (IFFT) ─► cp_insert ─► ocl_channel ─► tx (to radio unit)
 rx ──► ocl_channel ────────┘

 ul_in (from radio unit) ─► cp_remove ─► fft_core (FFT) ─► ul_out
```

| Module | Role |
|---|---|
| `lowphy_top` | Wires both chains; source mux; CP length from the size |
| `fft_core` | Memory-based mixed radix-4/radix-2 FFT or IFFT (parameter `INVERSE`) |
| `fft_digit_reverse` | Input reordering map (natural order to digit-reversed memory position) |
| `fft_twiddle_rom` | 2048-entry table of exp(-j2πe/2048), computed at elaboration |
| `fft_cmul` | Complex multiply by a twiddle (or its conjugate for the IFFT) |
| `fft_radix_butterfly` | Radix-4 butterfly, or radix-2 when asked |
| `cp_insert` | Buffers one symbol, then sends the last CP samples followed by the whole symbol |
| `cp_remove` | Drops the first CP samples of each incoming symbol, passes the rest through |
| `ocl_channel` | First-word-fall-through FIFO; models a kernel-to-I/O channel |
| `gmem_reader` | Pipelined read master for 1024-bit (128-byte) memory words; unpacks 32 samples per word |
| `lowphy_pkg` | `iq_t` (16-bit re/im), size limits, `cp_len_for()` |

Every stream is valid/ready. A sample moves when both are high on a rising
edge. Samples are `lowphy_pkg::iq_t`, a packed struct `{im, re}` with `re` in
bits 15:0. Reset is active-low and synchronous everywhere.

## The FFT engine (`fft_core`)

This is the part that needs the most explanation. Rather than a fully
parallel transform, it is one working memory of 2^LOG2_NMAX complex words and
a single datapath that walks through it. The datapath handles one sample per
clock.

### Three phases per symbol

1. **LOAD** (N clocks). Input sample *i* (natural order) is written to
   address `fft_digit_reverse(i)`. This reordering is what lets the stages
   work in place and the result come out in natural order.
2. **CALC.** There are ⌈log2 N / 2⌉ decimation-in-time stages. Radix-4 stages
   come first. When log2 N is odd (8, 32, 128, 512, 2048 points), one radix-2
   stage comes last. For 2048 points that is 5 radix-4 stages and 1 radix-2
   stage. Output `calc_radix2` is high during the radix-2 stage.
3. **OUT** (N clocks when not stalled). The memory is read in natural order.
   Each part is shifted right by `cfg_shift`, rounded half up and saturated
   to 16 bits.

The core takes a new symbol only after the last output sample has gone.
`cfg_log2n` and `cfg_shift` are sampled with the first input sample.

### Addressing inside a stage

Stage *s* combines sub-transforms of span 2^lq into sub-transforms of span
2^lb:

- For a radix-4 stage, lb = 2(s+1) and lq = lb − 2.
- For the final radix-2 stage, lb = log2 N and lq = lb − 1.

Butterflies are numbered g = 0 … N/R − 1, where R is the radix (4 or 2).
Split g into:

- j = g mod 2^lq, the position inside the sub-transform;
- b = g >> lq, the block.

Lane k of the butterfly (k = 0 … R−1) then reads and writes:

```
addr      = (b << lb) | (k << lq) | j
twiddle e = (j · k) << (LOG2_NMAX − lb)     // index into the 2048-entry table
```

The twiddle is applied before the butterfly, so this is a standard
decimation-in-time step. The IFFT uses the conjugate twiddle and swaps the ±j
outputs of the radix-4 butterfly.

### Pipeline and timing

Each clock, a stage reads one address. The twiddle ROM is read in the same
clock, and the multiply result is registered. Four products (or two) are
gathered, and the butterfly output goes into a small write-back queue. The
queue writes one sample per clock while later groups are still being read.
Reads and writes always touch different butterflies, so the single
read-port/write-port memory needs no hazard check. Each stage ends by draining
the pipeline:

| | clocks |
|---|---|
| radix-4 stage | N + 7 |
| radix-2 stage | N + 5 |
| last input accepted → first output valid | 2 + sum of stage times |

For 2048 points the last row is 12330 clocks. The next symbol's first sample
is taken one clock after the last output. Symbols fed back to back therefore
follow each other every 2N + (sum of stage times) + 1 clocks. That is 16425
clocks at 2048 points and 795 clocks at 128 points. The tests check the
latency at every size and the symbol period at 128 to 2048 points.

### Digit reversal (`fft_digit_reverse`)

For even log2 N, the input index is cut into 2-bit digits and the digit order
is reversed. The bits inside each digit keep their order. For odd log2 N, bit
0 of the index (the radix-2 digit) becomes the top bit of the address, and the
remaining bits are reversed digit by digit below it. This matches a
radix-4-first, radix-2-last decomposition.

### Fixed point

| Item | Format |
|---|---|
| Inputs | 16-bit signed parts |
| Internal samples | IW = 16 + LOG2_NMAX + 1 = 28 bits |
| Twiddles | 18 bits with 16 fraction bits, round to nearest |

Internal samples are wide enough for the full growth of a 2048-point
transform, so no stage scales or overflows. Products are rounded (add
2^15, then arithmetic shift by 16). All scaling is done at the output by
`cfg_shift`:

- `dl_shift = log2 N` gives the textbook inverse transform (1/N)·Σ X(k)e^{+j2πnk/N}.
- A smaller shift gives more gain, with saturation.

The error against a floating-point DFT stays within 2 + (log2 N · 2^(log2N/2+1)) >> shift
LSBs. The testbench checks this bound.

The twiddle table holds one full circle (2048 entries). It is computed at
elaboration with `$cos`/`$sin`, so no data file is needed. Smaller sizes use
every 2^(11 − log2 N)-th entry.

## Cyclic prefix

The CP length is computed from the size as `N*10/128`:

| N | CP samples |
|---|---|
| 128 | 10 |
| 256 | 20 |
| 512 | 40 |
| 1024 | 80 |
| 2048 | 160 |

- **`cp_insert`** stores a whole symbol, because the prefix is its tail and
  must be sent first. It then sends samples N−CP … N−1 followed by 0 … N−1.
  `m_cp` marks prefix samples and `m_last` marks the end of the symbol. The
  first output is valid two clocks after the last input.
- **`cp_remove`** needs no storage. It counts samples within the symbol and
  accepts-and-discards the first CP of them (`s_ready` is high while
  dropping, whatever the downstream does). It passes the other N through with
  zero latency. The size is sampled at the start of each symbol.

## Memory and network interfaces

- **`gmem_reader`** is started by the host (`gm_start`, byte address, number
  of 128-byte words).
  - It drives a memory-mapped read port: address and read are held while
    waitrequest is high; data returns in order with readdatavalid, at any
    latency.
  - It keeps several reads in flight, but only as many as its 4-word buffer
    can absorb. A stalled IFFT therefore never loses data.
  - Each word carries 32 samples; sample i sits in bits [32i +: 32].
  - 128 bytes per clock matches what a DDR4-2133 ×64 interface delivers to a
    266 MHz controller clock.
- **`ocl_channel`** is a plain FIFO (default depth 64) with a fill count.
  - The network input and output each go through one.
  - The tx channel carries `{last, cp, sample}`, so the network side sees
    symbol and prefix boundaries.
  - `rx_level`/`tx_level` show the fill counts.
- **Source select.** `dl_src_sel` is sampled at the first sample of each
  downlink symbol, so switching sources never splits a symbol.

## Departures and own choices

The reference design is an OpenCL kernel compiled by a high-level synthesis
flow. This RTL implements the same functions but not the same structure:

- **Architecture.** The reference unrolls the transform loops for a fixed size
  per build. Here, one memory-based engine (one sample per clock) handles every
  size from 4 to 2048 points at run time. This design is far smaller but
  slower: 16425 clocks per 2048-point symbol.
  - Real-time 15 kHz numerology (14 symbols per ms) needs at least about
    230 MHz. 30 kHz needs about 460 MHz.
  - No timing analysis has been done.
- **Reordering.** The reorder step is applied to the input (natural order in,
  natural order out). The reference describes a bit-reversed output
  converted back to natural order. Both ends see the same order either way.
- **Own choices.** These are not taken from the reference:
  - all widths other than the 16-bit IQ samples and the 128-byte memory word;
  - the rounding, scaling and saturation rules;
  - the valid/ready and memory-port protocols;
  - the FIFO depths;
  - the 4-word read buffer;
  - the per-symbol source switch.
- **Not covered.** 4096-point symbols (100 MHz carriers at 30 kHz) need
  `LOG2_NMAX = 12`. The 4-bit size ports would allow it, but it has not been
  simulated.

## What is outside this RTL

The host CPU and its software (High-PHY, MAC, RLC), the PCIe DMA and board
support logic, the DDR4 memory controller and devices, the Ethernet/QSFP MAC
and the radio unit are not included. Where they connect, `lowphy_top` has
ports:

- `gm_*`, the control written by the host;
- `avm_*`, the memory read port;
- `rx_*` and `tx_*`, the network channels;
- `ul_in_*` and `ul_out_*`, the uplink streams.

`tb/ddr4_model.sv` is a behavioural memory with random latency and
waitrequest stalls, used only by the testbenches.

A yosys run of `lowphy_top` at the default parameters gives about 1000 cells,
965 flip-flop bits and 451 kbit of memory. Most of that memory is:

- two 2048 × 56-bit working memories;
- two 2048 × 36-bit twiddle tables;
- the 2048 × 32-bit prefix-insertion buffer.

The FIFOs and the read buffer add the rest.

## Simulation

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if
something hangs.

- `tb_fft_core` compares both transforms with a direct DFT at 4, 8, 16, 128,
  256, 512, 1024 and 2048 points, with input gaps and output back-pressure. It
  also checks the latency formula.
- `tb_lowphy_top` runs the whole design at its default parameters:
  - a 2048-point symbol and two 128-point symbols from memory;
  - three network symbols (512, 512, 256 points);
  - 2048- and 128-point uplink symbols in parallel.

  It checks every output sample against a reference. It also counts that
  every mechanism happened: both sources, a source switch, radix-2 and
  radix-4-only sizes, memory waitrequest stalls, tx back-pressure, a full rx
  channel, CP insertion and CP removal.

- `tb_lowphy_workloads` runs two back-to-back symbols of each size from 128 to
  2048 points through both chains of the top. It checks every sample and the
  exact symbol period.

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/lowphy_pkg.sv tb/tb_lowphy_top.sv --top-module tb_lowphy_top
./obj_dir/Vtb_lowphy_top
```

Replace `tb_lowphy_top` with any other `tb_*` name to run that test. The
full end-to-end run takes well under a second.
