# A programmable baseband processor for WLAN-class modems

A WLAN receiver must finish a lot of complex arithmetic in a few microseconds per
OFDM symbol. A plain one-operation-per-cycle DSP cannot keep up. A fixed-function
ASIC keeps up but cannot follow new standards. This design takes the middle road.

- **Programmable core.** A small DSP core runs the irregular work in software:
  synchronisation, channel estimation, control.
- **CMAC.** The core is built around a complex multiply-accumulate unit that
  does one complex multiply-add per cycle. It is fed by address generators that
  do circular (modulo) addressing for free.
- **Configurable accelerators.** The fixed bit- and symbol-level functions have
  their own hardware: filter, RAKE combiner, 1/x, mapper, de-mapper,
  interleaver, CRC/scrambler, convolutional encoder, Viterbi decoder. Each is
  configured by the core.
- **Shared memory and DMA.** All units share a set of memory banks. A DMA
  manager streams a block from memory through one accelerator and back while
  the core keeps computing.

The RTL is IEEE 1800-2017 SystemVerilog and synthesizable. One module sits in
each file under `rtl/`; shared types and constants are in `rtl/bbp_pkg.sv`.
Every block has a self-checking testbench under `tb/`.

```
                 adc_*                                         dac_*
                   |                                             ^
                   +-------------+ (bypass)                      |
             +-----v-------+     |                               |
             |  fir_filter |     |                               |
             +-----+-------+     |                               |
             |rake_receiver|     |                               |
             +-----+-------+     |                               |
             +-----v-------------v+      +----------------+      |
             |   radio_rx_port    |      |  dma_manager   |------+ stream 6
             +--------+-----------+      +---+--------+---+
                      | write            read|   |    |write   streams 0-5, 7
   +----------+   +---v----------------------v---v----v--+    +-------------+
   | bbp_core |<->|              socbus                  |    | recip       |
   |  CMAC    |   |  4 banks x 1024 words (dm_bank)      |    | demapper    |
   |  AGUs    |   +--------------------^-----------------+    | interleaver |
   +----+-----+                        | host_*               | crc_scrambl.|
        |  configuration bus (OUT)     v                      | conv_encoder|
        +----------> every unit   application processor       | viterbi     |
                                                               | mapper      |
                                                               +-------------+
```

## Data format

The data word is 32 bits wide. On the symbol side one word is one complex
sample:

- bits [15:0] hold the real part (I);
- bits [31:16] hold the imaginary part (Q);
- both are 16-bit two's complement, read as Q1.15 fractions where that matters.

The bit-level accelerators use the same word but carry their bits in its low
end (bit 0 first):

- scrambler, CRC and encoder input: one bit per word;
- encoder output and Viterbi input: one coded pair per word;
- de-mapper output: one 1-, 2-, 4- or 6-bit label per word.

This way every unit can sit on the same memory and the same DMA stream.

## The core (`bbp_core`)

### Registers and address generators

- **Data registers.** Eight complex registers r0..r7.
- **Accumulators.** Four complex accumulators inside the CMAC, 32 bits per
  component.
- **Loop counter.** One hardware loop counter.
- **Address generators.** There are four AGUs. Each holds `base`, `len`, `ptr`
  and `step`.
  - A memory access through an AGU uses address `base + ptr`.
  - After the access, `ptr` advances by `step` modulo `len`.
  - Circular buffers, FIFO reads of the receive buffer and sliding convolution
    windows therefore cost no address instructions.
  - Reset sets `step` to 1.

### Instruction word

| bits | field |
|---|---|
| [31:27] | opcode |
| [26] | `conj` (use the conjugate of operand B) |
| [25] | `clr` (start the accumulator from zero) |
| [24:22] | `rd` |
| [21:19] | `rs`, or AGU A |
| [18:16] | `rt`, or AGU B |
| [15:0] | 16-bit immediate |

### Instructions

| instruction | effect | cycles |
|---|---|---|
| `CONV rd, A, B` | `acc[rd] (+)= sum mem[A] * (conj) mem[B]`: correlation and convolution | N+2 |
| `VMUL A, B, C` | `mem[C] = mem[A] * (conj) mem[B]`, rounded Q1.15, saturated; C in imm[1:0] | N+2 |
| `ENERGY rd, A` | `acc[rd] (+)= sum re^2 + im^2` | N+2 |
| `ABS rd, rs` | `rd = max(|re|,|im|) + 3/8 min(|re|,|im|)` | 1 |
| `LD rd, A` / `ST rs, A` | modulo FIFO access through AGU A | 2 / 1 |
| `LUT rd, rs, seg` | `rd = mem[seg + rs.re]` | 2 |
| `MOVACC rd, acc, sh` | `rd = sat16(acc >>> sh)` per component | 1 |
| `ADD`, `SUB` | component-wise, saturating | 1 |
| `LDIL`, `LDIH` | load the real / imaginary half of a register | 1 |
| `SETN n` | vector length for CONV/VMUL/ENERGY | 1 |
| `SETAGU a, field, v` | write base/len/ptr/step of an AGU | 1 |
| `SETC n`, `DBNZ target` | counted loop | 1 |
| `OUT addr8, rs` | write rs to the configuration bus | 1 |
| `WAITD` | stall until the DMA manager is idle | 1 + wait |
| `NOP`, `HALT` | | 1 |

### Pipeline and timing

- **Vector instructions.** One element enters the CMAC per cycle.
  - Operand A is read on SOCBUS read port 0 and operand B on port 1, so both
    operands may be in the same bank.
  - Two extra cycles drain the memory read and the CMAC product stage. A vector
    of N elements therefore takes N + 2 cycles, and its result can be used by
    the very next instruction.
- **Scalar instructions** are not pipelined.

### Program memory and start

- The program memory has 256 words. It is written through `im_we/im_addr/im_data`.
- A pulse on `start` runs the program from address 0.
- `halted` rises at `HALT`, and a new `start` runs again.

## The CMAC (`cmac`)

The complex multiply-accumulate unit has two stages.

**Stage 1: products.** Four 16x16 multipliers form the four real products of
`A = AR + jAI` and `B = BR + jBI`. The products are registered as:

- `RMR = AR*BR`
- `IMI = AI*BI`
- `RMI = AR*BI`
- `IMR = AI*BR`

**Stage 2: combine and accumulate.** Two 32-bit add/subtract units combine the
products:

| operation | XR | XI |
|---|---|---|
| `A*B` | `RMR - IMI` | `IMR + RMI` |
| `A*conj(B)` | `RMR + IMI` | `IMR - RMI` |

Two more 32-bit adders then add XR and XI into one of four registers of the real
accumulator file (ACRR) and the imaginary file (ACIR).

**Results.**
- The product (XR, XI) is valid one cycle after the operands.
- The accumulator is updated one cycle after that.
- Accumulation wraps at 32 bits. It has no guard bits and no saturation.
  Firmware keeps vectors short enough or scales its inputs.

**Operand masking.** The multiplier inputs are forced to zero in cycles without
an operation, so idle cycles do not toggle the multiplier array. This is
operand masking for power.

## Memory and the SOCBUS (`dm_bank`, `socbus`)

Data memory is four banks of 1024 32-bit words, one flat 4096-word address
space. The upper address bits select the bank. Each bank has two synchronous
read ports and one write port. The banks are written as arrays, so a physical
implementation would map them to SRAM macros.

### Masters and priorities

The SOCBUS serves four masters: the core, the DMA manager, the radio receive
port and the host. Arbitration is by fixed priority, decided separately for
each bank and each port in every cycle:

| bank port | priority, highest first |
|---|---|
| read port 0 | core operand A only |
| read port 1 | core operand B, DMA read, host read |
| write port | core write, radio write, DMA write, host write |

### Effects of the priority order

- **The core is never stalled by the bus.** Its timing is exactly what the
  program says.
- **A refused DMA or host access keeps its request** until it is granted. The
  DMA manager simply retries.
- **A refused radio write is dropped and counted** in `rx_overflows`. The
  converter cannot wait. Firmware avoids this by not writing the bank that
  holds the receive buffer while samples arrive.

### Read timing

Read data returns one cycle after a granted request. Each master has its own
data output.

## Configuration bus and DMA streams

This is the part that ties the design together. The core never moves bulk data
into an accelerator itself. It sets the accelerator up, hands a job to the DMA
manager, and goes on computing until it needs the result.

### Configuration bus

`OUT addr8, rs` broadcasts a 32-bit value. Bits [7:4] of the address select a
unit and bits [3:0] one of its registers:

| unit | no. | registers |
|---|---|---|
| `recip` (1/x) | 0 | none |
| `demapper` | 1 | 0 modulation (0 BPSK, 1 QPSK, 2 16-QAM, 3 64-QAM), 1 UNIT (point spacing / 2) |
| `interleaver` | 2 | 0 direction (0 interleave, 1 de-interleave), 1 N_CBPS, 2 N_BPSC, 3 bits per input word, 4 bits per output word |
| `crc_scrambler` | 3 | 0 mode (0 scrambler, 1 CRC), 1 polynomial, 2 register length, 3 state |
| `conv_encoder` | 4 | 0 G0, 1 G1, 2 clear the delay line |
| `viterbi` | 5 | 0 G0, 1 G1 |
| `mapper` | 7 | 0 modulation, 1 table index, 2 table level (index advances) |
| `fir_filter` | 8 | 0 mode (0 complex, 1 dual real), 1 coefficient index, 2 coefficient {im, re} (index advances), 3 direction (0 receive, 1 transmit) |
| `radio_rx_port` | 9 | 0 buffer base, 1 buffer length, 2 enable (any write restarts the pointer), 3 source (1 = unfiltered) |
| `dma_manager` | 10 | 0 source, 1 destination, 2 length, 3 control {write-back bit 3, accelerator bits 2:0}: writing 3 starts the job |
| `rake_receiver` | 11 | 0 enable, 1 finger number, 2 finger delay, 3 finger weight {im, re} |

The DMA manager's accelerator numbers are the unit numbers 0 to 5 and 7;
number 6 is the transmit port towards the DAC. The RAKE receiver and the
receive port sit in the receive path, not on a DMA stream. The filter is
switched between the receive path and stream 6 (see below).

### Streams

Every accelerator has the same two streams:

- an input stream `in_valid/in_ready/in_data/in_last`;
- an output stream `out_valid/out_ready/out_data/out_last`.

A word moves when valid and ready are both high in the same cycle. `last` marks
the final word of a job. A unit that produces output only at the end (CRC,
Viterbi) or produces a different number of words (interleaver regrouping bits)
uses `out_last` to tell the DMA manager that the job is over.

### DMA manager (`dma_manager`)

**Starting a job.** Writing the control register starts the job and raises
`busy`.

**Read side.**
- It requests words from the source on the SOCBUS DMA read port.
- It keeps at most two words in flight in a two-entry buffer. A word already
  requested when the accelerator drops `in_ready` is therefore never lost.
- The last input word is marked `in_last`.

**Write side.**
- Each output word goes to the next destination address.
- The SOCBUS write grant is passed back to the accelerator as `out_ready`, so a
  refused write stalls the accelerator rather than losing data.

**Ending a job.**
- With write-back, the job ends when the word marked `out_last` is written.
- Without write-back it ends when the last input word is taken. Accelerator
  number 6 uses this mode: a transmit port that hands words to the DAC
  (`dac_valid/dac_ready/dac_data`).
- `done` pulses for one cycle and `busy` falls.

**Throughput.** A job runs at one word per cycle when the bus and the
accelerator keep up.

**Synchronising with the core.** `WAITD` stalls the core until `busy` is low.
A program starts a job, runs vector code on other banks, and then waits.

### Example: receive chain for one 16-QAM block

These calls are taken from the end-to-end testbench:

```
OUT 0x10 <- 2 ; OUT 0x11 <- U                  de-mapper: 16-QAM, spacing 2U
DMA symbols -> demapper -> labels              (48 words)
OUT 0x20 <- 1 ; 0x21 <- 192 ; 0x22 <- 4 ; 0x23 <- 4 ; 0x24 <- 2
DMA labels  -> interleaver -> coded pairs      (48 in, 96 out)
DMA pairs   -> viterbi -> bits                 (96 in, 96 out)
DMA bits    -> crc_scrambler -> descrambled    (90 words)
```

Each `DMA` line is four `OUT`s to unit 10 followed by a `WAITD`.

## Accelerators

### `fir_filter`

- 16 taps; all products are formed in parallel, one sample per cycle.
- Complex mode filters complex samples with complex coefficients. Dual-real
  mode runs two independent real filters, on I with the real coefficient halves
  and on Q with the imaginary ones.
- Coefficients are Q1.15. Outputs are rounded and saturated to 16 bits.
- In the top one filter serves both directions of the half-duplex link.
  Register 3 of the filter unit (decoded in the top) selects the direction:
  - 0 (reset): receive. Converter samples pass through the filter, then the
    RAKE, then the receive buffer. This is anti-aliasing.
  - 1: transmit. DMA stream 6 passes through the filter to the DAC port, with
    back-pressure from `dac_ready`. This is symbol shaping.

### `recip`

- Pipelined restoring division `floor(2^31 / x)` for a 16-bit x, so 1/x is
  scaled by 2^31.
- One result per cycle after a 32-stage pipeline.
- x = 0 returns all ones.

### `mapper`

- Table look-up modulation, one symbol per cycle.
- The label layout matches the de-mapper's: the first half of the label bits
  indexes the in-phase level and the second half the quadrature level. BPSK
  has no quadrature part.
- One eight-entry table of 16-bit levels serves both axes. Firmware loads it
  for the modulation and gain in use, so the labelling is not fixed in
  hardware. The table is zero after reset.

### `demapper`

- Hard decisions for BPSK, QPSK, 16-QAM and 64-QAM with the Gray labelling of
  IEEE 802.11a, one symbol per cycle.
- Constellation levels are expected at odd multiples of UNIT (plus or minus 1,
  3, 5 or 7 times UNIT). Register 1 sets UNIT to match the receiver gain.

### `interleaver`

- The IEEE 802.11a two-permutation block interleaver and de-interleaver, for
  N_CBPS up to 288 bits.
- The permutation is computed in hardware:
  - `i = (N/16)(k mod 16) + floor(k/16)`
  - `j = s floor(i/s) + (i + N - floor(16i/N)) mod s`
  - `s = max(N_BPSC/2, 1)`
- Up to six addresses per cycle.
- Words in and out carry a configurable number of bits, so the unit also
  regroups bits, for example 4-bit 16-QAM labels into coded bit pairs.
- It fills a block, then drains it.

### `crc_scrambler`

- An LFSR of up to 32 bits with a programmable polynomial, one bit per cycle.
- Scrambler mode is additive, the same for scrambling and descrambling. The
  802.11 scrambler `x^7 + x^4 + 1` is polynomial `0x48`, length 7.
- CRC mode is MSB-first. CRC-32 is `0x04C11DB7`, length 32, initial state all
  ones. The register value is output on the word marked `in_last`.

### `conv_encoder`

- Rate 1/2, constraint length 7, two programmable generators (default 133 and
  171 octal).
- Output word bits [1:0] = {B, A}.

### `viterbi`

- Hard-decision decoder for the same code.
- 64 add-compare-select units work in parallel: one trellis step per cycle.
- Path metrics are 10 bits, compared modulo 2^10, so they never need rescaling.
- The survivor memory holds up to 256 steps.
- After the word marked `in_last` it traces back from state 0 (the encoder is
  flushed with six zero bits), then emits the decoded bits in order.
- A block takes about 3 x its length in cycles: fill, traceback and output.

## Receive path (`fir_filter`, `rake_receiver`, `radio_rx_port`)

Converter samples pass through the FIR filter and the RAKE receiver into a
circular buffer in data memory. Register 3 of the receive port can switch it to
the raw samples instead, which bypasses both.

### RAKE receiver

The RAKE receiver serves the DSSS (802.11b) modes, where multipath echoes of
each chip arrive a few chips apart.

- It keeps the last 32 chips in a shift register.
- Each of its four fingers picks the chip at its own delay and multiplies it by
  its own complex weight.
- The four products are summed, rounded and saturated into one output chip per
  input chip, one cycle later.
- Firmware finds the path delays and gains, for example by correlating with
  CONV, and loads them. A finger with weight zero is off.
- Disabled (the reset state), the RAKE passes samples unchanged, so OFDM modes
  use the same path.

### Receive port

- The buffer base and length are registers.
- The write pointer `rx_wptr` is an output, so firmware can follow it with an
  AGU that has the same base and length.
- The port cannot apply back-pressure, so a sample refused by the bus is
  dropped and counted.

## Top level (`bbp_top`)

### Parameters

| parameter | default | meaning |
|---|---|---|
| `BANKS` | 4 | memory banks |
| `DEPTH` | 1024 | words per bank |
| `IM_DEPTH` | 256 | program words |
| `FIR_TAPS` | 16 | filter taps |
| `VIT_LEN` | 256 | longest Viterbi block |

### Ports

| port group | function |
|---|---|
| `clk`, `rst_n` | single clock, asynchronous active-low reset |
| `im_we/im_addr/im_data`, `start`, `halted` | program load and run |
| `host_wr_*`, `host_rd_*` | the application processor's memory port, lowest priority, with grants |
| `adc_valid/adc_data` | receive samples from the converter |
| `dac_valid/dac_ready/dac_data` | transmit words towards the converter |
| `dma_busy`, `dma_done`, `rx_wptr`, `rx_overflows` | status |

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog if the
design hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/bbp_pkg.sv $(ls rtl/*.sv | grep -v bbp_pkg) tb/tb_bbp_top.sv \
    --top tb_bbp_top -Mdir obj_top
./obj_top/Vtb_bbp_top
```

Replace `tb_bbp_top` with any other `tb_<module>` to test one block. Each
testbench computes its expected values independently, from its own reference
model of the function.

### The end-to-end testbench

`tb_bbp_top` runs the top at its default sizes. It assembles a firmware program
and checks every result through the host port. The program:

1. loads FIR taps and receives a burst of samples while a VMUL writes the same
   bank, forcing dropped samples;
2. takes the energy of the receive buffer;
3. on the transmit side, scrambles 90 bits, encodes them, interleaves them for
   16-QAM and maps them by table look-up. A CONV runs against the DMA in the
   same bank, so the DMA is refused cycles. The symbols leave through the DAC
   port under back-pressure, once raw and once shaped by the filter turned to
   transmit;
4. on the receive side, de-maps, de-interleaves, Viterbi-decodes and
   descrambles them back to the original bits, and takes a CRC-32;
5. takes 1/x of eight numbers.

The labels also go through the mapper accelerator, which must agree with the
core's table look-up. A second short program then selects the unfiltered
receive samples. A third enables two RAKE fingers; the buffer must then hold
the RAKE combination of the filter output. The test
counts each mechanism and fails if one never happened:

- refused DMA cycles;
- dropped receive samples;
- DAC stalls;
- `WAITD` stalls;
- modulo pointer wraps;
- CMAC operations;
- FIR outputs;
- filter-bypass writes;
- RAKE-combined chips;
- shaped transmit words;
- the output of every accelerator.

It runs in a few seconds.

### The 64-QAM symbol workload

`tb_wl_qam64_symbol` runs the receive chain of one 802.11a 64-QAM OFDM symbol
on the full design: 48 subcarriers, 288 coded bits, 144 trellis steps. It runs
three chained DMA jobs:

1. de-mapping;
2. de-interleaving (6 bits in, 2 bits out per word);
3. Viterbi decoding.

It checks every intermediate word and every decoded bit. It also measures each
stage against the 640 cycles of one 4 us symbol at 160 MHz:

| stage | cycles |
|---|---|
| de-map | 74 |
| de-interleave | 217 |
| Viterbi | 506 |

Each stage fits in a symbol period. Back to back, the three stages take 858
cycles, so they keep pace with the symbol rate only when pipelined over
successive symbols: de-mapping symbol k while decoding symbol k-1.

### The transmit symbol workload

`tb_wl_tx_symbol` is the transmit counterpart. It takes 144 random
information bits for one 64-QAM symbol through four chained DMA jobs:

1. scrambling (x^7 + x^4 + 1, seed 0x5d);
2. convolutional encoding (133/171 octal);
3. interleaving (6 bits out per word);
4. mapping, with the firmware loading the Gray levels first.

Every scrambled bit, coded pair, interleaved label and constellation point is
checked against models in the testbench. The measured stages are:

| stage | cycles |
|---|---|
| scramble | 218 |
| encode | 218 |
| interleave | 265 |
| map | 74 |

Each stage fits within one 640-cycle symbol period. The IFFT that would follow
on the core is not part of this test.

### The 802.11b low-rate workload

`tb_wl_11b_lowrate` receives 16 BPSK symbols, each spread by the 11-chip
Barker code. The channel has two paths: a direct one and a half-amplitude echo,
rotated by j, three chips later. Chips arrive one every 14 cycles, which is
11 Mchip/s at 154 MHz.

The receive path is set up as follows:

- the filter has a single tap of 1/2;
- the RAKE combines the direct path (delay 0, weight 1/2) with the echo
  (delay 3, weight -j/4);
- the receive port writes the combined chips to a circular buffer.

Firmware then de-spreads each symbol. One 11-tap `CONV` correlates the chips
with the Barker code, which is read with modulo addressing. A `MOVACC` and a
`ST` store the result.

The test checks:

- every RAKE output, against a model computed from the filter outputs;
- every buffered chip;
- every correlation;
- every bit decision.

De-spreading takes 268 cycles for 16 symbols. That is about 17 cycles per
symbol, against the 154 available.

## Where this design departs from, or goes beyond, its description

The architecture fixes the following, and the RTL builds them as described:

- the block set;
- the CMAC structure with four multipliers, add/sub units and accumulator files;
- the instruction list: convolution, vector product, energy, magnitude
  approximation, modulo FIFO access, look-up table;
- the one-result-per-cycle accelerators;
- the list of accelerators, including the mapper and the four-finger RAKE.

Everything else is this design's own choice and may differ from the original
chip:

- instruction encoding and register count;
- bus protocol, memory sizes and priorities;
- register maps;
- word formats;
- the magnitude approximation rule;
- the filter length;
- the Viterbi organisation.

Specific points:

- **No FFT support.** The core has no FFT instruction or bit-reversed
  addressing. An FFT has to be written with the existing instructions.
- **Rate 1/2 only.** Decoding is hard-decision, without de-puncturing, in blocks
  of at most 256 steps. 802.11a rates other than 1/2 and long packets are not
  decoded.
- **No CCK decoder.** The CCK decoder of the 802.11b high-rate modes is not
  included. De-spreading of the low-rate modes is an 11-element CONV on the
  core.
- **Operand bypass not built.** The CMAC's operand bypass to the accumulator
  adders is not built, and accumulation wraps rather than saturating.
- **Host access waits.** The host port is lowest priority and can be starved
  while the core streams vectors through the same bank.
- **No analog parts.** The analog front end, converters and the application
  processor are outside this RTL. Their signals are top-level ports.
