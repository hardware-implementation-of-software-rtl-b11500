# Five-standard SDR physical layer in SystemVerilog

A software-defined radio is normally built with one fixed set of
baseband chains. This design contains the transmit and receive
bit-processing chains of five air interfaces:

- Bluetooth (BR, DQPSK payload)
- Wi-Fi (802.11a/g style OFDM coding)
- 2G (GSM speech channel)
- 3G (UMTS uplink)
- LTE (uplink)

The chains are kept behind one common streaming interface, so the
standard can be changed at run time. On an FPGA with partial
reconfiguration, a reconfigurable region holds one chain at a time and a
processor loads a new partial bitstream to switch. Here all five chains
are instantiated side by side. A run-time selector, `std_sel`, plays the
part of that reconfiguration step, which keeps the whole transceiver
simulatable and synthesizable as ordinary RTL.

Each transmitter is looped straight into its own receiver. A packet
written to the input stream therefore comes back, decoded, on the output
stream. A channel-error hook (`chan_err`) flips one transmitted bit, so
you can watch the error-correcting stages do their work.

## Top level: `sdr_top`

```
 s_data/s_valid ──► input_interface ──► std_sel demux ──► TX chain ─► (chan_err) ─► RX chain ─┐
  (32-bit words)    (1 bit / DIV clk)                                                          │
 m_data/m_valid ◄── output_interface ◄── std_sel mux ◄──────────────────────────────────────────┘
```

- **Input side.** `input_interface` takes 32-bit words with a
  valid/ready handshake. It serialises them LSB first, one bit every
  `DIV` clocks. `s_nbits` gives the number of valid bits in the last word
  of a packet. Pacing by `DIV` stands in for the separate clock per
  standard that a multi-clock build would use: the whole design runs on a
  single clock, and every chain stage accepts at most one bit per `DIV`
  cycles at its input.
- **Internal stages.** Internal stages may run faster, for example the
  rate-1/2 encoder output and trace-back, as long as they do not starve
  the next stage.
- **Output side.** `output_interface` packs the received bits, LSB
  first, into 32-bit words. `flush` sends a partly filled word.
- **`frame_start`.** Pulse it for one cycle while the chain is idle,
  before every packet. It restarts all per-packet state: scrambler seeds,
  the DQPSK phase reference, the 2G differential coder, the 3G code
  generators and the LTE Gold sequence. The LTE scrambler then needs
  1600 warm-up steps; wait for `lte_ready` before sending LTE data.
- **Status outputs.** Every CRC/HEC check reports `*_done` with `*_ok`.
  The Hamming decoder reports corrections (`bt_corrected`). The 2G
  receiver reports the steal flags (`gsm_facch_rx`) and a training-sequence
  match (`gsm_ts_ok`).
- **Reset.** `rst_n` is asynchronous and active low. The chains use a
  synchronised copy of it made inside `input_interface`.

### Parameters

Default packet sizes of the top:

| parameter | default | meaning |
|---|---|---|
| `DIV` | 16 | clocks per input bit |
| `BT_HDR`, `BT_PAY` | 10, 144 | Bluetooth header / payload bits |
| `WIFI_MCS` | 4 | 1: BPSK 1/2, 2: BPSK 3/4, 3: QPSK 1/2, 4: QPSK 3/4, 5: 16-QAM 1/2, 6: 16-QAM 3/4 |
| `WIFI_N` | 66 | Wi-Fi data bits (66 + 6 tail = one 96-bit QPSK 3/4 symbol) |
| `GSM_N` | 260 | 2G speech frame: 182 class-1 bits (coded) + 78 class-2 bits (uncoded) |
| `UMTS_N`, `UMTS_CRC` | 96, 16 | 3G bits and CRC length (8, 12, 16 or 24) |
| `LTE_N` | 16 | LTE bits (+24 CRC = turbo block K = 40) |

## The chains

| standard | transmit | receive |
|---|---|---|
| Bluetooth header | HEC-8 (start value = UAP) → whitening → repetition ×3 → π/4-DQPSK | DQPSK demap → majority of 3 → dewhitening → HEC check |
| Bluetooth payload | CRC-16 → whitening x⁷+x⁴+1 → Hamming (15,10) → π/4-DQPSK | DQPSK demap → syndrome decode → dewhitening → CRC check |
| Wi-Fi | scrambler x⁷+x⁴+1 → conv. K=7 (133/171) → puncture 3/4 → interleaver → BPSK/QPSK/16-QAM | demap → deinterleaver → depuncture → Viterbi → descrambler |
| 2G | CRC-3 on class 1a + reordering → conv. K=5 on class 1, class 2 bypassed → 8×57 interleaver → burst formation → differential coding | differential decoding → burst deformation → deinterleaver → Viterbi on class 1 → de-reordering + CRC check |
| 3G | CRC-8/12/16/24 → conv. K=9 (561/753) → 30-column interleaver → OVSF spreading SF=4 + scrambling → BPSK | despreading → deinterleaver → Viterbi → CRC check |
| LTE | CRC-24 → turbo encoder → Gold scrambler → QPSK → cyclic prefix | CP removal → soft demap → soft descrambler |

- **Bluetooth.** The first `BT_HDR` bits of each packet go to the header
  path and the rest to the payload path. The decoded header and payload
  are joined again at the output.
- **LTE.** No turbo decoder is present, so the LTE receiver ends with
  the descrambled soft values (`lte_soft`, 14-bit samples). Their sign
  bits go to the output stream: 3(K+4) bits per block, with the
  systematic bit first in every group of three.

The Wi-Fi scheme sets three things:

- the interleaver symbol size, NCBPS = 48, 96 or 192 bits;
- whether the rate-3/4 puncturer and depuncturer are used;
- the mapper: BPSK, QPSK or Gray-coded 16-QAM.

16-QAM uses levels ±1 and ±3 over √10. The first bit pair sets I and the
second sets Q.

Samples are signed 14-bit fixed point with 9 fraction bits (`sdr_pkg`).
In that format 1.0 is 512 and 1/√2 is 362.

## The harder blocks

### Viterbi decoder (`viterbi_decoder`)

One module serves all three convolutional codes. `K`, `G0` and `G1` are
parameters; bit *i* of a generator mask is the input delayed by *i*.

1. **Branch metric.** Every received pair is compared with the 2-bit
   label of each trellis branch (Hamming distance 0–2).
   Punctured positions re-inserted by `depuncture` arrive with an erase
   flag and add nothing.
2. **Add-compare-select.** All 2^(K-1) states are updated in one cycle:
   64 states for Wi-Fi, 16 for 2G and 256 for 3G. The path metrics live
   in a register array. A tie keeps the lower-numbered predecessor.
3. **Survivor memory.** One decision bit per state per step, for a whole
   block of N+K−1 steps.
4. **Trace-back.** The encoder is always terminated with K−1 zeros, so
   trace-back starts from state 0 after the last step. It walks the
   block backwards once, then sends out the N data bits. `busy` is high
   from the end of the block until the last bit has left.

Whole-block trace-back fits these short packets. A streaming decoder
would use a sliding trace-back window instead.

### Interleavers

- **`wifi_interleaver`** implements the two-step Wi-Fi permutation,
  with `s = max(NBPSC/2, 1)`:

  ```
  i = (NCBPS/16)(k mod 16) + floor(k/16)
  j = s*floor(i/s) + (i + NCBPS - floor(16i/NCBPS)) mod s
  ```

  With `DEINT=1` it implements the inverse. Bits are written at the
  permuted address of one bank and read in order from the other.
- **`block_interleaver`** writes row by row and reads column by column.
  `PERM=1` applies the 3G 30-column order and `PERM=2` applies bit
  reversal (the 3G first interleaver).
- **Shared behaviour.** Both interleavers are ping-pong buffered, read
  under `out_ready`, and raise `overflow` if a bank is rewritten before
  it was read.

### 2G frame and burst path

A 260-bit speech frame is handled in three classes.

- **Class 1a.** The first 50 bits are protected by a 3-bit CRC with
  generator D³+D+1.
- **Class 1.** The first 182 bits are reordered by `gsm_reorder`. The
  even bits d(0), d(2), … go first. The three parity bits follow. Then
  come the odd bits in falling order, d(181), d(179), …, d(1). Four zero
  tail bits end the sequence. These 189 bits are convolutionally encoded
  (K=5, 1+D³+D⁴ and 1+D+D³+D⁴) into 378 bits.
- **Class 2.** The last 78 bits are not encoded. They are appended
  directly, giving 456 bits in all.

At the receiver, the first 378 deinterleaved bits go to the Viterbi
decoder (185 steps plus 4 tail steps). The last 78 bits bypass it.
`gsm_dereorder` puts both back in the original order and checks the
class-1a CRC. A channel error in a class-2 bit therefore reaches the
output uncorrected, as it does in GSM.


`burst_formation` wraps each 114 coded bits as:

- 3 tail bits
- 57 data bits
- a steal flag
- the 26-bit training sequence (GSM TSC 0)
- a steal flag
- 57 data bits
- 3 tail bits

Four bursts carry one 456-bit frame. With `gsm_steal_flag` set, the data
fields are replaced by the 114 FACCH bits given on `gsm_facch`. Those
bursts are recognised at the receiver by their flags.

The differential coder is recursive: d̂ₖ = dₖ ⊕ d̂ₖ₋₁, and the sent
symbol is the inverse of d̂ₖ. The decoder is a plain two-bit XOR, so one
channel error costs exactly two decoded bits, which the Viterbi decoder
then repairs. `burst_deformation` strips tails, flags and training
sequence. It does not equalise: the loopback channel has no
dispersion.

### 3G spreading

Each coded bit becomes SF=4 chips of the OVSF code (1, 1, −1, 1). The
chips are multiplied by the real part of the uplink long scrambling
code. That code is the Gold pair of x¹⁸+x⁷+1 and
x¹⁸+x¹⁰+x⁷+x⁵+1, restarted by `frame_start`. The despreader removes the
scrambling on the soft chips and sums the SF products, so a single wrong
chip does not change the bit decision.

### LTE scrambler and turbo encoder

- **Scrambler.** `lte_gold_gen` forms
  c_init = 2¹⁴·n_RNTI + 2¹³·q + 2⁹·⌊n_s/2⌋ + N_ID. It then clocks both
  31-bit registers 1600 times before the first output. The transmit
  scrambler XORs bits. The receive side negates soft values where
  c(n) = 1.
- **Turbo encoder.** `turbo_encoder` stores a block of K bits and runs
  two 8-state RSC encoders (13/15 octal). The second encoder reads the
  block through the QPP interleaver π(k) = (F1·k + F2·k²) mod K,
  computed on the fly. It sends x, z, z′ serially, then the 12 tail
  bits.

## Differences from the reference architecture, and what is missing

This RTL follows a published DPR-based SDR architecture, with these
differences:

- **Single clock.** There is one clock with per-bit pacing, instead of
  several clock domains joined by dual-clock RAMs.
- **No partial reconfiguration.** There is no reconfiguration
  controller, ICAP, DMA, processor, clocking or DDR. The top exposes the
  DMA streams as ports.
- **Bluetooth header and payload.** These are whitened and modulated
  by separate instances. Each whitening generator starts from
  `scr_seed`, and each DQPSK path starts from phase 0. A single
  generator and modulator running over header and payload in turn would
  need a serialiser between the two paths.
- **Hamming syndrome.** The Hamming (15,10) decoder uses the full 5-bit
  syndrome of its degree-5 generator, 1+D²+D⁴+D⁵.
- **Codes taken from the standards.** The following come from the
  standards: the Wi-Fi and 3G generators, the 3G column orders and
  scrambling code, the GSM training sequence, the 16-QAM constellation,
  and the turbo constituent codes and QPP interleaver.
- **3G frame timing.** A 10 ms transmission time interval is assumed.
  This makes the first interleaver and the radio-frame equalisation and
  segmentation identities, so the 3G chain uses only the 30-column
  second interleaver. `block_interleaver` with `PERM=2` provides the
  first interleaver for longer intervals.
- **Not built:**
  - IFFT/FFT (64-point Wi-Fi, 128-point LTE) and their controllers
  - the LTE 14-point DFT/IDFT and SC-FDMA sub-carrier mapping
  - LTE rate matching and the turbo decoder
  - the Wi-Fi preamble
  - 3G/LTE code-block segmentation and concatenation (the test packets
    fit in one block)
  - the rate-1/3 Viterbi branch metric
  - 2G channel equalisation
- **Cyclic prefix in the LTE chain.** `cp_insert`/`cp_remove` default
  to the 128-point symbol with a 32-sample extended prefix. In the LTE
  chain they frame the QPSK symbols directly (66 + 16), because no
  IFFT/FFT is present.

## Simulating

Every block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.
With Verilator 5:

```
verilator --binary --timing -Irtl rtl/sdr_pkg.sv tb/tb_sdr_top.sv --top-module tb_sdr_top -o sim
obj_dir/sim
```

Swap in another testbench name for a single block. Verilator finds the
modules in `rtl/` through `-I`.

`tb_sdr_top` runs the top at its default parameters:

- Two Bluetooth packets, one with a header error and one with a payload
  error.
- Wi-Fi MCS 4, clean and with one error.
- 2G frames: clean, with one error on a coded bit, and one FACCH frame.
- 3G packets, clean and with a chip error.
- Two LTE packets.
- A final Bluetooth packet after all the switches.

It compares every received bit with the sent one and checks every CRC
flag. It counts each mechanism and fails if any of them never occurred:

- standard switches
- header majority correction
- Hamming correction
- Viterbi correction
- despreading correction
- punctured erasures
- FACCH reception
- 2G class-2 bypass
- training-sequence match
- LTE soft negation
- CRC passes

It takes well under a minute.

`tb_wifi_mcs` builds one top for each of the six Wi-Fi schemes. Each
packet fills one OFDM symbol: 18, 30, 42, 66, 90 or 138 data bits. The
test checks a clean packet and a packet with one channel error for every
scheme.
