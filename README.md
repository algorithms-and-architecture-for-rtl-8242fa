# Level-1 calorimeter trigger with digital filtering and sliding windows

This is RTL for a first-level calorimeter trigger for a hadron-collider detector. The detector has
40 × 32 trigger towers in η × φ. Each tower has an electromagnetic (EM) and a hadronic (HD) layer,
which makes 2560 analog pickoff signals. A new beam crossing arrives every 132 ns
(F_BC = 7.57 MHz), and the trigger must decide on every one of them.

The work is split in two stages:

1. **Per channel:** a digital filter turns each sampled pulse into one calibrated 8-bit transverse
   energy (E_T) per crossing. It is matched to that crossing and has little pile-up from its
   neighbours.
2. **Over the whole η–φ map:** every position is tested as the centre of a cluster. A cluster is
   kept only if its E_T is a local maximum among the overlapping clusters around it. Jets,
   electrons/photons (EM objects) and narrow jets (τ candidates) are found this way. They are
   counted above thresholds and reduced, together with scalar and missing E_T, to 64 yes/no
   trigger terms.

```
 2560 analog   ┌──────────┐ 3 identical   ┌──────────┐  results  ┌─────┐ 64 trigger terms
 signals ────► │ 80 × ADF │──────────────►│  8 × TAB │──────────►│ GAB │────────────────►
 (ADCs outside)│ 32 ch.   │ links/card    │ 30 links │           └─────┘ ΣE_T, MET²
               └──────────┘ (240 total)   │ 10 chips │──► Cal-Track maps, L2/L3 tower E_T
                  60.56 MHz               └──────────┘
                                             90.9 MHz
```

`rtl/l1cal_top.sv` wires the whole system at full size. It uses two clocks:

| Clock | Rate | Used by |
|---|---|---|
| `clk_adf` | 8 × F_BC = 60.56 MHz | the ADF cards (ADC-to-filter boards) |
| `clk_tab` | 12 × F_BC = 90.9 MHz | the TABs (trigger algorithm boards) and the GAB (global algorithm board) |

Each domain gets its own `bc_sync` pulse on the first clock of every crossing.

## The per-channel filter (`adf_channel`)

The ADC samples each channel at 4 × F_BC (30.28 MHz). The ADC is outside the RTL, as are its
front end and the pedestal DACs. The chain that follows is:

| Stage | Module | What it does |
|---|---|---|
| select | `adf_sample_select` | Keeps two evenly spaced samples of the four per crossing: 0 and 2, or 1 and 3. Together with `adc_clk_inv`, which the channel drives to the ADC, this sets the sampling phase. In test mode, a 64-entry memory replaces the ADC. It replays a programmed sequence of samples into the filter. |
| FIR | `adf_fir` | Up to 8 taps with signed 6-bit coefficients, running at 2 × F_BC. The full-precision sum saturates to signed 16 bits. Latency is 2 clocks. |
| peak | `adf_peak_detector` | Passes the middle of three consecutive FIR outputs when it is strictly greater than both neighbours and positive. Otherwise it outputs 0. This keeps the energy in exactly one crossing. |
| decimate | `adf_bc_decimator` | Keeps one of the two peak outputs per crossing (`dec_phase`). It shifts that value right by `scale_shift` and saturates it to a 10-bit address. |
| E_T table | `adf_et_lut` | A 1024 × 8 RAM that converts the address to calibrated E_T. It is loaded over the configuration bus. |

Three 512-word history buffers (`adf_history_buffer`) record the raw sample, the FIR output and the
final E_T. They stop recording when frozen, and are read by an offset back from the newest word
(0 = newest). One read port serves slow-control read-back. The other serves the raw readout
described below.

Per-channel registers:
- FIR coefficients.
- The table contents.
- A control word: bit 0 = sample pair, bit 1 = ADC clock inversion, bits 5:2 = shift, then the
  decimation phase, the test-mode enable and the test-loop length.
- An 8-bit pedestal DAC code.
- The test memory.

## The ADF card (`adf_card`)

One card holds 32 channels: the 16 EM and 16 HD towers of a 4 × 4 tower block. Card `8·e + p`
covers η 4e…4e+3 and φ 4p…4p+3. Its bus address arrives on the `card_id` pins, which are wired
from the crate slot. Channel `4·η_local + φ_local` is EM, and channel 16 plus that
number is HD.

The card counts the crossing phase 0–7 from `bc_sync`. At phase 7 it builds one frame of 32 × 8
bits, whose content depends on the output mode:

| Mode | Frame content |
|---|---|
| filtered | the E_T values |
| raw | the 8 MSBs of a 10-bit ADC sample |
| pseudorandom | channel c sends byte c mod 4 of a 32-bit Galois LFSR with mask `0x00400003`, stepped once per crossing |
| constant | a programmed constant |

Every frame also carries its kind and a toggle bit. The card drives three identical copies of
the frame, one per receiving board.

**Raw readout after a level-1 accept.** When enabled, an L1 accept makes the card send N frames of
raw samples of the triggering crossing. N is programmable. The samples are found in the raw
history buffer at a programmable L1 latency back from the newest sample. After N frames the
output returns to filtered data by itself.

An L1 accept or a software trigger can also freeze all history buffers. A bus command unfreezes
them.

**Configuration bus.** `cfg_req_t` in `l1cal_pkg` stands in for the board's VME bridge. It
carries:
- a card address, or a broadcast to all cards;
- a channel address, or a broadcast to all channels;
- a register select, an index and 16 bits of data.

A read returns `cfg_rdata` with `cfg_rvalid` two clocks later.

## Links and the TAB's tower map (`tab`, `tab_link_rx`)

Sliding windows need data from the neighbours of each tower. Because of this, every card's three
copies go to three TABs. TAB t owns φ 4t…4t+3. It receives 30 links: from every η block, the
cards of φ blocks t−1, t and t+1 (modulo 8). So each board sees a 40 × 12 tower map with its own
four columns in the middle.

Each link enters through `tab_link_rx`, which uses a 3-flop toggle synchronizer. The frame
content is stable for a whole crossing, so this crossing between clock domains is safe without a
FIFO. Frames that are not filtered data (raw, pseudorandom or constant) are fed to the algorithms
as zero towers.

On each crossing the board shifts the map out **bit-serially, LSB first, 12 bits in 12 clocks**
(`sof` marks bit 0 and `eof` marks bit 11). The map goes to ten `sw_chip`s. Chip c handles
η 4c…4c+3 of the board's four columns, which is 16 window positions. It receives the 9 × 9
towers it needs: rows η 4c−2 … 4c+6 and columns local φ 2 … 10. Towers beyond the calorimeter's
η edge read as 0; φ wraps around.

## Sliding windows (`sw_chip`, `bs_add`, `bs_cmp`, `bs_deser`)

This is the core of the design.

**What is computed.** For every position (η, φ) the chip forms:
- a 2 × 2 window W2 of EM+HD towers starting at (η, φ): the region of interest;
- a 4 × 4 region W4 starting at (η−1, φ−1), centred on W2: the jet E_T.

**Jet candidate.** W2 is a local maximum when it beats the 24 other 2 × 2 windows whose offsets
(dx, dy) lie within ±2. Against half of them it must be strictly greater; against the other half
it only needs to be greater than or equal. The rule, with x = η and y = φ, is strict when

    (dy > 0 and dx > −2)  or  (dy = 0 and dx > 0)  or  (dy < 0 and dx = 2)

and `>=` otherwise. It is written as `lm_strict` in `l1cal_pkg`.

The two halves of this pattern mirror each other through the centre with `>` and `>=` swapped.
So if two windows have equal E_T, exactly one of them can be a maximum: no jet is lost and none is
counted twice. The three rows with dy ≥ 0 come from the published comparison pattern. The two
rows below follow from this symmetry requirement.

**EM candidate.** The same test runs on the EM-only 2 × 2 windows. In addition:
- the EM isolation ring, W4(EM) − W2(EM), must be ≤ `em_iso_max`;
- the HD energy behind the window, W2(HD), must be ≤ `em_had_max`.

The EM E_T is W2(EM).

**τ candidate.** A jet that is narrow: 16 · W2 ≥ `tau_ratio` · W4. So `tau_ratio` is the
W2/W4 ratio in units of 1/16.

**How it is computed.** All sums and the 24 comparisons per window are bit-serial and fully
pipelined, so one new map enters every 12 clocks:

- `bs_add` is a one-bit full adder with a carry flop. It also carries a sticky overflow flag, so a
  12-bit sum that would exceed 4095 is treated as 4095 (saturation).
- `bs_cmp` compares two serial words LSB first. At each bit position, the MSB-side decision
  overrides the lower one. The verdict is registered at `eof` and held until the next `eof`.
- The chain runs in five stages:
  1. pair sums;
  2. W2;
  3. the sums of the W4 rows, in parallel with the 24 comparisons;
  4. W4;
  5. deserialization of W2, W4 and the EM/HD parts (`bs_deser`).

  After that, the isolation, hadronic and τ tests are simple parallel comparisons.
- The 16 window results (`win_result_t`) are valid 7 clocks after the frame's `eof`.

## Board and global results (`tab_global`, `gab`)

`tab_global` gathers the 160 window results of a board:

| Output | Content | Goes to |
|---|---|---|
| object counts | jets, EM objects and τ candidates, each counted above four programmable thresholds (strictly greater) | GAB |
| scalar E_T | sum over the board's towers | GAB |
| Ex, Ey | column E_T weighted by cos/sin of the φ-bin centre, in Q7: `round(128·cos(2π(k+½)/32))`, giving 127, 122, 113, 99, 81, 60, 37, 13 per octant | GAB |
| jet and EM maps | positions of the local maxima | track-matching trigger |
| tower E_T | all towers of the board | higher trigger levels |

The board's results are valid 9 clocks after the end of the frame. The tower E_T comes from the
same map that the windows used.

The GAB adds the eight board results. It forms MET² = (Ex ≫ 7)² + (Ey ≫ 7)².

It then evaluates 64 trigger definitions. Each definition is `{en, src, thr}`:

| src | Meaning |
|---|---|
| 0–11 | a count is ≥ `thr` (jets, EM or τ, at thresholds 0–3) |
| 12 | scalar E_T is ≥ `thr` |
| 13 | MET² is ≥ `thr²`, so no square root is needed |

Its latency is 2 clocks.

## Departures from a faithful reproduction, and what is not here

The RTL follows the published architecture in these points:
- the filter chain and its widths;
- the 512-word histories;
- the output modes and raw readout;
- three link copies per card;
- 8 boards of 30 links and 10 chips with 16 windows each;
- 12-bit bit-serial arithmetic at 12 clocks per crossing;
- local maxima with the asymmetric `>` / `>=` pattern;
- 64 trigger terms.

The following are this design's own choices, because no specification for them was available:
- the register map and the configuration bus;
- the pseudorandom polynomial;
- which samples and which peak output are kept;
- the scaling before the table;
- the EM isolation ring, the hadronic veto and the τ ratio test;
- saturation at 4095;
- the four thresholds per object type;
- the missing-E_T weighting;
- the form of a trigger definition;
- the link frame format;
- the mapping of cards to boards.

The following are modelled as ports, not built:
- the analog front end, the ADCs and the pedestal DACs;
- the LVDS serializers and cables: a link is a parallel `link_frame_t` plus a toggle;
- the VME bridge and crate interconnect;
- the serial command link that distributes clock and control;
- the custom serial control protocol of the TABs and GAB: board configuration is a static input;
- the receiving trigger systems.

Also not modelled:
- the special tower mapping in the gap between the central and forward calorimeters;
- chip-to-chip data sharing: the board hands each chip the towers it needs.

## Simulating

Every module has a self-checking testbench in `tb/`. Each compares against an independent
software model in `tb/tb_ref_pkg.sv` or in the testbench itself, and prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_sw_chip \
        rtl/l1cal_pkg.sv tb/tb_ref_pkg.sv rtl/sw_chip.sv rtl/bs_add.sv rtl/bs_cmp.sv \
        rtl/bs_deser.sv tb/tb_sw_chip.sv && obj_dir/Vtb_sw_chip

Each testbench, and what it covers:

| Testbench | Coverage |
|---|---|
| `tb_adf_sample_select`, `tb_adf_fir`, `tb_adf_peak_detector`, `tb_adf_bc_decimator`, `tb_adf_et_lut`, `tb_adf_history_buffer` | each filter stage against its arithmetic, including saturation and latency |
| `tb_adf_channel` | the whole channel with random coefficients, tables and pulses, test mode, and the three histories with freeze |
| `tb_adf_card` | the broadcast and addressed configuration, all four output modes, the LFSR sequence, raw readout after L1 accept with its automatic return, freeze/unfreeze and read-back |
| `tb_sw_chip` | random maps and planted jets, EM objects, τ candidates, ties and saturated sums against a brute-force reference of the window rules |
| `tb_tab_link_rx`, `tb_tab_global`, `tb_gab` | the link capture, counting and sums, and all trigger-definition sources |
| `tb_tab` | a full board fed by 30 card frames from random maps, including the φ wrap and masked non-filtered frames |
| `tb_l1cal_top` | the whole system at full size (80 cards, 8 boards, GAB). It loads all channels by broadcast, drives 14 random crossings through real ADC pulses, and checks every trigger term, ΣE_T, MET² and all Cal-Track maps against the reference. It then exercises raw readout after an L1 accept and a history freeze with read-back. |

The full-size build is large: 2560 filter channels and 80 sliding-window chips. It comes to
several hundred megabytes of generated C++ and a compile measured in hours on a single core. So
`tb_l1cal_top` is provided but has not been run to completion. The largest pieces simulated so far
are:
- one complete ADF card with its 32 channels (`tb_adf_card`);
- one complete TAB with its 30 links, ten sliding-window chips and global chip (`tb_tab`).

`tb_tab` uses the same link frames, tower mapping and software reference as the system test.
`adf_card` and `tab` carry a `no_inline_module` hint so that the simulator shares one model per
card and per board.
