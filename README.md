# FSM-based multimode block interleavers for WLAN (802.11a) and WiMAX (802.16e)

An OFDM transmitter interleaves each block of coded bits before mapping it onto subcarriers.
Burst errors on the channel then reach the FEC decoder spread out, and it can correct them.
The 802.11a and 802.16e interleavers are a two-step permutation of an N-bit block (N = Ncbps,
the coded bits per OFDM symbol). With d = 16 columns and s = max(1, Ncpc/2):

    m_k = (N/d)·(k mod d) + floor(k/d)
    j_k = s·floor(m_k/s) + (m_k + N − floor(d·m_k/N)) mod s

Input bit k of a block goes to output position j_k.

This RTL implements two such interleavers, one for each standard. Neither evaluates the formula
in hardware. Each one writes bit k of the incoming block at address j_k of a RAM and reads the
RAM back in order. The address j_k is made by accumulation:

* a constant increment is added to the previous address on every clock;
* at the end of every pass through the 16 columns, a small finite-state machine (the *preset
  logic*) loads the first address of the next pass instead.

Two RAMs work as a ping-pong pair, so one block is written while the previous one is read out.
The design takes one bit in and gives one bit out on every clock, with no gaps.

The WiMAX preset FSM uses a simplification that is the main point of this design. For every
depth that 64-QAM shares with QPSK (288, 384, 432, 576), the two modes hit the same end-of-pass
addresses and need the same presets. So 64-QAM has no FSM states of its own: it runs through the
QPSK depth states.

## Modes

WLAN, `mod_type`:

| mod_type | modulation | N (Ncbps) | increments    |
|----------|------------|-----------|---------------|
| 00       | BPSK       | 48        | 3             |
| 01       | QPSK       | 96        | 6             |
| 10       | 16-QAM     | 192       | 13, 11        |
| 11       | 64-QAM     | 288       | 20, 17, 17    |

WiMAX, `mod_type` (00 QPSK, 01 16-QAM, 10 or 11 64-QAM) and `id`:

| modulation | id  | N   | increments | | modulation | id  | N   | increments |
|------------|-----|-----|------------|-|------------|-----|-----|------------|
| QPSK       | 000 | 96  | 6          | | 16-QAM     | x00 | 192 | 13, 11     |
| QPSK       | 001 | 144 | 9          | | 16-QAM     | x01 | 288 | 19, 17     |
| QPSK       | 010 | 192 | 12         | | 16-QAM     | x10 | 384 | 25, 23     |
| QPSK       | 011 | 288 | 18         | | 16-QAM     | x11 | 576 | 37, 35     |
| QPSK       | 100 | 384 | 24         | | 64-QAM     | x00 | 288 | 20, 17, 17 |
| QPSK       | 101 | 432 | 27         | | 64-QAM     | x01 | 384 | 26, 23, 23 |
| QPSK       | 110 | 480 | 30         | | 64-QAM     | x10 | 432 | 29, 26, 26 |
| QPSK       | 111 | 576 | 36         | | 64-QAM     | x11 | 576 | 38, 35, 35 |

The WLAN mode encoding follows the order of the table above. Nothing fixes it otherwise.

## How the write addresses are generated

Take N bits as 16 columns of N/16 rows. The write sequence walks the block one row per pass:
pass r produces the 16 addresses of row r, and each pass ends on an address in the top N/16 of
the block (the *terminal value*).

* **BPSK (48):** 0, 3, 6, … 45 │ 1, 4, … 46 │ 2, 5, … 47 │ then 0 again. The terminal values
  are 45, 46 and 47, and the presets that follow them are 1, 2 and 0.
* **16-QAM (192):** 0, 13, 24, 37, … 181 │ 1, 12, 25, 36, … 180 │ 2, …. The second step of the
  permutation swaps neighbouring bits, so the increments alternate (13, 11). The terminal values
  alternate too: 181 → 1, 180 → 2, 183 → 3, … 190 → 0.
* **64-QAM (288):** 0, 20, 37, 54, … 270 │ 1, 18, 38, 55, … 271 │ 2, 19, 36, 56, … with
  increments cycling through 20, 17, 17.

**Increment selection.** A multiplexer tree, controlled by the mode pins, builds the increment:

* a T flip-flop, QAM16_SEL, alternates the two 16-QAM values;
* a mod-3 counter, QAM64_SEL, cycles the three 64-QAM values;
* the constant increments of BPSK/QPSK go in directly.

The result is zero-padded into an adder with the accumulator: a 6-bit increment and 9-bit adder
for WLAN, a 7-bit increment and 10-bit adder for WiMAX.

**Phase of the unequal increments.** The unequal increments do not start every pass at the same
phase:

* 16-QAM starts with the larger increment on even rows and the smaller on odd rows;
* 64-QAM row r starts at phase (3 − r mod 3) mod 3 of the cycle 20, 17, 17 (0 = the 20).

So at each pass boundary the preset logic loads QAM16_SEL and QAM64_SEL with this start phase,
at the same time as it loads the preset. It keeps a row-parity flip-flop and a mod-3 down counter
for this.

**End of pass and preset.** The preset logic has a 4-bit counter of the 16 addresses of a pass.
When the counter reaches 15, the accumulator holds the terminal value of the pass, and the
accumulator loads the preset instead of adding. The preset depends only on that terminal value.
With base = 15N/16:

    idx    = acc − base          (bit 0 flipped for 16-QAM, whose terminals alternate)
    preset = idx + 1, or 0 when idx is the last row (N/16 − 1)

The last-row case is also the end of the FEC block, and raises `select` for one clock.

`select` also drives:

* the read address counter, which returns to 0, so it needs no table of block lengths;
* the *sel generator*, a T flip-flop that swaps the two RAM banks.

An assertion checks that every end of pass falls on a terminal value.

## The preset FSM

A clear (`clr` = 1, synchronous) puts the FSM in state SF with every register at 0. In the
first clock after the clear the FSM is still in SF and the write address is 0. On that clock
edge it decodes the mode and enters the state for it:

* **WLAN:** one state per modulation (SMT0 BPSK … SMT3 64-QAM). Each state fixes N, and with it
  the terminal values and presets.
* **WiMAX:** one state per QPSK depth (8) and per 16-QAM depth (4), 13 states with SF. A 64-QAM
  request goes straight to the QPSK state of the same depth: x00 → 011 (288), x01 → 100 (384),
  x10 → 101 (432), x11 → 111 (576). The increments still come from the 64-QAM multiplexers,
  because those are driven by the mode pins, not by the FSM state.

The FSM stays in its mode state, repeating the same sequence block after block, until the next
clear. A mode change takes effect through `clr` and can be made at any point, including in the
middle of a block. `mod_type` and `id` must be held stable between clears.

The published state diagrams draw a separate state for each terminal value. This RTL folds them
into the arithmetic above, which makes the same transitions. It also decodes the mode level and
the depth level of the hierarchy in the single SF clock. A clock per level would hold address 0
for extra clocks.

## Memory and timing

`ilv_memory` holds two RAMs of 2^ADDR_W one-bit words:

* 512 words each for WLAN and 1024 words each for WiMAX;
* each RAM address comes through a multiplexer steered by `sel`;
* `sel` is the write enable of RAM-1, and its inverse that of RAM-2;
* after a clear (`sel` = 0), RAM-2 is written and RAM-1 is read.

The RAMs are synchronous-read, like FPGA block RAM. The output multiplexer therefore uses `sel`
delayed by one clock.

Timing, with clock 0 the first clock after `clr` falls:

| event                                   | clock            |
|-----------------------------------------|------------------|
| input bit k of block b sampled          | N·b + k          |
| output bit i of block b on `dataout`    | N·(b+1) + i + 1  |

The latency is one block plus one clock. The output during the first block after a clear comes
from uninitialised RAM and must be ignored. There is no valid or enable signal: the stream is
continuous.

## Modules

| file                         | contents |
|------------------------------|----------|
| `rtl/ilv_pkg.sv`             | mode enums, d = 16, WiMAX depth tables |
| `rtl/wlan_preset_logic.sv`   | WLAN preset FSM |
| `rtl/wimax_preset_logic.sv`  | WiMAX preset FSM with shared 64-QAM/QPSK states |
| `rtl/ilv_addr_regs.sv`       | QAM16_SEL, QAM64_SEL, accumulator, read counter, sel generator |
| `rtl/wlan_addr_gen.sv`       | WLAN increment muxes + preset FSM + registers |
| `rtl/wimax_addr_gen.sv`      | WiMAX three-level increment mux tree + preset FSM + registers |
| `rtl/ilv_memory.sv`          | ping-pong RAM pair |
| `rtl/wlan_interleaver.sv`    | WLAN interleaver: `clk, clr, mod_type[1:0], data_i → dataout` |
| `rtl/wimax_interleaver.sv`   | WiMAX interleaver: `clk, clr, mod_type[1:0], id[2:0], data_i → dataout` |
| `rtl/fsm_interleaver_top.sv` | both interleavers side by side, shared clock, separate clears and streams |

Parameters:

* `ADDR_W` is the address width: 9 for WLAN, 10 for WiMAX.
* `INC_W` is the increment width: 6 for WLAN, 7 for WiMAX.

The depth tables are fixed to the standards, so changing these widths is only useful to widen
them.

## Verification

Each module has a self-checking testbench in `tb/`. `tb/ilv_ref_pkg.sv` computes j_k straight
from the permutation formula, independently of the increment tables in the RTL. Each testbench
prints `TB_RESULT checks=… failures=…`.

* `tb_wlan_preset_logic`, `tb_wimax_preset_logic` feed the formula's address stream in place of
  the accumulator. They check when load and select fire, every preset, and every start phase.
  Every WiMAX mode/id is covered, including the 64-QAM code 11.
* `tb_wlan_addr_gen`, `tb_wimax_addr_gen` check every write address, read address and `sel`
  value over two or three blocks of every mode. The runs include clears in the middle of a block.
* `tb_ilv_memory` predicts `dout` from a model of the two banks over nine bank swaps.
* `tb_wlan_interleaver`, `tb_wimax_interleaver` stream random bits through every mode. They
  check every output bit at its exact clock, which also checks the latency.
* `tb_fsm_interleaver_top` runs both interleavers at once at full size. It includes mid-block
  mode changes. It counts how often each mechanism acted, and fails if one never did: pass-end
  presets, bank swaps, both 16-QAM increments, all 64-QAM phases, non-zero row start phases, and
  64-QAM running in the shared QPSK states.

To run one, for example the top-level test, with Verilator 5:

    verilator --binary --timing --assert -Mdir obj -y rtl rtl/ilv_pkg.sv tb/ilv_ref_pkg.sv \
        tb/tb_fsm_interleaver_top.sv --top-module tb_fsm_interleaver_top -o sim
    obj/sim

Each testbench finishes in well under a second.

## Where this RTL departs from or adds to the published design

* **Start phase.** The published address generator has a "start" signal from the preset logic
  to QAM16_SEL and QAM64_SEL, without saying what it carries. Here it carries the row-dependent
  start phase derived above.
* **Read counter width.** The WiMAX read counter is drawn as 9 bits, which cannot address a
  576-bit block. It is 10 bits here, the same width as the write address. The WiMAX memory uses
  10-bit addresses for the same reason.
* **64-QAM multiplexers.** The 64-QAM level-1 multiplexers select "first increment" against
  "second increment". The 3:1 multiplexer with two equal inputs is written as a 2:1 multiplexer
  on `qam64_sel == 0`.
* **Increment table.** The 64-QAM depth-384 increments are 26, 23, 23, as the formula requires.
* **BPSK wrap.** After the last BPSK address (47) the next address is 0, as the formula requires.
* **Leaf states.** The leaf states of the preset FSM are computed rather than listed (see above).
* **Implementer's choices.** The synchronous active-high clear, the delayed output-mux select,
  the 1-bit data width and the mux input polarities (select 0 = first increment in the table) are
  this implementation's choices.
* **Not reproduced.** No FPGA mapping results are reproduced (slice, LUT and clock-rate figures
  for a Spartan-3).
* **Not included.** The rest of an OFDM transmitter/receiver (mapping, IFFT, cyclic prefix,
  converters, RF) is not part of this RTL.
