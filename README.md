# Stripe-pipelined JPEG 2000 encoder core

A JPEG 2000 encoder normally keeps a whole tile of wavelet coefficients in
memory. The DWT produces a tile subband by subband, and the block coder
consumes it code-block by code-block. This design removes that tile memory.
The DWT and the embedded block coder (EBC) run as a two-stage pipeline over
*stripes*: small ping-pong buffers that hold four coefficient rows of half a
subband.

To make this work, each side is rearranged to match the other's order:

* **The DWT scans in stripe order.** It works column-first, eight image rows
  at a time, the left half of the tile and then the right half. Each pipeline
  stage produces 4 rows × W/4 columns of HL, LH and HH.
* **The coder switches between code-blocks.** A stripe spans several
  code-blocks, so the arithmetic coders swap their whole state (contexts and
  coder registers) per code-block. The state is kept in a state buffer and
  moves through a double-buffered register bank without stopping the coders.

The arithmetic coder codes two symbols per cycle, and six of them run in
parallel.

## Data path

```
pixels ─► ls_dwt ─► stripe_buffer (HL/LH/HH ping-pong, SB-LL) ─► [bit-plane coder]
            │  ▲            ▲                                        │ CX-D pairs
            │  └─ hold ─ sps_ctrl ─ bank / ebc_start / ebc_done      ▼
            └─► LL (to next level)               sfifo (10 bit-plane FIFOs, sorting)
                                                         │ 6 lanes, 1–2 pairs each
                                                         ▼
                                 csae: srb ◄─► state buffer (3264×16, two-port)
                                       6 × tmc (two-symbol MQ coders)
                                                         │
                                               bytes + flushed bitstreams
```

The bit-plane coder that turns stripe-buffer words into context/decision
(CX-D) pairs is not part of this core. It would be a register bank holding
the neighbourhood of each sample plus parallel context formation. The top
brings out both of its interfaces instead:

* the stripe-buffer read port (`sb_*`, `ebc_start_o`, `ebc_done_i`);
* the SFIFO push port (`push_n_i`, `push_i`, `fifo_ready_o`).

Code-block switch commands (`sw_*`) are also ports, because the same
controller would issue them.

## Stripe pipeline and its handshake (`sps_ctrl`, `stripe_buffer`)

**Buffers.** There are seven 256×11 single-port buffers:

* HL, LH and HH, each as a pair 0/1;
* one SB-LL.

For each pair, the DWT writes the bank given by `bank_o` while the reader
takes the other. A stage ends when the DWT has finished its span
(`ls_dwt.stage_o`) and the reader has reported `ebc_done_i`, in either order.
One cycle later the banks swap and `ebc_start_o` pulses.

**Holding the DWT.** If the DWT finishes first, it is held (`hold_i`) so that
it cannot overwrite a bank still being read. `hold_cnt_o` counts those
cycles.

**SB-LL.** The single SB-LL is meant for the last decomposition level. In
this single-level build it is written through its own port (`sbll_*`). An
assertion flags a write and a read in the same cycle.

**Addresses.** The write address of a coefficient is
`(row mod 4) · (W/4) + (col mod W/4)`. The reader reads band `b` (0 LL,
1 HL, 2 LH, 3 HH) at the same address. Data arrives one cycle after the read.

## The wavelet engine (`ls_dwt`, `dwt97_lift`, `sp_ram`)

**Filter.** `dwt97_lift` is one step of the 9/7 lifting filter. Its
constants are in Q12:

| α | β | γ | δ | K |
|---|---|---|---|---|
| −1.586134342 | −0.052980118 | 0.882911076 | 0.443506852 | 1.230174105 |

It takes one even/odd sample pair and the filter's four intrinsic registers.
It returns the updated registers and the low/high outputs of the pair from
two steps earlier. Symmetric extension at both ends is built into the step
(`pos_i` marks the first and last positions). Outputs are scaled as low/K
and high·K.

**Scan.** `ls_dwt` reads two vertically adjacent pixels per cycle. It
processes the tile in bands of eight rows:

* Column filtering runs down each column, four pair-steps per band.
* The four intrinsic registers of every column are kept between bands in a
  line buffer of W words × 56 bits (4 × 14 bits).
* Two row filters, one for the column-low rows and one for the column-high
  rows, consume the column results as they appear. They output LL/HL and
  LH/HH coefficients.
* Each band is scanned as a left span and a right span. The left span runs
  four columns into the right half, so the row filter has its right-hand
  context.
* After each right span come eight flush cycles that drain the row filters.

**Timing.** A W×H tile takes `(H/8+1)·W·4 + (H/8)·8 + 1` cycles with no
stalls. That is 34049 cycles for 256×256, about 1.9 samples per cycle.

**Stalls.** The pixel source stalls the engine by holding `pix_valid_i` low.

**Precision.** Coefficients keep two fractional bits inside the engine and
are rounded to 11 bits on output. Against a floating-point 9/7 transform the
error is at most about 2.2. That is the budget of this word length.

## Sorting FIFO (`sfifo`)

**FIFOs.** There are ten 6-entry FIFOs, one per magnitude bit-plane. Each
accepts up to two CX-D pairs per cycle while `ready_o` shows room for two.

**Sorting.** Every cycle the FIFOs are ranked by fill level, the fullest
first and the lower index first on ties. The six fullest non-empty FIFOs
feed the six coder lanes.

**Two-pair lanes.** A lane takes two pairs when the two head entries belong
to the same code-block and coding pass. This is what lets a two-symbol coder
run at full speed.

**Holding.** When the coder back end does not accept (`pop_en_i` low),
nothing leaves.

## Code-block switch arithmetic encoder (`csae`, `srb`, `tmc`, `tp_ram`)

### Two-symbol MQ coder (`tmc`)

`tmc` is the JPEG 2000 MQ coder (47-state probability table, conditional
exchange, byte-out with bit stuffing), unrolled to code two symbols in one
combinational pass. If both symbols use the same context, the second sees
the state the first left behind. A lane can emit up to four bytes per cycle.

### Per-bit-plane state

The state of one bit-plane is 400 bits, 25 words of 16 bits:

* 19 contexts of 7 bits each;
* three coder register sets, one per coding pass (A, C, CT, B and two flags);
* padding.

The three coding passes of a bit-plane share the contexts. Each pass has its
own bitstream.

### State register bank (`srb`)

The bank holds two sets of ten 400-bit registers, one register per
bit-plane:

* **Active set.** The coders work on the *active* set of the current
  code-block.
* **Shadow set.** The shadow set is stored to the state buffer and the next
  code-block is loaded into it, by shifting 16-bit words. This takes 250
  cycles, inside one 256-coefficient stripe.
* **First use.** A code-block coded for the first time is initialised
  instead of loaded.
* **Finish.** A finished code-block is flushed instead of stored. The flush
  circuit terminates one bitstream per cycle. It does so only for streams
  that coded at least one symbol. It runs while the shift is in progress.

### The switch

`sw_i` swaps the sets. The code-block that was loading becomes active, and
the next one named by `sw_cb_i` starts loading. The switch is accepted only
while `ready_o` is high.

### Holding lanes and tagging bytes

Lanes whose code-block is not the active one hold the whole pop. Producers
therefore hand over one code-block's pairs at a time.

Output bytes are tagged with code-block, pass and bit-plane. The bit-plane is
carried in the `cx` field of `tag_o`. The tags let a downstream packer sort
the bytes into streams.

### State buffer (`tp_ram`)

The state buffer is a two-port 3264×16 SRAM. It holds the state of 13
code-blocks at 250 words each.

## Sizes and where they come from

| Item | Value | Source |
|---|---|---|
| Tile | 256 × 256 (`W`, `H`) | as the architecture specifies |
| Stripe buffers | 7 × 256 × 11 | as specified |
| Sorting FIFOs | 10 × 6 entries | as specified |
| MQ coders | 6, two symbols/cycle | as specified |
| State buffer | 3264 × 16, 13 code-blocks | as specified |
| State per bit-plane | 400 bits | the specification gives 399 bits; 400 is one padded layout |
| Line buffer | 256 × 56 | the size needed for one level |

The three-level line buffer would be 1792 words.

## What departs from the reference architecture

* **Only one decomposition level is built.** The reference architecture
  switches the DWT between three levels in an interleaved order. That uses
  an LL-band buffer and per-level line-buffer sections. Here LL leaves on
  `ll_*` for an outer level.
* **The bit-plane coder is not included.** The neighbourhood register bank
  and parallel context formation are defined elsewhere (see *Data path*).
* **Stage length comes from the handshake.** In the reference schedule every
  stage is 768 cycles, or 1024 when the coder handles the LL code-blocks.
  Here a stage ends when both sides are done. The DWT fills a half-band stage
  in 2W+ cycles, so with a 768-coefficient reader it is usually the DWT that
  is held.
* **Flush count.** Only streams that were used are flushed. The reference
  allows a fixed 28 flush cycles per code-block.
* **Some circuits are this design's own choice.** These include the SFIFO
  ranking circuit, the state layout, the pixel interface and the bank-swap
  handshake.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_tmc`, `tb_srb`, `tb_csae` | Bitstreams byte for byte against a bit-serial reference MQ encoder (`tb/mq_ref_pkg.sv`), including load/store round trips, first-use initialisation, flush and lane holding |
| `tb_sfifo` | Ranking, two-pair lanes, ordering and flow control, against a model |
| `tb_dwt97_lift`, `tb_ls_dwt` | Against a floating-point 9/7 transform (`tb/dwt_ref_pkg.sv`); `tb_ls_dwt` also checks the cycle count, stage pulses and stalls |
| `tb_stripe_buffer`, `tb_sps_ctrl` | Ping-pong reads and the stage handshake against models |
| `tb_sp_ram`, `tb_tp_ram` | The memories |
| `tb_jp2k_top` | One full 256×256 tile at default parameters, end to end |

**What `tb_jp2k_top` does.** Every HL/LH/HH word read back from the stripe
buffers and every LL coefficient is compared with the reference transform.
Meanwhile CX-D pairs of six code-block stripes flow through the SFIFO and the
CSAE. Every bitstream is compared with the reference MQ encoder.

**Mechanisms it requires.** It counts each of these and fails if one never
happens:

* pixel stall
* DWT hold
* bank swap
* SB-LL access
* full FIFO
* two-pair lane
* held lane
* code-block switch
* load/store
* flush

**Running a testbench.** With verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_jp2k_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/jp2k_pkg.sv tb/mq_ref_pkg.sv tb/dwt_ref_pkg.sv tb/tb_jp2k_top.sv
./obj_dir/Vtb_jp2k_top
```

Use the same pattern for the other testbenches. `tb/dwt_ref_pkg.sv` is only
needed by the DWT testbenches.
