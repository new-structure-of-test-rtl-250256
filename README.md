# Crosstalk test pattern generator for on-chip buses: the (2n-1)-SR-TPG

Long parallel bus lines between the cores of a system-on-chip couple
capacitively. A transition on neighbouring lines (aggressors) can put a glitch
on a quiet line (the victim), or slow down or speed up a transition on it. To
test for this at speed, a built-in generator must drive the bus with vector
pairs in which one line is the victim and **all** other lines switch the same
way at the same time (the Maximum Aggressor Fault Model, MAFM), once for each
line and each fault type.

This RTL implements a very small generator for such tests. It has no
multiplexer network and no per-line state machine. It is a shift register of
2n-1 flip-flops fed by a single toggle flip-flop, with a counter and a small
decoder that tell the toggle when to skip a beat. Apart from the register,
which grows with the bus, the logic is a few dozen gates. It produces either
of two sequences:

| sequence | faults stimulated on every line | length m | theoretical minimum |
|---|---|---|---|
| MAFM  | Pg0, Ng1, Dr, Df | 8n+1  | 6n |
| XMAFM | Pg0, Ng1, Dr, Df, Pg1, Ng0, Sr, Sf | 12n+3 | 6n+3 |

Fault names: Pg0/Pg1 are a positive glitch on a victim held at 0/1, and
Ng1/Ng0 a negative glitch on a victim held at 1/0. Dr/Df are a delayed rising
or falling edge on the victim, and Sr/Sf a speeded-up one. The aggressors rise
for Pg0, Pg1, Df and Sr, and fall for Ng1, Ng0, Dr and Sf.

The price of such a cheap generator is length: 8n+1 vectors instead of 6n for
MAFM, and 12n+3 instead of 6n+3 for XMAFM. It runs at one vector per clock.

## How one bit stream tests every line

This is the part worth understanding before reading the RTL.

1. **One stream, many delayed copies.** The toggle flip-flop CNT feeds the
   register's serial input. Bus line `Y_i` is taken from stage `2i`, so line i
   carries the same bit stream as line 0, delayed by 2i clocks.
2. **All lines move together while the stream alternates.** While the decoder
   holds EN=1, CNT toggles every clock and the stream is 0101... A stream with
   period 2 delayed by an even number of clocks is unchanged, so all n lines
   are equal and switch together. This gives the vector pairs where every line
   is an aggressor: Sr and Sf in XMAFM, 0000→1111→0000.
3. **A hold shifts the phase.** When the decoder gives EN=0 for one clock, CNT
   repeats its bit, and every later bit of the stream is out of phase with
   every earlier bit. Two holds close together leave a short piece of stream
   between them that is out of phase with the rest.
4. **The out-of-phase piece visits the lines in turn.** The piece moves one
   stage per clock and the taps are two stages apart. Every two clocks it
   therefore sits under the next line. While it does, that line is the only
   one out of step: it is the victim, and all the other lines switch together.
   Which fault the victim sees depends on whether it holds or switches, and in
   which direction. The placement of the holds decides that.

The decoder's list of hold points (below) places these phase steps so that
each group of about 2n vectors sweeps a victim across all n lines for one or
two fault types. For the default 8-line MAFM generator the 65 vectors
(hex, bit i = line `I_i`) are:

| vectors | contents | stimulates (victim line 0 → 7, two vectors per line) |
|---|---|---|
| 0–15  | `00 fe 00 fd 00 fb 00 f7 00 ef 00 df 00 bf 00 7f` | Pg0 (and Ng0) |
| 16–31 | `01 fe 02 fd 04 fb 08 f7 10 ef 20 df 40 bf 80 7f` | Df |
| 32–47 | `00 ff 01 ff 02 ff 04 ff 08 ff 10 ff 20 ff 40 ff` | Ng1 (and Pg1) |
| 48–64 | `80 fe 01 fd 02 fb 04 f7 08 ef 10 df 20 bf 40 7f 80` | Dr |

Each fault type takes two vectors per line, which is why the length is 8n+1
rather than the 6n of a sequence built line by line. The XMAFM sequence
(12n+3 vectors) starts with the three all-lines vectors for Sr/Sf. It then
sweeps the victim six times: Pg0/Ng0, Df, Pg1/Ng1, another Sf/Sr pair,
Ng1/Pg1, Dr and Pg0/Ng0. Together these cover all eight faults on every line.

## Blocks

```
             +---------+  EN   +-----+  SI   +-------------------------------+
  TPC0 ----> |   DEC   | ----> | CNT | ----> | stage 0 1 2 3 ... 2n-2  (SR)  |--> scan_out
  TPC1 ----> |         | EOT   +-----+   ^   +---+-----+-----+-------+-----+-+
             +---------+                 |       Y0    Y1    Y2  ... Y(n-1)
  (TPC: TPC0 mod n or 2n, TPC1 steps when TPC0 wraps)   scan_in   |
                                         (mux, scan_en)          v
                                              func_data --> [bus mux] --> bus_out
```

| module | role |
|---|---|
| `tpg_pkg` | sequence-type enum and the size functions (TPC0 modulus and width, TPC1 width, CNT initial value, length m) |
| `tpg_shift_reg` | the (2n-1)-stage register, with taps `Y_i` = stage 2i, a scan multiplexer on its input and `scan_out` on its last stage |
| `tpg_toggle` | CNT, one flip-flop that toggles when EN=1 |
| `tpg_pattern_counter` | TPC: TPC0 counts modulo n (MAFM) or 2n (XMAFM); TPC1 (4 bits for MAFM, 3 bits for XMAFM) steps when TPC0's top bit falls, which is when TPC0 wraps |
| `tpg_decoder` | DEC: EN and EOT from the pair ⟨TPC1,TPC0⟩ |
| `sr_tpg` | the generator: the four parts above plus start/stop control |
| `bus_test_mux` | one 2:1 multiplexer per bus line: functional data or generator output |
| `xtalk_tpg_top` | generator plus bus multiplexer |

### Decoder table

Vector number t = TPC1·mod + TPC0. EN is 0 (CNT holds) at:

| sequence | TPC0 modulus | EN = 0 at ⟨TPC1,TPC0⟩ | EOT = 1 at | CNT starts at |
|---|---|---|---|---|
| MAFM  | n  | ⟨0,0⟩ ⟨1,n-2⟩ ⟨2,0⟩ ⟨4,0⟩ ⟨4,1⟩ ⟨5,n-1⟩ ⟨6,1⟩ | ⟨8,0⟩ (t = 8n) | 0 |
| XMAFM | 2n | ⟨0,1⟩ ⟨0,2⟩ ⟨1,0⟩ ⟨1,2⟩ ⟨2,0⟩ ⟨2,1⟩ ⟨3,2⟩ ⟨3,3⟩ ⟨4,1⟩ ⟨4,3⟩ ⟨5,1⟩ ⟨5,2⟩ | ⟨6,2⟩ (t = 12n+2) | 1 |

EN and EOT do not matter after the last vector, and a gate-minimal decoder
can use that freedom. This decoder makes EN=1 and EOT an exact match there.
The table needs n ≥ 2.

## Control and timing

* `rst_n` (asynchronous, active low) and `start` put the generator into its
  starting state. The counters are 0 and CNT holds its start value. The
  register is filled 0,1,0,1,... from stage 0, so even stages are 0 and odd
  stages 1, as if the alternating stream had already run through it. Vector 0
  is therefore all zeros. This preset is required: an all-zero or all-one
  register leaves Pg0 untested on some lines.
* On the clock after `start`, `busy` rises and vector 0 is on the bus. After
  that the generator gives one vector per clock. `busy` stays high for exactly
  m clocks, and `eot` is high on the last of them. The generator then stops,
  holds the last vector and keeps `eot` high until the next `start`.
* `scan_en` shifts `scan_in` into stage 0 on every clock and shows the last
  stage on `scan_out`. The counters and CNT stay frozen meanwhile. A bit
  presented before clock k appears on `scan_out` after clock k+2n-2. This lets
  the register be a segment of an existing scan chain or boundary register.
* `test_mode` selects the generator (1) or `func_data` (0) for `bus_out`. It
  is combinational and can change at any time.
* `en_dbg` shows the decoder's EN. It is for observation only.

## Parameters and sizes

`N` (bus width n, default 8) and `SEQ` (`SEQ_MAFM` by default, or `SEQ_XMAFM`).
Flip-flop count: 2n-1 (register) + l0 (TPC0) + l1 (TPC1) + 1 (CNT) + 1
(running flag). For the default size that is 15 + 3 + 4 + 1 + 1 = 24.

| n | MAFM m | XMAFM m | l0 MAFM / XMAFM |
|---|---|---|---|
| 8 | 65 | 99 | 3 / 4 |
| 16 | 129 | 195 | 4 / 5 |
| 32 | 257 | 387 | 5 / 6 |
| 64 | 513 | 771 | 6 / 7 |
| 128 | 1025 | 1539 | 7 / 8 |
| 256 | 2049 | 3075 | 8 / 9 |
| 512 | 4097 | 6147 | 9 / 10 |
| 1024 | 8193 | 12291 | 10 / 11 |

All 16 configurations were simulated (`tb_tpg_table2`). Each gives exactly
these lengths and covers every fault on every line. The same holds for the
MAFM generator at n = 12, 20, 24 and 28 (97 to 225 vectors), and for both
sequences at n = 2, 3, 5 and 7. In those cases the TPC0 modulus is not a
power of two.

## Choices made in this implementation

The structure, the counter moduli and widths, the decoder's hold points and
the CNT start values are the published design. The following are this
implementation's own:

* **Tap order.** Y_0 is the stage next to the serial input. Tapping from the
  other end also gives full coverage, but the victims are then visited in the
  opposite order.
* **Register preset.** The published design gives no initial content for the
  register. The preset described above is the one that works.
* **Single clock for TPC.** In the original structure the top bit of TPC0
  clocks TPC1 as a ripple counter. Here TPC1 is a synchronous counter, enabled
  when that bit falls. The count sequence is the same, and there is no derived
  clock.
* **End of sequence.** The hold and EOT positions follow the rule that the
  sequence has 8n+1 or 12n+3 vectors. The MAFM sequence ends at ⟨8,0⟩ and the
  XMAFM sequence at ⟨6,2⟩, the counter state of vector 12n+2 with TPC0 counting
  modulo 2n.
* **start/busy control**, stopping at EOT, synchronous preset, and the
  asynchronous reset.
* **Multiplexers.** The generator is meant to connect to a scan path and to
  the bus through multiplexers. Their form here is one 2:1 mux on the
  register's serial input and one per bus line.

Not included: the bus wires themselves and the response analyzer at the
receiving end. Neither is designed here. A host core's scan chain or IEEE
1500 wrapper register, which could hold the shift register, is not included
either.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tpg_toggle` | toggle/hold/preset against a reference bit, random stimulus |
| `tb_tpg_shift_reg` | every stage against a model, with random shift, scan and preset |
| `tb_tpg_pattern_counter` | ⟨TPC1,TPC0⟩ = ⟨t div mod, t mod mod⟩ under random advance, for four configurations |
| `tb_tpg_decoder` | every counter state of four decoders against the hold and EOT lists written out as vector numbers |
| `tb_bus_test_mux` | random selects and data |
| `tb_sr_tpg` | 4-line MAFM (33 vectors) and XMAFM (51 vectors) compared with reference tables; 8-line lengths; fault coverage; restart; scan |
| `tb_xtalk_tpg_top` | end-to-end with 6-line MAFM and 5-line XMAFM: functional mode, test sequence, coverage, restart, scan chain, mode switch during a sequence; counts that each of these happened |
| `tb_xtalk_tpg_full` | the top at its default parameters: all 65 vectors against a reference, length, EOT, coverage |
| `tb_tpg_table2` | the 16 sizes of the table above, plus n = 12, 20, 24, 28 (MAFM) and n = 2, 3, 5, 7 (both) |

Fault coverage is measured by `xtalk_cov_pkg`, which knows only the fault
definitions. For every consecutive pair of vectors and every line, it checks
whether all other lines made the same transition, and if so records the fault
this pair stimulates on that line.

To run a testbench with plain Verilator, from the directory above `rtl/` and
`tb/`:

```
verilator --binary --timing -y rtl -y tb -Irtl -Itb \
    rtl/tpg_pkg.sv tb/xtalk_cov_pkg.sv tb/tb_xtalk_tpg_full.sv \
    --top-module tb_xtalk_tpg_full -o sim
./obj_dir/sim
```

Substitute any testbench name. For a single block, `tb/xtalk_cov_pkg.sv` is
needed only by the generator-level testbenches, but listing it does no harm.
