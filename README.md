# TERO sensor beside a SNOW 3G cipher with three hardware Trojans

A Transient Effect Ring Oscillator (TERO) is a tiny loop of gates that, when
released from reset, oscillates for a while and then locks. How many times it
oscillates before locking depends on the exact delays of its gates and wires,
and those delays shift slightly when extra logic is placed and routed around
it. The idea modelled here is to use that count as a sensor for hardware
Trojans: build the same device with and without a Trojan, with the TERO placed
between the victim circuit and the Trojan, and compare the oscillation counts.

The RTL contains everything needed to run that experiment in simulation:

* a SNOW 3G stream cipher (the victim), producing one 32-bit keystream word per clock;
* three denial-of-service Trojans that watch the keystream and knock or hold the cipher in reset;
* a behavioural TERO model and the asynchronous counter that measures it;
* a top level that places the four experimental designs side by side: clean, and infected with Trojan1, Trojan2 or Trojan3.

The physical effect itself cannot be reproduced by RTL. A Trojan changes the
TERO count only through placement and routing delays. In simulation the TERO
therefore gives the same count in all four designs. What the RTL does give is
the complete logic of each design, ready for an FPGA flow with fixed
placement, and a TERO model whose burst length responds to its delay
parameters in the way the measurement relies on.

## The TERO loop

Structure: two NAND gates share one control input, `ctrl`. Each NAND drives a
chain of inverters. The end of each chain feeds the second input of the other
NAND. This is an SR latch whose two feedback paths are stretched by delay
lines. One chain end drives the counter.

* **`ctrl = 0` (reset).** Both NAND outputs are forced to 1, so both chains
  settle to the same state. The output rests at 1. One control line does both
  the reset and the start, which is why this form is used in place of the
  older XOR/AND latch with separate start and reset lines.
* **`ctrl` rises (start).** Both NANDs see 1 on both inputs and switch at the
  same moment. The two halves then chase each other around the loop, so the
  output oscillates with a period of twice the branch delay.
* **Lock.** The two branches are never exactly matched. Every time round, the
  difference eats into the width of the pulse. When the pulse vanishes, the
  loop settles into one of its two stable states and the oscillation stops.
  The length of the burst measures the mismatch, and so the local delays.

`rtl/tero.sv` is a behavioural model; it cannot be synthesized. It turns the
behaviour above into explicit timing:

| quantity | value in the model |
|---|---|
| branch delay (half period) `H` | `T_NAND_PS + (LENGTH/2) * T_INV_PS` = 40 + 2·30 = 100 ps at `LENGTH = 4` |
| period | `2H` = 200 ps, constant during the burst |
| low-pulse width | starts at `H`, shrinks by `MISMATCH_PS` (2 ps) each oscillation, plus optional jitter of up to ±`JITTER_PS` |
| burst length | `ceil(H / MISMATCH_PS)` oscillations: 50 at length 4 |
| after the burst | output locked at 1 |
| `ctrl` falls mid-burst | output returns to 1 at the end of the current half period |

`LENGTH` is the total number of inverters in the loop. The basic loop has two
per branch, which is taken as length 4. The experiment sweeps lengths 4, 8,
12, 16, 20 and 24. With the default delays these give bursts of 50, 80, 110,
140, 170 and 200 oscillations. The delay values, the linear shrink and the
zero default jitter are this model's choices; no delays are given for the
real device. A positive `JITTER_PS` makes the count vary from burst to burst,
as a real TERO's does.

## Measuring: the asynchronous counter

The burst is far too fast for the system clock, so the TERO drives a ripple
counter (`rtl/ripple_counter.sv`). Bit 0 toggles on each rising edge of the
pulse train. Every later bit toggles when the bit below it falls. No clock is
needed, and only the first flip-flop must keep up with the oscillator.

A measurement goes like this:

1. Hold `tero_ctrl` low and pulse `tero_clr`. The clear is asynchronous and active high.
2. Raise `tero_ctrl`.
3. Wait until the burst has died out. With the defaults this takes about 10 ns.
4. Read `tero_count`.

The count is settled only once the pulse input has been quiet for a few
flip-flop delays. The default width is 16 bits, which is this design's
choice. The Trojan3 counters use the same module.

## The victim: SNOW 3G (`snow3g_core`)

SNOW 3G is a word-oriented stream cipher. It takes a 128-bit key and a 128-bit
IV and produces 32-bit keystream words. Its datapath has two parts:

* **LFSR (`snow3g_lfsr`).** Sixteen 32-bit stages, S0 to S15. On each step the
  new S15 is
  `(S0<<8) ^ MULalpha(S0[31:24]) ^ S2 ^ (S11>>8) ^ DIValpha(S11[7:0])`, plus the
  FSM output F during initialisation. A multiplexer selects F or 0.
  `snow3g_alpha` builds MULalpha and DIValpha. Both maps are linear over
  GF(2), so each is an 8-input XOR network of basis words.
* **FSM (`snow3g_fsm`).** Three registers:
  `F = (S15 + R1) ^ R2`, `R1 <= R2 + (R3 ^ S5)`, `R2 <= S1(R1)`, `R3 <= S2(R2)`.
  Additions are modulo 2^32.

**S-boxes (`snow3g_sbox`).** S1 and S2 are each four 8-bit-in, 32-bit-out
T-tables whose outputs are XORed. S1 uses the Rijndael byte S-box. S2 uses
the SQ byte S-box, built from a Dickson polynomial. Both spread each byte
over the word with a MixColumn step, using reduction 0x1B for S1 and 0x69
for S2.

**How the tables are made.** None of the tables is typed in.
`snow3g_pkg` computes them at elaboration from their algebraic definitions,
working with powers of a generator of GF(2^8). The inverse of g^k is
g^(255−k), and a power x^e is g^(k·e mod 255). This keeps the
elaboration-time work small.

**Sequence and timing:**

| clock edge after `start` | what happens |
|---|---|
| 0 | key/IV loaded into the LFSR in the standard pattern; R1..R3 cleared |
| 1–32 | initialisation: FSM output fed back into the LFSR |
| 33 | one keystream-mode step, output discarded |
| 34, 35, … | `z = F ^ S0` registered into the output register; `z_valid` high; one word per clock |

`busy` is high from the load until the first word. `start` may be pulsed
again at any time to rekey. The core reproduces the published first words of
the standard test sets: `ABEE9704 7AC31373` for set 1 and `EFF8A342 F751480F`
for set 2.

**Word order.** Key word k0 is `key[127:96]` and k3 is `key[31:0]`. The IV
follows the same order, IV0 to IV3.

**Reset.** The reset is active low and synchronous. It clears every register,
including the output register. A Trojan can therefore stop the keystream by
driving it low. Being synchronous, the reset also keeps the path from the
keystream, through a Trojan and back to the reset, free of combinational
loops.

## The three Trojans

All three are denial-of-service Trojans inserted at RTL. Each reads the
cipher's output word `z` and sits in the cipher's reset line. In every case
"activating" means pulling the active-low cipher reset low.

| Trojan | trigger logic | effect |
|---|---|---|
| `trojan1` | combinational: AND tree over `z[31:24]`, XOR into the reset | Whenever the top byte is `FF` the reset is inverted for that clock. The cipher is reset on the next edge and its keystream stops; the reset is then released and the cipher sits idle until restarted. |
| `trojan2` (time bomb) | AND tree over `z[16:13]` enables a counter clocked by the system clock | After 100 clocks with `z[16:13] = 1111` the counter stops and holds the reset low for good. |
| `trojan3` | first AND tree over `z[16:13]` clocks `counter1`, a 4-bit ripple counter; `tmp_load = counter1[0]` rises on every second activation; second AND tree = `tmp_load` AND `counter1[3:1]` clocks `counter2`, a 6-bit ripple counter | After 62 pulses of `counter2` the reset is held low for good. |

**Trojan3 timing.** An activation is a rising edge of the first tree's
output. `counter2` pulses at activations 15, 31, 47 and so on. The Trojan
therefore fires with activation 15 + 16·61 = 991.

**Clearing.** The counters of Trojans 2 and 3 are cleared only by the
external system reset, never by the reset they drive.

With test set 1 the three Trojans fire 251, 1305 and 15 885 clocks after
`start`.

Points where the description of the Trojans left room, and the reading used:

* **Which bits Trojan2 watches.** Trojan2 is described as reading bits 13–16
  but counting occurrences of "111". The bit range was followed: all four
  bits must be 1, as for Trojan3.
* **Trojan3's "internal bits".** `tmp_load` is combined with "three internal
  bits" that are not identified. Here they are `counter1`'s upper three bits.
* **"Deactivates the reset".** This is read as driving the active-low reset
  to 0. That is the reading under which the Trojans achieve a denial of
  service.
* **Holding the reset.** The Trojan2 and Trojan3 counters saturate at their
  thresholds, so the denial of service persists.

## The four designs and the top

`snow3g_tero_system #(TROJAN)` is one design: cipher, optional Trojan
(`TROJAN` = 0 for none, or 1, 2, 3), TERO and counter. The TERO has no logical
connection to the cipher. In a real device it is placed between the cipher
and the Trojan logic, where it is most exposed to the delay changes they
cause.

`tero_htd_top` instantiates the four designs with `TROJAN` = 0, 1, 2, 3. They
share the clock, reset, `start`, key, IV and the TERO control and clear
lines. Each design brings out its own set of outputs, indexed 0 to 3:

* `z[i]` and `z_valid[i]`: the keystream;
* `cipher_rst_n[i]`: the reset its cipher actually sees;
* `trojan_trigger[i]`: the Trojan's trigger;
* `tero_count[i]`: the TERO count.

With a common key the four keystreams are identical until a Trojan fires.

Parameters of the top: `TERO_LENGTH` (default 4) and `COUNT_WIDTH` (default
16).

For the real experiment, each design is implemented separately on the FPGA,
with placement locked so that cipher and TERO occupy the same resources in
all four. That placement is the job of the FPGA tools' constraint files. It
is not part of this RTL.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and ends with `$finish`. With plain Verilator, for example:

```
verilator --binary --timing -y rtl -y tb rtl/snow3g_pkg.sv tb/tb_tero_htd_top.sv \
          --top-module tb_tero_htd_top -o sim && ./obj_dir/sim
```

The package must be named first; `-y` finds the rest. `--timing` is needed
because the TERO model and the testbenches use delays. The TERO module runs in
1 ps time units.

| testbench | what it checks |
|---|---|
| `tb_tero_htd_top` | Whole design at default parameters, end to end. Steps: a TERO measurement (count 50 in all four designs); keystream of test set 1; each Trojan firing exactly when the testbench's own count of its trigger condition says; a restart (design 1 recovers, designs 2 and 3 stay held); a second TERO measurement. Every mechanism is counted and must occur. About 16 000 clocks, well under a second. |
| `tb_tero_lengths` | The length sweep TERO-04 to TERO-24 on the full top, expecting 50 … 200 oscillations. |
| `tb_snow3g_tero_system` | One clean design: TERO count, clear, keystream and latency. |
| `tb_snow3g_core` | Test sets 1 and 2 (16 words each), latency 34, one word per clock, rekey mid-stream, reset. |
| `tb_snow3g_lfsr`, `tb_snow3g_fsm`, `tb_snow3g_sbox`, `tb_snow3g_alpha` | The datapath parts, each against values from an independent software model. |
| `tb_tero`, `tb_ripple_counter` | The oscillator model (burst length, period, lock, abort, range under jitter) and the counter (counts, clear, wrap). |
| `tb_trojan1`, `tb_trojan2`, `tb_trojan3` | Each Trojan's trigger point to the exact word or activation, the reset it drives, and the clear. |

The ripple counters and the Trojan3 counters are cleared by an edge on their
asynchronous clear. A testbench must give them that edge: drive the clear (or
the reset) inactive and then active. Otherwise a simulator that starts flops
at random values begins from garbage.

## Limits and departures

* **Only the logic.** The Trojan-versus-clean count differences that the
  method depends on come from placement and routing delays, which RTL does not
  model. All four designs report the same TERO count in simulation.
* **The TERO cannot be synthesized as written.** `tero.sv` is a timing model.
  A real TERO is built from hand-placed NAND and inverter cells (FPGA LUTs)
  with fixed routing. Its gate delays (40 ps NAND, 30 ps inverter) and the
  2 ps per-oscillation mismatch are illustrative values.
* **The cipher's internals come from the SNOW 3G standard.** The key/IV
  loading pattern, the 32 initialisation clocks, the discarded first clock,
  the S-box definitions and the alpha multipliers are taken from the
  standard. Only the block structure of the cipher is specific to this
  design.
* **The cipher handshake is this design's own.** The `start` pulse,
  `z_valid`, `busy` and the synchronous active-low reset were chosen here.
* **Asynchronous counters.** The Trojan3 counters are clocked by
  keystream-derived signals, as described for that Trojan. Such logic is
  glitch-prone in hardware and will draw timing warnings from FPGA tools.
  That is in keeping with a deliberately hidden circuit, but it is not a
  pattern for ordinary design.
* **Lint warnings.** The Trojans read only a few bits of `z`, so a full lint
  (`-Wall`) reports the other bits as unused.
