# Hamming (3,1) encoder, error detector and single-error corrector from reversible gates

This design protects one data bit with the smallest Hamming code, Hamming (3,1). The sender adds
two parity bits. The receiver recomputes the parity checks, finds which of the three bits (if
any) was flipped in transit, and flips it back. Every XOR is a 2x2 reversible Feynman
(controlled-NOT) gate. The structure comes from a design aimed at quantum-dot cellular automata
(QCA), where reversible gates are valued for their low energy dissipation. Here it is written as
ordinary synthesizable, purely combinational SystemVerilog.

## The code

For D data bits, the number of parity bits P is the smallest that satisfies 2^P >= D + P + 1.
With D = 1 this gives P = 2 and a 3-bit code word. Bits are numbered by position:

| position | 1  | 2  | 3  |
|----------|----|----|----|
| bit      | P1 | P2 | D1 |

P1 covers positions {1, 3} and P2 covers positions {2, 3}. Both checks use even parity. Since D1
is the only data bit, both parity bits equal D1, so the code word is D1 repeated three times.
`hamming31_pkg::codeword_t` is a packed struct `{d1, p2, p1}`: bit k-1 of the vector is position k.

## Feynman gate (`feynman_gate`)

The Feynman gate has outputs `p = a` and `q = a ^ b`. It is a bijection on its four input
patterns, and applying it twice restores the inputs. With `b` tied to 0 it acts as a reversible
fan-out: both outputs copy `a`.

## Encoder (`hamming31_hcg`)

The encoder is one Feynman gate with D1 on `a` and a constant 0 on `b`. Output `q` gives P1 and
output `p` gives P2. Both carry D1, so which output feeds which parity bit is an arbitrary choice.
The top module builds the sent word `{D1, P2, P1}`.

## Error detector (`hamming31_edp`)

Two Feynman gates recompute the checks on the received word:

    EDP1 = P1 ^ D1      EDP2 = P2 ^ D1

Each gate takes D1 on `a` and one parity bit on `b`. Its `p` output is a copy of D1. This copy is
the gate's garbage output: it carries no information the circuit needs, but it keeps the gate
reversible. Both garbage bits are brought out on `garbage`.

## Corrector (`hamming31_corrector`, `decoder_2to4`, `mux_2to1`)

This is the part that needs the most care. Read as a number, the pair {EDP2, EDP1} is the
*syndrome*:

| EDP2 EDP1 | meaning               | decoder output high | bit flipped |
|-----------|-----------------------|---------------------|-------------|
| 0 0       | word intact           | O0                  | none        |
| 0 1       | position 1 (P1) wrong | O1                  | CM1         |
| 1 0       | position 2 (P2) wrong | O2                  | CM2         |
| 1 1       | position 3 (D1) wrong | O3                  | CM3         |

A 2-to-4 decoder turns the syndrome into the one-hot outputs O0..O3. Each received bit feeds an
inverter and a 2-to-1 mux. The mux's inputs are the bit and its inverse, and its select line is
the decoder output for that bit's position: O1 selects for P1, O2 for P2 and O3 for D1. O0 drives
no mux; it only shows that no error was found. When a select line is high, its mux outputs the
inverted bit. The corrected message is CM1, CM2, CM3 (corrected P1, P2, D1), and CM3 is the
recovered data bit.

Two conventions here are this design's own reading of the original block diagram. Both are the
only choices under which the circuit corrects errors:

* EDP1 has weight 1 and EDP2 has weight 2. Only with this weighting does Ok point at position k
  and match the wiring of O1, O2 and O3 to the P1, P2 and D1 muxes.
* Decoder outputs and mux selects are active high: a 1 on Ok flips bit k.

The decoder has an immediate assertion that its output is one-hot.

Any single-bit error is corrected. With two or three flipped bits, the corrector outputs three
copies of the majority value of the received bits, which is the wrong data bit. A 3-bit code
cannot do better than that.

## The link (`hamming31_top`)

`hamming31_top` places the encoder on the sending side and the detector and corrector on the
receiving side. The channel between them is not part of the design. The sent word leaves on
`tx_code`, and the word after the channel comes back in on `rx_code`. The detector's EDP bits
drive the corrector, and the received word feeds both.

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `d1`      | in  | 1     | data bit to send |
| `tx_code` | out | 3     | sent word {D1, P2, P1} |
| `rx_code` | in  | 3     | received word |
| `edp1`, `edp2` | out | 1 each | syndrome bits |
| `garbage` | out | 2     | garbage outputs of the detector gates |
| `dec_o`   | out | 4     | decoder outputs O0..O3 |
| `cm`      | out | 3     | corrected word {CM3, CM2, CM1} |
| `d1_out`  | out | 1     | recovered data bit (CM3) |

Timing: nothing in the design is clocked and nothing is reset. Every output is a combinational
function of `d1` and `rx_code`. Logic depth from `rx_code` to `cm` is one XOR, the decoder's AND
terms and one mux. Register the ports if the link has to fit a clocked pipeline. The original
design also reports QCA cell counts, layout area, QCA clock-phase latency and energy dissipation.
Those belong to the QCA layout and have no counterpart here. After coarse synthesis, the whole
link is 12 word-level cells (4 AND, 3 MUX, 3 NOT, 2 XOR).

## Where this RTL departs from the QCA original

* **Physical layer.** The QCA cell layouts, four-phase clock zones and coplanar crossovers are not
  modelled. The RTL captures only the logic of each circuit.
* **Inverters.** The corrector's three inverters are written as a bitwise NOT, not as separate
  modules.
* **EDP inputs.** The corrector takes EDP1 and EDP2 as inputs, as in the original block diagram,
  so it can also be driven on its own. In the top module they come from the detector.
* **Select sense.** One sentence of the original describes the mux selection the other way round:
  the flipped bit is chosen when the decoder output is 0. This design follows the active-high
  reading, which is the one that actually corrects errors.

## Files

| file | content |
|------|---------|
| `rtl/hamming31_pkg.sv` | code-word struct, syndrome and one-hot types, code size constants |
| `rtl/feynman_gate.sv` | 2x2 reversible Feynman gate |
| `rtl/hamming31_hcg.sv` | encoder (parity generator) |
| `rtl/hamming31_edp.sv` | error detector (EDP1, EDP2) |
| `rtl/decoder_2to4.sv` | syndrome decoder |
| `rtl/mux_2to1.sv` | 2-to-1 multiplexer |
| `rtl/hamming31_corrector.sv` | decoder + inverters + muxes |
| `rtl/hamming31_top.sv` | sender and receiver together |
| `tb/tb_<module>.sv` | one self-checking test bench per module |

## Simulating

Each test bench prints `TB_RESULT checks=N failures=M`, then calls `$finish`. A watchdog ends any
run that hangs. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/hamming31_pkg.sv tb/tb_hamming31_top.sv \
              --top-module tb_hamming31_top -Mdir obj_top -o sim
    ./obj_top/sim

Replace `hamming31_top` with any other module name to run its bench. What the benches cover:

* The benches for the Feynman gate, decoder, mux, encoder and detector apply every input pattern.
  The Feynman gate bench also checks reversibility.
* `tb_hamming31_corrector` drives all 32 combinations of EDP1, EDP2, P1, P2 and D1. It then checks
  that every single-bit error on either data value is repaired.
* `tb_hamming31_top` acts as the channel. It sends each data bit with all eight error patterns,
  then 1000 random transmissions. It counts clean transfers, corrections at each of the three
  positions and uncorrectable multi-bit errors, and fails if any of these never occurs.

Expected values in each bench are computed independently of the RTL equations: from position sets,
from bit counts, or from majority voting.

## Changing the design

The code size is fixed at Hamming (3,1). The constants in `hamming31_pkg` record it, and
`hamming31_top` has an elaboration check that they agree with the code-word type. A larger Hamming
code needs more Feynman gates in the encoder and detector, a wider syndrome decoder, and one
inverter and mux per code-word bit. The pattern stays the same: syndrome bit j is the XOR over all
positions whose index has bit j set, and decoder output k flips position k.
