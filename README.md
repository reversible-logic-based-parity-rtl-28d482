# Reversible parity and Hamming protection for a QCA nano-communication link

A three-bit message crosses a noisy nanoscale link. The transmitter adds an
**odd parity bit**, so the four transmitted bits always hold an odd number of
ones. If the receiver sees an even number of ones, a bit flipped on the way,
and it raises `check_bit`. In parallel, four data bits A3..A0 are sent as a
**Hamming(7,4) code word**. The receiver computes a **syndrome** from it, and
a **look-up table** flips back one corrupted bit.

The circuit targets Quantum-dot Cellular Automata (QCA). In QCA, logic is
made from cells whose polarisation (+1 or -1) stands for a bit. It has two
primitives: the three-input **majority gate**, `M = AB + BC + AC`, and the
**inverter**. The parity circuits are also *reversible*: every gate maps its
inputs one-to-one onto its outputs, so no information is erased. The building
block is the 2x2 **Feynman gate**:

    P = A            Q = A xor B

To make a circuit reversible, each gate keeps extra "garbage" outputs that
copy inputs, besides the useful result. This RTL models the circuit at logic
level. Polarisation +1 is logic 1 and -1 is logic 0. All paths are
combinational.

## Hierarchy

    nano_comm_system                     top
    ├── nano_transmitter
    │   ├── parity_generator             2 Feynman gates + inverter
    │   └── hamming_encoder
    ├── comm_channel  (WIDTH=4)          parity word  + error mask
    ├── comm_channel  (WIDTH=7)          code word    + error mask
    └── nano_receiver
        ├── parity_checker               3 Feynman gates + 3 inverters
        ├── syndrome_calculator
        └── lookup_table
    feynman_gate  = 2 inverters + 3 majority gates (qca_inverter, qca_majority)

`nano_comm_pkg` holds the widths and the types `parity_word_t`, `ham_code_t`,
`ham_data_t` and `ham_syn_t`.

## The parity generator: why X1 xor (X2 xnor X3)

For message bits X1, X2, X3 the generator computes

    parity = X1 xor (X2 xnor X3)   =  NOT (X1 xor X2 xor X3)

This is the bit that makes the number of ones odd. It takes two Feynman gates:

1. FG(X2, X3) gives `P = X2`, which is garbage line GAR2, and `Q = X2 xor X3`.
2. An inverter turns Q into `X2 xnor X3`.
3. FG(X1, X2 xnor X3) gives `P = X1`, which is GAR1, and `Q = parity`.

Truth table (the generator's output, and the check bit over an ideal channel):

| X1 X2 X3 | parity | GAR1 GAR2 | check bit |
|----------|--------|-----------|-----------|
| 0 0 0    | 1      | 0 0       | 0         |
| 0 0 1    | 0      | 0 0       | 0         |
| 0 1 0    | 0      | 0 1       | 0         |
| 0 1 1    | 1      | 0 1       | 0         |
| 1 0 0    | 0      | 1 0       | 0         |
| 1 0 1    | 1      | 1 0       | 0         |
| 1 1 0    | 1      | 1 1       | 0         |
| 1 1 1    | 0      | 1 1       | 0         |

## The parity checker

The checker is written exactly as its defining expression:

    check_bit = ( (X1 xor X2)' xor (X3 xor P)' )'

It uses three parts:

- one Feynman gate on (X1, X2) and one on (X3, P);
- an inverter on each of their XOR outputs;
- a third Feynman gate that combines the two, followed by a final inverter.

The two inner inversions cancel, so `check_bit = NOT(X1^X2^X3^P)`. It is 1
(error) for an even number of ones. The message returns on the garbage lines
GAR1..GAR3 = X1..X3. This is a parity check, so it detects an odd number of
flipped bits. It misses an even number. The end-to-end testbench counts both
cases.

## The Hamming path

The code layout is the standard one. `code[i]` is position i+1:

| position | 7  | 6  | 5  | 4  | 3  | 2  | 1  |
|----------|----|----|----|----|----|----|----|
| bit      | A3 | A2 | A1 | p4 | A0 | p2 | p1 |

    p1 = A0^A1^A3     p2 = A0^A2^A3     p4 = A1^A2^A3

Syndrome bit k is the parity of every position whose index has bit k set.
After one flipped bit, the syndrome is that bit's position; for a clean word
it is 0. The look-up table has eight entries. Entry s holds the correction
mask `1 << (s-1)`, and entry 0 holds zero. The selected mask is XORed onto
the word, the data bits are taken back from positions 3, 5, 6 and 7, and
`ham_error` shows that a correction was made. A double error is miscorrected,
as in any Hamming(7,4) code.

## Top-level ports (`nano_comm_system`)

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `msg`           | in  | 3 | X1..X3, `msg[0]` = X1 |
| `par_err`       | in  | 4 | lines the channel flips, as `{parity, X3, X2, X1}` |
| `ham_data`      | in  | 4 | A3..A0, `ham_data[0]` = A0 |
| `ham_err`       | in  | 7 | code positions 7..1 the channel flips |
| `tx_parity`     | out | 1 | generated parity bit |
| `tx_gar`        | out | 2 | generator garbage `{GAR2, GAR1}` = `{X2, X1}` |
| `rx_msg`        | out | 3 | checker garbage GAR1..GAR3 = received X1..X3 |
| `check_bit`     | out | 1 | 1 = received parity word has even parity |
| `ham_syndrome`  | out | 3 | position of the flipped code bit, 0 = none |
| `ham_corrected` | out | 4 | corrected A3..A0 |
| `ham_error`     | out | 1 | 1 = a bit was corrected |

Timing: purely combinational. There are no clock and no reset.

## How far this follows the source design, and where it departs

These parts follow the published design:

- the Feynman gate equations;
- the majority-gate equation;
- the generator equation and its truth table;
- the checker equation, with check bit = 1 meaning error;
- the transmitter / medium / receiver split;
- the three-bit message with one parity bit;
- the names of the Hamming encoder, syndrome calculator and look-up table, and
  the four data inputs A3..A0.

The following are this design's own choices:

- **The XOR inside the Feynman gate.** The QCA layout uses a compact
  cell-level XOR whose structure is not given. Here the XOR is built in the
  textbook way from the two primitives: two majority gates with one input
  fixed at 0 act as ANDs, one with an input fixed at 1 acts as an OR, and
  there are two inverters. The logic function is the same; the cell count and
  delay of the layout are not modelled.
- **The generator's gate order.** A block diagram of the generator labels its
  garbage outputs `A` and `A xor B`. The defining equations and the truth
  table instead give GAR1 = X1 and GAR2 = X2. The RTL follows the equations:
  X2 and X3 enter the first gate, and X1 enters the second.
- **The Hamming part.** The Hamming encoder, syndrome calculator and look-up
  table appear only as named regions of the full-circuit layout, with inputs
  A3..A0. Their code is assumed to be the standard Hamming(7,4), with the bit
  order above.
- **Garbage outputs.** The layout labels five garbage lines, GAR1..GAR5. The
  RTL brings out the five that the equations define: two from the generator
  and three from the checker. Which layout label belongs to which line is not
  known.
- **Channel noise.** `comm_channel` is a plain wire in QCA. The XOR error mask
  is added so that errors can be injected.
- **Clocking.** QCA layouts are pipelined by a four-phase clock. That clock is
  an analog control field, and the number of clock zones per block is not
  specified, so neither the clock nor the latency is modelled.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_nano_comm_system` is the end-to-end test, and it runs the top with no
parameter overrides:

- the eight truth-table rows over an ideal channel;
- then every message × every 4-bit parity error pattern × every data value ×
  every Hamming error of weight 0 or 1 (16,384 cases).

It counts each mechanism: clean words, detected parity errors, even-weight
errors that parity cannot see, clean code words and corrected code words. The
test fails if any count is zero.

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/nano_comm_pkg.sv tb/tb_nano_comm_system.sv \
        --top-module tb_nano_comm_system
    ./obj_dir/Vtb_nano_comm_system

Use the same command for any other testbench, changing the name.
`comm_channel` has one parameter, `WIDTH` (default 4: three message bits plus
parity). No other module has parameters, because the gate widths are fixed
by the circuit.

## Known lint notes

- `parity_checker`: the copy output of its last Feynman gate is internal
  garbage, so it is deliberately left unconnected.
- `lookup_table`: only the data positions of the corrected word are used.

Verilator reports both as unused signals.
