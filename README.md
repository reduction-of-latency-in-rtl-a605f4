# Zero-sum coded asynchronous link

This is a point-to-point link that sends data words over delay-insensitive, dual-rail, four-phase wires. It protects each word with a **zero-sum code**: a systematic code that is unordered and corrects single-bit errors. The receiver acknowledges a word as soon as every bit has arrived. It does not wait until the word is also correct; a single flipped bit is repaired afterwards from the code word itself. An acknowledge that does not wait for a timer keeps the round-trip latency of each transfer down to the handshake alone.

A separate zero-sum+ codec is included next to the link, with its own ports. It adds one parity bit to the code word and can either detect up to three errors or correct one error while detecting two.

## The zero-sum code

Every bit position has an *index weight*:

* data bits take the integers that are not powers of two, in order: data bit 0 weighs 3, bit 1 weighs 5, bit 2 weighs 6, bit 3 weighs 7, then 9, 10, 11, …;
* check bit *k* weighs 2^k.

The check field is the sum of the weights of the data bits that are **0**, written in binary. The code word is `{data, check}`, with the data unchanged in the upper bits, so the receiver reads the data straight off the wires. The check field needs `$clog2(sum of all data weights + 1)` bits. That is 5 bits for the default 4-bit word (largest sum 3+5+6+7 = 21).

| data (d3..d0) | check | | data | check |
|---|---|---|---|---|
| 0000 | 21 = 10101 | | 1000 | 14 = 01110 |
| 0001 | 18 = 10010 | | 1001 | 11 = 01011 |
| 0010 | 16 = 10000 | | 1010 |  9 = 01001 |
| 0011 | 13 = 01101 | | 1011 |  6 = 00110 |
| 0100 | 15 = 01111 | | 1100 |  8 = 01000 |
| 0101 | 12 = 01100 | | 1101 |  5 = 00101 |
| 0110 | 10 = 01010 | | 1110 |  3 = 00011 |
| 0111 |  7 = 00111 | | 1111 |  0 = 00000 |

**Why the code is unordered.** Suppose code word X covers code word Y, meaning X has a 1 wherever Y has one. Then X's data has at least the 1s of Y's data, so its zero-sum, and hence its check value, is no larger. But a check field that covers another is at least as large, so the check fields would have to be equal, and then the data fields too. No valid word is reached on the way to another as its bits rise one by one. This is what lets a receiver decide from the wires alone that a word is complete.

**Correcting one error.** The receiver recomputes the zero-sum from the data it received. The *syndrome* is the received check value minus the recomputed one:

* Flipping data bit *i* from 0 to 1 removes its weight from the recomputed sum, so the syndrome is +w_i. A flip from 1 to 0 gives −w_i.
* Flipping check bit *k* shifts the received value by ±2^k.

All weights are distinct, so |syndrome| names the flipped bit, and inverting that bit repairs the word. A syndrome of 0 means no error. A magnitude that is no bit's weight cannot come from a single flip. It is reported as `uncorrectable` and the word is passed on unchanged.

Two errors always give a non-zero syndrome, so they are always *detected*. The decoder runs in correct mode, though, so a double error whose syndrome magnitude equals some third bit's weight is miscorrected. Correcting one error and detecting two at the same time is what zero-sum+ is for.

## Zero-sum+

The zero-sum+ code word is `{data, check, p}`, where `p` makes the parity of the whole word even. The decoder classifies a received word by its parity and its syndrome:

| parity | syndrome | correct mode (`correct_mode_i = 1`) |
|---|---|---|
| even | 0 | no error |
| odd | ≠ 0 | one data/check bit flipped: zero-sum correction |
| odd | 0 | the parity bit flipped: toggled back |
| even | ≠ 0 | two bits flipped: `double_o`, not corrected |

In detect mode (`correct_mode_i = 0`), any odd parity or non-zero syndrome is an error and nothing is changed. This catches every 1-, 2- and 3-bit error. In correct mode, a triple error can still be miscorrected. When its syndrome names no weight it is flagged `uncorrectable`.

## The link

```
 in_data ─► zs_source ─► zs_encoder ─► zs_four_phase_converter ══ T/F rails ══► zs_receiver ─► out_data
              ▲ done                        ▲ ack                              │  zs_completion_detector (both rails)
              └──────────────────────────── ack ◄──────────────────────────────┤  zs_decoder (true rails only)
```

**Dual-rail, return to zero.** Each code-word bit travels on two wires. Logic 1 is T=1, F=0; logic 0 is T=0, F=1. T=F=0 is the *spacer* between words. One transfer is a four-phase handshake:

1. The converter drives the word on the rails (evaluate phase).
2. The completion detector sees every bit arrive (T|F = 1 on every position). Its C-element raises `ack`.
3. The converter returns every rail to 0 (reset phase).
4. The completion detector sees every bit leave. The C-element lowers `ack`, and the converter reports `done` to the source.

**Completion without a timer.** The completion detector ORs the two rails of each bit and feeds the results to a Muller C-element. The C-element rises when all inputs are 1, falls when all are 0, and otherwise holds. It checks only that the word is *complete*, never that it is *correct*. On the same clock edge at which `ack` rises, the receiver registers the decoder's output and pulses `out_valid_o`. The decoder works on the true rails alone: in a systematic code they *are* the code word.

**Clocked model.** All of this is written as synchronous logic on one clock `clk`, with an asynchronous active-low reset `rst_n`. The C-element is a flip-flop, and the converter is a three-state FSM (SPACER, EVAL, RTZ). The order of events is that of the asynchronous protocol. With an ideal channel, counted from the clock edge that takes a word into the source:

| edge | event |
|---|---|
| +0 | source takes the word (`in_valid_i && in_ready_o`) |
| +1 | converter enters EVAL, rails driven |
| +2 | C-element high: `ack_o = 1`, `out_valid_o` pulse, corrected word on `out_*` |
| +3 | rails back to the spacer |
| +4 | `ack_o = 0` |
| +5 | transfer done, source ready (`in_ready_o = 1`) |
| +6 | a waiting word is taken |

The link therefore carries one word every 6 cycles.

**Faults on the wires.** `chan_err_i` is a test input of the top that sits between the converter and the receiver. For each bit set, that bit's T and F rails are swapped. During the evaluate phase this delivers the bit inverted as a clean dual-rail value, and the spacer still arrives intact. It models a single-bit upset that the code is there to correct; with `chan_err_i = 0` the channel is ideal. Other wire faults behave as follows:

* A fault that raises *both* rails of a bit completes the bit, and the decoder reads its T rail.
* A fault that leaves *both* rails low means the word never completes. The link then waits: there is no timeout.

## Modules

| module | role |
|---|---|
| `zs_pkg` | weight rule: `data_weight(i)`, `weight_sum(n)`, `check_width(n)` (constant functions) |
| `zs_encoder` | one 2:1 selector per data bit (weight or 0), then a balanced adder tree; combinational |
| `zs_decoder` | re-encodes the data, forms the signed syndrome, inverts the named bit; combinational |
| `muller_c` | N-input C-element, clocked |
| `zs_completion_detector` | per-bit T\|F into a C-element; output is `ack` / "valid code word" |
| `zs_four_phase_converter` | dual-rail RZ driver and handshake FSM; assertions for the rail rules |
| `zs_source` | holds the sender's word for the whole transfer; accepts only when `enable_i` is high and idle |
| `zs_receiver` | completion detector plus decoder, with the output register |
| `zsp_encoder`, `zsp_decoder` | zero-sum+ codec (combinational) |
| `zs_system` | top: the link plus the zero-sum+ codec side by side |

**Parameters.** `DATA_W` (default 4) sets the word size. `CHECK_W` defaults to `check_width(DATA_W)`, which is 5 for 4 bits; it should not normally be set by hand. Any `DATA_W` works; the weights follow the rule above.

**Top-level ports of `zs_system`:**

* Local side: `enable_i`, `in_valid_i`, `in_data_i`, `in_ready_o`.
* Channel: `chan_err_i`, and `ack_o` to observe the acknowledge.
* Receiver: `out_valid_o`, `out_data_o`, `out_check_o`, `out_syndrome_o`, `out_err_o`, `out_corrected_o`, `out_uncorrectable_o`.
* Zero-sum+ codec: `zsp_data_i` → `zsp_codeword_o`; `zsp_codeword_i`, `zsp_correct_mode_i` → `zsp_data_o`, `zsp_check_o`, `zsp_parity_o`, `zsp_syndrome_o`, `zsp_err_o`, `zsp_corrected_o`, `zsp_uncorrectable_o`, `zsp_double_o`.

## What follows the published design, and what is chosen here

These parts follow the published design:

* the weight rule;
* the 4-bit encoder (selectors with weights 3, 5, 6, 7 and adders; check bits 16..1);
* the syndrome and the single-bit correction;
* the zero-sum+ parity bit and its classification;
* dual-rail four-phase signalling;
* a completion detector built on a C-element with no timer;
* a decoder that sees only the true rails;
* the chain source → encoder → converter → completion detector and decoder, with `ack` returned to the sender.

These are choices made here:

* The whole design is a clocked model, with a one-cycle C-element and reset values of 0.
* The source's valid/ready side and the converter's `req`/`done` interface. In the published block diagram the acknowledge returns to the source. Here the converter, which runs the handshake, takes `ack` and tells the source with `done`.
* The receiver's output register and flags, including `uncorrectable` for unmatched syndromes.
* Check-field width = `$clog2(sum + 1)`.
* The parity bit of zero-sum+ in the least significant position.
* The `chan_err_i` fault input.
* Weights for words wider than 4 bits. The published examples stop at four bits, and the encoder's adder tree is generalised to match.

These are not built:

* **Other weight assignments of the zero-sum family.** Only the basic assignment (3, 5, 6, 7, … on the data bits) is built; the others are not specified.
* **Zero-sum\***, a variant that corrects some double errors under other weight assignments. Its weights and heuristic are not specified.
* **The earlier receiver** whose completion detector waits on a timer until the word is correct. It is the architecture this design replaces.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For example, the end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl rtl/zs_pkg.sv tb/tb_zs_system.sv --top-module tb_zs_system -o sim
./obj_dir/sim
```

The other testbenches run the same way.

| testbench | what it shows |
|---|---|
| `tb_zs_system` | 400 words end to end at the default size. Every second word has one bit flipped, alternating data and check bits. Checks the 2-cycle output latency and the 6-cycle word period. Exercises enable-off and source-busy stalls and the reset phase. Runs the zero-sum+ codec in both modes. Each mechanism is counted and must occur. |
| `tb_zs_encoder` | all 16 words against the table above; a 6-bit instance against a hand-written weight list |
| `tb_zs_decoder` | every word with 0 and 1 flipped bits (repaired, with the expected signed syndrome) and with 2 flipped bits (always detected) |
| `tb_zs_small_codes` | the 2-bit (check values 8, 5, 3, 0) and 3-bit (14, 11, 9, 6, 8, 5, 3, 0) codes, with all single errors |
| `tb_zsp_encoder`, `tb_zsp_decoder` | every word with every pattern of up to 3 flipped bits, in both modes |
| `tb_zs_receiver` | bits arrive and leave one at a time in random order; `ack` only after the last one, one cycle later |
| `tb_zs_completion_detector`, `tb_muller_c`, `tb_zs_four_phase_converter`, `tb_zs_source` | the handshake pieces against reference models, with random delays |

The converter and the source carry concurrent assertions, which are active with `--assert`:

* never both rails of a bit high;
* the spacer whenever the converter is not in EVAL;
* a complete word during EVAL;
* the source's word stable for the whole transfer.
