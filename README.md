# EEDC codec: Hamming-style checks appended after the data

A Hamming code puts its check bits at positions 1, 2, 4, 8, … of the codeword. The data
bits fill the positions in between. Both the transmitter and the receiver then have to
spread the data out and gather it back. EEDC (enhanced error detection-correction) keeps
the Hamming parity idea but drops the interleaving. Every position 1…D carries data, and
the r check bits are appended after the data as one block. In polynomial terms the
codeword is

    code(x) = D(x) · x^r + r(x)

so the data word is sent unchanged and a short field follows it. This is the same framing
as a CRC, but with a parity field whose size grows with D only as far as the sizing rule
below requires.

This repository holds a parameterised, synthesizable SystemVerilog transmitter
(encoder), a matching receiver (checker/corrector), and self-checking testbenches. The
default size covers data fields of 1 to 8 bytes (8 to 64 bits), the data field of a
CAN 2.0A frame.

## The code

### How many check bits

For D data bits the encoder uses the smallest r that satisfies

    D + r + 1 <= 2^r

| data | 7 bits | 1 B | 2 B | 3 B | 4 B | 5 B | 6 B | 7 B | 8 B |
|------|--------|-----|-----|-----|-----|-----|-----|-----|-----|
| r    | 4      | 4   | 5   | 5   | 6   | 6   | 6   | 6   | 7   |
| code | 11     | 12  | 21  | 29  | 38  | 46  | 54  | 62  | 71  |

### What each check bit covers

Data positions are numbered 1…D, starting at the most significant (first-sent) bit. Let k
be the number of bits needed to write the number D.

* **Position parity j**, for j = 0 … k−1, is the even parity of the data positions whose
  binary index has bit j set. Parity 0 covers positions 1, 3, 5, 7, …, parity 1 covers
  2, 3, 6, 7, …, and so on. This is the Hamming rule, applied to data positions only.
* The sizing rule gives either r = k or r = k + 1. When r = k + 1, the last check bit is
  the **extra bit**: the even parity of the k position parities.

The check field is sent in this order: parity 0, parity 1, …, parity k−1, then the extra
bit if there is one.

Worked example with 7 data bits, `1001110`. Here r = 4 and k = 3.

| position    | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 (parity 0) | 9 (parity 1) | 10 (parity 2) | 11 (extra) |
|-------------|---|---|---|---|---|---|---|---|---|---|---|
| bit         | 1 | 0 | 0 | 1 | 1 | 1 | 0 | 0 | 1 | 1 | 0 |

* Parity 0 covers positions {1,3,5,7}. The bits there are 1,0,1,0, so the parity is 0.
* Parity 1 covers {2,3,6,7}: 0,0,1,0, so it is 1.
* Parity 2 covers {4,5,6,7}: 1,1,1,0, so it is 1.
* The extra bit is 0⊕1⊕1 = 0.

The codeword sent is `10011100110`. For 8 data bits the sizing rule gives r = k = 4, so
there is no extra bit. The four checks are the parities of index bits 0…3, often labelled
r1, r2, r4 and r8.

### Why the receiver cannot always correct

The receiver runs the encoder's computation again on the received data. It XORs the
result with the received position parities, which gives a k-bit syndrome s. One bit
error gives:

* **data position p hit**: s = p;
* **position parity j hit**: s = 2^j.

In a Hamming code these two cases never give the same syndrome, because positions 1, 2,
4, … hold check bits. In EEDC those positions hold data. So a syndrome of 1, 2, 4, … fits
two cases: an error in data position 2^j, or an error in check bit j. The extra bit tells
them apart. An error in a position parity also breaks the extra bit's check. An error in
a data bit does not. When there is no extra bit (D = 8, 16, 64, …), the receiver cannot
tell which bit was hit. It then reports the error as detected and uncorrectable and
passes the data on unchanged.

The receiver's decision table:

| syndrome s                  | extra-bit check | result                                   |
|-----------------------------|-----------------|------------------------------------------|
| 0                           | ok or absent    | no error                                 |
| 0                           | fails           | extra bit was hit; data good, corrected  |
| power of two                | fails           | position parity was hit; data good, corrected |
| 1 ≤ s ≤ D                   | ok              | data bit s flipped back, corrected       |
| 1 ≤ s ≤ D, not power of two | absent          | data bit s flipped back, corrected       |
| power of two                | absent          | detected, uncorrectable (ambiguous)      |
| anything else               | –               | detected, uncorrectable                  |

With no extra bit the code has minimum distance 2. For example, errors in data position 1
and in parity 0 cancel each other. Some double errors therefore pass undetected. With the
extra bit, such a pair is caught.

## Hardware

```
             +-------------+   r, k    +--------------+  r field  +--------+
 data, len ->| r identifier|---------->| r generator  |---------->| r bits |--+
      |      +-------------+           +--------------+           +--------+  |  +----------+
      |                                  ^ data                               +->| combiner |-> code,
      +----------------------------------+-------------------->| data output |-->|          |   code_len
                                                               +-------------+   +----------+
```

| module | role |
|--------|------|
| `eedc_pkg` | `MAX_DATA_W` (64) and elaboration functions `r_for_len`, `k_for_len`, `len_w` |
| `eedc_r_identifier` | combinational: r, k and `has_extra` for the run-time length `len` |
| `eedc_r_generator` | combinational: left-aligns the valid data, so position p is at a fixed bit; one XOR tree per position parity over a constant mask; orders the field |
| `eedc_field_reg` | load-enabled holding register; one holds {len, data} ("data output"), one holds {r_count, r field} ("r bits") |
| `eedc_combiner` | masks data to `len` bits and forms `(data << r_count) \| r_field` and `code_len = len + r_count` |
| `eedc_encoder` | the transmitter: identifier → generator → two field registers → combiner |
| `eedc_decoder` | the receiver: splits the codeword, reuses the identifier and generator, builds the syndrome, applies the table above, registers the result |
| `eedc_codec` | top: encoder and decoder side by side, sharing only clock and reset |

The data length is an input that can change every word (1 … `MAX_D` bits). One circuit
therefore handles every frame size. All check bits are computed in parallel, in the same
cycle.

### Interfaces and timing

* Clock `clk`. Reset `rst_n` is synchronous and active low, and clears the valid flags
  and the output registers.
* **Transmitter**: present `tx_data` (right-aligned, upper bits ignored) and `tx_len` with
  `tx_valid` high for one cycle. On the next cycle `tx_code_valid` is high for one cycle.
  `tx_code` then holds the codeword, right-aligned, and `tx_code_len` its length. The first
  bit to send is `tx_code[tx_code_len-1]`. Bits above the length are zero. The outputs
  stay until the next word is taken.
* **Receiver**: present `rx_code` (right-aligned) and `rx_len`, the data length (for CAN,
  the value given by the DLC field), with `rx_valid`. One cycle later `rx_data_valid`
  arrives with the data (corrected where possible), `rx_err_detected`,
  `rx_err_corrected`, `rx_err_uncorrectable` and `rx_syndrome`.
* Throughput is one word per clock on each side. Latency is one clock on each side.
* Assertions check that the length is in 1…`MAX_D`, and that the encoder's r is k or k + 1.

At the default `MAX_D = 64` the widths are: data 64, length 7, codeword 71, syndrome 7.
Set `MAX_D` on `eedc_codec` (or on either half) for another maximum. Every derived width
follows from it.

## Where this design makes its own choices

The code itself comes from the EEDC description: the sizing rule, the parity sets, the
order of the check field, and appending the checks after the data. The following are
this implementation's choices:

* **Extra-bit rule in general.** The EEDC description works one example, 7 bits with
  r = k + 1, where the last bit is the parity of the other checks. This design applies
  that rule whenever r = k + 1, and uses position parities only when r = k.
* **The receiver.** EEDC is described as a receiver that reruns the encoder's algorithm
  to check and correct. The syndrome table above, and the handling of the ambiguous
  power-of-two case, are this design's.
* **Interfaces.** The run-time length input, the parallel right-aligned codeword with a
  length field, the valid strobes, the single pipeline register, and the synchronous
  reset are all this design's choices.
* **Out of scope.** The rest of the CAN frame (start of frame, identifier, control, CRC
  field) is not implemented. The serial transmission of the codeword is not implemented
  either.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare against
`eedc_ref_pkg`, a separate bit-by-bit model that loops over positions, written
independently of the RTL.

| testbench | what it checks |
|-----------|----------------|
| `tb_eedc_r_identifier` | r, k, extra flag for every length 0…64 |
| `tb_eedc_r_generator`  | the 7-bit example (`0110`), 4000 random words/lengths, each single bit of a 64-bit word |
| `tb_eedc_field_reg`    | reset, load and hold |
| `tb_eedc_combiner`     | the 7-bit example, random data/field/length with junk above the lengths |
| `tb_eedc_encoder`      | the 7-bit example (`10011100110`), 3000 random words; one-clock latency |
| `tb_eedc_decoder`      | every single-bit error of 300 words of lengths 1…64 against the decision table; multi-bit errors: detection ⇔ word is not a codeword |
| `tb_eedc_codec`        | end to end at default size: transmitter → bit-flipping channel → receiver |

`tb_eedc_codec` runs the top with no parameter overrides. Each of these events must
occur at least once, or the test fails:

* a clean word;
* a corrected data bit;
* a corrected check bit;
* an ambiguous single error;
* a detected multi-bit error;
* back-to-back words.

A second phase sends 500 words for each data-field size from 1 to 8 bytes. Each word
gets 1 to 4 random bit flips, and the testbench prints the share detected. That share is
about 96–99%, depending on the size. Undetected multi-bit errors occur, as the distance
argument above predicts.

Simulating with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/eedc_pkg.sv tb/eedc_ref_pkg.sv tb/tb_eedc_codec.sv \
    --top-module tb_eedc_codec -Mdir obj && ./obj/Vtb_eedc_codec
```

The packages are listed first; `-y` lets Verilator find the modules. Each testbench ends by printing `TB_RESULT checks=N failures=M`. Linting runs cleanly
with `verilator --lint-only -Wall` apart from one unused-signal warning: the encoder does
not use the generator's raw position parities, which only the receiver needs.
