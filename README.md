# Fault-tolerant 64 x 16 memory with SEC-DED ECC and built-in self-test

Stored bits go bad in two ways: a transient upset flips a bit that was
written correctly, and a permanent defect (a stuck cell, a broken bit line,
an address decoder that selects the wrong word) corrupts every access to
the same place. This design protects a small 64-word x 16-bit memory
against both:

* **transient errors** are handled on every access by an error-correcting
  code. Each 16-bit word is stored with six check bits (a 22-bit codeword).
  On a read, a single flipped bit is corrected on the fly and reported, and
  two flipped bits are detected and reported as uncorrectable (SEC-DED:
  single error correction, double error detection);
* **permanent faults** are found by a built-in self-test (BIST) that, on
  request, takes over the memory, writes test patterns into every word,
  reads them back and compares, without any external tester.

The memory therefore runs in one of two modes: *normal mode*, where a user
reads and writes data through the encoder and decoder, and *self-test
mode*, where the BIST owns the memory port.

```
              write path                          read path
data_in ──► ecc_encoder ──► (XOR inj_mask) ──► ram 64 x 22 ──► ecc_decoder ──► data_out
  16b           22b                              ▲     │            16b + single_err/double_err
                                                 │     │
                               bist_controller ──┘◄────┘   (raw 22-bit words, no ECC)
                               start / busy / done / error / fail_addr
```

## The code word

The code is an *extended Hamming code*. Positions in the 22-bit codeword
are numbered 0..21:

| position         | contents                                    |
|------------------|---------------------------------------------|
| 1, 2, 4, 8, 16   | Hamming check bits c0..c4                   |
| 3, 5, 6, 7, 9..15, 17..21 | data bits d0..d15, in that order   |
| 0                | overall parity of positions 1..21           |

Check bit `c_j` (at position `2^j`) is the XOR of every data position whose
index has bit `j` set. With that choice, the **syndrome**, the XOR of the
indices of all positions holding a 1, is zero for a valid word, and when a
single bit flips it equals the index of that bit. Hamming bits alone cannot
tell one error from two, because a pair of flips also gives a nonzero
syndrome (the XOR of the two indices), which points at a third, innocent
bit. The overall parity bit settles it: one flip makes the total parity odd,
two flips leave it even. The decoder therefore decides:

| syndrome        | overall parity | verdict                                              |
|-----------------|----------------|------------------------------------------------------|
| 0               | even           | no error                                             |
| any value 0..21 | odd            | single error at that position, corrected; `single_err` |
| nonzero         | even           | double error, data left as read; `double_err`         |
| 22..31          | odd            | cannot come from one flip; reported as `double_err`   |

A syndrome of 0 with odd parity means the overall parity bit itself flipped;
the data is intact and `single_err` is still reported. Three or more flips
are outside what the code guarantees: they may be miscorrected.

The code widths are computed, not hard-coded: `hm_pkg::hamming_par_w(k)`
gives the smallest `r` with `2^r >= k + r + 1` (5 for 16 data bits), and the
codeword is `k + r + 1` bits. `ecc_encoder` and `ecc_decoder` take `DATA_W`
as a parameter and build the layout above with loops, so another word width
only needs a new `DATA_W` (and a matching `DEPTH`/width in the top).

**Departure from the original description.** The design this RTL follows
specifies 5 parity bits and a 21-bit codeword, and at the same time asks for
SEC-DED. A 21-bit Hamming code over 16 data bits can correct single errors
but cannot detect all double errors, so the two requirements cannot both
hold. This implementation keeps the 5 Hamming check bits and adds the one
overall parity bit that double-error detection needs, giving 22 bits.
Likewise the memory is described as "64 x 16"; here it holds 64 words of 16
data bits, each stored as its 22-bit codeword.

## Normal mode: request, latency and flags

| port                  | dir | width | meaning                                          |
|-----------------------|-----|-------|--------------------------------------------------|
| `clk`, `rst_n`        | in  | 1     | clock; synchronous active-low reset              |
| `valid`               | in  | 1     | a request is present this cycle                  |
| `wr_rd`               | in  | 1     | 1 = write, 0 = read                              |
| `address`             | in  | 6     | word address                                     |
| `data_in`             | in  | 16    | write data                                       |
| `ready`               | out | 1     | one-cycle pulse: the request has completed       |
| `data_out`            | out | 16    | corrected read data                              |
| `single_err`          | out | 1     | the last read had a single-bit error, corrected  |
| `double_err`          | out | 1     | the last read had an uncorrectable error         |

A request is accepted in any cycle where `valid` is high, no self-test is
running and `bist_start` is low; one request per cycle can be issued
back-to-back. There is no back-pressure: a request made while the BIST is
busy is simply dropped and gets no `ready`.

Timing, counted in rising clock edges from the edge that samples the
request:

* edge 0: a write stores its codeword; a read loads the RAM output
  register;
* edge 1: the decoder's result (combinational, behind the RAM register) is
  captured in `data_out`, `single_err`, `double_err`;
* `ready` is high in the cycle after edge 1, for both reads and writes.

`data_out` and the two flags hold their values until the next read
completes. After a double error `data_out` is the uncorrected data and must
not be trusted.

## Self-test mode

| port              | dir | width | meaning                                             |
|-------------------|-----|-------|-----------------------------------------------------|
| `bist_start`      | in  | 1     | start a self-test (sampled when no test is running) |
| `bist_busy`       | out | 1     | test running; the BIST owns the memory              |
| `bist_done`       | out | 1     | test finished; held until the next start            |
| `bist_error`      | out | 1     | at least one word read back wrong                   |
| `bist_fail_addr`  | out | 6     | address of the first wrong word                     |

The BIST works on the raw 22-bit words and bypasses the ECC, so a stuck
check bit is found just like a stuck data bit, and the ECC cannot hide a
defect from the test. It runs three passes; each pass writes all 64 words
(one per cycle) and then reads all 64 back (one per cycle):

1. **checkerboard**: bit `b` of word `a` is `~(b[0] ^ a[0])`, so
   neighbouring bits and neighbouring words hold opposite values;
2. **inverse checkerboard**: every cell is now seen holding the other value,
   so a cell stuck at 0 or at 1 fails in one of the two passes;
3. **address pass**: word `a` holds the 6-bit address repeated across the
   word. Two addresses that reach the same physical word (an address decoder
   fault) leave the wrong address in it, even when both addresses have the
   same parity and the checkerboards cannot tell them apart.

The RAM answers a read one edge later, so the compare runs one cycle behind
the read address; one extra cycle after the last read lets the final compare
finish. `bist_done` rises 3 x (64 + 64) + 1 = **385 edges** after the edge
that sampled `bist_start`. The test overwrites the whole memory: rewrite
the data after a test.

The pattern set and the timing are this implementation's choice; the
original design only says that predefined patterns are written, read back
and compared. It is not a March test (March sequences were left as a
possible extension).

## Fault injection

`inj_mask` (22 bits) is XORed into every word written to the RAM, in both
modes. In normal mode a mask with one or two bits set stores a word with a
single or double error, which exercises the decoder; during a self-test a
nonzero mask behaves like a defective bit line and must make the BIST fail
at address 0. Tie it to zero in normal use (synthesis then removes it).

## Modules

| file                        | role                                                      |
|-----------------------------|-----------------------------------------------------------|
| `rtl/hm_pkg.sv`             | default sizes (16 data bits, 64 words) and code-width functions |
| `rtl/ecc_encoder.sv`        | combinational SEC-DED encoder, `DATA_W` -> `CODE_W`        |
| `rtl/ecc_decoder.sv`        | combinational syndrome decoder, correction and flags       |
| `rtl/ram.sv`                | single-port `DEPTH` x `WIDTH` array, synchronous write, registered read |
| `rtl/bist_controller.sv`    | three-pass self-test state machine                         |
| `rtl/hybrid_mem_top.sv`     | top: mode control, memory-port multiplexer, output registers |

The top's parameters are `DATA_W` (16) and `DEPTH` (64); the others are
derived. After synthesis the top is about 70 flip-flops, 1408 memory bits
and about 180 word-level cells. The RAM is written as an array, so a synthesis tool
can map it to a memory macro or to flip-flops. Assertions in the top and in
the BIST check the request/`ready` relation, that no request is taken during
a test, that `single_err` and `double_err` are never both set, and that the
BIST never reads and writes in one cycle.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench               | what it checks                                                      |
|-------------------------|---------------------------------------------------------------------|
| `tb_ecc_encoder`        | hand-worked vectors, all one-hot and 2000 random words against an independent reference (`secded_ref_pkg`) |
| `tb_ecc_decoder`        | 40 words x (clean, all 22 single flips, all 231 double flips)      |
| `tb_ram`                | random fill and scrambled readback, latency, hold, read-during-write |
| `tb_bist_controller`    | clean memory, stuck-at-1 and stuck-at-0 cells, two kinds of address aliasing; duration and access counts |
| `tb_hybrid_mem_top`     | end to end at the default size: traffic, every single-bit upset, 30 double upsets, a passing and a failing self-test, requests during test, return to normal mode, then 2000 random reads and writes with random 0-, 1- or 2-bit upsets |

`secded_ref_pkg` builds codewords a different way from the RTL (it chooses
the check bits so that the syndrome becomes zero), so the encoder is not
checked against itself. The top-level test counts each mechanism and fails
if one never occurred. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hm_pkg.sv tb/secded_ref_pkg.sv rtl/ecc_encoder.sv rtl/ecc_decoder.sv \
  rtl/ram.sv rtl/bist_controller.sv rtl/hybrid_mem_top.sv \
  tb/tb_hybrid_mem_top.sv --top-module tb_hybrid_mem_top
./obj_dir/Vtb_hybrid_mem_top
```

Any other testbench builds the same way with its own top module. All run in
well under a second.

## Limits and choices to know about

* The 22-bit codeword (instead of 21) is deliberate, see *The code word*.
* Port protocol, `wr_rd` polarity, the two-edge latency, the `ready` pulse
  and dropping requests during a self-test are this implementation's
  choices; the original design names the signals but does not define their
  timing.
* The memory array has no reset; read a word only after writing it.
* A self-test destroys the memory contents.
* Only one access port is provided; the dual-port memories discussed as
  background are not part of this design.
