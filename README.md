# Compact NTRUEncrypt core

NTRUEncrypt is a lattice-based public-key cryptosystem whose heavy work is one
operation: multiplying a small polynomial (coefficients -1, 0, +1) by a
polynomial with coefficients mod q, in the ring Z[x]/(x^N - 1). This core is
built for devices such as RFID tags and smart cards, where area and power
matter far more than speed, and it rests on two observations:

* the keys and the message already sit in the device's memory, so the core
  can work directly on that memory instead of keeping copies in registers;
* the required throughput is low, so one memory access per clock cycle is
  enough.

The core therefore holds only a controller (a handful of address pointers, a
7-state FSM and one 8-bit coefficient register) and a 7-bit accumulator plus a
2-bit mod-3 register. Everything else lives in a shared 1 KB single-port RAM.
A further saving comes from skipping zero coefficients: the controller never
fetches the operand that a zero coefficient would multiply, so a sparse
blinding value or key costs only as many data reads as it has non-zero terms.

Default configuration: N = 167, p = 3, q = 128 (a moderate security level),
RAM 1024 x 8 bit.

## What it computes

| operation  | formula (all products in Z[x]/(x^N - 1))                        |
|------------|-----------------------------------------------------------------|
| encryption | e = r*h + m  (mod q)                                            |
| decryption | a = f*e (mod q), b = centre-lift(a) mod 3, c = f_p*b (mod 3)    |

r is the random blinding value, h the public key, (f, f_p) the private key
with f*f_p = 1 (mod 3), m the message with coefficients -1, 0, +1. The factor
p = 3 is taken to be contained in the public key (h = 3 * f_q * g), the usual
textbook convention; with it, the core reproduces the textbook N = 11, q = 32
example exactly (see `tb/tb_ntru_core.sv`). Centre lift maps a value a in
0..q-1 to a - q when a > q/2, i.e. into (-q/2, q/2].

q must be a power of two (parameter `Q_BITS`); the accumulator then wraps
modulo q by itself.

## Memory layout and coefficient encodings

All operands and results are in the RAM, at base addresses fixed by
parameters (the "pointers"):

| polynomial            | default base (N=167) | words | format                 |
|-----------------------|----------------------|-------|------------------------|
| r  (blinding value)   | `R_PTR`  = 0         | 42    | packed ternary         |
| h  (public key)       | `H_PTR`  = 42        | 167   | one coefficient / byte |
| m  (message)          | `M_PTR`  = 209       | 167   | one coefficient / byte |
| e  (ciphertext)       | `E_PTR`  = 376       | 167   | one coefficient / byte |
| f  (private key)      | `F_PTR`  = 543       | 42    | packed ternary         |
| f_p (private key)     | `FP_PTR` = 585       | 42    | packed ternary         |
| b  (scratch)          | `B_PTR`  = 627       | 167   | 0, 1 or 2 per byte     |
| c  (decrypted message)| `C_PTR`  = 794       | 167   | 0x00, 0x01, 0xFF (-1)  |

Packed ternary: four coefficients per byte, two bits each, coefficient 4w+j
in bits [2j+1:2j] of word w. `01` = +1, `11` = -1, `00` = 0 (`10` is read as 0).
A polynomial takes NW = ceil(2N/8) words; unused slots in the last word must
be 0. For N = 167 the last word has one padding slot.

Byte coefficients (h, m, e): only the low `Q_BITS` bits are used, so a message
coefficient -1 may be stored as 0x7F or 0xFF. e is written as 0..q-1.

The defaults need 961 bytes. The pointers may overlap where the data flow
allows it: e can be written over m (m_k is read in the same row that writes
e_k) and c over e (the second decryption pass no longer reads e). With that,
N = 251 fits in 942 bytes (`tb/tb_ntru_n251.sv`).

## How one output coefficient is computed

The core produces the result one coefficient at a time. Output k of a pass is

    out_k = sum over i of c_i * d_((k - i) mod N)   (+ addend_k)

with c the packed ternary polynomial (r, f or f_p) and d the byte polynomial
(h, e or b). Computing out_k is one *row*. Every cycle of a row makes exactly
one RAM access:

| state     | code      | RAM access                                   |
|-----------|-----------|----------------------------------------------|
| `S_CREAD` | `0000001` | read coefficient word at `coef_ptr`          |
| `S_SLOT0` | `0000010` | coefficient word arrives; read data for slot ≥ 0 |
| `S_SLOT1` | `0000100` | read data for slot ≥ 1                       |
| `S_SLOT2` | `0001000` | read data for slot ≥ 2                       |
| `S_SLOT3` | `0010000` | read data for slot 3                         |
| `S_MREAD` | `0100000` | read the addend (message) coefficient        |
| `S_WRITE` | `1000000` | write the result                             |
| `S_IDLE`  | `0000000` | none                                         |

The RAM answers one cycle after a read, so in `S_SLOT0` the coefficient word
is on the RAM output; it is kept in `coef_reg` for slots 1..3. In a slot state
s the zero detector (`ntru_skip`) finds the first non-zero coefficient at a
slot t ≥ s. The controller then reads the matching data word at once, at data
index `idx - (t - s)`, and moves `idx` down by `t - s + 1`. Zero coefficients
thus cost no cycle at all. If the rest of the word is zero, the slot state
does not wait: in the same cycle it behaves like `S_CREAD` (next coefficient
word) or, after the last word, like `S_MREAD`, moving `idx` down by `4 - s`.
The explicit `S_CREAD` and `S_MREAD` states are only entered after a read for
slot 3.

Accumulation runs one cycle behind the reads: in the cycle after a data read,
the datapath adds or subtracts the RAM output according to the sign of the
coefficient that caused the read. In `S_WRITE` the RAM output is the addend
read in the cycle before, and the result is formed and written in the same
cycle.

Example, N = 11, row 0, with r = -1 + x^2 + x^3 + x^4 - x^5 - x^7
(words: r0 = {-1, 0, +1, +1}, r1 = {+1, -1, 0, -1}, r2 = {0, 0, 0, pad}):

| cycle | state | access | accumulator after the cycle          |
|-------|-------|--------|--------------------------------------|
| 1     | CREAD | r0     | 0                                    |
| 2     | SLOT0 | h0     | 0                                    |
| 3     | SLOT1 | h9 (r01 = 0 skipped) | -h0                    |
| 4     | SLOT3 | h8     | -h0 + h9                             |
| 5     | CREAD | r1     | -h0 + h9 + h8                        |
| 6     | SLOT0 | h7     | same                                 |
| 7     | SLOT1 | h6     | ... + h7                             |
| 8     | SLOT2 | h4 (r12 = 0 skipped) | ... - h6               |
| 9     | CREAD | r2     | ... - h4                             |
| 10    | SLOT0 | m0 (word r2 is all zero) | same              |
| 11    | WRITE | e0 = acc + m0 |                               |

Eleven accesses instead of the 24 a plain schoolbook row would need.

### Wrapping the data index

Reading d_((k-i) mod N) means the data pointer runs downwards and wraps from
d_0 to d_(N-1). The controller keeps a data index `idx` in 0..N-1 and adds
its base pointer to form the address; every step of at most 4 is followed by
a single conditional add of N. A row steps `idx` down once per coefficient
slot, 4*NW times in all, including padding slots. The next row must start
one higher than the last one did, so `S_WRITE` adds `4*NW - N + 1` modulo N.
That is 2 for N = 11, 167 and 251, since all three are 3 mod 4.

### End of a row and of a pass

The last coefficient word of a row is recognised by `coef_ptr` having reached
its base plus NW. `S_WRITE` rewinds `coef_ptr` and advances the addend and
result pointers. After N rows (`msg_cnt`) the pass ends.

## Decryption in two passes

Decryption runs the same row loop twice with other pointers:

1. coefficients f, data e, result b: the accumulator holds a = f*e mod q, and
   the write state stores centre-lift(a) mod 3 as 0, 1 or 2.
2. coefficients f_p, data b, result c: the 2-bit mod-3 register accumulates
   (acc3 ± b) mod 3 instead, and the write state stores it as 0x00, 0x01 or
   0xFF.

Both passes keep the addend read (`S_MREAD`). Its value is ignored in
decryption, but the shared control and timing stay the same. The switch from
pass 1 to pass 2 costs no cycle.

## Timing

Each row costs NW + (non-zero coefficients) + 2 cycles, so

* encryption: N * (ceil(2N/8) + w_r + 2) cycles,
* decryption: N * (2*ceil(2N/8) + w_f + w_fp + 4) cycles,

where w is the number of non-zero coefficients. For N = 167 and
w_r = 36 this is 13,360 cycles. For w_f = w_fp = 120 it is 54,776 cycles.
Both figures are checked cycle-exactly in simulation. `busy` is high for
exactly these cycles.

Size after generic synthesis (word-level cells, excluding the RAM): about 220
cells and 77 flip-flops for the core.

## Interface (`ntru_top`)

| port          | dir | width | meaning                                              |
|---------------|-----|-------|------------------------------------------------------|
| `clk`, `rst_n`| in  | 1     | clock; asynchronous active-low reset                 |
| `start`       | in  | 1     | start an operation (taken while `busy` = 0)          |
| `decrypt`     | in  | 1     | sampled with `start`: 0 encrypt, 1 decrypt           |
| `busy`        | out | 1     | operation running, from the cycle after `start`      |
| `done`        | out | 1     | one-cycle pulse after the last result is written     |
| `host_en`     | in  | 1     | host RAM access                                      |
| `host_we`     | in  | 1     | host write                                           |
| `host_addr`   | in  | 10    | host address                                         |
| `host_wdata`  | in  | 8     | host write data                                      |
| `host_rdata`  | out | 8     | RAM output, valid the cycle after a host read        |

Use: write the operands through the host port, pulse `start`, wait for
`done`, read the result. While `busy` is high the core owns the RAM and
host accesses are ignored.

`ntru_core` is the same without the RAM and host port: it has a plain
single-port RAM interface (`ram_addr`, `ram_ren`, `ram_wen`, `ram_wdata`,
`ram_rdata` with one cycle read latency), for use with an existing memory.

## Files

| file                     | contents                                                  |
|--------------------------|-----------------------------------------------------------|
| `rtl/ntru_pkg.sv`        | word/address types, state and pass enums, helpers         |
| `rtl/ntru_skip.sv`       | zero-coefficient detector (combinational)                 |
| `rtl/ntru_ctrl.sv`       | FSM, pointers, data index, coefficient register           |
| `rtl/ntru_datapath.sv`   | mod-q accumulator, mod-3 register, result formation       |
| `rtl/ntru_core.sv`       | controller + datapath                                     |
| `rtl/spram.sv`           | 1 KB x 8 single-port synchronous RAM                      |
| `rtl/ntru_top.sv`        | core + RAM + host port                                    |
| `tb/ntru_ref_pkg.sv`     | reference model: convolution, packing, decryption, keys   |
| `tb/tb_*.sv`             | self-checking testbenches                                 |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

* `tb_ntru_skip`: all 256 words x 4 start slots.
* `tb_spram`: random writes and reads, read latency, output hold.
* `tb_ntru_datapath`: random accumulate sequences in all three passes, q = 128
  and q = 32.
* `tb_ntru_ctrl`: the full RAM access trace of every cycle, compared with a
  trace derived from the convolution's definition, plus the accumulate/sign
  strobes and cycle counts (N = 11 and 23, encryption and decryption).
* `tb_ntru_core`: the textbook N = 11 example end to end (published
  ciphertext, decryption back to m), then random operands against the model.
* `tb_ntru_top`: the default N = 167 design through its host port.
  Encryption and decryption are checked against the model, with the cycle
  counts 13,360 and 54,776. The test counts that each controller mechanism
  occurs: zero skipping, the zero-remainder shortcuts, index wrap, the pass
  switch, mod-3 accumulation and a host access blocked while busy.
* `tb_ntru_n251`: N = 251 with overlapping pointers in the 1 KB RAM.
* `tb_ntru_roundtrip`: real key pairs at N = 167. The testbench generates
  f, f_p = f^-1 mod 3, f_q = f^-1 mod 128 and h = 3 f_q g. It encrypts a
  random message, decrypts it and checks that the message comes back.

`tb_ntru_top` and `tb_ntru_n251` decrypt with random f and f_p, not a
matching key pair. They check the arithmetic against the model, not that m
comes back; that is what `tb_ntru_roundtrip` and the N = 11 case in
`tb_ntru_core` do.

Running one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/ntru_pkg.sv tb/ntru_ref_pkg.sv rtl/spram.sv rtl/ntru_skip.sv \
      rtl/ntru_ctrl.sv rtl/ntru_datapath.sv rtl/ntru_core.sv rtl/ntru_top.sv \
      tb/tb_ntru_top.sv --top-module tb_ntru_top
    ./obj_dir/Vtb_ntru_top

The testbenches use `$urandom`. Runs with different seeds
(`+verilator+seed+<n>`) draw different operands.

## Design choices and departures

What comes from the published design:

* the single shared 8-bit RAM with one access per cycle;
* the 2-bit packing of ternary polynomials, four to a word;
* the seven one-hot states and their pointer moves;
* zero-coefficient skipping, including the shortcut of a zero remainder
  straight into the next read;
* the two-pass decryption with an extra mod-3 register;
* the cycle formulas and the N = 167, q = 128 parameter set.

Choices made here, where the published description says nothing or is
ambiguous:

* **Pointers are parameters.** The published design fixes them as constants
  and notes they could live in registers to switch parameter sets at run
  time. That variant is not built. Changing N or the memory map means
  re-elaborating.
* **Data-index wrap** modulo N, with the end-of-row step written as
  `4*NW - N + 1`. It is equivalent to the published "+2" for N ≡ 3 mod 4 and
  also right for other N.
* **End of row** detected from `coef_ptr`, not from a counter.
* **Dummy addend read** in both decryption passes, keeping the published
  decryption cycle count.
* **Bit order** within a packed byte (first coefficient in the low bits), the
  encodings of b and c, the centre-lift interval, the start/busy/done
  handshake and the reset.
* **Host port** and its arbitration (core has the RAM while busy). How the
  surrounding system reaches the memory is not specified.
* **p inside h:** encryption adds r*h, not 3*r*h; p is taken to be part of
  the public key.
* The word width is fixed at 8 bits. The state machine has one state per slot
  of a byte.
* Padding slots of the last coefficient word must be stored as zero.
