# Fault-secure memory with a (15,7) EG-LDPC code

Error-correcting memories usually protect only the storage cells. The encoder that
builds code-words and the corrector that repairs them are ordinary logic, and as
transient faults in logic become common, an unprotected encoder or corrector
becomes the weak point of the whole memory. This design closes that gap. The
memory stores words of a (15,7) Euclidean-geometry LDPC code. Two things about
this code make the supporting logic cheap to guard:

- Its parity-check matrix is sparse and regular, so a *detector* (a syndrome
  generator and an OR gate) is small and catches any error pattern of up to
  four bits.
- Its structure allows *one-step majority-logic correction*. Every bit is
  repaired directly from four parity checks in a single pass, with no
  iteration, so the corrector is small and its latency is fixed.

A detector therefore sits after the encoder and another after the corrector.
Neither lets a faulty word pass unnoticed. An encoding that fails its check is
redone, and a read whose corrected word fails its check is replayed. A scrubber
walks through the memory, repairing words before soft errors pile up beyond
what the code can correct.

## The code

- Length 15, 7 information bits, minimum distance 5: it corrects 2 errors and
  detects 4.
- Cyclic generator polynomial: g(x) = 1 + x^4 + x^6 + x^7 + x^8.
- The encoder uses the systematic form G = [I : X]. Information bits i0..i6 are
  copied to c0..c6, and the parity bits are:

| parity | XOR of            |
|--------|-------------------|
| c7     | i0 i1 i3          |
| c8     | i1 i2 i4          |
| c9     | i2 i3 i5          |
| c10    | i3 i4 i6          |
| c11    | i0 i1 i3 i4 i5    |
| c12    | i1 i2 i4 i5 i6    |
| c13    | i0 i1 i2 i5 i6    |
| c14    | i0 i2 i6          |

  That is 30 ones in X, or 22 two-input XOR gates. The RTL does not store this
  table. `ldpc_pkg::sys_gen()` derives it at elaboration time by Gauss–Jordan
  elimination of the seven cyclic rows g(x)·x^r.

- The parity-check matrix H is the 15×15 circulant whose row r has ones in
  columns r, r+1, r+3 and r+7 (mod 15).
  - Every row and every column has weight 4.
  - Two rows share at most one column. The four rows that contain bit j (rows
    j, j−1, j−3 and j−7) are therefore *orthogonal on j*: bit j appears in all
    four of them, and every other bit in at most one.

**Why the majority vote works.** Say bit j is wrong and at most one other bit
is wrong. That other bit can upset only one of j's four checks, so at least 3
of them fail. Now say bit j is right and two other bits are wrong. Those can
make at most 2 of j's checks fail. So "invert c_j when at least 3 of its 4
checks fail" fixes every pattern of one or two errors. A 2–2 tie keeps the bit.

**Why the detector is enough.** Any non-zero error of weight below 5 gives a
non-zero syndrome. The detector computes the 15 syndrome bits with 4-input
XORs and ORs them into a single flag.

## Write path: the fault-secure encoder

`fs_encoder` accepts a write request when its one-entry register is free. The
request is an address and 7 information bits. The encoder:

1. Captures the code-word from `ldpc_encoder` in the register.
2. In the next cycle, checks the held word with `fs_detector`.
3. If the syndrome is zero, offers the word to the memory. If it is not, builds
   the word again from the held information bits and checks it again.

A corrupted code-word therefore never reaches the memory. Without faults, one
write per cycle is sustained. Each redo costs one cycle, and the number of
redos is not bounded, because faults are taken to be transient.

## Read path: corrector, then detector

Every word read from `cw_memory` goes through `fs_decoder`. The decoder is
fully pipelined and accepts one word per cycle:

| stage | register contents                                                    |
|-------|----------------------------------------------------------------------|
| 1     | the word, plus 60 check sums (4 per bit, each bit with its own copy) |
| 2     | the corrected word (majority of each bit's four sums)                |
| 3     | the detector's flag on the corrected word                            |

With at most two stored errors, the corrected word is a valid code-word and the
detector stays silent. The detector fires for three reasons:

- a transient fault in the corrector;
- a transient fault in the detector itself;
- a stored word with more errors than the code can correct.

The check sums are not shared between bits. This mirrors building the parallel
corrector from 15 copies of a one-bit corrector, so a fault inside one copy can
damage only its own bit.

## System: arbitration, replay and scrubbing

`fs_memory_top` connects the blocks:

```
 wr_* -> fs_encoder (encoder + detector, redo) --+
                                                 |  write port (scrub write-back first)
 scrubber write-back ----------------------------+--> cw_memory
                                                        |  read port
 rd_* / scrub read / replay --> read arbiter -----------+
                                                        v
                     fs_decoder (corrector -> detector) --> rsp_* / scrubber result / replay
```

**Read port.** The read port serves one read per cycle. Priority goes to a
replay first, then a scrub read, then a user read. `rd_ready` drops in two
cases:

- another source takes the port;
- the encoder still holds an unwritten word for the address being read.

The second rule makes every read see all writes accepted before it.

**Replay.** When the detector after the corrector flags a result, the read is
issued again from memory in the following cycle, up to `MAX_RETRY` times (1 by
default). A transient fault in the corrector thus costs one extra trip through
the pipeline. If the replay is flagged too, the response comes back with
`rsp_fail` set. Responses carry their address (`rsp_addr`), because a replayed
read can return after reads issued later.

**Scrubbing.** While `scrub_en` is high, the scrubber asks for a read of the
next address every `SCRUB_INTERVAL` cycles, in address order. It writes the
corrected word back only if all of these hold:

- the corrector changed the word;
- the detector passed it;
- no normal write to that address committed since the scrub read.

The last condition keeps a scrub from overwriting newer data. The write-back
has priority on the write port, so the encoder waits for a cycle.

**Timing at the top.**

| event                                                  | cycles                  |
|--------------------------------------------------------|-------------------------|
| write request accepted → code-word in memory           | 1 (+1 per redo, +stall) |
| read accepted → `rsp_valid` (memory 1, corrector 2, detector 1) | 4              |
| read that is replayed once                             | 9                       |

**Fault-injection inputs.** These ports model transient faults so that the
protection can be exercised. Tie them to zero in normal use.

- `inj_enc_mask` XORs into every code-word the encoder captures.
- `inj_mem_en` / `inj_mem_addr` / `inj_mem_mask` flip stored bits.
- `inj_cor_mask` XORs into the corrector's output.

**Event pulses.** `ev_enc_retry`, `ev_replay` and `ev_scrub_wb` pulse once for
each redone encoding, replayed read and scrub write-back.

## Parameters

| parameter        | default | meaning                                  |
|------------------|---------|------------------------------------------|
| `ADDR_W`         | 6       | memory holds 2^ADDR_W code-words of 15 bits |
| `SCRUB_INTERVAL` | 64      | cycles between scrub reads               |
| `MAX_RETRY`      | 1       | replays of a flagged read before `rsp_fail` |

The code itself (N = 15, K = 7, the polynomials) is fixed in `ldpc_pkg`. The
encoder, detector and corrector are written in terms of the package functions
`x_col`, `h_row` and `orth_row`. Another cyclic one-step-decodable code would
need new values for `G_POLY`, `H_ROW0` and `H_OFFS`, plus a majority threshold
matching its number of orthogonal sums.

## Files

| file                  | contents                                                   |
|-----------------------|------------------------------------------------------------|
| `rtl/ldpc_pkg.sv`     | code constants, H rows, systematic G by elimination, types |
| `rtl/ldpc_encoder.sv` | combinational systematic encoder                           |
| `rtl/fs_detector.sv`  | syndrome and error flag                                    |
| `rtl/mlg_corrector.sv`| parallel two-stage one-step majority-logic corrector       |
| `rtl/fs_encoder.sv`   | encoder + detector + redo                                  |
| `rtl/cw_memory.sv`    | code-word RAM with soft-error port                         |
| `rtl/fs_decoder.sv`   | corrector → detector read pipeline                         |
| `rtl/scrubber.sv`     | periodic scrub controller                                  |
| `rtl/fs_memory_top.sv`| the system                                                 |
| `tb/tb_<module>.sv`   | one self-checking testbench per module                     |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ldpc_pkg.sv tb/tb_fs_memory_top.sv --top-module tb_fs_memory_top
./obj_dir/Vtb_fs_memory_top
```

The testbenches check against references they compute on their own:

- code-words from polynomial multiplication or division by g(x);
- syndromes from the circulant definition of H;
- stored data from a plain array of written values.

What each testbench covers:

- **Encoder:** exhaustive over all 128 inputs, including the minimum distance
  and the XOR count.
- **Detector:** all single and double errors, plus random triple and quadruple
  errors.
- **Corrector and read pipeline:** every single- and double-error pattern,
  random triples, latency, and injected corrector faults.
- **`tb_fs_memory_top`:** runs the system at its default parameters. It fills
  the memory with encoder faults injected, corrects one and two stored errors,
  replays a read after a corrector fault, and flags a read that fails twice. It
  then scrubs the whole memory under random traffic, including writes to the
  word being scrubbed. Afterwards no word may need correction, and every word
  must hold its last written value. The testbench also counts how often each of
  these mechanisms occurred and fails if any never did: encoder redo,
  single- and double-error correction, replay, failure flag, scrub write-back,
  cancelled stale write-back, read stall and write stall.

## How far this follows the reference architecture

**Taken from the architecture:**

- the (15,7) EG-LDPC code and its systematic encoder with 22 XOR gates;
- syndrome detectors built from 4-input XORs and a 15-input OR;
- the parallel, pipelined one-step majority-logic corrector;
- a detector after the encoder, with the encoding redone on an error;
- every read passing through the corrector and then a detector, at one word
  per cycle;
- periodic scrubbing with write-back.

**Choices made here, where the architecture leaves things open:**

- the parity-check matrix (the unique circulant consistent with the code);
- correcting every read rather than only reads the detector flags;
- pipeline depths and latencies;
- memory size and port structure;
- what happens after the post-corrector detector fires (bounded replay, then
  `rsp_fail`);
- read/write arbitration and the read-after-write stall;
- the scrub interval, visiting order and write-back rule;
- the fault-injection and event ports.

**Not included:**

- The serial form of the majority-logic corrector, which rotates the word
  through one shared one-bit corrector over 15 cycles. It is the compact
  alternative to the parallel corrector used here.
- Protection of the scrubber and arbitration logic, and any modelling of faults
  inside the detectors.
