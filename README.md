# Fault-tolerant memory with self-checking EG-LDPC encoder and corrector

Error-correcting codes have long protected the cells of a memory. But the
encoder that builds the codewords, and the corrector that repairs them on the
way out, are ordinary logic. Transient faults (soft errors) hit them too. A
flipped bit inside an unprotected encoder stores a wrong codeword. A flipped
bit inside an unprotected corrector hands wrong data to the user, even when
the memory itself is perfect.

This design protects all three parts with one code: a (15,7) Euclidean-Geometry
LDPC code with minimum distance 5.

- **Memory errors.** Up to two bit errors per stored word are corrected.
- **Encoder and corrector faults.** The code's parity-check matrix is highly
  redundant, so a detector for it is just a few small XOR trees. Each
  detector checks what the encoder or the corrector produced. When a check
  fails, the encoder or corrector simply runs again. A transient fault is gone
  by the second attempt.
- **On-run scrubbing.** A word that needed correction is written back in its
  corrected form while it is being read. Errors therefore do not pile up in
  the memory over time.

```
            req (wr, addr, 7-bit data)                       rsp (7-bit data, err)
                 │                                                   ▲
                 ▼                                                   │
          ┌─────────────┐  start/done   ┌────────────┐   start/done ┌┴─────────────┐
          │ ft_mem_ctrl │◄─────────────►│ fs_encoder │              │ fs_corrector │
          │ (sequencer) │               │ encoder +  │              │ detector →   │
          └─────┬───────┘               │ detector → │              │ ml_corrector │
                │ we/re, addr           │ redo       │              │ → detector → │
                ▼                       └─────┬──────┘              │ redo         │
          ┌──────────────────┐  15-bit cw     │                     └──────▲───────┘
          │ codeword_memory  │◄───────────────┘ (write)                    │
          │ DEPTH x 15 bits  │─────────────────────────────────────────────┘ (read)
          │                  │◄──── corrected cw (scrub write-back) ───────┘
          └──────────────────┘
```

## The (15,7) EG-LDPC code

The code is the cyclic code of length 15 built on the Euclidean geometry
EG(2, 2²). It has 15 points and 15 lines, with 4 points on each line.

| property | value |
|---|---|
| code length N | 15 |
| information bits K | 7 |
| parity bits | 8 |
| minimum distance | 5: corrects 2 errors, detects 4 |
| parity checks per bit (γ) | 4, mutually orthogonal |

**Bit order and encoding.** Bit *b* of a codeword is the coefficient of xᵇ.
The code is systematic: `cw = {data[6:0], parity[7:0]}`, where

    parity(x) = data(x) · x⁸  mod  g(x),     g(x) = 1 + x + x² + x⁴ + x⁸

In hardware this is a fixed 7×15 generator matrix. Each codeword bit is the
XOR of the data bits whose generator row has a one in that column. The rows
are computed at elaboration by the constant function `g_row()` in
`eg_ldpc_pkg`. The reference data set gives:

| data | codeword |
|---|---|
| 0x51 | 0x51FB |
| 0x55 | 0x55A7 |
| 0x76 | 0x7650 |
| 0x2A | 0x2A58 |
| 0x63 | 0x637C |

**Parity checks.** The parity-check matrix has 15 rows. Each row is a cyclic
rotation of h(x) = 1 + x⁴ + x⁶ + x⁷, and each row is the incidence vector of
one line of the geometry. A word is a codeword exactly when all 15 checks are
zero. Only 8 of these rows are linearly independent. The other 7 are the
redundancy that makes the detectors robust: any pattern of 1 to 4 flipped bits
makes several rows fail.

**Orthogonal checks.** Every bit lies on exactly 4 rows, and any two of those
rows share only that bit. For bit 14 these are rotations 7, 8, 10 and 14 of
h (`ORTH_ROT` in the package). Consider a word with at most two errors:

- If bit 14 is wrong, at least 3 of its 4 checks fail. At most one other
  error can cancel a check.
- If bit 14 is right, at most 2 of its checks fail. Each of the two errors
  sits on at most one of them.

A majority vote (3 or 4 failing checks) therefore decides the bit correctly.
This is one-step majority-logic decoding.

## Writing: the fault-secure encoder (`fs_encoder`)

On `start` the data is captured and encoded, and the codeword is registered.
In the next cycle the **encoder-detector** (`eg_ldpc_detector`, all 15 rows)
checks the registered codeword.

- **Valid codeword:** `done` is raised.
- **Invalid codeword:** `redo_en` is raised, and the captured data is encoded
  again in the same cycle.
- **Still invalid after `MAX_REDO` redos:** `done` is raised together with
  `fail`. This happens only with a persistent fault.

Every fault of up to 4 bits in the encoder output is detected.

## Reading: the fault-secure corrector (`fs_corrector`, `ml_corrector`)

1. The word read from memory is captured. In the next cycle the
   **corrector-detector** checks it. A clean word is returned at once.
2. A word with errors raises `cor_err` and starts the **serial one-step
   majority corrector** (`ml_corrector`):
   - The word is loaded into a 15-bit circular register.
   - In each of 15 cycles the 4 checks orthogonal on bit 14 vote. On 3 or 4
     failing checks bit 14 is flipped, and the register rotates left by one.
   - Because the code is cyclic, the same 4 XOR trees serve every bit in
     turn. After 15 steps every bit has been voted once and the word is back
     in its original alignment.
3. A second detector checks the corrector's output.
   - **Check fails:** either a transient fault struck the corrector or the
     word has more errors than the code corrects. `cor_redo` is raised and
     the correction runs again from the captured word, up to `MAX_REDO`
     times. After that the result is flagged `fail`.
   - **Check passes:** the result is returned with `corrected = 1`.

## Control and on-run scrubbing (`ft_mem_ctrl`)

The controller serves one request at a time.

- **Write:** it starts the encoder and waits for `done`. It stores the
  codeword, unless the encoder reported `fail`, and acknowledges the write.
- **Read:** it reads the memory, hands the word to the corrector, and returns
  the upper 7 bits of the result. If the word was corrected, it writes the
  corrected codeword back to the same address in the same cycle (`scrub_we`).
  A word that could not be corrected is reported through `rsp_err` and is
  not written back.

### Timing (cycles from the cycle in which `req_valid && req_ready`)

| operation | `rsp_valid` after |
|---|---|
| write, no fault | 1 |
| write, each encoder redo | +1 |
| write, persistent encoder fault | 1 + MAX_REDO, with `rsp_err` |
| read, clean word | 2 |
| read, corrected word (1–2 errors), with scrub write-back | 19 |
| read, each corrector redo | +17 |
| read, uncorrectable | 19 + 17·MAX_REDO, with `rsp_err` |

`req_ready` is high only while the controller is idle. `rsp_valid`,
`redo_en`, `cor_err`, `cor_redo` and `scrub_we` are each high for one cycle
per event.

## Top-level interface (`ft_memory_system`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of all control state |
| `req_valid` / `req_ready` | in / out | 1 | request handshake; hold the request until accepted |
| `req_wr` | in | 1 | 1 = write, 0 = read |
| `req_addr` | in | log2(DEPTH) | word address |
| `req_data` | in | 7 | information vector to write |
| `rsp_valid` | out | 1 | request finished |
| `rsp_data` | out | 7 | data read |
| `rsp_err` | out | 1 | uncorrectable word, or encoder that kept failing |
| `redo_en` | out | 1 | encoder-detector fired; encoding redone |
| `cor_err` | out | 1 | corrector-detector fired on a stored word; correction started |
| `cor_redo` | out | 1 | corrector output failed its check; correction redone |
| `scrub_we` | out | 1 | corrected codeword written back |
| `enc_upset` | in | 15 | fault injection: bits flipped in the encoder result this cycle |
| `cor_upset` | in | 15 | fault injection: bits flipped in the corrector register this cycle |
| `mem_upset_en`, `mem_upset_addr`, `mem_upset_mask` | in | 1, log2(DEPTH), 15 | fault injection: flip bits of a stored word |

The fault-injection inputs exist so that the protection can be exercised in
simulation. Tie them to 0 in a real system.

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 8 | words in the memory; holds the five-word reference data set |
| `MAX_REDO` | 3 | redo limit of the encoder and of the corrector |

## Files

| file | contents |
|---|---|
| `rtl/eg_ldpc_pkg.sv` | code constants, types, `rotl`, `h_row`, `g_row` |
| `rtl/eg_ldpc_encoder.sv` | combinational generator-matrix encoder |
| `rtl/eg_ldpc_detector.sv` | 15-row syndrome detector |
| `rtl/fs_encoder.sv` | encoder + encoder-detector + redo loop |
| `rtl/ml_corrector.sv` | serial one-step majority-logic corrector |
| `rtl/fs_corrector.sv` | corrector-detector, corrector, output check, redo |
| `rtl/codeword_memory.sv` | DEPTH×15 array, registered read, upset port |
| `rtl/ft_mem_ctrl.sv` | request sequencing and scrub write-back |
| `rtl/ft_memory_system.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench ends by printing `TB_RESULT checks=N failures=M`. For example,
the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/eg_ldpc_pkg.sv tb/tb_ft_memory_system.sv --top-module tb_ft_memory_system
./obj_dir/Vtb_ft_memory_system
```

For another module, substitute its testbench. Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/eg_ldpc_pkg.sv rtl/ft_memory_system.sv`.

## What the tests check

- **`tb_eg_ldpc_encoder`:** the five reference codewords above, and all 128
  inputs against an independent bit-serial division model.
- **`tb_eg_ldpc_detector`:**
  - all 128 codewords pass;
  - every single and double error on a sample of codewords is flagged;
  - random triple and quadruple errors are flagged;
  - the syndrome matches a model.
- **`tb_ml_corrector`:**
  - every 0-, 1- and 2-error pattern on three codewords is corrected in
    exactly 16 cycles;
  - a fault on the last step reaches the output.
- **`tb_fs_encoder`, `tb_fs_corrector`, `tb_ft_mem_ctrl`:** the latencies in
  the table above, single redo after a transient fault, and `fail` after
  `MAX_REDO` for a persistent one.
- **`tb_ft_memory_system`:** runs at the default size.
  - It writes the reference data set and checks the stored codewords.
  - It puts double errors into words 0 and 2 and checks correction and scrub.
  - It applies a transient triple fault to the encoder and a transient double
    fault to the corrector.
  - It makes both kinds of failure persist.
  - It runs 300 random operations against a shadow model.
  - It counts each mechanism (redo, correction, scrub, corrector redo, both
    failures) and fails if any never happened.

## Where this implementation makes its own choices

The overall scheme comes from the original proposal:

- the (15,7) EG-LDPC code and the generator-matrix encoding;
- an encoder-detector that triggers a redo;
- a corrector-detector that starts a serial one-step majority corrector;
- the corrected word going to both the output and, as a write-back, the
  memory.

The following are this implementation's choices, because the proposal leaves
them open:

- **Code details.** The generator and parity-check polynomials and the bit
  order were derived from the published codewords. They match all five.
- **Detector structure.** The detectors use all 15 parity-check rows.
- **Corrector protection.** The proposal says the corrector is protected but
  not how. Here a second detector checks the corrector's output, and the
  correction is redone when that check fails.
- **Redo limit.** Both redo loops are limited to `MAX_REDO = 3`, so a
  permanent fault ends in an error instead of a hang.
- **Memory depth, handshake and timing.** `DEPTH = 8`, the valid/ready
  handshake, the one-request-at-a-time controller and all cycle timings are
  choices made here.
- **Uncorrectable data.** It is flagged with `rsp_err`. It is not shown as a
  high-impedance output.
- **Fault-injection ports.** They model transient faults.
- **Reset.** Control state is reset synchronously. Memory contents are not
  reset.

Two comparison systems from the proposal are not included: a Hamming-coded
memory and an EG-LDPC memory whose encoder and corrector are unprotected.

## Limits

- **Three or more errors in one word.** Such a word may be "corrected" into
  a different valid codeword. No detector can see that. This is inherent to a
  distance-5 code.
- **Undetectable faults.** A fault that turns the encoder's or corrector's
  output into another valid codeword (5 or more bits) also goes undetected.
- **Unprotected detectors.** The detectors are not duplicated. Their tolerance
  rests on the redundancy of the 15 rows, not on a second copy.
- **Unwritten words.** Reading an address that was never written returns
  whatever the array holds. That content may come back as data, be
  "corrected" into some codeword, or be flagged as uncorrectable. Write every
  address before reading it.
