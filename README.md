# Garbled-circuit evaluation hardware for one-time programs

A garbled circuit is a Boolean circuit in which each wire carries a random
128-bit label instead of a 0 or a 1. Whoever evaluates it learns the output
labels and nothing else: no intermediate value and no input. Side-channel
leakage during evaluation therefore gives an attacker nothing useful, even
when the evaluation runs on untrusted hardware. The evaluator can also be
caught if it cheats, because a wrong output label will not pass the final
check.

This RTL evaluates such circuits in hardware and builds a one-time program
around the evaluator. The system has three stages:

| stage  | what it does | trusted? | block |
|--------|--------------|----------|-------|
| MASK   | turns each input bit of the receiver into one of its two labels | yes | `otm_token` (one per input bit) |
| EVAL   | runs the garbled circuit on the labels | no | `gc_eval_unit` with `gc_mem` |
| UNMASK | checks each output label and decodes it to 0, 1 or *fail* | yes | `gc_unmask` |

`gc_otp_top` wires the three stages together. The evaluator is the same for
every function: only the program and the garbled tables in memory change.

## Labels, free XOR and the garbled table

A garbled value is 128 bits. Bits [127:1] are a key of t = 127 bits, and
bit [0] is the *permutation bit*. The two labels of a wire differ by a
global offset Δ, and Δ has permutation bit 1. The permutation bits of a
wire's two labels are therefore always opposite. This has two consequences:

* **XOR gates cost nothing.** The output label is the XOR of the input
  labels. There is no table and no hash.
* **Other gates use one hash and a small table.** Each non-XOR gate with
  d inputs (d = 1 or 2) has a garbled table of 2^d − 1 rows, 128 bits
  each. The evaluator concatenates the permutation bits of its input labels
  into a row index (`{π1, π2}`, or `π1` for one input). The output label is

  ```
  out = SHA-256(in1 || in2 || gate_id)[255:128]  XOR  row[index]
  ```

  Row 0 is not stored: it is zero. The sender chooses the output labels so
  that this holds. `gate_id` is the gate's table address, zero-extended to
  32 bits. For a one-input gate, `in2` is all zeros. The hashed message is
  288 bits and fits in one padded SHA-256 block (`gc_pkg::gate_block`).

When the row index is 0, the gate needs no memory read. With random
permutation bits, a two-input gate reads memory three times out of four and
a one-input gate half the time. This is why one-input gates are faster on
average.

The exact hash input is this design's own choice: the concatenation order,
the gate tweak, and using the upper half of the digest. Any sender must
garble with the same rule. The testbenches contain such a sender
(`gc_tb_pkg::gc_prog_gen`).

## Programs and memory

The evaluator is a one-address machine with three 128-bit registers,
A, B and C. Registers hold the labels of the gate being evaluated, so the
compiler can reuse values without going back to memory. Every instruction
is 32 bits wide:

| bits | field |
|------|-------|
| [31:27] | opcode |
| [26:0] | word address |

| opcode | instruction | effect |
|---|---|---|
| 0, 1 | `LOAD_A`, `LOAD_B` | A or B ← mem[addr] (C cannot be loaded) |
| 2–4 | `STORE_A/B/C` | mem[addr] ← A, B or C |
| 5–7 | `XOR_A/B/C` | register ^= mem[addr] |
| 8–10 | `XOR_AB`, `XOR_AC`, `XOR_BC` | A ^= B, A ^= C, B ^= C (no memory access) |
| 11–13 | `EVAL_A/B/C` | C ← one-input gate on A, B or C; table at addr |
| 14–16 | `EVAL_AB/AC/BC` | C ← two-input gate; table at addr..addr+2 |
| 17 | `OUT` | copies mem[addr] to out_base+k and sends it to UNMASK |

The numeric opcode values are this design's choice. Opcodes 18–31 are
undefined: they stop the run and set `err`. There is no halt instruction.
Instead, the run length is given as `prog_len`.

Memory holds 128-bit words. A typical layout:

| words | content | written by |
|---|---|---|
| 0 .. N_X−1 | the receiver's garbled inputs | the OTM tokens, on query |
| N_X .. N_X+N_Y−1 | the sender's garbled inputs | host |
| after that | work words, garbled tables, the program, the output area | host, except the output area |

The program is packed four instructions per word, and instruction *i*
occupies bits [32(i mod 4) +: 32]. Addresses wrap modulo the memory size.

## The evaluation unit (`gc_eval_unit`)

* **`gc_control`** is the control state machine. It fetches one program word
  for every four instructions and keeps it cached. It decodes each
  instruction, runs the memory accesses, and sequences the row read and the
  hash of each non-XOR gate.
* **`gc_regs`** holds registers A, B and C and their XOR datapath. It also
  contains the "1 or 2 of 3" selector that feeds the Eval Gate and the
  multiplexer for stores.
* **`gc_eval_gate`** forms the hash block, runs the SHA-256 core and XORs in
  the table row. The controller reads the row before it starts the gate,
  and only when the index is not 0.
* **`sha256_core`** is an iterative SHA-256 with one round per clock. From
  the start cycle to `done` takes 66 cycles.

The unit reaches memory through one request/acknowledge port
(`gc_pkg::mem_req_t` / `mem_rsp_t`). The requester holds the request
unchanged until `ack`, and this rule is checked by assertions in `gc_mem`.

`gc_mem` models the design's 8 MB of external memory as an on-chip array of
2^19 words with fixed latencies. A read takes `RD_LAT` = 85 cycles from
request to acknowledge, and a write takes `WR_LAT` = 24. These defaults
make the instruction times land close to the averages reported for the
stand-alone prototype, which used SDRAM. They are not a model of SDRAM
timing: there are no bursts, refresh or row effects. Cycles per
instruction at the defaults, not counting the 1 cycle to pick the next
instruction from the cached word (or 87 cycles to read a new program word):

| instruction | this RTL | prototype average |
|---|---|---|
| LOAD, XOR1 | 87 | 87.6 |
| XOR2 | 1 | 1.0 |
| STORE | 27 | 27.2 |
| EVAL1 | 72, or 158 with a row read (115 on average) | 110.0 |
| EVAL2 | 72, or 158 with a row read (136 on average) | 135.1 |
| OUT | 114 | 135.1 |

The general formulas are in the header of `gc_control.sv`: XOR2 takes 1
cycle, LOAD and XOR1 take RD_LAT+2, STORE takes WR_LAT+3, EVAL takes 72
plus RD_LAT+1 for a row read, and OUT takes RD_LAT+WR_LAT+5.

Within a gate, the row read and the hash run one after the other, not in
parallel, as in the prototype's timings. Overlapping them would shorten
EVAL by up to 72 cycles. That is the obvious next step, together with burst
access to memory.

## MASK: one-time memory tokens (`otm_token`)

Each token holds both labels of one receiver input bit, plus a 127-bit
share r_i of a secret r = ⊕ r_i. A query with bit x releases the label for
x together with r_i, then sets the token's one-time bit. Every later query
is refused. After the query, the token erases both labels.

In `gc_otp_top`, a released label is written to memory word i, and r_i is
XORed into the r register. `all_queried` goes high once every token has
answered.

The one-time bit here is an ordinary flip-flop. A real token needs a
tamper-proof, one-time-settable bit, which RTL cannot provide. Reset erases
a token and leaves it spent until it is loaded again, so a reset cannot be
used to query a token twice.

## UNMASK: the hold-off check (`gc_unmask`)

An output label alone does not reveal the output bit. UNMASK computes
H(z_j || r) = SHA-256 of the 255-bit message (label, r). It compares the
result with the two valid hashes ĥ0_j and ĥ1_j that the sender supplied,
and reports:

* 0, if the result matches ĥ0_j;
* 1, if it matches ĥ1_j;
* *fail*, if it matches neither.

The check has two effects:

* **It holds off early outputs.** Until every token has been queried, r is
  unknown, so no output can be decoded. A receiver therefore cannot choose
  later inputs after seeing partial results.
* **It detects tampering.** Any evaluation that was tampered with gives a
  label that matches neither hash.

Each token stores 127 extra bits for its share of r. It does not store a
mask for every output bit.

Outputs arrive in order from the `OUT` instructions over a valid/ready
stream. From the cycle a label is accepted to the result takes 69 cycles,
well below the 114 cycles an `OUT` instruction takes. The table of valid
hashes is loaded through `um_ld_*` and has N_OUT = 128 entries of two
256-bit digests.

## SHA-256 peripheral for a processor-based variant (`sha256_avalon`)

A second way to build the evaluator is to run it as software on a small
processor, with the same SHA-256 core as a bus peripheral. The processor
and its memories are not part of this RTL. The peripheral is, and it is
brought out at the top's `av_*` port. Its register map, with zero read
latency and no wait states:

| word | access | content |
|---|---|---|
| 0–15 | read/write | message block |
| 16 | write | bit 0 starts the hash |
| 17 | read | status: bit 0 busy, bit 1 digest valid |
| 24–31 | read | digest words H0 to H7 |

## Using the top (`gc_otp_top`)

Parameters, with their defaults:

| parameter | default | meaning |
|---|---|---|
| N_X | 128 | receiver input bits (tokens) |
| N_Y | 128 | sender input bits |
| N_OUT | 128 | outputs that UNMASK can check |
| MEM_DEPTH | 2^19 | memory words (8 MB) |
| RD_LAT | 85 | memory read latency, cycles |
| WR_LAT | 24 | memory write latency, cycles |

The input and output counts match AES-128: the receiver's plaintext block,
the sender's key and the ciphertext. A full garbled AES-128 fits in memory
with room to spare. The optimized circuit needs about 57,500 words: 73,583
instructions, 21,640 table rows and 17,315 value words. A larger baseline
circuit needs about 96,400 words.

One run goes as follows:

1. **Sender.** Loads each token (`otm_ld*`). Writes its own garbled inputs,
   the tables and the program through the host port (`h_req`/`h_rsp`).
   Loads the valid output hashes (`um_ld_*`), then pulses `um_clear`.
2. **Receiver.** Queries every token (`q_valid`, `q_idx`, `q_bit`). Each
   query is answered by `q_done` or `q_refused`.
3. **Run.** Pulse `start` with `prog_base`, `prog_len` and `out_base`. The
   unit raises `busy` and later pulses `done`. Each output appears on
   `res_valid`, `res_idx`, `res_bit` and `res_fail`; `any_fail` is sticky.

The host port may be used during a run. It has priority over the unit, and
`u_stall` shows when the unit waits. Token writes to memory take the host
port and hold the host off. `retire`, `retire_op` and `retire_row_read`
trace each completed instruction.

## Files

`rtl/`:

| file | content |
|---|---|
| `gc_pkg.sv` | widths, opcode enum, instruction and memory-port structs, row index, hash-block layout |
| `sha256_core.sv` | SHA-256 core |
| `gc_eval_gate.sv` | Eval Gate |
| `gc_regs.sv` | registers A, B, C |
| `gc_control.sv` | control state machine |
| `gc_eval_unit.sv` | evaluation unit |
| `gc_mem.sv` | memory |
| `otm_token.sv` | one-time memory token |
| `gc_unmask.sv` | UNMASK |
| `sha256_avalon.sv` | SHA-256 bus peripheral |
| `gc_otp_top.sv` | top |

`tb/`:

* `gc_tb_pkg.sv` holds the reference models. It has a software SHA-256,
  checked against the published digests of "abc" and the empty string. It
  also has a garbling program generator. The generator plays the sender: it
  picks the labels, writes random programs that use every instruction,
  garbles a random truth table for every gate, and tracks the plain value
  of every wire.
* There is one self-checking testbench per module, `tb_<module>.sv`. Each
  prints `TB_RESULT checks=N failures=M` and has a watchdog.
  * `tb_gc_control` executes random programs on an instruction-level model.
    It checks every OUT value, the final memory and the exact cycle count of
    every instruction.
  * `tb_gc_otp_top` runs a complete one-time program at the default sizes.
    It loads 128 tokens, queries each once and checks that a second query is
    refused. It evaluates a 400-instruction garbled program while the host
    reads memory, decodes every output and compares it with the plain value.
    It then corrupts one stored output and checks that UNMASK rejects
    exactly that one. Along the way it hashes one block through the bus
    peripheral. It counts each of these mechanisms and fails if any did not
    occur.
  * `tb_gc_aes` runs AES-128 as a one-time program on the top at the
    default sizes. It compiles and garbles AES-128 itself. Each of the 200
    S-boxes (160 in the rounds, 40 in the key schedule) uses the small
    published circuit of Boyar and Peralta: 34 AND gates and 94 XOR gates.
    That gives 6,800 garbled gates and 94,864 instructions, using 52,948
    memory words. The plaintext goes in through the tokens and the key
    through memory. The testbench checks the decoded ciphertext against the
    FIPS-197 example. Evaluation takes 8,995,212 cycles, 180 ms at 50 MHz.
    The document reports 7,201,150 cycles for its own optimized circuit.
    That circuit has 7,240 gates. The document also chose its evaluation
    order and register reuse to save memory accesses. The testbench
    also times every instruction that does not start a program word, and
    each must take exactly the cycles in the timing table. The averages
    are printed next to the document's stand-alone figures. EVAL2 here
    averages 136.5 cycles, against the document's 135.05. OUT is shorter
    here: 114 against 135.09. The testbench simulates in about 70 s.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/gc_pkg.sv tb/gc_tb_pkg.sv tb/tb_gc_otp_top.sv --top-module tb_gc_otp_top
./obj_dir/Vtb_gc_otp_top
```

Replace `tb_gc_otp_top` with any other testbench name. The full-size top
testbench builds in about 20 s and runs in under a second.

## How far to trust it, and where it departs

* **What was checked.** Every module passes its testbench. Each testbench
  was also shown to fail when a single deliberate bug is put into its
  module.
* **What was not checked.** The document's own AES circuits, baseline and
  optimized, were not available, so they were not run. A separately
  compiled AES-128 circuit was run instead (`tb_gc_aes`), so the cycle
  counts can be compared only roughly.
* **Choices made here.** The following are this design's own: the garbling
  hash input, the bit positions, the opcode values, the program packing,
  `prog_len` in place of a halt instruction, the memory handshake and
  priority, the token loading and reset behaviour, the UNMASK hash layout
  and its load port, and the peripheral's register map.
* **The memory.** It is an on-chip array with fixed latencies, standing in
  for external SDRAM and its controller.
* **Not in this RTL.** The soft processor and the memories of the
  processor-based variant, and the external SDRAM.
* **Security.** Leakage resilience depends on the labels being random and on
  the tokens and UNMASK being tamper-proof. This RTL provides neither a
  random-number source nor physical protection: labels and shares come from
  the sender.
