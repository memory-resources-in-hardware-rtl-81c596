# BLAKE-256 / BLAKE2s hashing with the message kept in per-round RAMs

BLAKE-256 and BLAKE2s compress a 512-bit message block into a 256-bit chain
value. They do this by running a 4x4 matrix of 32-bit words through 14
rounds (BLAKE) or 10 rounds (BLAKE2). Each round calls the G function eight
times: first on the four columns of the matrix, then on the four diagonals.
Unlike ChaCha or Keccak, the message does not enter only once, in the
initial state. **Every G call of every round takes two message words**, in an
order given by a per-round permutation sigma_(r mod 10). In a straightforward
hardware build, this means a 512-bit message bus runs beside the 512-bit
state through every round unit. Each G unit then needs two 16:1 multiplexers
of 32-bit words, switched by the round counter.

This design removes that bus. Every G unit gets a small **dual-port RAM that
holds its own copy of the message**:

* While a block is loaded, both ports of every RAM write one word each.
  The 16 words go into all RAMs at once in 8 cycles.
* While a block is computed, both ports read. The addresses are the two
  sigma entries of the round, so each G unit gets its two words directly,
  with no multiplexer on the data path.

Loading and computing do not overlap. The loading cycles only use the RAM
write path, so they could run on a faster clock than the compute cycles. This
RTL uses a single clock for all phases.

The round loop can be unrolled: UNROLL round units form a combinational
cascade, and the state passes through the whole cascade once per clock.
The unrolling factors studied for this scheme are 1, 2, 4 and 5. The RTL
takes any value from 1 to 10. The default is 4.

## Block diagram

```
                 h, salt/flags, t
                        |
                 [ init (eq. below) ]
                        |
            +---->[ mux ]---->[ state register v (512 b) ]
            |                         |
            |                        R0  <--- 64-bit message bus (m_2p, m_2p+1)
            |                         |           written into the 8 RAMs
            |                        R1  <---      of every round unit
            |                         :
            |                     R(UNROLL-1) <---
            +-------------------------+
                                      |
             tap R((NR-1) mod UNROLL) -> finalisation -> h'
```

Each round unit Rj holds eight G units. Each G unit has its own message RAM
M_i and, for BLAKE only, a constant ROM.

## Modules

| module | role |
|---|---|
| `blake_hash` (top) | chain-value and salt registers, init from IV / parameter block, `done` pulse |
| `blake_core` | initial state, state register, round cascade, result tap, finalisation |
| `blake_ctrl` | load / precharge / compute sequencing, the two round counters |
| `blake_round` | one round unit: 8 G units, 8 message RAMs, RAM address generation, constant XOR |
| `blake_g` | the G function (add, xor, rotate by 16, 12, 8, 7) |
| `msg_ram` | true dual-port RAM, 32-bit words, registered read (modelled on a 512 x 32b FPGA block RAM) |
| `cst_rom` | BLAKE-256 constants c_sigma(2i+1) and c_sigma(2i) of one G unit, per round |
| `blake_pkg` | types, IV, constants, sigma table, capacity helper functions |

## Timing of one block

The numbers below are clock cycles after `start` is sampled, with no gaps in
`msg_valid`.

| phase | cycles | what happens |
|---|---|---|
| LOAD | 8 | pair p = 0..7 is written into every RAM: m_2p on port A, m_2p+1 on port B |
| PRE | 1 | "void" cycle. The RAMs are read with the addresses of the first rounds, so their registered outputs are ready. The state register takes the initial state. |
| RUN | ceil(NR/UNROLL) | the state passes through the cascade once per cycle. In the last cycle the new h is taken from the tapped round. |
| | +1 | `done` pulses. `h_out` holds the new chain value. |

For the default BLAKE x4: 8 + 1 + 4 cycles, then `done`.

Compute cycles and result tap for each organisation:

| UNROLL | BLAKE (14 rounds) | BLAKE2 (10 rounds) |
|---|---|---|
| 1 | 14 cycles, tap R0 | 10 cycles, tap R0 |
| 2 | 7, tap R1 | 5, tap R1 |
| 4 | 4, tap R1 (14 = 3x4+2) | 3, tap R1 (10 = 2x4+2) |
| 5 | 3, tap R3 (14 = 2x5+4) | 2, tap R4 |

When UNROLL does not divide NR, the units behind the tap compute extra rounds
in the last cycle. Their output is discarded.

### Why two round counters

The RAM read is synchronous. The addresses for the rounds computed in cycle c
must be applied in cycle c-1. That is why the PRE cycle exists, and it also
shapes the counters in `blake_ctrl`:

* `msg_rnd` is the round number (mod 10) of R0 in the **next** cycle. It
  addresses the RAMs.
* `cst_rnd` is the same value delayed one cycle: the round computed **now**.
  It addresses the constant ROMs.

BLAKE2 has no constants, so `cst_rnd` is left unused there. Both counters
step by UNROLL modulo 10. Unit Rj adds j (mod 10), so no divider is needed.
The sigma table has only ten entries, so r mod 10 is all a unit needs.

## Message memories: full size or compact

`MEM_COMPACT = 0` (default) is the FPGA organisation. Every M_i is a
512 x 32b RAM, the size of one block RAM. The whole message sits at
addresses 0..15, and the read address is the sigma entry itself. That gives
8 x UNROLL RAMs: 8 for x1, 32 for x4, 40 for x5.

`MEM_COMPACT = 1` sizes each RAM for the words its G unit actually reads.
Unit Rj only computes rounds j, j+UNROLL, and so on. Its G_i therefore needs
only the message indices sigma_(r mod 10)(2i) and sigma_(r mod 10)(2i+1)
over those rounds.

`blake_pkg::msg_mask` builds that set at elaboration time. The RAM depth is
its popcount. A word is stored at a local address equal to the number of
needed words with a lower index, and the write and read addresses are mapped
the same way. Writes of words a unit never reads are dropped.

Total words over the cascade:

| | x1 | x2 | x4 | x5 |
|---|---|---|---|---|
| BLAKE | 112 | 142 | 207 | 156 |
| BLAKE2 | 112 | 142 | 150 | 156 |

`tb_mem_capacity` checks these totals, the per-round sums and the min/max
depths.

## Interface of `blake_hash`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `init` | in | while idle: h := IV (BLAKE), or h := IV xor `param` (BLAKE2); latch `salt` |
| `salt[3:0]` | in | BLAKE salt s0..s3 (BLAKE2 takes its salt through `param`) |
| `param[7:0]` | in | BLAKE2 parameter block; for an unkeyed 32-byte digest, p0 = 0x01010020 and the rest 0 |
| `start` | in | while idle: begin one block with `t` and `f` |
| `t[63:0]` | in | counter: message bits so far, including this block (BLAKE; 0 for a padding-only block), or bytes so far (BLAKE2) |
| `f[1:0]` | in | BLAKE2 flags: f[0] last block, f[1] last node (each expands to an all-ones word) |
| `msg_valid`, `msg_ready`, `msg_words[1:0]` | in/out/in | 8 beats; beat p carries m_2p in `[0]` and m_2p+1 in `[1]`; a beat is taken when both valid and ready are high |
| `busy`, `done`, `h_out[7:0]` | out | `done` pulses one cycle after the last compute cycle; `h_out` is the chain value (the hash after the last block) |

The host does the padding and the byte-to-word conversion:

* BLAKE-256 pads with `1 0...0 1` and the 64-bit big-endian bit length. Its
  words are big-endian.
* BLAKE2s zero-pads the last block. Its words are little-endian.

The digest is `h_out[0..7]`, in the same byte order as the message words.
`start` must not be raised while `busy` is high; an assertion checks this.

Parameters: `BLAKE2` (0 gives BLAKE-256, 1 gives BLAKE2s), `UNROLL` (default
4), `MEM_COMPACT` (default 0), `RAM_AW` (default 9, i.e. 512-word RAMs).

## What follows the published scheme and what is this design's own

These parts follow the published scheme:

* one dual-port RAM per G unit
* 8 loading cycles plus one precharge cycle
* the address counter running one cycle ahead of the constant counter
* one constant ROM per G unit
* the cycle counts and tap positions of the x1/x2/x4/x5 organisations
* the 512 x 32b RAM size
* the per-unit capacities of the compact variant

These are choices of this design:

* the valid/ready loading handshake, with stalls allowed
* the start/init/done protocol
* the asynchronous reset
* the read-first RAM behaviour
* the result port being combinational inside the core and registered in the top
* the XOR with the constants done outside G, so one G module serves both variants
* the local address map of the compact RAMs
* how the BLAKE2 parameter block is supplied

The constant values (IV, c0..c15) and the sigma table are those of the BLAKE
and BLAKE2 specifications.

Not included:

* the conventional build with a message bus and permutation multiplexers.
  It is the baseline the RAM scheme replaces.
* padding, which belongs to the host
* keyed BLAKE2 and tree mode beyond passing f[1] and the parameter block

The RTL has no vendor primitives: `msg_ram` is an inferred memory array. On
an FPGA it maps to block RAM; in an ASIC it would be a register file or
SRAM macro of the same ports.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_blake_g` | G against a software model (random and corner inputs) |
| `tb_cst_rom` | all 8 ROMs x 10 rounds |
| `tb_msg_ram` | random dual-port traffic, 1-cycle read latency, read-during-write |
| `tb_blake_ctrl` | phase order, cycle counts with random loading gaps, counter lead, `last` |
| `tb_blake_round` | one round against the model, for BLAKE x1 R0 (all 14 rounds), compact BLAKE x5 R2 and compact BLAKE2 x4 R1 |
| `tb_blake_core` | random compressions in 11 organisations (both variants, UNROLL 1/2/4/5, three compact), with latency |
| `tb_blake_hash` | whole messages in 8 organisations (see below) |
| `tb_blake_hash_full` | default parameters: three messages, digests and per-block latency |
| `tb_mem_capacity` | compact memory totals and per-round figures for all organisations |

`tb_blake_hash` checks whole messages against known digests:

* BLAKE-256("")
* BLAKE-256(0x00)
* BLAKE2s("abc")
* BLAKE2s("")
* 150-byte messages in both variants

It also checks salted, multi-block and padding-only-block messages against a
reference model. It counts loading stalls, chained blocks, early result taps,
final-block flags and compact-memory runs, and fails if any of them never
happens.

`tb/blake_ref_pkg.sv` is the shared software reference: compression, padding
and digest formatting.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/blake_pkg.sv tb/blake_ref_pkg.sv tb/tb_blake_hash.sv --top-module tb_blake_hash
./obj_dir/Vtb_blake_hash
```

## Size notes

After generic synthesis, the default top (BLAKE, x4, full-size RAMs) has
about 1.5 k word-level cells, 976 flip-flop bits and 32 memories of
512 x 32 bits. Only 16 of the 512 words in each memory are used, as on the
FPGA. Use `MEM_COMPACT = 1` when the memories are built from flip-flops or
custom macros.
