# KASUMI and f8 in hardware: a one-round core, a four-stage pipelined core, and a four-channel f8 engine

KASUMI is the 64-bit block cipher of 3GPP mobile networks (128-bit key, eight
Feistel rounds). Its main use is the f8 confidentiality function, a stream
cipher that encrypts radio messages of 1 to 5114 bits by XORing them with a
keystream made of chained KASUMI blocks. This RTL provides two KASUMI
architectures that trade area and power against throughput, and an f8 engine
built on them:

* **Type 1, low power** (`kasumi_t1`): one round circuit, one round per clock,
  9 clocks per block. Aimed at handsets.
* **Type 2, high performance** (`kasumi_t2`): the same round circuit cut into a
  four-stage pipeline. Four independent blocks, each with its own key, are in
  flight at once, and a new block leaves every 8 clocks on average. Aimed at
  network-side equipment that serves many users.
* **f8 engine** (`f8_core`): four f8 messages at once on the Type 2 core. The
  same control can also be built around the Type 1 core.

`kasumi_f8_top` puts the f8 engine (Type 2) with its input and output message
buffers next to a standalone Type 1 core.

All results are checked against the published 3GPP test data. KASUMI test
set 1 (key `2BD6459F82C5B300952C49104881FF48`, `EA024714AD5C4D84` →
`DF1F9B251C0BF45F`) passes on both cores. The first block of f8 test set 1
(`7EC61272743BF161` → `D1E2DE70EEF86C69`) passes on the f8 engine. Everything
else is compared with a behavioural reference model.

## The algorithm in brief

The block is split into 32-bit halves L || R. Round *i* computes
`L_i = R_(i-1) xor f_i(L_(i-1))` and `R_i = L_(i-1)`. The round function `f_i`
is made of two parts:

* **FL** (`kasumi_fl`) is linear and cheap: one 16-bit AND, one 16-bit OR, two
  one-bit rotations and two XORs.
* **FO** (`kasumi_fo`) is a three-step Feistel network over 16-bit halves. Each
  step uses **FI** (`kasumi_fi`), which holds the S-boxes S9 and S7
  (constant tables in `kasumi_pkg`).

Odd rounds compute `FO(FL(x))` and even rounds compute `FL(FO(x))`. Each round
uses eight 16-bit subkeys, KL1, KL2, KO1..KO3 and KI1..KI3. With K = K1..K8 the
key words and K'j = Kj xor Cj (fixed constants), round *i* uses:

    KL1 = K(i)<<<1    KL2 = K'(i+2)
    KO1 = K(i+1)<<<5  KO2 = K(i+5)<<<8   KO3 = K(i+6)<<<13
    KI1 = K'(i+4)     KI2 = K'(i+3)      KI3 = K'(i+7)      (indices mod 8)

Subkeys of consecutive rounds are the same words shifted by one position. So
both cores hold the key in a rotating register and read subkeys from fixed
taps. They need no adders and no barrel shifters.

## Type 1: the round circuit used eight times

Registers Reg A and Reg B hold the two halves. The halves are never swapped.
Instead, the direction of the round alternates:

    odd  round: Reg B <= Reg B xor FO(FL(Reg A))
    even round: Reg A <= Reg A xor FL(FO(Reg B))

After eight rounds, Reg A || Reg B is the ciphertext. There is one FL instance
and one FO instance. Multiplexers in front of them choose the chain A→FL→FO
(odd rounds) or B→FO→FL (even rounds). As a result, static tools see a
combinational cycle FL→FO→FL. It is a false path, because only one direction
is selected at a time. Verilator reports it as `UNOPTFLAT` and yosys as a
logic loop. Timing analysis needs a false-path constraint on it.

Subkeys come from `kasumi_keyring`. It holds eight key words and eight
constants and rotates both by one word per round.

Timing: a block accepted (`in_valid && in_ready`) in cycle *t* runs its rounds
in cycles t+1 to t+8. It appears in cycle t+9 with a one-cycle `out_valid`
pulse. A new block can be accepted in that same cycle.

## Type 2: four blocks in one pipelined round loop

FO is the longest path of a round. So three registers cut it after each FI
step (`kasumi_fo_pipe`, FO_reg0..2), which gives a four-stage loop:

| stage | register            | work done in the stage                              |
|-------|---------------------|-----------------------------------------------------|
| 0     | Reg A / Reg B       | FL1 (odd rounds only), FO step 1 (FI1)              |
| 1     | A/B_Preg0, FO_reg0  | FO step 2 (FI2)                                     |
| 2     | A/B_Preg1, FO_reg1  | FO step 3 (FI3)                                     |
| 3     | A/B_Preg2, FO_reg2  | FL2 (even rounds only), round XOR, back to stage 0  |

In odd rounds FL comes before FO, and in even rounds after it. With four
blocks in the loop, one FL would be needed in stage 0 and in stage 3 in the
same cycle. Hence there are two FL instances.

Each stage carries a valid bit, the round number (0 to 7) and a tag. A block
may enter when the loop position coming round to stage 0 is empty, or holds a
block in its last round. `in_ready` is low only when a block still in flight
returns to stage 0. A block accepted in cycle *t* gives `out_valid` in cycle
t+32, with `out_data` and `out_tag` combinational from stage 3. There is no
back-pressure on the output. With the pipeline kept full, four blocks finish
every 32 cycles.

### Key schedule for the pipeline (`kasumi_keysched`)

This is the least obvious part of the design. The four blocks in the loop may
have four different keys, and each stage needs the subkeys of the block it
holds. The keys are kept in one ring of 32 16-bit words, arranged as rows
KAj KBj KCj KDj (j = 1..8). Every clock the ring moves by one word:
KAj ← KBj ← KCj ← KDj ← KA(j+1), with KD8 ← KA1.

When a block enters stage 0, its key K1..K8 is written into column A. After
four clocks (one pass round the loop, one round) every word has moved up one
row. So column A always holds K(i), K(i+1), … of the block now in stage 0. A
word that column A held *d* clocks ago sits one row higher in column D, C or B
(d = 1, 2 or 3). This is how a fixed tap delivers a subkey to the stage that
holds the block *d* clocks later:

| stage | subkeys            | taps                              |
|-------|--------------------|-----------------------------------|
| 0     | KL1, KL2, KO1, KI1 | KA1<<<1, KA3^C, KA2<<<5, KA5^C    |
| 1     | KO2, KI2           | KD5<<<8, KD3^C                    |
| 2     | KO3, KI3           | KC6<<<13, KC7^C                   |
| 3     | KL1, KL2 (for FL2) | KB8<<<1, KB2^C                    |

The constant C in K' = K xor C is chosen from the round number that the stage
carries. That way the constants stay right even when the four blocks are in
different rounds.

## f8 engine (`f8_core`)

For each message, f8 computes the following:

    A    = KASUMI[CK xor KM](COUNT || BEARER || DIRECTION || 26 zero bits)
    KS_n = KASUMI[CK](A xor BLKCNT xor KS_(n-1)),  KS_0 = 0, BLKCNT = n-1

Here KM is `0x5555…55`. The ciphertext is the message XORed with
KS_1 || KS_2 || …, truncated to the message length.

Each keystream block depends on the previous one. So a single message cannot
fill the pipeline, but four messages can. Each channel (0 to 3) has its own A
register, a 7-bit block counter and a keystream register. A job runs as follows:

1. After `start`, the engine issues the four A blocks in consecutive cycles,
   skipping channels with `length == 0`.
2. When a channel's block leaves the core, the engine forms that channel's
   next input, `A xor BLKCNT xor KASUMI_OUT`. It issues this input in the same
   cycle, into the loop position that was just freed. So the channels run in
   lock-step, one keystream block per channel every 32 cycles. A channel stops
   after `ceil(length/64)` blocks.
3. For each keystream block, the engine reads the input word at address
   `{channel, block}`. The read is synchronous: the data arrives on `ibs` one
   cycle later. In that later cycle the engine writes `ibs xor KS` to the same
   address of the output buffer. In the last block of a message, bits beyond
   `length` are written as 0. Message bit 1 is bit 63 of word 0.
4. `done` pulses after the last write. `ks_done` pulses once per keystream
   block. `blkcnt_out` shows each channel's block counter, which holds the
   index of the channel's last block once the job ends.

A job takes about `32 × (1 + ceil(max length/64))` cycles. Four 5114-bit
messages take 2598 cycles, which is 7.9 bits per clock.

With `CORE_TYPE = 1`, the same control is built around the Type 1 core. A
register remembers which channel's block is in the core, and the channels are
served one after another. Each block takes 9 clocks, or about 7 bits per
clock for a long message.

Decryption is the same operation: running the ciphertext through f8 again
returns the plaintext.

## Top level (`kasumi_f8_top`)

* `host_wr_*`: writes the input buffer (512 × 64 bits, 128 words per channel).
* `host_rd_*`: reads the output buffer. Reads are synchronous: data arrives one
  clock after `host_rd_en`.
* `f8_*`: job control (`f8_start`, `f8_busy`, `f8_done`, `f8_ks_done`,
  `f8_blkcnt`) and the
  per-channel CK, COUNT, BEARER, DIRECTION and length. These are unpacked
  arrays of 4.
* `t1_*`: the valid/ready interface of the standalone Type 1 core.

In the original system, a 33 MHz PCI interface drove these host ports. That
interface is not part of this RTL. `rst_n` is an active-low asynchronous reset
for control state only; datapath registers and memories are not reset.

## Files

| file | contents |
|------|----------|
| `rtl/kasumi_pkg.sv` | types, S7/S9 tables, constants C1..C8, KM, rotate helper |
| `rtl/kasumi_fl.sv`, `kasumi_fi.sv`, `kasumi_fo.sv` | FL, FI, FO (combinational) |
| `rtl/kasumi_fo_pipe.sv` | FO with three pipeline registers |
| `rtl/kasumi_keyring.sv`, `kasumi_t1.sv` | Type 1 key ring and core |
| `rtl/kasumi_keysched.sv`, `kasumi_t2.sv` | Type 2 key schedule ring and core |
| `rtl/f8_core.sv`, `f8_buffer.sv` | f8 engine and message buffer |
| `rtl/kasumi_f8_top.sv` | top level |
| `tb/kasumi_ref_pkg.sv` | behavioural KASUMI/f8 reference model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_f8_core_t1` (f8 on the Type 1 core) and `tb_kasumi_throughput` (sustained rates of all four configurations) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the end-to-end test at full size (messages up to the 5114-bit
messages, three f8 jobs, 60 Type 1 blocks; a few seconds):

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
      rtl/kasumi_pkg.sv tb/kasumi_ref_pkg.sv tb/tb_kasumi_f8_top.sv \
      --top-module tb_kasumi_f8_top -o sim && obj_dir/sim

Replace the testbench name to run any other test. The testbenches check the
following:

* latency: Type 1 takes 9 cycles, Type 2 and the pipelined FO take 32 and 3;
* Type 2 throughput with a full pipeline: 100 blocks in 25 × 32 cycles;
* f8 job length;
* every keystream/output word, with partial last blocks, unused channels and
  encrypt→decrypt round trips.

## How far this follows the source design, and where it departs

Taken from the design description:

* the two architectures and their register/multiplexer structure;
* the cut of FO into three pipeline registers, with FL1/FL2;
* the 32-word rotating key ring with its tap positions and per-stage delays;
* the f8 datapath: per-channel A registers, 7-bit BLKCNT, the previous- and
  current-keystream registers, IBS xor KS → OBS;
* the four-message operation.

The FI function, the S-boxes, the key-schedule constants and the f8
definition are the standard 3GPP ones. The published test vectors confirm
them.

Choices made here where the description gives no detail:

* The valid/ready handshakes, and the per-stage valid/round/tag fields that
  take the place of the explicit mux-select and write-enable signals.
* Keys travel with each block into the key ring. The description uses a
  separate key-load step.
* The round constants are selected by round number rather than kept in a
  second rotating register.
* The f8 engine forms and re-issues the next block in the cycle the previous
  one leaves the core.
* Buffer size and addressing (`{channel, block}`), synchronous buffer reads,
  and zeroing of bits past the message length.
* Type 1 subkeys come from a rotating key ring.
* The Type 1 version of the f8 engine serves the channels in turn.

Not implemented:

* KASUMI **decryption** in the cores. It is mentioned, but no hardware for it
  is described, and f8 needs only encryption.
* The PCI interface and the board.
* The f8 status output `done_F8(4:0)`, whose meaning is not defined. It is
  reduced here to a single `done` pulse.
* Loading a starting block count into the channels (block-count inputs and a
  load signal). Its purpose is not explained, so every job starts each
  channel's counter at 0. The counters themselves are brought out
  (`blkcnt_out`, `f8_blkcnt` on the top) and show the last block index of each
  channel when a job ends.

Performance: at the clock rates reported for the FPGA implementations (Type 1
at 20 MHz, Type 2 at 33 MHz and at up to 60 MHz), this RTL reaches the
following, as measured in simulation by `tb_kasumi_throughput`. Whether these
clock rates are met depends on the target technology; that has not been
checked here.

| design | clock | throughput of this RTL |
|--------|-------|------------------------|
| Type 1 KASUMI | 20 MHz | 142 Mbit/s |
| Type 2 KASUMI | 33 MHz / 60 MHz | 263 / 479 Mbit/s (200 blocks; 264 / 480 in steady state) |
| f8 engine on Type 2 | 33 MHz / 52 MHz | 260 / 409 Mbit/s (four 5114-bit messages) |
| f8 engine on Type 1 | 19.5 MHz | 137 Mbit/s (the same four messages) |

The FPGA results reported for the original designs are lower: 110, 234/410,
211/321 and 103 Mbit/s.
