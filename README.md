# Compute-near-bank processing units for a DRAM channel

Moving data between DRAM and a processor costs more time and energy than
computing on it. This design puts a small SIMD processing unit (PU) next to
every pair of DRAM banks. The units work on the bank data in place, and all
of them run in parallel. The host does not need a new interface. It drives
the PUs with ordinary DRAM commands, through an unmodified memory
controller. In compute mode, each RD or WR to a bank address runs one
instruction in every PU of the channel, using that column of each bank.

The RTL follows the architecture template in the paper *"Bank on
Compute-near-Memory: Design Space Exploration of Processing-near-Bank
Architectures"*. That template generalises Samsung's FIMDRAM (HBM-PIM). The
main configuration built here is the paper's HBM2 baseline:

| parameter | value | meaning |
|---|---|---|
| `N_PU` | 8 | PUs per channel, one per two banks (16 banks) |
| `S` | 16 | SIMD lanes of FP16, so 256 bits, the width of the bank IO |
| `C` | 32 | instructions in the control register file (CRF) |
| `R` | 8 | vectors per general register file, and scalars per half of the scalar register file |
| `ROW_W`, `COL_W` | 15, 5 | row and column address bits: 1 KB rows of 32 columns, 4 Gb per channel |

The paper names C, R and S as the tuning knobs, and all three are
parameters here. The paper also evaluates DDR4, GDDR5 and LPDDR4. Those are
reached through `S` and `N_PU` (for example `S = 4` for a 64-bit bank IO,
or `N_PU = 4` for 8 banks). The clock frequency is not part of the RTL.

## How the host drives it

The host address has one extra most significant bit, `cmd_ext`. It selects
between bank space (0) and the PU register space (1). A mode register in the
register space chooses between two modes:

* **Memory mode.** The channel is plain DRAM. ACT, PRE, RD and WR reach
  only the addressed bank, and read data returns to the host. The PUs are
  idle.
* **CnM mode.** Every command reaches all banks at once:
  * ACT and PRE open and close the same row in every bank.
  * WR in register space writes the same register-file entry in every PU.
  * RD or WR in bank space is an *execute command*. Each PU runs its next
    instruction, and any bank operand comes from, or goes to, the
    command's column of the open row in that PU's own banks.

Entering CnM mode restarts every PU's program at CRF entry 0. The channel
reports `pu_done` (EXIT reached) per PU. It also gives one-cycle event
strobes per PU, `pu_ev_issue`, `pu_ev_jump` (taken), `pu_ev_nop`,
`pu_ev_exit` and `pu_ev_relu`, for counting what the units did.

Register-space address map:

| `cmd_row[2:0]` | target | what `cmd_col` selects | data |
|---|---|---|---|
| 0 | CRF | group of 8 entries (entry = col*8 + k) | 8 instructions of 32 bits |
| 1 / 2 | SRF_M / SRF_A | group of S scalars (scalar = col*S + k) | S FP16 values |
| 3 / 4 | GRF_A / GRF_B | vector entry | one 256-bit vector |
| 5 | mode register | – | bit 0: 1 = CnM mode, 0 = memory mode |

A typical run looks like this:

1. In memory mode, write the operands into the banks.
2. Write 1 to the mode register.
3. Load the CRF and any constants.
4. ACT the working row in all banks.
5. Send one execute command per instruction step.
6. PRE all banks, then write 0 to the mode register.
7. Read the results back.

## Inside a processing unit

```
            host register writes (broadcast)
                 |        |          |
               [CRF]    [SRF_M/A]  [GRF_A] [GRF_B]
                 |          \        |  \    |  /
   execute --> [CU] --decode--> operand select <-- bank A / bank B read data
   command       |                   |
                 |            [S x FP16 mul] -> [S x FP16 add] (MAD/MAC, ReLU)
                 |                   |
                 +------------- writeback --> GRF / SRF / bank A / bank B
```

* `cnm_crf`: C 32-bit instructions. The control unit reads it
  asynchronously.
* `cnm_srf`: R scalars for multiplication (SRF_M) and R for addition
  (SRF_A). A scalar operand is copied to all lanes.
* `cnm_grf`: R vectors of S words. There are two of them: GRF_A sits next to
  bank A and GRF_B next to bank B.
* `cnm_au`: S lanes, each with one `fp16_mul` and one `fp16_add`. The
  multiplier can feed the adder, which gives multiply-add and
  multiply-accumulate.
* `cnm_cu`: the program counter, the NOP and loop counters, and the decoder.

### Pipeline and timing

Every issued instruction passes through five one-cycle stages:

| stage | cycle | what happens |
|---|---|---|
| Decode | execute command | CU decodes the CRF entry; bank reads are issued at the command's column |
| Load | +1 | bank data arrives; register operands are read |
| Multiply | +2 | product (MUL, MAD, MAC); other ops pass through |
| Add | +3 | sum (ADD, MAD, MAC); the MAC accumulator is read from its GRF entry; ReLU for MOV |
| Writeback | +4 | result written to a GRF, the SRF (lane k → scalar idx*S+k) or a bank column |

Stages an instruction does not need are passed through, not skipped (the
paper allows skipping). So every instruction has the same latency, and
writebacks stay in order. There is no hazard detection and no forwarding.
A result can be read by an instruction whose execute command comes at
least four cycles after the producer's. Back-to-back MACs into the same
accumulator need only the minimum two-cycle command spacing. Programs
insert `NOP`s where the host issues commands faster than that.

### Flow control

* One execute command consumes one CRF step.
* `NOP n` takes `n` commands (at least one) and issues nothing. It spaces
  dependent instructions, the way the paper's "multi-cycle stall" is used.
* `JUMP addr, iter` jumps back to `addr` `iter` times and then falls
  through. It is resolved in the idle cycle after the previous instruction,
  so it costs no command. The host still sends one command per instruction
  in every loop iteration. There is one loop level, and a program must not
  start with `JUMP`.
* `EXIT` sets `done`. The PU ignores commands after it until CnM mode is
  entered again.

### Instruction word

The paper lists the instructions and says a CRF word is 32 bits. The field
layout is this implementation's own:

```
[31:28] opcode   NOP=0 JUMP=1 EXIT=2 MOV=3 ADD=4 MUL=5 MAD=6 MAC=7
[27:25] dst      operand kind: GRF_A=0 GRF_B=1 SRF_M=2 SRF_A=3 BANK_A=4 BANK_B=5
[24:22] src0     [21:19] src1     [18:16] src2 (MAD only)
[15]    ReLU (MOV into a GRF)
[14:10] dst index   [9:5] src0 index   [4:0] src1 index (also src2's index)
JUMP: [27:20] target, [15:0] iterations      NOP: [15:0] command count
```

Results:

* `ADD`: `dst = src0 + src1`
* `MUL`: `dst = src0 * src1`
* `MAD`: `dst = src0 * src1 + src2`
* `MAC`: `dst += src0 * src1`, where `dst` must be a GRF
* `MOV`: `dst = src0`, optionally with ReLU

Any source may be a GRF entry, an SRF scalar copied to all lanes, or a bank.
The destination may be a GRF, the SRF or a bank.

### Arithmetic

The datapath uses IEEE half precision with these rules:

* Rounding is to nearest, ties to even.
* Subnormal inputs are read as zero, and results below the normal range
  flush to zero.
* Overflow gives infinity. NaNs come out as `0x7E00`.
* MAD and MAC round the product before the addition: they are not fused.

## Files

| file | content |
|---|---|
| `rtl/cnm_pkg.sv` | opcodes, operand kinds, instruction struct, DRAM commands, register spaces |
| `rtl/cnm_channel.sv` | top: host interface, N_PU PUs, bank port multiplexing |
| `rtl/cnm_host_if.sv` | command decode, mode register, broadcast, memory-mode read return |
| `rtl/cnm_pu.sv` | one processing unit and its pipeline |
| `rtl/cnm_cu.sv`, `cnm_crf.sv`, `cnm_srf.sv`, `cnm_grf.sv`, `cnm_au.sv` | PU parts |
| `rtl/fp16_mul.sv`, `rtl/fp16_add.sv` | one lane's FP16 multiplier and adder |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/dram_bank_model.sv` | behavioural DRAM bank: ACT/PRE row state, 1-cycle reads |
| `tb/fp16_ref_pkg.sv` | FP16 reference arithmetic in double precision |

The DRAM banks are not part of the RTL. `cnm_channel` brings each bank's
column port out, and in simulation `dram_bank_model` stands in for the
banks. The model answers a read one cycle after the request. A real bank
has a longer read latency, which a wrapper must hide or the PU's Load stage
must be stretched to match.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example, the
full-channel test runs all 8 PUs and 16 bank models at the default
parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/cnm_pkg.sv tb/fp16_ref_pkg.sv tb/tb_cnm_channel.sv --top-module tb_cnm_channel
./obj_dir/Vtb_cnm_channel
```

`tb_cnm_channel` walks through the whole sequence:

1. Memory-mode writes and reads to every bank.
2. A mode switch, then the program is loaded by broadcast.
3. A ReLU move from the bank, a four-step MAC loop and an ADD written back
   to the bank, in all PUs at once.
4. Memory-mode readback, checked against the reference.

It also counts every mechanism and checks the writeback timing. The other
testbenches are narrower:

* `tb_cnm_kernels` runs two of the paper's kernels on the full channel at
  sizes that fit one DRAM row per bank. Vector addition covers 4096
  elements: tiles of 8 columns, looped with JUMP, take 242 cycles.
  Matrix-vector multiplication uses n = 8 and p = 128 (8 MACs per PU).
* `tb_cnm_pu` runs every instruction and operand kind.
* `tb_cnm_cu` checks NOP, JUMP and EXIT sequencing.
* `tb_cnm_au` runs random arithmetic and checks the latency.
* `tb_fp16_*` check 20,000 random and corner-case operand pairs.

## Trust and departures

Tested: every module against an independent reference, and the full channel
end to end at the default size. Each testbench was also run against a
deliberately broken copy of its module, and each one caught the fault.

Decided here rather than taken from the paper:

* Instruction encoding and register-space address map.
* NOP, JUMP and EXIT semantics beyond their one-line descriptions.
* How register-file writes are packed.
* Rounding details.
* Fixed pipeline latency with no stage skipping, and no hazard logic.
* Results may go to a bank or the SRF as well as a GRF. The paper says in
  one place that results go to a GRF, and elsewhere that writeback goes to
  a GRF or a bank.
* PU p is paired with banks 2p and 2p+1.
* Register writes are accepted only in CnM mode.
* Both RD and WR act as execute commands.

Rules the host must keep, checked by assertions:

* Execute commands at least two cycles apart.
* No bank read in the same cycle as a writeback to the same bank.
* No host register write in the same cycle as a pipeline writeback.
* No ACT or PRE in a cycle where a PU accesses a column.
* The pipeline drained before CnM mode is entered again.

Not included:

* The DRAM arrays.
* The memory controller and its JEDEC timing, which the paper takes from an
  external simulator.
* The host-side assembler that turns a kernel into command sequences.
