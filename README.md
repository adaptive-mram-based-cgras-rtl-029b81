# MRAM-configured coarse-grained reconfigurable array

A coarse-grained reconfigurable array (CGRA) of 12 ALU-based processing
elements (PEs) whose configurations are cached in on-chip STT-MRAM instead of
SRAM. The idea: DSP applications such as Reed-Solomon decoding, motion
estimation or FIR filtering are worth re-tuning while they run (a stronger
decoder when the channel gets noisy, fewer filter taps when quality allows).
That only pays off if many alternative configurations can be kept close to the
array and swapped in quickly and cheaply. MRAM is dense and leaks an order of
magnitude less than SRAM, and a wide MRAM bank reads fast. So here one wide
bank feeds several PE/switchbox pairs at once, and a whole row of the array is
reconfigured in one pass over the bank.

This repository holds synthesizable SystemVerilog for the array, its
switchboxes, the per-bank configuration loader and the top level. It also holds
a cycle-level behavioural model of the MRAM bank and self-checking
testbenches, including an adaptive FIR filter that runs on all 12 PEs at 120
and at 1920 taps.

## Organisation

```
              west edge                                 east edge
                 |                                          |
 bank 0 ==> [SB+PE](0,0) -- [SB+PE](0,1) -- [SB+PE](0,2) -- [SB+PE](0,3)   row 0
                 |               |               |               |
 bank 1 ==> [SB+PE](1,0) -- [SB+PE](1,1) -- [SB+PE](1,2) -- [SB+PE](1,3)   row 1
                 |               |               |               |
 bank 2 ==> [SB+PE](2,0) -- [SB+PE](2,1) -- [SB+PE](2,2) -- [SB+PE](2,3)   row 2
              south edge (microprocessor / DRAM side)
```

* **3 x 4 mesh** of PE/switchbox pairs (`cgra_top`). Every switchbox has
  five ports: N, E, S, W and L (its own PE). Links between neighbours carry
  32-bit words. Links on the array boundary are top-level ports, so the host
  or a DRAM streamer can feed and drain the array from any edge.
* **Three MRAM banks** of 256K x 128 bits (4 MB each, 12 MB in total). Each
  bank serves the four pairs of one row: lane *c* (bits 32c+31..32c) of every
  bank word belongs to column *c*.
* **One `config_loader` per bank**: it moves a configuration from the bank
  into the four PE configuration memories and the four switchbox schedule
  memories, writing all four lanes in the same cycle.
* **Host port**: the control microprocessor (not part of this RTL) writes
  configurations into the banks and issues reconfiguration commands.

The 12 PEs, the 32-bit datapath, the 36K-word data and 24K-word configuration
memories, the three 256K x 128 banks with four PEs per bank, and loading all
pairs of a bank together all come from the architecture. The 3 x 4 shape, the
row-per-bank grouping and all encodings are choices made here.

## Processing element (`pe`)

A PE is a small sequencer around a 32-bit ALU (`alu`). It runs a program
stored in its 24,576-word configuration memory, and it has a 36,864-word data
memory, four registers `r0..r3`, an address register `AR` for the data memory
and a loop counter `CNT`. Each configuration word is one instruction. An
instruction takes two cycles:

1. **FETCH**: read the configuration memory at `pc` and the data memory at `AR`.
2. **EXEC**: select operands, compute, write the result, advance `pc`. EXEC
   repeats (stalls) while an operand comes from an empty input VC or the
   result goes to an output VC that is not ready.

Instruction word (`insn_t` in `cgra_pkg`):

| bits  | field  | meaning |
|-------|--------|---------|
| 31:28 | op     | ADD SUB AND OR XOR SLL SRL SRA SLT SLTU MUL PASSA PASSB, or LOOP / LI / HALT |
| 27:26 | srca   | operand A: 0 register `ra`, 1 data memory at `AR`, 2 switchbox input VC `vc`, 3 immediate |
| 25:24 | srcb   | operand B, same coding, register `rb` |
| 23:21 | dst    | 0 register `rd`, 1 data memory at `AR`, 2 switchbox output on VC `vc`, 3 `AR`, 4 `CNT`, 5 none |
| 20:19 | ra     | register for A (LI: target register) |
| 18:17 | rb     | register for B |
| 16:15 | rd     | destination register |
| 14:13 | vc     | virtual channel for port operands and port results |
| 12    | ar_inc | post-increment `AR` |
| 11:0  | imm    | signed immediate |

* `LI`: loads the zero-extended `insn[15:0]` into `r[ra]`, `AR` or `CNT`.
* `LOOP`: if `CNT != 0`, it decrements `CNT` and jumps to `insn[14:0]`; otherwise it falls through.
* `HALT`: idles the PE until the next restart.
* `MUL` returns the low 32 bits of the product.
* Both operands may name the input port; the word is then used for both and consumed once.

`cgra_pkg` has helper functions (`mk_alu`, `mk_li`, `mk_loop`, `mk_halt`)
that build these words; the testbenches use them as a tiny assembler.

After reset a PE is idle (`halted`). `restart` (from the loader) sets `pc` to
0 and starts it. Registers and data memory keep their contents across a
restart.

## Switchbox (`switchbox`, `vc_buffer`)

The switchbox is a 5 x 5 multiplexer crossbar driven by a **schedule**: a list
of up to 512 32-bit entries that the switchbox steps through, one entry per
cycle, repeating every `sched_len` cycles. Communication is planned ahead of
time, as for the streaming applications the array targets. A schedule entry
holds one 6-bit route per output port (`route_t`):

| bits | field    | meaning |
|------|----------|---------|
| 5:3  | src      | input port 0..4 (N E S W L), 5..7 = output idle |
| 2    | from_buf | 0 = neighbour route, 1 = buffer-only route |
| 1:0  | vc       | virtual channel carried |

Output *o* of entry *e* is at bits `6o+5 .. 6o`; bits 31:30 are unused.

**Buffers and virtual channels.** Each input port has a `vc_buffer`: one
FIFO per virtual channel (4 VCs, 4 words each). Several independent streams
can thus share a link without blocking each other. A word arriving on a port
that no output takes this cycle goes into that port's FIFO for its VC. Nothing
is ever dropped.

**Routes.**
* *Neighbour route*: forward the word arriving now on `src`, if it carries
  `vc`. If that FIFO already holds words of `vc`, its head goes first instead,
  so a stream stays in order.
* *Buffer-only route*: forward the head of FIFO `src`/`vc`.

A route fires only if the next hop's ready bit for `vc` is high. Otherwise it
is skipped this cycle (counted as *blocked*). The schedule never stalls; the
waiting word stays in its buffer for a later entry. An input word or a FIFO
head feeds at most one output per cycle.

**Flow control.** Every link carries a `flit_t` {valid, vc, data[31:0]}
forward and a 4-bit ready (one bit per VC) backward. Outputs are registered:
one cycle per hop. Because a word may already be in flight when the sender
sees ready, a FIFO raises ready only while it has **two** free slots. The
sender must send on VC *v* only in a cycle when ready[*v*] is high, and the
word appears on the link in the next cycle. Assertions in `vc_buffer` flag an
overflow or a pop from an empty FIFO.

The PE's input from its switchbox uses the same `vc_buffer`, and the PE obeys
the same ready rule on its output.

## Configuration cache and reconfiguration (`mram_bank`, `config_loader`)

**Bank layout.** A configuration occupies one address range in each bank that
takes part:

```
base                 .. base+pe_len-1          PE program words   (lane c -> PE of column c, address i)
base+pe_len          .. base+pe_len+sb_len-1   schedule entries   (lane c -> switchbox of column c, entry i)
```

**Sequence.** A command (`cfg_start` with `cfg_bank_mask`, `cfg_base`,
`cfg_pe_len`, `cfg_sb_len`) starts the loader of every bank in the mask. The
same sequence runs in each of those banks at once:

1. The loader raises `busy`, which holds the row's PEs and switchboxes.
2. It reads the bank word by word and writes lane *c* into pair *c*.
3. It sets the switchboxes' `sched_len` to `sb_len`.
4. It pulses `restart`: PEs start at `pc = 0` and schedules at entry 0.
5. It pulses `cfg_done[row]`.

Words arriving at a held switchbox are still buffered, up to the ready limit.

**Timing.** The bank model takes `ceil(1.67 ns / T)` cycles per read and
`ceil(5.88 ns / T)` cycles per write. These are the MRAM read and write times
of a 256K x 128 bank. The clock period T is assumed to be 4 ns, which gives 1
read cycle and 2 write cycles. The loader keeps one read outstanding, so a
row is held for `(pe_len + sb_len) * (2 + read cycles) + 1` cycles. That is
19 cycles for a 5-word program with one schedule entry, and 9,217 cycles
(about 37 us) for a configuration of the Reed-Solomon size: 2,560 program
words plus 512 schedule words.

When to reconfigure (for instance after a new channel-noise estimate) is
decided by the host. The hardware only carries out the command.

**Host access.** `host_req/host_we/host_bank/host_addr/host_wdata` reach
a bank only while its loader is idle. `host_ready` is high in the cycle the
request is accepted. Reads return on `host_rvalid/host_rdata` one read latency
later. One access per bank is in flight at a time.

## Top-level interface (`cgra_top`)

| port group | direction | meaning |
|------------|-----------|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `host_*` | in/out | MRAM access as above (`host_wdata`/`host_rdata` are 128 bits) |
| `cfg_start`, `cfg_bank_mask[2:0]`, `cfg_base[17:0]`, `cfg_pe_len[15:0]`, `cfg_sb_len[9:0]` | in | reconfiguration command |
| `cfg_busy`, `cfg_done[2:0]` | out | any loader active; per-bank completion pulse |
| `north_*[4]`, `south_*[4]`, `west_*[3]`, `east_*[3]` | in/out | boundary links: `*_in` flit + `*_in_ready`, `*_out` flit + `*_out_ready` |
| `pe_halted[11:0]` | out | PE (row*4+col) is idle |

Drive unused boundary inputs with valid = 0 and unused ready inputs with 0 or 1
as appropriate (a ready of 0 makes the routes toward that edge block).

Parameters (defaults): `ROWS=3`, `COLS=4` (bank word = 32*COLS bits),
`DMEM_DEPTH=36864`, `CMEM_DEPTH=24576`, `SCHED_DEPTH=512`, `BUF_DEPTH=4`,
`BANK_DEPTH=262144`, `READ_PS=1670`, `WRITE_PS=5880`, `CLK_PS=4000`.
For example, `COLS=12, ROWS=1` gives the single 256K x 384 bank variant, and
`COLS=1, ROWS=12` the twelve 256K x 32 banks. `tb_cgra_variants` runs both
shapes with reduced memory depths (see below).

## Files

| file | contents |
|------|----------|
| `rtl/cgra_pkg.sv` | link, instruction and schedule types, encoders |
| `rtl/cgra_top.sv` | array, banks, loaders, host multiplexing |
| `rtl/pe.sv`, `rtl/alu.sv` | processing element and its ALU |
| `rtl/switchbox.sv`, `rtl/vc_buffer.sv` | scheduled crossbar and per-VC input buffers |
| `rtl/sdp_ram.sv` | synchronous simple dual-port RAM (data, configuration and schedule memories) |
| `rtl/config_loader.sv` | bank-to-array configuration transfer |
| `rtl/mram_bank.sv` | **behavioural model** of an MRAM macro (cycle-level timing, not a circuit) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus three workload tests (`tb_fir_workload`, `tb_me_workload`, `tb_rs_workload`) and the bank-shape test (`tb_cgra_variants`, `tb_cgra_variant_run`) |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/cgra_pkg.sv tb/tb_cgra_top.sv \
          --top-module tb_cgra_top -Mdir obj_top
./obj_top/Vtb_cgra_top
```

Swap in any other testbench name. Every testbench prints
`TB_RESULT checks=N failures=M` and stops on its own. Each one has a
watchdog that counts a failure if the test never ends.

* `tb_cgra_top` runs the full-size array (all default parameters). It writes
  two configurations into all three banks and reads some words back. It loads
  configuration A everywhere and streams data through all rows: each row is a
  four-stage `x*a+b` pipeline. It then switches only row 1 to configuration B
  (`(x^m)-d`, with a two-entry schedule mixing neighbour and buffer-only
  routes), and finally switches every row back. The east sink drops ready at
  random. The test checks every output word, the reconfiguration time, and
  that each mechanism occurred: reconfiguration, hold, neighbour, buffered
  and blocked transfers, PE stalls, halts, host reads and writes.
* `tb_fir_workload` maps an FIR filter onto all 12 PEs. The PEs form a chain
  that snakes through the rows. Each PE holds T/12 taps: a delay line in data
  memory, coefficients as immediates. Each PE passes on the sample leaving its
  delay line (VC 0) and its partial sum (VC 1). The test runs 120 taps, then
  reconfigures to 1920 taps, then back to 120. It checks every output against
  a reference convolution of 8-bit samples. Throughput is `2*(5K+6)` cycles
  per sample for K taps per PE: 112 cycles at 120 taps, 1,612 at 1920 taps.
  The whole run takes about 25 s.
* `tb_me_workload` runs block-matching motion estimation on all 12 PEs.
  Each window of the current frame goes to one PE, together with the
  surrounding search area of the previous frame. The search range is +-2
  pixels. The PE finds the displacement with the smallest sum of squared
  differences. Its program is unrolled over the displacements and over the
  pixels of a row, so a larger window needs a longer program. Data for column
  c enters at the west edge of its row on VC c. Results return westwards on
  VC 0. The test runs 14-pixel windows on a 56 x 56 frame, reconfigures, then
  runs 26-pixel windows on a 52 x 52 frame. These are the smallest and largest
  window sizes of the workload, on frames much smaller than 1024 x 1024. Every
  reported vector and sum is checked against a reference search. The test
  also checks, through the bank models' access counters, that a
  reconfiguration reads each word once. It prints an MRAM energy estimate:
  382.20 pJ per three-bank read and 11.61 mW leakage, from the 4 MB column of
  the MRAM/SRAM comparison. Loading the W = 14 configuration (5,143 words per
  bank) takes 15,432 cycles and about 2.0 uJ of read energy. The run takes
  about 15 s.
* `tb_cgra_variants` runs the two other bank shapes side by side: a 1 x 12
  array with one 384-bit bank (2.74 ns read / 6.73 ns write) and a 12 x 1
  array with twelve 32-bit banks (1.30 ns / 5.36 ns). Memories are shrunk to
  1K words and banks to 4K words. Each run writes and reads back its banks,
  reconfigures, checks the load time, and streams 40 words through a line of
  twelve adding PEs.
* `tb_rs_workload` maps the syndrome stage of Reed-Solomon RS(255,k)
  decoding onto the same snake-shaped chain as the FIR test. Syndrome i
  (i = 1..255-k) is computed by chain position (i-1) mod 12. It uses Horner's
  rule with a 256-entry multiply-by-alpha^i table in data memory, since the
  PE has no Galois-field multiplier. The program writes its own tables from
  immediates, so they are part of the configuration. Symbols travel on VC 0.
  The syndromes are collected along the chain on VC 1. The test encodes real
  codewords, corrupts every other one with up to t symbol errors, and runs
  RS(255,239). It then reconfigures to RS(255,217): 546 and 1,078 program
  words per PE. It checks every syndrome against a reference, and that clean
  codewords give all-zero syndromes. Error location and correction are not
  mapped. The run takes about 10 s.
* Block tests: `tb_alu`, `tb_sdp_ram`, `tb_vc_buffer` (random traffic against
  a queue model, ready rule), `tb_pe` (program with loops, data-memory
  post-increment, stalls, hold; checks 2 cycles per instruction),
  `tb_switchbox` (five concurrent streams under random back-pressure),
  `tb_mram_bank` (full 4 MB bank, latencies), `tb_config_loader` (lane and
  address placement, busy time).

Verilator has two-state simulation; memories start at random values, so
programs must initialise what they read (the FIR program clears its delay line
first).

## How far this follows the architecture, and where it departs

Taken from the architecture:
* 12 PEs in a 2-D array, with a 32-bit ALU, a 36K-word data memory and a
  24K-word configuration memory in each.
* Switchboxes built as multiplexer crossbars, stepped cycle by cycle from a
  schedule memory. Each port has buffers with flow control; data leave from
  the buffer or straight from the neighbour; buffers hold several independent
  streams (virtual channels).
* 32-bit switching.
* MRAM banks of 256K x 128 with 1.67 ns read / 5.88 ns write, each serving
  four PE/switchbox pairs that are configured together.
* A schedule memory of 16,384 bits (512 x 32) per switchbox, matching the
  switchbox configuration size quoted for all three applications.

Choices made here, where the architecture gives no detail:
* The PE instruction set and its two-cycle execution. The original PE is a
  modified soft-processor functional unit whose internals are not available.
* Array shape 3 x 4 and one bank per row.
* Number of VCs (4) and buffer depth (4).
* The ready protocol with a two-slot margin; the skip-on-blocked schedule rule.
* The schedule-entry and bank-layout formats.
* The 4 ns clock.
* Reset behaviour.
* The host interface and the boundary links.
* The FIR, motion-estimation and Reed-Solomon syndrome mappings: programs,
  schedules and how data enter the array. Motion estimation uses the sum of squared differences as
  its match measure.

Not covered by this RTL:
* The control microprocessor and the DRAM. Their traffic enters through the
  host port and the boundary links.
* Energy, leakage and area modelling of the array. The motivation for MRAM
  over SRAM is an energy argument (about 30 % lower application energy with
  dynamic reconfiguration), which this RTL cannot show. The MRAM model only
  counts its reads and writes (`n_reads`, `n_writes`, no ports), so a
  testbench can estimate the cache's share from per-access figures.
* Loading of PE data memories from MRAM. Only configuration and schedule
  memories are loaded; data arrive through the network.
* The Reed-Solomon stages after the syndromes: error locator, error search
  and correction. A full decoder's configuration size fits comfortably:
  2,560 program words per PE against 24,576. All
  eighteen cached configurations together need about 43K of the 262,144
  words of each bank.
* The SRAM-cache baseline that the MRAM design is compared with.
* Floating point. The results describe the FIR as floating point, but the
  ALU here is integer-only, so the FIR test filters 8-bit integer samples with
  integer coefficients.
