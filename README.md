# An IP-based SoC with coprocessor-style hardware IPs

This SoC pairs a processor core with up to sixteen hardware IPs, such as a
DCT engine or a transform-and-lighting unit. The core treats each IP like a
coprocessor. It hands the IP an instruction ("run operation 3", "load eight
words from memory into your registers") and goes on with its own work while
the IP computes. It waits only when it asks for a result that is not ready
yet, or when the IP cannot queue more work. How long an IP takes to execute
one instruction is its *response time*. A fast processor core only pays off
where that time does not hide the core's own work, so the response time is
the number that matters when a core is sized for a given IP.

This repository holds the RTL for everything around the processor kernel:

- the core's interface unit, which offers an instruction to the IPs and runs the handshake;
- the logic that joins the sixteen IPs' answers into one;
- a generic hardware-IP shell: instruction decoder, instruction queue, register file and executor;
- the shared bus and the memory.

Two parts are left outside as ports of the top module, `ipsoc_top`:

- **The processor kernel.** It is a RISC pipeline (IF, ID, EXE, MEM, WB) or a DSP pipeline (IF, ID, EXE), generated per application.
- **Each IP's datapath.** This is the IP's actual function.

```
                 k_valid/k_req --> +------------+   nCPI, instruction, address, data
  processor  <-- k_done/k_undef -- | hwip_cp_if | -------------------------------+---------+----
  kernel     <-- k_rdata, k_wait   +------------+                                |         |
  (outside)                            ^  CPA, CPB, MRC data                     v         v
     |                                 |     +-----------------+  CPA0/CPB0  +-------+ +-------+
     |                                 +-----| cp_resp_combine |<------------| hwip 0| | hwip15| ...
     |                                       +-----------------+  ... CPA15  +-------+ +-------+
     | lsu_req/lsu_rsp (master 0)                                  master 1 |  dp_*   | master 16
     v                                                                      v  (out)  v
  ===========================  shared_bus (round robin)  ===================================
                                        |
                                   soc_memory
```

## The hardware-IP instructions

The kernel sends five kinds of instruction. Each names an IP by its number,
HW# (0 to 15).

| Kind | Operands | Effect |
|------|----------|--------|
| CDP  | HW#, OP# | The IP runs its operation OP# on its own registers |
| LDC  | HW#, N, Rd, Rn, offset | The IP loads N words from memory at Rn+offset, +1, ... into its registers Rd, Rd+1, ... |
| STC  | HW#, N, Rd, Rn, offset | The IP stores its registers Rd.. to memory at Rn+offset.. |
| MCR  | HW#, Rd1, Rd2 | The kernel's register Rd1 is copied to IP register Rd2 |
| MRC  | HW#, Rd1, Rd2 | IP register Rd2 is copied to the kernel's register Rd1 |

Rn and Rd1 are kernel registers. The kernel reads them itself and passes
their values in `k_req` (`base`, `wdata`). The result of MRC comes back on
`k_rdata`. The field encoding (`hwi_instr_t` in `rtl/hwip_pkg.sv`) is:

- a 3-bit kind;
- 4-bit HW#;
- 4-bit OP#;
- 4-bit IP register;
- 5-bit N (0 to 16; N = 0 moves nothing).

Data words are 32 bits and bus addresses are 16-bit word addresses. All of
these widths are choices of this RTL.

## The handshake: nCPI, CPA, CPB

This is the part most worth understanding before changing anything.

`hwip_cp_if` offers an instruction by pulling **nCPI** low (active low) and
putting the instruction on a bus that every IP sees. Each IP decodes it and
answers on its own pair of lines:

- **CPA high**: "absent", meaning this IP does not take the instruction. An IP
  takes an instruction when HW# is its own number, the kind is one of the
  five, and (for CDP) OP# is below `NUM_OPS`.
- **CPB high**: "busy", meaning this IP takes the instruction but cannot take it
  this cycle. An IP that does not take the instruction also holds CPB high.

`cp_resp_combine` ANDs the sixteen CPA lines and the sixteen CPB lines. So
the core sees:

- CPA high only if no IP takes the instruction;
- CPB high if the IP that takes it is busy.

MRC data are ORed, because only the addressed IP drives a non-zero word.

The core samples the pair at every rising edge while nCPI is low:

```
cycle        1        2          3 ... 2+b      3+b
kernel    k_valid=1  (held)     (held)        k_done=1 (or k_undef)
core      latch      nCPI=0     nCPI=0        nCPI=1
IPs                  CPB=1 ...  CPB=0 -> taken at this edge
```

- **CPA at the edge**: nobody takes the instruction. `k_undef` is high for one
  cycle, and the kernel would treat it as an undefined instruction.
- **CPB at the edge**: the core busy-waits, with `k_wait` high. nCPI stays low and
  the instruction stays on the bus.
- **Neither**: the IP takes the instruction at that edge and `k_done` is high for
  one cycle. For MRC, `k_rdata` holds the register value the IP showed during
  that cycle.

An instruction taken at once costs three cycles, from the first cycle of
`k_valid` to the end of `k_done`. Each busy cycle adds one. The kernel must
hold `k_valid` and `k_req` until the answer, and may offer the next
instruction from the cycle after it. An assertion checks the hold.

### When an IP says busy

The IP queues instructions in its instruction pipeline, so it answers busy by
these rules:

- **CDP, LDC, STC, MCR**: busy only when the queue (`PIPE_DEPTH`, default 4) is
  full. These instructions need nothing back, so the core is released at once
  and runs in parallel with the IP.
- **MRC**: busy while anything is queued or running in that IP. MRC therefore
  always returns the final value, after all earlier work of that IP. This is
  also the only point where the core pays for the IP's response time: a CDP
  with response time T, followed by MRC of its result, holds the core for
  about T cycles minus whatever work the core did in between.

## Inside a hardware IP (`hwip`)

- **Decoder.** It is combinational on the broadcast instruction and produces
  CPA, CPB and the MRC read data.
- **Instruction pipeline** (`hwip_ipipe`). A FIFO of `ipipe_entry_t` entries. An
  entry holds the kind, OP#, Rd, N, the address Rn+offset, and the data for MCR.
- **Executor.** When idle, it takes the queue head and executes it:
  - **MCR**: writes the register in one cycle.
  - **CDP**: pulses `dp_req.start` with OP# and waits for `dp_rsp.done`.
  - **LDC**: for each word, requests the bus, waits for the grant and then for
    the read data one cycle later.
  - **STC**: for each word, requests the bus with the register's value and
    moves on at the grant.

  Register indices wrap modulo 16. Only one bus access per IP is in flight.
- **Register file.** Sixteen 32-bit registers, cleared by reset.

### The datapath port

The datapath port is how a real IP function plugs in. While a CDP runs:

- the datapath reads any register by driving `dp_rsp.raddr` and receives the
  value on `dp_req.rdata` in the same cycle;
- it may write one register per cycle with `we`, `waddr` and `wdata`;
- it ends the operation with `done`.

The number of cycles from `start` to `done` is the IP's response time. In
`ipsoc_top`, IP i's port is `dp_req[i]`/`dp_rsp[i]`.

`tb/dp_model.sv` is a simple behavioural stand-in. It sums registers 0..7,
adds OP#, writes the result to register 8, and takes a configurable response
time. The testbenches use it. Known response times of real IPs of this kind
are:

- 285 cycles for a 2-D 8x8 DCT block;
- 29 to 98 cycles for a family of transform-and-lighting IPs of different size.

## Shared bus and memory

`shared_bus` has `NM` masters:

- master 0 is the kernel's load/store port;
- master 1 + i is IP i.

Its one slave is the memory. A master raises `valid` and holds the request
until `gnt`. The grant is combinational in the same cycle. The memory performs
the access at that rising edge, and read data come back the next cycle with
`rvalid` to the granted master. `rdata` is one broadcast word, so synthesis
reports most of `m_rsp` as wired straight through: that is intended.
Arbitration is round robin, starting one past the last master granted, so a
requester waits at most `NM-1` grants.

`soc_memory` is a single-port synchronous RAM of `WORDS` 32-bit words
(default 64 Ki words, the whole address space) with a one-cycle read. Its
contents are not reset.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `ipsoc_top` | `NUM_HWIP` | 16 | Number of hardware IPs (the interface addresses at most 16) |
| `ipsoc_top`, `hwip` | `PIPE_DEPTH` | 4 | Instruction-queue entries per IP |
| `ipsoc_top` | `MEM_WORDS` | 65536 | Memory size in words |
| `hwip` | `HW_ID` | 0 | The IP's HW# (set by the top to the generate index) |
| `hwip` | `NUM_OPS` | 16 | OP# values the IP accepts |
| `shared_bus` | `NM` | 17 | Bus masters |
| `cp_resp_combine` | `N` | 16 | IPs joined |

Widths live in `rtl/hwip_pkg.sv`. Changing `REG_W` changes the IP register
count; changing `HW_W` beyond 4 would exceed the 16-IP addressing of the
interface.

## How closely this follows the architecture

These parts come from the architecture:

- the split into a core, a memory and IPs on one shared bus;
- the three handshake lines and their meanings;
- the five instruction kinds and their operands;
- the limit of 16 IPs;
- the IP made of decoder, instruction pipeline, registers and datapath;
- the idea that the core proceeds while an IP works.

These choices belong to this RTL:

- all widths and encodings;
- the active-high "absent"/"busy" polarity of CPA/CPB and their AND joining;
- what the core does when every IP says absent (report `k_undef`);
- the three-state timing of the interface unit;
- the queue depth and the busy rules above;
- treating the IP as the bus master for LDC/STC;
- the bus handshake, round-robin order and memory timing;
- the register count.

The reading of "MRC HW#, Rd1, Rd2" as Rd1 being the kernel register and Rd2
the IP register is also an interpretation.

Not included: the processor kernel and its optional units (ALUs,
multipliers, addressing unit), and any IP datapath.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N
failures=M` and stops, and has a watchdog. From the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_ipsoc_top rtl/hwip_pkg.sv tb/tb_ipsoc_top.sv
./obj_dir/Vtb_ipsoc_top
```

Replace the top module for the others:

| Testbench | What it checks |
|-----------|----------------|
| `tb_ipsoc_top` | The whole SoC at default size: see below |
| `tb_hwip` | One IP: refusals, MCR/MRC, CDP result and the response-time wait, queue-full wait, LDC/STC including register wrap and N = 0 |
| `tb_hwip_cp_if` | Instruction broadcast, Rn+offset, MCR data, MRC data, exact cycle counts for 0..11 busy cycles and for refusals |
| `tb_cp_resp_combine` | The AND/OR joining against random answers |
| `tb_hwip_ipipe` | The FIFO against a queue model, including full and empty |
| `tb_shared_bus` | The exact round-robin grant every cycle, read routing and data, the wait bound |
| `tb_soc_memory` | Write/read-back and read timing |
| `tb_workload_offload` | The offload loop on IPs with the response times above (see below) |

`tb_ipsoc_top` plays the kernel at the top's default parameters. It:

- stores sixteen 8-word blocks;
- has each IP LDC its block and run a CDP, with IP 0 taking 285 cycles and IP 1 98;
- keeps loading from memory while the IPs run;
- collects every result by MRC, checking that IP 0's result is not taken before its 285 cycles;
- has each IP STC its result and reads it back;
- floods one IP until its queue is full;
- sends an instruction no IP takes;
- does an MCR/MRC pair.

It counts each mechanism and fails if any never occurs:

- refusal;
- busy on a full queue;
- busy waiting for a result;
- bus contention;
- IPs running in parallel;
- the kernel running alongside the IPs.

`tb_workload_offload` runs the same loop on seven IPs with different
response times: the 285-cycle DCT and the six transform-and-lighting IPs of
98, 50, 38, 37, 34 and 29 cycles. Each round of the loop is:

1. LDC an 8-word block;
2. CDP;
3. twelve loads of the kernel's own (24 cycles when run alone);
4. MRC the result;
5. STC it.

The table shows cycles per round at default parameters:

| Response time | 285 | 98 | 50 | 38 | 37 | 34 | 29 |
|---------------|-----|----|----|----|----|----|----|
| Cycles per round | 311 | 124 | 76 | 64 | 63 | 60 | 55 |

Each round costs the response time plus 26 cycles. Those 26 cycles are the
handshakes, the eight-word load and the store. The kernel's own 24 cycles of
work cost nothing: the same rounds without them take exactly as long. The
testbench checks this and every data value.

The testbenches need Verilator 5 with `--timing`. They use only `$urandom`
for randomness.
