# Flow-aware packet-processing ASIP tile

An Ethernet access node that treats traffic per *flow* must, for every
packet, parse the protocol stack (Ethernet, VLAN, PPPoE, IPv4/IPv6, TCP/UDP),
classify the extracted fields into a flow identifier (typically through an
external TCAM), and rewrite headers (MAC addresses, VLAN tags, TTL, addresses,
ports) while keeping the IP and TCP/UDP checksums correct. This RTL is one
processing tile for that job: a small VLIW processor specialised for header
work, surrounded by double-buffered memories so that packets stream in and
out while the processor works. Many tiles in parallel (or in a pipeline of
pools) scale the node to 10 Gbit/s; one tile handles a gigabit port
(1.488 Mpackets/s, i.e. 80 cycles per packet at 120 MHz).

The source is SystemVerilog (IEEE 1800-2017), synthesizable, one module or
package per file in `rtl/`; self-checking testbenches are in `tb/`.

## The tile

```
                         environment (multicore fabric)
        64 bit DMA stream |        load_done / result_valid      | 64 bit DMA stream
                   +------+-----+          |                +-----+------+
                   | asip_dma   |     asip_ctrl             | asip_dma   |
                   | (PKM DMA)  |   bank_sel restart halted | (TKM DMA)  |
                   +------+-----+          |                +-----+------+
                          | port B         |                      | port B
   +----------------------+--+     +-------+--------+     +-------+-----------------+
   | asip_dpram  PKM  4 KiB  |<--->|   asip_core    |<--->| asip_dpram TKM/DM 4 KiB |
   | bank 0: 0..2047         |  A  | (+ asip_pmem)  |  A  | ticket 0: 0..127        |
   | bank 1: 2048..4095      |     +-------+--------+     | ticket 1: 128..255      |
   +-------------------------+             |              | data:     256..4095     |
                                  32 bit memory-mapped IO +-------------------------+
```

The DMA engines and the B ports of the memories run on the environment clock
`clk_env`; everything else runs on the processor clock `clk` (see "Two clock
domains" below).

| module | role |
|---|---|
| `asip_top` | the tile: everything below, wired together |
| `asip_core` | the processor: pipeline, branches, halt, bank mapping, IO port |
| `asip_decoder` | instruction word to stage enables |
| `asip_regfile` | REG_DATA (8 x 16 bit) and REG_PTR (8 x 12 bit) |
| `asip_agu` | address generation (two instances: source AGU1, destination AGU2) |
| `asip_alu` | 16 bit read-modify-write ALU |
| `asip_lsbus` | 32 bit Load/Store bus source multiplexer |
| `asip_csum` | checksum engine and the two checksum registers REG_CSUM |
| `asip_dpram` | 4 KiB dual-ported memory (PKM, TKM/DM), read-before-write |
| `asip_memctrl` | byte lanes: 8/16/32 bit access on two 16 bit BRAMs |
| `asip_pmem` | 256 x 72 bit program memory |
| `asip_dma` | 64 bit DMA engine on a memory's environment port |
| `asip_ctrl` | bank controller |
| `asip_sync`, `asip_pulse_sync` | synchronizers between the two clock domains |
| `asip_pkg` | shared types, instruction format, ones' complement add |

### Double buffering and the packet hand-off

Each of the two memories is split in halves. `bank_sel` decides which half
the processor uses; the environment reaches the other half through the DMA
engines and the memories' second port, so loading the next packet and
draining the previous one never disturb the running program. The program
never sees the switch: the core XORs PKM address bit 11 and ticket address
bit 7 (for addresses below 256) with `bank_sel`, so a packet always starts at
PKM address 0 and its ticket (a per-packet context record of up to 128 bytes,
e.g. extracted fields, flags and the flow id) at DM address 0. DM addresses
256..4095 are not banked and keep program data across packets.

Hand-off protocol (`asip_ctrl`):

1. The environment writes packet and ticket into bank `free_bank`
   (PKM word address `free_bank*256`, TKM word address `free_bank*16`) and
   pulses `load_done`.
2. As soon as the processor is halted, the controller flips `bank_sel`,
   pulses the core's `restart`, and (from the second packet on) pulses
   `result_valid`: the bank just left holds the finished packet and ticket,
   which the environment now reads back and then refills.
3. The program ends each packet with a `halt`; `load_done` may come before
   that and is remembered.

The finished packet of the last load only comes back when another packet is
loaded; a flush therefore means sending one more (dummy) packet.

## The processor

### Data path

* **REG_DATA**, 8 x 16 bit, and a 16 bit **ALU**. Header fields that need
  arithmetic are at most 16 bits wide, so the data path is 16 bits.
* **REG_PTR**, 8 x 12 bit byte pointers, and two **AGUs**: AGU1 forms the
  source address, AGU2 the destination address. Modes: immediate (address =
  imm16[11:0]), post-increment (address = pointer, pointer += offset) and
  indexed (address = pointer + offset); the offset is 5 bits signed.
* A 32 bit **Load/Store bus** that moves one value per instruction between
  any two storages: PKM, DM/TKM, memory-mapped IO, REG_DATA, REG_PTR,
  REG_CSUM, or a 16 bit immediate as source. Memory-to-memory copies of 32
  bits take one instruction. Narrow sources are zero-extended; register
  destinations take the low 16 (12) bits.
* **Memories** are byte addressed, big-endian (network order). 8 and 16 bit
  accesses work at any byte address, 32 bit accesses at even addresses (bit 0
  is ignored). Each memory is two BRAMs organised 16 bits wide on the
  processor side, with even halfwords in one and odd halfwords in the other;
  any access reads a 4 byte window (halfword a>>1 and the next one, one from
  each BRAM) and a 4-to-1 byte multiplexer picks the value. This avoids the
  8-to-1 multiplexer that byte-aligned 32 bit accesses on 32 bit BRAMs would
  need, at the price of the even-address rule for 32 bit accesses. The
  environment port sees both BRAMs as one 64 bit word (bytes 8w..8w+7, first
  byte in bits 63:56).
* A **checksum engine** with two registers, described below.

### Pipeline

| stage | what happens |
|---|---|
| IF | program memory addressed with the fetch PC |
| ID | decode; both AGUs compute; the source address goes to its memory; post-increments written back; branches and halt resolve |
| E1 | memory read data arrives; the bus transfer; memory writes (end of E1); ALU read-modify-write |
| E2 | checksum engine, fold and swap; read-before-write data arrives |
| E3 | checksum registers updated |

Most instructions are done after E1; E2 and E3 only serve the checksum
engine.

Hazards are handled as follows:

* A result written in E1 (ALU, or a bus write into REG_DATA / REG_PTR) is
  forwarded to the ID stage of the following instruction, so a branch may
  test a value computed by the previous word and an AGU may use a pointer
  loaded by the previous word.
* A memory read in ID collides with a write to the *same* memory in E1 (the
  processor has one port per memory). The ID stage then stalls for one cycle.
  A memory-to-memory copy within PKM followed by a PKM read costs one extra
  cycle.
* REG_CSUM is written in E3 and not forwarded: a bus read of REG_CSUM sees
  an update three instructions later. Programs must leave two instruction
  words between the last checksum update and the store of the checksum.

### Branches, switch and halt

Branches resolve in ID, so the word fetched behind a taken branch is already
in IF. Each branch says what happens to it: with `br_delay = 1` it executes
(delayed branch, no lost cycle if the compiler can fill it); with
`br_delay = 0` it is discarded (stalling branch, one lost cycle).

| br_op | effect |
|---|---|
| `BR_JMP` | pc = imm16[7:0] |
| `BR_BZ` / `BR_BNZ` | jump if REG_DATA[br_reg] is zero / non-zero |
| `BR_SWITCH` | two jump targets in one word: value 0 goes to imm16[7:0], value 1 to imm16[15:8], anything else falls through. With the ALU's compare operations this builds a C `switch` with few branches. |
| `BR_HALT` | the end of a packet: the slot is discarded, no more words are issued, the fetch PC returns to the program start, and `halted` rises once E1..E3 are empty (so all stores, including checksum updates, are in memory before the controller switches banks). The other slots of the halt word still execute. |

The core comes out of reset halted and starts at `START_PC` (default 0) on a
one-cycle `restart`. Registers keep their values across packets.

### Instruction word (72 bits)

One word issues one Load/Store transfer, two AGU operations, one ALU
operation, one checksum control and one branch in parallel. The encoding is
defined in `asip_pkg` (`instr_t`):

```
 71      br_delay     70:68 br_op     67:65 br_reg
 64:62   ls_src       61:59 ls_dst    58:57 ls_size   56:54 ls_sreg  53:51 ls_dreg
 50:41   agu1 {mode[2], ptr[3], off[5]}
 40:31   agu2 {mode[2], ptr[3], off[5]}
 30:20   alu  {op[4], rd[3], rs[3], use_imm}
 19:17   csum {en0, en1, swap}
 16      reserved
 15:0    imm16 (shared: bus constant, ALU operand, absolute address, jump targets)
```

Slots that use `imm16` cannot be combined in one word unless they want the
same value. A transfer happens whenever `ls_src` is not NONE; `ls_dst = NONE`
is allowed and is how a program sums memory contents into a checksum without
storing them. ALU operations: MOV, ADD, SUB, AND, OR, XOR, SHL, SHR, SEQ
(rd = rd == b), SLT (unsigned rd < b). The program memory holds 256 words,
so jump targets are 8 bits.

`tb/asip_asm_pkg.sv` is a small assembler: each function returns a word with
one slot filled, and slots are OR-ed together, e.g.

```systemverilog
mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4)
```

## The checksum engine

Internet checksums are the ones' complement of the ones' complement sum of
16 bit words. Changing a field from m to m' changes the stored checksum HC to
HC' = ~(~HC + ~m + m') (incremental update). The engine makes that a
by-product of the store that writes m':

* The memories run in read-before-write mode: when the processor writes,
  the bytes it overwrites come back on the read port one cycle later. This
  old value m travels on the **Read-Before-Write bus** to the engine.
* The new value m' is on the Load/Store bus in E1. It is registered; in E2
  its two 16 bit halves are added (ones' complement) and the result is
  optionally byte-swapped. The old value, arriving in E2, gets the same
  fold and swap and is negated (inverted).
* In E3 each enabled register takes REG_CSUM[i] + new - old.

A load (no memory write) contributes new only, so the same engine computes a
fresh sum over data that is read. The bus reads REG_CSUM inverted and writes
it inverted, matching the inverted sum stored in headers: loading the
checksum field into REG_CSUM[i] gives the running sum, storing REG_CSUM[i]
back gives a valid field. The two registers let a program keep the IPv4
header checksum and the TCP/UDP checksum up to date at the same time (an IP
address change enables both).

The swap bit is for data at an odd byte position of the checksummed region:
an 8 bit value is zero-extended on the bus, so a byte that is the high half
of its 16 bit checksum word (e.g. the IPv4 TTL) needs `swap = 1`.

Example, the TTL decrement of the test program:

```
mv(SRC_PKM, DST_RCSUM, SZ16, 0, 1) | agu1(AGU_IMM, 0) | imm(24)   // REG_CSUM[1] = ~HC
...
mv(SRC_PKM, DST_RDATA, SZ8, 0, 0) | agu1(AGU_IMM, 0) | imm(22)    // r0 = TTL
alui(ALU_SUB, 0, 1)
mv(SRC_RDATA, DST_PKM, SZ8, 0, 0) | agu2(AGU_IMM, 0) | imm(22) | cs(0, 1, 1)
'0  // two words before the checksum may be read
...
mv(SRC_RCSUM, DST_PKM, SZ16, 1, 0) | agu2(AGU_IMM, 0) | imm(24) | halt()
```

## Interfaces and timing

### Two clock domains

The tile has two clocks. `clk` runs the processor, its program memory, the
processor ports of both memories, the controller and the IO port.
`clk_env` runs the DMA engines and the environment ports of both memories.
The environment side can therefore run faster than the processor. For
example, a 64 bit port at 200 MHz carries 12.8 Gbit/s, which keeps up with a
10 Gbit/s link without rate-adaptation buffers, while the processor runs at
120 MHz.

Packet data crosses the boundary only through the dual-ported memories.
The bank scheme means the two sides never touch the same bytes. Only the
hand-off signals need synchronizers:

| signal | crossing |
|---|---|
| `load_done` (env to processor) | toggle pulse synchronizer (`asip_pulse_sync`) |
| `result_valid` (processor to env) | toggle pulse synchronizer |
| `free_bank`, `busy` (processor to env) | two-flop level synchronizer (`asip_sync`) |
| `rst_n` on the env side | released two `clk_env` cycles late (`asip_sync`) |

A consequence for the environment: `free_bank` and `busy` lag the
controller by two to three `clk_env` cycles. After a switch, wait for
`free_bank` to change before writing. `load_done` pulses must be at least
three `clk` cycles apart, which the protocol gives anyway (one per packet).
The reset `rst_n` is asynchronous and active low. Memory contents are not
reset.

### Ports

* **Program load** (`clk`): `pm_we`, `pm_waddr[7:0]`, `pm_wdata[71:0]`, one
  word per cycle. Load while the core is halted.
* **DMA engines** (`pkm_*`, `tkm_*`, `clk_env`): a command (`cmd_valid/cmd_ready`,
  `cmd_write`, first 64 bit word address `cmd_addr[8:0]`, word count
  `cmd_len[9:0]` >= 1) followed by a valid/ready stream of 64 bit words, in
  (`s_*`, write) or out (`m_*`, read). One word per clock when the stream does
  not stall; `done` pulses at the end. The engines do not check that they stay
  in the free bank.
* **Controller** (`clk_env`): `load_done` in; `result_valid`, `free_bank`,
  `busy` out.
* **Memory-mapped IO** (`clk`, 32 bit, 12 bit addresses): reads present
  `io_re`/`io_raddr` in ID and expect `io_rdata` in the next cycle (BRAM-like
  timing); writes present `io_we`/`io_waddr`/`io_wdata` in E1. This is where
  a TCAM or other peripheral attaches.
* **Status** (`clk`): `halted`, `bank_sel`, and event pulses `ev_stall`,
  `ev_branch_taken`, `ev_squash` for counters.

## Verification

Every module except the two synchronizers has a self-checking testbench
`tb/tb_<module>.sv` that prints `TB_RESULT checks=N failures=M`; the
synchronizers are exercised by the tile test, which runs the two clocks at
different rates. The block tests compare against reference
models written independently in the testbench (byte arrays for memories,
integer arithmetic for the ALU and AGU, a from-scratch checksum for the
checksum engine). `tb_asip_core` runs a hand-written program covering every
instruction feature on both banks and checks its run length cycle by cycle.
`tb_asip_top` is the end-to-end test at the default sizes, with both clocks
running at different rates: 41 packets through the DMA engines, bank
switches, a header-rewrite program with incremental checksum update, and a
check that every mechanism (stall, delayed and
stalling branch, both switch targets and fall-through, read-before-write
update, IO, back-pressure, load while busy) occurred. It checks each packet's
run length: 19 cycles for MAC rewrite + TTL decrement + IP checksum update,
10 cycles for a ticket-only action.

`tb_asip_workloads` runs the three kinds of tasks a tile is meant for, as
hand-written programs: a parser (Ethernet, any number of VLAN tags, PPPoE
sessions, IPv4 with and without options, IPv6, TCP/UDP ports; ICMP, IGMP,
ICMPv6 and non-IP frames flagged as control traffic) that fills the ticket,
a classifier that sends a 16 byte key from the ticket to a TCAM model on the IO port and polls for the
flow id, and two header rewrites (VLAN tag insertion; MACs + TTL + IPv4
source address + TCP source port with both checksums updated). Each result
is checked against a reference computed from scratch and each run against
the 80 cycle gigabit budget. Run lengths, restart to halted, next to those
published for the original (compiled C) programs:

| task | this RTL | published |
|---|---|---|
| parse IPv4 + TCP / UDP | 38 / 39 | 57 |
| parse IPv6 + TCP / UDP | 46 / 47 | 57 |
| parse VLAN + IPv4 + TCP | 48 | 59 |
| parse IPv4 ICMP | 41 | 56 |
| parse ARP | 28 | 28 |
| parse two VLAN tags + IPv6 + TCP | 66 | - |
| parse three VLAN tags + IPv6 + TCP, 2000 byte frame (longest tested) | 76 | - |
| parse PPPoE + IPv4 + TCP | 42 | - |
| classify (12 cycle TCAM latency) | 29 | 40 |
| insert VLAN tag | 14 | 32 |
| MACs + TTL + IP checksum (`tb_asip_top`) | 19 | 29 |
| + source address + TCP port + TCP checksum | 21 | 41 |

The parser also runs on 2000 byte frames, the largest that IEEE 802.3as
allows. These carry up to three tags in front of layer 3. Each frame is
loaded whole through the DMA engine, and it must come back unchanged. The
programs are not the same (hand-scheduled), so the comparison only shows
that the data path supports such tasks inside the budget. Each VLAN tag costs the parser a
10-cycle loop round.

`tb_asip_pool` checks the scaling argument for 10 Gbit/s. Minimum-size
frames arrive every 67.2 ns (14.88 Mpackets/s, eight 120 MHz cycles).
Four tiles take them in turn, and each tile has its own environment process
on its 200 MHz DMA side. They run the MAC + TTL + IP checksum rewrite.
Every returned frame is compared with a reference, and no frame may wait
longer than one round of the pool before its load starts. One tile,
including the DMA hand-off, manages about one frame per 165 ns. With the
same stream, 1 or 2 tiles fall further behind every round, while 3 keep up.
The pool and its distribution of frames exist only in the testbench.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/asip_pkg.sv tb/asip_asm_pkg.sv tb/tb_asip_top.sv --top-module tb_asip_top
./obj_dir/Vtb_asip_top
```

`-Wno-fatal` is needed because Verilator reports each memory array as
MULTIDRIVEN. The array is written from two clock domains, one per port,
which is how a true dual-port RAM is described (see the opening comment of
`asip_dpram.sv`). Every testbench prints a final `TB_RESULT checks=...
failures=...` line.

## Changing the design

* Sizes and widths shared by all modules are constants in `asip_pkg`
  (data width, pointer width, bus width, register count, instruction width,
  program memory depth, memory size). The two-target switch packs two 8 bit
  targets into `imm16`, so a program memory of more than 256 words needs a
  different branch format.
* The instruction format is the packed struct `instr_t`; the decoder
  (`asip_decoder`) turns it into the enables in `dec_t`. A new ALU operation
  needs an enum value in `alu_op_e` and a case in `asip_alu`.
* `asip_core` holds the pipeline registers, forwarding, the stall and the
  branch logic. Its assertions check that every memory access has an active
  AGU; they run in simulation with `--assert`.
* Programs are written with the functions of `tb/asip_asm_pkg.sv` and loaded
  through the `pm_*` port; `tb_asip_workloads` has several complete examples.

## Where this RTL departs from the published design

The published architecture fixes the structure described above: the 16/32
bit split, eight data and eight 12 bit pointer registers, two AGUs with
three address modes, the any-to-any 32 bit bus, 72 bit VLIW words, the five
stage pipeline with checksum-only E2/E3, delayed and stalling branches,
multi-target jumps, two 4 KiB dual-ported memories with their bank split,
the 32 bit IO interface, halt/bank select/restart, and the read-before-write
checksum engine with two registers. The following are this implementation's
own decisions or departures:

* the instruction encoding, the 256-word program memory, the ALU operation
  set and the exact form of the two-target switch; the original was
  generated from a processor model together with a C compiler and had
  packet-specific intrinsics, which are not defined here;
* forwarding, the one-cycle structural stall, and register-file write
  priorities (the bus wins over the ALU on the same register; post-increments
  win over an older bus write to the same pointer);
* halfword interleaving and big-endian byte order in the memories;
* both checksum registers taking the same new - old term, the swap as an
  instruction bit, and an old contribution of 0 (not -0) when nothing is
  overwritten;
* `halt` lets the instructions already in E1..E3 complete and only then
  raises `halted` (the pipeline is emptied, not discarded);
* the DMA command/stream interface and the controller's hand-off protocol;
* the synchronizers for the hand-off signals between the two clock domains.
  Testbenches run `clk_env` 5:3 faster than `clk`, which is the 200:120
  ratio;
* the published implementation reached 120 MHz in a Virtex-4 at about 1600
  slices; this RTL has not been synthesised for timing or area.

Not included: the multicore fabric that connects tiles (pipeline, pool, or
pipeline of pools; `tb_asip_pool` only models a pool), the external TCAM, the wire-rate Ethernet CRC check, the
separate layer 3/4 checksum verifier and the control-plane processor that
receives flagged traffic. The programs are hand-written; there is no
compiler.
