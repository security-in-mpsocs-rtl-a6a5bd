# A segment-level NoC firewall for MPSoC initiators

In a multiprocessor system-on-chip every CPU, DMA engine or accelerator reaches
shared memory through the network interface (NI) that attaches it to the
network-on-chip. This design puts a small firewall in that NI, on the initiator
side. Before a request enters the network, the firewall looks at its physical
address and the identity of the process that issued it. Then it either passes
the request on or drops it and interrupts the CPU. A request that a rogue
process should not make never costs network bandwidth, and it never reaches the
memory it was aimed at.

The firewall works at the level of *segments*, not single pages. The system
software marks out up to 16 address ranges (segments), each a run of 4 KB
pages. For every process identifier (PID) it can attach a *deny rule* to each
segment. Everything that matches no deny rule is allowed. This keeps the state
small, with 16 range registers and a 1024×8 rule memory. A check costs a fixed
2 cycles when the address lies outside every segment and 5 cycles when it lies
inside one.

The RTL is SystemVerilog-2017 and synthesizable. All sizes are parameters,
with defaults of 16 segments, 64 PIDs, 8-bit rules, 32-bit addresses and
32-bit data.

## Block structure

```
noc_firewall_axi
  |
  +-- fw_axil_cfg          AXI4-Lite registers -> commands, clear/mask; status <- core
  |
  +-- noc_firewall         core
        +-- fw_omc         commands + CPU requests -> one ordered stream; PID, enable
        +-- fw_slrc        per item: segment search, rule read, decide, forward/drop
        |     +-- fw_segment_table
        |     +-- fw_rule_table
        |     +-- fw_monitor
        +-- fw_intu        deny / bad command / threshold -> irq_o with context

  CPU request --> fw_omc --> fw_slrc --> allowed request to memory
                                 \--> deny --> fw_intu --> irq_o
```

| Module | Role |
|---|---|
| `fw_pkg` | Shared types: the request, command, dispatch and deny-context structs, the opcodes, the rule bit positions and the `rule_denies()` decision function. |
| `fw_omc` | Operating mode controller. It accepts commands and requests and puts them into one ordered stream. It holds the current PID and the enable mode, and it rejects invalid commands. |
| `fw_slrc` | Segment-level rule checking. It sequences each check, executes each command and raises deny events. |
| `fw_segment_table` | 16 (start, end) page registers with parallel comparators and a priority encoder. |
| `fw_rule_table` | The 1024×8 rule memory, addressed by {PID, segment}, with a two-cycle read. |
| `fw_monitor` | Counts checked, allowed and denied requests, runs a timer while checking is on, and flags when a deny threshold is reached. |
| `fw_intu` | Interrupt unit. It keeps per-cause pending, mask and overflow bits, holds the context of the first event, and drives a level interrupt. |
| `noc_firewall` | The core: OMC, SLRC and INTU wired together, with plain valid/ready ports. |
| `fw_axil_cfg` | AXI4-Lite slave. It turns register writes into firewall commands and serves status reads. |
| `noc_firewall_axi` | The top: the core behind the register interface. |

If you want to drive the setup port from your own logic, use `noc_firewall`
directly.

## The check: segments, then rules

**Page number.** The page number of a request is its address without the 12
offset bits, which is bits 31:12.

**Segment match.** Each valid segment *i* compares the page against its two
bounds, with `start[i] <= page <= last[i]`. Both bounds are inclusive, so a
single page is a segment whose start and end are equal. All 16 comparisons
happen in parallel. An encoder turns the match vector into a segment index. If
segments overlap, the lowest index wins.

**Rule lookup.** On a match, the rule memory is read at the address
`{PID, segment}`. The PID is the one the operating system last wrote, so a
request does not carry its own PID. An entry that was never written, or that
was deleted, reads as zero. A zero rule denies nothing. Entries have valid
flags in flip-flops, so the memory itself needs no reset.

**Rule bits.** The eight bits of a rule come in four pairs:

| bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| meaning | read | write | data | execute | privileged | non-privileged | secure | non-secure |

**Decision.** A rule denies an access when, in every pair, the bit for the
access's own attribute is set:

```
deny = (write ? r[1] : r[0]) & (instr ? r[3] : r[2]) & (priv ? r[4] : r[5]) & (secure ? r[6] : r[7])
```

Some examples:

- `8'hFF` denies everything in the segment.
- `8'b1111_1110` denies every write but no read.
- `8'b0101_0101` denies only secure, privileged data reads.

**Allow by default.** If the address matches no segment, or checking is
disabled, the request is forwarded.

## Timing of a check

The firewall handles one item at a time, whether a request or a command, in
the order the OMC accepted them. The OMC holds one more item in its dispatch
register, so a producer can stay one item ahead. Latencies are counted from the
clock edge at which the OMC accepts the item:

| item | result |
|---|---|
| request, no segment matched, or checking disabled | `fwd_valid_o` high after 2 edges |
| request, segment matched, allowed | `fwd_valid_o` high after 5 edges |
| request, segment matched, denied | deny reaches the INTU after 5 edges; `irq_o` high one edge later |
| command | executed at edge 2, done at edge 3 |

**The matched path.** The 5 cycles of a segment hit break down as follows:

1. The SLRC takes the item.
2. The segments are compared and the rule address is registered.
3. The rule is read.
4. The rule is decided.
5. The request is forwarded or the deny is raised.

**Throughput.** A forwarded request holds the SLRC until memory accepts it,
so `fwd_ready_i` back-pressure stalls the checker. With memory always ready and
a stream of segment hits, one request completes every 6 cycles. A denied hit
completes every 5 cycles.

## Commands and the operating mode

Setup commands (`fw_cmd_t`) share the OMC's ordered path with requests. A
request accepted after a rule change is therefore always checked against the
new rule. If a command and a request arrive in the same cycle, the command goes
first.

| op | command | effect |
|---|---|---|
| 1 | ADD_SEG | Write (start, last) of segment `seg` and make it valid. |
| 2 | DEL_ALL | Invalidate all segments. |
| 3 | SET_RULE | Write `rule` at (`pid`, `seg`). |
| 4 | DEL_RULE | Delete the rule at (`pid`, `seg`). |
| 5 | SET_PID | Set the PID of the running process (context switch). |
| 6 | SET_ENABLE | Turn checking on or off (`rule[0]`). |
| 7 | SET_THRESH | Set the deny-count threshold of the monitor (0 turns it off). |
| 8 | CLR_MON | Clear the monitor counters and timer. |

SET_PID and SET_ENABLE take effect at the edge where the OMC accepts them.

**Invalid commands.** The OMC drops a command and raises the bad-command
interrupt with its opcode when any of these holds:

- the opcode is unknown;
- the segment index or PID is out of range;
- the segment's start lies above its end.

**After reset,** checking is enabled, the PID is 0, no segment is valid and
every rule is empty.

## Interrupts

The INTU has three causes:

- **deny:** a request was dropped;
- **bad command:** an invalid command arrived;
- **threshold:** the monitor's deny count reached the programmed value.

**Pending and mask bits.** Each cause has a pending bit and a mask bit.
`irq_o` is high while any unmasked cause is pending.

**Held context.** The context of the first deny is captured and held until
software clears the cause: address, PID, segment, rule and the four access
attributes. The opcode of the first bad command is held in the same way. The
interrupt routine therefore reads the event that raised the interrupt, not a
later one.

**Overflow.** If another event of the same cause arrives while the cause is
pending, the cause's overflow flag is set.

**Clearing.** Writing 1 to a cause clears it. An event that arrives in the same
cycle as its clear wins.

## Register map (`fw_axil_cfg`)

All registers are 32 bits at byte offsets on the AXI4-Lite port, which has a
13-bit address.

| offset | name | access |
|---|---|---|
| 0x000 | CTRL | Bit 0 enables checking. A write issues SET_ENABLE. |
| 0x004 | PID | PID of the running process. A write issues SET_PID. |
| 0x008 | IRQ_STATUS | Read: [2:0] pending, [10:8] overflow (bit 0 deny, bit 1 bad command, bit 2 threshold). Write: 1 clears the cause. |
| 0x00C | IRQ_MASK | [2:0], where 1 lets the cause raise `irq_o`. Reset: all set. |
| 0x010 | DENY_ADDR | Address of the held denied access. |
| 0x014 | DENY_INFO | [5:0] PID, [11:8] segment, [23:16] rule, [24] write, [25] instruction, [26] privileged, [27] secure. |
| 0x018 | BAD_OP | Opcode of the held invalid command. |
| 0x01C | THRESH | Deny-count threshold. A write issues SET_THRESH. |
| 0x020 | N_CHECK | Requests checked. A write clears all monitors. |
| 0x024 / 0x028 | N_ALLOW / N_DENY | Requests allowed and denied. |
| 0x02C | TIMER | Cycles with checking enabled. |
| 0x030 | SEG_VALID | Segment valid bits. A write deletes all segments. |
| 0x100 + 8·i | SEG_START[i] | First page of segment i. It is held until SEG_END[i] is written. |
| 0x104 + 8·i | SEG_END[i] | Last page. A write adds segment i. |
| 0x1000 + 4·(16·pid + seg) | RULE | Write-only. Writing 0 deletes the rule. |

**Write responses.** A write that becomes a command is answered only after the
core has accepted the command. A register write followed by a request therefore
orders them correctly.

**Errors.** A write to an unmapped offset gets SLVERR. It is also passed on as
an invalid command, so it raises the bad-command interrupt. A read of an
unmapped offset returns 0 with SLVERR.

**Handshakes.** One write and one read may be outstanding at a time. Write
strobes are ignored, so every write is a full word.

**Typical driver flow:**

1. Write SEG_START and SEG_END for each protected range.
2. Write the RULE entries for each PID.
3. Write PID on every context switch.
4. In the interrupt handler, read IRQ_STATUS, DENY_ADDR and DENY_INFO, then
   write 1s to IRQ_STATUS.

## What is taken from the published design and what is not

The following come from the published design:

- the firewall at the initiator NI;
- the split into an operating mode controller, a rule-checking unit and an
  interrupt unit;
- segments searched in parallel by range comparators on the page number, with
  a 12-bit offset;
- rules selected by a 6-bit PID and the segment index;
- the eight rule subfields;
- allow by default with deny rules;
- monitors in the checking unit;
- the 2-cycle and 5-cycle check latencies and the 3-cycle segment commands;
- 16 segments, 64 PIDs and the 1024×8 rule memory of its FPGA prototype;
- a memory-mapped programming interface with an interrupt that the service
  routine clears.

The following are this design's own:

- **Rule semantics:** the bit order and the four-pair AND. The source lists the
  subfields but not how they combine.
- **Segment bounds and overlaps:** inclusive bounds, and the lowest index wins
  on overlap.
- **Commands:** the command encoding and the validity checks.
- **Ordering:** commands ahead of requests in the same cycle.
- **Interrupts:** the pending, mask and overflow organisation, the held
  context, and the threshold interrupt. The threshold follows the idea of
  coalescing interrupts, which the source mentions only as an outlook.
- **Monitors:** which events are counted.
- **Registers:** the whole register map and its AXI4-Lite handshakes.
- **Rule width:** one 8-bit rule width throughout. The source also describes a
  3-bit rule for its simulation model; the 8-bit rule of the hardware prototype
  is used here.
- **Latency:** 2 or 5 cycles per check. The source also quotes 4 cycles per
  transaction for its FPGA build; the 2/5-cycle figures of its timing table are
  used here.
- **Page field:** always bits 31:12. The source notes that the field could be
  made programmable, and that is not done.

**Not included.** The network-on-chip itself, the NI, the CPUs, the DDR
memory, and the AXI4-to-AXI4 bridge that carries the data/instruction traffic
in the prototype are not part of this RTL. The request side is a plain
valid/ready channel carrying a `fw_req_t` struct. It holds the address, the
four access attributes (write, instruction, privileged, secure) and 32 bits of
data, and it is meant to be adapted to the NI or bus in use. A fine-grain
(page-level) variant, which the source only compares against, is not built.

## Simulation

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog ends a run that
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/fw_pkg.sv \
          tb/tb_noc_firewall_axi.sv --top-module tb_noc_firewall_axi -Mdir obj
./obj/Vtb_noc_firewall_axi
```

Replace the testbench name to run any of the others:

| testbench | what it exercises |
|---|---|
| `tb_noc_firewall_axi` | The whole top at default size, driven as a CPU driver would. |
| `tb_noc_firewall` | The core end to end, with cycle-exact latency checks for every path. |
| `tb_fw_scenarios` | Mixes of secure and malicious processes (8S1M to 1S8M), service rate, and the time to set up all 16 segments. |
| `tb_fw_segment_table` | Segment table: compare against a reference model. |
| `tb_fw_rule_table` | Rule memory: compare against a reference model. |
| `tb_fw_monitor` | Monitor counters and threshold: compare against a reference model. |
| `tb_fw_omc` | OMC: compare against a reference model. |
| `tb_fw_slrc` | SLRC: compare against a reference model, including latencies. |
| `tb_fw_intu` | Interrupt unit: compare against a reference model. |
| `tb_fw_axil_cfg` | Register interface: register decode and AXI handshakes. |

**`tb_noc_firewall_axi` in detail.** It programs segments and rules through
the registers and switches PIDs. It sends random traffic while memory applies
random back-pressure. It services every interrupt and checks the captured
context, and it finally compares the hardware monitor counters with its own.
It fails if any of these never happens:

- an allowed miss or an allowed hit;
- a serviced deny;
- an overflow;
- a threshold interrupt;
- a masked interrupt;
- an invalid write;
- disabled checking;
- back-pressure.

**`tb_fw_scenarios` in detail.** It uses five protected pages and runs each
mix for a fixed number of requests, once with checking on and once with it
off. With checking on, every malicious request must be dropped and every
legitimate one forwarded. With it off, every request must be forwarded. It
also measures the service rate
of the firewall (about 1/6 request per cycle for segment hits). Finally it
issues 16 segment commands back to back and checks that all of them
complete within 51 cycles: 3 cycles per command plus the entry into the
firewall.

Every testbench finishes in seconds.
