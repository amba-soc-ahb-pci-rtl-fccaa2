# Test-ready AHB/PCI bridge: reusing the on/off-chip bridge as the SoC test port

An AMBA SoC that sits on a PCI board already has an AHB-PCI bridge, and that
bridge already contains an AHB bus master. This RTL makes the bridge the
chip's test access port. In test mode a small controller placed in front of
the bridge's AHB master lets an external tester (ATE) act as a virtual bus
master. Test vectors come in on the PCI `AD[31:0]` pins. Test responses go out
on the external bus interface's data pins, `EBIDATABUS[31:0]`. Because input
and output never share a bus, there is no bus-turnaround cycle. Any change from
one vector type to another (address, write, read, control) costs one clock.
In structural (scan) test, each write transfer shifts 32 scan chains of one
core by one bit. The same data phase returns the 32 scan-out bits, and the EBI
drives them off chip, so no read transfer is needed to observe the chains.

The example system has six cores under test:
- on the AHB: a Leon3 processor, an SDRAM controller and an Ethernet MAC;
- on the APB: a UART, a GPIO and an RTC.

The cores themselves are not part of this RTL. Their test wrappers are, and so
are all the test-access parts between the wrappers and the pins.

```
 ATE ── TREQ, CBE[2:0], AD[31:0] ──► tr_bridge ─┬─ htic_ctrl (test controller)
     ◄─ TACK                                    ├─ 2:1 mux ─► ahb_master ─► AHB
                                                └─ PCI write / read FIFO (normal path)
     ◄─ EBIDATABUS, EBIADDROUT ◄── ebi ◄── shared HRDATA
                                  AHB ─┬─ tw_ahb ×3 ─ (Leon3, SDRAM ctrl, Ethernet MAC)
                                       └─ apb_bridge (bypass) ─ tw_apb ×3 ─ (UART, GPIO, RTC)
        TestRead ──► ebi           StructTestMode ──► wrappers, apb_bridge bypass
```

## The external test interface

| pin | direction | use in test mode |
|---|---|---|
| `clk` (TCLK) | in | the single clock of the design |
| `treq` (TREQ) | in | test request; high for the whole test session |
| `tack` (TACK) | out | acknowledge: the vector on AD is taken at this clock edge |
| `cbe[2]` | in | mode, sampled when TREQ rises: 0 functional, 1 structural |
| `cbe[1:0]` | in | type of the vector that will be on AD **in the next cycle** |
| `ad[31:0]` | in | the vector itself |
| `ebi_data_o[31:0]` | out | test responses (EBIDATABUS; output enable is held high) |
| `ebi_addr_o[31:0]` | out | the address of the transfer whose response is on EBIDATABUS |
| `ebi_cs_n` | out | low for one clock when a new response is on EBIDATABUS |

Vector types on `cbe[1:0]`: `11` address, `10` write, `01` read, `00` control.

- **Address vector.** Sets the AHB address for the transfers that follow.
  The address is never incremented.
- **Write vector.** One AHB write of the AD word to that address.
- **Read vector.** One AHB read from that address. The AD word is ignored.
- **Control vector.** Sets the AHB control values used by later transfers:
  - `AD[2:0]` HSIZE (reset: word)
  - `AD[7:4]` HPROT (reset: `0011`)
  - `AD[9:8]` HTRANS (reset: NONSEQ)
  - `AD[12]` HLOCK (reset: 0)

  If HTRANS is set to IDLE or BUSY, later writes and reads complete without
  a bus transfer.

### Session, clock by clock

1. **Enter test mode.** Raise TREQ and put the mode on `cbe[2]`. TACK is low
   in that cycle, and the controller moves to START. In START, TACK is high:
   the mode has been entered.
2. **Start with an address.** In START, keep announcing vector types on
   `cbe[1:0]`. The controller stays in START until an address is announced,
   so a read or write can never come before the first address.
3. **Stream vectors.** From then on, each cycle carries one vector on AD and
   announces the next one's type on `cbe[1:0]`. The vector is consumed at any
   clock edge where TACK is high.
   - TACK is low only while a write or read vector cannot be placed on the
     AHB: a slave is inserting wait states, or the bridge does not own the bus.
   - While TACK is low, hold AD and CBE.
4. **Leave test mode.** Announce an address type, then drop TREQ in that
   ADDRVEC cycle. If TREQ falls in another vector state, the controller first
   goes to ADDRVEC and then to IDLE.

### Response timing

A read vector that is on AD and accepted in cycle *t* is the AHB address
phase in *t*. Its data phase is in *t+1* (longer with wait states). The EBI
registers the bus HRDATA at the end of the data phase. The word is on
EBIDATABUS in *t+2*, with `ebi_cs_n` low for that cycle.

The EBI does this for every transfer that completes in test mode, writes
included. That is how scan-out and primary-output words leave the chip
during write-only structural tests. The tester should use the strobe, not
count cycles, because wait states move the response. It can ignore the words
of writes it does not care about.

After the last vector, the EBI keeps driving its output for one more clock if
a response is still pending. This keeps the final response even when TREQ
falls right away. With wait states, a transfer can still be in flight when
TREQ falls. Apply a few control vectors at the end so it finishes while test
mode is still on.

## The HTIC controller (`htic_ctrl`)

The controller has six states:
- IDLE and START;
- four vector states: ADDRVEC, WRITEVEC, READVEC and CONTVEC.

The state is the type of the vector on AD in the current cycle. The four
vector states form a complete graph (every state can follow every other, and
itself). Its outputs:
- a command to the AHB master (valid in WRITEVEC and READVEC);
- `test_mode`, high in every state but IDLE;
- `struct_test_mode`, which is `test_mode` with the structural mode latched.

`test_mode` has two jobs: it is the select of the multiplexer in front of the
AHB master, and it leaves the bridge as TestRead to the EBI.

Compared with a controller that shares one bidirectional bus for both
directions, this saves the clocks spent turning the bus around.
- A change from read to write or to address costs 1 clock instead of 3.
- A change from read to control costs 1 clock instead of at least 4.
- A change from write to control costs 1 clock instead of at least 2.

The testbenches check that every one of the 16 vector-type changes takes one
clock.

## AHB master and the normal path (`tr_bridge`, `ahb_master`, `sync_fifo`)

The AHB master pipelines AMBA 2.0 single transfers with HBURST = INCR.
- A command sits in the address phase in the cycle it is presented.
- It is accepted when the master owns the bus and HREADY is high.
- Its write data is registered and driven in the following data phase.

So back-to-back vectors run at one per clock when the slaves answer without
wait states. Bus ownership follows AMBA 2.0 rules: HGRANT sampled at an edge
with HREADY high.

In normal operation (TREQ low), the multiplexer feeds the master from the PCI
write FIFO. Read data returns through the PCI read FIFO. A read is only
started when the read FIFO has room for its data. A tag in the data phase
keeps test-mode reads out of that FIFO, even when they complete after test
mode has ended. The PCI target that fills and drains the FIFOs is not part of
this RTL. Its side of the FIFOs appears as ports:
- write FIFO: `pci_wr_push`, `pci_wr_cmd`, `pci_wr_full`;
- read FIFO: `pci_rd_pop`, `pci_rd_data`, `pci_rd_empty`.

## Structural test: wrappers and the APB bypass

Each core has a wrapper: `tw_ahb` on the AHB, `tw_apb` on the APB. Both use
`tw_core`.

While StructTestMode is low, a wrapper is transparent:
- the bus select goes on to the core's own slave port and the core's response
  comes back;
- the core's primary inputs come from their functional sources;
- the core clock enable is high.

While StructTestMode is high, the wrapper answers bus accesses itself. Its
registers are selected by address bits [3:2]:

| offset | write | read data in the same data phase |
|---|---|---|
| `0x0` shift | scan enable high, one core clock; data bit *c* goes into chain *c* | scan-out bit of each chain (before the shift) |
| `0x4` PI | loads the primary-input register that drives the core | PI register |
| `0x8` capture | scan enable low, one core clock | the core's primary outputs (before the capture) |

The only register a wrapper holds is for the primary inputs. Scan data goes
straight from the bus word into the chains. The core clock is gated with
`core_clk_en`, so the core advances only on shift and capture writes.

A typical per-core sequence, all with write vectors:
1. Address vector `0x4xxx_xx00` (shift register), then *L* write vectors to
   shift the pattern in. *L* is the chain length.
2. Address `…04` and a write of the PI value.
3. Address `…08` and a write for the capture. The primary outputs come out on
   EBIDATABUS.
4. Address `…00` and *L* writes that shift the next pattern in. Each write's
   EBIDATABUS word carries the 32 bits just shifted out of the previous
   response.

**APB bypass.** Normally the AHB-APB bridge (`apb_bridge`) needs a setup cycle
and an access cycle per transfer, with one AHB wait state. With StructTestMode
high, its bypass multiplexer drives the access cycle directly in the single AHB
data phase. APB wrappers then take one write per clock, just like AHB
wrappers.

## Address map (this design's choice)

| HADDR[31:24] | slave |
|---|---|
| `0x00` | EBI external memory |
| `0x40`, `0x41`, `0x42` | AHB cores 0..2 (Leon3, SDRAM controller, Ethernet MAC) |
| `0x80` | AHB-APB bridge; PADDR[11:8] = 0 UART, 1 GPIO, 2 RTC |

Any other address reaches a default slave. It answers OKAY with read data zero
and no wait states. In test mode, the EBI's own memory range reads as zero,
because its data pins are an output then.

## Files

All modules live in `rtl/`:

| module | role |
|---|---|
| `tr_pkg` | bus structs, vector and state encodings, address map |
| `tr_soc_top` | the SoC: bridge, decoder, EBI, wrappers, APB bridge; cores, arbiter and PCI side as ports |
| `tr_bridge` | test-ready bridge: `htic_ctrl` + multiplexer + `ahb_master` + two `sync_fifo` |
| `htic_ctrl` | test controller state machine |
| `ahb_master` | pipelined AHB master |
| `sync_fifo` | PCI write/read FIFO |
| `ebi` | external bus interface with test-response output |
| `ahb_interconnect` | AHB decoder and response multiplexer |
| `apb_bridge` | AHB-APB bridge with structural-test bypass |
| `tw_ahb`, `tw_apb`, `tw_core` | core test wrappers |

Parameters of `tr_soc_top`:
- `NC = 32`: scan chains per core.
- `PI_W = 32`, `PO_W = 32`: primary inputs and outputs per core.
- `FIFO_DEPTH = 8`.

Core index *i* in the top's per-core arrays is AHB core *i* for *i* < 3 and
APB core *i*−3 otherwise. The bidirectional EBIDATABUS is split into
`ebi_data_i`, `ebi_data_o` and `ebi_data_oe`.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. Helper models in `tb/`:
- `tb_ate`: the tester;
- `tb_ahb_mem`: an AHB memory with random wait states, which also asserts that
  the address phase is held during waits;
- `tb_scan_core`: a core with 32 scan chains.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tr_pkg.sv tb/tb_tr_soc_top.sv --top tb_tr_soc_top -o sim
./obj_dir/sim
```

Replace the top name to run another block's testbench. `tb_tr_soc_top` runs
the whole system at its default parameters, in well under a second, and covers:
1. normal PCI-path traffic;
2. a functional test session over all six cores, with wait states;
3. a structural test of every core (scan-in, PI load, capture, scan-out);
4. normal traffic again.

It checks every word that leaves on EBIDATABUS against a golden model. It
also fails if any of these never happened:
- entering either mode, and waiting in START;
- each vector-type change;
- a TACK stall;
- bypass and normal APB accesses;
- shift and capture clocks;
- exits from test mode.

The structural session checks that 114 vectors take 115 clocks: one per
vector plus START.

`tb_functional_workload` replays a functional-test stream with the mix of
vector-type changes from a published pattern set:
- 7881 READ to ADDR;
- 9240 READ to WRITE;
- 215 READ to CONT;
- 139 WRITE to CONT;
- 45567 others.

It checks that the 63042 changes take 63042 clocks, one each. It checks
every read against a memory shadow. It also prints the 98068 clocks that a
controller with a shared, turnaround-bound test bus would need for the same
stream. The vector values are random; only the counts come from the pattern
set.

## Where this RTL departs from, or goes beyond, the original scheme

Taken from the original scheme:
- the pins and their roles;
- the vector encoding and the mode bit;
- the controller's states and transitions;
- TACK's meaning, including "access incomplete" while the bus stalls;
- the multiplexer in front of the AHB master and its select doubling as
  TestRead;
- the dedicated output role of EBIDATABUS;
- wrappers that register only primary inputs;
- an APB-bridge bypass for structural test;
- 32 scan chains per core.

This design's own choices:
- the control-vector bit layout and reset values;
- no address auto-increment;
- leaving test mode from READVEC, CONTVEC and START (the original shows exits
  only from ADDRVEC and WRITEVEC);
- no synchroniser on TREQ (the tester is taken to be synchronous to TCLK);
- the EBI's response strobe, its address echo and its one-clock hold after
  exit;
- capturing HRDATA of every transfer, writes included;
- the wrapper register map and the use of clock enables;
- the exact cycle behaviour of the APB bypass;
- the FIFO depth and PCI-side handshake;
- the address map;
- a single external-memory timing on the EBI (one-cycle asynchronous SRAM).

Not included:
- The PCI side of the bridge: PCI target and initiator, the AHB slave, the
  AHB read/write FIFOs, configuration registers and the pad interface. The
  test path bypasses all of these.
- The six cores, the PLL and the AHB arbiter.

The ahb_master handles errors only in part. An ERROR response is flagged but
does not cancel the transfers that follow, and RETRY/SPLIT are not supported.
