# OCP shared bus with four masters, four slaves, tags and threads

This is a small system-on-chip interconnect built on the Open Core Protocol (OCP).
Each core sees only an OCP port, so it does not depend on the bus behind it.
Four OCP masters share one bus to four OCP slaves. A rotating-priority arbiter
decides who owns the bus. A decoder picks the slave from the two low address
bits. A request mux and a response mux carry the signals between the owner and
the chosen slave.

On top of plain reads and writes, the interface covers:

- the OCP "simple" extensions: byte enables, address spaces, and parity in the
  data-info field;
- precise and imprecise bursts;
- tagged in-order and out-of-order transactions;
- two threads per master and slave;
- locked reads (ReadEx) and linked/conditional pairs (ReadLinked /
  WriteConditional);
- width conversion ("pack/unpack") between the 32-bit OCP word and a narrower
  memory core.

The structure follows the article *Scalable On-Chip Bus and Thread Extension
using Open Core Protocol*. That source describes its blocks and signal
behaviour but gives no RTL and little timing. The cycle-level protocol below is
this design's own, and so are the points listed under
[Departures and open points](#departures-and-open-points).

```
 core 1 ─ ocp_master ─┐                           ┌─ ocp_slave ─ 64x16 RAM
 core 2 ─ ocp_master ─┤   request mux ──────────► ├─ ocp_slave ─ 64x16 RAM
 core 3 ─ ocp_master ─┤        ▲ grant            ├─ ocp_slave ─ 64x16 RAM
 core 4 ─ ocp_master ─┘   ocp_arbiter             └─ ocp_slave ─ 64x16 RAM
            ▲                                            │
            └──────────── response mux ◄── decoder (MAddr[1:0])
```

## One transaction, cycle by cycle

The bus is not pipelined. A master keeps the grant from its first request beat
until the response to its last beat has been accepted. One beat is in flight at
a time. A single read with a slave that answers at once runs like this:

| edge | master state | what happens |
|---|---|---|
| 0 | IDLE → REQ | the core pulses `core_start_i`; the master latches the command and raises its bus request |
| 1 | REQ | the arbiter registers the grant |
| 2 | REQ → THREAD | the master drives MAddr. The decoder now selects the slave, so the slave's SThreadBusy becomes visible |
| 3 | THREAD → SEND | the thread is free: the master takes the next MTagID and drives MCmd |
| 4 | SEND → RESP | the slave accepted the beat (SCmdAccept in the same cycle) |
| 5 | RESP → DONE | SResp arrived, the master answered MRespAccept, and the read data went to the core |
| 6 | DONE → IDLE | `core_done_o` and `bus_done_o`: the arbiter drops the grant and rotates its priority |

Between start and done this takes 5 clock edges. Each further burst beat adds
at least 2 cycles, one for SEND and one for RESP. Inside the slave, one beat
needs:

- 1 cycle to accept the beat;
- 1 cycle for the check step;
- 32/CORE_W core cycles (2 for the 16-bit RAM);
- at least 1 cycle for the response, which is held until MRespAccept.

With the default RAM the master therefore sees the response 4 cycles after
acceptance. After each transaction the bus stays idle for one cycle before the
next grant.

Two rules are checked by assertions:

- the slave keeps SResp steady until MRespAccept;
- a master in THREAD, SEND or RESP always holds the grant.

## The arbiter

`ocp_arbiter` keeps a 4-bit one-hot priority register (`seq_o`) that names the
master with the highest priority. Priority then falls cyclically with the
master number. The first requesting master found from that point upward gets
the grant. When the granted master reports done, the priority register rotates
by one position. It rotates after every transaction, whoever was served. The
priority of each master, 0 being the highest:

| priority register | M4 | M3 | M2 | M1 |
|---|---|---|---|---|
| 0001 (after reset) | 3 | 2 | 1 | 0 |
| 0010 | 2 | 1 | 0 | 3 |
| 0100 | 1 | 0 | 3 | 2 |
| 1000 | 0 | 3 | 2 | 1 |

Example: the register is 0100, so M3 comes first, then M4, M1 and M2. Only M1
and M2 request, so M1 wins because M3 and M4 are idle. The end-to-end test
repeats exactly this case.

## Signals on the bus

The request and response bundles are packed structs, `ocp_req_t` and
`ocp_resp_t`, in `ocp_pkg`.

| master signal | width | use here |
|---|---|---|
| MCmd | 3 | 000 IDLE, 001 RD, 010 RDEX (ReadEx), 011 RDL (ReadLinked), 100 WR, 101 WRC (WriteConditional) |
| MAddr | 32 | [1:0] slave number, [31:2] word address in the slave |
| MData, MDataValid | 32, 1 | write data, driven with the write command |
| MByteEn | 4 | byte lanes [7:0] … [31:24] |
| MAddrSpace | 8 | the lowest set bit k selects address region k (32 words each) |
| MDataInfo | 16 | [3:0] even parity of each MData byte; the rest is 0 |
| MBurstLength, MBurstPrecise, MBurstSeq, MReqLast | 8, 1, 1, 1 | bursts (INCR = 0, WRAP = 1) |
| MTagID, MTagInOrder | 3, 1 | tags |
| MThreadID, MConnID | 1, 2 | thread, master number |
| MRespAccept | 1 | master takes the response |

| slave signal | width | use here |
|---|---|---|
| SCmdAccept, SDataAccept | 1, 1 | beat accepted; SDataAccept only for writes |
| SResp | 2 | 00 NULL, 01 DVA (success), 10 FAIL, 11 ERR |
| SData, SDataInfo, SByteEn | 32, 16, 4 | read data, its parity, a copy of MByteEn |
| SRespLast, STagID, SThreadID | 1, 3, 1 | copies of the beat's MReqLast, MTagID and MThreadID |
| SThreadBusy | 2 | bit 0 Thread0, bit 1 Thread1 |

Every write gets a response as well. Reads carry their data with DVA. FAIL and
ERR responses carry no data.

## Bursts and addresses

- **Precise burst.** MBurstPrecise is 1. Every beat carries the same
  MBurstLength, and the beat numbered length−1 carries MReqLast.
- **Imprecise burst.** The core gives a length for each beat (for example
  3, 3, 2, 2, 1). The beat whose length is 1 ends the burst.
- **INCR.** The word address steps by one (MAddr by 4 bytes).
- **WRAP.** This applies to precise bursts whose length is a power of two. The
  address runs through the block of `length` words aligned to `length`, so a
  4-beat WRAP from word 10 visits 10, 11, 8, 9. Any other WRAP burst counts up
  like INCR.

The master sends an address with every beat. The slave's `ocp_addr_gen`
computes the address on its own from the first beat and the beat count, and
ignores MAddr on later beats. MAddrSpace adds k × 32 words to the address. The
default RAM holds exactly 32 words, so at the default size every region maps
onto the same memory.

## Width conversion (pack and unpack)

The OCP word is 32 bits. The core behind each slave is `CORE_W` bits wide
(default 16; 8 and 32 also work).

- **Write (unpack).** `ocp_unpack` splits the word into 32/CORE_W lanes. Lane 0
  is the least significant. Each lane is written in its own core cycle, with
  the MByteEn bits that cover it.
- **Read (pack).** `ocp_pack` collects the lanes back into a word.

OCP word `w` therefore sits in RAM locations `2w` (bits 15:0) and `2w+1`
(bits 31:16).

## Locks and reservations

`ocp_lock_monitor` sits in every slave. Its rules work on the core word
address:

- **ReadEx** locks the location for that master (MConnID) and thread. Any
  access by another master, or by another thread of the owner, answers ERR and
  changes nothing. The owner's write from the same thread releases the lock.
  Each master holds at most one lock per slave.
- **ReadLinked** sets that master's reservation on the location. A master has
  one reservation per slave, and a newer one replaces the older.
- **WriteConditional** writes and answers DVA only if that master holds a
  reservation on the location. Otherwise it answers FAIL and writes nothing. A
  master cannot use another master's reservation.
- Every successful write to a location, plain or conditional, clears all
  reservations on it. Reads leave reservations alone.

## Tags and threads

`ocp_tag_order` gives each transaction the next tag (0, 1, 2, … modulo 8) and
marks it outstanding. When a response arrives:

- for an **in-order** transaction (MTagInOrder = 1), it is accepted only if it
  carries the oldest outstanding tag;
- for an **out-of-order** transaction, any outstanding tag is accepted.

A rejected response is acknowledged but dropped. It does not reach the core and
sets `core_err_o`.

`ocp_thread_arbiter` puts in-order transfers on Thread0 and out-of-order ones
on Thread1. While the slave's SThreadBusy bit for that thread is set, the
transfer waits. While both threads are busy, `watch_o` switches between the
two threads every cycle.

The bus carries one transaction at a time. In the complete system a slave is
therefore never busy, and never answers out of order, when a master looks. The
waiting and rejection paths are exercised in the master's and the tag unit's
own testbenches. In the system, tags and threads act as labels that the slave
copies back.

## Error check

The master puts the parity of each write byte into MDataInfo[3:0]. The slave
checks it and answers ERR without writing if it does not match. The slave
returns the parity of SData in SDataInfo, and the master flags a read whose
parity is wrong.

## Departures and open points

- The source says an in-order response with the wrong tag gets no
  MRespAccept. Here it is acknowledged and dropped (and flagged), so that one
  bad response cannot hold the shared bus forever.
- The source's slave flow waits for 40 % of a clock cycle before looking at a
  request. This design is fully synchronous: everything happens on the rising
  edge.
- The source names MReqInfo and SRespInfo but gives them no content, so they
  are not built. The upper byte of MDataInfo and SDataInfo is driven 0.
- The source does not print the SResp codes. The usual OCP codes are used.
- Several things are this design's own choices:
  - the tag width (3 bits) and MBurstLength width (8 bits);
  - the lane order;
  - reading the address space as "lowest set bit";
  - the aligned WRAP block;
  - one lock and one reservation per master;
  - ERR for locked locations;
  - the one idle cycle between grants.
- The source tested one master and one slave with a single 64 × 16 RAM. Here
  every slave has its own.
- The source's FPGA utilisation, timing and power figures come from its own
  build and are not reproduced.
- Not designed here: the initiator cores that drive the masters, the bridge to
  other protocols, and the peripheral cores. The masters' core ports are
  brought out to the top level instead.

## Files

| file | contents |
|---|---|
| `rtl/ocp_pkg.sv` | widths, MCmd/SResp/burst enums, request and response structs, parity function |
| `rtl/ocp_soc_top.sv` | top level: 4 masters, arbiter, muxes, decoder, 4 slaves with RAM |
| `rtl/ocp_master.sv` | master interface (uses `ocp_thread_arbiter`, `ocp_tag_order`) |
| `rtl/ocp_slave.sv` | slave interface (uses `ocp_addr_gen`, `ocp_lock_monitor`, `ocp_pack`, `ocp_unpack`) |
| `rtl/ocp_arbiter.sv`, `ocp_decoder.sv`, `ocp_req_mux.sv`, `ocp_resp_mux.sv` | the shared bus |
| `rtl/ocp_async_ram.sv` | 64 × 16 RAM, asynchronous read, byte-enabled write |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ocp_soc_top_core8.sv` | the whole bus with 8-bit slave cores |

The top's parameters are `N_MASTERS` (4), `N_SLAVES` (4), `CORE_W` (16) and
`RAM_DEPTH` (64). The decoder takes two address bits, so up to four slaves can
be addressed. The master's MConnID is 2 bits wide, so up to four masters can be
told apart by the lock monitor.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. To
run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ocp_pkg.sv tb/tb_ocp_soc_top.sv \
          --top-module tb_ocp_soc_top -o sim
./obj_dir/sim
```

Replace `tb_ocp_soc_top` with any other testbench name to run that one.

`tb_ocp_soc_top` runs the whole system at its default size, in seven phases:

1. memory initialisation over the bus;
2. all four masters start together, and the grants must come as M1, M2, M3,
   M4;
3. the table example above;
4. a precise INCR write, a WRAP read and the imprecise 3, 3, 2, 2, 1 write;
5. a byte-enabled write;
6. the lock sequence and the ReadLinked/WriteConditional sequence;
7. 160 random reads and writes (single beats and bursts) from all masters at
   once, checked against a memory model.

The test counts how often each mechanism occurred and fails if one never did:

- contention and priority rotation;
- Thread0 and Thread1;
- pack and unpack;
- precise, WRAP and imprecise bursts;
- byte enables;
- lock error and unlock;
- WriteConditional success and failure.

The unit testbenches check timing as well:

- `tb_ocp_master`: 5 cycles for a single transfer, 11 for a 4-beat burst with
  a zero-delay slave;
- `tb_ocp_slave`: the response 4 cycles after acceptance for a 16-bit core and
  6 for an 8-bit core;
- `tb_ocp_arbiter`: a grant one cycle after the request.

`tb_ocp_slave` also runs a second slave with an 8-bit core, covering 32-to-8
unpacking and 8-to-32 packing. `tb_ocp_soc_top_core8` runs the whole bus with
`CORE_W = 8`. After every write it compares each byte of the four RAMs with a
reference model, which checks the lane order and the byte enables where they
land. It also times a single transfer through the bus: 11 cycles after the
start strobe, against 9 with 16-bit cores. The difference is the two extra
core cycles.
