# Multi-layer AHB bus matrix with a self-motivated slave-side arbiter

Several AHB masters share several AHB slaves through a crossbar. Each slave
port has its own arbiter, placed next to the slave. That arbiter is steered
by two hints the master places in the upper bits of every address it issues:

* a **priority level**, which may change from one transfer to the next;
* a **transfer length**, the number of transfers the master wants to keep the
  slave for once it wins.

From these hints alone the arbiter selects one of nine arbitration schemes at
run time, with no configuration registers. Three priority policies are
combined with three multiplexing granularities:

|                         | one transfer per grant | one burst per grant | desired length |
|-------------------------|------------------------|---------------------|----------------|
| fixed priority          | FT                     | FR                  | FL             |
| round robin             | RT                     | RR                  | RL             |
| dynamic priority        | DT                     | DR                  | DL             |

* **Round robin** is used whenever all requesting masters give the same
  level.
* **Fixed priority** results when masters keep distinct levels.
* **Dynamic priority** results when masters change their levels from burst to
  burst.

The multiplexing granularity comes from the length field.

The default build has 4 master ports, 4 slave ports, a 32-bit address and
32-bit data. All RTL is synthesizable SystemVerilog-2017.

## Address format

Every master address is split into four fields:

| bits    | field        | meaning                                                        |
|---------|--------------|----------------------------------------------------------------|
| [31:29] | `s_number`   | slave port number (0..N_S-1; any higher value is unmapped)     |
| [28:26] | `p_level`    | priority level, **0 is the highest**                           |
| [25:22] | `t_length`   | 0: one HBURST burst; 1: one transfer; 2..15: that many transfers |
| [21:0]  | `offset_add` | address inside the slave; the only part the slave sees         |

The field widths are part of the original scheme. The order of the fields and
the meaning of `t_length = 0` are choices of this implementation. For
`t_length = 0`, INCR4/WRAP4 count as 4 transfers, INCR8/WRAP8 as 8 and
INCR16/WRAP16 as 16. SINGLE and INCR count as 1, because INCR has no defined
length.

A master that wants, for example, priority 1 and eight uninterrupted
transfers on slave 2 issues addresses `{3'd2, 3'd1, 4'd8, offset}`.

## Structure

```
master port m ──> input_stage ──> addr_decoder ──┐   (N_M of these)
        ^              ^                          │  requests, fields,
        │              └──── accept, responses ───┤  address/control
        │                                         v
        └──────────────────────────────  output_stage s ──> slave port s
                                           └─ sm_arbiter    (N_S of these)
                                                ├─ rr_block
                                                ├─ priority_block
                                                ├─ bus_mux (RR / priority)
                                                ├─ sm_controller
                                                └─ dff_en x2 (Master_no, Add_out)
```

| module            | role |
|-------------------|------|
| `ahb_bus_matrix`  | top: N_M input stages and converters, N_S output stages, fully crossed |
| `input_stage`     | holds a transfer that cannot start at once; builds HREADY/HRESP/HRDATA for its master |
| `addr_decoder`    | "serial-to-parallel converter": splits the address into the four fields, one-hot slave select |
| `output_stage`    | arbiter plus the muxes that route the owner's address phase and the data-phase master's HWDATA to the slave |
| `sm_arbiter`      | round-robin block, priority block, 2:1 mux, controller, and the `Master_no` and `Add_out` registers |
| `rr_block`        | up/down-mask round robin |
| `priority_block`  | picks the highest level among the requesters |
| `sm_controller`   | lock, NoPort and transfer-counter rules; equal-priority detection |
| `bus_mux`, `dff_en` | generic N:1 multiplexer and enabled register |
| `ahb_pkg`         | HTRANS/HBURST enums, request and address-field structs, `transfer_count()` |

## How a transfer travels

1. **Address phase at the master.** The input stage shows HREADY high to its
   master whenever it can take a new address. When the master drives
   NONSEQ/SEQ in such a cycle, the transfer is offered to the output stage of
   the decoded slave.
2. **Immediate start or hold.** If that slave's arbiter already points at
   this master (`Master_no`) and the slave is ready, the transfer is accepted
   in the same cycle. Otherwise the input stage copies address and control
   into its holding register and keeps offering them from there. The master
   sees HREADY low: a hold looks exactly like slave wait states.
3. **Data phase.** After acceptance the input stage routes the slave's
   HREADYOUT, HRESP and HRDATA back to the master. The output stage
   remembers which master owns the data phase, and routes that master's
   HWDATA to the slave.
4. **Pipelining.** The master's next address overlaps the current data phase,
   as in AHB. Back-to-back transfers to a slave the master already owns
   therefore run at one transfer per cycle.

An address whose slave number has no port is answered by the input stage
itself with the two-cycle AHB ERROR response.

## The arbiter's decision

The arbiter decides in every cycle in which the slave's HREADY is high. The
result is loaded into `Master_no` and takes effect in the next address phase.
The registered result is a property of the design: the next master is
"updated after one clock cycle".

The rules, in order:

1. **Lock.** If the owner's transfer carries HMASTLOCK, the owner stays.
2. **Owner not requesting** (or the port idle):
   * with no request at all, **NoPort** is asserted and the slave sees IDLE;
   * otherwise a new master is chosen and the **transfer counter** is loaded
     with that master's length.
3. **Owner requesting.** The accepted transfer decrements the counter.
   * If the counter reaches 0 and no other master requests, the owner stays
     and the counter is reloaded.
   * If the counter reaches 0 and other masters request, a new master is
     chosen from all requesters and the counter is reloaded.
   * Before 0 the owner stays.

**Choosing a master.** A 2:1 mux takes the round-robin candidate when every
requesting master gives the same `p_level`, and the priority candidate
otherwise.

* **Round robin.** The up mask covers the masters above the current one. The
  down mask covers the current master and those below. The lowest-numbered
  requester in the up-masked vector wins; if that vector is empty, the
  lowest-numbered requester in the down-masked vector wins. The current
  master is chosen again only if nobody else asks. Example: the current master
  is 5 and the requests come from masters 5, 3 and 2. The up vector is empty,
  the down vector is {5, 3, 2}, and master 2 wins.
* **Priority.** Each requester's level is turned into a one-hot vector. The
  vectors are ORed, the lowest set bit gives the best level, and the
  lowest-numbered master at that level wins. Ties going to the lowest number
  is this implementation's choice.

**`Add_out`** is the owner's offset address, registered when its address
phase is accepted. It therefore shows the address of the transfer now in its
data phase, and is brought out per slave as `s_add_out`.

### Consequence worth knowing: the hand-over gap under priority

The decision for the next address phase is taken in the same cycle in which
the owner's last allotted transfer is accepted. In that cycle the owner's
request is still visible.

* **Under priority**, an owner that is the most important requester wins
  again. If it has nothing more to send, the next cycle finds it idle, and
  rule 2 hands the slave on one cycle later. Each such hand-over therefore
  costs one idle cycle on the slave.
* **Under round robin** there is no gap, because the current master ranks
  last.
* **Strict fixed priority depends on this behaviour.** A high-priority master
  that keeps issuing single transfers keeps the slave. Excluding the owner at
  expiry would remove the gap, but that master would then lose every other
  slot.

Three masters need 4, 8 and 2 transfers on one slave, and all request in the
same cycle. The resulting schedules (address-phase cycles, with cycle 0 being
the arbitration cycle) are:

| setting                    | grants                                  | last data phase |
|----------------------------|-----------------------------------------|-----------------|
| equal levels (round robin) | M1 1-4, M2 5-12, M3 13-14               | cycle 15        |
| M3 > M1 > M2               | M3 1-2, M1 4-7, M2 9-16                 | cycle 17        |
| M2 > M3 > M1               | M2 1-8, M3 10-11, M1 13-16              | cycle 17        |

There is also one cycle of arbitration latency whenever a master reaches a
slave it does not own yet. Its first transfer waits one cycle in the input
stage.

## AHB details added by this implementation

These points are not specified by the original scheme. They are what an AHB
system needs:

* **Response ordering.** Responses are routed by the slave number latched at
  acceptance. A master has at most one transfer in its data phase.
* **Broken bursts.** A burst may be split by arbitration (for example with
  one transfer per grant). A SEQ transfer whose master did not issue the
  slave's previous transfer is therefore sent to the slave as NONSEQ.
* **HMASTER.** Each slave port outputs `s_hmaster`, the owner's number, and
  `s_noport`.
* **Slave HREADY.** Each slave is alone on its layer, so its HREADY input is
  its own HREADYOUT.
* **Write data.** Write data is not stored in the input stage. The master
  keeps HWDATA stable while HREADY is low.
* **BUSY.** HTRANS = BUSY is treated like IDLE by the input stage.
* **Reset.** Reset is asynchronous and active low. After reset every arbiter
  is in NoPort with `Master_no = 0`.
* **Combinational paths.** A slave's HREADYOUT reaches its master's HREADY,
  and from there the address offer to every other output stage, without a
  register. Attached slaves must therefore not derive HREADYOUT
  combinationally from their HSEL/HTRANS inputs, or two slaves could close a
  loop through two masters.

## Parameters

| parameter | default | where         | meaning |
|-----------|---------|---------------|---------|
| `N_M`     | 4       | top, stages   | master ports |
| `N_S`     | 4       | top, stages   | slave ports (at most 8 with a 3-bit slave number) |
| `DATA_W`  | 32      | top, stages   | data width (not fixed by the original scheme) |
| `ADDR_W`, `SNUM_W`, `PLVL_W`, `TLEN_W`, `OFFS_W` | 32, 3, 3, 4, 22 | `ahb_pkg` | address layout |
| `CNT_W`   | 5       | `ahb_pkg`     | transfer counter, holds a 16-beat burst |

## Top-level ports

All port buses are packed arrays indexed by port number.

* **Master ports:** `m_haddr`, `m_htrans`, `m_hwrite`, `m_hsize`, `m_hburst`,
  `m_hmastlock` and `m_hwdata` in; `m_hrdata`, `m_hready` and `m_hresp` out.
* **Slave ports:** `s_hsel`, `s_haddr` (22-bit offset), `s_htrans`,
  `s_hwrite`, `s_hsize`, `s_hburst`, `s_hmastlock`, `s_hmaster`, `s_hwdata`
  and `s_hready` out; `s_hrdata`, `s_hreadyout` and `s_hresp` in.
* **Status per slave:** `s_noport` and `s_add_out`.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line. Testbench-only models:

* `ahb_master_bfm`: a pipelined AHB master that writes bursts and reads them
  back.
* `ahb_mem_slave`: a memory slave with random wait states. It flags a SEQ
  transfer that follows another master's transfer, and a locked pair that
  another master splits.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_ahb_bus_matrix` | Full matrix at default parameters. Four masters and four slaves go through ten phases: RT, FT, RR, FR, RL, FL, DT, DR, DL, then a mixed phase with random levels and lengths, locked pairs, idle gaps and unmapped addresses. All read data is checked. The test also counts holds, RR and priority picks, counter expiries with and without hand-over, multi-transfer grants, lock holds, NoPort, SEQ→NONSEQ conversion, parallel transfers and wait states, and fails if any of them never occurs. |
| `tb_ahb_bus_matrix_8x8` | The same ten phases with `N_M = N_S = 8`: eight masters, and every slave number mapped. |
| `tb_fig3_latency` | The three-master schedule above, checked cycle by cycle. |
| `tb_sm_arbiter` | Hand-derived grant sequences for RT, FT, RR (4-beat), desired lengths, lock and wait states; NoPort; `Add_out`. |
| `tb_sm_controller` | 5000 random cycles against a reference model of the rules; every rule must fire. |
| `tb_output_stage` | Routing of address, control and write data; accept; SEQ→NONSEQ; in-order delivery under random wait states. |
| `tb_input_stage` | Immediate start, hold and later accept, back-to-back pipelining, slave ERROR, unmapped-address ERROR. |
| `tb_rr_block`, `tb_priority_block` | Worked examples (the round-robin example above; levels 3,7,2,6,1,5,0,4 select master 6) plus random comparison with reference functions. |
| `tb_addr_decoder`, `tb_bus_mux`, `tb_dff_en` | Field extraction and decoding, mux selection, and register enable and reset, each against a reference. |

Run one testbench with plain Verilator from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ahb_pkg.sv \
          tb/tb_ahb_bus_matrix.sv --top-module tb_ahb_bus_matrix -Mdir obj
./obj/Vtb_ahb_bus_matrix
```

The full-size run takes well under a second of simulation time (about 8400
bus cycles).

## Limits and departures

* **Slaves and masters.** These are not part of the design. The testbench
  models are simple: an OKAY-only memory, and masters that never use BUSY or
  SPLIT/RETRY.
* **Arbiter timing.** The arbiter decides on the rising clock edge. The
  original description mentions falling-edge updates inside the selection
  functions; a single rising-edge register replaces them here.
* **Equal priority** is judged over the requesting masters only, not over all
  masters.
* **Lock.** A locked sequence is honoured only while the locked master keeps
  issuing transfers back to back. An IDLE cycle from that master ends the
  protection.
* **No area or timing figures.** No cell-area or delay comparison with other
  arbiter structures is reproduced here.
