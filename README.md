# Multi-Write Distributor Bus

A base station, or any SoC built from repeated hardware, often holds several
identical blocks that software must program with the same settings, one block
after another. This bus removes the repetition: one AXI write from the system
bus into a dedicated 4 KB window lands in **all four** subordinates at once,
while the rest of the address map still reaches each subordinate on its own.

```
 system bus (AXI4, 32-bit)
        |
   axi2axl            AXI4 -> AXI4-Lite: bursts become single transfers
        |
   mw_logic           same AW/W payload to SIF0..SIF3, VALIDs masked, READYs combined
   |   |   |   |
  SIF0 SIF1 SIF2 SIF3   nic400 slave interfaces (each with an input buffer)
   \   |    |   /
      switch          address decode, visibility, arbitration, response routing
   /   |    |   \
  MIF0 MIF1 MIF2 MIF3   nic400 master interfaces
   |    |    |    |
 axi2axl x4             AXI4 -> AXI4-Lite
   |    |    |    |
 sub0 sub1 sub2 sub3    (outside this RTL)
```

| Address window    | Write goes to          | Read comes from |
|-------------------|------------------------|-----------------|
| `0x4000-0x4FFF`   | subordinates 0, 1, 2, 3 | subordinate 0   |
| `0x0000-0x0FFF`   | subordinate 0          | subordinate 0   |
| `0x1000-0x1FFF`   | subordinate 1          | subordinate 1   |
| `0x2000-0x2FFF`   | subordinate 2          | subordinate 2   |
| `0x3000-0x3FFF`   | subordinate 3          | subordinate 3   |
| anything else     | nowhere, `DECERR`      | `DECERR`        |

Address bits `[31:12]` pick the window. The full address is passed on, so
subordinate *n* sees `0x4abc` for a multi-write and `0xnabc` for a private
access.

## How one write becomes four

AXI is point to point: each VALID/READY pair joins one manager to one
subordinate. The bus therefore does not copy transactions inside an
interconnect. It presents one request to four slave interfaces of an
ordinary 4x4 interconnect (`nic400`) and makes sure the four copies take
different routes:

* **Fan-out (`mw_logic`).** The address and data from the front converter are
  wired to all four slave interfaces. Only `AWVALID` and `WVALID` differ per
  interface. For a `0x4XXX` address all four are enabled. For any other
  address only SIF0 is. Reads use SIF0 only.
* **Routing (`nic400`).** SIF0 decodes the whole map and sends `0x4XXX` to
  MIF0. SIF1, SIF2 and SIF3 can only see MIF1, MIF2 and MIF3 respectively,
  and only through `0x4XXX`. So the four copies of a multi-write go to four
  different subordinates.

### The split handshake

W beats carry no address, so `mw_logic` forks a write as an address/data
pair. It waits until both AW and W are valid upstream, offers both copies to
every enabled interface, and offers the next write only once every enabled
interface has taken both copies.

The four interfaces do not have to accept their copies in the same cycle. If
one has a full input buffer, the others may already have taken theirs. A naive
AND of the READYs would offer the copy again to the interfaces that already
took it, which would be a duplicate transfer. A naive OR would drop the copy
for the slow one. `mw_logic` keeps one *done* flag per interface and channel:

```
both      = AWVALID & WVALID                     (upstream)
valid_k   = both & enabled_k & ~done_k           (per channel)
AWREADY = WREADY = both & AND over k, over AW and W of
                   (~enabled_k | done_k | (valid_k & ready_k))
done_k    <= upstream handshake ? 0 : done_k | (valid_k & ready_k)
```

The upstream handshake completes in the cycle the last enabled interface
takes its last copy. Every interface sees a legal AXI handshake: its VALID
stays high until its READY. Waiting for both AW and W before answering either
is allowed by AXI.

**Why the pair rule.** A multi-write copy on SIFk and private writes from
SIF0 can meet at the same master interface, in either order. Forking the
address first and the data later can then deadlock, as follows:

1. SIF1 took a multi-write address.
2. Master interface 1 granted that address and waited for its data.
3. The data was never forked, because the same address was still waiting for
   room in SIF0's address buffer.
4. SIF0's address buffer was full behind a private write to master
   interface 1.

With the pair rule, an interface only holds an address whose data has
already been offered to it. Any data ahead of that data in its own buffer
belongs to addresses it issued earlier to the same master interface. The
end-to-end test stops one subordinate at a time while private and
multi-writes to its windows pile up, to exercise this case.

### Whose response wins

Only SIF0's B, AR and R channels are connected. The responses coming back on
SIF1..SIF3 are accepted (`BREADY` tied high) and discarded. So the write
response seen by the system bus is the response of subordinate 0 alone.
Errors, or slow completion, at subordinates 1..3 are invisible to the writer.
This follows the original design on purpose. Multi-read, which would merge
four read responses, is not supported.

## The interconnect (`nic400`, `nic_ib`, `nic_bm`)

The original system uses a generated ARM NIC-400 with the settings below. This
RTL is a functional stand-in written from those settings. It is not the
vendor IP.

| Setting                        | Value                               |
|--------------------------------|-------------------------------------|
| interfaces                     | 4 slave, 4 master, AXI4, 32-bit address and data, one clock |
| visibility                     | SI0 -> MI0..MI3; SIk -> MIk only    |
| slave-interface ID width       | 0                                   |
| read / write issuing per SI    | 4 / 4                               |
| total acceptance per MI        | 4                                   |
| slave-interface buffering      | 2 entries on each of AW, W, B, AR, R (`nic_ib`) |
| master-interface buffering     | none                                |
| ordering model                 | single subordinate per ID           |
| QoS, TrustZone, lock, timing slices | none                           |

Inside the switch (`nic_bm`):

* **Single subordinate per ID.** A slave interface has no ID bits, so all its
  transactions share one ID. To keep responses in order without reorder
  buffers, a slave interface may have transactions outstanding at only one
  master interface per direction. An address bound elsewhere is held until
  the outstanding count drops to zero. This is why a multi-write that
  follows a private write to `0x1XXX` waits at SI0 until that write's
  response has returned.
* **Arbitration.** Each master interface has a round-robin arbiter per
  direction. MIFk can be requested by SI0 (private window) and by SIk (multi
  window) at the same time. A grant that has been offered but not taken is
  held, so `AWVALID`/`ARVALID` and their payload stay stable.
* **IDs on the master side.** Each master interface carries a 1-bit ID:
  0 means the transaction came from SI0, 1 means it came from SIk. B and R
  are steered back with it.
* **Write data order.** Each master interface queues the slave interfaces it
  granted addresses to, and takes W beats from the head of that queue until
  `WLAST`.
* **Acceptance.** At most 4 transactions, reads and writes together, are in
  flight per master interface. A new AW counts an AR already on offer, and a
  new AR counts an AW on offer. So two grants in the same cycle cannot
  overshoot the limit.
* **Default subordinate.** Addresses outside a slave interface's windows are
  answered locally: write data is consumed and `DECERR` returned, and reads
  return `DECERR` beats with a correct `RLAST`.

## The protocol converter (`axi2axl`)

AXI4-Lite has no bursts and no IDs, so a converter sits in front of the bus
and in front of each subordinate:

* An AXI4 burst of `AxLEN+1` beats is replayed as `AxLEN+1` single
  AXI4-Lite addresses. FIXED repeats the address. INCR steps by `2**AxSIZE`,
  aligned after the first beat. WRAP wraps inside the `(AxLEN+1)*2**AxSIZE`
  window. Narrow beats keep their byte lanes through `WSTRB`.
* Write data passes straight through.
* For each burst an `{ID, LEN}` entry is queued, up to 4. The burst's single
  responses are merged into one B with that ID and the worst response. Read
  beats get `RID` and `RLAST` from the same kind of queue.

A burst to `0x4XXX` is therefore duplicated beat by beat. The front
converter returns one B per burst to the system bus.

## Timing

Everything runs on one clock. `rst_n` is active low and sampled on the rising
edge. With subordinates that answer at once, a single multi-write takes
about 8 cycles from the system-bus address handshake to its response. The
forward path is: front converter (1 cycle), fan-out, input buffer (1 cycle),
switch (combinational), back converter (1 cycle), subordinate, then the B path
back. The converters issue at most one beat per cycle. No throughput or
latency figures were given for the original design, so none are checked
against a target.

## Files

| File | Content |
|------|---------|
| `rtl/mwd_pkg.sv`   | widths, channel structs, burst/response enums, address windows |
| `rtl/mwd_bus.sv`   | top level |
| `rtl/axi2axl.sv`   | AXI4 -> AXI4-Lite converter |
| `rtl/mw_logic.sv`  | VALID masking / READY combining |
| `rtl/nic400.sv`    | interconnect: input buffers + switch |
| `rtl/nic_ib.sv`    | input buffer (five FIFOs) |
| `rtl/nic_bm.sv`    | switch |
| `rtl/sync_fifo.sv` | generic registered FIFO |
| `tb/axil_mem_model.sv` | behavioural AXI4-Lite memory (1024 words, random back-pressure) standing in for a subordinate |
| `tb/tb_*.sv`       | self-checking testbenches: one per block, `tb_nic_limits` for the interconnect limits, `tb_mwd_bus` end to end |

Top-level ports: `s_*` is an AXI4 subordinate port (`ID_W` = 4 ID bits).
`m_*` are four AXI4-Lite manager ports, as arrays indexed by subordinate.
Channel payloads are packed structs from `mwd_pkg` (`ax_t`, `w_t`, `r_t`,
`lax_t`).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. From
the repository root:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mwd_pkg.sv \
    tb/tb_mwd_bus.sv --top-module tb_mwd_bus -Mdir obj_mwd
./obj_mwd/Vtb_mwd_bus
```

Replace `tb_mwd_bus` with `tb_axi2axl`, `tb_mw_logic`, `tb_nic400`,
`tb_nic_limits` or `tb_nic_ib` to run the block tests. `tb_nic_limits`
drives the interconnect's master side directly and holds back responses.
It checks that a master interface never carries more than four
transactions, reads and writes together, and that a slave interface never
has more than four writes outstanding. In the full bus the back converters
take one burst at a time, so these limits are rarely reached there. `tb_mwd_bus` runs the top at its default
parameters. It does directed single writes, single reads, FIXED and INCR
burst writes, burst reads and posted writes. Then it runs 60 rounds of
private and multi-writes posted while one subordinate is stopped, and 60
rounds of random mixed traffic. It compares all four memory images and every read against a
reference model. It also requires each of these to happen at least once: a
four-way write, a single-destination write, a burst split, a split
acceptance, a single-subordinate-per-ID hold, two slave interfaces competing
for one master interface, several writes outstanding, a `DECERR`, and
subordinate back-pressure. It finishes in well under a second.

## Where this departs from, or fills in, the original description

* **Address map.** The original address table puts `0x1000-0x1FFF` on master
  interface 3 and `0x3000-0x3FFF` on master interface 1, but its block
  diagrams label MIF1 with `0x1XXX` and MIF3 with `0x3XXX`. This RTL follows
  the diagrams. To swap the two, edit `PRIV_PAGE` in `mwd_pkg`.
* **Interconnect.** This is a behavioural equivalent of a configured vendor
  crossbar. The arbitration policy (round robin), the 1-bit master-side ID
  and the DECERR default subordinate are this design's choices. The
  configuration does not state them.
* **Master-side buffers.** The crossbar drawing shows buffer boxes on the
  master side too, but the configuration lists zero buffering there, so
  there are none.
* **Converter.** The converter's existence and purpose come from the
  original. Its splitting/merging scheme, queue depth (4) and worst-response
  merge are this design's choices.
* **`mw_logic` internals.** The done flags and the address/data pair rule are this
  design's way of keeping the fan-out legal AXI. The original only names the
  masked VALIDs and the per-interface READYs.
* **System-bus ID width.** This is 4 bits, an assumption.
* **Not built.** The four subordinates, the system-bus manager, the memory
  models of the original test environment (a behavioural one is in `tb/`),
  the two-system-bus variant proposed as future work, and multi-read.
