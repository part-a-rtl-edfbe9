# OCP / AXI4 / APB3 protocol bridges

A system-on-chip often mixes IP cores that speak different on-chip bus protocols.
This repository contains four synthesizable SystemVerilog bridges that let an
Open Core Protocol (OCP) master talk to a slave on another bus:

| Prefix in the top | Bridge | Master side | Slave side |
|---|---|---|---|
| `b1_` | `ocp2_axi4_bridge` | OCP 2.2 (tagged, single-request bursts) | AMBA AXI4 |
| `b2_` | `ocp1_ocp2_bridge` | OCP 1.0 (one request per beat) | OCP 2.2 |
| `b3_` | `ocp1_axi4_bridge` | OCP 1.0 | AMBA AXI4 |
| `b4_` | `ocp1_apb3_bridge` | OCP 1.0 | AMBA APB3 |

The bridges are independent. `bridges_top` places them side by side. They share
only `clk` and the asynchronous active-low reset `resetn`. Each bridge's ports come
out unchanged under its prefix.

Every bridge deals with the same three mismatches between the protocols:

* **Burst shape.** OCP 1.0 sends a burst as one request per beat, with the write
  data on the request handshake. OCP 2.2 and AXI4 send one request per burst,
  with a separate data handshake.
* **Address rules.** An AXI4 burst may not cross a 4 KB page. OCP bursts may.
* **Responses.**
  * AXI4 has two response channels; OCP has one.
  * AXI4 and OCP 2.2 answer writes and may return responses out of order across IDs (tags).
  * An OCP 1.0 master has no tags and no response handshake. It wants read data
    in request order and no write responses at all.

The two hardest parts are splitting at 4 KB (with recombining of the responses)
and putting responses back in order. They are described first.

## Shared definitions (`bridge_pkg`)

The package holds the code values of the public OCP and AMBA specifications:

* `MCmd`: IDLE=0, WR=1, RD=2, WRNP=5, and others.
* `SResp`: NULL, DVA, FAIL, ERR.
* OCP 2.2 `MBurstSeq`: INCR=0, WRAP=2.
* OCP 1.0 `MBurst`: LAST=0, TWO=2, FOUR=3, EIGHT=5.
* AXI burst and response codes.

OCP commands that read (RD, RDEX, RDL) go to an AXI read channel. Every other command is treated as a write.

## OCP 2.2 to AXI4 (`ocp2_axi4_bridge`)

The OCP tag (`MTagID`) becomes the AXI ID. `MBurstLength` becomes `AxLEN` and
`MBurstSeq` becomes `AxBURST`. `AxSIZE` is derived from `DATA_W`.

`DATA_W` may be 32 to 512 bits; the default is 32. Defaults for the rest:

* `ID_W` = 4;
* `BL_W` = 8 (bursts of 1 to 255 beats);
* up to `MAX_OUT` = 8 outstanding AXI commands.

**4 KB splitting (`ocp2_axi_split`).**
* One command at a time is registered, then issued the next cycle on AW or AR.
* An INCR burst whose last byte lies on a later 4 KB page becomes two AXI commands with the same ID. The second starts at the page boundary.
* WRAP bursts stay inside their aligned window and are never split.
* A command is refused (`SCmdAccept` low) in two cases:
  * `MAX_OUT` commands are outstanding;
  * an earlier command with the same tag has not finished.

  The second rule keeps same-tag responses in order, as OCP requires.
* Timing: a command takes at least two cycles, or three if it is split.

**Response combining (`ocp2_axi_resp_comb`).**
* B and R are merged onto the one OCP response channel.
* When both offer a response, the write channel wins. A read beat already on offer is held until the master accepts it.
* A table indexed by ID records, per direction, whether a command is busy and whether it was split.
* For a split write:
  * the first half's B response is absorbed silently;
  * the second half's B produces the single OCP response;
  * that response carries the worse of the two codes.
* For a split read, the beats of both halves pass through. `SRespLast` is raised only on the final beat of the second half.
* The path is combinational: `BREADY`/`RREADY` follow `MRespAccept`.
* Response mapping: OKAY/EXOKAY give DVA; SLVERR/DECERR give ERR.

**Write data.**
* The bridge keeps a small queue (`WQ_DEPTH` = 4) of the beat counts of the AW commands it has issued.
* `WLAST` is recomputed from that queue, because a split moves the end of each AXI burst. `MDataLast` is therefore not used.
* A write beat never goes ahead of its AW command.

## OCP 1.0 masters: response reordering (`ocp_resp_reorder`)

The OCP 1.0 to OCP 2.2 and OCP 1.0 to AXI4 bridges share one response block. It
is a ring of `SLOTS` slots, each holding up to `MAX_BEATS` = 8 words (the longest
OCP 1.0 burst).

1. **Allocate.** Each new downstream transaction takes the next slot. The slot index is the tag (OCP 2.2) or the `ARID` (AXI4) that the bridge puts on it. The slot records whether it is a read and how many responses it expects. When every slot is in use, `alloc_ready` is low and the bridge stalls the OCP 1.0 master. This is the outstanding limit.
2. **Collect.** A downstream response beat is written into the slot named by its tag, at that slot's next beat position, whatever order the slots complete in. This input never stalls, so the downstream handshake (`MRespAccept`, `RREADY`) can always be granted.
3. **Drain.** The oldest slot is drained in order:
   * a read slot sends each beat as soon as it is present, one per cycle;
   * a write slot sends nothing and is freed once its responses are in.

A beat written in cycle *t* can leave in cycle *t*+1 at the earliest.

## OCP 1.0 to OCP 2.2 (`ocp1_ocp2_bridge`)

`ocp1_mrmd_to_srmd` turns the per-beat requests of an OCP 1.0 burst into one OCP
2.2 request:

* `MBurst` on the first request gives the length: TWO, FOUR, EIGHT, or any other code for a single beat.
* `MBurstSeq` is always INCR.
* The allocated slot is the tag, sent on both `MTagID` and `MDataTagID`.
* For a write, each beat becomes an OCP 2.2 data phase (`MDataValid`, `MDataLast`).
* The first data phase starts the cycle after the request is accepted, so data never runs ahead of its request.

How each OCP 1.0 request is accepted:

* The first request is accepted when the OCP 2.2 request (and, for a write, its first data beat) has been taken.
* Each later write request is accepted with its data beat.
* Each later read request is accepted at once, because the single OCP 2.2 request already covers it.

`MRespAccept` is held high: a slot is reserved before its request goes out, so
there is always room for the response. `MAX_OUT` = 4 slots, which gives 2-bit tags.

## OCP 1.0 to AXI4 (`ocp1_axi4_bridge`)

The bridge has 32-bit data and 32-bit addresses. A width upsizer can follow it for a wider AXI bus.

**`ocp1_axi_cmd_split`** holds the command-splitting logic and the write and read channels:
* It decodes the first request of a burst into one AXI INCR burst, or two if the burst crosses a 4 KB page.
* `ARID` is the response slot, so read data can be put back in order.
* `AWID` comes from a rolling counter. Write responses are discarded, so their order does not matter.
* Each write request becomes a W beat; the request is accepted with `WREADY`. `WLAST` marks the end of each AXI half.
* A new burst needs one of two things: a free read slot (`MAX_RD` = 4), or room for two more write commands (`MAX_WR` = 4).

**`ocp1_axi_resp`** takes one AXI response channel per cycle, with writes first:
* `BREADY` is always high.
* `RREADY` is high only when no B response is offered.
* B responses only free write credits.
* R beats go into `ocp_resp_reorder` and leave in request order.

## OCP 1.0 to APB3 (`ocp1_apb3_bridge`)

APB3 has no bursts, no pipelining and no response code. The bridge therefore
turns every OCP 1.0 request into one APB transfer.

**`apb_psel_penable_gen`** runs the APB state machine:
* IDLE, then SETUP for exactly one cycle, then ENABLE, which is held while `PREADY` is low.
* When ENABLE ends, the machine goes straight back to SETUP if another request is waiting, otherwise to IDLE.
* `PSEL` comes from address decoding. The single slave occupies `(MAddr & SLV_MASK) == SLV_BASE`; the default is the 64 KB at address 0.
* A request outside that window makes no APB transfer. It completes at once with an error.

When a request is accepted:
* A read or a non-posted write (WRNP) is accepted in the cycle its ENABLE phase completes.
* A posted write (WR) is accepted when it enters SETUP. This lets the next request already be waiting, so back-to-back transfers are possible.

**`apb_resp_gen`** makes the response the APB slave cannot give. It answers in the completing cycle:
* DVA, with `PRDATA` as `SData`, for a read;
* DVA for a non-posted write;
* ERR for a decode miss;
* nothing for a posted write.

There is never more than one transfer outstanding.

`MBurst` and `MByteEn` are accepted but unused, because APB3 has neither bursts nor strobes. `PSLVERR` is not used.

## Design choices and departures

The original description of the bridges fixes their structure, their signal
mappings and their features. It leaves the following open; the choices here are
this design's own:

* **Sizes:** outstanding limits (8, 4, 4+4), tag and ID widths, and the APB slave window.
* **Same-tag rule:** one outstanding command per tag in the OCP 2.2 to AXI4 bridge.
* **Response-code mapping** between AXI and OCP, including the error code for an APB decode miss.
* **Posted writes on APB:** accepted early (at SETUP) rather than at ENABLE.
* **Signals left unused:**
  * `MDataLast` and `MDataTagID` in the OCP 2.2 to AXI4 bridge (AXI4 has no write-data ID);
  * `MBurst` and `MByteEn` in the APB bridge.
* **Signals not generated:** `AxCACHE`, `AxPROT`, `AxQOS` and the AXI3 `WID`.
* **Limited sequences:** OCP 2.2 burst sequences other than INCR and WRAP are not supported.
* **Clocking:** the APB side runs on `clk` (there is no separate `PCLK`).

Concurrent assertions in the RTL check the rules the bridges must keep:
* an AXI valid stays high, with its payload stable, until ready;
* no issued AXI INCR burst crosses 4 KB;
* only one AXI response channel is taken per cycle;
* APB SETUP lasts one cycle, and the APB signals hold during wait states;
* every response carries an ID or tag that is outstanding;
* an OCP response stays on offer until it is accepted.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each ends
with `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

The bridges are driven by task-based masters and checked against behavioural
slaves. Each slave model has random ready and valid timing, and each checks its
own protocol:

* **`axi4_slave_model`:**
  * returns read data out of order across IDs;
  * raises SLVERR in a chosen address region;
  * flags any burst that crosses 4 KB, and any wrong `WLAST`.
* **`ocp2_slave_model`:**
  * gives tagged, out-of-order responses and holds each until `MRespAccept`;
  * checks `MDataLast`.
* **`apb3_slave_model`:**
  * inserts random `PREADY` wait states;
  * checks the SETUP/ENABLE sequencing and address stability.

Reference memories in the testbenches give the expected read data.

`tb_ocp2_axi4_bridge_w512` repeats the OCP 2.2 to AXI4 test at the widest word, 512 bits (64-byte beats).

`tb_bridges_top` runs all four bridges at once, at the top's default parameters.
It counts each of the following mechanisms and fails if any never happened:

* 4 KB splits in b1 and b3;
* the outstanding limit in b1, b2 and b3;
* out-of-order downstream responses in b1, b2 and b3;
* B and R offered together in b1;
* APB wait states, back-to-back APB transfers, and decode misses in b4.

To run a testbench with Verilator 5 (shown for the top; any `tb_*` works the same way):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_bridges_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/bridge_pkg.sv tb/tb_bridges_top.sv
./obj_dir/Vtb_bridges_top +verilator+seed+1
```

Each testbench finishes in seconds.
