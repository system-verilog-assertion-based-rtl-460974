# AHB-Lite interconnect: one master, three slaves

AHB-Lite is the single-master subset of the AMBA AHB bus. There is one source of
address, control and write data, so there is no arbiter, no request phase and no
master-to-slave multiplexer. The only slave responses are OKAY and ERROR (no
SPLIT or RETRY). This repository holds a small, complete AHB-Lite system in
SystemVerilog. It has four parts:

* a **master** that turns burst commands into bus transfers, with both
  incrementing and wrapping address sequences;
* a central **address decoder** that selects one of three slaves;
* three **memory slaves**;
* a **slave-to-master multiplexer** that returns the selected slave's read
  data and response.

```
              HADDR, HWRITE, HSIZE, HBURST, HTRANS, HWDATA  (to every slave)
  +--------+ ----------------------------------------------+------+------+------+
  | master |            +---------+  HSEL0..2, HSELDEF      |      |      |      |
  |        | --HADDR--> | decoder | ---------------------> slave0 slave1 slave2 default
  |        |            +---------+ --mux_sel--+            |      |      |      |
  |        |                                   v            |      |      |      |
  |        | <--HRDATA, HREADY, HRESP--  +-------------+ <--+------+------+------+
  +--------+                             | multiplexer |   HRDATA, HREADYOUT, HRESP
                                         +-------------+
          HREADY (the routed HREADYOUT) also goes back to every slave
```

It is a straightforward AMBA 3 AHB-Lite implementation. The three-slave
structure, the address map, the 32-bit widths and the wrapping-burst example
come from a published description of this system. That description gives what
each block does but not how it is built. Everything inside the blocks is this
design's own, and is listed under "Design choices" below.

## The bus pipeline

Each transfer has an **address phase** and a **data phase** one cycle later.
The address phase of beat *n+1* overlaps the data phase of beat *n*. A slave
can stretch its data phase by holding HREADYOUT low. The multiplexer routes
that value to everyone as HREADY. While HREADY is low, nothing on the bus moves:

* the master holds address, control and HWDATA;
* the decoder's select stays registered in the multiplexer;
* the slaves hold their sampled address phase.

A clock edge with HREADY high ends the current data phase and accepts the
current address phase in one step.

HTRANS encodes IDLE (00), BUSY (01), NONSEQ (10) and SEQ (11). HBURST uses the
AMBA encodings: SINGLE 000, INCR 001, WRAP4 010, INCR4 011, WRAP8 100, INCR8 101,
WRAP16 110, INCR16 111. HSIZE is log2 of the bytes per beat (byte, halfword,
word on this 32-bit bus). The types are in `rtl/ahb_lite_pkg.sv`.

With zero wait states a 4-beat burst takes 4 consecutive address-phase cycles.
Its last response arrives one cycle after its last address phase. The next
burst's NONSEQ can follow the last SEQ directly.

## Burst addresses: incrementing and wrapping

This is the part most easily got wrong. `ahb_lite_pkg::next_beat_addr` computes
the address of each beat after the first.

* **Incrementing** bursts (INCR, INCR4/8/16) add the beat size, 2^HSIZE bytes.
* **Wrapping** bursts (WRAP4/8/16) stay inside an aligned block of
  `beats × bytes-per-beat` bytes. The bits above the block size are kept, and
  only the offset inside the block counts up modulo the block size:

  `next = (addr & ~(B-1)) | ((addr + 2^HSIZE) & (B-1))`, where `B = beats << HSIZE`.

Two examples:

* A WRAP4 burst of words from 0x34 has a 16-byte block and visits
  0x34, 0x38, 0x3C, 0x30.
* A WRAP8 burst of words from 0x34 has a 32-byte block and visits
  0x34, 0x38, 0x3C, 0x20, 0x24, 0x28, 0x2C, 0x30.

The 4-beat case is the reference example of the original system.

An undefined-length INCR burst takes its length from the command, from 1 to 255
beats. AHB's rule that a burst must not cross a 1 KB boundary is not enforced.
Avoiding it is the user's job.

## Master (`ahb_lite_master`)

The user side is a command port. Every response is reported; there is no
backpressure on responses.

| signal | meaning |
|---|---|
| `cmd_valid` / `cmd_ready` | accept one burst: `cmd_addr`, `cmd_write`, `cmd_size`, `cmd_burst`, `cmd_len` (INCR only) |
| `pause` | while high during a burst, insert BUSY cycles (they carry the next beat's address) |
| `wr_data` / `wr_pop` | write data for the beat now in the address phase; taken on the edge where `wr_pop` is high, and driven on HWDATA in the following data phase |
| `rsp_valid`, `rsp_write`, `rsp_error`, `rsp_rdata` | one per completed data phase; `rsp_rdata` is the whole 32-bit word, and the caller picks byte lanes |

`cmd_ready` is high when the bus is ready and either no burst is active or the
last beat of the current one is in its address phase. This lets bursts run back
to back.

**ERROR handling.** A slave signals ERROR in two cycles: HRESP high with HREADY
low, then HRESP high with HREADY high. In the first cycle the master drops the
rest of the failing burst, so HTRANS goes to IDLE. The dropped beats produce no
response. If the next burst's NONSEQ is already in the address phase, it is not
dropped. The user can tell a burst was cut short because it returns fewer
responses than it has beats.

## Address decoder (`ahb_lite_decoder`)

The decoder is combinational. The ranges are inclusive byte addresses, as in
the original system. They are not word-aligned: the word at 0x40 belongs to
slave 0, but the bytes 0x41–0x43 belong to slave 1.

| responder | addresses |
|---|---|
| slave 0 | 0x00 – 0x40 |
| slave 1 | 0x41 – 0x60 |
| slave 2 | 0x61 – 0x99 |
| default slave | everything else |

The decoder drives one-hot `HSEL[2:0]`, `HSELDEF` for unmapped addresses, and
`mux_sel`, the responder index. The ranges are parameters (`ADDR_LO`,
`ADDR_HI`, `NUM_SLAVES`). An immediate assertion checks that exactly one
responder is selected.

## Slaves (`ahb_lite_slave`, `ahb_lite_default_slave`)

A slave samples address and control when it is selected (`HSEL`), the bus is
ready (`HREADY`) and the transfer is NONSEQ or SEQ. IDLE and BUSY transfers get
an immediate OKAY.

* **Writes** store HWDATA into the byte lanes selected by HSIZE and HADDR[1:0].
* **Reads** return the whole word.

The memory has `MEM_WORDS` (default 64) 32-bit registers, indexed by
HADDR[7:2], and is cleared by reset. `WAIT_STATES` (default 0) holds HREADYOUT
low for that many extra cycles on every transfer.

A slave answers ERROR, using the two-cycle response, in two cases:

* the address is not aligned to the size;
* HSIZE is wider than the bus.

The default slave answers ERROR to every NONSEQ or SEQ transfer it receives,
so every address gets a response.

## Multiplexer (`ahb_lite_mux`)

On every clock edge where HREADY is high, the multiplexer registers the
decoder's `mux_sel`. During the data phase it then routes HRDATA, HREADYOUT and
HRESP from the slave that was addressed one transfer earlier. Meanwhile the
decoder is already decoding the next address. After reset the default slave is
selected. It is idle, so HREADY is high.

## Top (`ahb_lite_top`)

`ahb_lite_top` wires the master, decoder, three slaves, default slave and
multiplexer as in the diagram above. Its user ports are the master's command
port. The bus signals HADDR, HTRANS, HWRITE, HREADY, HRESP, HSEL and HSELDEF
are also brought out so the bus can be observed. The parameters are
`MEM_WORDS` and `WAIT_S0`..`WAIT_S2` (wait states per slave, default 0).

## Assertions

The original system has four concurrent SVA properties, but their contents are
not published. This design carries its own. They run in simulation with
`--assert`.

* **master:** address and control are held during a wait state; SEQ never
  follows IDLE; HWDATA is held while its data phase waits.
* **slave:** ERROR is always two cycles; a slave with no data phase is ready
  with OKAY; SEQ is never seen with HBURST = SINGLE.
* **multiplexer:** the data-phase select holds while HREADY is low.
* **decoder:** exactly one responder is selected.

## Design choices

These points come from this design, not from the original description:

* **Master command port.** The command/response port, the `pause` input for
  BUSY, and cancelling a burst on ERROR. In the original system the testbench
  drives the master's signals directly.
* **Slave memory.** The register memory behind each slave, its 64-word size,
  and clearing it on reset.
* **Slave responses.** The wait-state parameter, and ERROR for misaligned
  transfers. The original only says that ERROR is the one non-OKAY response.
* **HREADY input on slaves.** The original slave interface lists no HREADY
  input, but a slave on a shared bus needs it.
* **Default slave.** A default slave for addresses outside the map.
* **Reset.** Reset is active-low and asynchronous (HRESETn).
* **Slave numbering.** Slaves are numbered 0–2. The original uses both S0–S2
  and Slave1–Slave3.

Not provided: HPROT, HMASTLOCK, and the 1 KB burst-boundary check. Data buses
wider than 32 bits are also not provided; AHB-Lite allows them, but this system
uses 32 bits.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| testbench | what it does |
|---|---|
| `tb/ahb_lite_master_tb.sv` | master against a behavioural slave with random wait states and an error region; checks every beat's address, HTRANS, HWRITE, HWDATA, read data, BUSY addresses, burst cancel on ERROR, and the 4-beat timing |
| `tb/ahb_lite_slave_tb.sv` | slave with 2 wait states under random pipelined traffic; checks byte-lane writes, reads, read-after-write, IDLE/deselect, ERROR on misalignment, and data-phase length |
| `tb/ahb_lite_decoder_tb.sv` | every address 0x000–0x1FF plus random ones against the map, including the range edges |
| `tb/ahb_lite_mux_tb.sv` | random responder values and selects; checks the registered routing and the hold while HREADY is low |
| `tb/ahb_lite_top_tb.sv` | end to end, with slaves at 0/1/2 wait states and 600 random bursts against a reference model; requires each slave, the default slave, BUSY, wait states, both ERROR causes, wrap-around and read-after-write to occur |
| `tb/ahb_lite_top_full_tb.sv` | top at default parameters: the WRAP4 word burst of 0xAA from 0x34, its read-back, a WRAP8 burst, and 0xAA written to and read from 0x54 (slave 1) and 0x94 (slave 2); checks slave selection and ERROR at 0xA0 |

To run one with Verilator (version 5):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module ahb_lite_top_tb rtl/ahb_lite_pkg.sv tb/ahb_lite_top_tb.sv
./obj_dir/Vahb_lite_top_tb
```

Replace the testbench name to run another. Every testbench finishes in well
under a second.
