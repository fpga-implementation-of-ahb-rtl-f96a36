# AHB to APB bridge with six address-selected peripherals

In an AMBA system-on-chip the processor, DMA engine and memories share the
high-performance AHB bus, while slow peripherals (UART, timer, keypad,
PIO, display) sit on the simpler, low-power APB bus. The bridge joins the
two: to the AHB it is one slave; to the APB it is the only master. Each AHB
read or write that selects the bridge is carried out as one APB transfer on
one of six peripherals, picked by the address.

```
  AHB masters ──AHB──┐                         ┌── psel_o[0] ─ slave 0
  (CPU, DMA)         │   ┌──────────────┐      ├── psel_o[1] ─ slave 1
                     └──►│ ahb2apb_ctrl │─psel─┤ apb_decoder ...
      hsel_apb_i ───────►│  (FSM, regs) │      └── psel_o[5] ─ slave 5
      hready_i  ────────►│              │── paddr/pwrite/penable/pwdata ──► all slaves
      hrdata_o  ◄────────│              │◄── prdata (mux of prdata_i[0..5])
                         └──────────────┘
```

The bridge converts the AHB data phase into the APB SETUP and ENABLE
phases, which is the hard part, and selects the slave by address.

## Files

| file | content |
|------|---------|
| `rtl/amba_pkg.sv` | HTRANS and HRESP encodings, controller state type |
| `rtl/ahb2apb_ctrl.sv` | bridge controller: AHB slave side, APB master side |
| `rtl/apb_decoder.sv` | address slot to slave select, read-data multiplexer |
| `rtl/ahb2apb.sv` | top: controller plus decoder |
| `tb/tb_ahb2apb_ctrl.sv` | directed test of the controller |
| `tb/tb_apb_decoder.sv` | sweep test of the decoder |
| `tb/tb_ahb2apb.sv` | end-to-end random test of the top at its default size |
| `tb/tb_ahb2apb_stream.sv` | back-to-back write and read streams, throughput |
| `tb/apb_slave_model.sv` | register-file APB slave with protocol checks (testbench only) |

## How a transfer moves through the bridge

AHB is pipelined. A master puts the address and control of a transfer on
the bus in one cycle (the address phase). The data moves in the following
cycle or cycles (the data phase). A slave stretches its data phase by
driving HREADY low. APB is not pipelined: the master raises PSEL with a
stable address and write data (SETUP), then raises PENABLE for exactly one
cycle (ENABLE), and the transfer completes at the end of ENABLE.

The controller has four states (`bridge_state_e` in `amba_pkg`):

| state | PSEL | PENABLE | hready_o | what happens |
|-------|------|---------|----------|--------------|
| `ST_IDLE`   | 0 | 0 | 1 | waits for an address phase |
| `ST_WWAIT`  | 0 | 0 | 0 | write only: HWDATA arrives and is registered |
| `ST_SETUP`  | 1 | 0 | 0 | APB SETUP |
| `ST_ENABLE` | 1 | 1 | 1 | APB ENABLE; the AHB data phase completes |

An address phase is **accepted** when `hsel_apb_i`, `hready_i` and
`htrans_i` = NONSEQ or SEQ all hold, in `ST_IDLE` or `ST_ENABLE`. HADDR and
HWRITE are then registered and drive `paddr_o` and `pwrite_o` until the next
accepted transfer, so the APB address stays put between transfers.

```
read  (A = address phase)        write
cycle   0      1      2          0      1      2      3
AHB     A      data   data       A      data   data   data
state   IDLE   SETUP  ENABLE     IDLE   WWAIT  SETUP  ENABLE
hready  1      0      1          1      0      0      1
```

So a read occupies 2 data-phase cycles (one wait state), and a write 3 (two
wait states). A write needs the extra cycle because AHB delivers write data
one cycle after its address, while APB needs PWDATA valid from its SETUP
cycle on. Because `hready_o` is high in `ST_ENABLE`, the next address phase
is accepted in that same cycle and the next APB SETUP follows at once:
back-to-back reads run at one transfer per 2 cycles, writes at one per 3.

**Read data** is not registered. In `ST_ENABLE` of a read, `hrdata_o` is
the selected slave's `prdata_i`, passed straight through the decoder's mux.
That puts a combinational path from the slave to the AHB master, but it saves
a cycle per read. At any other time `hrdata_o` is zero.

**Other AHB cases.** `hready_i` is the bus-wide HREADY. While another slave
stretches its data phase, `hready_i` is low and a bridge address phase
already on the bus is not taken until it rises. IDLE and BUSY transfers, even with
`hsel_apb_i` high, start nothing and get a zero-wait OKAY. Burst beats
(SEQ) are handled one at a time like single transfers. `hresp_o` is always
OKAY: AMBA 2.0 APB slaves cannot report errors or wait states, so the
bridge has none to pass on.

## Address map

| paddr[14:12] | slave |
|--------------|-------|
| 0 .. 5 | `psel_o[0]` .. `psel_o[5]` |
| 6, 7   | none: writes are dropped, reads return 0 |

Each slave has a 4 KiB window (`SLOT_LSB` = 12). Bits above bit 14 are left
to the system's AHB decoder, which drives `hsel_apb_i`. Bits below bit 12
go to the slave on `paddr_o`.

## Parameters (top `ahb2apb`)

| name | default | meaning |
|------|---------|---------|
| `ADDR_WIDTH` | 32 | AHB and APB address width |
| `DATA_WIDTH` | 32 | AHB and APB data width |
| `NUM_SLAVES` | 6 | number of APB slaves; slot field is `$clog2(NUM_SLAVES)` bits |
| `SLOT_LSB`   | 12 | lowest address bit of the slot field |

## Ports (top `ahb2apb`)

AHB side: `hclk`, `hresetn` (asynchronous, active low), `hsel_apb_i`,
`haddr_i`, `hwrite_i`, `htrans_i[1:0]`, `hready_i`, `hwdata_i`,
`hrdata_o`, `hready_o` (this slave's HREADYOUT; feed it into the bus
HREADY mux), `hresp_o[1:0]`.

APB side: `paddr_o`, `pwrite_o`, `penable_o`, `pwdata_o` shared by all
slaves; `psel_o[NUM_SLAVES-1:0]` one per slave;
`prdata_i[NUM_SLAVES-1:0][DATA_WIDTH-1:0]` one read bus per slave. APB
runs on `hclk`: PCLK = HCLK.

## What follows the source design and what does not

The design follows the source in these points:
- an AHB side and an APB side joined by a controller;
- six APB slaves, each enabled by its address;
- 32-bit data buses;
- signal names in the `_i`/`_o` style;
- the bridge's place between the AHB masters and memories and the APB
  peripherals.

The source gives no timing diagram with readable edges, no state machine,
no address map and no internal structure. Everything at cycle level is
therefore this design's own choice:
- the four states;
- the 2-cycle read and 3-cycle write data phases;
- back-to-back acceptance in ENABLE;
- the unregistered read path;
- the 4 KiB slots and zero read data from empty slots;
- one clock for both buses;
- asynchronous reset.

For comparison, the original was reported on a Spartan-3 (XC3S400) with
154 flip-flops, 117 LUTs and a 199 MHz maximum clock. This RTL synthesizes
to 69 flip-flop bits, mostly the 32-bit address and write-data registers.
The original evidently registers more, but what is not known.

The six peripherals themselves are not part of this RTL; their buses are
ports. Neither are the AHB arbiter or decoder, the CPU, DMA or memories.

## Checks built in

`ahb2apb_ctrl` asserts the APB rules:
- SETUP is followed by ENABLE with PADDR, PWRITE and PWDATA unchanged;
- PENABLE never comes without PSEL;
- ENABLE lasts one cycle.

`ahb2apb` asserts that at most one slave select is high, and that one is
high whenever the address falls in a populated slot.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/amba_pkg.sv tb/tb_ahb2apb.sv --top-module tb_ahb2apb -o sim
./obj_dir/sim
```

Replace `tb_ahb2apb` with `tb_ahb2apb_ctrl` or `tb_apb_decoder` to run the
block tests.

- `tb_apb_decoder` sweeps all eight slots, with PSEL both low and high, 50
  times with random other address bits and read data.
- `tb_ahb2apb_ctrl` runs 16 writes, 16 reads and 100 random single
  transfers, then a write followed by a read back to back, then cases with
  HREADY low, IDLE, BUSY and HSEL low. It checks data, the exact
  data-phase lengths (2 and 3 cycles) and the APB phase sequence.
- `tb_ahb2apb` runs the top at its default parameters. A pipelined random
  AHB master runs about 4000 cycles of mixed traffic: single transfers,
  4-beat bursts with BUSY cycles, IDLE cycles, and transfers to another
  AHB slave that inserts 0-2 wait states. Then every word of all eight
  slots is read back.
  - Every read is compared with a reference model, and every APB transfer
    with the AHB transfer it came from.
  - The six slave models check the APB rules.
  - At the end it reports how often each case happened: writes, reads,
    back-to-back transfers, address phases held by HREADY low, other-slave
    transfers, IDLE and BUSY cycles, SEQ beats, empty-slot accesses, each
    slave selected. A case that never happened counts as a failure.

- `tb_ahb2apb_stream` keeps HSEL and NONSEQ on the bus every cycle, with
  the bridge's `hready_i` tied high, as when the bridge is the only AHB
  slave. The controller accepts only in `ST_IDLE` and `ST_ENABLE`, so this
  is safe. It streams 60 writes, which must take exactly 180 data-phase
  cycles, then reads them back in exactly 120. It checks the data in every
  slave and that `hready_o` is high for exactly one cycle per transfer.

## Changing it

- More slaves: raise `NUM_SLAVES`. The slot field widens to
  `$clog2(NUM_SLAVES)` bits from `SLOT_LSB`.
- A registered read path: latch `prdata` in `ST_ENABLE` and complete the
  AHB transfer one cycle later. Reads then take 3 cycles.
- APB3 PREADY/PSLVERR: hold `ST_ENABLE` while PREADY is low, and map
  PSLVERR to a two-cycle AHB ERROR response. Neither is implemented here.
