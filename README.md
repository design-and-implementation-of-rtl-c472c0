# Synchronous AHB to APB bridge

A system-on-chip usually has two bus levels. AHB is the fast bus that
processors, DMA and memories sit on. APB is a slow, simple bus for
peripherals such as UARTs, timers and GPIO. This design joins the two. It is
an AHB slave on one side and the only APB master on the other. It turns each
AHB transfer into an APB transfer, waits for the peripheral, and passes the
response and read data back to AHB.

The bridge is *synchronous*. The APB clock comes from the same source as
HCLK and is phase aligned with it, so no clock-domain crossing is needed.
Everything runs on HCLK. The slower APB rate is represented by a clock enable,
`PCLKEN`, which is high in each HCLK cycle that ends on a rising PCLK edge.
The bridge changes its APB outputs only on such edges, and samples `PREADY`,
`PSLVERR` and `PRDATA` only on them. As a result, one bridge can serve an APB
bus that runs at any integer fraction of HCLK.

Two parameters give four operating modes: direct or buffered read, and direct
or buffered write. Buffering adds a register stage on that path. It costs one
or more cycles of latency, but it removes a combinational path between the two
buses.

## Blocks

| Module | Role |
|---|---|
| `ahb2apb_bridge` | The bridge: AHB slave port, seven-state controller, shared read/write data register, APB master port |
| `pclken_gen` | Divides HCLK by `PCLK_DIV`. Produces `PCLKEN`, and `PCLK` through a latch-based clock gate |
| `apb_slave_mux` | Splits the APB bus into `NUM_SLAVES` address windows, one `PSELx` line each, and multiplexes the return signals |
| `apb_sram` | An APB slave SRAM with registered memory input and output, and a PREADY that comes two APB clocks late |
| `ahb2apb_system` | Top level: the four blocks above, with the SRAM in window 0 and the other windows brought out as APB ports |
| `ahb_apb_pkg` | Package: HTRANS and HRESP encodings, and the state enum |

## How a transfer moves through the bridge

The bridge accepts an AHB transfer when `HSEL`, `HTRANS[1]` (NONSEQ or SEQ)
and `HREADY` are all high. This condition is called `apb_select`. On the
accepting edge it registers `HADDR` into `PADDR` and `HWRITE` into `PWRITE`,
and it drops `HREADYOUT`. The AHB master then stays in the data phase, holding
`HWDATA`, until `HREADYOUT` returns.

The controller has seven states:

| Code | State | APB | AHB | Leaves when |
|---|---|---|---|---|
| 0 | `ST_IDLE` | idle | `HREADYOUT=1` | `apb_select`: to TRNF if `PCLKEN` is high and the transfer is a read or an unbuffered write, else to WAIT |
| 1 | `ST_APB_WAIT` | idle | `HREADYOUT=0` | `PCLKEN` → TRNF. A buffered write copies `HWDATA` into the data register here |
| 2 | `ST_APB_TRNF` | setup: `PSEL=1 PENABLE=0` | `HREADYOUT=0` | `PCLKEN` → TRNF2 |
| 3 | `ST_APB_TRNF2` | access: `PSEL=1 PENABLE=1` | `HREADYOUT=0` (see below) | `PCLKEN & PREADY`: to ERR1 if `PSLVERR`. Otherwise to ENDOK (buffered read), or to the next transfer as from IDLE (direct read) |
| 4 | `ST_APB_ENDOK` | idle | `HREADYOUT=1`, buffered data on `HRDATA` | next cycle, deciding as IDLE does |
| 5 | `ST_APB_ERR1` | idle | `HREADYOUT=0 HRESP=1` | always → ERR2 |
| 6 | `ST_APB_ERR2` | idle | `HREADYOUT=1 HRESP=1` | next cycle, deciding as IDLE does |

Some points are easy to misread:

- **WAIT is used for two reasons.** A buffered write always passes through
  it, because the write data first has to be captured. A read or a direct
  write also passes through it when the transfer arrives in a cycle where
  `PCLKEN` is low: the APB setup phase may only start on an APB clock edge.
- **ENDOK and ERR2 can accept a new transfer.** In both states `HREADYOUT` is
  high, so the master may already present its next address phase. The bridge
  treats that exactly as it would in IDLE. Transfers can therefore follow
  each other without passing through IDLE.
- **ENDOK is entered after writes as well** whenever `REGISTER_RDATA=1`. A
  successful transfer then always ends with one ready cycle.
- **In direct-read mode** (`REGISTER_RDATA=0`), `HREADYOUT` is driven
  combinationally from `PCLKEN & PREADY & ~PSLVERR` in TRNF2, and `HRDATA` is
  `PRDATA`. The transfer ends in the same cycle that the APB slave finishes,
  but the APB slave's ready and data now reach the AHB master in the same
  cycle, through combinational logic.
- **Errors** use the standard two-cycle AHB ERROR response.

### The read/write data register

A single 32-bit register, `rwdata_reg`, serves both directions:

- **Buffered write** (`REGISTER_WDATA=1`): it is loaded from `HWDATA` in WAIT,
  and `PWDATA` is taken from it.
- **Buffered read** (`REGISTER_RDATA=1`): it is loaded from `PRDATA` on the
  edge that ends the access phase, and `HRDATA` is taken from it.

In the direct modes, `PWDATA` is `HWDATA` and `HRDATA` is `PRDATA`. A direct
write relies on the AHB rule that the master holds `HWDATA` while
`HREADYOUT` is low.

### Latency

The defaults are: both directions buffered, PCLK = HCLK/2, and the APB SRAM
below, whose access phase lasts three APB clocks. With these, `HREADYOUT`
stays low in the data phase for:

| Transfer | `PCLKEN` high on the accepting edge | `PCLKEN` low |
|---|---|---|
| read | 8 HCLK | 9 HCLK |
| write | 10 HCLK | 9 HCLK |

Reads with `PCLKEN` high on the accepting edge go IDLE → TRNF → TRNF2 → ENDOK.
Every other case also passes through WAIT. The end-to-end testbench checks
these counts on every SRAM transfer.

### Protocol assertions

The bridge contains concurrent assertions for these rules:

- A transfer is offered only while the bridge is ready.
- `PENABLE` is high only together with `PSEL`.
- `PSEL` and `PENABLE` change only on APB clock edges.
- The setup phase lasts exactly one APB clock.
- `PADDR`, `PWRITE` and `PWDATA` hold through a waited access phase.

## The APB SRAM

`apb_sram` is a fast APB peripheral whose memory is fully synchronous:

- The byte address loses its two low bits (`sram_addr = PADDR[MEM_AW+1:2]`),
  so byte address 0x4 is memory word 1.
- On the first APB clock of the access phase, the memory either writes
  (`sram_we` pulses) or loads its output register `sram_dout`.
- On the second clock, the slave copies `sram_dout` into `PRDATA` and raises
  `PREADY`.
- On the third clock, the bridge sees `PREADY`, and the slave lowers it.

So `PREADY` arrives two APB clocks later than from a zero-wait-state slave.
This is the case the buffered bridge is meant for. The SRAM is clocked by
HCLK and advances only when `PCLKEN` is high. `PSLVERR` is always 0. The
default depth is 1024 words (4 KiB).

## Address map and clocking of the top level

`apb_slave_mux` gives each slave a window of `2**SLAVE_AW` bytes (4 KiB by
default):

- Window 0 (0x0000–0x0FFF) is the SRAM.
- Window 1 (0x1000–0x1FFF) drives the `PSEL_EXT[0]` port.
- Any address above the last window selects no slave. The decoder answers it
  at once with `PREADY=1, PSLVERR=1`, so the AHB master gets an ERROR response
  instead of a hang.

A peripheral on an external window sees the shared `PADDR`, `PENABLE`,
`PWRITE` and `PWDATA` plus its own `PSEL_EXT` bit. It drives `PRDATA_EXT`,
`PREADY_EXT` and `PSLVERR_EXT`. It must work on HCLK edges where `PCLKEN` is
high, or equivalently on `PCLK`.

`PCLK` comes from a latch-based clock gate: `PCLKEN` is latched while HCLK is
low and ANDed with HCLK. PCLK therefore pulses high during the first half of
each HCLK cycle that follows a `PCLKEN` cycle, so its duty cycle is
1/(2·`PCLK_DIV`). That latch is the only latch in the design, and it is
intended.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `ADDRWIDTH` | 32 | all | width of `HADDR`/`PADDR` |
| `REGISTER_RDATA` | 1 | bridge, top | buffered read |
| `REGISTER_WDATA` | 1 | bridge, top | buffered write |
| `PCLK_DIV` | 2 | pclken_gen, top | HCLK cycles per APB clock |
| `NUM_SLAVES` | 2 | mux, top | APB select lines (the top needs ≥ 2) |
| `SLAVE_AW` | 12 | mux, top | log2 of the window size in bytes |
| `SRAM_AW` / `MEM_AW` | 10 | top / apb_sram | log2 of the SRAM depth in words |

The defaults of `ADDRWIDTH` and the two buffering switches, and the
behaviour they select, come from the original design description. The
other defaults are this implementation's choices.

## What is taken from the original design and what was chosen here

Taken from the original description:

- the seven state names;
- the transitions out of IDLE, WAIT, TRNF and TRNF2 on an OKAY completion;
- the state numbers 0–4;
- the shared read/write register and the two buffering switches;
- the use of `PCLKEN` for the APB clock;
- the SRAM peripheral's behaviour: registered input and output, PREADY two
  clocks late, word alignment.

Chosen here, where the description is silent or incomplete:

- the full behaviour of ENDOK, ERR1 and ERR2. This uses the standard two-cycle
  ERROR response, and ENDOK/ERR2 accepting the next transfer. It is consistent
  with the state sequences 3 → 4 → 1 seen in the reference waveforms;
- the codes 5 and 6 for the error states;
- the acceptance equation `HSEL & HTRANS[1] & HREADY`;
- asynchronous active-low reset clearing all registers;
- the `PCLKEN` counter and the PCLK clock gate;
- the decoder's address map and error answer;
- the SRAM depth;
- the external APB port on the top level.

How it differs from a textbook APB bridge:

- `HSIZE`, `HBURST`, `HPROT` and `HMASTLOCK` are accepted but not used. There
  is no `PPROT` or `PSTRB`: this is an APB3 bridge (with `PREADY` and
  `PSLVERR`).
- The bridge has no `PCLK`/`PRESETn` inputs of its own, because it runs
  entirely on HCLK.

The reader should also know:

- The state machine's "deadlock-avoidance" transitions are not known in
  detail. The only extra recovery is that an unused state code returns to
  IDLE.
- The peripherals that would normally sit on APB (UART, SPI, I2C, timers,
  GPIO) are not part of this design.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_ahb2apb_bridge`: runs the bridge in all four modes side by side
  (`tb_bridge_env` holds one mode). It uses:
  - a random pipelined AHB master that issues IDLE/BUSY cycles, HSEL toggling
    and back-to-back transfers;
  - a random `PCLKEN`;
  - an APB slave model with 0–3 wait states and an error region.

  Every AHB response and read word is checked against a reference memory, and
  every APB transfer against the queue of accepted AHB transfers. It also
  checks that WAIT, ENDOK (only in buffered-read modes), ERROR, back-to-back
  acceptance and APB wait states all occur.
- `tb_pclken_gen`: checks the PCLKEN pattern and the PCLK pulses for dividers
  1, 2 and 3.
- `tb_apb_slave_mux`: compares random addresses and return signals against an
  address-map model.
- `tb_apb_sram`: checks write/read-back with unaligned byte addresses, and
  that the access phase lasts exactly three APB clocks.
- `tb_ahb2apb_system` and `tb_ahb2apb_system_modes`: end-to-end tests of
  the whole subsystem. Both run the environment `tb_system_env`. The first
  has every parameter at its default. The second runs the three other
  buffering modes.
  - Each run first replays the reference transfers: writes of 0x979f587d,
    0xd7c42906, 0x7f734d5d, 0x39e0b94e and 0xfe8f3181 to 0x4–0x14, and of
    0xcdbf3a9b, 0x0498fb09 and 0x6bf823d7 to 0xffc, 0xfc0 and 0xfc4. It then
    reads all eight back.
  - It then runs 400 random transfers across the SRAM, the external window
    (served by a register-file model) and unmapped space.
  - It checks data, responses and the exact wait-cycle count of every SRAM
    transfer, and counts each mechanism. For any mode, the count is 8 cycles
    for a transfer whose setup phase starts on the accepting edge. Add 1 if
    it waits one cycle in WAIT, add 2 for a buffered write accepted with
    `PCLKEN` high, and subtract 1 without read buffering.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ahb_apb_pkg.sv tb/tb_ahb2apb_system.sv --top-module tb_ahb2apb_system
./obj_dir/Vtb_ahb2apb_system
```

Replace the testbench name to run another one. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ahb_apb_pkg.sv rtl/<module>.sv`.
The unused-signal warnings that remain are expected: the unused AHB inputs,
and the address bits that the decoder and the SRAM do not need.
