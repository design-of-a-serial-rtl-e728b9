# Configurable SPI master with bus blocking for an SPI-to-I2C bridge

This is the FPGA-side slow-control path of a sampling board: a full-duplex
SPI master that a host drives over the on-chip bus, plus a small bus register
block that can hold the bus until an external chip signals that it is done.

The SPI master is built for boards that carry several different SPI slaves.
Each slave gets its own SPI mode (any of the four CPOL/CPHA combinations), and
all slaves share one serial clock whose frequency is the bus clock divided by
an even factor. The gap between chip select and the first clock edge and the
gap after the last bit are set in SCLK periods. These gaps matter for the
board's SPI-to-I2C bridge (an NXP SC18IS600). It only speaks mode 3 and needs
set-up and hold time around its chip select.

The bridge causes a second problem. The host writes an I2C request into the
bridge, and the bridge needs milliseconds to carry it out on the I2C side. If
the host reads the bridge's buffer before that, it gets stale data. The
`ocp_io` block solves this on the bus. A dummy write to one address is held
without an accept, which stalls all bus traffic. The hold ends when the
bridge's interrupt line goes low, or when a time-out runs out.

## Block structure

```
 bus adapter (outside)                        ananas_spi_top
 ───────────────────────┐   ┌──────────────────────────────────────────────────┐
 output stream  ocpout_* ├──►│ spi_master                                       │
 input stream   ocpin_*  ◄──┤│  clk_div ──re/fe──► spi_ctrl ──strobes──► spi_datapath ├─► sclk, mosi, cs_n[N]
                        │   │                       (FSM)               (shift regs,  ◄── miso
                        │   │                                            SCLK, CS)   │
 OCP slave port  ocp_*   ├──►│ ocp_io  (register in/out, bus hold) ◄── io_in[0] = INT_n
                        │   └──────────────────────────────────────────────────┘
```

| File | Contents |
|---|---|
| `rtl/spi_pkg.sv` | FSM state enum, `spi_dp_ctrl_t` strobe struct, `sel_width()` |
| `rtl/ocp_pkg.sv` | OCP MCmd/SResp encodings, blocking address `12'h111` |
| `rtl/axis_if.sv` | one stream direction (tdata, tuser, tfirst, tlast, tvalid, tnext) with handshake assertions |
| `rtl/spi_if.sv` | SPI pins; turns the internal active-high `cs` into active-low `cs_n` |
| `rtl/clk_div.sv` | clock-enable generator (`re`/`fe` pulses) |
| `rtl/spi_ctrl.sv` | control FSM, state counter, stream handshakes |
| `rtl/spi_datapath.sv` | TX/RX shift registers, SCLK for the four modes, chip-select decoder |
| `rtl/spi_master.sv` | the three blocks above behind `axis_if`/`spi_if` ports |
| `rtl/ocp_io.sv` | bus register block with the blocking write |
| `rtl/ananas_spi_top.sv` | top: both blocks, every port a plain signal |

The control path and the data path are kept strictly apart. `spi_ctrl` decides
*when* things happen. It sends one-cycle strobes (`mode_load`, `cs_set`,
`cs_clr`, `load`, `shift`, `sample`, `rx_store`, `stop`) to `spi_datapath`,
which decides *what* the pins do.

## Clock enables instead of a divided clock

Everything runs on the single bus clock (about 40 MHz on the board). There is
no second clock domain. `clk_div` counts 0 … CLKDIV−1 and emits two one-cycle
pulses per period:

* `re` (the "rising edge") when the count equals `X`. The default is
  CLKDIV/2−1.
* `fe` (the "falling edge") when the count equals CLKDIV−1.

So f_SCLK = f_clk / CLKDIV. With the default `X` the two pulses are CLKDIV/2
cycles apart, which is a 50 % duty cycle. Only even CLKDIV values are
accepted; an odd value stops elaboration with an error. The FSM moves only on
`fe`, and `re` marks the middle of each data bit. In the rest of this text,
"a cycle" of the FSM means one SCLK period.

## A transaction, state by state

A *transaction* is a run of packets to one slave. The first packet is flagged
`tfirst` and the last is flagged `tlast`. Every state except IDLE lasts a
fixed number of SCLK periods, given by a `CNT_*` parameter:

| State | Length | What happens |
|---|---|---|
| IDLE | — | Waits for `ocpout_tvalid` while the input-stream register is free. A `tfirst` packet (or any packet when no chip select is open) goes to MODECFG. Any other packet goes straight to DATA. |
| MODECFG | `CNT_MODECFG` | Latches the slave number and that slave's CPOL/CPHA. SCLK moves to the new idle level *before* any chip select falls. |
| CSASS | `CNT_CSASS` | The slave's chip select goes low. |
| CSWAITPRE | `CNT_CSWAITPRE` | Extra set-up time before the first bit. |
| DATA | `CNT_DATA` (= DW) | One bit per period, MSB first, in both directions at once. |
| CSWAITPOST | `CNT_CSWAITPOST` | Hold time after a `tlast` packet. |
| CSDEASS | `CNT_CSDEASS` | The chip select is high again (minimum deselect time). |

DATA has three ways out when its last bit ends:

* after a `tlast` packet it goes to CSWAITPOST;
* if the next packet is already waiting (and is not `tfirst`) and the output
  register is free, it goes straight into DATA again with no gap;
* otherwise it goes to IDLE. **The chip select stays low** there until the
  transaction continues.

The timing at the pins, in SCLK periods of 1/f_SCLK, is:

* chip select low → first data bit: `CNT_CSASS + CNT_CSWAITPRE`
* each packet: `CNT_DATA`
* end of last bit → chip select high: `CNT_CSWAITPOST`

With the defaults at 40 MHz (CLKDIV = 2) these come to 0.2 µs, 0.4 µs and
0.2 µs. Take CLKDIV = 6 with `CNT_CSWAITPRE = 8` and `CNT_CSWAITPOST = 16`:
they become 1.5 µs and 2.4 µs. In modes 0 and 2 the first SCLK edge comes
half a period after the first bit starts. In modes 1 and 3 the last SCLK edge
comes half a period before the last bit ends. The reason is below.

## SCLK and the four SPI modes

A data bit always lasts one SCLK period. It starts at an `fe` pulse and has
`re` in its middle. For every mode the data path does two things:

* it puts the next MOSI bit out at the **start** of a bit;
* it samples MISO in the **middle** of a bit.

Only the shape of the clock changes between modes. Inside the data path the
raw clock is computed first, and the pin clock is `sclk = raw ^ CPOL`:

| Mode | CPOL | CPHA | raw clock in 1st / 2nd half of a bit | Slave samples on | Active edge |
|---|---|---|---|---|---|
| 0 | 0 | 0 | low / high | leading (rising) edge, mid-bit | positive |
| 1 | 0 | 1 | high / low | trailing (falling) edge, mid-bit | negative |
| 2 | 1 | 0 | low / high | leading (falling) edge, mid-bit | negative |
| 3 | 1 | 1 | high / low | trailing (rising) edge, mid-bit | positive |

With CPHA = 0 the data is set up half a period before the leading edge. With
CPHA = 1 the clock is moved half a period earlier, so data changes on the
leading edge and is sampled on the trailing one. Either way, the master's own
MISO sample falls in the middle of the bit, where the slave's data is stable.

`CPOL` and `CPHA` are packed parameters with one bit per slave. Bit *i*
belongs to slave *i*. The defaults `CPOL = 4'b1100` and `CPHA = 4'b1010` put
slave *i* in mode *i*. The mode is loaded in MODECFG and stays until the next
`tfirst` packet. All slaves share the one SCLK frequency.

## Stream ports and the READ/WRITE bit

Both directions use the same signal names (see `axis_if`). A transfer is a
cycle in which `tvalid` and `tnext` are both high. The source must hold the
packet until then; assertions in `axis_if` check this.

* `tdata`: DW = 8 bits.
* `tuser`: the slave number in the low ⌈log2 CSNUM⌉ bits, plus a command bit
  on top. 1 means WRITE and 0 means READ. With CSNUM = 4, `tuser` is 3 bits
  wide.

**Output stream (host → slave).** The master raises `ocpout_tnext` for one
cycle, together with the last MISO sample of the packet. The source therefore
keeps the word on the bus for its whole transmission. It may present the next
packet half a period later, in time for a gap-free back-to-back transfer.

**Input stream (slave → host).** Only READ packets return their MISO word.
It goes into the output register with `tuser`, `tfirst` and `tlast` copied
from the packet, and `ocpin_tvalid` stays high until the sink takes it. No new
packet starts while this register is full. This is how a slow reader holds
the master back: the FSM waits in IDLE, with the chip select still low in the
middle of a transaction. WRITE packets throw their MISO word away.

## Holding the bus: `ocp_io`

`ocp_io` is a plain register on the bus with two parts:

* reads return the `IW` input bits, zero-extended;
* writes set the `OW` output bits, which reset to `OINIT`. On the board these
  drive AFE/PHY resets.

A write whose low twelve address bits are `12'h111` is the *blocking write*.
It does not touch `out`. Instead `SCmdAccept` is withheld, so the bus master
keeps the command on the bus and no other transaction can pass. The hold ends,
and the accept is given, when either of these happens first:

* `in[0]` is low after a two-flip-flop synchroniser. This is the bridge's
  active-low INT, which it pulls low when an I2C transfer has finished.
* `CNT_BLOCK` cycles have passed. The default 700000 cycles is 17.5 ms at
  40 MHz, longer than a full 96-byte buffer takes at 100 kHz I2C; it needs a
  20-bit counter.

A host that reads the bridge therefore does three things in order. It sends
the request to the bridge through the SPI master, writes a dummy word to
…111h, and then reads the buffer. The read cannot start before the bridge has
data.

The OCP port here is a small subset: MCmd IDLE/WR/RD, MAddr, MData,
SCmdAccept, SResp NULL/DVA and SData. Reads answer one cycle after they are
accepted, and writes are posted. The top's `ocp_sdata[31:1]` and
`ocp_sresp[1]` are constant by construction.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `DW` | 8 | packet width |
| `CSNUM` | 4 | number of slaves (chip selects) |
| `CLKDIV` | 2 | SCLK = clk / CLKDIV; even only |
| `CPOL`, `CPHA` | `4'b1100`, `4'b1010` | per-slave mode bits (slave i → mode i) |
| `CNT_MODECFG`, `CNT_CSASS`, `CNT_CSWAITPRE` | 2, 2, 2 | state lengths before the data (SCLK periods, each ≥ 1) |
| `CNT_DATA` | 8 | bits per packet; must equal `DW` |
| `CNT_CSWAITPOST`, `CNT_CSDEASS` | 4, 2 | state lengths after the data |
| `OCP_AW`, `OCP_DW` | 32, 32 | `ocp_io` bus widths |
| `IW`, `OW`, `OINIT` | 1, 2, 0 | `ocp_io` input/output widths, output reset value |
| `CNT_BLOCK` | 700000 | bus-hold time-out in clock cycles |
| `X` (`clk_div` only) | CLKDIV/2−1 | count at which `re` fires |

The `CNT_*` defaults, `CLKDIV = 2`, `CSNUM = 4` and `CNT_BLOCK` are the
settings the design was brought up and measured with. The other sets measured
were CLKDIV = 6 with `CNT_CSWAITPRE = 8` and `CNT_CSWAITPOST = 16`.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/spi_pkg.sv rtl/ocp_pkg.sv tb/tb_ananas_spi_top.sv --top-module tb_ananas_spi_top
./obj_dir/Vtb_ananas_spi_top
```

| Testbench | What it covers |
|---|---|
| `tb_ananas_spi_top` | End to end, all defaults. It runs the bring-up pattern (READ `ab`, `cd`) to all four slaves, with pin timing checked to the cycle. It sends READs against a stalled sink and runs the bridge sequence (WRITE, blocking write released by INT, READ). It lets a blocking write run into the full 700000-cycle time-out, and checks plain register access. It counts every mechanism and fails if one never happened. |
| `tb_spi_master` | Two masters, one at CLKDIV = 2 with 2/4 wait periods and one at CLKDIV = 6 with 8/16. Each runs a loop-back phase with exact data-span timing, then 40 random transactions with gaps and back-pressure. Every word is checked at the slaves and on the input stream. |
| `tb_spi_ctrl` | The state sequence tick by tick, the number of each strobe, and the IDLE hold while the input register is full. |
| `tb_spi_datapath` | MOSI order, SCLK levels in both halves of each bit, idle level before CS, chip-select decoding and RX assembly, for all four modes. |
| `tb_clk_div` | Pulse periods, spacing and first-pulse position for four divider settings. |
| `tb_ocp_io` | Register read/write, release by interrupt (exact cycle), release by time-out (exact cycle), and the 12-bit address match. |

`tb/spi_slave_model.sv` is a behavioural SPI slave for any mode. It records
what it receives and answers with a known word sequence. The top-level test
also uses a few lines of behavioural code for the bridge's interrupt.

## Choices this implementation makes

These points are not fixed by the original design description and were
decided here:

* The FSM steps on `fe`, and MISO is sampled on `re`.
* The chip select falls on entry to CSASS and rises on entry to CSDEASS.
  CSASS therefore counts as part of the set-up gap, which matches the
  measured gaps of the original design.
* `ocpout_tnext` is raised with the last MISO sample, not when the packet is
  loaded. This allows back-to-back packets with no idle period.
* Only READ packets return data.
* A packet without `tfirst` that arrives when no chip select is open is
  treated as a first packet, so no bits are sent without a chip select.
* A slave number ≥ CSNUM selects no slave.
* A `tfirst` packet that arrives while a transaction is still open (its
  `tlast` never came) switches to the new slave without the post-wait and
  deselect states. Hosts are expected to end every transaction with `tlast`.
* MOSI is low outside DATA.
* In the clock divider the wrap value is always CLKDIV−1. Only the `re`
  position `X` is free.
* `ocp_io` has the following:
  * an OCP signal subset, with blocking done by withholding `SCmdAccept`;
  * a release that triggers on the *level* of `in[0]` low (INT already low
    releases the hold at once);
  * the input synchroniser;
  * the blocking write leaving `out` alone.
* Reset is synchronous and active high everywhere.
* With CSNUM = 1 the slave field of `tuser` stays one bit wide.

## Limits

* All slaves share one SCLK frequency, and packets have no programmable gap
  between them.
* The adapter between the OCP bus and the stream ports, the bus itself, the
  host link, and the bridge chip are not part of this RTL. The top brings
  their signals out as ports.
* The OCP port of `ocp_io` covers only what the blocking mechanism needs. It
  has no bursts, byte enables or error responses.
