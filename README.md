# SPI master core with a Wishbone host interface

This core lets a processor on a Wishbone bus talk to SPI peripherals. The
host writes up to 128 bits into the core and sets a control word. The core
then runs a full-duplex SPI transfer. It clocks the bits out on MOSI and, at
the same time, clocks the same number of bits in from MISO. It signals the
end of the transfer by clearing its GO bit and, optionally, with an
interrupt.

The main idea is that transmit and receive data share **one 128-bit
register**. Each bit position is sent before the bit received for that
position overwrites it. So after a transfer the host reads the received
data from the same four words it wrote the outgoing data to. The core needs
no separate receive buffer.

```
             +-------------------------------------------------------------+
 Wishbone    |  spi_wb_if            spi_shift                              |
 wb_*  <---->|  CTRL, DIVIDER, SS -> 128-bit shared register  --> mosi_pad_o|
             |  data word access  <- p_out                    <-- miso_pad_i|
             |        |  divider       ^ pos_edge / neg_edge                |
             |        v                |                                    |
             |  spi_clk_gen  ----------+---- s_clk ---------> sclk_pad_o    |
             |  (runs while tip)                              ss_pad_o (n)  |
             +-------------------------------------------------------------+
```

## Files

| file | contents |
|---|---|
| `rtl/spi_pkg.sv` | register map, CTRL field layout (`spi_ctrl_t`), sizes |
| `rtl/spi_clk_gen.sv` | serial clock divider and edge strobes |
| `rtl/spi_shift.sv` | shared data register and serial shifter |
| `rtl/spi_wb_if.sv` | Wishbone slave, control registers, interrupt |
| `rtl/spi_top.sv` | top level: the three parts and the pads |
| `tb/tb_spi_*.sv` | one self-checking testbench per module |
| `tb/spi_slave_model.sv` | behavioural SPI slave used by the testbenches |
| `tb/tb_spi_env.sv`, `tb/spi_bus_if.sv` | layered random test of the whole core and the interface it uses |

## Programming model

The registers are 32-bit words at byte addresses on the 5-bit `wb_adr_i`.
Bits 4:2 of the address select the register.

| offset | register | access |
|---|---|---|
| 0x00, 0x04, 0x08, 0x0C | DATA0..DATA3 | write: bits to send (DATA0 = bits 31:0 … DATA3 = bits 127:96), byte enables from `wb_sel_i`; read: the register contents, holding the received bits after a transfer |
| 0x10 | CTRL | see below |
| 0x14 | DIVIDER | bits 15:0 |
| 0x18 | SS | one bit per slave-select line (`SS_NB` bits) |

CTRL:

| bits | field | meaning |
|---|---|---|
| 6:0 | LEN | bits per transfer, 1..127; 0 means 128 |
| 8 | GO | write 1 to start; reads 1 until the transfer is over |
| 9 | RX_NEG | sample MISO on falling SCLK edges (0: rising) |
| 10 | TX_NEG | change MOSI on falling SCLK edges (0: rising) |
| 11 | LSB | least significant bit first (0: most significant first) |
| 12 | IE | raise `wb_int_o` at the end of a transfer |
| 13 | ASS | drive the selected `ss_pad_o` lines low only during a transfer (0: whenever their SS bit is set) |

A typical transfer goes like this:

1. Write DATA0..DATA3, DIVIDER and SS.
2. Write CTRL with the mode, and GO = 0.
3. Write CTRL again with GO = 1. Writing the same word with GO set in one step also works.
4. Wait for `wb_int_o`, or poll CTRL until GO reads 0.
5. Read DATA0..DATA3.

While a transfer is running (GO set), **all register writes are ignored**.
Reads are always allowed. The interrupt clears on the next Wishbone access
of any kind.

Each Wishbone cycle is a classic single cycle. `wb_ack_o` is high in the
cycle after `wb_cyc_i & wb_stb_i`, for one cycle. There are no wait states
and no error response.

## Where the received bits land

For an n-bit transfer, bit k on the wire (k = 0 first) uses the register
bit at position k when LSB = 1, and at position n-1-k when LSB = 0. It is
sent from that position and received back into it. After the transfer:

* LSB = 1: bits n-1..0 hold the received word, in the same order.
* LSB = 0: bits n-1..0 hold it too, with the first received bit at n-1.
* Bits n..127 are untouched in both cases. They still hold whatever was
  written there.

The bit at a position is always on MOSI before the bit received for that
position is written over it, whatever edge mode is set. That is why
sharing the register is safe.

## Serial clock and modes

SCLK is the Wishbone clock divided by `(DIVIDER + 1) * 2`. A down-counter
reloads with DIVIDER and toggles SCLK each time it reaches zero, so both
halves of every period are exactly DIVIDER+1 cycles long, for odd and even
DIVIDER alike. The fastest SCLK (DIVIDER = 0) is half the bus clock. The
slowest (0xFFFF) is 1/131072 of it.

SCLK runs only while a transfer is in progress and idles low. TX_NEG and
RX_NEG choose the edges:

| TX_NEG | RX_NEG | MOSI changes | MISO sampled | usual name |
|---|---|---|---|---|
| 1 | 0 | falling (first bit before the first rise) | rising | SPI mode 0 |
| 0 | 1 | rising | falling | SPI mode 1 |
| 0 | 0 | rising | rising | |
| 1 | 1 | falling | falling | |

Clock polarity 1 (SCLK idling high) is not provided.

The clock generator does not drive the shifter with SCLK itself.
Everything runs on `wb_clk_i`. For each edge, the generator raises a
one-cycle strobe (`cpol_0` before a rise, `cpol_1` before a fall) in the
cycle before it. The shifter acts on that strobe, so MOSI changes and MISO
is taken on the same bus clock edge that moves SCLK.

### Timing

* The clock edge that takes the GO write sets GO. The next edge sets tip
  (transfer in progress).
* SCLK first rises DIVIDER+2 edges after the GO write is taken.
* An n-bit transfer then lasts `(2n-1)(DIVIDER+1)` cycles up to the last
  falling edge. GO, tip and the automatic slave select clear with that
  edge, and `wb_int_o` rises on it.

## Slave selects

`ss_pad_o` is active low, with `SS_NB` lines (default 1). Line i is low
when SS bit i is set and either ASS = 0 or a transfer is in progress. With
ASS = 1 the line drops as the transfer starts, DIVIDER+1 cycles before
the first SCLK edge, and rises with the last SCLK edge.

## Parameters

| parameter | default | where |
|---|---|---|
| `SS_NB` | 1 | `spi_top`, `spi_wb_if`: number of slave-select lines |
| `MAX_CHAR` | 128 | `spi_pkg`: data register width. The bus interface decodes exactly four data words, so this is fixed at 128 in the top. |
| `DIV_W` | 16 | `spi_pkg`, `spi_clk_gen`: divider width |

## Design choices and departures

The block structure comes from the core's published description: a clock
generator, a serial shift module with a shared 128-bit register, and a
Wishbone interface. So do the port names and widths of those blocks and of
the top level, and the SCLK formula. The following are this
implementation's own choices:

* The register map, the CTRL bit positions, and the rule that writes are
  ignored during a transfer.
* The interrupt set and clear rules.
* The two-cycle Wishbone handshake, and the absence of `wb_err_o`.
* Clock polarity 0 only. The clock generator counter scheme and the meaning
  of its two strobes.
* LEN = 0 meaning 128 bits.
* The default of a single slave-select line. It follows the top-level port
  drawn as one wire, although the core is meant to support several slaves.
  Raise `SS_NB` for more.
* Synchronous, active-high reset, which clears all registers, the data
  register included.

## Verification

Each testbench checks its module against results it computes from its own
stimulus, and prints `TB_RESULT checks=N failures=M`.

* `tb_spi_clk_gen` compares SCLK and both strobes, every cycle, with a
  reference derived from the enabled-cycle count. It uses DIVIDER 0..255,
  including random values, and checks the period and the return to idle.
* `tb_spi_shift` drives the shifter with its own clock strobes against the
  slave model. It covers all four edge modes × both bit orders × lengths 1,
  7, 8, 32, 100, 127 and 128, plus random lengths. It checks the bits seen
  on the wire, the register contents afterwards, the `tip` and `last`
  durations, byte-enabled loads, and that loads are ignored mid-transfer.
* `tb_spi_wb_if` checks the bus handshake, register read-back, the
  data-word strobes, write blocking, GO clearing and the interrupt.
* `tb_spi_top` runs the whole core at its default parameters: a Wishbone
  host task, and the slave model on the pads. It covers 23 transfers,
  directed and random. It checks the wire data, the read-back data, the
  SCLK edge count and every half period, the latency to the first edge,
  the slave-select pad, the interrupt and polled completion, and that a
  divider write during a transfer is ignored. It counts each of these
  mechanisms and fails if one never occurred: the four edge modes, both
  bit orders, 128-bit transfers, odd and even dividers, automatic and
  manual select, interrupt and polling, and a blocked write.

* `tb_spi_env` is a layered random test of the whole core. A generator
  feeds a driver, which plays the Wishbone host, through a mailbox. A
  receiver on the SPI side and a scoreboard check each transfer in both
  directions. The components share one interface, `tb/spi_bus_if.sv`. It
  runs 60 random transfers, then requires every bin of its coverage table
  to be hit. The bins are the edge modes, bit orders, select modes,
  completion modes, odd and even dividers, and 1- and 128-bit lengths.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/spi_pkg.sv tb/tb_spi_top.sv --top-module tb_spi_top
./obj_dir/Vtb_spi_top
```

The same pattern runs the other testbenches. Put `rtl/spi_pkg.sv` first in
the list, because modules refer to it by name.

## Limits

* There is no clock polarity 1, no transfer queue and no FIFO. One transfer
  of up to 128 bits runs at a time.
* MISO is sampled directly on the bus clock, with no synchronizer. At high
  SCLK rates the slave's MISO must meet the setup time of `wb_clk_i`.
* No design is given here for the SPI slave device or the host processor.
  The slave model in `tb/` is for simulation only.
