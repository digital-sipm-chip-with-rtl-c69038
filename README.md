# Digital SiPM readout chip: SystemVerilog model

Rare-event physics experiments (dark matter searches in liquid xenon or argon)
look for a handful of scintillation photons spread over square metres of
detector, at cryogenic temperature. A *digital* SiPM suits this well. Every
SPAD (single-photon avalanche diode) drives its own logic. A hit is stored as
a bit, not an analog pulse. The chip sends out only the address and time of
each hit. Power then scales with the clock and the hit rate, and the chip needs
no amplifiers.

This RTL models the digital part of such a chip. It has:

* 960 pixels (32 x 30) of 9 SPADs each, 8640 SPADs in all. Any SPAD can be
  switched off, so hot (noisy) SPADs can be masked.
* A hit flip-flop per pixel. It keeps a hit until it has been read, so no hit
  is lost.
* A 10-bit time stamp per readout column, in 10 ns steps at a 50 MHz clock.
* A readout sequencer that moves one hit per 7 clock cycles into a 32-word
  FIFO.
* A serial link with only four logic pins: `clk`, `cmd`, `ser_in` and
  `ser_out`. Up to 64 chips share one clock and one command line, and their
  data lines form a daisy chain.

The SPADs, their passive quenching and the comparators are analog and are not
modelled. Each SPAD appears as one input, `spad_fire[x][y][s]`, that rises when
it fires.

## Block map

```
 spad_fire ──► dsipm_matrix (16 columns x 60 pixels, dsipm_pixel each)
                  │ col_hit[15:0]           ▲ col_send / col_reset
                  ▼                         │
       dsipm_col_tlatch ◄── dsipm_time_counter
                  │ col_ts[x]               │
                  ▼                         │   row_hit[59:0]
           dsipm_readout_seq (X and Y dsipm_prio_enc) ──► dsipm_fifo (32 x 20)
                                                              │
 cmd ──► dsipm_cmd_decoder ──► commands to all blocks         ▼
 ser_in ─────────────────────────────────────────────► dsipm_serial_link ──► ser_out
```

| File | Role |
|---|---|
| `rtl/dsipm_pkg.sv` | widths, the hit word and config structs, the command enum, the test word |
| `rtl/dsipm_chip.sv` | top level: one chip |
| `rtl/dsipm_pixel.sv` | one pixel: enable storage, OR of 9 SPADs, hit flip-flop, row and column drivers |
| `rtl/dsipm_matrix.sv` | pixel array, column hit lines, row hit lines, enable-write decoding |
| `rtl/dsipm_time_counter.sv` | 10-bit time stamp that counts both clock edges |
| `rtl/dsipm_col_tlatch.sv` | one time-stamp latch per column |
| `rtl/dsipm_prio_enc.sv` | lowest-index priority decoder (X and Y address) |
| `rtl/dsipm_readout_seq.sv` | moves hits from the matrix into the FIFO |
| `rtl/dsipm_fifo.sv` | 32-word hit FIFO |
| `rtl/dsipm_cmd_decoder.sv` | decodes the width of the CMD pulse |
| `rtl/dsipm_serial_link.sv` | daisy-chain packets, chip ID, configuration |

## Matrix geometry

The 32 x 30 pixels are grouped in units of 2 x 2. Each unit has its shared
circuitry in the centre. The readout sees 16 columns (X = 0..15, 4 bits) of 60
pixels (Y = 0..59, 6 bits). This RTL does not fix which physical pixel a
(X, Y) pair stands for. A hit word is `{T[9:0], Y[5:0], X[3:0]}`, 20 bits.

## Capturing a hit without a clock

The pixel matrix is static and has no clock. This is the least conventional
part of the design.

* **Pixel.** The 9 SPAD signals are ANDed with their enable bits and ORed
  together. The inject line is ORed in too, but only for pixels with at least
  one SPAD enabled. The rising edge of this OR clocks the pixel's hit
  flip-flop to 1, so the OR itself is the flip-flop's clock. The flip-flop
  raises its column's hit line. The column reset clears it asynchronously. A
  SPAD that stays high does not set it again until there is a new edge.
* **Column time stamp.** Each column has a latch on the 10-bit time bus. It is
  transparent while the column has no hit, and closes when the column hit line
  rises. So it holds the time of the first hit in that column. A second hit in
  the same column, before the column is read, gets that same time stamp. This
  is intended: it keeps the periphery small. The latches are the only latches
  in the design.
* **Double-edge time.** `dsipm_time_counter` appends the inverted clock to a
  9-bit counter that runs on the rising edge. The code steps by one on every
  clock edge, giving 10 ns at 50 MHz. It is 0 in the high phase after it is
  cleared, 1 in the following low phase, and so on, and wraps after 10.24 µs.

The column hit lines are asynchronous to `clk`. They pass a two-flop
synchroniser before the sequencer uses them. By the time the sequencer reads a
column's latch, the latch has been closed for at least two cycles.

## Readout sequence: 7 cycles per hit

`dsipm_readout_seq` spends one clock cycle in each state:

| State | Action |
|---|---|
| SCAN | X priority decoder: lowest column whose synchronised hit flag is set |
| SEND | raise that column's SendRow; its hit pixels drive their HitRow lines |
| CAPT | keep SendRow; register the 60-bit HitRow vector and the column time stamp |
| RST | pulse the column reset: every hit flip-flop of the column clears and the time latch reopens |
| WAIT1, WAIT2 | the cleared hit flag passes the synchroniser, so SCAN does not pick the column again |
| WRITE | Y priority decoder: one FIFO word `{T, Y, X}` per captured row, lowest Y first |

A column with one hit takes exactly 7 cycles: 7.1 Mhits/s at 50 MHz. Each
further hit in the same column adds one cycle. If the FIFO is full, WRITE waits
and the matrix keeps its other hits, so nothing is dropped. A hit arriving in
the selected column between CAPT and RST is cleared without being read. That
window is two cycles long.

## Commands on CMD

All chips share one CMD line. A command is a high pulse whose width in clock
cycles selects it:

| Width | Command | Effect in this RTL |
|---|---|---|
| 1 | ResetAll | clears state machines, FIFO, time counter and all hits. Keeps chip ID, configuration and SPAD enables |
| 2 | ResetTime | clears the time counter |
| 3 | ResetMatrix | clears all hit flip-flops |
| 4 | ReadoutSimple | sends one hit from the FIFO |
| 5 | StartReadout | sends FIFO hits into every empty packet |
| 6 | StopReadout | stops that, and cancels a pending ReadoutSimple |
| 7 | WriteConfig | the next valid packet addressed to this chip loads the config register and the addressed pixel's enables |
| 8 | ReadConfig | sends the config register in the next empty packet |
| 9 | WriteID | the next valid packet sets the chip ID. The packet is forwarded with ID + 1 |
| 10 | InjectMatrix | sets a hit in every pixel with at least one enabled SPAD |
| 11 | InjectFIFO | writes the test word `20'hA5C3A` into the FIFO |
| 12 | InjectSerializer | sends the test word in the next empty packet, bypassing the FIFO |

CMD is sampled on the rising edge. The first edge that samples CMD low again
ends the pulse. The command acts in the following cycle. Pulses wider than 12
cycles are ignored. There is no reset pin, so the first thing a controller
sends is ResetAll.

## Serial chain and packet format

Each chip copies `ser_in` to `ser_out` one clock later. The data acquisition
opens a packet by driving a single `1` into the first chip. A packet is 28
bits:

| Bit | Content |
|---|---|
| 0 | marker `1` |
| 1 | valid: the packet carries a word |
| 2..7 | chip ID[5:0], LSB first |
| 8..27 | word[19:0], LSB first: a hit `{T, Y, X}`, the config register, or the test word |

Each empty packet picks up one word on its way along the chain. When a chip
sees an empty packet (valid = 0) and has something to send, it sets valid and
replaces the 26 data bits. It sends, in this order of priority:

1. its config word, after ReadConfig;
2. the test word, after InjectSerializer;
3. a FIFO hit, while readout is on.

Packets must be at least 28 cycles apart and may follow each other with no gap.
The link carries at most one hit per 28 cycles, 1.79 Mhits/s at 50 MHz. The
DAQ sets the rate by how many packets it injects.

Configuration travels in packets too:

* **WriteID.** Every armed chip takes the ID field of the next valid packet.
  It increments the field on the fly (LSB first, serial carry) as it forwards
  the packet. One packet carrying N therefore numbers the chain N, N+1, ...
* **WriteConfig.** The packet's ID field addresses one chip. Data bits 6..24
  are `{X[3:0], Y[5:0], EN[8:0]}`. The chip stores them in its config register
  and writes `EN` into the enable storage of pixel (X, Y). Chips whose ID does
  not match drop their armed state. Programming all enables of a chip takes 960
  WriteConfig commands.

## Where this model goes beyond the source description

These were fixed here because the description gives only the function or the
name:

* Widths, geometry and rates come from the description: 4-bit X, 6-bit Y,
  10-bit T, 6-bit ID, 28-bit packet, 32-word FIFO, 7 cycles per hit, the 12
  commands. Some details are this design's own choices:
  * the order of the fields in the packet and the valid bit;
  * the WriteID numbering by incrementing;
  * the layout of the config register;
  * the test word;
  * the synchroniser and the exact states of the sequencer;
  * lowest-index-first priority.
* How the enable bits reach the pixels is not described. Here they are written
  one pixel at a time from the config register.
* The wired, active-low HitRow/HitCol lines of the silicon are modelled as
  active-high ORs.
* The pixel flip-flops are clocked by SPAD signals, and the time latches by
  column hit lines. Both are deliberate asynchronous elements. A synthesis or
  timing flow must treat them as such. The time-stamp LSB is the clock itself.
* The SPADs, quenching, comparators, anode switches, pads and supplies are not
  modelled.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/dsipm_pkg.sv tb/tb_dsipm_chain.sv \
          --top-module tb_dsipm_chain -o sim
./obj_dir/sim
```

`tb_dsipm_chain` connects three chips at full size (16 x 60 x 9) in a chain and
acts as the data acquisition. It:

* numbers the chips;
* programs all 2880 pixels;
* reads the configuration back;
* fires single SPADs at chosen half-cycles and checks the time stamps, the
  masked SPADs and the shared column time stamp;
* injects 60 hits into one column, overflowing the FIFO, and checks that all
  arrive in back-to-back packets;
* exercises InjectFIFO, InjectSerializer, ReadoutSimple, Stop, ResetMatrix and
  ResetAll.

It counts how often each of these happens and fails if one never does. It runs
about 116,000 cycles, roughly 10 s after a build of about a minute.

`tb_dsipm_inject_rate` repeats the hit-rate measurement on one full-size
chip. It leaves a single pixel enabled, and issues InjectMatrix at 50, 25 and
250 kHz while the link runs with back-to-back packets. It checks that every
injection yields exactly one hit, and that successive time stamps differ by
twice the period.

The other testbenches, `tb/tb_dsipm_<block>.sv`, each test one module. To test
a module, replace `tb_dsipm_chain` in the command above by its testbench.
`tb_dsipm_readout_seq` checks the 7-cycle spacing cycle by cycle.
`tb_dsipm_serial_link` checks the packet protocol bit by bit.

Parameters of `dsipm_chip`: `NCOL`, `NROW`, `NSPAD` and `FIFO_DEPTH`. The
X and Y address widths in `dsipm_pkg` must still cover `NCOL` and `NROW`.
