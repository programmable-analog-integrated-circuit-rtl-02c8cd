# A programmable analog chip for remote laboratories

This is the digital control of a small programmable analog chip, plus behavioural models of its
analog cells. A remote teaching laboratory uses it to build analog circuits on demand. The chip
holds a few analog "expert" cells: two DACs, a sample & hold, a differential comparator, a
differential OTA and a bandgap reference. The signals that can reach each cell input were fixed
when the chip was laid out. A microcontroller, driven by a web server, chooses over SPI which of
those signals are switched in. It also chooses which cell outputs go to the chip's four analog
output pins. Different configurations give different circuits. For example, a DAC, the sample &
hold and the comparator, with the microcontroller running the binary search, form an 8-bit
successive-approximation ADC.

The chip describes itself. A **table of content** gives the type of cell at each module address.
**ReadBack** tells software which signal is wired to each switch input. With these two, software
can find a cell and its possible connections without any built-in knowledge of the chip.

All logic in `rtl/` can be synthesised. The analog cells and switches are behavioural models that
carry voltages as millivolt numbers. They let the whole chip be simulated with its analog paths.
They are not a circuit description.

## Organisation

```
panic_top
├── control                      SPI, decoding, addressing, table of content
│   ├── spi_slave                16-bit frames on sck/mosi/miso
│   ├── ctrl_decoder             instruction -> strobes and read source
│   ├── addr_reg                 module address (4 bits) + line address (3 bits)
│   ├── module_addr_decoder      one-hot select of the 6 built modules
│   └── toc_rom                  16-entry table of content
├── amf  x6                      analog module framework, one per cell
│   ├── line_decoder             line address -> register enable
│   ├── irs  x5                  input register & switch, with ReadBack
│   ├── ors  x2                  output register & switch
│   └── module_reg               8-bit digital out to / in from the cell
├── analog_switch  x30 + x4      switch networks of the IRS cells and the output pins (model)
└── dac_model x2, sample_hold_model, comparator_model, ota_model   (models)
```

`panic_pkg` holds the sizes, opcodes, tags, the source-code format, the default wiring and the
millivolt type `mv_t`.

| address | cell | tag | analog inputs (IRS) | outputs (ORS) | module register |
|---|---|---|---|---|---|
| 0 | DAC | 0x01 | – | ORS0 = code × 10 mV | out: 8-bit code |
| 1 | DAC | 0x01 | – | ORS0 = code × 10 mV | out: 8-bit code |
| 2 | sample & hold | 0x02 | IRS0 = input | ORS0 = held value | out bit 0: 1 = track, 0 = hold |
| 3 | differential comparator | 0x03 | IRS0 = +, IRS1 = − | – | in bit 0: + above − |
| 4 | differential OTA | 0x04 | IRS0 = +, IRS1 = − | ORS0/1 = out+/out− | – |
| 5 | bandgap reference | 0x05 | – | ORS0 = `bg_vout` pin | out: `bg_ctrl` pin |
| 6–15 | none | 0x00 | | | |

The architecture can address 16 modules. Six are built, as in the prototype. Each framework is
built with the maximum of 5 IRS cells, whether or not its cell uses them.

## Configuring the chip over SPI

The chip has no clock of its own. Its pins are `enable` (chip select, active high), `reset`
(active high, asynchronous), `sck`, `mosi` and `miso`. Every register is clocked by `sck`.

A **frame** is 16 bits, MSB first, in SPI mode 0:

- The master changes `mosi` while `sck` is low.
- The chip samples `mosi` on the rising edge.
- The chip changes `miso` on the falling edge.

The first byte is the instruction: opcode in bits 7:5, operand in bits 4:0. The second byte is
the data.

Because no `sck` edge follows a frame, a write happens on the 16th rising edge. On that edge the
last data bit is still on `mosi`. The `spi_slave` output `last_bit` marks it, and the write path
takes the data byte as `{received 7 bits, mosi}`.

Read data is chosen as soon as the instruction byte is complete. It is loaded on the falling edge
after the 8th rising edge and shifted out during the data byte. `miso_oe` is high only during the
data byte of a read instruction, so several chips on one board can share `miso`.

`enable` low clears the bit counter immediately. A frame cut short therefore writes nothing, and
the next frame starts aligned. Frames may also follow each other back to back with `enable` held
high.

| opcode | name | operand | data byte | effect |
|---|---|---|---|---|
| 1 | SET_ADDR | module [3:0] | line [2:0] | load the address register |
| 2 | WRITE | – | value | write the addressed register |
| 3 | READ | – | – | return the addressed register on `miso` |
| 4 | READ_TOC | module [3:0] | – | return that module's tag |
| 5 | READBACK | input [2:0] | – | return the source wired to input *n* of the addressed IRS |
| 0, 6, 7 | – | | | nothing |

A module address with no module behind it loses writes and reads back zero.

### Register map of one framework (the line address)

| line | register | write | read |
|---|---|---|---|
| 0–4 | IRS 0–4 | bit *j* = 1 closes switch *j*; any combination is allowed | the same 8 bits |
| 5, 6 | ORS 0, 1 | bit 2 = connect, bits 1:0 = output pin | `{5'b0, connect, pin}` |
| 7 | module register | 8 bits to the cell | 8 bits **from** the cell |

An ORS drives at most one pin: its switch controls are one-hot or all zero. Several ORS cells may
still drive the same pin. The model then gives the mean of their voltages.

Reset opens every switch, disconnects every ORS and clears the module registers and the address
register.

## ReadBack and the wiring

Each IRS has eight inputs. Which signal each input carries is fixed by the layout and stored as a
constant code inside the IRS:

| code | meaning |
|---|---|
| `8'h00` | nothing wired |
| `8'b01_0000_ii` | off-chip analog input *ii* |
| `8'b10_mmmm_0o` | output ORS *o* of module *mmmm* |

The top parameter `WIRING` (type `chip_src_t`) is this table for the whole chip. The same table
does two jobs: it wires the analog sources in `panic_top` and gives the IRS cells their ReadBack
constants. Because of this, what ReadBack reports always matches the chip. The default,
`PROTO_WIRING`, follows this rule:

- inputs 0–3 of every IRS are the four off-chip inputs;
- input 4+k of IRS i of module m is ORS 0 of module (m − 1 − i − k) mod 6.

This puts the sample & hold on comparator IRS0 input 4, and DAC 0 on comparator IRS1 input 5.
Those are the two connections the ADC needs. Replace `WIRING` to describe another layout.

## Example: the 8-bit successive-approximation converter

This is what `tb/tb_panic_top.sv` does, playing the microcontroller:

1. Read the table of content, and find the DAC (0), the sample & hold (2) and the comparator (3).
2. With READBACK, find the comparator inputs that carry the sample & hold and the DAC.
3. Close the switches:
   - sample & hold IRS0 ← `ain[0]`;
   - comparator IRS0 ← sample & hold;
   - comparator IRS1 ← DAC.
4. Write 1 and then 0 to the sample & hold's module register, to sample and then hold.
5. For bit 7 down to 0:
   - set the bit in the trial code and write it to the DAC's module register;
   - read the comparator's module register;
   - clear the bit if the comparator reads 0.

After 8 comparisons the code is the largest *c* with *c* × 10 mV below the input. Each comparison
takes four frames: two SET_ADDR frames, a WRITE and a READ, or 64 `sck` cycles.

## Analog models

Voltages are unsigned 16-bit millivolts (`mv_t`). The models are ideal and settle at once:

- `analog_switch`: a node that carries the mean of its closed sources. It carries 0 V, with
  `driven` low, when no switch is closed.
- `dac_model`: out = code × `VREF_MV`/256, with `VREF_MV` = 2560.
- `sample_hold_model`: a level-sensitive latch. It is transparent while tracking, so lint reports
  a latch, which is intended.
- `comparator_model`: out = (+ > −). Equal inputs give 0.
- `ota_model`: an open-loop differential amplifier, out± = 1650 mV ± 1000 × (vp − vn), clipped
  to 0…3300 mV. Output current and bandwidth are not modelled.

The wiring can feed a cell's output back to an input of the same cell or an earlier one, as in
real analog circuits. Verilator therefore reports circular combinational logic (`UNOPTFLAT`) in
`panic_top`. It settles because the switches only close by configuration. The bandgap cell is not
modelled: its output comes in on the pin `bg_vout`.

## What follows the chip's description and what is this design's own

These follow the chip's description:

- the division into control logic (SPI, address register, control signal decoder, module address
  decoder, table of content) and analog module frameworks (IRS, ORS, line decoder, module
  register);
- 16 addressable modules, 6 of them built;
- up to 5 IRS cells of 8 freely combinable switches each;
- 2 ORS cells per framework, each reaching one or none of 4 outputs;
- the 8-bit module register;
- 4 analog inputs and 4 analog outputs;
- the pin names;
- the six cells and their placement;
- the idea of ReadBack and of the table of content;
- the 8-bit ADC built from a DAC, the sample & hold and the comparator, with the SAR in the
  microcontroller.

These are this design's own choices:

- the frame format, the opcodes and the SPI mode;
- active-high `enable` and `reset`;
- the register and line encodings;
- the tag values and the module order;
- the ReadBack code format and the wiring rule;
- a module register that reads the cell's outputs;
- every analog model and all its values (VREF, gain, supply, track polarity);
- single-ended connections between the converter's cells, where the cells might really be wired
  as differential pairs.

The real chip's layout wiring is not known. Only the two ADC connections are grounded in its
description.

The digital input of a module register is not synchronised to `sck`. It is sampled when the read
byte is loaded, half an `sck` period before the master samples the first bit.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
To run the end-to-end test, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb \
          rtl/panic_pkg.sv tb/tb_panic_top.sv --top-module tb_panic_top
./obj_dir/Vtb_panic_top
```

`tb_panic_top` runs the chip at its default parameters. It covers:

- the table of content;
- all 240 ReadBack entries;
- ten conversions, each checked against the ideal code and the 8-comparison count;
- the OTA, sample & hold and bandgap routed to the pins, including clipping and two ORS on one
  pin;
- several switches closed on one IRS;
- an unbuilt module address;
- a frame cut short;
- back-to-back frames;
- reset.

It counts each of these, and fails if one never happened.

`tb_board` puts two chips on one board, as the laboratory does. They share `sck`, `mosi`, `reset`
and `miso`, and each has its own `enable`. The test checks that a frame reaches only the selected
chip, that reads return that chip's data, and that the two chips never drive `miso` together.

Each block has its own testbench `tb/tb_<module>.sv`; run it the same way with its name.
Assertions in `control` and `ors` check the bus rules while a simulation runs with `--assert`:

- at most one framework is selected;
- `miso` is driven only during a read;
- an ORS never closes two pin switches.
`tb/spi_bfm.sv` is the SPI master interface that the testbenches share. It starts with a falling
edge on `enable`, so that the chip's asynchronous frame clear sees an edge in a two-state
simulator.
