# LumiMulti ADC command decoder

The LumiMulti ADC is an eight-channel ADC chip whose configuration is written
over a slow serial link. This RTL is the chip's slow-control slave: it takes
17-bit command frames from an SPI mode 0 master, checks each frame's fixed
header, and stores the payload in one of three small register banks. The
registers drive the ADC core directly. They hold the read-out mode, the ADC
used in test mode, two low-power controls, an on/off bit for each of the eight
ADCs, and the codes of two bias DACs.

The whole design is 51 flip-flops and a few dozen gates, all clocked by the
serial clock.

## Frame format

Each frame is 17 bits, sent MSB first and sampled on the rising edge of `sclk`:

```
 bit:  16 15 14 13 12 11 | 10  9 |  8  7  6  5  4  3  2  1  0
        1  0  1  0  1  1 | C1 C0 | D8 D7 D6 D5 D4 D3 D2 D1 D0
        header           | cmd   | data (9 bits, zero-padded at the end)
```

| cmd  | name       | data[8:0]                                                   |
|------|------------|-------------------------------------------------------------|
| `00` | config     | `mode[1:0]`, `test_adc[2:0]`, `lvds_lp`, `buf_lp`, `00`      |
| `01` | active-adc | on bits of ADC7, ADC6, ... ADC0, then `0`                    |
| `10` | dac0       | DAC0 code, bias current of the ADCs' main stage             |
| `11` | dac1       | DAC1 code, current of the sample-and-hold circuit           |

The mode codes are `00` parallel, `01` test and `10` serial. The ADC core is
outside this RTL; the mode code tells it how to read out:

- **Parallel** (the reset mode): each ADC has its own LVDS lane. Each lane
  sends its ADC's samples MSB first, and the ADC clock is the input clock / 10.
- **Serial**: all ADCs share one lane, interleaved bit by bit: bit 9 of
  ADC7 ... ADC0, then bit 8 of each, and so on. The ADC clock is the input
  clock / 80.
- **Test**: only ADC `test_adc` runs. Each input clock puts a whole sample
  on LVDS outputs 9 to 0.

The first low-power bit sets the LVDS drivers' power mode. The second sets the
power mode of the internal buffers. An ADC whose `adc_on` bit is 0 has its
analog part powered down, and the clock of its correction logic is stopped.

## How a frame becomes a register write

`cmd_dec` is a four-state machine with a single 4-bit bit counter:

```
          cs_n high (asynchronous) / rst_n low
                      |
                      v
   +------> S_HDR --6 matching bits--> S_CMD --2 bits--> S_DATA --9 bits--+
   |          | wrong bit                                                 |
   |          v                                                           |
   |        S_ERR (stays until cs_n goes high)                            |
   +------------------ write request on the 9th data bit -----------------+
```

The timing is easy to get wrong, so here it is in full.

- The write request `wr` (type `cmd_wr_t`: `valid`, `cmd`, `data`) is
  combinational.
- `wr.valid` is high during the `sclk` cycle whose rising edge samples the 17th
  bit.
- `wr.data[0]` comes straight from `sdi`.
- The register banks run on the same `sclk`. They load on that 17th rising
  edge, so a new setting is visible right after the last bit. No extra clock
  edge is needed, and an idle `sclk` after the frame is fine.
- After a complete frame the machine expects a new header, so several
  commands may follow one another within one select.

While `cs_n` is high, the frame state is held in reset asynchronously
(`rst_n & ~cs_n`). A transfer cut short by releasing `cs_n` therefore leaves
no trace, even if `sclk` never toggles again. If a header bit is wrong, the
rest of that transfer is ignored, and `frame_err` stays high until `cs_n`
rises.

Each register bank looks at `wr.cmd` and picks out its own commands:

| module       | command(s)  | holds                                  | reset value        |
|--------------|-------------|----------------------------------------|--------------------|
| `mode_reg`   | config      | `cfg_t`: mode, test_adc, lvds_lp, buf_lp | parallel, 0, 0, 0  |
| `active_reg` | active-adc  | `adc_on[7:0]`, `adc_on[i] = data[i+1]` | `8'hFF` (all on)   |
| `dac_reg`    | dac0, dac1  | `dac0[8:0]`, `dac1[8:0]`               | `9'h100` (mid-scale) |

A config frame with the undefined mode code `11` is ignored completely. None
of its fields change.

## Files

| file                     | contents                                                 |
|--------------------------|----------------------------------------------------------|
| `rtl/lumi_pkg.sv`        | frame widths, header, `cmd_e`, `mode_e`, `cmd_wr_t`, `cfg_t` |
| `rtl/cmd_dec.sv`         | serial receiver and frame state machine                  |
| `rtl/mode_reg.sv`        | config register                                          |
| `rtl/active_reg.sv`      | per-ADC on/off register                                  |
| `rtl/dac_reg.sv`         | DAC0 / DAC1 code registers                               |
| `rtl/top_cmddecoder.sv`  | top level: decoder plus the three registers              |
| `tb/tb_*.sv`             | one self-checking testbench per module                   |

Top-level ports: `rst_n`, `sclk`, `cs_n` and `sdi` in; `mode[1:0]`,
`test_adc[2:0]`, `lvds_lp`, `buf_lp`, `adc_on[7:0]`, `dac0[8:0]`, `dac1[8:0]`
and `frame_err` out.

`cmd_dec` contains two concurrent assertions. One checks that the bit counter
stays inside the current field. The other checks that a write request comes
only from the data field of a selected transfer.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_top_cmddecoder rtl/lumi_pkg.sv tb/tb_top_cmddecoder.sv
./obj_dir/Vtb_top_cmddecoder
```

To run the unit tests, swap in `tb_cmd_dec`, `tb_mode_reg`, `tb_active_reg` or
`tb_dac_reg`.

`tb_top_cmddecoder` runs the top level at its default parameters. It acts as
the SPI master and sends 600 random transfers. These include:

- single frames and several frames in one select
- wrong headers
- transfers aborted by `cs_n`
- config frames with the reserved mode code
- hard resets in the middle of a frame

A model in the testbench predicts every output. The testbench checks that
nothing changes before the 17th edge, and it counts each of these events,
failing if any never happened.

All asynchronous resets in this RTL are negedge-triggered. A two-state
simulator needs a real falling edge to apply them. The testbenches therefore
start `rst_n` (and `cs_n`) at values that let them produce that edge just
after time 0.

## Where this RTL makes its own choices

The frame format, the command and mode codes, and the field meanings are the
LumiMulti ADC specification's. So is the reset to parallel mode. So is the
split into a decoder plus config, active-ADC and DAC register banks. The rest
is this design's own choice:

- **9-bit data field.** The data field is 9 bits in every command, so the
  frame is 17 bits long. A shorter field would not hold the 9-bit DAC codes.
- **Slave select.** The link is described only as "SPI-like, mode 0".
  `cs_n` is added, as in any SPI slave.
- **Wrong headers, aborted transfers, back-to-back frames and `frame_err`.**
  The specification says nothing about any of these.
- **Register clocking.** The registers are clocked by `sclk`. Their outputs
  are quasi-static configuration, and the ADC core takes them into its own
  clock domain.
- **Reserved mode `11`.** A config frame carrying it is ignored.
- **Reset values other than the mode.** All ADCs on, DACs at mid-scale, test
  ADC 0, normal power. These are parameters (`RESET_ON`, `DAC_RESET`) or
  `CFG_RESET` in the package.
- **Low-power polarity.** 1 means low power.

A reference gate-level implementation of this decoder was reported with 48
sequential cells. This RTL has 51 flip-flops: 33 configuration bits, plus 18
in the decoder (state, counter, command and the first 8 data bits). The
decoder's internal structure was not specified, so that difference is
expected.

## Not included

- The ADC core's read-out logic: clock division by 10, 80 or 1 and LVDS
  serialisation in the three modes.
- The analog ADCs, the DACs and the power switches.
- The clock gating of an ADC that is off.

All of these are part of the ADC chip that this decoder configures. The
decoder's outputs are the control inputs those parts need.
