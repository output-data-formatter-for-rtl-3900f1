# ESTAR Output Data Formatter

ESTAR is an L-band synthetic-aperture radiometer. Its correlators produce
thousands of complex correlation products for every integration period. These
products have to reach the spacecraft data system (SEDS) over a single serial
line, tagged so that the ground can tell which antenna pair each product
belongs to. The Output Data Formatter (ODF) does this. It takes 170 bits of
correlator and error data in one parallel load and appends an identification
count to them. SEDS then reads the result out bit by bit, pacing it with its
HSS handshake strobe.

This RTL describes the formatter as a pair of identical devices. Each device
takes 85 of the 170 bits. The devices are chained, so SEDS sees one
continuous 192-bit stream per load.

## One device: `odf_fpga`

Each device is essentially one 96-bit shift register with parallel load.

```
             TEST_EN                      TEST_EN
                |                            |
 din (85) --> [2:1 load mux] --> PE/parallel  |
     ^            ^    loop (85)  data        v
     |            +--------------[ 96-bit  ]--Q--> [1:2 demux] --> SER_OUT
 COUNT (11) <-- [counter]        [ shift   ]             \----> TDATA_OUT
     ^                           [ register]<-- D
 LOAD_ENABLE & LOAD_STRB            ^ C          \
                      LOAD_STRB | shift_clk       fill
                                    ^             ^
       HSS / TEST_CLK, SER_IN / TDATA_IN --> [4:2 data selector] (TEST_EN)
```

| Module              | Role |
|---------------------|------|
| `odf_pkg`           | Sizes, the `load_word_t` struct and the frame packing functions |
| `odf_counter`       | 11-bit tag counter |
| `odf_load_mux`      | Chooses external data (normal mode) or loopback (test mode) for the parallel load |
| `odf_data_selector` | Chooses the shift clock and fill bit: HSS/SER_IN (normal mode) or TEST_CLK/TDATA_IN (test mode) |
| `odf_shift_reg`     | 96-bit register: parallel load or one-bit shift on each clock edge |
| `odf_out_demux`     | Sends the register output to SER_OUT or TDATA_OUT |
| `odf_fpga`          | One complete device |
| `odf_top`           | `N_DEV` devices (default 2) chained into one formatter |

### Clocking: strobes are the clocks

The design has no free-running clock. The shift register's clock `C` is the
OR of `LOAD_STRB` and the selected shift strobe (HSS, or TEST_CLK in test
mode). On each rising edge of `C`, `LOAD_ENABLE` acts as the parallel-enable:

* `LOAD_ENABLE` high: the register loads the frame and the count.
* `LOAD_ENABLE` low: the register shifts by one bit.

The counter runs on its own clock, `LOAD_ENABLE AND LOAD_STRB`, so it advances
only on a real load. Shifting never advances it.

This arrangement has two consequences, and the RTL keeps both on purpose:

* A `LOAD_STRB` pulse while `LOAD_ENABLE` is low shifts one bit and does not
  count.
* An HSS edge while `LOAD_ENABLE` is high performs a load. The controller must
  therefore drop `LOAD_ENABLE` before SEDS starts reading.
  An assertion in `odf_fpga` reports any shift-strobe rising edge while
  `LOAD_ENABLE` is high.

The counter and the register load on the same `LOAD_STRB` edge. The register
therefore captures the count held before that edge. The first frame after
reset carries tag 0, the next carries tag 1, and so on. At 2047 the counter
wraps to 0.

Master Reset (`reset_n`) is active low and asynchronous. It clears the counter
and all 96 register bits. Its polarity is a choice made in this design.

### Frame format

The first bit out is at the top of the table. Every vector leaves most
significant bit first.

| Field | Contents               | Bits |
|-------|------------------------|------|
| 1     | CALTAG                 | 1    |
| 2     | COUNT[10:0]            | 11   |
| 3     | DATA_FROM_CORR[26:0]   | 27   |
| 4     | LNK_ERR_DATA[0]        | 1    |
| 5     | DATA_FROM_CORR[53:27]  | 27   |
| 6     | LNK_ERR_DATA[1]        | 1    |
| 7     | DATA_FROM_CORR[80:54]  | 27   |
| 8     | LNK_ERR_DATA[2]        | 1    |

* `CALTAG` marks data taken in calibrate mode.
* `LNK_ERR_DATA[i]` flags possible data-link corruption of correlator word i.

Inside the register, bit 95 is field 1 and drives the output `Q`. Each shift
moves every bit one place toward bit 95 and takes the fill bit into bit 0.
`odf_pkg::pack_frame` builds this image. `odf_pkg::unpack_frame` recovers the
non-count fields, and the test-mode loopback uses them.

Read-out timing works as follows:

* Once a load has finished, `SER_OUT` already shows the first bit.
* Each rising edge of HSS presents the next bit.
* After 96 edges, the register output shows the first fill bit.

The exact time at which SEDS samples each bit is outside this RTL.

### Test mode

Test mode starts with a Master Reset, after which `TEST_EN` is raised. With
`TEST_EN` high:

* TEST_CLK replaces HSS, TDATA_IN replaces SER_IN, and TDATA_OUT replaces
  SER_OUT. The output that is not selected is held low.
* The load multiplexer feeds every non-count bit back from its own register
  output. A parallel load therefore rewrites those bits unchanged and updates
  only the count field.

This supports two diagnostic sequences:

1. Clock a known pattern in on TDATA_IN and read it back on TDATA_OUT. This
   tests the shift path.
2. Clock a pattern in, perform N parallel loads, and shift the result out.
   The pattern must come back intact, with N-1 in the count field. This tests
   the parallel load and the counter.

## The cascade: `odf_top`

Each device's `SER_OUT` drives the `SER_IN` of the device before it. Device 0
drives SEDS (`ser_out`), and the top-level `ser_in` feeds the last device. All
devices share the load strobes, HSS, TEST_EN, TEST_CLK and reset. Each
device's test pins are separate ports (`tdata_in[k]`, `tdata_out[k]`), because
this design does not assume how a controller wires them.

After a load, HSS reads the following, in order:

1. Device 0's 96 bits.
2. Device 1's 96 bits.
3. Anything on `ser_in`.

Each device has its own counter. All counters advance together, so both
frames of a load carry the same tag. `dev_in[k]` is the 85-bit
`load_word_t` of device k. `N_DEV` can be raised to extend the cascade.

## Sizes and what they cover

* The correlator chain is six correlator chips of 1600 products each, giving
  9600 words per readout. Each load carries six words, so a readout takes 1600
  loads. The 11-bit tag (2048 values) numbers every load uniquely.
* The formatter's correlator fields are 27 bits wide, the width of the
  correlator chip's output bus. The chip's 25-bit two's-complement results
  fit in them.
* The output rate, above 15 Mb/s, and the setup and hold times are properties
  of the physical implementation: an FPGA with 53 ns from HSS to valid output
  and a 24 ns LOAD_ENABLE-to-LOAD_STRB setup. The RTL transfers one bit per
  HSS edge and imposes no rate of its own.

## Where this RTL departs from the original hardware or goes beyond it

* Pad buffers and the global clock buffers that drive the counter and
  register clocks are not modelled. They have no logic function.
* The polarity of reset, the counter's wrap, the low level on the unselected
  output, and the separate test pins per device in the cascade are all
  choices made in this design.
* The correlator, the controller and SEDS are not part of this RTL. Their
  signals are the top-level ports.

## Simulating

Every testbench checks its own results. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing -Irtl -Itb \
  rtl/odf_pkg.sv tb/odf_tb_pkg.sv \
  rtl/odf_counter.sv rtl/odf_load_mux.sv rtl/odf_data_selector.sv \
  rtl/odf_out_demux.sv rtl/odf_shift_reg.sv rtl/odf_fpga.sv rtl/odf_top.sv \
  tb/tb_odf_top.sv --top-module tb_odf_top -o sim && ./obj_dir/sim
```

| Testbench              | What it exercises |
|------------------------|-------------------|
| `tb_odf_counter`       | Reset, one step per edge, wrap at 2048, asynchronous clear |
| `tb_odf_load_mux`, `tb_odf_data_selector`, `tb_odf_out_demux` | The three selectors, with random or exhaustive inputs |
| `tb_odf_shift_reg`     | Load and 96 shifts against the field table; fill order; clear |
| `tb_odf_fpga`          | One device: tagged frames, strobe without enable, both test sequences |
| `tb_odf_top`           | Default two-device cascade. Covers every mechanism above, counts how often each happens, and fails if any never happens |
| `tb_odf_readout`       | A full readout: 1600 loads, 307,200 HSS edges, every bit and every tag checked |

`tb/odf_tb_pkg.sv` holds the reference model. `exp_bit` gives the expected
i-th output bit straight from the field table above. It does not reuse the
design's packing function. All simulations run in well under a second.
