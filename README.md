# Long-line I2C over LVDS: the muon Front-End protocol converter

The Front-End boards of the LHCb muon detector hold their configuration in
I2C-addressed register files (DIALOG chips, 93 registers each, accessed like
an I2C RAM). They sit more than 10 m, and up to 26 m, from the service-board
crates. A plain wired-AND I2C bus does not survive that distance, and
commercial bus extenders are not radiation tolerant. The link therefore runs
over LVDS, which is point-to-point and one-directional. SCL needs only one
lane, because there is a single master. SDA is bidirectional, so it is split
into two lanes:

```
   I2C master side                 converter                 Front-End chain
   (wired-AND SDA)                                       (daisy-chained slaves)

   SCL  ─────────────────────────────────────────────────────▶ SCnx
   SDA  ◀──┬──────▶ [ forward gate: SDA | sdnx_ctrl ] ───────▶ SDnx
           │
           └─ pull low ◀── [ back gate: !sdbp_ctrl & !SDBn ] ◀── SDBn
```

An LVDS lane cannot be wired-AND, so something must decide at every bit who
owns SDA: the master (forward lane active, back lane ignored) or a slave (back
lane copied onto SDA, forward lane held at 1). That decision is what this RTL
does. The converter follows each I2C frame just far enough to know the owner
of every bit: START and STOP, the address byte and its R/W bit, the data
bytes, and the ACK bits. To the master, the far end then looks like an ordinary
I2C bus, so an unmodified I2C master can drive it. In the intended system
that master is one of the 16 I2C channels of the GBT-SCA slow-control ASIC,
reached over the GBT optical link.

## The converter state machine (`core_i2cconv_tmr`)

This is the part that needs the most care. The FSM is one-hot. Each state sets
three registered controls:

- `counte_n`: the bit-counter enable, active low.
- `sdnx_ctrl`: 1 holds the forward lane at 1.
- `sdbp_ctrl`: 1 ignores the back lane.

| state       | code | owner of SDA  | counte_n | sdnx_ctrl | sdbp_ctrl |
|-------------|------|---------------|----------|-----------|-----------|
| IDLE        | h01  | master        | 1        | 0         | 1         |
| START_INIT  | h02  | master        | 1        | 0         | 1         |
| SLAVE_ADDR  | h04  | master        | 0        | 0         | 1         |
| R_OR_W      | h08  | master        | 1        | 0         | 1         |
| ACK_SLAVE   | h10  | slave         | 1        | 1         | 0         |
| MASTER_DATA | h20  | master        | 0        | 0         | 1         |
| SLAVE_DATA  | h40  | slave         | 0        | 1         | 0         |
| ACK_MASTER  | h80  | master        | 1        | 0         | 1         |

SCL and SDA pass through one synchroniser flop. They are then sampled as
`*_new`, with `*_old` holding the value one clock earlier. A rise is
`!scl_old & scl_new`, and a fall is `scl_old & !scl_new`. While `counte_n` is
0, the 4-bit counter counts SCL rising edges; while it is 1, the counter is
held at 0.

Transitions:

- **IDLE → START_INIT** on START: SCL high on both samples, SDA falling.
- **START_INIT → SLAVE_ADDR** on the next clock.
- **SLAVE_ADDR → R_OR_W** on the rising edge that finds `count == 7`. That
  is the 8th bit of the address byte, the R/W bit. SDA is stored as
  `read_flag`.
- **R_OR_W → ACK_SLAVE** on the falling edge that ends the R/W bit.
- **ACK_SLAVE**, on the falling edge that ends the ACK bit, checks the
  sampled SDA:
  - 0 (ACK) and `read_flag` set: go to SLAVE_DATA.
  - 0 (ACK) and `read_flag` clear: go to MASTER_DATA.
  - 1 (no ACK): go to IDLE.
- **MASTER_DATA → ACK_SLAVE** once SCL is low with `count == 8`. That is
  the low phase that opens the 9th clock.
- **SLAVE_DATA → ACK_MASTER** on the falling edge that finds `count == 8`.
- **ACK_MASTER**, on the falling edge that ends the ACK bit:
  - ACK from the master: back to SLAVE_DATA for another byte.
  - NACK from the master: go to IDLE, because the read is over.
- **In any state**, START goes to START_INIT and STOP goes to IDLE. A state
  code that is not one of the eight also goes to IDLE.

The repeated START of a register read (address+W, pointer, repeated START,
address+R) relies on the "START in any state" rule.

Outputs:

- `sdnx = sda_in | sdnx_ctrl`
- `sda_pull = !sdbp_ctrl & !sdbn`
- `scnx = scl`
- `led_comm = (state != IDLE)`

The controls are registered, and the lane paths are combinational from the
inputs. The outputs therefore depend on both state and inputs (a Mealy
machine). An assertion checks that the two lanes are never both handed over
at once.

### Timing

A change of SCL is acted on at the 3rd `clk` edge after it: one synchroniser
stage plus the `old`/`new` pair. The testbenches check this latency. The
slave's bit reaches the master's SDA after these delays, which add up:

- the SCL fall crosses the cable to the slave;
- the slave drives the back lane, and that crosses the cable back;
- on the 9th clock of a byte, up to about four `clk` cycles pass before the
  converter switches direction.

The total must be well under the SCL low time. At 1 MHz SCL (500 ns low) with
a 50 MHz `clk` and 26 m of cable (about 130 ns each way), about 340 ns of the
500 ns is used. The design has no clock stretching: there is a single master,
and slaves cannot hold SCL.

### Where this FSM departs from the published flow chart

- In the published chart, the MASTER_DATA exit, "SCL low and 8 bits
  counted", leads back into R_OR_W. R_OR_W keeps the master-to-slave direction
  and waits for one more SCL fall. The slave's ACK to a written data byte
  would not be passed back, and the FSM would fall one clock behind. Here that
  exit goes directly to ACK_SLAVE, the state whose outputs the ACK clock needs.
  The exit condition is unchanged.
- The chart does not give these, so they are choices made here:
  - the counter semantics;
  - the polarity of the two lane controls;
  - the extra synchroniser stage;
  - START and STOP acting from every state.
- The chart shows entry points named `sysres_`, `state_comp_` and `fsmres_`.
  Here they are the asynchronous reset and the illegal-state recovery;
  `fsmres_` has no separate source.

## Radiation hardening (`tmr_reg`)

Every register of the FSM is triplicated: state, counter, read flag, lane
controls and samplers. They are packed into one 22-bit struct. The value used
is the bitwise 2-of-3 majority of the three copies. The voted value feeds the
next-state logic and is loaded into all three copies, so an upset in one copy
is outvoted at once and overwritten on the next clock.

The original implementation got the same effect from a synthesis directive.
Here the triplication is explicit RTL. Each copy is written by its own
process, and the copies and their processes carry `keep`/`syn_preserve`
attributes, so synthesis does not merge the three equivalent flip-flops.
Yosys keeps all three copies: 66 flip-flops per channel. A flow that ignores
these attributes would collapse them into one.

## Channel and board level

- **`i2cconv_2in`** puts a 2:1 input selector in front of the core. A main
  master (normally the GBT-SCA) and an auxiliary debug master each have SCL,
  an SDA level input and an SDA pull-down output. `in_sel` chooses one:
  0 = main, 1 = aux. The SDA pull-down goes only to the selected master. The
  selector is combinational: change `in_sel` only while the bus is idle.
- **`muon_nsb_i2c_top`** holds one such channel per Front-End channel:
  `N_CH = 12` for one service-board FPGA. It also passes each channel's
  Front-End reset and test pulse to the chain side. The channel reset, active
  low, also resets that channel's converter.

Not in the RTL:

- The FPGA pad buffers: single-ended inputs, the open-drain SDA pads, the LVDS
  receivers and drivers.
- The clock conditioning circuit that produces `clk`.

All ports are plain logic levels. An SDA `*_pull` output is the enable of an
open-drain pad whose data input is tied low.

## Verification

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. They use two behavioural models:

- `tb/i2c_master_model.sv`: an I2C master with register-write,
  register-read (with repeated START) and probe tasks. It handles at most 16
  bytes per frame, like the GBT-SCA buffer.
- `tb/dialog_model.sv`: an I2C-RAM slave with 93 registers and pointer
  auto-increment, on the split lanes. A chain is modelled by ANDing the
  slaves' back-lane outputs.

| testbench              | what it shows |
|------------------------|---------------|
| `tb_tmr_reg`           | loads; single-copy upsets masked and repaired; double upsets follow the majority |
| `tb_core_i2cconv_tmr`  | address scan finds exactly 0x30..0x35; alternating write/read; 2..16-byte frames at registers 0x00 and 0x14; NACK from a missing device; single upsets mid-frame; 3-edge reaction time; all 8 states reached |
| `tb_i2cconv_2in`       | traffic via main, then via aux; the unselected master is neither answered nor pulled |
| `tb_muon_nsb_i2c_top`  | all 12 channels at once, at default parameters, behind 130 ns cable delays; half on aux; channel reset mid-frame; TMR upsets; counts of every mechanism (repeated START, slave NACK, master NACK, back-lane drive, ...) |
| `tb_wr_endurance`      | 6000 write+read pairs on six chips behind the cable with no NACK or data error; bus time per pair checked (67.5 us at 1 MHz) |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_muon_nsb_i2c_top \
  rtl/i2cconv_pkg.sv rtl/tmr_reg.sv rtl/core_i2cconv_tmr.sv rtl/i2cconv_2in.sv \
  rtl/muon_nsb_i2c_top.sv tb/i2c_master_model.sv tb/dialog_model.sv \
  tb/tb_muon_nsb_i2c_top.sv
./obj_dir/Vtb_muon_nsb_i2c_top
```

Each of these runs in seconds. The lower-level testbenches need only the files
of their own module and its submodules.

## How far to trust it

- The core implements a published flow chart. Where the chart is ambiguous,
  the choices above were made and then checked against behavioural slave
  models, not against real DIALOG chips or a real GBT-SCA.
- Clock stretching and multi-master arbitration are
  not handled.
- An address that no chip acknowledges ends the frame in IDLE, as a NACK
  should.
- Gate-level behaviour of the majority voter, and resource use on the target
  FPGA, have not been checked here.

## Files

- `rtl/i2cconv_pkg.sv`: state encoding, register bundle, reset values.
- `rtl/tmr_reg.sv`: triplicated register with majority voter.
- `rtl/core_i2cconv_tmr.sv`: the converter FSM and lane gating.
- `rtl/i2cconv_2in.sv`: two-input channel.
- `rtl/muon_nsb_i2c_top.sv`: twelve channels.
- `tb/`: the testbenches and the two behavioural models.
