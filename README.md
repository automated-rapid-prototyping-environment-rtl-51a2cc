# FPGA hardware-in-the-loop prototype: SRRC transmit filter behind a CPU register wrapper

An algorithm written in C is turned into a clocked hardware block and placed in an
FPGA on a DSP board. From there a block-based system simulation on a PC can use it as
one of its blocks ("hardware in the loop"). The simulation sends one block of input
samples over Ethernet to the board's microcontroller. The microcontroller writes the
samples into the FPGA over its 32-bit memory bus and starts the prototype. It then
waits for an interrupt, reads the results back over the same bus and returns them to
the PC.

This repository holds the FPGA side of that loop:

* **the prototype**: a 13-tap square-root raised-cosine (SRRC) transmit filter with
  upsampling by 2, in the resource-shared form described below (`srrc_opt`);
* **the register wrapper** that maps the prototype's ports onto the CPU bus
  (`rpt_shell`);
* **the control and status registers** for the start/finish handshake (`cold_reg`);
* **the clock manager** that makes the prototype clock (`rpt_dcm`, a simulation model);
* **the dual-ported common RAM** shared by the board's CPU and DSP (`common_ram`);
* **the FPGA top shell** that decodes the CPU address space (`rpt_fpga_top`);
* **a small combinational example**, `art_comb_example`, which shows how C operations
  map one to one onto hardware operators. It is separate from the prototyping path and
  has its own ports on the top.

The microcontroller, the DSP, the board memories and the Ethernet PHY are outside the
FPGA and are not modelled. Their signals are ports of the top. The top-level
testbench plays the part of the microcontroller software.

## The prototype: an upsampling SRRC filter in 2N steps

### Arithmetic

The filter has 13 coefficients b0..b12. They come from roll-off α = 0.18, upsampling
K = 2 and a group delay of 3 symbols, so M = 2·K·3 = 12. Two properties shrink the
filter:

* **The coefficients are symmetric** (b_n = b_(12−n)). Two samples that share a
  coefficient are added first and then multiplied once.
* **Upsampling inserts a zero after every input sample.** The zero samples contribute
  nothing, so only every second tap of the 13-tap line holds a real sample. The delay
  line therefore keeps only the real samples, M/K + 1 = 7 entries (x0 = newest).

Each input sample then produces two output samples, one per phase:

```
even phase  y[2k]   = b0(x0+x6) + b2(x1+x5) + b4(x2+x4) + b6·x3     (new sample just shifted in)
odd  phase  y[2k+1] = b1(x0+x5) + b3(x1+x4) + b5(x2+x3)             (delay line unchanged)
```

The three symmetric products share three multipliers, whose coefficients switch with
the phase. A fourth multiplier handles the centre tap b6 and is used only in the even
phase. At most four multiplications happen per step.

### Coefficients and number format

Samples and coefficients are 16-bit two's-complement fractions (1 sign bit, 15
fraction bits, range [−1, 1)). The seven distinct coefficients are stored as integers
in units of 2^−15: floor(b·32768).

| coefficient | value | stored |
|---|---|---|
| b0 = b12 | −0.025847303 | −847 |
| b1 = b11 | 0.065168615 | 2135 |
| b2 = b10 | 0.030577806 | 1001 |
| b3 = b9 | −0.134189054 | −4398 |
| b4 = b8 | −0.033691436 | −1105 |
| b5 = b7 | 0.444705414 | 14572 |
| b6 | 0.741884497 | 24310 |

They are kept in `rpt_pkg`.

In each step:

1. Each symmetric sum is formed at 16 bits and wraps on overflow.
2. Each 16×16 product is cut back to 16 bits by dropping its 15 low bits, keeping
   `prod[30:15]`. This truncates towards −∞.
3. The accumulator is 16 bits and wraps.

All three choices are this design's own. The specification fixes only the 16-bit
fractional format. For any input block the filter's result is fixed bit for bit. Its
impulse response differs from the real-valued filter by a few LSBs, about 10^−4.

### Time frames, `index` and `done`

The block follows the structure a C-to-HDL compiler produces for a C function that
keeps state:

* a combinational *compute* process that evaluates one call of the function;
* a *reset/update* process that commits the state at the clock edge, but only when
  `enable` is high. Its reset `rst_a` is asynchronous.

One enabled clock cycle is one call of the function. The state is the 7×16-bit delay
line and an 8-bit step counter `index`.

* A block of N input samples (N = 8) produces 2N = 16 outputs `y` and N outputs
  `y_dec` (y_dec[k] = y[2k]). This takes exactly **2N enabled clock cycles**.
* In step `index` the block computes y[index]. On even steps it first shifts
  u[index/2] into the delay line and also writes y_dec[index/2].
* In the last step (index = 2N−1), `done` is high combinationally and `index` wraps
  to 0.
* The delay line is never cleared between blocks. It is the filter's memory, so
  consecutive blocks form one continuous signal.

The block does not store its outputs. For each step it drives the sample (`y_sample`)
and one-hot write selects (`y_sel`, `ydec_sel`). The wrapper's output registers capture
the sample through them. While `enable` is low, nothing is selected and nothing
changes.

## The register wrapper and the handshake

### Memory maps

`rpt_shell` (ports `iClk`, `iClkRPTCalc`, `iRst`, `iAddr[19:0]`, `iData`, `oData`,
`iEnInput`, `iEnWr`, `iInDataRdy`, `oOutDataRdy`) gives the prototype two contiguous
memory maps. A contiguous map lets the CPU move each map in a single block transfer.

* **Input map, write only:** 32-bit word k (byte offset 4k) is input sample u[k].
  * Only bits [15:0] are stored; the upper bits are ignored.
  * The registers are clocked by the CPU clock.
  * A write counts when `iEnInput` and `iEnWr` are high.
  * Writes beyond word N−1 are ignored.
* **Output map, read only:**
  * words 0..2N−1 hold y;
  * words 2N..3N−1 hold y_dec;
  * words are sign-extended to 32 bits;
  * the registers are clocked by the prototype clock;
  * `oData` is a combinational multiplexer indexed by `iAddr[19:2]`;
  * words beyond the map read 0.

All input words are visible to the prototype at once. This is what makes a register
wrapper the most flexible kind: the prototype may read any input in any step.

### One prototype run

| step | CPU clock | prototype clock (CPU/10) |
|---|---|---|
| 1 | CPU writes N words to the input map | — |
| 2 | CPU writes 1 to *FPGA Control* (bit 0 = `iInDataRdy`) | prototype enabled |
| 3 | — | 2N steps; the last one stores y[2N−1] and raises `done` |
| 4 | — | `oOutDataRdy` = 1 for one prototype cycle |
| 5 | edge detected: *FPGA Control* cleared, *IR* flag set, `cpu_irq` high | prototype idle |
| 6 | CPU reads 3N words from the output map and writes 0 to the *IR* flag | — |

`oOutDataRdy` is a registered copy of `enable && done`. The prototype enable is
`iInDataRdy && !oOutDataRdy`. This masking matters:

* The CPU-side register clears `iInDataRdy` only after it has seen the pulse.
* Without the mask, the enable would still be high on the next prototype edge and a
  second block would start.
* With it, a block runs exactly once per start command, even if software sets the
  control bit again right away.

The result is a fixed cost of one idle prototype cycle between runs.

**Latency.** At the defaults (N = 8, divider 10), the time from the CPU's write to
*FPGA Control* to the interrupt is 2N prototype cycles plus about two CPU cycles. The
exact count depends on where in the slow clock period the write lands. The end-to-end
testbench checks that every run lies in [(2N−1)·10 + 2, 2N·10 + 1] CPU cycles
(measured: 157 to 160).

### Clocking

* `rpt_dcm` is a behavioural model of the FPGA's clock manager.
  * `CLK0` follows the CPU clock.
  * `CLKDV` runs at CPU clock / `CLKDV_DIVIDE`. Its rising edges coincide with CPU
    rising edges.
* The wrapper passes signals between the two domains without synchronisers. This is
  valid only because the clocks are phase-aligned and come from one source.
* If the prototype clock is changed to an unrelated clock, the wrapper needs proper
  clock-domain crossings.
* The model updates both clocks in one process. Flip-flops on either clock therefore
  see the same pre-edge values, as they would in hardware.
* The whole FPGA is held in reset until `LOCKED` rises.

In the FPGA the model is replaced by the vendor's clock manager. `rpt_dcm.sv` is the
only file that is not synthesizable.

## CPU address map (`rpt_fpga_top`)

CPU address bits [31:20] select a window. Bits [19:0] are the offset inside it.

| window | block | contents |
|---|---|---|
| `FF0xxxxx` | `cold_reg` | control/status registers |
| `FF1xxxxx` | `common_ram` | RAM shared with the DSP (CPU port) |
| `FF2xxxxx` | `rpt_shell` | input map (write only) |
| `FF3xxxxx` | `rpt_shell` | output map (read only) |

Each window spans 1 MByte. In practice the FPGA's resources limit the maps long before
that.

Registers (byte offsets, 32 bits wide):

| offset | name | behaviour |
|---|---|---|
| `0x1C` | Coldfire IR | bit 0 = finished interrupt flag. Set by the hardware; the CPU clears it by writing 0. It drives `cpu_irq`. |
| `0x28` | Input RAM Size | read only, bytes in the input map (4N = 32) |
| `0x2C` | Output RAM Size | read only, bytes in the output map (12N = 96) |
| `0x30` | Input Request Size | read only, mirrors Input RAM Size |
| `0x34` | Output Available Size | read only, mirrors Output RAM Size |
| `0x38` | FPGA Control | bit 0 = prototype enable. Set by the CPU; cleared by the hardware when the prototype finishes. |

Other offsets read 0 and ignore writes. If a hardware event and a CPU write reach the
same register in the same cycle, the hardware event wins.

The bus interface is plain signals:

* inputs `cpu_cs`, `cpu_we`, `cpu_addr`, `cpu_wdata`;
* output `cpu_rdata`;
* register and output-map reads are combinational;
* common-RAM reads return data one CPU cycle after the address.

## Common RAM

The common RAM is a true dual-port memory of 2^`COMMON_ADDR_W` 32-bit words (default
1024 words = 4 KByte).

* Port A is the CPU window; port B is the DSP's external memory interface (`dsp_*`
  ports).
* Each port has its own clock, enable, write enable and registered, read-first output.
* The prototype does not use the RAM. It is kept because the board's flash and
  reconfiguration path depends on it, so every FPGA configuration must keep it working.
* When both ports write the same word in the same cycle, the result is undefined.

The array is written from two clocked processes, one per port. This is the usual way
to describe a true dual-port block RAM, and linters report it as a multi-driven
signal.

## Combinational example (`art_comb_example`)

This block computes a 16-bit result from two 4-bit signed inputs with one chain of
operations and no clock:

1. add: d = a + b;
2. increment: e = d + 1;
3. OR: f = e | d;
4. signed compare and absolute difference: |f − e|;
5. an unrolled loop that adds a·i for i = 0..3.

The widths follow the C types: the intermediates wrap at 4 bits and the result at 16
bits. The block is on the top for completeness and shares nothing with the prototype.

## Where this design departs from, or adds to, the described system

* **Coefficient rounding:** floor(b·32768). The specification gives the real values
  only.
* **Datapath rounding:** products are truncated and sums and accumulation wrap, as
  described above.
* **Finish pulse:** `oOutDataRdy` is a one-cycle registered pulse and masks the enable.
  The described system says only that the finish signal clears the enable and raises
  the interrupt.
* **Input storage:** input words keep only the 16 bits the prototype uses. The described
  wrapper has a 32-bit register file whose unused bits are removed by synthesis; the
  effect is the same.
* **Output format:** output words are sign-extended to 32 bits.
* **IR flag writes:** writing 1 to the IR flag sets it.
* **Size registers:** the request/available size registers mirror the fixed sizes
  rather than being set at run time.
* **Bus interface:** the bus signal set, the reset held until clock lock, the common-RAM
  depth and its 32-bit DSP port are this design's choices.
* **Clock managers:** the described FPGA used two clock managers and further board
  logic in its top shell. Only the prototype clock manager and the blocks listed above
  are built here.
* **Wrapper type:** only the register wrapper is built. RAM-based and FIFO-based
  wrappers are discussed as alternatives in the background material and are not part
  of this design.
* **Out of scope:** the board's processors, memories, Ethernet transceiver and the
  PC-side software.

Confidence:

* The filter arithmetic is checked bit for bit against an independent model, and
  against a real-valued FIR within ±0.0005.
* The handshake and address map are checked end to end.
* Timing on a real FPGA was not measured. The design needs a 6.6 MHz prototype clock
  (CPU clock 66 MHz / 10). Its longest path is four multiply-adds, which by ordinary
  estimates is far shorter than the 151 ns period.

## Files

| file | content |
|---|---|
| `rtl/rpt_pkg.sv` | number format, filter constants, coefficient tables, address windows, register offsets |
| `rtl/srrc_opt.sv` | the SRRC prototype |
| `rtl/rpt_shell.sv` | register wrapper with input/output maps and handshake |
| `rtl/cold_reg.sv` | control/status registers |
| `rtl/common_ram.sv` | dual-port common RAM |
| `rtl/rpt_dcm.sv` | clock manager model (simulation only) |
| `rtl/art_comb_example.sv` | combinational example |
| `rtl/rpt_fpga_top.sv` | FPGA top shell |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a
testbench that hangs and counts it as a failure.

* `tb_srrc_opt`: the filter is enabled in random bursts. Every output is compared with
  a bit-exact history model and a real-valued FIR, across block boundaries.
* `tb_rpt_shell`: the wrapper with a divide-by-4 clock; includes back-to-back runs and
  their period.
* `tb_rpt_fpga_top`: uses the top at its default parameters. It acts as the CPU
  software and does the following:
  * runs 10 filter blocks, including an impulse that yields the impulse response;
  * checks every output word, the interrupt latency, the enable self-clear, the flag
    clear, the idle state between runs and ignored out-of-range writes;
  * exchanges words through the common RAM in both directions, between the CPU and a
    DSP-side driver on its own clock.

  It counts how often each of these happened and fails if any never did.

## Simulating

Verilator 5 with `--timing` is enough. The package must come first. For example:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/rpt_pkg.sv tb/tb_rpt_fpga_top.sv \
          --top-module tb_rpt_fpga_top
./obj_dir/Vtb_rpt_fpga_top
```

Replace `tb_rpt_fpga_top` with any other testbench name to run that block on its own.
Each simulation finishes in seconds.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `rpt_fpga_top`, `rpt_shell`, `srrc_opt` | `N` | 8 | input block size. The output map is 3N words; a run takes 2N prototype cycles; allowed 1..128. |
| `rpt_fpga_top` | `CLK_DIVIDE` | 10 | prototype clock = CPU clock / `CLK_DIVIDE` |
| `rpt_fpga_top` | `COMMON_ADDR_W` | 10 | common RAM address width in 32-bit words |
| `rpt_dcm` | `LOCK_CYCLES` | 16 | model only: input cycles from reset release to lock |
| `cold_reg` | `IN_RAM_BYTES`, `OUT_RAM_BYTES` | 32, 96 | values shown by the size registers. The top sets them from `N`. |

Changing the filter itself means changing the coefficient tables and tap constants in
`rpt_pkg` and the symmetric pairing in `srrc_opt`. The phase split assumes an odd
number of taps, with taps = 4·(group delay)+1 at K = 2.
