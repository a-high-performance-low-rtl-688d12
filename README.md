# AMBA interface for DSP IP cores, with gated clocks

DSP accelerators usually reach a processor through a wrapper protocol and a
bus adapter. That adds logic, and it keeps the accelerator's clock running
whether or not it has work. This design connects FIR filter cores straight to
an AMBA 2 system. The interface is an **AHB slave** that takes all input data,
and an **APB device** that returns results. Everything else about the bus
stays out of the cores. A core sees only "load this value", "you were read"
and its own clock.

The power saving comes from the AHB pipeline. On AHB the address of a transfer
arrives one cycle before its data. In that cycle the interface decodes the
address and knows which core the data will concern. It can therefore switch on
that core's clock for exactly the edge that loads the data. Every other clock
in the block stays stopped.

With the default parameters, three identical cores (`NUM_CORES = 3`) are
attached. Each is a 16-tap FIR filter (`TAPS = 16`) with 16-bit samples and
coefficients (`DW = 16`).

```
            AHB (HSEL, HADDR, HTRANS, HWRITE, HSIZE, HBURST, HWDATA)        APB (PSEL, PENABLE,
                 |                                                              PADDR, PWRITE)
   +-------------v-------------+                                          +-------v--------+
   | ahb_decoder               |--- core_req ----+          +--apb_req----| apb_decoder    |
   |  address-phase decode     |--- PMU mode ----+          |             |  reads only,   |
   |  look-ahead next state    |                 v          v             |  no FSM        |
   |  clock gate -> g_clk_0    |            +---------------------+       +-------+--------+
   +------+-------------+------+            | clock_controller    |               |
   next_state     g_clk_0                   |  one clock gate per |           PRDATA
          v             v                   |  core -> g_clk[k]   |
   +---------------------------+            +----------+----------+
   | ahb_data_fsm              |                       | g_clk[0..N-1]
   |  data-phase state         |  din, tap, load_x,    v
   |  HWDATA -> core inputs    |-- load_h, rd_y ---> dsp_core x NUM_CORES
   |  core outputs -> HRDATA   |<-- y(n), status --- (FIR, one shared MAC)
   +---------------------------+
```

## The three clock levels

| clock      | drives                                   | runs when |
|------------|------------------------------------------|-----------|
| `clk`      | decoder look-ahead register, PMU registers in `clock_controller` | always |
| `g_clk_0`  | AHB data FSM                             | a transfer is being decoded, or the FSM is not idle |
| `g_clk[k]` | everything in DSP core k                 | AHB request one cycle earlier, APB read access, core busy, or PMU mode "always on" |

Each gated clock comes from `clock_gate`. This cell latches the enable while
`clk` is low and ANDs the latched enable with `clk`. An enable therefore only
has to be stable before the rising edge it should let through, and a gated
clock can never glitch. The latch is intentional. For synthesis, replace
`clock_gate` with the library's integrated clock-gating cell. The ports stay
the same.

### One write, cycle by cycle

Take a write of sample `0x000042DE` to the x(n) input of core 1 at address
`0xA3000000`. The transfer has no wait states:

```
clk            _|‾|_|‾|_|‾|_|‾|_
HADDR/HTRANS    [0xA3000000 NONSEQ][ IDLE          ]
HWDATA                             [ 0x000042DE    ]
g_clk_0 edges               ^ (1)             ^ (2)
FSM state       IDLE        |  DSP1 input     |  IDLE
g_clk[0] edges                                ^ loads 0x42DE, then TAPS more edges
```

1. **Address phase.** `ahb_decoder` decodes the address. It turns on `g_clk_0`
   and presents the FSM's next state, "write x to core 0". It also raises
   `core_req[0]`.
2. **Edge (1).** The FSM enters the data-phase state. `clock_controller`
   registers `core_req`, so core 0's clock is enabled for the next edge.
3. **Data phase.** The FSM drives `load_x[0]`, and `HWDATA[15:0]` is on `din`.
   `g_clk_0` stays on because the FSM is not idle.
4. **Edge (2).** The FSM returns to IDLE. Core 0 gets its first edge and
   captures `0x42DE`.

An isolated transfer therefore costs the FSM exactly two clock edges. It costs
the addressed core one edge, plus the edges the core needs for its own work.
Back-to-back transfers simply keep `g_clk_0` running.

Reads follow the same path. The FSM's data-phase state selects the core's
output or status word onto `HRDATA`. The core is clocked at the end of the
data phase, so it can clear its "new output" flag.

An APB read has no state machine. `PRDATA` is decoded from `PADDR` while
`PSEL` is high and `PWRITE` is low. During the access phase (`PENABLE` high)
the APB decoder requests one core edge. APB writes are ignored.

## Programmer's view

The interface decodes the same address fields from `HADDR` and `PADDR`:

| bits    | field | meaning |
|---------|-------|---------|
| [27:26] | core  | 0 = first core … `NUM_CORES-1` |
| [25:24] | port  | 3 = sample x(n) (write), 2 = coefficient h(n) (write), 1 = output y(n) (read), 0 = status (read) |
| [13:12] | PMU   | 0 = core clock gated (default), 1 = core clock always running |
| [9:2]   | tap   | coefficient number for port 2; it is the word offset, so an incrementing burst loads consecutive taps |

Bits [31:28] are left to the system address decoder, which drives `HSEL` and
`PSEL`.

The interface acts on an AHB transfer when `HSEL` is high, `HTRANS` is NONSEQ
or SEQ, and `HSIZE` is at most a word. Every such access sets the addressed
core's PMU mode from bits [13:12].

- **Sample x(n).** A write to port 3 takes `HWDATA[15:0]` as a signed sample
  and starts the filter. A sample that arrives while the core is busy is
  dropped, and the core's overrun flag is set.
- **Output y(n).** A read of port 1 returns the last output, sign-extended to
  32 bits. The read clears the core's "new output" flag.
- **Status.** A read of port 0 returns bit 0 `busy`, bit 1 `new output` and
  bit 2 `overrun`. The read clears `overrun`.

`HREADY` is always 1 and `HRESP` is always OKAY. The interface ignores, without
an error response, any transfer it does not serve:

- a core that does not exist;
- a write to an output;
- a read of an input;
- a transfer wider than a word.

Reads of such addresses return zero, and none of them starts a gated clock.

A typical driver loop works like this:

1. Write the coefficients once, as single writes or an INCR burst.
2. For each sample, write x(n).
3. Read y(n), leaving at least one idle bus cycle after the write, or poll
   status until bit 1 is set.

Wait `TAPS` cycles, or poll `busy`, before writing the next sample.

## The FIR core (`dsp_core`)

The filter is in transposed direct form. Each new sample is multiplied by every
coefficient and added into a chain of partial sums:

```
y(n)       = h[0]*x(n) + s[1]
s[k]      <= h[k]*x(n) + s[k+1]      k = 1 .. TAPS-2
s[TAPS-1] <= h[TAPS-1]*x(n)
```

There is only one multiply-add unit (`dsp_mac`). The sample sits in a register
and stays constant on one multiplier input, while the tap counter
(`dsp_counter`) steps the coefficients through the other. This keeps switching
low on the sample side of the multiplier.

The core handles one tap per clock:

- **Tap 0** produces y(n). The result goes through `dsp_round` into the output
  register (reg_out), so the output is ready **one cycle after the load**.
- **Taps 1 … TAPS-1** rewrite the partial sums. They are processed in
  ascending order, so each `s[k+1]` is read before it is overwritten.

Per sample, the core is busy for `TAPS` cycles. During those cycles `busy`
keeps its clock running. After that the clock stops again, unless PMU mode 1
is set.

The core's memory (`dsp_ram`) is two small register files. One holds
`TAPS × DW` coefficients. The other holds `(TAPS-1) × ACC_W` partial sums,
where `ACC_W = 2*DW + log2(TAPS)` (36 bits by default), so that no sum can
overflow.

After reset, the controller (`dsp_ctrl`) spends `TAPS` cycles writing zeros
into the partial sums, so the filter starts from an empty history. The core is
busy during this time.

Number formats:

- Coefficients are Q15: `0x7FFF` is about +1.
- Samples and outputs are 16-bit integers.
- The output is `(Σ h[k]·x(n-k) + 2^14) >> 15`, saturated to 16 bits.

## Parameters

| parameter   | default | where |
|-------------|---------|-------|
| `NUM_CORES` | 3       | `amba_interface` (1 … 4, limited by the 2-bit core field) |
| `TAPS`      | 16      | `amba_interface`, `dsp_core` (at least 3, at most 256) |
| `DW`        | 16      | data width of samples, coefficients and outputs |

Shared constants and types are in `amba_if_pkg`. These include the address
field positions, the FSM state struct, the port and PMU encodings, and the
status bit positions.

## How far it follows the reference design, and where it departs

These parts follow the reference architecture:

- The split into AHB decoder, data FSM, APB decoder and clock controller.
- The three clock levels and the names `g_clk_0` (FSM) and `g_clk_1 …` (cores).
  Here the core clocks are the vector `g_clk[k]`.
- The look-ahead decode, and the two FSM edges plus one core edge per transfer.
- Inputs over AHB only; outputs over AHB or APB.
- The APB side, which ignores writes and has no FSM.
- The example address `0xA3000000` selecting the input of the first core.
- A transposed-form FIR core built from a MAC, RAM, control, counter, rounding
  and output register.
- Three cores as the main configuration.

The following are this design's own choices, because the reference leaves them
open:

- All address-field positions, apart from matching that one example address.
  What the "burst number" is (here, the tap number) and what the PMU mode does
  (here, gated or always-on).
- The filter length (16), the number formats, the rounding, and the
  reset-time clearing.
- The status word, the overrun and new-output flags, and keeping a core's clock
  on while it is busy. The reference speaks of a one-cycle clock request, but a
  core with a single time-shared multiplier needs `TAPS` cycles of work after
  the load.
- No wait states or error responses. `HRESP` is the AMBA 2 width of 2 bits.
  There is no `HREADY` input: the interface assumes it is the only slave whose
  ready signal matters. In a multi-slave AHB, qualify `HSEL` with the system
  `HREADY` before connecting it.
- Asynchronous, active-high `reset`.

These are known gaps:

- All cores are identical: two inputs (x, h) and one output. The port field
  leaves room for four ports, but cores with different numbers of inputs and
  outputs are not provided.
- The reference core also has two registers, reg_beta and reg_gamma. Their
  purpose is not specified, so they are not modelled.
- There is no coefficient-reordering scheme. Taps are processed in index order.
- The surrounding platform is not included: processor, caches, AHB
  arbiter/decoder, APB bridge, memory controller, timer, UART, I/O port and
  interrupt controller. `amba_interface` brings out the plain AHB-slave and APB
  signals where these would connect.

## Files

`rtl/`, one module or package per file:

- `amba_if_pkg.sv`: shared types and constants.
- `amba_interface.sv`: top level. It contains APB protocol assertions and a
  check that only one core is loaded at a time.
- `ahb_decoder.sv`, `ahb_data_fsm.sv`, `apb_decoder.sv`, `clock_controller.sv`,
  `clock_gate.sv`: the interface.
- `dsp_core.sv`, `dsp_ctrl.sv`, `dsp_counter.sv`, `dsp_mac.sv`, `dsp_ram.sv`,
  `dsp_round.sv`: the FIR core.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`.

`tb_amba_interface` runs the whole block at its default parameters:

- It loads coefficients by single writes and by an INCR burst.
- It replays the write of `0x42DE` to core 1 shown above and checks every edge.
- It streams random samples through all three cores and checks the results
  against a direct-form FIR computed in the testbench.
- It reads over both AHB and APB.
- It issues pipelined writes and reads to all three cores, each address phase
  overlapping the previous data phase.
- It triggers an overrun, runs two cores at once, uses PMU mode 1, and issues
  ignored transfers.

It counts each of these mechanisms and fails if any of them never happened. It
also counts gated-clock edges, to check that idle clocks really stop.

`tb_clock_activity` measures what the gating buys. Every core receives one
sample per 64 bus cycles, and its output is read back over the AHB. Every
transfer is isolated, so the edge counts are exact, and the testbench checks
them:

- the FSM clock gets 2 edges per transfer;
- each core clock gets 1 + `TAPS` + 1 edges per sample.

With the defaults, the FSM clock runs on 18 % of system clock edges and each
core clock on 28 %. The same stream with PMU mode 1 runs each core clock on
99 %.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/amba_if_pkg.sv \
          tb/tb_amba_interface.sv --top-module tb_amba_interface
./obj_dir/Vtb_amba_interface
```

Replace `tb_amba_interface` with any other testbench name to run a single
module's test. All testbenches finish in well under a second.
