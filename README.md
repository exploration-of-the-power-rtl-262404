# Dual soft-processor system with FIFO-driven clock scaling

Two soft processors share an application: one pre-processes or splits the
data, the other finishes it. When the partition is uneven, the slower
processor falls behind and the words its partner sends it pile up in the link
between them. This design uses exactly that pile-up as its performance
sensor. The inter-processor link (the *bridge*) watches its two FIFOs; when
the FIFO a processor reads from is 75 % full, that processor is declared too
slow and a *reconfigurable clock unit* raises its clock by reprogramming the
DCM that generates it. If the slow processor cannot go any faster, the fast
one is slowed down instead. The aim is a power/performance trade-off: run
each processor no faster than the partition needs.

The RTL here contains the three custom components of such a system and the
top level that ties them together:

```
             host (PCI side)                               CLK_IN 50 MHz
                  |                                              |
           +-------------+                         +---------------------------+
           |  virtual-IO |                         |  reconfigurable clock unit |
           |  in FIFO -> |--link--> uB0 <----------|  DCM0 -> BUFGMUX0 -> clk0  |
           |  in FSM     |--link--> uB1 <----------|  DCM1 -> BUFGMUX1 -> clk1  |
           |  out FSM <- |<-link--- uB0            |  logic: XOR, reset ctrl,   |
           |  out FIFO   |<-link--- uB1            |  counter, monitor, switcher|
           +-------------+         |  ^            +---------------------------+
                                   v  |                   ^ reconf_req0/1
                             +--------------+              |
                             |    bridge    |--------------+
                             | FIFO 0->1    |
                             | FIFO 1->0    |
                             +--------------+
```

The processors (uB0, uB1), their simplex links, the host bus controller and
the processors' peripherals are vendor IP and are not part of this RTL; their
connection points are ports of `mpsoc_top`.

## The reconfigurable clock unit

This is the part with the most behaviour, and the one to read first
(`reconf_clock_unit.sv`, `rcu_logic.sv` and its five sub-blocks).

### Why the processor is moved to CLK_IN

A DCM's synthesised output (CLKFX = CLK_IN x M / D) is changed by holding the
DCM in reset, writing new M and D values through its dynamic reconfiguration
port, releasing the reset and waiting for LOCKED. The reset must be held for
200 ms, far too long to stall a processor. Instead, each processor clock goes
through a glitch-free clock multiplexer (BUFGMUX) whose other input is CLK_IN
itself. During a reconfiguration the affected processor keeps running, at the
CLK_IN frequency; the other processor is not touched.

### One reconfiguration, step by step

All control logic runs on CLK_IN. `rcu_logic` steps through:

| state | action | leaves when |
|---|---|---|
| `S_IDLE` | the XOR block shows exactly one request and the counter offers a command | immediately (the command is taken) |
| `S_BYPASS` | select CLK_IN on the chosen processor's BUFGMUX | the switcher acknowledges, `SETTLE_CYCLES` later |
| `S_RESET` | reset controller holds the DCM in reset for `HOLD_CYCLES`; meanwhile the monitor writes address 0x50 with `{M-1, D-1}` and waits for DRDY | both the write and the hold are over |
| `S_LOCK` | the DCM runs with its new ratio | LOCKED rises |
| `S_RESTORE` | select the DCM output again | acknowledged; `reconf_done` pulses |

At defaults (50 MHz CLK_IN, 10,000,000-cycle hold) one reconfiguration takes
just over 200 ms; apart from the hold it costs `LOCK` time plus about
`2 x SETTLE_CYCLES + 10` CLK_IN cycles. Only one DCM is ever being
reconfigured, and a request that arrives while the unit is busy waits.

At power-up both DCMs are reset briefly (`INIT_CYCLES`), both processors run
on CLK_IN, and the logic moves them to their DCMs once both have locked
(`clk_locked` then goes high).

### Which DCM, and which way

The two bridge requests are asynchronous to CLK_IN. `rcu_xor_block`
synchronises each with two flip-flops and passes a request only if exactly
one of them is active: when both processors are starved at once, there is
nothing sensible to speed up, and nothing happens. Its output appears three
CLK_IN edges after a change of the inputs.

`rcu_reconfig_counter` keeps, per DCM, the current M and D, the number of
reconfigurations so far and the number of consecutive raises. For a request
from processor P (partner Q):

1. **Raise P** by one multiplier step if P has been raised fewer than 3 times
   in a row, its DCM has been reconfigured fewer than 4 times, and the new
   frequency stays at or below 125 MHz (the processor's limit).
2. Otherwise **lower Q** by one step if Q's DCM has been reconfigured fewer
   than 4 times and the new frequency stays at or above 32 MHz.
3. Otherwise ignore the request.

A raise of P clears Q's consecutive count. A lowering does not clear
anything, so after three raises in a row further requests from P keep
lowering Q until Q runs out of reconfigurations. The step is one unit of M,
i.e. CLK_IN / D (12.5 MHz at the default D = 4).

Example (the end-to-end testbench): uB0 starts at 80 MHz (8/5), uB1 at
87.5 MHz (7/4), and uB1 keeps asking. uB1 goes to 100, 112.5, 125 MHz (three
raises, ceiling reached), then uB0 goes to 70, 60, 50, 40 MHz (its four
reconfigurations), after which the requests are refused.

### DCM and BUFGMUX models

`dcm_model.sv` and `bufgmux_model.sv` are behavioural simulation models of
the vendor primitives, with the primitives' port names. The DCM model
measures the CLKIN period, accepts a write of `{M-1, D-1}` at address 0x50
only while in reset, and raises LOCKED `LOCK_CYCLES` input cycles after the
reset is released. The BUFGMUX model releases the old input on its falling
edge and then takes the new one on the new input's falling edge, so the output
has no short pulses. For an FPGA build, replace both with the vendor's DCM and
BUFGMUX primitives; the rest of the clock unit is ordinary synchronous logic.

## The bridge

`bridge.sv` holds one dual-clock FIFO per direction (`async_fifo.sv`:
gray-coded pointers, two-flop synchronisers, fill level in both domains) and
one `bridge_fsm` per processor. Toward the processor the FSM presents words in
the same style as the processor's own link: `m_data/m_write/m_full` to send,
`s_data/s_exists/s_read` to receive. The receive side has a one-word output
register, so the capacity of a direction is `DEPTH + 1`.

Each FSM compares the fill level of the FIFO *its* processor reads from with
`ceil(DEPTH x 75 / 100)` (12 of 16 words) and registers the result as
`reconf_req`. The request is a level in that processor's clock domain: it
stays high while the processor is behind, and the clock unit acts on it each
time it is idle. With 16 words, a processor must be at least 12 words behind
before anything happens.

## The virtual-IO

`virtual_io.sv` connects the host to the two processors: host words go into
a 512-word FIFO, and `vio_input_fsm` hands them to the link of uB0, uB1 or
both; `vio_output_fsm` reads results from the processors' links into a second
512-word FIFO for the host. The mode fixes the order:

| MODE | input, in this order | output, in this order |
|---|---|---|
| `VIO_1` | `N_IN0` to uB0, `N_IN1` to uB1 | `N_OUT0` from uB0, `N_OUT1` from uB1 |
| `VIO_2` | `N_IN0` to uB0 | `N_OUT1` from uB1 |
| `VIO_3` | `N_IN0` to uB0, `N_COMMON` to both, `N_IN1` to uB1 | `N_OUT0` from uB0, `N_OUT1` from uB1 |
| `VIO_4` | `N_IN0` to uB0 | `N_OUT0` from uB0 (single-processor systems) |
| `VIO_5` | `N_COMMON` to both | `N_OUT0` from uB0 |
| `VIO_6` | `N_COMMON` to both | `N_OUT1` from uB1 |

A word for both processors is sent only when neither link is full, so both
receive it in the same cycle. When a job's last word has passed, the FSM
starts over with the next job and pulses `in_job_done` / `out_job_done`.
Segments of length zero are skipped. The word counts are 16-bit.

## Top level (`mpsoc_top`)

Clock domains: `vio_clk` (host side and the virtual-IO), `clk_in` (clock
unit logic), `clk0` and `clk1` (generated; bridge sides and processors). One
asynchronous reset `rst_n` is synchronised into each domain; `rst0_n` and
`rst1_n` are outputs for the processors.

The virtual-IO's processor links (`vio_fsl*`) are brought out in the
`vio_clk` domain. The processors run on `clk0`/`clk1`, so a system needs
dual-clock link FIFOs between them (the testbenches use `async_fifo` with 16
words for this, the usual depth of the vendor link). The bridge ports
(`br_ub0_*`, `br_ub1_*`) are already in the processor domains. The status
outputs show the requests, multiplexer selects, the current M/D of both DCMs
and the counts used by the decision rules.

### Parameters

| parameter | default | where the number comes from |
|---|---|---|
| `MODE`, `N_IN0`, `N_IN1`, `N_COMMON`, `N_OUT0`, `N_OUT1` | `VIO_2`, 256, 0, 0, 0, 256 | set per application; chosen here |
| `VIO_DEPTH` | 512 | own choice (one block RAM of 32-bit words) |
| `BRIDGE_DEPTH` | 16 | own choice (default depth of the processor link) |
| `FILL_PCT` | 75 | original design |
| `CLKIN_MHZ` | 50 | original design (clock input of the clock-buffer variant) |
| `FMAX_MHZ` | 125 | original design (processor limit) |
| `FMIN_MHZ` | 32 | own choice (lower end of the DCM synthesiser range) |
| `MAX_RECONF`, `MAX_CONSEC` | 4, 3 | original design |
| `HOLD_CYCLES` | 10,000,000 | original design's 200 ms at 50 MHz |
| `SETTLE_CYCLES`, `LOCK_CYCLES` | 8, 64 | own choice |
| `INIT_M0/D0`, `INIT_M1/D1` | 8/4, 8/4 (100 MHz each) | own choice |

Operating points used with this kind of system are all reachable as initial
settings: 80 MHz = 8/5, 50 MHz = 4/4, 87.5 MHz = 7/4, 95 MHz = 19/10,
54 MHz = 27/25, and 40 to 100 MHz in 10 MHz steps as M/5.

## Where this implementation makes its own choices

The original design describes the structure of the three components and the
rules of the clock unit, but not their internals. These parts are this
implementation's:

- the handshakes (valid/ready towards the host, link-style `write/full` and
  `exists/read` towards the processors) and all FIFO depths;
- the bridge FSMs (only named originally) and the level-type request;
- the synchronisers in the XOR block and the state sequence of the logic
  component, including the start-up sequence. The original block diagram
  draws the five sub-blocks as a chain (XOR block, reset controller,
  reconfiguration counter, reconfiguration monitor, clock switcher); here a
  small sequencer in `rcu_logic` starts each of them in turn, which keeps
  each sub-block independently testable;
- the step size of a reconfiguration (one unit of M, D fixed), the 32 MHz
  floor, and the reading that the 4-reconfiguration limit applies to
  lowering too, and that a lowering does not reset the consecutive count;
- the DCM register address and data layout (vendor convention);
- the use of the virtual-IO mode parameter instead of six separate modules;
  there is no image-size parameter, since nothing in the hardware depends on
  it.

A second clock-unit variant, which selects among fixed DCM outputs through a
tree of BUFGMUXes instead of reprogramming the DCMs (fast switching, fixed
frequencies), is not included; the systems this design is meant for use the
reprogramming variant.

## Limits worth knowing

- The clock unit's timing at defaults is dominated by the 200 ms reset hold:
  a processor that stays behind is raised at most once per 200 ms, and the
  whole budget (four reconfigurations per DCM) is spent within about 1.6 s.
  After that the clocks stay where they are until reset.
- The request is judged only by the fill level of a 16-word FIFO. Short
  bursts that fill it trigger a reconfiguration as surely as a sustained
  imbalance does; a deeper bridge (`BRIDGE_DEPTH`) makes the sensor slower.
- M and D are 6-bit fields; the decision logic keeps D fixed and does not
  check the DCM's own input/output frequency ranges beyond the 32 MHz floor
  and the 125 MHz ceiling.
- The DCM model locks after 64 input cycles, far faster than silicon; the
  sequencing does not depend on that number.
- The virtual-IO counts words per job with 16-bit counters (65535 words per
  segment at most).
- A generic synthesis of the synchronous blocks gives, for example, about 320
  cells and 130 flip-flops for the clock unit's logic component, and 90 cells,
  76 flip-flops and two 512 x 32 memories for the virtual-IO.

## Simulation

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=<n> failures=<n>` line. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/mpsoc_pkg.sv tb/tb_bridge.sv --top-module tb_bridge -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_sync_fifo`, `tb_async_fifo` | random traffic against a queue model; full/empty, levels, clock ratios |
| `tb_vio_input_fsm`, `tb_vio_output_fsm`, `tb_virtual_io` | ordering, counts and back-pressure in all six modes |
| `tb_bridge_fsm`, `tb_bridge` | data integrity both ways across unrelated clocks; request raised exactly at 12 of 16 words |
| `tb_rcu_xor_block`, `tb_rcu_reset_controller`, `tb_rcu_clock_switcher` | latency, hold length, select masking |
| `tb_rcu_reconfig_counter`, `tb_rcu_reconfig_monitor` | decision rules against a hand-worked sequence; the DCM write |
| `tb_dcm_model`, `tb_bufgmux_model` | synthesised period, lock, glitch-free switching |
| `tb_rcu_logic`, `tb_reconf_clock_unit` | complete reconfigurations with measured clock periods |
| `tb_mpsoc_top` | end to end, see below |
| `tb_mpsoc_top_full` | one sort at default parameters, 200 ms hold included |
| `tb_mpsoc_workloads` | twelve systems side by side: modes 1, 3, 4, 5 and 6 at 95, 54, 87.5/50, 50 and 100 MHz, and mode 4 at 40 to 100 MHz |

The two top-level testbenches share `mpsoc_top_env.svh`: a host, four link
FIFOs and two processor models (`ub_qs_model.sv`) that run a two-processor
Quicksort split: uB0 receives the whole list, sends the second half to uB1,
sorts its half and sends it over; uB1 sorts its half, merges and returns the
result through the virtual-IO. The host checks the sorted list; a reference
model predicts every reconfiguration and the DCM output period is measured
after each one.

`tb_mpsoc_top` shortens the reset hold to 200 cycles and the lock time to 20,
sorts 512 words and then has both processors flood each other. It counts and
requires: host-side stalls in both directions, link back-pressure, a full
bridge, 75 % requests, raises, lowerings, CLK_IN bypass, the 125 MHz ceiling,
the three-in-a-row limit, the four-per-DCM limit, refused requests and
simultaneous requests masked by the XOR. It simulates about 130 us in well
under a second. `tb_mpsoc_top_full` leaves all parameters at their defaults;
uB1 starts reading late, so the bridge fills and uB1 is raised once to
112.5 MHz. It simulates 200 ms and takes under a minute.

`tb_mpsoc_workloads` (with `wl_system.sv` and `ub_wl_model.sv`) builds one
system per configuration: each checks both processor clock periods after
lock, then pushes one job through the virtual-IO in its mode, with processor
models that transform the words, pass them over the bridge where the mode's
data flow needs it, and return them; the host compares every result.
