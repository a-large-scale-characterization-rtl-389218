# Ring-oscillator PUF measurement hardware

A ring-oscillator PUF gets its bits from manufacturing variation. Many identical ring
oscillators (ROs) run at slightly different frequencies, and comparing the frequencies of
two of them gives one response bit: `r = 1` if RO *a* is faster than RO *b*. Before such a
PUF can be trusted, its raw material has to be characterised: the frequency of every RO on
many chips, measured many times. This design is the on-chip half of that measurement
system. It holds an array of 512 five-stage ring oscillators (16 rows by 32 columns) and
lets a host PC, connected over the FPGA's JTAG port, run one RO at a time. The host reads
back two counts for each run:

* `ro_count`: the number of oscillations of the selected RO while it was enabled;
* `ref_count`: the number of 50 MHz reference-clock cycles in the same window.

The host then computes the frequency as `f = ro_count * 50 / ref_count` MHz. Everything
else is done on the host from the stored frequencies: averaging the samples, forming a
511-bit response by comparing neighbouring ROs (0 with 1, 1 with 2, ... 510 with 511), and
computing Hamming distances and weights.

Because the host measures the enable window itself, it chooses the window freely. A
window of 62 426 reference cycles (1.25 ms) gives about 256 000 counts for a 205 MHz RO,
which is a resolution of about 18 bits.

## Block structure

```
            jtag_* (from the FPGA boundary-scan primitive)
                 |
        +--------v-----------+  cmd / cmd_valid   +-------------+
        | scan_shift_register|------------------->| measure_fsm |
        |  64-bit, LSB first |<-- sr_load --------|             |
        +--------^-----------+                    +--+---+---+--+
                 | {ref_count, ro_count}    ro_addr  |   |   | cnt_clr
                 |                          ro_en    |   |   |
   +-------------+-----+      +----------------------v---v-+ |
   | ref_counter (clk) |<-en--| ro_array                   | |
   +-------------------+      |  ro_decoder -> 512 ro_cell | |
   +-------------------+      |  -> ro_mux -> ro_sel       | |
   | ro_counter        |<-----+----------------------------+ |
   | (clocked by RO)   |<------------------------------------+
   +-------------------+
```

| Module | Role |
|---|---|
| `ro_puf_top` | Wires the blocks together; ports are the 50 MHz clock, reset and the boundary-scan user-register signals |
| `ro_array` | 16 x 32 array of `ro_cell`, with `ro_decoder` (one-hot enable) and `ro_mux` (output select) |
| `ro_cell` | Five-stage ring: a 2-input NAND (second input = enable) followed by four inverters |
| `ro_counter` | 32-bit counter clocked by the selected RO output, with an asynchronous clear |
| `ref_counter` | 32-bit counter of 50 MHz cycles while the RO is enabled |
| `scan_shift_register` | JTAG user data register: shifts counts out on TDO and commands in on TDI |
| `sync_2ff` | Two-flop synchroniser for the boundary-scan signals |
| `measure_fsm` | Executes the host's commands: clear, enable, disable, load |
| `ro_puf_pkg` | Command opcodes and word layout, and the process-variation function of the RO model |

The FPGA's boundary-scan primitive (BSCAN) is not part of the RTL. Its user-register
outputs (DRCK, SEL, SHIFT, UPDATE, TDI) and input (TDO) are the `jtag_*` ports of
`ro_puf_top`, and a board-level wrapper connects them to the primitive. `tb/jtag_host.sv`
models the host and the primitive together in simulation.

## One measurement, step by step

The host drives everything through data-register scans of 64 bits. Every scan does two
things at once. It shifts out the register's current contents, which are the counts if a
LOAD came before. It also shifts in a new command, which takes effect at UPDATE-DR. One
sample of RO *i* takes four scans:

| Scan | Command shifted in | Effect in hardware | Data shifted out |
|---|---|---|---|
| 1 | `CLEAR` | `cnt_clr` high for `CLEAR_CYCLES` (2) cycles; both counters go to 0 | counts of the previous sample |
| 2 | `ENABLE`, addr = *i* | cycle 1: address latched (RO still off); cycle 2: `ro_en` high, the RO starts and both counters run | don't care |
| 3 | `DISABLE` | `ro_en` low; the FSM waits `SETTLE_CYCLES` (4) so the last RO edge is counted | don't care |
| 4 | `LOAD` | `{ref_count, ro_count}` copied into the scan register | don't care |

Scan 1 of the next sample brings the counts out, so a full pass of the array costs four
scans per RO. The enable window runs from the UPDATE of scan 2 to the UPDATE of scan 3.
The host can make it longer by waiting between those scans. `ref_count` is the exact
window length in clock cycles, so how precisely the host times the window does not affect
the result.

The FSM ignores a command that does not fit its state. It ignores everything except
`DISABLE` while an RO runs, ignores `DISABLE` when idle, and ignores every command while
it is clearing or settling (`busy` = 1). An assertion in `measure_fsm` checks that the
counter clear and the RO enable are never active together.

### Command word and bit order

The register shifts right: TDI enters at bit 63 and bit 0 drives TDO, so both directions
are LSB first. After a 64-bit scan, the first 12 bits the host sent sit in bits 11:0. At
UPDATE-DR those bits are the command:

| Bits | Field | Values |
|---|---|---|
| 2:0 | opcode | 0 NOP, 1 CLEAR, 2 ENABLE, 3 DISABLE, 4 LOAD |
| 11:3 | RO address | row * 32 + column, 0..511 |

The rest of the word the host sends (bits 63:12) is ignored. Data read back: bits 31:0 are
`ro_count`, bits 63:32 are `ref_count`.

## Clock domains and timing

The design has three kinds of timing, and the interplay between them is the subtle part.

* **50 MHz `clk`**: the FSM, the reference counter and the scan register run on it.
  `rst` is synchronous and active high.
* **Boundary-scan DRCK**: this design does not clock anything with DRCK. Two-flop
  synchronisers bring DRCK, SEL, SHIFT, UPDATE and TDI into the `clk` domain, and DRCK's
  rising edges are detected there. The register shifts about 3 to 4 `clk` cycles after a
  rising DRCK edge, and TDO must be valid by the next falling edge. **DRCK must therefore
  be at most `clk`/8 (6.25 MHz)**, and UPDATE must stay high for at least 2 `clk`
  cycles. The testbenches use a DRCK of 5 MHz.
* **The RO clock**: `ro_counter` is clocked directly by the selected RO, at about 205 MHz.
  Its clear is asynchronous, because the RO clock is stopped whenever the counters are
  cleared. `cnt_clr` comes from a flip-flop in `measure_fsm`, so it is glitch-free. The
  count crosses into the `clk` domain without a synchroniser. That is safe because the
  FSM only loads it after `SETTLE_CYCLES`, by which time the RO has stopped and the count
  is static. For the same reason, lint reports `cnt_clr` as used both synchronously (in
  `ref_counter`) and asynchronously (in `ro_counter`); that is intended.

Disabling the RO does not cut it off mid-cycle. The pulse still travelling round the ring
finishes, and the output returns to its rest level of 1. This usually adds one final
rising edge. It affects every RO in the same way, so comparisons between ROs are
unaffected.

The multiplexer never switches while an RO is running, because the address is latched
one cycle before the enable rises. All stopped ROs rest at 1, so changing the selection
makes no clock edge on `ro_counter`.

## The ring-oscillator model

A ring oscillator cannot be written as synthesizable RTL. On the FPGA it is a hand-placed
macro of LUTs in one CLB, instantiated 512 times so that all copies are identical.
`ro_cell` is therefore a behavioural model, and so is `ro_array`, because it contains the
cells. Every other module is synthesizable. In `ro_cell`, each of the five stages is a
process with a transport delay, and the period is ten stage delays.

The model's delay follows the usual split of an RO's loop delay into three parts: an
average, a static process-variation part and a dynamic noise part.

* **Average**: `STAGE_DELAY_NS` = 0.4876 ns, which gives 205.1 MHz.
* **Static variation**: `ro_array` scales each cell's stage delay by
  `1 + PV_SPREAD * ro_pv_offset(index)`. `ro_pv_offset` (in `ro_puf_pkg`) is an integer
  hash of the RO index, mapped to [-1, 1). With `PV_SPREAD` = 0.013 the offset is uniform
  with a standard deviation of 0.75 %, about the within-chip spread such ROs show. The
  offset is fixed for a given index, so every simulation sees the same "chip".
* **Dynamic noise**: each cell draws a new relative offset at every rising edge of its
  enable. The offset is uniform with a standard deviation of `NOISE_SIGMA` = 0.025 % and
  holds for that whole enable window. Repeated samples of one RO therefore scatter the
  way repeated measurements do.

The model has no temperature or supply-voltage dependence, and no spatially correlated
variation. `ro_cell` uses a 1 fs time precision, because the per-RO delay differences are
far below 1 ps.

## Parameters of `ro_puf_top`

| Parameter | Default | Meaning |
|---|---|---|
| `ROWS`, `COLS` | 16, 32 | RO array shape (512 ROs); the address is `row*COLS + col` |
| `CNT_W` | 32 | width of each counter; the scan register is `2*CNT_W` bits |
| `STAGE_DELAY_NS` | 0.4876 | mean stage delay of the RO model |
| `PV_SPREAD` | 0.013 | half-width of the static per-RO delay offset |
| `NOISE_SIGMA` | 0.00025 | standard deviation of the per-window delay noise |
| `CLEAR_CYCLES` | 2 | length of the counter clear |
| `SETTLE_CYCLES` | 4 | wait after DISABLE before LOAD is accepted |

The command word has a fixed 9-bit address (`ADDR_W` in `ro_puf_pkg`), so the array
can hold at most 512 ROs.

## Simulation

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`.
Build and run any of them with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ro_puf_top rtl/ro_puf_pkg.sv tb/tb_ro_puf_top.sv
./obj_dir/Vtb_ro_puf_top
```

| Testbench | What it runs |
|---|---|
| `tb_ro_puf_top` | Whole system with a 4 x 8 array. It measures every RO, checks each count and calibrated frequency against the model, builds the 31-bit adjacent-pair response, re-measures 16 ROs and checks the intra-chip Hamming distance. It also counts that every mechanism happened: clear, enable, disable, load, busy, and a command ignored in the wrong state. About 10 s. |
| `tb_ro_puf_full` | Whole system at the default 16 x 32 size. It measures 10 ROs spread over the array: corners, row boundaries, and both ends of the index range. About 35 s. Simulating all 512 cells is slow, about 15 µs of simulated time per second, so a full pass of the array is not simulated at this size. |
| `tb_ro_puf_samples` | Repeated sampling on a 2 x 2 array: 25 samples per RO with 10 000-cycle windows. It checks each mean frequency within 0.05 % of the model, the sample-to-sample spread σ/f (about 0.025 % expected), and the stability of the response bits across samples. About 40 s. |
| `tb_ro_cell` | Rest level, first-edge time, period, trailing edge and noise bound of one cell |
| `tb_ro_array` | Every RO of a 4 x 8 array against its predicted edge count |
| `tb_ro_counter`, `tb_ref_counter` | Counting, clear priority, asynchronous clear with a stopped clock, wrap-around |
| `tb_ro_decoder`, `tb_ro_mux` | Exhaustive address sweep |
| `tb_scan_shift_register` | Parallel load and serial read-out, command capture at UPDATE, SEL gating |
| `tb_measure_fsm` | Cycle-exact command sequences, including commands ignored in the wrong state |

The top-level testbench reports the Hamming weight of the response it builds. At full
size, one pass of the array with 1.25 ms windows takes 512 x 1.25 ms = 0.64 s of
enable time per sample. That meets the aim of 100 samples of all 512 ROs in under two
minutes (64 s of enable time plus about 2 s of scans at the highest DRCK rate), USB
latency aside.

## What is fixed by the measurement setup and what is this design's choice

These follow the measurement setup this design implements:

* 512 five-stage ROs, each a NAND with enable plus four inverters, placed as 16 x 32.
* One RO runs at a time, selected by a decoder and read through a multiplexer.
* The selected RO clocks a 32-bit counter.
* A second 32-bit counter counts the 50 MHz clock during the enable.
* A shift register behind the boundary-scan primitive serialises the data.
* A simple FSM, under host control, clears the counters, enables and disables the RO and
  loads the shift register.
* The host times the enable window.

These are this design's own choices:

* The command word, its opcodes and the bit order of the scan register.
* Sending commands in through the same register that brings data out.
* Oversampling the boundary-scan signals in the 50 MHz domain, and the resulting limit of
  DRCK at `clk`/8.
* The FSM's states, the clear and settle times, and ignoring commands that arrive in the
  wrong state.
* The asynchronous clear of the RO counter.
* The RO numbering `row*COLS + col`.
* The whole delay model of the ring oscillators: its variation formula and its noise.

Not included:

* The boundary-scan primitive, which is vendor hardware.
* The host software.
* Response extraction and statistics, which the host computes from the read-back counts.
  The testbenches show how.
