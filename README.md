# IROD: logic of a DSP-based read-out driver for the ATLAS cathode strip chambers

The IROD is a VME read-out driver (ROD) board built from identical DSP
modules. One module is the host (HPU). Up to twelve more are data processing
units (DPUs), arranged as two halves of six (A0..A5 and B0..B5). In the CSC
application some DPUs sparsify chamber data (SPUs) and one DPU per half
builds events (RPU).

The DSPs run the physics software. The board logic moves data between them
and off the board. That logic is the **Data Exchange (DX)**, a small machine
driven by a stream of 32-bit *DX instructions* that the host sends by DMA.
Each instruction says which DPUs to read and which to write, whether the
words also go to the board's output, and how to count and check them. The
RTL here implements the DX together with the board's other logic:

* the VME-side FIFO and dual-port RAM;
* the power sequencing PLD;
* the clock selection network and its setup register.

Everything is written as synthesizable SystemVerilog with self-checking
testbenches for plain Verilator.

```
 host DSP ──DX instructions──┬──> DXF FPGA, half A ──┐
 (HPU)                       └──> DXF FPGA, half B ──┤ DX internal bus (one owner at a time)
            DXD bus A <-> DPUs A0..A5                ├──> DXB FPGA ──> backplane P0 (DG, S-Link)
            DXD bus B <-> DPUs B0..B5                └──> Host FIFO ──> host DSP
```

## The DX instruction stream

Both DXF FPGAs see the same instruction stream. Bits A and B of each
instruction select the half or halves that act on it. An instruction may be
followed by N words of payload; the filter of a half that is not addressed
drops the instruction *and* its payload.

| bits    | 31:28 | 27:24 | 23 | 22 | 19 | 18 | 17 | 16        | 13:8      | 7:0 or 5:0        |
|---------|-------|-------|----|----|----|----|----|-----------|-----------|-------------------|
| field   | tag   | op    | A  | B  | E  | D  | S  | d (FIFO)  | d (DPUs)  | N, or s (sources) |

* **tag** is `1CFF` for instructions that move data and `0000` otherwise.
  - C is a control bit that travels with the data to the output. S-Link
    uses it to mark the start and end of an event.
  - The two F bits enable the two back-end destinations: F[1] is the ROL
    output (DXB FPGA) and F[0] is the Host FIFO.
* **E** asks for an end-of-event mark on the last word on the DXD bus.
* **D** and **S** pick one of two DMA channels on the destination and
  source DPUs, for example one for event data and one for bulk data.
* **V** in bits 15:0 is the value used by the verify operations.

| op | operation | what the front end does |
|----|-----------|-------------------------|
| 0 | NULL | nothing |
| 1 | run front sequence | Read each source DPU in `s`, lowest index first, until it flags its last word. Each word goes at once to every destination DPU in `d`, and to the tag+data FIFO if bit 16 is set. |
| 2 | write N data words | The next N words go to the destinations, tagged `1CFF`. |
| 3 | write N command words | The next N words go to the tag+data FIFO with tag `0000`. They are commands for the back end. |
| 4 | notify front | One-cycle pulse to the host. |
| 5 / 6 / 7 | reset / capture / verify front counter | Verify compares the counter's 16 LSBs with V. A mismatch sets a sticky error bit. |

The back end of each half reads the tag+data FIFO:

* **Data words** go onto the DX internal bus with their C and F bits. A data
  word whose F bits are both 0 goes nowhere but is still counted.
* **Command words** are decoded from bits 31:28:

| value | command |
|-------|---------|
| 0 | NOP |
| 3 | release the DX internal bus to the other half |
| 4 | notify back |
| 5, 6, 7 | reset, capture or verify the back counter |

The front and back counters are independent, which lets the host check both
sides of the FIFO. For example, it can capture both counters at the end of an
event and verify them against the expected length.

## Inside a DXF FPGA (`dxf_fpga`)

```
instr ─> dxf_instr_filter ─> irod_sync_fifo ─> dxf_front_seq ─> irod_async_fifo ─> dxf_back_seq ─> DX internal bus
         (A/B + payload)     (instruction      (DXD bus,         (tag+data FIFO,    (bus, commands,
                              FIFO, 512)        front counter)    DX_CLK->DXINT_CLK) back counter)
```

**Front side (`dxf_front_seq`).** The front side runs on DX_CLK and moves at
most one word per clock. A word moves only when every addressed sink can take
it: each destination DPU's `dxd_wready`, and the FIFO when bit 16 is set. A
full FIFO therefore stalls the source DPU; the design never drops a word.
The DXD bus handshake is simple:

* a one-hot `dxd_src_req` selects the source DPU;
* the source answers with `rvalid`/`rlast`;
* `dxd_dst_wr` strobes the destination DPUs.

**Back side (`dxf_back_seq`).** The back side runs on DXINT_CLK. Data waits
until this half owns the bus (`bus_grant`) and the back end is not full
(`bus_ready`). A *release* command also waits for ownership. As a result,
half B's release (the step that "returns the bus to A") cannot take effect
before half A has handed the bus over.

**Registers.** The registers are on the DX_CLK side:

| address | register | contents |
|---------|----------|----------|
| 0 | control | Front and back enable. Both are 1 after reset. |
| 1 | status | Verify errors, instruction FIFO empty/full, tag+data FIFO full, front busy. |
| 2 | captured front count | |
| 3 | captured back count | |

## Sharing the DX internal bus: the CSC event

One event per L1 accept is built from both halves. Per event the host sends
12 instruction words:

| side | instruction | words |
|------|-------------|-------|
| A and B | run front sequence: SPU0..SPU4 → RPU | 1 |
| A | write N data: CSC ROD leader | 1 + 2 |
| A and B | run front sequence: RPU → back end (bit 16) | 1 |
| A | write N commands: release bus | 1 + 1 |
| B | write N data: CSC ROD trailer | 1 + 2 |
| B | write N commands: release bus | 1 + 1 |

On the internal bus this gives 24 words per event:

* leader (2 words);
* RPU A data (typically 10);
* RPU B data (typically 10);
* trailer (2 words).

`dx_bus_arbiter` holds a single owner bit, which is A after reset.
Ownership changes only on a release from the current owner. Both halves work
in parallel until the bus is needed: half B fills its tag+data FIFO with its
RPU data and trailer while half A still owns the bus. At the typical 100 kHz
L1 rate the instruction stream is 1.2 M words/s and the output 2.4 M words/s.
The end-to-end testbench builds one event in about 1.4 µs, well inside the
10 µs between L1 accepts.

## Back end (`dxb_fpga`, Host FIFO)

A bus word is placed only when both back-end FIFOs have room
(`bus_ready = !host_full && !dxb_full`). Its F bits then decide which FIFOs
take it:

* **Host FIFO:** 16K × 32, read by the host on HPU_CLK. It lets the host
  see the events it sends out.
* **DXB FIFO:** 1K × 33, i.e. 32 data bits plus C. It is read on DCLK, the
  S-Link clock, into a registered valid/ready output towards the backplane
  (`dg_data`, `dg_valid`, `dg_ready`).

While the link holds `dg_ready` low the FIFO fills. The DX internal bus then
stalls, and that back-pressure reaches the DPUs through the tag+data FIFOs.

## VME memories

The VME side has two memories:

* **VME FIFO** (`irod_async_fifo`, 16K × 32): written by the host on HPU_CLK
  and read on VME_CLK, for block transfers.
* **VME DPRAM** (`vme_dpram`, 16K × 32): a true dual-port RAM. Port V is on
  VME_CLK and port H on HPU_CLK, and each port has a 14-bit address.

## Power sequencing (`power_pld`)

The crate controller starts the board by setting PED over VME. The PLD then
drives three active-high switch enables:

```
PENC (DSP I/O 3.3 V) = PED & MBPWROK & (ONE_O | VAOK)
PENA (DSP core)      = PED & MBPWROK & (ONE_O | VCOK)
PENB (2.5 V)         = PED & MBPWROK & VAOK & VCOK
```

* **ONE_O** is a one-second one-shot, started when PED goes from 0 to 1.
  During that second the DSP I/O and core supplies may come up together.
  After it, each stays on only while the other is good, so a failing VCC or
  VCORE turns both off.
* **Clock:** the PLD runs on the board oscillator.
* **Inputs:** the supply-good inputs go through two-flop synchronisers.
* **`ONE_SEC_CYCLES`** is 40 000 000 clocks, one second at 40 MHz. Change it
  if the oscillator differs.
* **Not controlled here:** the 2.5 V switch bank has two extra switches
  that are turned off after the inrush current. Their control is not
  defined, so this PLD has no enable for them.

## Clock selection (`clk_network`, `clk_setup_pld`, `clk_mux`)

| clock | sources (select value) |
|-------|------------------------|
| RCLK (receive) | 0 BP_RCLK, 1 FP_RCLK, 2 SCLK, 3 TCLK, 4 synthesizer |
| SCLK (spare TTC copy) | 0 RCLK, 1 TCLK, 2 synthesizer |
| TCLK (TTC) | 0 BP_TCLK, 1 FP_TCLK, 2 RCLK, 3 SCLK, 4 synthesizer |
| DCLK, DC_CLK, DX_CLK | 0 RCLK, 1 SCLK, 2 TCLK, 3 own synthesizer |
| HPU_CLK | 0 oscillator, 1 synthesizer |
| DPU_CLK, DXINT_CLK, VME_CLK | synthesizer only |

**The RCLK/SCLK/TCLK loop.** On the board these three multiplexers form a
loop. In the RTL they are resolved together: the chain of selects is
followed for up to three steps to an external source. A circular setting,
such as RCLK←SCLK←RCLK, gives a stopped clock rather than a combinational
loop.

**Setup register.** The host writes the selects over its 4-bit BDG bus to
`clk_setup_pld`, one register per multiplexer:

| address | register |
|---------|----------|
| 0 | RCLK |
| 1 | SCLK |
| 2 | TCLK |
| 3 | DCLK |
| 4 | DC_CLK |
| 5 | DX_CLK |
| 6 | HPU_CLK |

After a power-on reset:

* RCLK and TCLK come from the backplane;
* SCLK comes from TCLK;
* DCLK, DC_CLK and DX_CLK come from their synthesizers;
* HPU_CLK comes from the oscillator.

**Resets.** The setup register and the power PLD are reset only by `por_n`,
so clock choices survive the logic reset `rst_n`. Hold `rst_n` while
changing a clock. The setup register runs on HPU_CLK, which it selects
itself. If HPU_CLK is switched to a synthesizer that is not running, the
host and the register both stop, and only `por_n` restores the oscillator.

**Glitches.** The clock multiplexers are plain combinational selects, so a
select change can produce a short pulse on the clock.

## What is this design's own

The instruction and command encodings, the data flow, the 16K Host and VME
FIFOs, the 14-bit DPRAM address, the power equations and the clock source
lists are the board's. The following are choices made here:

* **Handshakes:** the DXD bus, the instruction port, the DG output and the
  host register interface.
* **Register maps:** the DX registers and the clock setup registers.
* **Sizes:**
  - instruction FIFO: 512 words;
  - tag+data FIFO: 512 entries;
  - DXB FIFO: 1024 entries;
  - counters: 32 bits.
* **Bus and filter rules:**
  - bit order of F;
  - a release waits for ownership;
  - the internal bus stalls on either back-end FIFO being full;
  - an instruction addressed to neither half is dropped by both filters.
* **Counting rule:** data words are counted and command words are not.
* **Power PLD:** the synchronisers and the clock frequency.
* **Clocks:** the resolution of the RCLK/SCLK/TCLK loop, and the reset
  clock selection.
* **Clock crossings:** all use Gray-pointer dual-clock FIFOs
  (`irod_async_fifo`), with two-flop synchronisers for single flags.

**Not in this RTL:**

* the DSPs, their SDRAM and flash;
* the DPU control FPGA and the DSP-module glue FPGAs, whose function is not
  specified;
* the VME protocol CPLDs;
* the TTC and backplane interface FPGAs;
* the synthesizers and PLL buffers;
* all power electronics.

Their signals are ports of `irod_top`.

## Files

| file | content |
|------|---------|
| `rtl/irod_pkg.sv` | types: instruction, tag, bus word, clock selects |
| `rtl/irod_top.sv` | the board logic |
| `rtl/data_exchange.sv`, `rtl/dxf_fpga.sv`, `rtl/dxf_instr_filter.sv`, `rtl/dxf_front_seq.sv`, `rtl/dxf_back_seq.sv`, `rtl/dx_counter_cmp.sv`, `rtl/dx_bus_arbiter.sv`, `rtl/dxb_fpga.sv` | Data Exchange |
| `rtl/irod_sync_fifo.sv`, `rtl/irod_async_fifo.sv`, `rtl/vme_dpram.sv` | memories |
| `rtl/power_pld.sv` | power sequencing |
| `rtl/clk_network.sv`, `rtl/clk_setup_pld.sv`, `rtl/clk_mux.sv` | clocks |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dx_pkg.sv` | instruction and command word builders |
| `tb/dxd_model.sv` | behavioural DPU on the DXD bus |
| `tb/supply_model.sv` | behavioural switched supplies and supervisors |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. It also
has a watchdog that counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv -Mdir obj \
    rtl/irod_pkg.sv tb/tb_dx_pkg.sv tb/tb_irod_top.sv --top-module tb_irod_top -o sim
./obj/sim
```

For another testbench, replace the last file and the top name. `tb_dx_pkg.sv`
is needed only by the DX testbenches.

`tb_irod_top` runs the whole design at its default sizes:

* power-up through the one-shot;
* a DX_CLK switch to the backplane TTC clock;
* more than a hundred CSC events, checked word by word on the DG output and
  in the Host FIFO;
* traffic through the VME FIFO and the DPRAM.

It counts, and requires, these mechanisms:

* bus hand-overs;
* front-end stalls from slow DPUs;
* back-end waits for bus ownership;
* internal-bus stalls from a full DXB FIFO;
* a verify error.

It runs in well under a second. `tb_data_exchange` also checks the per-event
time against the 10 µs L1 period.
