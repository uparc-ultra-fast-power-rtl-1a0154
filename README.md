# UPaRC: a fast, frequency-scalable partial-reconfiguration controller

Partial reconfiguration of an FPGA rewrites one region of the fabric while the
rest keeps running. The region is dead until its new configuration has arrived, so
the time it takes to push the partial bitstream into the configuration port (ICAP
on Xilinx devices) matters. ICAP itself accepts one 32-bit word per clock. The slow part is
usually the controller that feeds it.

UPaRC solves this in two ways:

* **Preload, then burst.** The bitstream is copied in advance into a dedicated
  dual-port block RAM. When reconfiguration is requested, a very small controller
  (UReC) streams the RAM into ICAP at one word per clock, with no processor, bus
  or DMA engine in the path. The logic is small enough to run faster than the
  rest of the system. At 362.5 MHz this is 4 B × 362.5 MHz = 1450 MB/s.
* **Choose the clock at run time.** A clock controller (DyCloGen) reprograms the
  multiply/divide factors of the digital clock managers (DCMs) that generate the
  controller's clocks. Reconfiguration power grows with frequency, so the
  system can run just fast enough for the deadline it has to meet.

An optional compressed mode sends the RAM contents through a hardware
decompressor before ICAP. A 256 KiB RAM can then hold bitstreams about four times
larger.

This repository holds synthesizable SystemVerilog for the controller, the
bitstream RAM, the clock controller and the clock-domain crossings. It also has
self-checking testbenches, including behavioural models of the parts that are
vendor primitives.

## Block diagram

```
                      freq. requests                      CLK_3 (dec. clock)
   manager  ───────────────────────────► DyCloGen ──DRP──► 3 x DCM ─► CLK_1, CLK_2, CLK_3
  (CLK_1)                                 (Fin)
     │  bitstream (port A)        ┌──────────────┐
     ├──────────────────────────► │ bitstream    │ Data_Out  ┌────────┐
     │                            │ BRAM 64Kx32  ├──────────► │        │  I[31:0], CE, WRITE
     │  start ──sync──►  ┌──────► │ (port B)     │           │  UReC  ├──────────────────► ICAP
     │  finish ◄─sync──  │  EN,   └──────────────┘           │ CLK_2  │
     └───────────────────┤  Addr ◄───────────────────────────┤        │
                         │                                   └─┬────▲─┘
                         │               compressed words      │    │ 64-bit beats
                         │             async FIFO (CLK_2→CLK_3)▼    │ async FIFO (CLK_3→CLK_2)
                         │                                  decompressor (external, CLK_3)
```

| Clock | Drives | Who sets it |
|-------|--------|-------------|
| `clk_1` (CLK_1) | BRAM port A, `start`/`finish`, the manager | DCM 0 |
| `clk_2` (CLK_2) | UReC, BRAM port B, ICAP | DCM 1 |
| `clk_3` (CLK_3) | decompressor ports | DCM 2 |
| `clk_drp` (Fin) | DyCloGen and the DCM DRPs | fixed input clock (100 MHz in the reference system) |

The DCMs, ICAP, the decompressor and the manager (a processor in the reference
system) are not part of the RTL. Their signals are ports of the top module `uparc`.

## The bitstream image in the BRAM

The manager strips the file preamble from the partial bitstream. It then writes
one header word followed by the configuration data:

| BRAM word | bits 31..1 | bit 0 |
|-----------|------------|-------|
| 0 | size: number of 32-bit data words that follow | mode: 0 = direct, 1 = compressed |
| 1 .. size | configuration data (or compressed data in mode 1) | |

The size counts words, not bytes. In compressed mode it is the number of
*compressed* words stored. A size above 65,535 words cannot be held. It is
clamped to 65,535 and reported on `size_err`. The RAM is 65,536 × 32 bits
(256 KiB), so the largest uncompressed bitstream is 262,140 bytes.

## UReC: one reconfiguration, cycle by cycle

UReC (`rtl/urec.sv`) is a five-state machine on CLK_2: idle, header, direct,
compressed, flush. Its BRAM enable is driven straight from the state, so
`start` opens the RAM in the same cycle. Number the CLK_2 edges from the one
that samples `start` (edge 0):

| edge | what happens |
|------|--------------|
| 0 | BRAM reads word 0 (header); state → header |
| 1 | header decoded (size N, mode) during the cycle before; BRAM reads word 1 |
| k | BRAM reads word k (direct mode: every cycle, EN stays high) |
| k+1 | word k is registered onto `icap_i`, `icap_ce_n` = `icap_write_n` = 0 |
| k+2 | ICAP samples word k |
| N+2 | ICAP has taken the last word; `finish` rises; EN and CE are already off |

So a direct-mode reconfiguration of N words takes **N + 2 CLK_2 cycles** from
`start` to `finish`. The N ICAP writes are on N consecutive cycles. The
testbenches check both facts. `finish` stays high until the next `start`.
`start` is ignored while a transfer runs.

Compressed mode reads the RAM in the same way. The words go into a 4-entry
buffer instead of ICAP. A read is issued only while
(buffer fill + the read in flight) ≤ 2, so a stalled decompressor cannot lose a
word, and a decompressor that keeps up still gets one word per cycle. The
last compressed word carries `cmp_last`.

The decompressor returns 64-bit beats (two configuration words per cycle).
`dec_keep[0]` marks the low word valid and `dec_keep[1]` the high word. UReC
writes the low word first. A full beat therefore takes two CLK_2 cycles, during
which `dec_ready` is low for one. The beat marked `dec_last` ends the
reconfiguration. At the reference clocks (decompressor about 125 MHz, CLK_2 about
250 MHz) the two sides balance near 1000 MB/s.

The ICAP side follows the Virtex-5 `ICAP_VIRTEX5` conventions: chip enable and
write select are active low. UReC only writes, so ICAP's `BUSY` and
output bus are not used. Any bit ordering that a particular FPGA family needs
within ICAP words is assumed to be done already in the stored image.

## Crossing between the clocks

The manager lives on CLK_1 and UReC on CLK_2. The two may be retuned
independently.

* `start` (a one-cycle pulse on CLK_1) flips a toggle flop. The toggle is
  synchronized into CLK_2 with two flops and turned back into a pulse, 2 to 3 CLK_2
  cycles later.
* UReC's `finish`, `busy` and `size_err` are synchronized into CLK_1 with two flops.
  The `finish` output of the top is a CLK_1 flag. `start` clears it and the
  rising edge of the synchronized `finish` sets it. Without that flag, the old
  `finish` of the previous run would still be visible for a few cycles after a new
  `start`.
* Compressed words (33 bits with the last flag) and decompressed beats (67 bits) cross
  between CLK_2 and CLK_3 in two 16-entry asynchronous FIFOs (`rtl/async_fifo.sv`).
  These are first-word-fall-through FIFOs with Gray-coded pointers.

## DyCloGen: changing a clock while the system runs

The output frequency of each DCM is Fout = Fin × M / D. DyCloGen
(`rtl/dyclogen.sv`) accepts a request (`req_sel`, `req_m`, `req_d`) from the
manager and changes one DCM through its Dynamic Reconfiguration Port. Partial
reconfiguration is not involved. The sequence is:

1. Reject M outside 2..33 or D outside 1..32 (`err`). Nothing is touched.
2. Hold that DCM in reset for 4 cycles.
3. Do one DRP write to address 0x50 with data {M−1, D−1}, and wait for `DRDY`.
4. Release the reset, wait for `LOCKED`, pulse `done`, and update `cur_m`/`cur_d`.

The address, the data layout and the M/D ranges are those of the Virtex-5 DCM
(`DCM_ADV`). Check them against the user guide of the device you target. While
its DCM is in reset a clock stops. The manager must therefore not retune CLK_2 or
CLK_3 during a reconfiguration.

Examples from a 100 MHz Fin: 362.5 MHz = 29/8, 300 MHz = 3/1, 50 MHz = 2/4,
125 MHz = 5/4. Some frequencies cannot be made exactly within the ranges above,
for example 255 MHz (51/20) or 126 MHz (63/50). The nearest are 253.8 MHz (33/13)
and 125 MHz.

## Performance, as simulated

Times are from `start` to `finish` for an uncompressed 216.5 KiB bitstream
(55,424 words), with the published measurements for comparison:

| CLK_2 | simulated | published measurement |
|-------|-----------|-----------------------|
| 50 MHz | 1108.6 µs | 1.1 ms |
| 100 MHz | 554.3 µs | 550 µs |
| 200 MHz | 277.2 µs | 270 µs |
| 300 MHz | 184.8 µs | 180 µs |

At 362.5 MHz every burst runs at 1450 MB/s. The start-to-finish bandwidth is
1437 MB/s for a 6 KiB bitstream and 1450 MB/s for 247 KiB: only the
synchronizers and the two header cycles are overhead. Published figures for
small bitstreams are lower (1.14 GB/s at 6.5 KiB) because they include the
manager's software overhead.

A 992 KiB bitstream compressed into the 256 KiB RAM reaches ICAP at 1000 MB/s, with
the decompressor at 125 MHz and CLK_2 at 253.8 MHz. The published figure is
1008 MB/s with the decompressor at 126 MHz. This run uses the behavioural stand-in
decompressor, not a real algorithm.

UReC here is larger than the very small controller of the reference system
(26 slices there). Most of its flops are the compressed-mode path: the 4-word buffer
and the held upper half of a beat. The rest are three 16-bit word counters and the
registered ICAP outputs. Direct mode alone needs only the counters, the address and
the ICAP register.

Only simulation supports these numbers. Whether the logic closes timing at
362.5 MHz depends on the device and the placement.

## What is not here, and where this RTL goes its own way

* **The decompressor.** The reference system uses an X-MatchPRO decompressor,
  an existing open-source core, as a dynamically reconfigurable module on CLK_3.
  Its format and insides are not reproduced here. The top module only
  provides its ports: a valid/ready stream of compressed words in, and 64-bit beats
  with `keep`/`last` out. This port protocol is this implementation's own.
  `tb/decomp_model.sv` is a behavioural stand-in with a trivial run-length code,
  not a real compression format.
* **The manager** (a MicroBlaze in the reference system) preloads, starts and
  retunes clocks. The testbenches play that role.
* **ICAP and the DCMs** are vendor primitives. `tb/dcm_model.sv` models a DCM
  with its DRP. The testbenches capture the ICAP writes directly.
* Choices made here that the architecture leaves open: the size unit (words),
  the size clamp, the registered ICAP outputs and the exact cycle timing, the
  asynchronous active-low reset, the `finish` level behaviour, the
  synchronizers and FIFOs, the DyCloGen request interface and reset values
  (all clocks start at M/D = 2/2), and the DRP details above.

## Files

| File | Contents |
|------|----------|
| `rtl/uparc_pkg.sv` | header word struct, mode and clock-select enums, sizes |
| `rtl/uparc.sv` | top module |
| `rtl/urec.sv` | reconfiguration controller |
| `rtl/bitstream_bram.sv` | dual-port 64K × 32 bitstream RAM |
| `rtl/dyclogen.sv` | DCM reprogramming through the DRP |
| `rtl/async_fifo.sv`, `rtl/pulse_sync.sv`, `rtl/sync_2ff.sv` | clock-domain crossings |
| `tb/urec_tb.sv`, `tb/bitstream_bram_tb.sv`, `tb/dyclogen_tb.sv` | block tests |
| `tb/uparc_tb.sv` | end-to-end test at full size: both modes, zero size, retuning, rejected request, back-pressure, 247 KiB at 362.5 MHz |
| `tb/uparc_workload_tb.sv` | the 216.5 KiB frequency sweep, the 6–247 KiB size sweep, 992 KiB compressed |
| `tb/dcm_model.sv`, `tb/decomp_model.sv` | behavioural models for simulation only |

All testbenches print `TB_RESULT checks=N failures=M` and stop themselves through
a watchdog if something hangs.

## Simulating

With Verilator 5 (the testbenches need `--timing`; the clocks use 1 ns units):

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb --top-module uparc_tb rtl/uparc_pkg.sv tb/uparc_tb.sv
./obj_dir/Vuparc_tb
```

Replace `uparc_tb` with any other testbench name. Each one runs in a few seconds at
full size. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/uparc_pkg.sv rtl/uparc.sv`. The
remaining warnings are expected: assertions sample the reset that the flops use
asynchronously, and some package constants are unused in some modules.

## Changing it

* `uparc #(.DEPTH(...))` sets the RAM size in words. It must be a power of two.
  The address width follows.
* `FIFO_AW` sets the depth of the CLK_3 crossings (2^FIFO_AW entries).
* The DCM specifics are parameters of `dyclogen`: `DRP_ADDR_MD`, `M_MIN`/`M_MAX`,
  `D_MIN`/`D_MAX`, `RST_CYCLES`, and the reset factors `M_INIT`/`D_INIT`. Adapt
  the DRP write for other clock blocks, such as MMCMs on newer devices.
* To use a real decompressor, connect it to the `dec_in_*`/`dec_out_*` ports.
  Add a small adapter if its interface differs: it must accept words with a last
  marker and return the decompressed stream in 64-bit beats with `keep` and `last`.
