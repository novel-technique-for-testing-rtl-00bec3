# Reuse-oriented test and diagnosis of RAM-based FPGAs (RTDP)

An FPGA that is reprogrammed again and again — moved between prototypes,
reconfigured in the field, run at extreme operating conditions — can develop faults
that were not there at manufacturing time. A full manufacturing test is too long to
repeat between every reuse, and a test written for one user function says nothing
about the next function. This RTL implements a middle way for the logic blocks
(CLBs) of an XC4000-class device. The device is programmed into a few regular test
configurations, exhaustive 4-bit vectors are applied, and the responses are read back
through the device's boundary scan, so no user I/O pin is needed and the
device can stay on its board. A faulty CLB is located as the crossing of a failing
row and a failing column.

The repository holds both sides:

* **the tester** (`test_facility`): the test pattern generator (a 4-bit exhaustive
  generator and the TDI and TDO shift registers), a bit-by-bit comparator, the
  diagnostic block (two counters and a fault memory) and a sequencer that drives
  the TAP pins;
* **a model of the device under test** (`fpga_under_test`): an N x N array of
  CLB models chained as iterative logic arrays, its boundary-scan data register
  and a TAP controller.

`rtdp_top` connects the two through TMS, TDI and TDO. N = 24 by default (the XC4013,
576 CLBs).

## How a line of CLBs carries the test

The array is programmed so that it forms N one-dimensional iterative logic arrays
(ILAs): N rows (horizontal array) or N columns (vertical array). Every CLB of a
line has the same internal configuration. Four independent signals, the *lines*
L0..L3, pass from each CLB to the next:

| line | driven by the previous CLB's | path inside the next CLB |
|------|------------------------------|--------------------------|
| L0   | XQ (flip-flop)               | combinational, to X or Y |
| L1   | YQ (flip-flop)               | combinational, to X or Y |
| L2   | X (combinational)            | into a flip-flop         |
| L3   | Y (combinational)            | into a flip-flop         |

A clocked output always feeds a combinational path of the next CLB, and a
combinational output always feeds a flip-flop. A signal therefore crosses one
flip-flop every two CLBs. The four paths of a line all have the same delay, and a
vector reaches the end of a line of N CLBs after exactly **N/2 clocks**.

Each CLB uses twelve inputs: F1..F4, G1..G4 and C1..C4. Each group of four
receives L0..L3 in that order. So both 4-input LUTs (F', G') see all four signals on
their address lines, and the 16 exhaustive vectors visit all 16 cells of each LUT.
H1 and DIN are picked from C1..C4 by the configuration. The first CLB of every line
gets its twelve inputs from the boundary-scan input cells. They hold the current
vector repeated three times, and every line gets the same vector.

The CLB model (`clb`) has the three function generators: F' and G' with 4
inputs, and H' with 3 inputs (F', G', H1). It also has the X/Y output
multiplexers (F' or H', G' or H'), the two flip-flop data multiplexers (DIN, F',
G', H'), and two flip-flops with a shared clock, clock enable EC and set/reset S/R. S/R sets or resets
each flip-flop as configured. Each LUT (`lut`) is a one-hot address decoder
over a column of configuration cells. A decoder fault and a cell fault are
therefore separate places in the structure.

## The seven CLB configurations

Every configuration uses only transparent, NOT and EXOR functions and sends the
four signals along separate paths. One configuration makes G' and H' EXOR gates,
with F' transparent, so that the H' decoder can be reached. A second one makes H'
the EXOR of F' and H1, so that H' also reads F'. Across the set, every LUT input is
made transparent, every LUT is used both straight and inverted, and every input of
the output and flip-flop multiplexers is selected. Every pair of cells in each LUT
is driven to different values at least once, so a bridge between two cells shows.
The exact assignment is this design's own. It is in `rtdp_pkg::cfg_table`:

| # | X        | Y         | FF X D        | FF Y D        | S/R X/Y | EC used |
|---|----------|-----------|---------------|---------------|---------|---------|
| 0 | F' = L0  | G' = L1   | H' = H1 = L2  | DIN = L3      | R / R   | yes     |
| 1 | F' = ¬L0 | G' = ¬L1  | DIN = L2      | H' = ¬H1 = ¬L3| S / S   | yes     |
| 2 | H' = L1  | G' = L0   | DIN = L2      | F' = L3       | R / S   | yes     |
| 3 | H' = L0  | G' = L1   | F' = L2       | DIN = L3      | S / R   | yes     |
| 4 | F' = L0  | H' = F'⊕H1 = L0⊕L1 | DIN = L2      | G' = L3       | –       | no      |
| 5 | H' = G'⊕H1 = L0 | G' = L0⊕L1 | F' = L2 | DIN = L3   | –       | no      |
| 6 | F' = ¬L1 | H' = ¬L0  | G' = L2       | DIN = L3      | –       | no      |

In the transparent and NOT configurations each signal either comes back unchanged
or is inverted an even number of times. With N even, the response at the end of a
line is then the applied vector itself. In the EXOR configurations (4 and 5) it is not.
The tester does not compare with the raw vector. It compares with
`rtdp_pkg::line_response`, which applies the fault-free per-CLB map
(`clb_map`) N times. For configurations 0–3 and 6 this gives back the vector.

`tb_cfg_coverage` checks the fault coverage of this table on one CLB model. It
tries every stuck cell, every AND or OR bridge between two cells of a LUT, and
every stuck select bit of the CLB's multiplexers, and requires that the 16
vectors in the 7 configurations expose each one. There is one exception. DIN is
always taken from C3 or C4. The equal-delay wiring puts the clocked lines on C1
and C2, and those must not reach a flip-flop. So a DIN select bit stuck at 1 is
not detected.

## One vector through the boundary scan

The boundary-scan data register (`bscan_reg`) is one chain:

```
TDI -> [12 input cells] -> [response cells: line 0 cell 0, cell 1, ... line N-1] -> TDO
```

Each line has CPL response cells: 6 for a row (right edge) and 12 for a column
(bottom edge). The first four cells capture {XQ, YQ, X, Y} of the line's last CLB.
The remaining cells capture 0, and the comparator checks that they read 0. The
orientation selects which edge segment follows the input cells.

The sequencer runs each vector as one pass through the TAP states:

| TAP state         | cycles      | what happens                                        |
|-------------------|-------------|-----------------------------------------------------|
| Shift-DR          | CPL·N       | the previous vector's responses leave through TDO    |
| Shift-DR          | 12          | the next vector enters through TDI                   |
| Exit1-DR, Update-DR, Run-Test/Idle | 3 | Update-DR applies the vector to the first CLBs |
| Run-Test/Idle     | N/2         | the vector propagates along the lines                |
| Run-Test/Idle, Select-DR, Capture-DR | 3 | Capture-DR loads the line responses         |

That is **12 + 3 + N/2 + 3 + CPL·N** clocks per vector: 174 for 24 rows and 318 for
24 columns. Inside the tester, `tdo_shift_reg` collects one line's cells. *Count*
in the diagnostic block counts the cells of the line, and its terminal count
advances the *Line Counter*. One cycle after a line's last bit, the comparator
result for that line is valid. If it reports a fault, a 1 is written into the
fault memory at {orientation, line}.

## A test session and the whole run

A session is one configuration in one orientation. The first four configurations
also check the CLB control signals:

1. **N S/R extractions.** In the first one, the global S/R is held high through
   the wait and Capture-DR. The response must show each configuration's set/reset
   values in XQ/YQ, and the values derived from them in X/Y (`sr_response`). EC then
   stays low except for one clock in the wait of each later extraction. So
   extraction k sees the array k clock steps after S/R: first the set/reset values
   moving out of the lines, then the steady response to vector 0. The four
   configurations use set and reset in different combinations. In configurations
   4–6 a single scan only loads vector 0.
2. **16 vector scans**: vectors 0..15, in binary order. The last one loads
   vector 0 again.
3. **Two EC extractions** (configurations 0–3). Vector 0 propagates with EC
   toggling every clock, which is a clock-like enable of twice the clock period.
   The first extraction waits N − 2 clocks, so it gives N/2 − 1 enabled steps: a
   fault-free line still shows the response to vector 15. An EC stuck at 1 has
   already moved on and fails. The second extraction adds one step, N/2 in all.
   The response to vector 0 must now be there, which an EC stuck at 0 never
   delivers.

`diagnose = 0` runs the seven horizontal sessions (test only). `diagnose = 1`
runs the seven vertical sessions after them (test and diagnosis). At N = 24 the
run takes 36 894 clocks for test only and 105 324 clocks for test and
diagnosis. The testbench measures both counts. At 40 MHz that is 0.92 ms and
2.63 ms, which is small next to the time needed to load each configuration into
the device.

## Module map

```
rtdp_top
├── test_facility            tester
│   ├── rtdp_controller      sessions, scans, TMS, strobes
│   ├── tpg                  test pattern generator
│   │   ├── ex_generator     4-bit exhaustive counter
│   │   ├── tdi_shift_reg    vector -> TDI
│   │   └── tdo_shift_reg    TDO -> response word
│   ├── comparator           bit-by-bit check of one line
│   └── diagnostic_block     Count, Line Counter, fault memory
└── fpga_under_test          device model
    ├── tap_controller       IEEE 1149.1 state machine (data-register side)
    ├── bscan_reg            input cells + edge response cells
    └── clb_array            N x N CLBs as ILAs
        └── clb              F', G', H' (lut), multiplexers, 2 flip-flops
```

`rtdp_pkg` holds the shared sizes, the configuration struct `clb_cfg_t`, the
configuration table and the fault-free reference functions.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. For example,
the end-to-end run at full size:

```
verilator --binary --timing --assert -Irtl rtl/rtdp_pkg.sv tb/tb_rtdp_top.sv \
          -y rtl --top-module tb_rtdp_top
./obj_dir/Vtb_rtdp_top
```

Use the same command for any other `tb/tb_<module>.sv`. `tb_rtdp_top` runs the
full procedure five times on the 24 x 24 model:

* test and diagnosis on a fault-free array;
* test and diagnosis with CLB (5,9) X stuck at 1, where exactly row 5 and column 9
  must be flagged;
* test only with CLB (2,3) XQ stuck at 0;
* test only with the global EC stuck at 1, which the first EC extraction must
  catch in every row;
* test only with the global EC stuck at 0.

It checks every vector period, both total cycle counts, and that every mechanism
happened at least once: S/R extraction, EC extraction, vertical array, NOT configuration,
EXOR configuration and fault detection. It runs in a few seconds.

The block testbenches use small arrays (N = 3 to 6) and compare against their
own references:

* `tb_clb` and `tb_lut`: random configurations and truth tables;
* `tb_tap_controller`: the standard state table;
* `tb_clb_array` and `tb_fpga_under_test`: a per-CLB steady-state model;
* `tb_rtdp_controller`: a TAP that follows the sequencer's TMS, with schedule
  rules and cycle counts;
* `tb_test_facility`: all four outputs stuck at 0 and at 1 in random places.

To inject a fault, use the `inj_*` ports of `rtdp_top`. They force one output
(0 XQ, 1 YQ, 2 X, 3 Y) of one CLB of the model to a constant. These ports are a
test hook of the model and do not exist in a real device.

## Where this design departs from the published procedure

* **S/R and EC extractions.** The number of extractions follows the published
  procedure: N after S/R and the extra EC extraction. The wait before each of them,
  and splitting the EC check into two samples, are this design's choices. The
  published totals are 33 936 (test) and 98 400 (test and diagnosis) clocks; this
  design takes 36 894 and 105 324. The published count has 16 scans per
  configuration, and each S/R extraction costs only its CPL·N shift cycles. Here
  a 17th scan reads out the last response, and every extraction also shifts the
  12 input cells and passes through the TAP states. The per-vector count, 12 + 3 + N/2 + 3 + 6N
  (or 12N), is the same.
* **Clock polarity.** The CLB model has a single rising-edge clock. The
  clock-inversion multiplexer of the CLB, and its selection fault, are not
  modelled.
* **Configurations.** The seven configurations follow the published rules
  (transparent, NOT and EXOR functions, independent paths, every multiplexer input
  selected, one G'/H' EXOR configuration). The exact assignment above is this
  design's own. So is the second EXOR configuration (4), which lets H' read F'.
  The one multiplexer input never selected is DIN from C1 or C2.
* **Boundary scan.** The cell order is this design's choice. So are the unused
  cells per line that capture 0, and the use of the right edge for rows and the
  bottom edge for columns. The published procedure gives only the shift counts 12,
  6N and 12N. The instruction register is not modelled: the boundary-scan register
  is always selected.
* **Configuration loading is not modelled.** The device model takes its
  configuration as a parallel input, and the sequencer switches configuration
  between sessions in zero time. Also outside the model: the bit stream of
  about 350 bits per CLB, its roughly 25 ms load time, and the readback used to
  confirm the load. EC and S/R reach the device as two global inputs.
* **Not modelled at all:** the carry logic, which the fault set excludes; the IOBs
  beyond their boundary-scan cells; and the routing resources, which are tested
  only as a side effect of the ILA wiring.

## Timing and reset

The tester and the device run on one clock, which also serves as TCK. `rst_n`
is an asynchronous active-low reset. It also resets the TAP, standing for TRST. Pulse
`start` for one cycle; `busy` is high during the run, `done` rises at the end,
and `start` may be pulsed again to rerun. `fail` and `row_fault`/`col_fault` are
cleared by `start` and stay valid after `done`.
