# Region-of-interest server for a double-buffered infrared frame store

An infrared camera delivers 480 x 640 frames of 12-bit pixels. They are
written into two frame banks in turn. The downstream users are high-speed
links to a fusion processor, and they do not want whole frames. Each link
wants only a rectangle of the image, its region of interest (ROI), and each
link may want a different one. This RTL implements that path as it was built
for the MSP-0, the first board of an FPGA-based "malleable signal processor".
It has three parts:

- a **frame writer** that stores even frames in bank MEMA and odd frames in
  bank MEMB;
- the two **frame banks**;
- four **ROI servers**, one per output link. Each one reads its rectangle
  out of the bank that is not being written, one pixel per clock, and marks
  the end of every line.

While frame N is written into one bank, the servers read frame N-1 from the
other. Each server switches bank by itself after every ROI it serves. So if
each server serves one ROI per frame, it stays in step with the writer.

```
 pix_valid/pix_data ──► frame_writer ──we_a──► frame_bank MEMA ──┐ 4 read ports
                                    └─we_b──► frame_bank MEMB ──┤
                                                                  ▼
                      start[s], roi[s] ──► roi_server[s] ──► data_out/data_valid/data_eol[s]
                                            (s = 0..3)          eol[s], done[s], mem_a_sel[s]
```

## Memory layout

A frame is stored row by row from address 0. Pixel (row, col) sits at
`row*640 + col`, so row r starts at `640*r`. Addresses are 21 bits wide.
Rows run 0..479 and columns 0..639. An ROI is given by four inclusive
bounds: `upper` and `bottom` rows (9 bits), and `left` and `right` columns
(10 bits). The server does not check the bounds. The caller must keep
`upper <= bottom <= 479` and `left <= right <= 639`.

## How an ROI server walks a rectangle

This is the part that takes the most care to understand. The server
(`roi_server`) is a small datapath around a control block (`roi_addr_gen`).
The control block keeps six registers:

| register       | meaning                                                    |
|----------------|------------------------------------------------------------|
| `address`      | address now on the bus of the bank in use                  |
| `line_address` | first address of the next ROI line                         |
| `rcounter`     | current row                                                |
| `ccounter`     | current column                                             |
| `done`         | 1 = idle and ready for a new ROI                           |
| `mem_select`   | 1 = MEMA in use, 0 = MEMB                                  |

The arithmetic units sit around the control block:

- **Start address.** `upper*640 + left` needs no multiplier, because
  640 = 2^9 + 2^7. The control block outputs `upper<<9` and `upper<<7`. A
  21-bit ripple-carry adder (`roi_rca_add`) sums them. A second one adds
  `left`. An add-640 unit (`roi_add640`) then gives the start of the
  second line.
- **Stepping.** A 21-bit incrementer (`roi_incr`) steps the address. Two
  10-bit incrementers step the column and the row. A second add-640 unit
  advances `line_address`.
- **Comparisons.** Two 10-bit comparators (`roi_cmp_gt`) test two
  conditions:
  - `comp1 = right > column`: the line is not finished yet;
  - `comp2 = row + 1 > bottom`: this is the last line.
- **Bounds register.** `roi_save` loads the bounds on every clock while the
  server is idle. They freeze when it starts, so the inputs may change
  while an ROI is being served.
- **Bank steering.** `roi_select_mem` sends the address to the bus of the
  bank in use and drives the other bus to 0. It returns the data of the
  bank in use.

On each clock the control block does one of these:

| state / condition       | action                                                                  |
|-------------------------|-------------------------------------------------------------------------|
| reset                   | `done=1`, MEMA selected, everything else 0                              |
| idle, `start=1`         | `done=0`; row=`upper`, column=`left`; address = start; next line = start+640 |
| busy, `comp1=1`         | address+1, column+1                                                     |
| busy, `comp1=0`, `comp2=0` | **eol**; address = next line; next line += 640; row+1; column=`left` |
| busy, `comp1=0`, `comp2=1` | **eol**; `done=1`; switch bank; address and counters to 0           |

There are no gaps between lines. An ROI of W x H pixels keeps `done` low
for exactly W*H clocks. `eol` is decoded from registers. It is high in the
clock in which the last address of a line is on the bus.

Timing for the 3 x 3 ROI upper=2, left=4, bottom=4, right=6. Each column
is one clock; the clock edge that ends clock 0 accepts `start`:

```
clock       0     1     2     3     4     5     6     7     8     9     10
start       1     0
address_a   0     504   505   506   784   785   786   A04   A05   A06   0
eol         0     0     0     1     0     0     1     0     0     1     0
done        1     0     0     0     0     0     0     0     0     0     1
data_out                p504  p505  p506  p784  p785  p786  pA04  pA05  pA06
```

**Bank timing.** The banks are read asynchronously: a bank answers in the
same clock as the address it is given. The server registers the pixel once.
So `data_out` lags its address by one clock. `data_valid` and `data_eol`
lag by the same clock. A downstream link can use these three signals and
ignore the address-side `eol`.

**Bank alternation.** After reset the server reads MEMA first. Each ROI it
completes toggles `mem_a_sel`. The server does not watch the writer. Issue
`start` only once the frame you want is complete in the bank the server
will read; `mem_a_sel` tells you which bank that is. This matches the
intended use: one ROI per server per frame, started after the writer's
`frame_done`.

## Frame writer and banks

`frame_writer` counts incoming pixels (one per `pix_valid`, in raster
order). It writes them to consecutive addresses of the current bank. After
the 307,200th pixel it returns to address 0, flips `wr_bank_b` and pulses
`frame_done`. There is no start-of-frame input: the frame boundary comes
from counting pixels. Pixels are expected to be already
non-uniformity-corrected; that correction happens upstream.

`frame_bank` is a plain array with one synchronous write port and one
asynchronous read port per server. Its defaults are:

- **Depth:** 512K words, the size of the board RAM. One frame uses 307,200
  of them.
- **Word:** 12 bits, one pixel per word.

## Top level: `msp0_roi_top`

| port                 | dir | width        | meaning                                         |
|----------------------|-----|--------------|-------------------------------------------------|
| `clk`, `reset`       | in  | 1            | single clock (50 MHz on the board); synchronous active-high reset |
| `pix_valid`, `pix_data` | in | 1, 12      | camera pixel stream                             |
| `wr_bank_b`          | out | 1            | frame being written goes to MEMB                |
| `frame_done`         | out | 1            | one-clock pulse after each frame                |
| `start`              | in  | N_ROI        | per-server start, taken while `done`            |
| `roi`                | in  | N_ROI x `roi_t` | per-server bounds `{upper, left, bottom, right}` |
| `done`, `eol`, `mem_a_sel` | out | N_ROI  | per-server status                               |
| `data_out`           | out | N_ROI x 12   | ROI pixels                                      |
| `data_valid`, `data_eol` | out | N_ROI    | pixel strobe and end-of-line, aligned with `data_out` |

The parameters are:

- `N_ROI = 4`: the number of servers.
- `BANK_DEPTH = 524288`: the depth of each bank.
- `FRAME_ROWS_P = 480`: lower it to shorten simulations. The row pitch
  stays 640, because the server is built around it.

The shared widths, the frame size and the `roi_t` struct are in
`rtl/msp_pkg.sv`.

## Where this RTL departs from the original design

- **Comparator.** The comparator is a true MSB-first magnitude compare,
  `a > b`. It is described that way, but the original listing ORs
  `a[i] & ~b[i]` over all bits. That is not a magnitude compare, and it
  would end most multi-line ROIs after one line. The published address
  sequences show complete ROIs, and those are what this RTL reproduces.
- **Idle state.** While idle, the address and column counter hold their
  values. The original kept incrementing them, which had no effect on the
  result.
- **Bus of the unused bank.** It is driven to 0. The original left it
  holding its last value.
- **Added outputs.** `data_valid`, `data_eol` and `mem_a_sel` are additions.
  The original offered only `data_out`, `eol` and `done`.
- **Bank shape.** Each bank stores one 12-bit pixel per word, although the
  board RAM is 48 bits wide. Each server gets its own read port. How the
  board shared its RAM between the four servers is not known.
- **Two FPGAs.** The board split the work over two FPGAs, each with its
  own RAM. Here everything is one clock domain in one top module.
- **Outside this RTL.** These are not part of this RTL: the fiber-channel
  link logic, non-uniformity correction, the camera bus protocol, the
  control processor that decides when to start the servers, and the
  board's FPGAs and programmable interconnect. Their sides of the design
  are plain ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line.

| testbench           | what it checks                                                              |
|---------------------|------------------------------------------------------------------------------|
| `tb_roi_rca_add`    | 21-bit adder, corner and random operands                                     |
| `tb_roi_add640`     | +640, corner and random                                                      |
| `tb_roi_incr`       | 21- and 10-bit incrementers including wrap                                   |
| `tb_roi_cmp_gt`     | all 2^20 operand pairs of the 10-bit comparator                              |
| `tb_roi_select_mem` | bank steering                                                                |
| `tb_roi_save`       | bound register load/hold/reset                                               |
| `tb_roi_addr_gen`   | control block alone, with the testbench supplying the arithmetic; sequences, eol, done timing, bank toggle, mid-ROI reset |
| `tb_roi_server`     | complete server; see below                                                   |
| `tb_frame_bank`     | write, masked write, wrap, four simultaneous asynchronous reads              |
| `tb_frame_writer`   | addresses, alternate banks, `frame_done`, with gaps in the pixel stream      |
| `tb_msp0_roi_top`   | end to end at full size; see below                                           |

`tb_roi_server` checks the server clock by clock against a reference
raster loop. It covers:

- the 3 x 3 example above;
- a waveform in which the bounds step up every clock and `start` is high
  for two clocks, so the server must take the bounds of the accepting
  clock and produce 0x785, 0x786, 0x787, 0xA05, …, 0xC87;
- the two infrared-image regions (208,268,265,357) and (212,40,268,125),
  with their known first, second-line and last addresses (0x2090C, 0x20B8C,
  0x297E5 on MEMA; 0x21228, 0x214A8, 0x29E7D on MEMB);
- back-to-back ROIs with `start` held high, which leave one idle clock
  between them;
- the first and last pixel of the frame;
- reset in mid-ROI;
- random rectangles.

`tb_msp0_roi_top` runs at the default parameters. It streams four full
frames with random idle clocks. After each of the first three frames, it
starts all four servers on different ROIs and compares every output pixel
with the generated frame contents. Those reads overlap the writing of the
next frame. The test also counts that each mechanism occurred: bank
switches, reads from each bank, reads overlapping writes, end-of-line
flags, and idle clocks. It takes a few seconds.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
          rtl/msp_pkg.sv tb/tb_msp0_roi_top.sv --top tb_msp0_roi_top -Mdir obj_top
./obj_top/Vtb_msp0_roi_top
```

Use the same command with another `tb/*.sv` file and its module name for
the other testbenches. `-y rtl` lets Verilator find the modules by file
name; the package is listed first because every module imports it. `roi_server` carries two assertions: `done` rises
only together with `eol`, and the counters never leave the ROI's upper-left
corner. They are active with `--assert`.
