# P2IP: a programmable pipeline image processor in SystemVerilog

P2IP is a linear, systolic array of identical processing elements (PEs) for
low-level image processing on a pixel stream. A true-colour stream enters at
one pixel per clock. Each PE takes one colour channel, runs it through a few
hard-wired operators, and passes all channels on to the next PE. Edge
sharpening, Canny edge detection and Harris corner detection are all built
by configuring the same array differently. Nothing is reprogrammed at the
instruction level. A byte-wide configuration tree only sets
registers that choose operators, window sizes, kernels, thresholds and the
routing inside each PE. The array has no frame buffer: each PE keeps at most
a few image lines. So the latency is a handful of lines, not a frame.

This RTL follows the architecture published as *P2IP: A novel low-latency
Programmable Pipeline Image Processor*. The structure, the operator set, the
configuration tree and the latency figures come from that description. The
encodings, the stream framing and many widths are this implementation's
own choices. They are listed in "Departures and own choices" below.

## Structure

```
 s_axis ─► input_register ─► PE1 ─► PE2 ─► … ─► PE10 ─► output_register ─► m_axis
  (24-bit RGB)    R,G,B,Gs      4 colour channels + 5 aux channels      {R,G,B} or gray
                     ▲             ▲ px_en, frame_sync, frame size           ▲
                     └──────── p2ip_controller (AXI4-Stream + p2ip_cd) ──────┘
                                   ▲ config_in[7:0], config_valid (cfg_clk)
```

* **input_register** splits the 24-bit word (R in bits 23:16, G 15:8,
  B 7:0) and adds a gray channel `Gs = (77 R + 150 G + 29 B) >> 8`.
* **processing_element** (×10) contains four parts:
  * **memory_controller**: four 4096×8 memory blocks (MB1–MB4) and an MB
    crossbar. Three memory operators use the blocks:
    * neighborhood extractor (NE) with border handler;
    * mirror;
    * delay `Z^-n`.
  * **spatial_processor**:
    * 2D convolver (2DC): one 5×5 kernel or two 3×3 kernels;
    * non-maximum suppressor (NMS);
    * connector.
  * **pixel_processor**: ALU, direction, Harris response and threshold.
  * **reconfig_interconnect** with two crossbars:
    * The RGB crossbar picks the channel the PE works on and puts the result
      back on any outgoing channel.
    * The module crossbar routes between the operators and the five
      auxiliary channels shared with the neighbouring PEs.
* **output_register** drives `{R,G,B}`, or in gray output mode the gray
  channel on all three bytes.
* **p2ip_controller** owns the AXI4-Stream ports and generates the pixel step
  enable `px_en` and `frame_sync`. It also contains **p2ip_cd**, the root of
  the configuration tree.

The whole datapath advances only on `px_en`. One pixel step moves every
register of every PE by one pixel. Stalls on either stream side therefore
freeze the array as a whole and never corrupt a window.

## Stream framing and the flush

The controller loops through four states:

1. `SYNC` pulses `frame_sync` for one cycle. The NE and mirror position
   counters restart from it.
2. `SOF` discards input beats until one arrives with `s_tuser` set (start of
   frame).
3. `RUN` accepts W·H beats. Each accepted beat is one pixel step.
4. `FLUSH` makes `latency` more steps without input, so the last pixels
   reach the output.

Pixel k of the output is produced at step k + latency. `m_tvalid` is raised
for exactly W·H beats: `m_tuser` marks the first and `m_tlast` every line end.
A step is taken only when the output register is free (`!m_tvalid ||
m_tready`), so an output beat stays stable under back-pressure. The
controller carries assertions for this rule. `s_tlast` is accepted but not
checked.

Without stalls a frame takes W·H + latency + 1 clocks. For 1920×1080 with the
10-PE worst-case latency this is about 0.1 % above one pixel per clock.

**`latency` is a configuration register, not a computed value.** The user
writes the sum of the PE latencies along the active path. The default,
2·10 + 1 = 21, is the latency of an unconfigured array:
* 1 step for the input register;
* 2 steps per pass-through PE;
* the output register's step is counted in the controller's convention.

## Latency of a PE

Every operator has a fixed latency in pixel steps:

| part | steps |
|---|---|
| RI, longest path (input register, module crossbar out, module output register, RGB crossbar out) | 8 |
| RI, pass-through channel | 2 |
| NE, m×n window, line width W | cr·W + cc + 4, with cr = (m−1)/2, cc = (n−1)/2 (3 of them in the border handler) |
| 2DC | 10 |
| Harris | 4 |
| ALU, threshold, NMS, connector | 2 each |
| direction | 4 (equal to ALU + threshold) |
| mirror | W + 1 |
| delay | configured, 2…8193 |

For a 5×9 window the longest PE path is RI 8 + NE (2W + 8) + 2DC 10 +
Harris 4 + threshold 2 = **2W + 32**. This is the published worst-case PE
latency. Streams that rejoin after different paths are aligned with the
delay operator. For example, edge sharpening of one channel with a 3×3
Laplacian:

* The window path costs 8 + (W + 5) + 10 + 2 (ALU) = W + 25 steps more than a
  pass-through.
* The direct path therefore needs `Z^-n` with n = W + 15. That makes the PE
  W + 27 steps long.

The testbenches check these numbers cycle by cycle.

## Memory controller

* MB1 and MB2 always belong to the NE.
* MB3 and MB4 go as a pair to one operator, chosen by the MBX register:
  * to the NE, for windows of 4 or 5 lines;
  * to the mirror, as two LIFO line buffers used alternately, so each line
    leaves reversed one line later;
  * to the delay, as one circular buffer of 8192 words, up to two lines of
    the largest frame.

The NE writes the incoming pixel into a chain of line buffers. Each buffer is
W−10 words long and feeds a 9-register pixel array, so buffer plus array hold
one line. The five arrays form a raw 5×9 window with the centre at `[2][4]`,
row 0 on top. The frame width must therefore be at least 11.

The border handler then does two things:
* It replaces positions that fall outside the frame by the nearest pixel
  inside (replication).
* It zeroes positions outside the configured m×n window, so downstream
  kernels may assume the window is exactly m×n.

In recursive mode the NE takes a second stream, `iRec`, into the line buffer
that feeds the row just above the centre. A result computed from the window
can therefore re-enter the window one line later.

The NE and the mirror find pixel (0,0) by counting steps after `frame_sync`.
A configured offset tells them at which step that pixel arrives. In a chain,
pixel 0 reaches the pixel array of PE p at step 2p + 2 when every earlier PE
is a pass-through.

## Configuration tree

Configuration runs on `cfg_clk` and is byte-serial (`config_in`,
`config_valid`). One transfer writes one operator register:

| byte | bits 7:3 | bits 2:0 |
|---|---|---|
| 0 | PE ID (0 = global registers, 1…10 = PE) | module ID |
| 1 | operator ID | register size − 1 (1…8 bytes follow) |
| 2… | payload, least significant byte first | |

The tree has four register levels: `p2ip_cd` → `pe_cd` → `module_cd` →
`reg_cd`. A payload byte therefore lands in its register four `cfg_clk`
cycles after it is presented. Writing an 8-byte register takes 10 + 4
cycles. Registers are meant to be written between frames, because the
datapath reads them as static values.

Modules: 1 pixel processor, 2 memory controller, 3 spatial processor,
4 interconnect. Register maps (bit 0 = bit 0 of the first payload byte):

| module / op | bytes | fields | reset |
|---|---|---|---|
| global 0 / 1 | 2 | frame width | 1920 |
| global 0 / 2 | 2 | frame height | 1080 |
| global 0 / 3 | 3 | pipeline latency in steps | 21 |
| global 0 / 4 | 1 | bit 0: gray output | 0 |
| PP 1 / 1 ALU | 3 | [3:0] op (0 pass, 1 mul, 2 square, 3 shl, 4 shr, 5 add, 6 sub, 7 and, 8 gt, 9 lt), [4] b = constant, [5] b signed, [6] threshold input = Harris (else ALU); [15:8] constant; [19:16] product right shift; [23:20] left shift of b for add/sub | pass |
| PP 1 / 2 Thr | 3 | [7:0] T_low, [15:8] T_high, [17:16] mode (1 bypass, 2 normal, 3 hysteresis; 0 = bypass) | bypass |
| MC 2 / 1 MBX | 4 | [1:0] MB3/4 owner (0 NE, 1 mirror, 2 delay), [2] oMC = mirror (else delay), [31:8] mirror offset | NE |
| MC 2 / 2 NE | 4 | [2:0] m (3…5), [6:3] n (1…9), [7] recursive, [31:8] offset | 3×3 |
| MC 2 / 3 DLY | 2 | [13:0] delay in steps | 2 |
| SP 3 / 1 2DC | 2 | [2:0] kernel a, [5:3] kernel b, [7:6] format (0 clamp 0…255, 1 absolute, 2 signed −128…127); [8] oSP_a = NMS, [9] oSP_b = connector, [10] NMS over the whole window, [11] downloaded kernel is 5×5 | kernel 0 |
| SP 3 / 2…4 | 8 each | downloaded kernel coefficients 0–7, 8–15, 16–23 (signed, row by row, top-left first) | 0 |
| SP 3 / 5 | 2 | [7:0] coefficient 24, [12:8] right shift of the downloaded kernel's sum | 0 |
| RI 4 / 1 MXB | 7 | 13 destinations × 4-bit source, destination d in bits [4d+3:4d] | aux pass-through |
| RI 4 / 2 RGBX | 2 | oR [2:0], oG [5:3], oB [8:6], oGs [11:9] (0…3 = input R/G/B/Gs, 4 = result), [13:12] channel sent to the module crossbar | pass-through |

Module-crossbar sources:

| code | source |
|---|---|
| 0 | zero |
| 1–5 | iAux1–5 |
| 6 | oPP_a |
| 7 | oPP_b |
| 8 | oMC |
| 9 | oSP_a |
| 10 | oSP_b |
| 11 | the channel chosen by the RGB crossbar |

Module-crossbar destinations:

| code | destination |
|---|---|
| 0–2 | iPP_a, iPP_b, iPP_c |
| 3 | iMC_a (NE input) |
| 4 | iRec |
| 5 | iMC_b (mirror or delay input) |
| 6 | iSP |
| 7–11 | oAux1–5 |
| 12 | result back to the RGB crossbar |

2DC kernel ROM:

| code | kernel |
|---|---|
| 0 | downloaded kernel (all zero after reset, so the output is 0) |
| 1 | identity |
| 2 | Laplacian (8 centre, −1 around), /16 |
| 3 | Sobel, horizontal gradient, /8 |
| 4 | Sobel, vertical gradient, /8 |
| 5 | 5×5 Gaussian (rows 1 4 7 4 1 / 4 16 26 16 4 / 7 26 41 26 7 …, sum 273), scaled by 240/65536 |
| 6 | central difference, horizontal (right − left) |
| 7 | central difference, vertical (below − above) |

Selecting a 5×5 kernel for kernel a uses all 25 multipliers and forces
output b to 0. Otherwise lanes 0–8 compute kernel a and lanes 9–17 kernel b.
A 3×3 use of the downloaded kernel takes its centre 3×3 coefficients.

Example, edge sharpening of red in PE 1 with a frame width W:

* RGBX = `0x068C`: R comes from the result; G, B and Gs pass through; R goes
  to the module crossbar.
* MXB: iMC_a ← 11, iMC_b ← 11, iPP_a ← 8, iPP_b ← 9, result ← 7.
* MBX = `0x02`: MB3 and MB4 belong to the delay.
* DLY = W + 15.
* NE = `{0x1B, offset 4}`: a 3×3 window.
* 2DC = `0x82`: Laplacian, signed format.
* ALU = `0x25`: add, b signed.

The pixel processor output oPP_b is the threshold in bypass.

## Operators

* **Threshold**: normal mode gives 0xFF at or above T_low, otherwise 0.
  Hysteresis mode gives:
  * 0 below T_low;
  * the pixel itself between T_low and T_high, as an edge candidate;
  * 0xFF at or above T_high.

  Logic 1 is coded 0xFF throughout the datapath.
* **Connector**: turns a non-zero candidate into 0xFF when one of its eight
  neighbours is 0xFF, which closes gaps in edges.
* **NMS**: passes the window centre if it is not smaller than its two
  neighbours along the gradient direction, otherwise 0.
  * The direction comes on iSP from the direction operator. A non-zero
    direction compares the left and right neighbours; zero compares the upper
    and lower ones.
  * In window mode the centre is compared with the whole window instead.
* **Direction**: gives 0xFF when iPP_a > iPP_b. It approximates the gradient
  orientation from |Gx| and |Gy|.
* **Harris**: R = A·B − C² − (3/64)(A + B)², divided by 256 and clipped to
  0…255. A, B and C are the smoothed Ix², Iy² and Ix·Iy on iPP_a/b/c.
* **ALU**: results saturate to 0…255. Products can be shifted right before
  saturation.

## Departures and own choices

* The stream framing (tuser, tlast, dropping beats before the first start of
  frame, the flush) is this design's. So is the configured pipeline latency.
* The published NE latency formula is cr·W + cc + b with b = 3. This design
  has one more step, for the synchronous memory read. With it, the PE
  worst case equals the published 2W + 32 and the published per-part
  figures (RI 8, 2DC 10, Harris 4, threshold 2).
* The kernel ROM holds seven fixed kernels. Any other kernel is written as
  25 coefficients into four spatial-processor registers. A register holds at
  most 8 bytes, so the coefficients are split over four.
* A 9×9 window made by joining the NEs of two neighbouring PEs is not
  implemented. A single PE gives windows of up to 5×9.
* The pixel processor has three inputs. In the published Harris mapping one
  PE forms Ix·Iy internally before smoothing. Here Ix·Iy comes from an ALU in
  an earlier PE.
* The gray weights, the crossbar encodings, all register layouts except the
  threshold register and the header, the 0xFF coding of logic 1, and the
  aux-channel count of five are this design's choices.
* Writing one register takes 14 `cfg_clk` cycles (0.14 µs at 100 MHz). The
  published design quotes 0.34 µs as the maximum.
* The two clocks are treated as asynchronous but quasi-static. There is no
  synchroniser between configuration registers and the datapath, so
  configure between frames.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
models written independently in the testbench. All testbenches print
`TB_RESULT checks=N failures=M`. The main ones:

* `tb_neighborhood_extractor` checks every window position for 3×3 to 5×9
  windows against a clamped-coordinate model, including recursive mode.
* `tb_processing_element` runs edge sharpening through one PE with random
  pauses. It checks every pixel and the W + 27 step latency.
* `tb_p2ip_top` is the end-to-end test at the default parameters (10 PEs,
  4096-word memories). Everything is configured through `config_in`: frame
  size 32×8, latency, PE registers. It streams three random frames with
  random input gaps, output back-pressure and junk before the start of
  frame:
  1. edge sharpening of R, G and B in PEs 1–3, colour output;
  2. sharpening of the gray channel in PE 4, gray output;
  3. the same with PE 4's threshold switched to normal mode.

  It checks every output pixel and the frame flags. It counts each mechanism
  and fails if one never occurred:
  * configuration bytes and register updates;
  * frame syncs;
  * dropped beats;
  * input gaps and back-pressure, with held beats;
  * flush steps;
  * border pixels;
  * gray pixels;
  * both threshold outcomes.

* `tb_p2ip_workload_es` runs edge sharpening on a full 1920×1080 frame and
  a full 3840×2160 frame at the default parameters. It checks every output
  pixel, and checks that the last pixel leaves W·H + latency clocks after
  the first one enters. This takes about 1.5 minutes with Verilator.
* `tb_p2ip_workload_ced` maps the whole Canny edge detector on PEs 1–5:
  1. a 5×5 Gaussian;
  2. both Sobel kernels, the direction and |Gx| + |Gy|;
  3. NMS with the direction aligned by the delay, then the hysteresis
     threshold;
  4. the connector followed by the mirror;
  5. the connector followed by the mirror, then the final threshold.

  It streams two random frames (24×12 and 40×9) with gaps and back-pressure
  in gray mode and checks every pixel against a frame-level model. It also
  checks that zero, candidate and strong pixels all occur, and that the
  connector really promotes some candidates.

Harris corner detection was not run end to end.

To run a testbench with Verilator 5:

```
verilator --binary --timing --top-module tb_p2ip_top -Irtl -Itb -y rtl -y tb \
    +libext+.sv rtl/p2ip_pkg.sv tb/tb_p2ip_top.sv -o sim && obj_dir/sim
```

Replace `tb_p2ip_top` with any other testbench name. `tb/tb_common.svh`
holds the check macros, and `tb/tb_ref.svh` the reference window and
sharpening models.
