# Vector median rational hybrid filter (VMRHF) accelerator

Colour images corrupted by a mix of impulsive noise (isolated wrong pixels)
and Gaussian noise are hard to clean with one filter. A median removes
impulses but smears fine detail. A linear smoother handles Gaussian noise but
spreads impulses. The vector median rational hybrid filter combines two
stages:

1. **Three vector median filters (VMF)** run on different subsets of a 3x3
   window and remove impulses. Each one returns a pixel of the window as a
   whole RGB vector, so no false colours appear.
2. **A vector rational function (VRF)** combines the three medians. It pushes
   the output away from the local average when the medians agree, which
   sharpens, and it damps that push when they disagree, which happens at
   edges. This removes Gaussian noise and small impulses while keeping edges.

This RTL is the hardware half of a processor-plus-accelerator system. The
processor holds the image in memory. It streams pixels into the accelerator
over an Avalon-MM bus and reads each filtered pixel back. The processor, bus
interconnect and other system peripherals are not part of this RTL.

## The filter

For a window centred on pixel n:

    Phi1 = VMF over the cross       (centre + 4 edge neighbours)
    Phi2 = VMF over the full 3x3 window
    Phi3 = VMF over the diagonals   (centre + 4 corners)

    y = Phi2 + k1 * (-Phi1 + 2*Phi2 - Phi3) / (w + ||Phi1 - Phi3||)

The equation is applied to each colour component. The norm in the
denominator is a single value for the whole pixel. The constants are
k1 = 1/k = 40 and w = h/k = 240, from h = 6 and k = 0.025. The numerator
is a discrete second difference. It is zero on flat or linear regions. When
Phi1 and Phi3 differ, which happens across an edge, the denominator grows
and the correction shrinks.

A vector median of pixels x_1..x_N is the x_i with the smallest
sum_j ||x_i - x_j||. When several pixels tie, the one with the lowest window
index wins.

### Window layout

Pixels are numbered in arrival order: column by column, top to bottom.

    0 3 6
    1 4 7        cross     = {1, 3, 4, 5, 7}
    2 5 8        diagonals = {0, 2, 4, 6, 8}

## The two approximations (the hardest part to follow)

**Distance.** The exact distance sqrt(dr^2 + dg^2 + db^2) is replaced by the
sum of the absolute component differences divided by a factor c. The factor
depends on how many of the three differences are zero:

| zero differences | c   | hardware        | why                                       |
|------------------|-----|-----------------|-------------------------------------------|
| 2 or 3           | 1   | `sum`           | the sum is the exact distance             |
| 1                | 4/3 | `(3*sum) >> 2`  | L1/L2 of two equal parts is sqrt(2) ~ 1.4 |
| 0                | 2   | `sum >> 1`      | L1/L2 of three equal parts is sqrt(3) ~ 1.7 |

This one block (`norm_approx`) is used everywhere a distance is needed: 36
copies in the nine-pixel median, 10 in each five-pixel median, and one in the
rational stage. Both scaled cases truncate.

**Division.** The rational stage follows a datapath with fixed widths for
each component:

    Phi1 + Phi3            (9 bits)
    Phi2 << 1              (9 bits)
    numerator = difference (9-bit magnitude + sign)
    denominator = w + norm (10 bits)
    quotient = |num| / den (2 bits, integer, truncated)
    correction = quotient * k1 (8 bits)
    y = Phi2 +/- correction, clamped to 0..255

The numerator magnitude is at most 510 and the denominator is at least 240,
so the integer quotient is 0, 1 or 2. The correction is therefore 0, 40 or
80 grey levels. This is much coarser than the continuous equation. Most
pixels get a quotient of 0 and leave as Phi2, the full-window vector median.
The rational term fires only on strong, consistent second differences.

The multiplication by k1 comes after the integer division because the
datapath is drawn that way. Doing the multiplication first would give a
finer result, at the cost of a wider divider. Change `vrf_channel` if you
want that.

## Pixel loading

After a band start, the first window of a band needs nine pixels. Each next
window to the right reuses six of them and needs only the three pixels of the
new column. `window_buffer` is a nine-entry shift register that shifts once
per accepted pixel. It counts to 9 after a band start and to 3 after that.
Each time the count completes it pulses `win_valid`. Moving down one row
means starting a new band.

## Register map (`vmrhf_regs`)

The register file uses 32-bit words and word addresses. Reads return data
one cycle after the read (a fixed latency of one). There is no waitrequest.

| addr | name    | access | content |
|------|---------|--------|---------|
| 0    | PIXEL   | W      | `{8'h00, R, G, B}`: shifts one pixel into the window |
| 1    | CONTROL | W      | bit 0 = 1: band start, so the next window takes nine pixels |
| 2    | STATUS  | R      | bit 0: result ready; bit 1: a result was overwritten unread |
| 3    | RESULT  | R      | `{8'h00, R, G, B}` of the last filtered pixel; reading it clears STATUS |

The software loop for an image of width W and height H:

    for each band r = 0 .. H-3:
        write CONTROL = 1
        for each column c = 0 .. W-1:
            write PIXEL three times: rows r, r+1, r+2 of column c
            if c >= 2:
                poll STATUS until bit 0 is set
                read RESULT     -> output pixel (r+1, c-1)

Border pixels are not produced. The software decides what to do with them.
The testbench copies the noisy input.

## Timing

- `vmrhf_core` is pipelined as window register, then the three medians, then
  the rational stage. `out_valid` rises two clock edges after the edge that
  accepted the window's last pixel. A new window can be accepted every cycle.
- Through the registers, RESULT and STATUS change on the third edge after the
  write of the last pixel. A read sampled on the fourth edge or later returns
  the new pixel. The end-to-end test checks this exact count.
- In the end-to-end test, a 176x144 image takes 198,659 bus cycles: about 8
  cycles per output pixel, counting status polling. At a 60 MHz system clock
  that is 3.3 ms. The accelerator is therefore far from limiting a
  processor-driven loop (the full software-driven process is in the tens of
  milliseconds).
- The medians and the rational stage are each one combinational stage. No
  timing closure was done. To reach a particular clock rate, add pipeline
  registers inside `vmf`: the adder tree of the distance sums, then the
  arg-min.

## Files

| file | contents |
|------|----------|
| `rtl/vmrhf_pkg.sv`     | `pixel_t` struct, widths, k1, w, window masks, mask helpers |
| `rtl/norm_approx.sv`   | approximate colour distance |
| `rtl/vmf.sv`           | N-input vector median (all pairs in parallel, arg-min) |
| `rtl/vrf_channel.sv`   | rational function for one component |
| `rtl/vrf.sv`           | shared norm + three `vrf_channel` |
| `rtl/window_buffer.sv` | 3x3 window shift register with 9-then-3 loading |
| `rtl/vmrhf_core.sv`    | window buffer, three VMFs, VRF, pipeline registers |
| `rtl/vmrhf_regs.sv`    | Avalon-MM slave register file |
| `rtl/vmrhf_top.sv`     | top: register file + core |
| `tb/vmrhf_ref_pkg.sv`  | integer reference model used by all testbenches |
| `tb/tb_*.sv`           | one self-checking testbench per module |

None of the modules has a parameter that changes the architecture.
`vmf` takes `N`, and `vrf_channel` takes `K1_P` and `W_P`, so other values of
h and k are a one-line change.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog.

- `tb_norm_approx`, `tb_vmf`, `tb_vrf_channel`, `tb_vrf`: hand-worked cases
  for every branch, including each c case, quotients 0, 1 and 2, both signs,
  both clamps and median ties. They also run thousands of random inputs
  against `vmrhf_ref_pkg`.
- `tb_vmrhf_pkg`: the constants, and the subset sizes and window indices
  that the mask helpers derive.
- `tb_window_buffer`: bands of random length with idle cycles. It checks the
  window contents and the pulse timing.
- `tb_vmrhf_core`: random bands streamed in. It checks every result and the
  two-cycle latency.
- `tb_vmrhf_regs`: strobes, read latency, and the ready and overrun bits.
- `tb_vmrhf_top`: the full design at default parameters, driven like the
  software loop above. It first filters a synthetic 176x144 colour image:
  colour ramps and two disks, 1% impulses, and noise of variance about 100.
  Every pixel is compared with the reference model. The PSNR is about 24 dB
  for the noisy image and about 32 dB for the filtered one. It then filters
  a 176x30 stress image from a small palette to reach the rare cases. The
  test counts how often each case occurs and fails if one never does. The
  cases are nine- and three-pixel windows, all three c cases, quotients 1
  and 2, downward and upward corrections, clamps at 0 and 255, and overrun.

The reference model implements the same approximations. The tests therefore
show that the RTL matches the arithmetic described above. They do not show
that this arithmetic matches the exact floating-point filter.

To run a testbench with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/vmrhf_pkg.sv tb/vmrhf_ref_pkg.sv tb/tb_vmrhf_top.sv \
        --top-module tb_vmrhf_top -o sim
    ./obj_dir/sim

The full-size top test runs in a few seconds.

## Where this design makes its own choices

These points are not fixed by the filter description, or are read from it:

- **The one-zero factor c = 4/3.** The factors for "two zeros" and "none
  zero" are 1 and 2. The one-zero factor is taken as 4/3, implemented as
  `*3/4`. A factor below 1 would make the estimate larger than the L1 sum.
- **The coefficient vector is (-1, 2, -1).** The unbiasedness condition
  requires the coefficients to sum to zero, and the second-stage datapath
  (Phi1 + Phi3, subtracted from 2*Phi2) matches only this vector.
- **The medians use the approximate distance too.** The rational stage uses
  it, and the median stage uses the same block. How the median hardware is
  organised is this design's choice.
- **Subset shapes.** The cross for Phi1 and the diagonals for Phi3 are read
  from the block diagram of the filter.
- **Output arithmetic.** The final `+ Phi2`, the sign handling, truncation
  toward zero and clamping to 0..255 are this design's choices. The
  datapath as drawn ends at the multiplier.
- **Pipeline and interface.** The pipeline registers, the register map, the
  band-start bit, the status bits and the read latency are this design's
  choices.
- **Reset and clocking.** Reset is asynchronous and active low, and there is
  a single clock.

The evaluated system also had a soft processor, an operating system, an
auto-generated bus, a timer, a UART, interrupts, Ethernet and memory
controllers. These are standard vendor components. They are left out here,
and `vmrhf_top` exposes the Avalon-MM slave port they would connect to.
