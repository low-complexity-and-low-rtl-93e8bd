# Soft-output symbol detector for 2x2 MIMO

This is synthesizable SystemVerilog for a detector that turns received samples and a channel estimate into 8-bit log-likelihood ratios (LLRs). It serves a receiver with two transmit and two receive antennas. One datapath handles every transmission mode such a link uses:

- SISO;
- SIMO (receive combining);
- MISO (2x1 Alamouti);
- 2x2 Alamouti STBC/SFBC, called **SD** (spatial diversity) below;
- 2x2 spatial multiplexing, called **SM**.

In SM the detector is a *modified maximum-likelihood* (MML) detector. For each of the M candidates of one symbol, the best partner symbol is found by slicing, not by searching. So M metrics per symbol are computed instead of M². Even for 64QAM this gives exact max-log ML soft output at 64 metrics per symbol.

The architecture follows a published low-power detector design for mobile devices. It has these features:

- a common front end shared by all modes;
- a multiplier-free "polar" product unit for the 64 candidate products;
- a 4-clock pipeline over the constellation;
- a separately gated clock for the SM-only logic, which holds most of the gates.

The text below says which parts follow that architecture and which were chosen here. The section "Own choices and departures" collects the choices.

## Signal model and what the detector computes

The channel coefficient from TX antenna j to RX antenna i is `h_ji`. The sample of RX antenna i in time unit k is `y_ik`. An input vector always carries the full set `h11 h12 h21 h22` and `y11 y12 y21 y22` as 16-bit I/Q values. A mode uses only the parts it needs.

| Mode | Symbols per vector | Received model |
|---|---|---|
| SISO | 1 | y11 = h11 x |
| SIMO | 1 | y11 = h11 x, y21 = h12 x |
| MISO | 2 | Alamouti: time 1 sends (x1, x2), time 2 sends (-x2*, x1*); RX 1 only |
| SD | 2 | as MISO, both RX antennas |
| SM | 2 | y1 = h11 x1 + h21 x2, y2 = h12 x1 + h22 x2 (y11, y21) |

Modulations are QPSK, 16QAM and 64QAM in every mode, and BPSK in the diversity modes (SISO, SIMO, MISO, SD). Constellation levels are the odd integers; BPSK sends ±1 on the I axis and gives one LLR (LLR0). A symbol coordinate is a 3-bit index k, with level 2k-7.

Each output is the set of six LLRs of one transmitted symbol, LLR0..LLR5, plus a tag. The tag holds the mode, the modulation and the time unit or TX index.

- LLR 2n is a bit of the I coordinate and LLR 2n+1 a bit of the Q coordinate.
- The three bits per axis are the sign, outer and fine bits:
  - sign is 1 for negative levels;
  - outer is 1 for |level| >= 5 (64QAM) or |level| = 3 (16QAM);
  - fine is 1 for |level| in {1, 7}.
- This is a Gray labelling. A positive LLR favours bit value 1.
- LLRs a modulation does not use are 0.

## Shared front end: IPM and PCM

Every mode reduces to the same three quantities of 2-element complex vectors:

    p1 = a^H b,   p2 = c^H d,   p3 = ||e||^2

The **input preprocessor** (`ipm`) chooses a..e per mode and time unit. The **parameter calculation module** (`pcm`) computes the three quantities with four conjugate complex multipliers and two squared-norm units, at 33-bit I/Q.

| Mode, time unit | a | b | c | d | e |
|---|---|---|---|---|---|
| SISO | h11, 0 | y11, y12 | - | - | = a |
| SIMO | h11, h12 | y11, y21 | - | - | = a |
| MISO t0 | h11, h21* | y11, y12* | - | - | = a |
| MISO t1 | h21, -h11* | y11, y12* | - | - | = a |
| SD t0 | h11, h21* | y11, y12* | h12, h22* | y21, y22* | = a |
| SD t1 | h21, -h11* | y11, y12* | h22, -h12* | y21, y22* | h12, h22* |
| SM t0 | h21, h22 | y11, y21 | h21, h22 | h11, h12 | = a |
| SM t1 | h11, h12 | y11, y21 | h11, h12 | h21, h22 | = a |

In the diversity modes, p1 (+ p2 in SD) is the Alamouti or maximum-ratio combiner output z. p3 is the channel energy, the CSI. In SD, e covers the RX-1 channels in t0 and the RX-2 channels in t1. The next stage adds the two halves, so the CSI of both symbols is |h11|²+|h12|²+|h21|²+|h22|².

In SM the IPM **switches the channel columns** between the two time units. In t0 the candidates c_m belong to the TX-1 symbol (column h1), and the partner is sliced on column h2. In t1 the roles are swapped. So the same hardware produces first the LLRs of x1 and then those of x2. In SM the three parameters are:

- p1 = h_x^H y;
- p2 = h_x^H h_c;
- p3 = ||h_x||².

Here h_c is the column of the searched symbol and h_x that of the sliced one.

## Diversity path: DVCM and 1DLCM

The **decision-variable module** (`dvcm`) forms the decision variable and the CSI:

- SISO, SIMO and MISO: z = p1 and CSI = p3.
- SD: z = p1 + p2, and CSI is the sum of the two p3 halves. z of t0 waits one clock for the t1 energy.

z and CSI are scaled by 2^-Z_SHIFT and saturated to 17 bits.

After combining, z ≈ CSI·x. The **1-D LLR module** (`lcm1d`) therefore demaps each axis u (I or Q of z) with CSI-scaled thresholds. It needs no division:

| Bit | LLR |
|---|---|
| sign | -u |
| 16QAM outer | \|u\| - 2·CSI |
| 64QAM outer | \|u\| - 4·CSI |
| 64QAM fine | \|\|u\| - 4·CSI\| - 2·CSI |

These are 24-bit values. This is the usual piecewise-linear form of max-log demapping. For BPSK only the I sign LLR is produced; the Q sign LLR is forced to 0.

## Spatial-multiplexing path: X2CCM, PBM, EDCM, 2DLCM

This path holds most of the logic and is the hardest part of the design.

**Slicing without division (`x2ccm`).** For a candidate c_m of the searched symbol, the ML partner is

    x2(c_m) = Q( h_x^H (y - h_c c_m) / ||h_x||² ) = Q(p1 - p2·c_m, p3)

Q(u, p3) rounds u/p3 to the nearest constellation level. Instead of dividing, each axis of u = p1 - p2·c_m is compared with the thresholds 0, ±2·p3, ±4·p3 and ±6·p3, made with shifts and adds. The number of thresholds exceeded is the level index, clipped to the active modulation. The inputs are first scaled from 33 bits to 16 bits (2^-SM_SHIFT, saturating).

**Polar-based multiplier (`pbm`).** u needs all 64 products p2·c_m. The constellation is symmetric under rotation by 90°, so 16 points are enough:

- the four base points 1+i, 3+i, 5+i and 7+i;
- their rotations by i, -1 and -i.

A rotation is only a swap of I and Q and a sign change. The unit has four stages:

- **Clock 0 (group A):** the base products p2·(2n+1+i), n = 0..3, made with shifts and adds.
- **Clocks 1, 2, 3 (groups B, C, D):** each base product gains 2i·p2 per clock. That is one adder per point.

Each clock therefore yields 16 products. Lane 4g+n in phase k carries the candidate ((2n+1) + i(2k+1))·i^g. `mimo_pkg::cand_of` defines this numbering, and every SM module uses it. After 4 clocks all 64 candidates have been seen. For 16QAM and QPSK the lanes outside the constellation are ignored downstream.

**Distance (`edcm`).** For each of the 16 lanes the residual of each RX antenna is

    r_i = y_i - h_ci·c_m - h_xi·x2(c_m)

Both products multiply by an odd level up to 7, so they are shifts and adds. The magnitude is approximated without squares:

    |r| ≈ 3/8 (|Re r| + |Im r|) + 5/8 max(|Re r|, |Im r|)

The metric is the sum of this over the two RX antennas. It is 24 bits wide.

**LLRs (`lcm2d`).** Two running minima are kept per bit: the smallest metric among candidates whose bit is 0, and among those whose bit is 1. They are reset at phase 0. After phase 3, LLR = min0 - min1, saturated to 19 bits. This is max-log with the approximate norm.

**Pipeline timing.** One SM vector uses the PBM for 4 clocks per column, so a vector (two symbols) takes **8 clocks**. Items leave the IPM every 4 clocks, and each symbol's LLRs appear 4 clocks apart. For 64QAM this is 12 bits per 8 clocks: 150 Mbit/s at a 100 MHz clock.

## Clock gating (`gcgm`)

The X2CCM (with the PBM), the EDCM and the 2DLCM are needed only in SM. They run on `clk_sm`, a gated copy of the clock. The rest runs on the ungated `clk_sd`.

The gate enable has two terms:

- the mode of the vector being issued is SM;
- or SM work is still in flight. The IPM keeps this term high for SM_TAIL clocks after the last SM item, so the pipeline drains.

The enable is registered on the falling clock edge and ANDed with the clock. It can therefore change only while the clock is low, so `clk_sm` has no glitches. In a standard-cell flow, replace the flop and the AND gate with an integrated clock-gating cell.

Once an SM stretch has drained, `clk_sm` does not toggle at all during SISO/SIMO/MISO/SD traffic. The system testbench checks this.

## Ordering between the two paths

The SD path is short: its LLRs appear 4 clocks after the PCM. The SM path is long: 11 clocks from acceptance to the first LLR. The two paths meet at one multiplexer (`llr_mux`) and the quantizer (`qm`).

- The IPM makes a diversity-mode vector that follows an SM vector wait one extra clock. This keeps the outputs in input order, and the paths never deliver in the same clock. An assertion in `llr_mux` checks this.
- The quantizer divides by 2^QSHIFT_SD or 2^QSHIFT_SM with round-to-nearest, then saturates to [-128, 127].

Rates, in clocks of `clk`:

| Mode | Clocks per vector | Symbols per vector |
|---|---|---|
| SISO, SIMO | 1 | 1 |
| MISO, SD | 2 | 2, one per clock |
| SM | 8 | 2 |

Latency from acceptance to the first LLR is 7 clocks in the diversity modes and 11 in SM.

## System wrapper and bus map (`mimo_detector_soc`)

The top level puts the core (`mimo_detector`) behind buffers and an AHB-Lite slave, so a processor can run it:

- `in_ram` is used twice: once for channel matrices and once for received samples. Each holds 48 vectors. The bus side reads and writes 32-bit words; the detector side reads 128 bits (one vector) per clock.
- `in_fetch` streams vectors 0..count-1 into the core through its valid/ready handshake, one per clock when the core accepts them.
- `omc` writes each LLR set leaving the core to the next entry of `out_ram`. `out_ram` holds 96 entries of 64 bits.
- `ahb_if` is the bus slave. Writes have no wait state; reads have one.

Address map (byte addresses, 32-bit accesses):

| Address | Content |
|---|---|
| 0x0000 + 4·(4v+s) | channel RAM, vector v, s = h11, h12, h21, h22, word {re, im} |
| 0x1000 + 4·(4v+s) | sample RAM, s = y11, y12, y21, y22 |
| 0x2000 + 4·(2n+w) | LLR entry n: w=0 {LLR3..LLR0}, w=1 {0, tag, LLR5, LLR4} |
| 0x3000 CTRL | [0] start, [6:4] mode, [9:8] modulation, [23:16] vector count |
| 0x3004 STATUS | [0] busy, [1] done, [2] LLR RAM overflow, [23:16] entries written |

The tag byte is {0, 0, t, modulation[1:0], mode[2:0]}. The codes are:

- mode: 0 SISO, 1 SIMO, 2 MISO, 3 SD, 4 SM;
- modulation: 0 QPSK, 1 16QAM, 2 64QAM, 3 BPSK (not in SM).

A run (one "slot") uses one mode and modulation. It produces `count` entries in SISO/SIMO and `2·count` entries otherwise. In SD and SM the order is t0 then t1 of each vector.

A processor runs one slot as follows:

1. Write the channel and sample words of vectors 0..count-1.
2. Write CTRL with start = 1, the mode, the modulation and the count. A CTRL write while busy is ignored.
3. Poll STATUS until done = 1.
4. Read the LLR entries. The next start clears the LLR RAM pointer.

## Word lengths

| Signal | Bits |
|---|---|
| input H, y (I/Q) | 16 |
| p1, p2, p3 (I/Q) | 33 |
| z, CSI | 17 |
| 1-D LLR | 24 |
| X2CCM inputs | 16 |
| PBM product, slicer argument | 20 / 21 |
| EDCM residual | 28 |
| EDCM metric | 24 |
| 2-D LLR | 19 |
| output LLR | 8 |

The package `mimo_pkg` holds these widths, the shared types and the constellation helpers.

## Own choices and departures

These points are this design's own choices; the published architecture does not fix them.

- **Operand mapping.** In the Alamouti rows the second operands are conjugated as the combiner requires. SIMO pairs y11 with y21, the two antennas of one time unit. In SD t1, `e` is set to the RX-2 channels, and the DVCM adds the energy of both time units. This departs from a literal "CSI = p3 of the current time unit".
- **Slicer scaling and widths.**
  - The scaling between word lengths uses right shifts: Z_SHIFT, SM_SHIFT, QSHIFT_SD and QSHIFT_SM. The defaults suit 16-bit inputs with channel values of a few hundred LSB. Tune them to the front end's scaling.
  - The PBM output is 20 bits, not 19, so p2·(7+7i) cannot overflow at full scale.
  - In the EDCM, the 28-bit word length given for that block is used for the complex residuals. The metric is 24 bits, as the published block diagram shows for the distance outputs.
- **EDCM products.** The EDCM forms h·c products per lane with shifts and adds, rather than through separate polar multipliers. The result is the same.
- **Norm of a 2-element residual.** The approximate norm is applied to each RX antenna, and the two results are added.
- **Bit labelling, the 1-D demapper and the 8-bit quantizer scaling** are common textbook choices. The source leaves them open.
- **Clock gating.** The extra "SM work pending" input and the falling-edge enable flop are own choices.
- **System wrapper.** The handshake, the RAM sizes and layouts, the register map, the sequencer and the AHB-Lite subset are own choices:
  - single slave;
  - single-word transfers;
  - HRESP always OKAY;
  - HTRANS[0] ignored.
- **Modulations.** BPSK is supported only in the diversity modes. The SM candidate and slicer hardware works on odd levels of both axes, so an SM vector with BPSK is rejected by an assertion in `ipm`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the module against values computed independently and ends with a line `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_mimo_detector_soc` | full system at default parameters, through the bus: the ten 10-slot test scenarios (48 vectors per slot, mixes of SD, SISO, SIMO, MISO and SM with QPSK/16QAM/64QAM) against a reference model; slot run times; no `clk_sm` edge in diversity slots; status registers. Prints the share of clocks with the SM clock enabled per scenario. |
| `tb_mimo_detector` | core end to end: random mode/modulation mixes (BPSK included in the diversity modes) with stalls and SD/SM switches, bit-exact LLRs against a reference model, SM/SIMO/SD rates, clock gating |
| `tb_ipm`, `tb_pcm`, `tb_dvcm`, `tb_lcm1d` | front end and diversity path blocks |
| `tb_pbm`, `tb_x2ccm`, `tb_edcm`, `tb_lcm2d` | SM path blocks (all 64 products, slicer against brute-force nearest point, metric, per-bit minima) |
| `tb_llr_mux`, `tb_qm`, `tb_gcgm` | output and clocking blocks |
| `tb_in_ram`, `tb_out_ram`, `tb_omc`, `tb_in_fetch`, `tb_ahb_if` | buffers, sequencer and bus interface |

The reference models use 64-bit integer arithmetic written from the equations above:

- the Alamouti/MRC combiner;
- brute-force nearest-level slicing;
- the 3/8-5/8 norm;
- per-bit minima.

The noise is low enough that the sign of every LLR must match the transmitted bit.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/mimo_pkg.sv tb/tb_mimo_detector_soc.sv \
        --top-module tb_mimo_detector_soc -Mdir obj && ./obj/Vtb_mimo_detector_soc

The system test takes a few seconds. Add `+dbg` to `tb_mimo_detector` or `tb_mimo_detector_soc` for a trace.

Some limits of the verification:

- There is no link-level (BER) simulation with a channel model and a decoder.
- Timing closure at 100 MHz is not verified.
- The power reduction of clock gating is visible only as `clk_sm` activity.

## Files

- `rtl/mimo_pkg.sv`: types, widths, constellation helpers (candidate numbering, bit labels, level products).
- `rtl/mimo_detector_soc.sv`: system top (bus, RAMs, sequencer, core).
- `rtl/mimo_detector.sv`: detector core.
- Detector blocks: `rtl/ipm.sv`, `pcm.sv`, `dvcm.sv`, `lcm1d.sv`, `x2ccm.sv`, `pbm.sv`, `edcm.sv`, `lcm2d.sv`, `llr_mux.sv`, `qm.sv`, `gcgm.sv`.
- System blocks: `rtl/ahb_if.sv`, `in_ram.sv`, `out_ram.sv`, `omc.sv`, `in_fetch.sv`.
- `tb/tb_*.sv`: the testbenches listed above.
