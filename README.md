# HECTOR TRNG and PUF test designs

Random number generators and physically unclonable functions built on
silicon need hardware that turns analog noise — clock jitter, the
oscillation count of a cell that slowly stops, the frequency of a ring
oscillator — into bits that a host can read and analyse. This repository
holds SystemVerilog for a family of such test designs: FPGA designs for
evaluation daughter boards, the core of a TRNG/PUF test ASIC, and a small
TERO TRNG test chip. Every design keeps the noise source itself (PLLs,
ring oscillators, TERO cells) outside the synthesizable logic: the sources
are either clock inputs or behavioural models with delays, so the whole
system can be simulated, while the digital part around them is ordinary
synthesizable RTL.

`hector_top` places all designs side by side. They share nothing; each
keeps its own clock, reset and pins (prefixes `asic_`, `pll_`, `dc_`,
`puf_`, `st_`).

## Entropy sources and how they are modelled

| Source | Model | What the model reproduces |
|---|---|---|
| PLL clocks | testbench clocks with random jitter | period, phase offsets, jitter |
| Ring oscillator bank (8 ROs, 350–916 MHz) | `ro_bank8` | per-RO half period, cycle-to-cycle jitter |
| Bank of 128 RO or TERO cells | `osc_bank` | per-cell frequency or oscillation count fixed by the cell index (standing for process variation), small random spread, random final state |
| DC TRNG ring oscillator + delay chains | `dc_ro_chains` | 3-stage ring with jittery stage delays, each stage output running down a chain of buffers |
| TERO core with adjustable delays | `tero_cell` | count = BASE + 40·adj + random 0..63, random stop state |

The models draw their randomness from a linear congruential generator,
not `$urandom`, so they elaborate in every tool. A synthesis tool sees
their free-running processes as combinational loops — a real oscillator is
one — and they are not meant to be synthesized. Delays are in the default
time unit; no `timescale` is used, so with Verilator one unit is 1 ps.

## HECTOR ASIC core (`hector_asic`)

One chip holds five blocks; only one is active at a time and all share a
32-bit output bus.

**Command path.** The host shifts an 88-bit command into `config_serial`,
MSB first, one bit per `clk_asic` cycle (`asic_cmd_rx`). A rising
`config_ready` copies the shift register into the input latch. The first
4 bits name the block:

| id | block | configuration fields (`hector_pkg`) |
|---|---|---|
| 1 | PLL TRNG | km1, kd1, km2, kd2 (8 bits each, to the PLL macros), KD (12 bits) |
| 2 | ELO TRNG | RO select, K (32 bits) |
| 3 | TERO PUF | sel1, sel2 (7 bits), t_act (16 bits, clk cycles) |
| 4 | RO PUF | sel1, sel2, arbiter bit select (3 bits) |
| 5 | TERO test modules | cell select (7 bits) |

**Control logic** (`asic_ctrl`) keeps the active block's configuration,
runs it and puts its result on `data` with a one-cycle `data_rdy` pulse.
For the PUFs, `next_config` pulses with `data_rdy` to ask for the next
challenge.

* PLL TRNG (`pll_trng_asic`): the jittery PLL2 clock passes two flip-flops
  clocked by PLL1; a 12-bit counter adds the samples over KD PLL1 periods
  and is cleared at the end of each period T_Q. Output word = count; its
  LSB is the random bit, the whole value serves jitter measurement.
* ELO TRNG (`elo_sampler`, two `ro_bank8`): an RO of bank 1 clocks a
  32-bit down-counter reloaded every K periods; its pulse samples the
  selected RO of bank 0. 32 consecutive bits make a word, first bit in the
  MSB.
* TERO PUF: the two selected TERO cells start together and are stopped
  after t_act cycles; the output word is {count A, count B}. The host
  subtracts.
* RO PUF: the two selected ROs run until one 16-bit counter sets bit
  2·cfg+1; `puf_count_arbiter` gives 1 if block A got there first, 0 for
  B, and stops both. Both PUFs share these counters.
* TERO test modules: while active, `test_ctrl` starts the selected cell of
  128 (16 configurations of 8 cells) and its output goes to `test_lvds`.

**Clock domains.** The PLL TRNG runs on PLL1 and the ELO sampler on the
bank-1 RO; each word crosses into `clk_asic` through a toggle synchroniser
(`pulse_sync`), which needs about four `clk_asic` cycles between words. At
50 MHz that means KD·T_PLL1 and K·T_RO above roughly 80 ns. The PUF counter
bits are synchronised by two flip-flops before the arbiter looks at them,
so the arbiter resolves to one `clk_asic` cycle.

## FPGA PLL TRNG (`fpga_pll_trng`)

Up to four phases of PLL1 are sampled by the PLL0 reference clock and
XORed (`pll_trng_core`). A decimator adds the XOR samples modulo 2 over KD
reference periods (one T_Q) and gives one raw bit per T_Q. The total
failure test (no change in a window) and the online test (ones outside a
quarter to three quarters of the window) watch the XOR samples over 256 T_Q
windows (`trng_tests`). Because that test decides only after 256 T_Q, the
raw bits pass a 256-bit buffer first, so no bit leaves before its window
was checked.

Pins: `mux_sel = 0` puts the buffered raw bit on `data_out`;
`mux_sel = 1` sends bytes of 8 consecutive XOR samples framed by a start bit
0 and a stop bit 1 (`p2s_conv`, LSB first) for jitter characterisation.
`data_clk` is the reference clock. `alarm` is the OR of the two test flags.

The serial control interface (`ssi_slave`) exchanges 64-bit frames: a start
bit 1, then 64 bits MSB first in both directions at once. Control word:
`[15:0]` KD, `[19:16]` phase enables, `[20]` clear alarms. Status word:
`{KD[15:0], ones of the last window[31:0], 14'b0, online flag, total-failure flag}`.
Reset values: KD = 16, all phases enabled.

## FPGA DC TRNG (`dc_trng`)

A three-stage ring oscillator drives three tapped delay chains of 32 taps.
Every 8 clock cycles (the divided quartz clock) all taps are captured.
`dc_encoder` cleans "bubbles" with a majority of three neighbouring taps,
finds the first edge in each chain, takes the first chain with an edge
and outputs the LSB of the edge position. `parity_filter` XORs groups of 4
raw bits. `mux_sel` picks raw or filtered bits; `clk_out` runs at the bit
rate of the chosen stream. The same `trng_tests` (window 1024 raw bits)
drive `tf_alarm` and `ol_alarm`.

## FPGA TERO PUF (`tero_puf_fpga`)

Two blocks of 64 TERO cells. For each of the 64 challenges `tero_puf_core`
starts one cell of A and one of B, lets them run for T_ACT = 50 cycles
(1 µs at 50 MHz), counts their oscillations in 11-bit counters, and
shifts two bits into a 128-bit response: `count A > count B` and bit 1 of
|A − B|. A challenge takes T_ACT + 7 cycles. By default A.i meets B.i; with
`PUF_mode[0]` set the host supplies a 6-bit B index per pair.

`puf_ssi` speaks 64-bit words on one clock (the host clock is the PUF clock):
a start bit 1 then 64 bits MSB first. The first word is a control word
`{PUF_mode[63:56], …, N[4:0]}`, followed by N data words into a 1024-bit
register. The PUF answers with a status word (`PUF_status`: bit 1 busy,
bit 0 done) and N words of the register, which by then holds the response
in its low 128 bits.

## TERO TRNG test chip (`st_tero_trng`)

Six TERO cores, each behind `tero_trng_channel`: a control register
(CR: `[0]` tero_enable, `[1]` tero_start, `[5:2]` tero_adj_sel), an
asynchronous counter clocked by the TERO output, and a status register
(SR: `[0]` stopl, `[1]` stopr, `[2]` random bit). The core is considered
stopped once the counter has not moved for 16 clock cycles; the counter
value then goes to CNTR and its parity is the random bit. CNTR is taken as the
difference to the counter value seen before the start, so a counter that
was not cleared at power-up still yields the true count. Clearing
tero_start resets the counter and status for the next bit.

`spi_slave` (mode 0, oversampled: CLK at least 8× SPI_CLK) takes frames
`{write, addr[6:0], data[15:0]}`, MSB first. Instance x has CR at 4x, SR at
4x+1, CNTR at 4x+2.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With plain Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/hector_pkg.sv tb/tb_hector_top.sv --top tb_hector_top -Mdir obj -o sim
./obj/sim
```

`tb_hector_top` runs every design at its default parameters end to end
(about half a minute) and counts each mechanism: PLL and ELO words, TERO
and RO PUF challenges with both outcomes, `next_config`, TERO test pulses,
serial reads and writes, raw bits, jitter bytes, alarms and their clearing,
DC raw and filtered bits, a full PUF response, TERO TRNG bits. Block
testbenches: `tb_hector_asic`, `tb_asic_cmd_rx`, `tb_asic_ctrl`,
`tb_pll_trng_asic`, `tb_elo_trng`, `tb_puf_count_arbiter`, `tb_osc_bank`,
`tb_ro_bank8`, `tb_tero_test_modules`, `tb_fpga_pll_trng`,
`tb_pll_trng_core`, `tb_p2s_conv`, `tb_ssi_slave`, `tb_dc_trng` (window
reduced to 256), `tb_dc_encoder`, `tb_parity_filter`, `tb_tero_puf_fpga`,
`tb_tero_puf_core`, `tb_puf_ssi`, `tb_st_tero_trng`.

## Where this design departs from, or adds to, the source description

* All bit layouts of commands, control and status words, register maps and
  frame formats are this design's own; the description gives the word
  sizes and field names only.
* Widths not given: KD (12 bits in the ASIC, 16 in the FPGA core), the PLL
  setting ports (8 bits), t_act (16 bits), TERO TRNG counter (16 bits) and
  tero_adj_sel (4 bits). Chain length 32, divider 8, parity over 4 bits and
  the test windows are also own choices.
* The FPGA PLL TRNG's jitter evaluation module is not described; the
  8-bit jitter data are raw XOR samples.
* The two bits extracted per TERO PUF challenge are chosen here (sign and
  bit 1 of the magnitude).
* The statistics and online tests of the TERO TRNG chip stay on the host,
  as in the original; the chip only gives counts and parity bits.
* Not built: the PLLs, quartz oscillator, pads and LVDS cells; the PLL TRNG
  of the system-on-chip (its memory, online tests and post-processing are
  not specified); a second TRNG that is only named.
