# CBEM: a configurable bandwidth estimator for a traffic meter

A DiffServ edge router meters each traffic class so that its marker and
policer/shaper know how much bandwidth the class needs. This module is such a
meter. It counts the bytes of the captured packets in fixed measurement
periods and forecasts the next period's traffic from those counts. It uses two
simple time-series forecasts, which run side by side:

* **Moving average (MA)**: the mean of the last *N* period counts.
  `MA(t+1) = (D(t) + D(t-1) + ... + D(t-N+1)) / N`.
  It is smooth and reacts slowly. It suits traffic whose rate varies little,
  or links with enough buffering to absorb bursts.
* **Exponential smoothing (ES)**: `F(t+1) = alpha * D(t) + (1 - alpha) * F(t)`.
  Old periods lose weight geometrically. A small alpha smooths more, and a
  large alpha follows bursts more closely. It suits real-time traffic and
  links with small buffers.

Both results go to the host together with an interrupt. A configuration switch
(`cfg_mode`) chooses which of the two feeds the traffic-estimation output
`est_rate` that the marker and policer use. The RTL is written for a 50 MHz
FPGA clock. It sits between a Fast Ethernet MAC, which delivers the captured
packets, and a PCI bridge to a host PC.

```
 pkt_valid/pkt_len ──► packet FIFO ──► FIFO read process ──► D(t) per period
                                        (period timer)        │
                            ┌─────────────────────────────────┴──────────┐
                            ▼                                            ▼
                 Moving Average process                    Exponential Smoothing process
                 (window of N counts)                      (fixed-point forecast)
                            │  ma_result                      es_result  │
                            ├──────────────► Interrupt generation ◄──────┤
                            │               irq, ma_out, es_out,         │
                            │               period_cnt, overrun          │
                            └──────────► configuration switch ◄──────────┘
                                          cfg_mode → est_rate
```

## Measurement periods and units

Everything the estimator computes is in **bytes per measurement period**.
The host converts a result to a rate with

    rate [bit/s] = result * 8 / period [s],   period = (cfg_period + 1) * 0.1 s

Every configuration register holds its value minus one:

| Port           | Width | Meaning                        | Example                  |
|----------------|-------|--------------------------------|--------------------------|
| `cfg_period`   | 8     | period = (value + 1) × 0.1 s   | 4 → 0.5 s                |
| `cfg_ma_n`     | 5     | N = value + 1 (1 to 32)        | 19 → N = 20              |
| `cfg_es_alpha` | 7     | alpha = (value + 1) / 100      | 9 → 0.10; 99 or more → 1.00 |
| `cfg_mode`     | 1     | `MODE_MA` or `MODE_ES`         | selects `est_rate`       |

The reference setting is a 0.5 s period, N = 20 and alpha = 0.10: the
settings for a mirrored Fast Ethernet link carrying bursts of about 8 Mbit/s.

The period timer is a prescaler of `UNIT_CYCLES` clocks (5,000,000, that is
0.1 s at 50 MHz) followed by a unit counter. A period ends at the last clock
of its last unit. In that clock the finished byte count, including any packet
popped in that same clock, is registered as `obs_bytes`, and `obs_valid`
pulses. The count restarts at zero in the next clock. Lowering `cfg_period`
during a period ends that period at the next unit boundary.

`obs_bytes` holds the latest period's count until the next period ends.
The host can read it as the current bandwidth, next to the two forecasts.

The count is 32 bits wide and saturates instead of wrapping. `sat_out` flags
a saturated period. At the 100 Mbit/s line rate even the longest period
(25.6 s, 320 MB) stays below 2^32 bytes, so a saturation only happens when
`CNT_W` is set smaller.

## Packet input

The MAC side writes one record per captured packet: `pkt_valid` together with
`pkt_len`, the length in bytes. The records go into a 64-entry FIFO. The FIFO
read process pops one record in every clock in which the FIFO is not empty.
With at most one write per clock the FIFO therefore never fills. If a
different writer ever does fill it, further records are dropped and counted in
`pkt_drop_cnt`. A packet written in clock *k* is counted in the period that
contains clock *k + 1*.

## The moving-average window

The last 32 period counts are kept in a circular window of flip-flops (32 × 32
bits, the largest part of the design). The running sum is updated in one
clock: the new count is added, and the count it overwrites, the one that
leaves the N-wide window, is subtracted. The write pointer wraps at N, so only
the first N entries are used.

Two things about the window are not obvious:

* **Ramp-up.** A window that is not yet full counts the missing periods as
  zero traffic. For the first N − 1 periods after reset the average therefore
  rises gradually towards the true mean.
* **Change of N.** When `cfg_ma_n` differs from the N the window was filled
  with, the next observation empties the window and starts a new one. The
  ramp-up then repeats. This keeps the running sum consistent without a
  multi-clock clearing pass.

The sum is divided by N in a serial restoring divider (`cbem_div`), one
quotient bit per clock, and the quotient is truncated. There is one division
per period and a period lasts millions of clocks, so a serial divider costs
nothing in throughput.

## Exponential smoothing in fixed point

The forecast `F` is held with 8 fraction bits. With the integer weight
`a = cfg_alpha + 1` (in hundredths) each period computes

    F' = floor( (a * (D << 8) + (100 - a) * F) / 100 )

This takes two small multiplications and the same serial divider, here
dividing by 100. `es_out` is the integer part of `F'`. Without the fraction
bits a small alpha would get stuck: with alpha = 0.01, a forecast could never
rise by less than 100 bytes per step. The truncation error accumulates to at
most `1 / (256 * alpha)` byte, which is 0.04 byte at alpha = 0.10. The
forecast starts at zero after reset. A change of alpha applies from the next
period onward and does not disturb `F`.

Hundredths were chosen for alpha because they hold the values 0.1, 0.2 and
0.3 that are typical for this kind of smoothing, and any other value in steps
of 0.01.

## Host side: interrupt and result registers

The MA and ES results of a period finish a few clocks apart. The interrupt
generator waits for both. It then copies them into `ma_out` and `es_out`,
copies the period's saturation flag into `sat_out`, increments `period_cnt`,
and raises `irq`. `irq` is a level that stays high until the host pulses
`irq_ack`. If the next pair completes before the acknowledge, the registers
take the newer pair, `irq` stays high and `overrun` is set. An acknowledge
clears both flags. A pair that completes in the same clock as an acknowledge
wins: `irq` stays high for the new pair. The PCI bridge is expected to map
these ports into the host's address space. That local-bus logic is not part
of this RTL.

### Timing at the default parameters

Counted from the clock edge that registers the period count (`obs_valid`
rises):

| Event                                   | Clocks later                        |
|-----------------------------------------|-------------------------------------|
| MA `result_valid`                       | 40 (1 + `CNT_W` + `N_W` + 2)        |
| `est_valid` in MA mode                  | 41                                  |
| ES `result_valid`                       | 50 (1 + `CNT_W` + 8 + 7 + 2)        |
| `est_valid` in ES mode, `irq` rises     | 51                                  |

Each estimator needs this time between two observations, and assertions in
`cbem_ma` and `cbem_es` check it. Any period of at least one prescaler unit
is far longer than this.

## Parameters of `cbem_top`

| Parameter     | Default   | Meaning                                  |
|---------------|-----------|------------------------------------------|
| `UNIT_CYCLES` | 5,000,000 | clocks per 0.1 s period unit (50 MHz)    |
| `FIFO_DEPTH`  | 64        | packet FIFO entries                      |
| `CNT_W`       | 32        | bits of a period count and of the results |

The field widths (`PE_W`, `MA_N_W`, `ES_A_W`, `LEN_W`, `ES_FRAC`) are
constants in `cbem_pkg`. For a faster simulation lower `UNIT_CYCLES`. To
reach saturation lower `CNT_W`.

## What comes from the method and what is this implementation's

The two forecasting equations, the four processes (FIFO read, moving average,
exponential smoothing, interrupt generation), their inputs and outputs, the
configuration switch, the 50 MHz clock and the reference settings follow the
method this design implements. The following are this implementation's own
choices, and each can be changed on its own:

* the value-minus-one register encodings, the 0.1 s period unit and alpha in
  hundredths (the alpha encoding is the least certain: a reading of
  alpha = 1/(value + 1) would give the same 0.10 for the value 9);
* a FIFO of packet lengths rather than of packet data, and a single
  monitored port, although the MAC has four;
* all widths, the FIFO depth, N up to 32, and results in bytes per period;
* zero-filled ramp-up and restart of the MA window, truncating divisions,
  and an ES forecast that starts at zero;
* the level interrupt with its acknowledge, the overrun flag and the period
  counter.

Outside this RTL: the MAC and PHYs, the PCI bridge and its local bus, and the
classifier, marker and policer that consume `est_rate`.

## Files

| File                     | Contents                                                |
|--------------------------|---------------------------------------------------------|
| `rtl/cbem_pkg.sv`        | constants, widths, `est_mode_e`                          |
| `rtl/cbem_pkt_fifo.sv`   | packet-length FIFO with drop counter                    |
| `rtl/cbem_fifo_read.sv`  | FIFO read process and period timer                      |
| `rtl/cbem_div.sv`        | serial restoring divider shared by both estimators      |
| `rtl/cbem_ma.sv`         | moving-average process                                  |
| `rtl/cbem_es.sv`         | exponential-smoothing process                           |
| `rtl/cbem_irq_gen.sv`    | interrupt generation and host result registers          |
| `rtl/cbem_top.sv`        | the module, with the configuration switch               |

## Verification

Each block has a self-checking testbench in `tb/`. The testbenches compare the
block against models written separately in the testbench, check the cycle
timing stated above, and end with a `TB_RESULT checks=N failures=M` line.

* `tb_cbem_pkt_fifo`: random pushes and pops against a queue; overflow and drop count.
* `tb_cbem_fifo_read`: random packet arrivals; exact period-end clock and byte
  count for three period settings; saturation of a 12-bit instance.
* `tb_cbem_ma`: N = 20, 1, 32, 5, 3, with ramp-up, restart and 32-bit extremes.
* `tb_cbem_es`: alpha 0.10, 0.20, 0.30, 0.01, 1.00 and an out-of-range register
  value; exact fixed-point match and a real-valued bound.
* `tb_cbem_irq_gen`: random result order, late acknowledges (overrun) and
  acknowledges that collide with a new pair.
* `tb_cbem_top`: the whole module with 100-clock period units and 20-bit counts.
  It runs 55 periods with N = 20 and alpha = 0.10, then a change of N, a
  change of alpha, a mode switch, an overrun, a change of period and a
  line-rate burst that saturates. It counts each of these and fails if one
  never happens.
* `tb_cbem_top_full`: the module at its default parameters through three
  0.1 s periods (15 million clocks) of steady 8 Mbit/s traffic. The results
  are checked against values worked out by hand, and the interrupt against
  the 51-clock latency.
* `tb_cbem_fig9_workload`: the reference setting (0.5 s periods, N = 20,
  alpha = 0.10) over 100 periods of idle time and 8 Mbit/s bursts. The time
  axis is compressed: the period unit is 1,000 clocks instead of 5,000,000,
  and the byte counts are those of the real time scale. The run prints the
  peaks: for the first burst (five periods at 8 Mbit/s) MA peaks at
  2.0 Mbit/s and ES at 3.3 Mbit/s. MA is lower because it spreads the burst
  over its 10 s window. ES peaks higher and decays geometrically, by 10 % per
  period, long after MA has dropped back to zero.
* `tb_cbem_alpha_sweep`: four on/off flows, each averaging 64 kbit/s with
  8 Mbit/s bursts, in 1 ms periods. The same traffic drives three copies with
  alpha = 0.10, 0.20 and 0.30, all with N = 20. Besides the exact checks, the
  ES peak must rise with alpha and the MA peak must stay below all three.
  With the default seed the peaks are 2.0, 3.6 and 5.1 Mbit/s for ES and
  1.6 Mbit/s for MA.

Example with plain Verilator (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cbem_pkg.sv tb/tb_cbem_top.sv --top-module tb_cbem_top
./obj_dir/Vtb_cbem_top
```

Synthesis of `cbem_top` at the defaults gives roughly 1,700 flip-flop bits,
1,024 of them in the MA window, and about 240 word-level cells. The
multipliers of the ES process are 7 × 40 bits.
