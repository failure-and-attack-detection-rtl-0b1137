# Digital timing sensor for failure and attack detection

A chip that is run outside its specified voltage and temperature range starts to
miss setup times. That is how environmental fault attacks (under-volting, heating)
inject errors, and how harsh environments cause failures. An analog sensor checks
voltage and temperature separately against fixed limits. Such a sensor raises false
alarms in corners where a high temperature is made up by a high supply. This design
measures instead what the chip actually cares about: **how far a signal edge gets in
one clock period**. It does so with an artificial critical path, a buffer chain that is
sampled by flip-flops. The chain slows down exactly when the real logic slows down, so
one number covers voltage, temperature and process together.

The sensor sits next to the circuit it protects. Here that circuit is the 4-bit S-box
of the PRESENT block cipher, placed between two registers. The sensor and the S-box
share the clock and the supply.

## The measuring principle

```
            +-----+   a0   9 leading buffers        43 tapped buffers
 clk ------>| T-FF|---->[>]-[>]-...-[>]--+-[>]--+-[>]-- ... --+-[>]
            +-----+                       |      |             |
                                         FF1    FF2    ...    FF43   (all on clk)
                                          |      |             |
                                          +------+-- sensor_q -+
                                                     |
                                   fn_encoder -> FN  -> afn_averager -> AFN
                                                                      |
                                         OTP (AFN_wc) -> alarm_comparator -> alarm
```

* The **launch flip-flop** inverts its own output every cycle, so each clock edge sends
  one edge, alternately rising and falling, into a chain of 52 buffers.
* The first 9 buffers only add delay. Each of the last 43 buffers feeds one **sampling
  flip-flop**.
* At the next clock edge, the edge has passed some of the taps and not the others.
  Flip-flops 1 .. FN-1 have caught the new value ("phase A"). From flip-flop FN on,
  they still hold the previous one. **FN is the index of the first flip-flop whose
  phase differs from flip-flop 1.**
* Geometrically, with clock period T and buffer delay d, tap k sits behind 9+k buffers.
  So FN = min{ k : (9+k)·d > T }, and FN = 44 if even the last buffer is reached in
  time. A slow chip (low voltage, high temperature) has a larger d and a lower FN.
* Near a flip-flop's setup limit, FN jitters by one from cycle to cycle, because that
  flip-flop goes metastable. The sensor therefore uses the **average AFN** over many
  cycles. For example, an FN alternating between 15 and 16 gives AFN = 15.5.
* The chain was dimensioned so that the best-case corner (1.4 V, -10 °C) gives an AFN
  of about 40 and the worst case the protected logic still tolerates (1.0 V, 85 °C)
  gives **AFN_wc = 17**. Room temperature at 1.2 V gives about 31.
* **Alarm:** AFN < AFN_wc predicts a timing failure of the protected circuit. The
  sensor alarms on the combination of voltage and temperature, not on each one alone.
  A hot chip on a high supply therefore stays alarm-free as long as its logic is still
  fast enough.
* Process variation shifts all AFN values, so AFN_wc is measured on each chip after
  fabrication. It is then stored once in a **one-time programmable (OTP)** word.

## Modules

All shared constants are in `rtl/ds_pkg.sv`: `NUM_BUFS = 52`, `NUM_LEAD_BUFS = 9`,
`NUM_TAPS = 43`, `FN_W = 6` and `AFN_WC = 17`.

| module | kind | what it does | timing |
|---|---|---|---|
| `launch_toggle_ff` | RTL | a0 toggles each cycle; async active-low reset to 0 | 1 edge |
| `delay_chain` | behavioural model | 52 buffers with equal transport delay `buf_delay_ps`; `taps` = buffers 10..52 | (9+k)·d to tap k |
| `sample_bank` | RTL | 43 flip-flops sampling `taps`; `q` is the raw sensor output | 1 edge |
| `fn_encoder` | RTL | first index whose bit differs from bit 0, 1-based; 44 if none | combinational |
| `afn_averager` | RTL | sums FN over 2^`AVG_LOG2` = 16 cycles; output is AFN with 4 fraction bits; drops the first 2 FN after reset | `afn_valid` pulse every 16 cycles |
| `otp_threshold` | behavioural model | write-once word; reads 0 until programmed | write at clock edge |
| `alarm_comparator` | RTL | `alarm <= afn < {threshold, 4'b0}` on each `afn_valid` | 1 edge after `afn_valid` |
| `present_sbox` | RTL | PRESENT 4-bit S-box `C56B90AD3EF84712` | combinational |
| `sbox_target` | RTL | register, S-box, register | 2 edges |
| `ds_system_top` | top | sensor and target side by side on one clock | |

### Top-level ports of `ds_system_top`

* `clk`, `rst_n`: the common clock and an active-low asynchronous reset.
* `buf_delay_ps`: the delay of each buffer in the chain model, in picoseconds. It stands
  for the operating condition: a higher value means a slower corner. In silicon this
  port does not exist; the chain's delay comes from the supply and the temperature.
* `sbox_din[3:0]`, `sbox_dout[3:0]`: the protected target.
* `otp_prog_en`, `otp_prog_data[5:0]`, `otp_programmed`: calibration. Write AFN_wc once
  after reset. Before that, the threshold reads 0 and no alarm is possible.
* `sensor_q[42:0]`: the snapshot of the sampling flip-flops. Bit k-1 is flip-flop k.
* `fn[5:0]`: the FN of the snapshot taken at the previous clock edge.
* `afn[9:0]`, `afn_valid`: AFN times 16, and a one-cycle pulse when a new value is
  available.
* `alarm`: set when the last AFN is below the stored threshold. It is re-evaluated at
  every window and is not latched.

### Pipeline after reset

Hold reset for a few cycles, so that the chain settles to the launch flip-flop's reset
value. At the first edge after reset, a0 launches its first edge. At the second edge,
the flip-flops capture that edge, so `fn` is meaningful from then on. The averager
takes `fn` from the third edge on. It therefore pulses `afn_valid` after edges 18, 34,
50, and so on. `alarm` follows one edge after each pulse.

## What is modelled and what is not

The sensor works because real buffers slow down with voltage and temperature. RTL has no
notion of that. `delay_chain` is therefore a timed behavioural model. Every buffer
delays by `buf_delay_ps`. The model reads that value when an edge enters a buffer, so a
testbench can move the operating point at any time. The simplest safe way is in the
active region of a rising clock edge: the edge launched at that clock edge then travels
with the new delay. The model does not simulate metastability itself. The jitter of FN
between two values is reproduced instead by changing the delay from cycle to cycle.
Synthesis of the top sees the chain as empty. A real implementation would place 52
standard-cell buffers and keep them from being optimised away or resized. The same
holds for the OTP, which is a process-specific fuse macro. `otp_threshold` models only
its behaviour: it reads 0 when blank and ignores every write after the first.

The clock source and the power supply have no logic function and are outside the design.

## Choices made here

These parts are not fixed by the sensor's description and were chosen for this RTL:

* **Averaging window:** 16 cycles, with back-to-back windows (`AVG_LOG2`). With 4
  fraction bits, a half-integer AFN is exact.
* **Start-up:** the first two FN values after reset are discarded (`SKIP_CYCLES`).
* **Phase reference:** flip-flop 1. Only the first phase change counts. If the chain is
  longer than two clock periods, a second change further along is ignored.
* **No phase change:** FN = 44 when all 43 flip-flops agree, which means a chain faster
  than the sampled range.
* **Alarm:** strict `AFN < threshold`, updated every window and not sticky.
* **Threshold format:** an integer in FN units, in a 6-bit OTP word.
* **Resets:** every register has an asynchronous active-low reset to 0, except the OTP
  content, which is non-volatile.
* **S-box table:** taken from the PRESENT cipher specification.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_ds_system_top` runs the whole system at its default size with a 10 ns clock. It
  checks `fn` every cycle against the formula above, every AFN against the sum of the
  expected FNs of its window, and every alarm. It also checks the S-box target
  alongside. The scenario goes through these steps:
  1. A slow corner while the OTP is still blank, so there is no alarm.
  2. Calibration to 17.
  3. The worst case: AFN 17, no alarm.
  4. A slower corner: the alarm is raised.
  5. AFN 31: the alarm clears.
  6. FN jittering between 15 and 16: AFN 15.5, alarm.
  7. AFN 40, then the saturated value 44.
  8. A second OTP write, which is ignored.
  9. 256 cycles with a random delay in each cycle.

  Each of these mechanisms is counted, and the test fails if one of them never occurs.
* `tb_afn_sweep` sweeps the buffer delay from slow to fast. It checks that every AFN
  level from 2 to 40 (in fact 2 to 44) comes out exactly, and that the alarm is set
  exactly below 17.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/ds_pkg.sv tb/tb_ds_system_top.sv --top-module tb_ds_system_top -o sim
./obj_dir/sim
```

`--timing` is required, because the chain model and the testbenches use delays. Time
literals carry their units, so no `timescale` directive is needed.

## Limits

* The RTL cannot show that AFN tracks the real S-box's timing failures. That
  correlation is a property of the transistor-level circuit and of the chain's sizing.
  The reported accuracy is that the prediction agreed with the S-box in over 99% of the
  voltage and temperature points.
* Choosing how many leading buffers and tapped buffers to use for a given range of
  conditions is left open. The 9 + 43 split is fixed here by parameters.
