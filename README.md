# Power-waster attacker for FPGA-to-CPU undervolting

On a system-on-chip where an FPGA fabric and application processors hang off the same
voltage regulator, the fabric can be used as a weapon against the processors. If the
fabric is filled with ring oscillators and they are switched on in a carefully timed
pattern, the current they draw pulls the shared supply down far enough, and for long
enough, that a processor core running a little above its nominal clock starts computing
wrong results or stops responding. No change to the board or to the power network is
needed; the attacker only needs to load a fabric design and run a little software on a
core.

This repository holds the fabric side of such an attack, as SystemVerilog:

* an **attacker** of 15 nodes x 16 blocks x 500 enable-gated ring oscillators
  (120,000 oscillators);
* an **attack controller** that turns five software-written parameters into the enable
  pattern of the nodes;
* a **delay-line voltage sensor** that measures the local supply once per clock cycle;
* a **recorder** that stores one sensor reading per cycle during the attack, for software
  to read back afterwards.

Everything runs on a single 100 MHz clock. The processors, the GPIO bridge between
processors and fabric, and the power network itself are outside this RTL. Their
connections are plain ports of the top module `fpga_undervolt_top`.

```
 software (GPIO)                                    shared supply
 ---------------                                    -------------
 trigger, cfg ---> attack_ctrl --node_en[15]--> attacker_node x15 --blk_en[15][16]--> load
                     |  blk_mask[16]                 (16 x ro_block, 500 x ro_cell each)
                     |  start, busy
                     v
 rd_addr  ---> storage_ctrl <--reading-- vsensor <--(delay_line)<-- vdd_pl_mv
 rd_data  <---   (sample_ram)
```

## The attack parameters

Software writes one `attack_cfg_t` (see `rtl/undervolt_pkg.sv`) and then raises
`trigger`:

| field      | width | meaning                                                      | range used in practice |
|------------|-------|--------------------------------------------------------------|------------------------|
| `n_blocks` | 5     | blocks of **every** node that take part (lowest first)       | 0-16; attack: 16       |
| `duration` | 15    | cycles during which the enable pattern runs (per node)       | 128-16384; attack: 256 |
| `period`   | 12    | cycles between two activations of one node                   | 10-2200; attack: 80-110 |
| `duty`     | 12    | cycles per period during which the node is enabled           | 10-50 % of period; attack: 39 % |
| `mode`     | 1     | `ACT_SIMULTANEOUS` or `ACT_STAGGERED`                        | attack: staggered      |

`duty` is a number of clock cycles, not a percentage: 38.57 % of a 140-cycle period is
`duty = 54`.

The configuration is sampled on the rising edge of `trigger` and held for the whole
attack. Changing `cfg` during an attack has no effect. A trigger edge during an attack
is ignored and reported by a one-cycle `trig_ignored` pulse. A duration of 0 starts
nothing.

## The enable pattern (attack_ctrl)

This is the part that decides how deep and how long the voltage drop is, so it is worth
understanding exactly.

Two counters run from the accepted trigger. `t_cnt` counts the duration. `phase` counts
0 .. period-1 and wraps. The base enable is

```
base(j) = (0 <= j < duration) and (j mod period < duty)        j = cycles since start
```

The base enable goes into a 15-stage shift register. In **staggered** mode node *i*
takes stage *i*, so node *i* runs the same pattern *i* cycles after node 0. One more
node joins every cycle, and one more drops out every cycle at the end of each pulse.
In **simultaneous** mode every node takes stage 0. For example, with period 100,
duty 39 and duration 256, staggered:

```
cycles after start   1     40      101   140      201   240    256       270
node 0               |#####|.......|#####|........|#####|.......
node 14                 15 |#####|.......|#####|........|#####|.........|
                     (pulses of 39 cycles every 100 cycles; node i starts at cycle 1+i)
```

Staggering gives up a little depth in exchange for a longer drop. When all nodes hit the
supply in the same cycle, the supply dips sharply but recovers quickly. When the load
ramps in over 15 cycles, the drop lasts longer. The period matters just as much. If it
is very short, the oscillators are not on long enough for the supply to sag. If it is
very long, the repeated pulses inside the fixed 256-cycle window no longer reinforce each
other. The configuration used for fault injection is 16 blocks, 256 cycles, a period of
80-110 cycles, 39 % duty and staggered activation.

`blk_mask` is a thermometer code of `n_blocks`: block *b* of every node is selected
when *b* < `n_blocks`.

Timing at the ports:

* `start` pulses in the cycle after the trigger edge is seen. Node 0 rises one cycle
  later, if `duty` > 0.
* `busy` stays high for `duration + 15` cycles when staggered and `duration + 1` cycles
  when simultaneous. `done` pulses in the first cycle after that.
* The shift register is cleared at every start. Without that, a staggered attack that
  follows a simultaneous one would inherit enables from the earlier attack.

Assertions check two rules: no node is enabled outside an attack, and an accepted attack
has a non-zero period.

## The attacker (attacker_node, ro_block, ro_cell)

A ring oscillator here is a NAND gate whose output feeds back to one of its inputs. The
other input is the enable. Disabled, the output rests at 1. Enabled, the gate inverts
its own output after every gate delay and burns dynamic power. A block is 500 such cells
on one enable. A node is 16 blocks; `blk_en[b] = node_en & blk_mask[b]`. The top brings
out all 15 x 16 block enables as `blk_en`, which is the electrical load the design puts
on the supply, and one oscillator output per block as `blk_probe`.

`ro_cell` is a **behavioural model** with a loop delay (`HALF_PERIOD_PS`, 1 ns by
default). A real combinational loop cannot be simulated cycle by cycle, and on the FPGA
the cell is simply one LUT that feeds itself. Synthesis tools turn the model into a
latch; the real implementation has to be placed by hand or with constraints that keep
the loops. On the target device the 120,000 oscillators occupy about 61,000 LUTs, so
each 6-input LUT is expected to hold two oscillators, split into two 5-input halves.

## The voltage sensor (vsensor, delay_line)

The sensor measures how far a signal edge travels down a chain of delay elements in
one clock period. A lower supply slows the elements, so the edge travels less far and
the reading drops.

* A launch flip-flop toggles every cycle and feeds a 640-element delay line.
* One cycle later a capture register samples all 640 taps, together with the value that
  was launched.
* The encoder counts how many taps, starting from the head of the line, already hold the
  launched value. That run length is the reading (10 bits, saturating at 640).

Because the launched value alternates every cycle, the line never has to be reset.
Counting the run from the head, rather than all matching taps, matters at low voltage.
There an edge covers only about 100 elements per cycle, so the older edges are still
travelling further down the line. A plain count of ones would add their taps to the
reading.

There is one reading per cycle, three clock edges after its edge was launched
(launch, capture, encode). `valid` rises two cycles after reset.

`delay_line` is a **behavioural model** of the analog part. Its element delay follows

```
d(V) = 22 ps * (850 - 580) / (V - 580)      V in mV
```

That puts the reading at about 454 at the nominal 0.85 V and about 100 at 0.64 V. Both
numbers and the law are illustrative. A real line would be calibrated, for instance with
an adjustable initial delay ahead of the taps; this design has no such calibration
stage. The supply comes in as a 12-bit millivolt value, `vdd_pl_mv`.

## Recording and readout (storage_ctrl, sample_ram)

`start` rewinds the write pointer. After that, every cycle in which the attack is busy
and the sensor is valid stores the current reading. The recording has
`duration + 14` readings when staggered and `duration` readings when simultaneous: 270
for the 256-cycle attack. Its first few words show the undisturbed supply.

The memory has 16,398 words of 10 bits, one per cycle of the longest attack that makes
sense: 16,384 cycles plus the stagger tail. It is a simple dual-port RAM with a
synchronous read, so it maps onto block RAM. If an attack is longer than the memory, the
extra readings are dropped and `overflow` is set. `sample_count` gives the number of
words stored. Software reads word *a* by writing `rd_addr = a`; `rd_data` holds the word
one cycle later, which is far below GPIO access times.

## Where this design goes beyond what is specified

The structure (15 x 16 x 500 NAND oscillators, the five parameters, the staggering by
one node per cycle, the 100 MHz clock, a delay-line sensor recorded into on-chip memory)
follows the published attack. The following are this design's own choices:

* **Field widths.** They are the smallest that hold the swept ranges.
* **Trigger handling.** A rising edge starts an attack; triggers during an attack are
  ignored.
* **Staggered end.** Each node runs `duration` cycles from its own start, so the last
  node ends 14 cycles after the first.
* **Block count.** One block count applies to all nodes, as a thermometer mask. The
  nodes are not controlled separately beyond their stagger offset.
* **Sensor internals.** The sensor's length (640), launch/capture/run-length scheme,
  latency and delay law are this design's own.
* **Memory.** The memory depth, the overflow flag and the address/data readout are this
  design's own.
* **Reset.** Reset is asynchronous and active low.
* **Oscillator model.** The 1 ns loop delay of the model oscillator is assumed.

## Verifying and simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ro_cell` | rest at 1 when disabled, one toggle per loop delay when enabled, return to 1 |
| `tb_ro_block` | all cells follow the shared enable at the loop rate |
| `tb_attacker_node` | block enable = node enable AND mask for all combinations; only enabled blocks oscillate |
| `tb_attack_ctrl` | every cycle of five attacks (chosen, simultaneous, short period, duty > period, duration 0) against the formula above; busy/done timing; ignored trigger |
| `tb_delay_line` | edge position after a set time equals floor(t / d(V)) at five supplies |
| `tb_vsensor` | readings equal floor(10 ns / d(V)) at seven supplies, including saturation and a line holding older edges |
| `tb_sample_ram` | write/read-back, one-cycle read latency, read-during-write returns old word |
| `tb_storage_ctrl` | counts, gaps in `rec`, overflow at full, rewind on start, read-back order |
| `tb_fpga_undervolt_top` | four attacks end to end at 4 x 4 x 4 oscillators with a 64-word memory |
| `tb_chosen_attack` | the chosen attack with all 15 nodes x 16 blocks, full sensor and memory, 8 oscillators per block |
| `tb_sweep` | six configurations from the sweep ranges (8 vs 16 blocks, simultaneous vs staggered, periods 10/140/260, 128 cycles at period 2200 and 50 % duty) at 2 oscillators per block; recording length of each, and the expected orderings of the drops |

`tb_fpga_undervolt_top` counts each mechanism and fails if one never occurs:
staggered activation, simultaneous activation, a partial block count, a sensor-visible
drop, an ignored trigger, overflow and oscillation. Both end-to-end tests close the loop
through `tb/pdn_model.sv`. This is a first-order model in which the supply relaxes
towards 850 mV minus a fixed drop per running block. It is not a model of a real board:
there is no resonance and no regulator. With it, the chosen attack pulls the reading from
454 down to about 104.

**Simulation size.** The largest configuration simulated is 15 x 16 x 8 oscillators.
The longest swept duration (16,384 cycles) has not been simulated end to end. The
memory depth for it is set by arithmetic, and overflow is tested on a small memory.
At the full 500 oscillators per block, the 120,000 behavioural oscillators make the
simulator's build run for well over half an hour. All other sizes are simulated at their
defaults.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -j 4 --top-module tb_attack_ctrl \
    -y rtl -y tb rtl/undervolt_pkg.sv tb/tb_attack_ctrl.sv -o sim
./obj_dir/sim
```

Replace the top module with any testbench name. `--timing` is needed for the
behavioural oscillator, delay-line and supply models.

## Files

* `rtl/undervolt_pkg.sv`: sizes, field widths, `attack_cfg_t`, `act_mode_e`
* `rtl/fpga_undervolt_top.sv`: the whole fabric design
* `rtl/attack_ctrl.sv`: parameters to node enables
* `rtl/attacker_node.sv`, `rtl/ro_block.sv`: grouping of oscillators
* `rtl/ro_cell.sv`: oscillator (behavioural model)
* `rtl/vsensor.sv`: sensor launch, capture and encoder
* `rtl/delay_line.sv`: sensor delay line (behavioural model)
* `rtl/storage_ctrl.sv`, `rtl/sample_ram.sv`: recording memory
* `tb/`: the testbenches above and `pdn_model.sv`
