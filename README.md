# Neuromorphic computing-in-memory processor (SystemVerilog model)

A spiking-neural-network accelerator that computes inside its weight memory.
Input activations become spike trains. Each spike drives one word line of an
8T SRAM array, and the cells that store a 1 discharge their bit lines.
Capacitive adders sum the bit-line levels into a membrane voltage, and a
comparator fires an output spike when the membrane passes the threshold.
There is no ADC or DAC: inputs are 1-bit spikes and outputs are counted spikes.

Three mechanisms keep array activity and energy low, and keep the analog
range usable:

* **MSB word skipping (MWS).** Trained weights are mostly small, so the upper
  bits of a negative weight are usually a run of sign-extension ones. Each
  of those ones would discharge a bit line on every spike. MWS stores such a
  run as one '-1' flag cell followed by zeros.
* **Early stopping (ES).** At a chosen timestep `T_ES`, a neuron whose
  membrane is far below threshold is predicted never to fire. Its word lines
  are switched off for the rest of the operation.
* **Voltage folding with mixed-mode firing.** The membrane voltage is split
  into a digital folding count and an analog residue. This triples the
  usable range, enough for three macros to accumulate into one neuron
  (multi-macro aggregation) without a high-precision ADC.

This RTL is a bit-exact, integer-level model of that processor. The digital
parts (encoder, controller, spike counters, Sub-WL gating, memories) are
ordinary synthesizable logic. The analog parts are modelled as integer
arithmetic in weight-LSB units: the cap adders, the folding circuit and the
comparators. A voltage here is an integer. Capacitor mismatch, noise and
settling are not modelled.

## Organisation

```
neuro_cim_top
 ├─ mws_encoder           weight byte -> 10-cell row (MWS), on the host write path
 ├─ data_sram             32 KB, activations in / spike counts out
 ├─ ncim_controller       LOAD -> INIT -> 16 x (ACC, FIRE) -> STORE
 ├─ spike_encoder  x16    4b activations -> word-line spikes for timestep t
 └─ cim_macro      x16    16 banks sharing 64 input channels
     └─ cim_bank   x16
         ├─ cim_bank_array    64 x 10 cells + threshold row, per-group Sub-WL enable
         ├─ cap_adder         V_POS / V_NEG increments (8b: one neuron, 4b: two)
         └─ neuron_unit x2    membrane, folding, firing, early stop, aggregation
             ├─ voltage_folder x2
             ├─ firing_logic
             └─ es_logic
```

`ncim_pkg` holds the sizes, the weight-mode enum, the configuration and
statistics structs, and the capacitor-weight functions. Defaults: 16 macros,
16 banks, 64 rows and 10 columns per bank, and a 32 KB data SRAM.

## The bank row and MSB word skipping

A row has ten cells in two groups of five. Each group has its own Sub-WL
enable (an AND gate on the word line):

| column | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| 8b mode | flag (−16) | w7 (−128) | w6 | w5 | w4 | flag (−1) | w3 | w2 | w1 | w0 |
| 4b mode | flag (−4) | s (−8) | b2 | b1 | b0 | flag (−4) | s (−8) | b2 | b1 | b0 |

Data columns feed the **positive adder**. Sign and flag columns feed the
**negative adder**. In 8b mode a bridge capacitor joins the two groups, so
the upper group counts ×16. In 4b mode the bridge is open, and each group is
an independent 4b weight with its own neuron. A bank therefore has one output
channel in 8b mode and two in 4b mode.

Encoding rules in `mws_encoder`, with `mws_en` set:

* 8b: if `w[7:4] == 1111` (worth −16), store flag = 1 and zeros in columns 1–4.
* 4b: if the top two bits are `11` (worth −4), store flag = 1 and zeros in
  the sign and b2 columns.

Either way the stored value is unchanged and fewer cells hold a 1. On the
full-size test with bell-shaped random 8b weights, MWS cut bit-line
discharges by about a third for identical spike outputs. The lower-group
flag is always written 0 in 8b mode, because the lower nibble is unsigned.
The adder still gives it weight −1.

## One operation, cycle by cycle

`start` runs one layer operation through the controller's phases:

1. **LOAD** (1024 cycles): reads activation bytes `in_base … in_base+1023`.
   Only the low nibble is used. Channel `c` is byte `c`.
2. **INIT** (1 cycle): clears every neuron and spike counter.
3. **RUN** (16 timesteps × 2 cycles):
   * **ACC.** `spike_encoder` gives each channel with activation `a` exactly
     `a` spikes in 16 steps: a spike at step `t` iff
     `floor((t+1)a/16) > floor(ta/16)`. The word lines of spiking rows are
     driven in every group whose neuron is still active. A neuron that has
     just started or just fired also drives its threshold row. Each
     neuron's V_POS and V_NEG grow by the adder outputs.
   * **FIRE.** Each neuron compares V_POS with V_NEG. On a spike it
     increments its counter and resets both voltages to 0; the threshold is
     added again in the next ACC. At timestep `t_es`, a neuron that did not
     fire is stopped if `V_POS − V_NEG < v_es`.
4. **STORE** (512 cycles): writes spike count `k = (macro·16 + bank)·2 + neuron`
   to `out_base + k`. In 8b mode neuron 1 of every bank reads 0.
5. `done` is high for one cycle, `NCH + 2·T_STEPS + NOUT + 1 = 1569` cycles
   after the edge that takes `start`.

### The threshold row

The threshold is stored in the array as a 65th row (address 64), holding
the **negated** threshold and encoded like any weight. Driving it puts the
threshold's magnitude mostly on V_NEG, so "fire when V_POS > V_NEG" means
"fire when Σ W·S > threshold". The threshold is written through the same
path as the weights, so it is limited to the weight range: 1 to 128 in 8b
mode, 1 to 8 in 4b mode.

## Folding and mixed-mode firing

Each analog accumulator has a limited range, `VFOLD` = 8192 weight LSBs.
That is enough for one 64-row step of 8b weights (64 × 127 = 8128).

* Without folding (`fold_en = 0`), V_POS and V_NEG clamp at `VFOLD − 1`.
* With folding, they clamp at `3·VFOLD − 1`. `voltage_folder` reports
  `fold_cnt` (0, 1 or 2) and the residue `v_sel`. `sel_x` indicates which
  of the two 180°-shifted folding outputs is rising.

`firing_logic` compares the two folding counts digitally. Only when the
counts are equal does the 1-bit comparator decide on the residues. The
result equals `V_POS > V_NEG` on the unfolded voltages.

## Multi-macro aggregation

`cfg.agg_pass[m] = 1` makes macro `m` a pass-through for macro `m+1`:

* Its neurons do not fire and do not drive a threshold row.
* Each bank adds its increments to those arriving from macro `m−1` and hands
  the sum to the same bank of macro `m+1`, combinationally within the ACC
  cycle.
* A macro at position `p` in its chain takes input channels `64p … 64p+63`.
  A chain of three macros gives one neuron 192 inputs, which is what the ×3
  folding range is sized for.
* The aggregating neuron's early-stop state travels back up the chain, so
  the pass-through macros stop driving their word lines too.
* The last macro (15) always fires.

## Configuration and status (top-level ports)

| signal | meaning |
|---|---|
| `cfg.wmode` | `WMODE_8B` or `WMODE_4B` |
| `cfg.mws_en` | apply MWS when weights are written (the stored rows depend on it) |
| `cfg.fold_en`, `cfg.es_en`, `cfg.t_es`, `cfg.v_es` | folding, early stop, ES timestep, signed ES level (weight LSBs) |
| `cfg.agg_pass[15:0]` | aggregation chains |
| `cfg.in_base`, `cfg.out_base` | SRAM addresses of activations and spike counts |
| `w_we, w_macro, w_bank, w_row, w_data` | write one weight row (`w_row` 64 = threshold); `w_data` is an 8b weight or `{w_L, w_U}` for 4b |
| `h_en, h_we, h_addr, h_wdata, h_rdata` | host port of the data SRAM, used while `busy` is low; read data one cycle later |
| `start`, `busy`, `done` | operation control |
| `stats` | running counts: word-line drives, bit-line discharges, spikes, early stops, folded decisions, aggregation steps, MWS flags written, operations |

Keep `cfg` stable while `busy` is high. Weight writes are ignored while busy.

## Where this model departs from, or adds to, the silicon it describes

* The internal cell array is 64 × 10 per bank, i.e. 20 KB of cells in total.
  A 32 KB figure is also quoted for the chip's CIM storage. The 64 × 10
  geometry was kept because it matches the 5 + 5 column row.
* The 4b column map and adder weights, the dedicated threshold row, the rate
  code, the 16-timestep window, the two-cycle timestep, `VFOLD`, the SRAM
  memory map and the host interface are choices of this model.
* The 1b-weight mode and the programmable-gain amplifier are not modelled.
* Weight reloading between layers and splitting of neurons with more than
  1024 inputs are outside this model. A whole network such as ResNet-18
  does not fit in the array at once.

## Simulating

Every testbench in `tb/` checks its own results and ends with
`TB_RESULT checks=N failures=M`. The shared reference models (weight split,
rate coder, integrate-and-fire neuron) are in `tb/ncim_tb_pkg.sv`. Example
with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ncim_pkg.sv tb/ncim_tb_pkg.sv tb/tb_cim_bank.sv --top-module tb_cim_bank
./obj_dir/Vtb_cim_bank
```

`tb_neuro_cim_top` runs the whole processor at its default size (16 × 16 × 64):
five operations covering 8b with MWS, 3-macro aggregation with folding, 4b
with early stopping, and 8b without MWS. It compares all 512 spike counts of
each operation with the reference model, and checks latency, the activity
reduction from MWS, and that every mechanism occurred. Building it takes
about five minutes; it then runs in about half a minute.
The unit testbenches build and run in seconds. `tb_cim_macro` uses 4 banks
to stay short.
