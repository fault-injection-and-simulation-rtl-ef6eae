# Reconfigurable duplex system with parity-checked FPGAs, and its LUT fault emulator

SRAM-based FPGAs lose their function when a single event upset (SEU) flips a
configuration bit, for example one bit of a look-up table (LUT). The classic
answers, duplication or triplication, cost 100 % or 200 % extra area. This
design combines two cheaper mechanisms:

* **Duplex with self-checking halves.** Two FPGAs run the same combinational
  circuit on the same input. Inside each FPGA the circuit is *totally
  self-checking* (TSC): a parity generator predicts the parity of the outputs,
  and a two-rail parity checker reports OK/FAIL. Each FPGA also compares its
  own output with the other FPGA's. A comparison alone says only *that* the
  copies disagree. Adding the self-check says *which* copy is wrong, so only
  that FPGA needs to be reconfigured. The other one keeps serving.
* **A hardware fault emulator** measures how good the self-check actually is.
  It injects every single LUT-bit flip into a copy of the circuit, applies all
  input vectors at one vector per clock, and sorts each fault into one of four
  classes. From the class totals follow the fault-secure (FS) and
  self-testing (ST) coverages.

The RTL holds both halves side by side in `duplex_fault_emulation_top`.

## The duplex system (`duplex_system`)

```
              +------------------- FPGA 1 (fpga_tsc_unit) ------------------+
   pi ---+--->| lut_fabric --po1--> tsc_checker --> tsc1 (OK/FAIL)          |--> po1
         |    |                \--> comparator(po1, po2) --> cmp1 (OK/FAIL) |
         |    +--------------------------------------------------------------+
         |    +------------------- FPGA 2 (fpga_tsc_unit) ------------------+
         +--->| lut_fabric --po2--> tsc_checker --> tsc2                    |--> po2
              |                \--> comparator(po2, po1) --> cmp2           |
              +--------------------------------------------------------------+
     tsc1, tsc2, cmp1, cmp2 --> reconfig_unit --> reconf_req[1:0], halt,
                                                  out_valid[1:0], sync_reset
```

Every OK/FAIL signal is a `two_rail_t {ok, fail}` (see `fte_pkg`). Only
`{1,0}` means "good". `{0,1}` is an error report. `{0,0}` and `{1,1}` show that
the checking logic itself is broken, and are also treated as errors.

### Locating the faulty FPGA (`reconfig_unit`)

Each clock in the running state, with *differ* = either comparator reports a
mismatch and *errN* = TSC checker N reports an error:

| differ | err1 | err2 | action                                            |
|:------:|:----:|:----:|---------------------------------------------------|
| 1      | 1    | 0    | reconfigure FPGA 1; po2 stays valid               |
| 1      | 0    | 1    | reconfigure FPGA 2; po1 stays valid               |
| 1      | 0    | 0    | undetected error: halt, reconfigure both          |
| 1      | 1    | 1    | halt, reconfigure both                            |
| 0      | 1/0  | 0/1  | reconfigure the FPGA whose checker complained     |
| 0      | 0    | 0    | keep running                                      |

The first three rows are the scheme as published. The last three rows are this
design's choice. `out_valid` drops in the same clock as the error (it is
combinational in the running state). `reconf_req` is registered in the next
clock and held until the configuration port answers with `reconf_done`. Then
`sync_reset` is high for exactly one clock, with `halt` high, so that both
FPGAs can be brought back into step by reset. After that the unit runs again.

The reconfiguration itself (reloading the bitstream) belongs to the FPGA's
configuration port and a controlling processor. Neither is in this RTL. The
request/acknowledge pair is where they connect.

## Self-checking building blocks

**`parity_tree`** reduces a vector with XOR nodes of `FANIN` inputs, level by
level. This is the balanced ("optimal") tree: it has the same node count,
ceil((n-1)/(FANIN-1)), as a chain, but only ceil(log_FANIN n) levels of
delay. `FANIN = 4` models 4-input LUTs.

**`tsc_checker`** takes the circuit outputs plus the predicted parity bit.
The convention is even parity: a correct word has an even number of ones. The
checker has two rails:

* `ok = XNOR(all bits)`, built in one tree;
* `fail = XOR(all bits)`, built in a second tree.

The two trees share no gate. A single fault in either tree therefore makes the
pair non-complementary instead of silently wrong.

**`comparator`** follows the LUT mapping of an equality test:

* first, one 4-input LUT per bit pair forms a *sub-equal*,
  `se_k = XNOR(r[2k],s[2k]) & XNOR(r[2k+1],s[2k+1])`;
* then a tree of 4-input AND nodes collects the sub-equals into `equal`.

In the worst case this takes ceil(n/2) + ceil((floor(n/2)-1)/3) LUTs. For the
self-checking version, a separate OR-of-XOR network of the same shape drives
the `fail` rail. The emulator uses only the `ok` rails (`equal`, `codeword`).

## The circuit under test (`lut_fabric`)

The application circuit and its parity generator are given as data: a
feed-forward network of `N_LUT` 4-input LUTs.

* **Signals.** Signal numbers `0..N_IN-1` are the primary inputs. Signal
  `N_IN+k` is the output of LUT k.
* **LUT inputs.** Input j of LUT k reads signal `route_cfg[k][j]`. A value
  `>= N_IN+k` ties that input to 0. This is how a LUT using fewer than four
  inputs is expressed, and it also rules out loops.
* **LUT contents.** LUT k outputs `lut_cfg[k][{i3,i2,i1,i0}]`.
* **Outputs.** Output o is signal `out_sel[o]`. A select past the last signal
  gives 0.

An SEU in a LUT is a single flipped bit of `lut_cfg`. Routing bits are kept
fault-free. Only LUT-content faults (the "safe" test set) are emulated, since
injecting interconnect faults could create shorts in a real device.

The LUT bits addressed only with a tied input at 1 are *unused logic*. A fault
there can never be seen, so campaigns leave those bits out through
`fault_mask`.

## The fault emulator (`fault_emulator`, `fault_campaign`)

```
 test_generator --0-\
 user_vector   --1--mux--DFF--+--> lut_fabric (faulty cfg)   --DFF--> res1 --+--> tsc_checker.ok = codeword
 (vector_select)              \--> lut_fabric (fault-free)   --DFF--> res2 --+--> comparator.equal
   U = !equal & !codeword  (an error that the checker catches)    --> sum1bit --> u
   V = !equal &  codeword  (an error that slips through)          --> sum1bit --> v
```

`sum1bit` is a one-bit saturating counter, cleared by `start`. After one
exhaustive test, `u` says whether a detected error ever occurred and `v`
whether an undetected one did. These two bits fix the fault's class:

| u v | class | meaning                                                        |
|-----|-------|----------------------------------------------------------------|
| 0 0 | A     | hidden: no output error for any vector (harms self-testing)    |
| 1 0 | B     | every error it causes is detected (harmless)                   |
| 0 1 | C     | undetected errors only (breaks fault security and self-testing) |
| 1 1 | D     | detected for some vectors, undetected for others (breaks FS)   |

With totals A, B, C, D over all injected faults:

* ST coverage = (B + D) / all;
* FS coverage = (A + B) / all.

These formulas reproduce the coverage figures published for this scheme from
the class counts. For example, for the `alu2` benchmark with A/B/C/D =
109/935/0/28 they give ST = 89.83 % and FS = 97.4 %.

**Timing.** A `start` pulse, sampled at clock edge 0, does three things:

* it clears both counters and `finish`;
* the generator then presents vector v after edge v;
* the pipeline (vector register, result registers, counter) adds three clocks.

`finish` therefore rises after edge 2^N_IN - 1 + 3 and holds until the next
start. Each (vector, fault) pair costs one clock. Configurations must be stable
from two clocks before `start`. Vectors left in the pipeline from an earlier
test are still legal input vectors, so no valid flag is needed.

**Campaign.** `fault_campaign` does the controlling processor's job in
hardware. For each set bit of `fault_mask`, in index order, it:

1. sets the one-hot `fault_flip`, which the top XORs into the fault-free
   contents (moving to the next bit restores the previous one);
2. waits two clocks;
3. pulses `emu_start`, waits for `emu_finish`, and converts `u`/`v` into a
   `fault_class_e`;
4. strobes `class_valid` with `fault_index`/`fault_class`, and increments
   `cnt_a..cnt_d`.

A campaign over f faults takes f·(2^N_IN + 7) + (N_BITS − f) + 2 clocks from
`go` to `done`.

## Top level (`duplex_fault_emulation_top`)

The ports starting with `dx_` (plus `pi`, `po1`, `po2`) belong to the duplex
system. The ports starting with `em_` belong to the emulator. The two halves
share only `clk` and the synchronous, active-high `rst`.

Defaults: `N_IN = 18`, `N_OUT = 26` (25 outputs plus the parity bit) and
`N_LUT = 360`. These are the largest values among the evaluated benchmark
circuits (up to 18 inputs, 25 outputs, and 310 + 50 LUTs for circuit plus
parity generator). So any of those circuits fits once its LUT netlist is
supplied as configuration. For example, the largest one (`s1488`: 14 inputs,
4286 faults) needs a campaign of about 70 M clocks. `SELW` is
`$clog2(N_IN + N_LUT + 1)` = 9 at the defaults.

## Where this RTL departs from, or adds to, the published scheme

* **No benchmark netlists.** The benchmark circuits and their parity
  generators are not included. `lut_fabric` is a generic container for them.
* **No processor or configuration port.** The processor that controls
  reconfiguration and fault upload, and the FPGA configuration port, are not
  included. The fault-upload loop is rebuilt as `fault_campaign`.
  Reconfiguration appears as `reconf_req`/`reconf_done`.
* **Choices of this design:**
  * the U/V equations, which follow from the class definitions;
  * reconfiguration rows 4 and 5 of the table above;
  * `out_valid`, `halt` and the one-clock `sync_reset`;
  * the TSC comparator's separate `fail` rail;
  * comparing the whole result, parity bit included, between the FPGAs;
  * test order, settle time and every handshake.
* **One parity bit.** Each FPGA's TSC circuit is modelled as one LUT network
  with a single parity bit. It is not split into separately self-checking
  sub-blocks.
* **Pass/fail only.** Area (LUT counts) and delay are properties of the FPGA
  mapping. The RTL keeps the structures that produce them (tree shapes, pair
  grouping) but reports nothing about them.

## Testbenches and simulation

Each module in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/tb_example_pkg.sv` holds a small example circuit:

* 4 inputs, 6 LUTs, 3 outputs plus parity;
* 40 usable fault sites, which fall into A/B/C/D = 2/30/4/4;
* an independent reference that evaluates it LUT by LUT by name.

The tests of the fabric, the emulator, the FPGA unit, the duplex system and
the top all check against that reference. The main testbenches:

* `duplex_fault_emulation_top_tb`, at reduced size (4/4/6). It runs random
  single upsets through the duplex with a modelled configuration port. It then
  runs a full campaign and a user-vector campaign, checking:
  * every fault's class;
  * the class totals;
  * the exact campaign length;
  * that every mechanism occurs: all four classes, reconfiguring either FPGA
    alone, halting with both reconfigured, and resynchronisation.
* `duplex_fault_emulation_top_full_tb`, at the default size. The example is
  embedded in the 360-LUT fabric. A campaign over four faults, one per class,
  is checked at 2^18 vectors per fault, about 1.05 M clocks. This takes
  roughly three minutes in Verilator.

* `workload_alu2_size_tb` runs a full campaign on a random circuit the size of
  one of the evaluated benchmarks. It has 10 inputs, 8 outputs, 44 circuit
  LUTs, and a 47-LUT parity generator made of a copy of the logic plus an XOR
  tree. It checks each of the roughly 800 faults against a separate
  LUT-by-LUT evaluator, and the campaign length (about 0.84 M clocks). It takes
  about 40 seconds. The class mix of a random circuit says nothing about the
  real benchmark; the test shows that the emulator classifies correctly at
  that size.

To run any testbench with Verilator (packages first, the rest found by module
name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fte_pkg.sv tb/tb_example_pkg.sv tb/duplex_fault_emulation_top_tb.sv \
    --top-module duplex_fault_emulation_top_tb -Mdir obj
./obj/Vduplex_fault_emulation_top_tb
```

The RTL is two-state clean: every register that is read is reset, or is
loaded before it is read.
