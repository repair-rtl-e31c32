# A self-testing systolic-array accelerator with partial-reconfiguration recovery

A small weight-stationary systolic array (14 x 14 MAC units, 8-bit signed
weights and activations, 32-bit partial sums) can check itself while it
infers. The check adds no extra arithmetic units. Each tested matrix
multiplication sends three extra vectors through the same array and
accumulators that do the real work. The accumulators compare what comes out
with a checksum of the weights, which they built while the weights were
loaded. If the comparison fails, the accelerator stops, raises an interrupt
and reports which columns failed and what kind of fault it sees. A recovery
controller then does one of two things. It re-runs from a known-good
instruction after reloading the weights, which is enough for a bit-flip in a
weight register. Or it asks the FPGA for a partial reconfiguration of the
accelerator region, then resumes. If the fault survives repeated
reconfigurations, it asks for a full device reboot.

The unified (activation) buffer and the weight buffer sit outside the
reconfigured region. So work that was already done survives a partial
reconfiguration. Both buffers are protected by a SECDED code.

## The checksum test

A column j of the array holds weights w(0,j) .. w(N-1,j). Two sums are
compared for every column:

* **C_SA**, the column sum computed by the array itself. An input vector of
  all +1 gives `C_SA = sum_i w(i,j)` at the bottom of the column. An input
  vector of all -1 gives `-sum_i w(i,j) - 1 = not(C_SA)`, provided the
  top-row adders get -1 instead of 0 as their incoming partial sum.
* **C_A**, the same sum computed by the accumulator bank while the weights
  stream in (`t_read_weight`). The accumulators are 48 bits wide but hold a
  32-bit result. They are split into two lanes with no carry between them
  (`simd_add48`): bits 31:0 keep accumulating matrix-multiply results, and
  bits 47:32 accumulate the weights. So a weight load that overlaps the
  draining of a previous multiplication does not disturb it.

When the tested multiplication starts, the accumulator bank moves the
checksum into two registers per column: **R0 = -C_A** and **R1 = C_A**. The
three test vectors are then appended to the data vectors:

| cycle after the data | vector | top-row adder input | column output | accumulator does |
|---|---|---|---|---|
| +0 | all +1 | 0  | C_SA        | a  = C_SA + R0, written to R0 |
| +1 | all -1 | -1 | not(C_SA)   | a* = not(C_SA) + R1, written to R1 |
| +2 | all 0  | 0  | 0           | kept for the LSB check |

A fault-free column gives a = 0 and a* = all ones, whatever the weights are.
The all-zero vector is needed because the other two vectors both have their
least significant bit set, so they cannot expose an output bit stuck at 1.
The cost is exactly three extra issue cycles per tested multiplication.

### Diagnosis

`fault_detector` looks at a, a*, C_SA, not(C_SA) and the zero-vector result
for every column:

| condition | diagnosis |
|---|---|
| zero-vector result is not 0 | array column fault |
| a = 0 and a* = all ones | column OK |
| a and a* differ from that but are bitwise complements | weight-register bit-flip (soft error) |
| a, a* not complementary, C_SA and not(C_SA) complementary | accumulator j fault |
| otherwise | array column j fault |

The reason a complementary pair points to the weights is this. A flipped
weight changes C_SA, not(C_SA) and therefore a and a* consistently, but not
C_A, which was computed before the flip. Over all columns the most severe
diagnosis wins (array > accumulator > weight). The faulty columns are
reported as a bit mask.

## Recovery

On a failed check `tpu_control` stops issuing, keeps the instruction FIFO
flushed, raises `irq` and latches a status word. The status holds the
diagnosis, the column mask and the index of the failed instruction. The
index counts instructions since reset or since the last `irq_clear`.
`recovery_ctrl` plays the part of the host processor in the recovery flow:

1. It holds the inference program in a program memory. Each entry is an
   80-bit instruction plus a "first instruction of a layer" flag. It streams
   the program into the FIFO.
2. On an interrupt it works out the **resume point**:
   * `full_test = 1`: every multiplication is tested. The resume point is
     the read_weights that loaded the failed multiplication's weights. If
     that multiplication adds into the accumulators (tiling), the resume
     point is instead the read_weights of the first multiplication of its
     accumulation chain. A reconfiguration loses the partial sums held in
     the accumulators, so the whole chain must be redone.
   * `full_test = 0`: only some multiplications per layer are tested, so
     an error may have entered earlier in the layer. The resume point is
     the first instruction of the failing layer.
3. **Weight bit-flip**, outside a post-reconfiguration phase: the controller
   clears the interrupt and re-runs from the resume point. The reload repairs
   the weight register.
4. **Structural fault**: the controller raises `dpr_req` until the
   reconfiguration controller answers `dpr_done`. While the region is being
   reconfigured, `rp_reset` holds the accelerator in reset. The controller
   then waits for the accelerator's `alive` output and re-runs from the
   resume point with a "post reconfiguration" flag set.
5. An error while that flag is set increments the error counter. Once the
   counter exceeds `MAX_DPR_ERR` (2) the controller raises
   `full_reboot_req` and stops. That is three failed repairs. A full reboot
   loses all memory contents, so the host must start cold. A passing check
   clears the flag and the counter.

## Instruction word (80 bits)

| bits | field | meaning |
|---|---|---|
| 79:72 | op | opcode |
| 71:40 | calc_len | number of vectors |
| 39:24 | acc_addr | first accumulator row |
| 23:0 | buf_addr | weight-buffer row (read_weights) or unified-buffer row |

| op | instruction |
|---|---|
| 0x00 | nop |
| 0x08 / 0x09 | read_weights / t_read_weight |
| 0x20 / 0x21 | matrix_multiply / t_matrix_multiply, overwrite accumulators |
| 0x22 / 0x23 | the same, adding into the accumulators (tiling) |
| 0b1sssssff | activate: ff = 0 none, 1 ReLU, 2 sigmoid; sssss = right shift that requantizes the 32-bit value |

The activate instruction reads `calc_len` accumulator rows. It shifts each
value right, then applies ReLU with saturation to int8, or a sigmoid. The
sigmoid is a piecewise-linear (PLAN) approximation that treats the shifted
value as Q.4 and outputs 0..127 for 0..1. Results go to the unified buffer
from `buf_addr` on.

## Timing

* Array latency: an input vector entering at cycle t leaves, de-skewed, at
  t + 2N - 1.
* read_weights: N + 1 cycles. Rows are read from `buf_addr+N-1` down to
  `buf_addr`, so PE row i holds weight-buffer row `buf_addr+i`. The weights
  go into shadow registers and become active when the next multiplication
  starts, so a load can overlap the previous multiplication's drain.
* matrix_multiply: waits for the array to empty, then spends 1 cycle
  activating the weights and loading R0/R1, then `calc_len` issue cycles
  (+3 when tested). Results and the check drain while the next instruction
  runs. The check result arrives one cycle after the zero-vector result.
* activate: waits for the array to empty, then `calc_len` cycles plus 2.
* `alive` rises one cycle after reset.

## Blocks

| file | what it is |
|---|---|
| `repair_pkg.sv` | instruction, opcode, vector-kind, diagnosis and status types |
| `mac_pe.sv` | one MAC: shadow/active weight, product plus incoming partial sum |
| `systolic_array.sv` | N x N grid, input skew, output de-skew, test-vector injection |
| `simd_add48.sv` | 48-bit adder split into 32-bit and 16-bit lanes |
| `accumulator_bank.sv` | accumulator memory, checksum lanes, R0/R1, test-result capture |
| `fault_detector.sv` | per-column comparison and diagnosis |
| `activation_unit.sv` | requantize, ReLU, sigmoid |
| `weight_buffer.sv` | weight rows (N bytes per row), per-byte SECDED |
| `unified_buffer.sv` | activations, two ports, per-byte SECDED |
| `instr_fifo.sv` | instruction FIFO with flush |
| `tpu_control.sv` | fetch, decode, sequencing, interrupt and status |
| `tpu_core.sv` | the reconfigurable region: FIFO, control, array, accumulators, detector, activation |
| `recovery_ctrl.sv` | program memory and the recovery flow |
| `repair_top.sv` | top: core plus buffers outside the region, plus recovery controller |

The top leaves the processor, the reconfiguration controller and the
device's configuration memory outside the design. `dpr_req`/`dpr_done`,
`rp_reset` and `full_reboot_req` are the ports where they connect.

## Parameters (top level)

| parameter | default | note |
|---|---|---|
| N | 14 | array size; the architecture allows 6 to 14 |
| DATA_W | 8 | weights and inputs |
| PSUM_W | 32 | partial sums and accumulators |
| ACC_DEPTH | 512 | accumulator rows (own choice) |
| FIFO_DEPTH | 32 | instruction FIFO (own choice) |
| WB_DEPTH | 32768 | weight rows = 458,752 bytes (own choice) |
| UB_DEPTH | 4096 | unified-buffer rows = 57,344 bytes (own choice) |
| PROG_DEPTH | 1024 | program memory entries (own choice) |
| MAX_DPR_ERR | 2 | reboot once the error counter exceeds this |

At these sizes the weight buffer holds a CNN of a few 10^5 parameters, and
the unified buffer holds a 32x32x3 image with room for feature maps.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if
it hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_repair_top rtl/repair_pkg.sv tb/tb_repair_top.sv
./obj_dir/Vtb_repair_top
```

Replace `tb_repair_top` with any `tb_<block>` to test one block.
`tb_repair_top` runs the full-size design with no parameter overrides, and
takes well under a second. It runs a two-layer program of eight
instructions: tested loads and multiplications, a tiled accumulation,
ReLU and sigmoid. It compares the outputs with an integer reference in
these scenarios:

* fault-free runs;
* a stuck partial-sum bit repaired by reconfiguration, under both resume
  policies;
* a weight bit-flip;
* a stuck accumulator bit;
* a fault that survives three reconfigurations, so the device reboots and
  starts cold;
* single-bit upsets in the unified buffer and the weight buffer.

It counts each mechanism and fails if one never happens. A simple model of
the reconfiguration controller answers `dpr_req`. Faults are injected with
`force` on internal signals.

Three more full-size testbenches measure cost:

* `tb_dpr_overhead` re-runs a faulty multiplication of 14 to 112 vectors,
  that is operands up to eight times the array size. It measures the time
  spent outside the reconfiguration itself: 67 to 165 cycles, or 0.67 to
  1.65 us at 100 MHz. It checks that this stays below 2 us.
* `tb_test_overhead` runs one tiled layer of six multiplications three
  ways: untested, fully tested, and tested only at the first and last
  multiplication. It checks that testing adds exactly 3 cycles per tested
  multiplication (18 and 6 cycles here).
* `tb_layer_restart` runs a three-layer network in which only the first and
  last multiplication of each layer is tested. It injects a fault into each
  layer in turn and checks that execution resumes at that layer's first
  instruction. It compares the redone work with what a full restart would
  redo. Redone cycles for a fault in layers 1 / 2 / 3 are 254 / 548 / 174,
  against 225 / 792 / 1036 for a restart from the beginning.

## Departures and limitations

* The recovery flow is a hardware state machine with its own program memory.
  In the reference platform it is firmware on a RISC-V soft core. The
  processor, the reconfiguration controller and the configuration memory are
  not implemented.
* A partial reconfiguration is modelled as a reset of the accelerator region.
  The accumulator memory is not cleared by reset. Programs must start each
  accumulation chain with an overwriting multiplication, which the resume
  rules above guarantee.
* The reboot threshold follows the flow chart's "counter > 2", which allows
  three reconfiguration attempts. The prose description of the platform
  speaks of two attempts; set `MAX_DPR_ERR = 1` for that reading.
* Re-running after a weight bit-flip without reconfiguration is this
  design's reading of "reloading the weights is enough".
* Instructions run one at a time. The only overlap is that a weight load,
  and the next instructions, proceed while the previous multiplication
  drains and is checked. An instruction that started before a failed check
  was reported is abandoned and re-run from the resume point.
* Both buffers use a per-byte Hamming(12,8) code plus an overall parity
  bit (`ecc_encode`/`ecc_decode` in the package). They do not use the
  64-bit block-RAM ECC of an FPGA vendor. Corrected data is not written
  back, so an upset stays in memory until the row is rewritten.
* Field widths, opcode values, the activation encoding, the sigmoid
  approximation and all memory depths are this design's own choices.
* The column mask is 16 bits wide, so N may be at most 16.
