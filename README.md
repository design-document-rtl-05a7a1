# MNIST inference accelerator (INT8 MLP, one MAC at a time)

This is a memory-mapped peripheral that classifies a 28×28 handwritten
digit with a small quantised neural network, entirely in integer logic.
A host CPU writes the network's weights and one image into on-chip
memory over an Avalon-MM slave port and writes a start bit. A sequencer
then runs every multiply-accumulate of the network, one after another, on
one multiplier per layer. The peripheral then reports the predicted digit
in a register and shows it on a seven-segment display.

The network is a multi-layer perceptron, 784 → 128 → 10:

| step   | operation                                                    | arithmetic |
|--------|--------------------------------------------------------------|------------|
| input  | 784 pixels, each stored as `pixel − 128` (signed INT8)        | int8 |
| FC1    | 128 neurons: `h[j] = max(0, b1[j] + Σi W1[j,i]·x[i])`         | int8×int8 products, int32 accumulator, int32 result (no requantisation) |
| FC2    | 10 neurons: `o[j] = b2[j] + Σi W2[j,i]·h[i]`                  | int32×int8 products (40 bit), 48-bit accumulator |
| argmax | `result = first j with the largest o[j]`                      | strict `>`: on a tie the lowest index wins |

The weights are per-tensor symmetric INT8. The biases are pre-scaled
offline into accumulator units, as INT32. The hardware therefore needs no
scale factors: the predicted class does not depend on the scale left in
the accumulators. The hardware's integer results are meant to match,
bit for bit, a software forward pass that uses the same integer
arithmetic. The testbenches here contain such a reference pass and compare
every hidden activation and every output against it.

One inference is 100,352 + 1,280 = 101,632 MACs. It takes **203,826 clock
cycles, about 4.1 ms at 50 MHz**.

## How an inference is sequenced

This is the part that needs the most care when changing the design.

Every memory has a **two-cycle read**. The read address is registered in
the memory (`bram_2c`) on the first clock edge, and the data is registered
on the second. Data for an address presented in cycle *t* can therefore be
used in cycle *t + 2*. The design does not pipeline around this. It
spends two cycles on every MAC: a wait cycle, then a compute cycle. While
it computes, it presents the address for the next MAC.

The sequencer (`mnist_fsm`) has 15 states and two counters: the neuron
index `j` and the input index `i`. For each FC1 neuron:

| state              | cycles | what happens |
|--------------------|--------|--------------|
| `S_FC1_NEXT_J`     | 1      | present `fc1_b` address `j` |
| `S_FC1_BIAS_WAIT`  | 1      | memory latency |
| `S_FC1_BIAS_LOAD`  | 1      | bias arrives, `acc_fc1 ← b1[j]`; present weight `j·784` and pixel 0 |
| `S_FC1_MAC_WAIT`   | 784×1  | memory latency |
| `S_FC1_MAC`        | 784×1  | `acc_fc1 += W1·x`; present weight/pixel `i+1`; back to `MAC_WAIT` unless `i` was the last |
| `S_FC1_STORE`      | 1      | `hidden_mem[j] ← max(0, acc_fc1)`; next neuron or go on to FC2 |

FC2 has the same six states (`S_FC2_*`). They read `hidden_mem` instead of
the image, use `acc_fc2`, and at `S_FC2_STORE` write `out_regs[j]`, a bank
of ten 48-bit flip-flop registers. `S_ARGMAX` then lasts ten cycles: the
argmax unit visits one `out_regs` entry per cycle. In the last cycle the
digit and the low 32 bits of the winning output are latched into
`result` and `confidence`. At the same clock edge the sequencer enters
`S_DONE` and sets the sticky `done` flag. It stays in `S_DONE` until the
host writes `clear_done`.

Cycle count, from the first cycle out of `S_IDLE` to the first cycle of
`S_DONE`:

    NH·(4 + 2·NI) + NO·(4 + 2·NH) + NO
    = 128·1572 + 10·260 + 10 = 203,826 cycles

The start pulse reaches the sequencer one cycle after the host's CONTROL
write. Budgets that leave out the store cycle put the figure at about
203,700 cycles. The difference is the one `STORE` cycle per neuron.

The read addresses leave the sequencer combinationally (`j·784 + i`,
`i`, `j`, and so on). The address register sits inside each memory, so
changing the sequencer's outputs to registers would add a cycle to every
read. A MAC would then see the wrong operand.

## Register interface

Avalon-MM slave, word addressed (`address[3:0]`), 32-bit data, zero wait
states (`readdata` is combinational), synchronous active-high `reset`.

| word | byte | name        | access | contents |
|------|------|-------------|--------|----------|
| 0    | 0x00 | CONTROL     | W      | bit 0 `start`, bit 1 `load_mode`, bit 2 `clear_done` |
| 1    | 0x04 | STATUS      | R      | bit 0 `busy`, bit 1 `done` |
| 2    | 0x08 | RESULT      | R      | bits 3:0 predicted digit |
| 3    | 0x0C | CONFIDENCE  | R      | low 32 bits of the winning 48-bit FC2 output (a debug value, not a probability) |
| 4    | 0x10 | LOAD_ADDR   | R/W    | index within the selected memory |
| 5    | 0x14 | LOAD_DATA   | W      | word to store at LOAD_ADDR |
| 6    | 0x18 | LOAD_TARGET | W      | bits 2:0 memory select (below); writing it sets LOAD_ADDR to 0 |
| 7    | 0x1C | VERSION     | R      | 0x4D4E5301 ("MNS", 1) |

Rules:

- A CONTROL write sets all three bits at once. `start` and `clear_done`
  are one-cycle pulses in the cycle after the write. `load_mode` keeps
  its value until CONTROL is written again.
- `start` is ignored while `load_mode` is 1 and in every state except
  `S_IDLE`, including `S_DONE`.
- `busy` is 1 in every state except `S_IDLE` and `S_DONE`. `done` is set
  when `S_DONE` is entered and cleared only by `clear_done`, which also
  returns the sequencer to idle. RESULT and CONFIDENCE keep their values
  until the next inference finishes.
- While `load_mode` is 1, each LOAD_DATA write stores the data in the
  selected memory at LOAD_ADDR in the same cycle. LOAD_ADDR then goes up
  by one, whatever the target. Back-to-back writes therefore stream one
  word per clock. INT8 memories take `writedata[7:0]`; INT32 memories take
  all 32 bits. LOAD_DATA writes outside load mode are ignored.
- Write-only registers read as 0.

| LOAD_TARGET | memory      | shape        | contents |
|-------------|-------------|--------------|----------|
| 0           | `fc1_w_mem` | 100,352 × 8  | W1[j,i] at j·784 + i |
| 1           | `fc1_b_mem` | 128 × 32     | b1 |
| 2           | `fc2_w_mem` | 1,280 × 8    | W2[j,i] at j·128 + i |
| 3           | `fc2_b_mem` | 10 × 32      | b2 |
| 4           | `img_mem`   | 784 × 8      | pixel − 128 |
| 5–7         | reserved    |              | nothing is written, but LOAD_ADDR still advances |

`hidden_mem` (128 × 32) is internal. Only the sequencer writes it. The
six memories hold 827,840 bits in all.

A host driver uses the interface like this:

    CONTROL = 2                         enter load mode
    for each memory:
        LOAD_TARGET = t                 LOAD_ADDR becomes 0
        LOAD_DATA = word, once per word
    CONTROL = 0; CONTROL = 1            leave load mode, start
    poll STATUS until bit 1 (done) is 1 about 4.1 ms later
    read RESULT and CONFIDENCE
    CONTROL = 4                         clear_done

For a new image, only target 4 needs to be reloaded.

## Blocks and files

| file | role |
|------|------|
| `rtl/mnist_pkg.sv` | network sizes, widths, register addresses and bit positions, target codes, state enum, the `load_wr_t` load-write bundle |
| `rtl/mnist_accel.sv` | top: wires the blocks below; `HEX0` shows RESULT, `HEX1`–`HEX5` are blank (`7'h7f`) |
| `rtl/mnist_regfile.sv` | Avalon-MM front end, the eight registers, and the load path |
| `rtl/mnist_fsm.sv` | 15-state sequencer, counters, read addresses, datapath controls, `busy`/`done` |
| `rtl/mnist_bram_bank.sv` | the six memories and the decoding of load-path write targets |
| `rtl/bram_2c.sv` | one memory: one write port, one read port with a two-cycle read |
| `rtl/mnist_datapath.sv` | 8×8 MAC into 32 bits, ReLU, 32×8 MAC into 48 bits, `out_regs`, result and confidence registers |
| `rtl/argmax_scan.sv` | one-element-per-cycle argmax with strict `>` |
| `rtl/hex7seg.sv` | active-low seven-segment decoder (bit 0 = segment a … bit 6 = g) |
| `rtl/auto_start.sv` | optional one-shot start about 1.3 ms (2^16 − 1 cycles) after reset |

Top-level parameters of `mnist_accel`:

- `NI`, `NH`, `NO` set the layer sizes. The defaults are 784, 128 and 10.
  Smaller values give the same design at a size that simulates quickly.
- `AUTO_START` (default 0) enables `auto_start`. This supports a
  standalone bring-up where the memories are filled at FPGA configuration
  and no host is present. The start pulse is lost if `load_mode` is set
  when it fires, so the counter never disturbs a host that is using the
  peripheral. The memory-initialisation files for that mode are not part
  of this RTL: they would hold a trained network.
- `AUTO_CNT_W` (default 16) sets the width of that counter.

## Decisions and departures

The points below were open or inconsistent in the design as specified.
Here is how this RTL settles them:

- **S_DONE exit.** The sequencer waits in `S_DONE` until `clear_done`. It
  does not fall back to idle by itself. Until the host clears `done`, a
  new start is ignored.
- **Argmax timing.** `out_regs` are flip-flops, so a one-cycle argmax
  would be possible. This RTL keeps the ten-cycle linear scan. The
  ten-cycle scan is also what the cycle budget counts.
- **HEX displays.** There is one decoder, on HEX0. The other five
  displays are tied to blank rather than driven by decoders of their own.
- **Six memories.** `fc2_b_mem` is a separate 10 × 32 memory, like the
  other five.
- **Latency.** The count is 4 + 2·N cycles per neuron, because the store
  cycle is counted. Budgets that quote 3 + 2·N per neuron leave it out.
- **Choices of this RTL's own:**
  - synchronous active-high reset;
  - combinational `readdata`;
  - LOAD_DATA is ignored outside load mode;
  - load indices past the end of a memory are dropped, not wrapped;
  - codes 10–15 on the HEX decoder show A–F;
  - the accumulators wrap and do not saturate. The FC1 products sum to
    at most 784·128² < 2^24 and the FC2 products to below 2^46, so with
    biases of realistic size both sums stay well inside their
    accumulators.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        --top-module tb_mnist_accel_full -y rtl -y tb +libext+.sv -Irtl \
        rtl/mnist_pkg.sv tb/tb_mnist_accel_full.sv
    ./obj_dir/Vtb_mnist_accel_full

| testbench | what it covers |
|-----------|----------------|
| `tb_mnist_accel_full` | The full-size peripheral, all parameters at their defaults. It loads 102,968 words over the bus, runs one inference, compares all 128 hidden values, all 10 outputs, RESULT, CONFIDENCE and HEX0 against a reference pass, and checks the 203,826-cycle latency. Runs in under a second. |
| `tb_mnist_ten_images` | Loads the full-size weights once, then classifies ten images in turn, reloading only the image, with the same checks for each. |
| `tb_mnist_accel` | End to end at 16 → 8 → 10, through the bus only. It counts and requires each mechanism: loads to every target, a reserved target, a direct LOAD_ADDR patch, start ignored under `load_mode`, start ignored while busy, ReLU clamping and passing, an argmax tie, sticky `done` and `clear_done`, HEX0, back-to-back images, and `auto_start` (a second instance). |
| `tb_mnist_fsm` | Uses a two-cycle memory model. Checks that every MAC receives operand (j, i) for all i and j, that every bias and store is in order, and the exact cycle count. |
| `tb_mnist_datapath` | MAC, ReLU and argmax arithmetic against 64-bit reference sums. |
| `tb_mnist_regfile`, `tb_mnist_bram_bank`, `tb_bram_2c`, `tb_argmax_scan`, `tb_hex7seg`, `tb_auto_start` | unit tests of the remaining blocks |

The weights and images in the testbenches are pseudo-random values of
the right types and ranges. No trained network is included. The
testbenches therefore check that the arithmetic is exact; they say
nothing about classification accuracy.

## Trust and limits

- The RTL is checked in simulation only: the tests above, plus lint and
  elaboration with Verilator and with Yosys/slang. It has not been run on
  an FPGA, and no timing closure has been done.
- The critical path is likely to run through the 32×8 multiplier and the
  48-bit adder, which are combinational from the memory output
  registers. The clock target is 50 MHz.
- The system around the peripheral is not included: the ARM host running
  Linux, its lightweight bridge into the FPGA fabric, the driver and user
  program, the SD card holding the weight files, and the FPGA
  configuration flow. The Avalon-MM port at the top is where that system
  connects.
