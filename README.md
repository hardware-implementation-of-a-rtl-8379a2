# Neural network trainer in hardware

This design trains a small neural network on chip and then uses it. The network decides whether a point
(x, y) of the 8-bit plane lies inside an area. It learns the area from labelled points: +1 means inside
and -1 means outside. The training rule is the *univariate randomly optimised neural network* method:

- pick one weight;
- replace it by a random number;
- run the network again;
- keep the new value only if the output moved closer to the target, and otherwise put the old value back.

This needs no gradients and no floating point. Every weight and every input is an 8-bit integer.

A host PC drives the chip over an RS-232 serial line with 4-byte commands. It can load and read back
weights, classify points, and train. Training works in two ways. The first pass of the training set
arrives over the serial line and is also kept in on-chip RAM. Later epochs then run from the RAM, at full
clock speed.

The chip has five pins, as on the original FPGA board:

| pin          | dir | meaning                                        |
|--------------|-----|------------------------------------------------|
| `clk`        | in  | system clock, 25.175 MHz                       |
| `rst_n`      | in  | reset, active low                              |
| `serial_in`  | in  | RS-232 receive (8N1)                           |
| `serial_out` | out | RS-232 transmit (8N1)                          |
| `rx_full`    | out | receive queue full: the host must stop sending |

## The network

There are three neurons, arranged feed-forward:

```
 x ─┬─► neuron 0 (hidden) ─┐
 y ─┼─► neuron 1 (hidden) ─┼─► neuron 2 (output) ─► +1 / -1
    └── (+1 bias on every neuron)
```

- The hidden neurons take x and y directly. There are no input-layer neurons.
- x and y are treated as unsigned values, 0..255.
- Each neuron has three signed 8-bit weights: one per input and one bias weight.
- The bias input is the constant +1.
- A neuron forms the weighted sum and outputs +1 if the sum is ≥ 0, and -1 otherwise.
- The output neuron therefore sees inputs of ±1.

Each neuron (`hold_weights`) has two halves:

- **`weight_storage`** holds the three weights and talks to the network bus. A comparator matches the
  address bus against the neuron's fixed identifier (0, 1 or 2). The command and select buses are then
  decoded into one write enable and one read enable (`q_enable`) per weight. Each weight sits in its own
  `weight_unit`, a register whose read output is AND-gated by `q_enable`. The units' outputs are ORed onto
  the output data bus, so no tristates are used.
- **`hebbian_neuron`** is the multiply-accumulate. It uses a multiplier with one pipeline register:
  - one product is formed per clock;
  - the accumulator adds it one clock later;
  - `done` comes on the 4th clock edge after the edge that takes `start`.

The network bus is shared by all three neurons:

| field | width | meaning                                                                          |
|-------|-------|----------------------------------------------------------------------------------|
| cmd   | 2     | `00` read weight, `01` write weight, `10` idle, `11` start forward calculation   |
| addr  | 2     | neuron identifier (ignored by `11`, which starts the whole network)              |
| sel   | 2     | which weight inside the neuron (0 = x or hidden 0, 1 = y or hidden 1, 2 = bias)  |
| data  | 8     | weight to write                                                                  |
| rdata | 8     | separate return bus: the weight read from the addressed neuron                   |

A forward calculation proceeds as follows:

1. The forward command starts both hidden neurons.
2. When both are done, the output neuron starts.
3. `done` rises on the 9th clock edge after the edge that takes the command.

## How training runs

The control unit (`control_unit`) is one state machine. Every bus transfer is a call to the data bus
controller: the control unit starts it and waits for `done`. Each reply to the host is a push into the
transmit queue, and the push waits while that queue is full.

For one training sample (x, y, target):

```
evaluate network                      -> error calculator stores |target - y| as best
for neuron n = 0, 1, 2:
  for trial k = 0 .. 5:               (weight s cycles 0,1,2,0,1,2)
    read   W[n][s]            -> w_old
    write  W[n][s] = random
    evaluate network
    if |target - y| < best:  best = |target - y|   (keep the random weight)
    else                     write W[n][s] = w_old  (restore)
```

- Each sample costs 1 + 3 × 6 = 19 network evaluations, about 40 clocks per trial.
- If the network already classifies the sample correctly, nothing can be strictly better, so all
  weights stay as they were.
- A weight changes only when it moves a wrong output to the right one.

The random weights come from `prng`, a 16-bit LFSR (x¹⁶+x¹⁴+x¹³+x¹¹+1) that steps on every clock. The
trainer samples it at moments that depend on the host's traffic, so two runs after the same reset
generally draw different weights.

The error calculator (`error_calc`) keeps the best error so far. It reports `improved` one clock after
a compare. A tie counts as no improvement.

## Host commands

Every command is four bytes. The first byte is the opcode; the second byte ends up in bits [23:16] of
the received word.

| bytes           | command             | what happens                                                   | reply                               |
|-----------------|---------------------|----------------------------------------------------------------|-------------------------------------|
| `01 x y t`      | train from serial   | store (x, y, t) in RAM, train on it                            | none                                |
| `02 eh el --`   | train from RAM      | run `{eh,el}` epochs over every stored sample (0 = nothing)    | none                                |
| `03 -- -- --`   | return weights      | read the nine weights                                          | 9 words `{n[3:0], s[3:0], w}`       |
| `04 n s w`      | load weight         | write `w` into weight `s` of neuron `n`                        | none                                |
| `05 x y --`     | evaluate            | run the network on (x, y)                                      | 1 word `{F0, out}` (out = 01 or FF) |
| anything else   | ignored             |                                                                |                                     |

- The target byte `t` means -1 when bit 7 is set, and +1 otherwise.
- Replies are 16-bit words, sent high byte first.
- Commands queue up in the receive FIFO. A host can therefore send `02` and then `03` at once: the weights
  come back when training ends.
- Samples are stored in arrival order until the RAM is full. After that, samples are still trained on
  but no longer stored. Only a reset clears the stored set.

## Serial link and queues

`rs232_interface` contains the following:

- **`uart_rx`**: a two-flop synchroniser, then mid-bit sampling. A start bit that is gone at mid-bit is
  ignored as a glitch. A frame whose stop bit reads 0 is dropped, and it does not advance the packet.
- **Four byte registers**: they collect a packet. The first byte goes to [31:24].
- **Receive queue** (`sync_fifo`, 4 × 32 bits): its full flag is the `rx_full` pin. While the queue is
  full, a completed packet waits in the byte registers, and bytes that arrive meanwhile are lost.
  The host is expected to watch `rx_full`.
- **Transmit queue** (`sync_fifo`, 6 × 16 bits): it holds replies.
- **`uart_tx`**: it sends each reply word as two bytes. It has a transmit enable, which is tied high here.

`CLKS_PER_BIT` sets the baud rate:

- 2622 (the default) gives 9600 baud at 25.175 MHz;
- 218 gives 115200 baud.

At 9600 baud one command takes about 4.2 ms on the wire. Training from RAM runs about 19 × 40 clocks per
sample per epoch, roughly 30 µs at 25 MHz.

## Training memory

- `memory_interface` writes each incoming sample at the next free address of `training_ram`.
- `training_ram` is 256 × 24 bits, with a synchronous write and a registered read.
- For each epoch the control unit rewinds the read pointer and fetches samples one by one until
  `at_end`.

## Files

| file                        | contents                                                             |
|-----------------------------|----------------------------------------------------------------------|
| `rtl/nn_pkg.sv`             | bus struct, command encodings, host opcodes, sample struct, widths   |
| `rtl/nn_trainer_top.sv`     | top level                                                            |
| `rtl/control_unit.sv`       | command decoder and training sequencer                               |
| `rtl/data_bus_controller.sv`| read / write / write-random / evaluate transfers on the network bus  |
| `rtl/neural_network.sv`     | three neurons and the layer hand-over                                |
| `rtl/hold_weights.sv`       | one neuron = `weight_storage` + `hebbian_neuron`                     |
| `rtl/weight_storage.sv`, `rtl/weight_unit.sv` | address comparator, enable decode, weight registers |
| `rtl/error_calc.sv`         | keep-if-closer decision                                              |
| `rtl/prng.sv`               | LFSR random weights                                                  |
| `rtl/memory_interface.sv`, `rtl/training_ram.sv` | training sample store                           |
| `rtl/rs232_interface.sv`, `rtl/uart_rx.sv`, `rtl/uart_tx.sv`, `rtl/sync_fifo.sv` | serial link    |

The handshakes between blocks carry concurrent assertions. They check that the bus controller is
started only while idle and that its `done` is a single-cycle pulse. They check that the control unit
never pushes into a full transmit queue. They also check that a neuron drops `busy` when it signals
`done`. Simulate with `--assert` to enable them.

Each `tb/tb_<module>.sv` is a self-checking testbench for that module. Each prints
`TB_RESULT checks=N failures=M` at the end. There are also some shared testbench files and system-level
tests:

- `tb/nn_model_pkg.sv` is a reference model of the network.
- `tb/host_tasks.svh` is a serial host model, used by the system-level tests.
- `tb/tb_nn_trainer_top.sv` is an end-to-end test at 16 clocks per bit. It makes every mechanism happen
  and counts each one:
  - a dropped bad frame;
  - `rx_full`;
  - a kept trial;
  - a restored trial;
  - RAM epochs;
  - more replies than the transmit queue holds.
- `tb/tb_nn_trainer_top_full.sv` runs the top with default parameters (2622 clocks per bit, about
  4 million clocks).
- `tb/tb_xy_training.sv` is the area-recognition workload. It uses 16 points labelled by x > y and
  trains for 1000, 2000, 5000 and 10000 epochs. After each stage it checks the hardware's answers
  against the model and prints the training error. With the simulator's default seed, all 16 points are
  classified correctly from 1000 epochs on.

To simulate, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/nn_pkg.sv tb/nn_model_pkg.sv \
          tb/tb_nn_trainer_top.sv --top-module tb_nn_trainer_top
./obj_dir/Vtb_nn_trainer_top
```

## Where this design fills in details

The overall structure is that of the original FPGA design:

- the modes;
- the three-neuron network;
- the 2-bit command bus and its encoding;
- the neuron identifiers with their address comparator;
- the pipelined multiplier;
- six trials per neuron;
- the queue sizes;
- the 4-byte command packet;
- the five pins.

The following details are this design's own choices:

- **Opcode values, byte layouts and reply words.** Only the 4-byte packet with a leading command byte is
  taken from the original.
- **Three weights per neuron, including a bias with input +1.** With inputs up to 255 and a bias weight
  of at most ±128, a hidden neuron's boundary always passes close to the origin. Areas such as
  "x > y" can be learned. Areas that need a large offset cannot.
- **The sign threshold** (a sum of exactly 0 gives +1), and **the error measure** |target − y| with
  strict improvement.
- **The trial order**: each neuron's six trials cycle through its three weights.
- **The random generator** (LFSR) and its seed. It free-runs so that reset does not fix the sequence.
- **RAM depth** (256 samples), what happens when the RAM is full, and the 16-bit epoch count.
- **Separate input and output data buses** instead of a bidirectional tristate bus.
- **The start/done handshakes** between the blocks, and all latencies given above.

Not part of the RTL:

- the PC software that formats the data files;
- the RS-232 level shifter between the board and the PC.
