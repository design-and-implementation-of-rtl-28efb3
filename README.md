# A pairwise neural classifier for handwritten digits

This is a circuit that recognises an isolated handwritten digit. The digit
arrives as a 16 x 16 image with 16 gray levels. Its main idea: it does not
use a trained multilayer network. It uses one neuron for every *pair* of
classes (45 of them, "1 versus 2", "1 versus 3", ... "9 versus 0"), each a
plain weighted sum compared with a threshold. The final answer is a vote: a
digit is recognised only if all nine neurons that involve it vote for it.

- Every neuron has a binary output, so the only arithmetic in the circuit is
  the 256-term weighted sum in each neuron.
- A single threshold Θ makes the classifier *reject* doubtful images instead
  of guessing. A neuron whose potential lies within ±Θ votes for neither of
  its classes. An image with no unanimous class is rejected.
- Raising Θ lowers the error rate. The price is that more images are rejected.

The hardware is a regular array of 48 identical *neural processors* (45 used,
3 spare). Each has its own coefficient memory and its own controller. Pixels
reach the processors over short bus segments arranged as a ring. The design
comes from a general-purpose architecture for neural networks, fitted to
this network.

## The network

```
 256 pixels x_p (4-bit, unsigned)  +  constant input 1
            │  (all 257 inputs to every neuron, 6-bit signed weights)
            ▼
 45 pair neurons (a/b):  V = w_bias + Σ w_p·x_p
        out_a = V >  Θ      ("looks like a")
        out_b = V < −Θ      ("looks like b")
            │
            ▼
 10 AND gates: digit c = AND of the 9 votes for c; no gate → reject
```

The classes are taken in the order 1, 2, …, 9, 0. Neuron *n* is the *n*-th
pair (a, b) with a before b in that order: neuron 0 is 1/2, neuron 8 is
1/0, neuron 9 is 2/3, …, neuron 44 is 9/0. The gate for digit c takes
`out_i` of each neuron (c/x) and `out_j` of each neuron (x/c). A neuron votes
for at most one of its classes, so at most one gate can fire.
`nn_pkg::pair_index(a,b)` gives the neuron number of a pair.

The weights come from training on a host computer and are loaded into the
circuit. A set of 45 × 257 = 11 565 six-bit coefficients is enough. The circuit
does not train.

## The neural processor

Each processor (`neural_processor`) has three parts:

- **Operative part** (`neuron_datapath`). It holds:
  - the input register
  - the identification register
  - a bias register
  - the 13-bit potential accumulator V
  - one adder/subtractor (`neuron_alu`)
- **Controller** (`neuron_ctrl`): a state machine.
- **Local memory** (`coef_mem`): 256 words of 6 bits, one coefficient per pixel.

### Multiplying with one adder

There is no multiplier. The product x·w is formed by radix-2 Booth recoding
of the pixel. The 4-bit unsigned pixel is read as the 5-bit signed number
`0 x3 x2 x1 x0`. Its Booth digits are `d_k = x[k−1] − x[k]` for k = 0…4,
with x[−1] = 0. Each digit is −1, 0 or +1, and x = Σ d_k·2^k.

In each of five clocks the controller gives the digit index k. The datapath
reads the bit pair (x[k], x[k−1]) and does one of three things:

- adds `w << k` to V (pair 01)
- subtracts `w << k` from V (pair 10)
- leaves V as it is (pair 00 or 11)

The product is never stored. It goes straight into V. The same adder also
does the rest of the neuron's work:

| clock        | ALU does            | result used                   |
|--------------|---------------------|-------------------------------|
| start        | pass `w_bias`       | V ← bias                      |
| Booth step k | V ± (w << k) or V   | V ← result (13 bits, wraps)   |
| TH_I         | Θ − V               | sign → `out_i` (V > Θ)        |
| TH_J         | V + Θ               | sign → `out_j` (V < −Θ)       |

The ALU is 14 bits wide. The extra bit keeps the two threshold tests exact
for any 13-bit V and any 12-bit Θ. When |V| equals Θ, both outputs are 0.

The two binary outputs are latched in the controller and sent straight out.
The processor has no output register, and its result never goes back onto a
bus.

### Bias

Each neuron has 257 weights: 256 for the pixels and one for a constant +1
input. The memory has only 256 words. The 257th weight is held in a 6-bit
bias register, which is the value V starts from.

## Moving pixels: the ring of bus segments

The layer is laid out as two columns. Each column has four rows of six
processors. A row lies between two bus segments, which gives eight segments
in all. They form a ring: down the first column, then back up the second.
Processor n sits at place `n % 6` of segment `n / 6`.

Each column is one chip (`layer_chip`) of 24 processors: the whole layer
fits on two chips. Each chip hands the pixel on its last segment to the
first segment of the other chip (`ring_out` → `ring_in`).

Pixels enter eight at a time, one packet of pixels `8p … 8p+7` per step:

1. **Time step 0.** Pixel `8p+g` enters on segment g. All six processors on
   that segment load it into their input registers.
2. **Time steps 1 to 7.** At each step, every segment takes the pixel that was
   on the segment before it. The first processor of each segment drives its
   input register onto the next segment.
3. **After eight steps,** every processor has seen all eight pixels of the
   packet, in an order that depends on where it sits in the ring.
4. The next packet enters. An image takes 32 packets.

A processor on segment g works on pixel `8p + ((g − s) mod 8)` during time
step s of packet p. Its controller computes that memory address from the
segment number in its identification register. The coefficients are
therefore always loaded in plain pixel order, whatever the processor's
position in the ring.

### Controller sequence and timing

```
IDLE ──start──► WAIT ──pkt_valid──► MUL×5 ──► SHIFT ──► MUL×5 ─ … (7 shifts)
                  ▲                                               │
                  └────────── next packet (32 in all) ────────────┘
                                       after the last: TH_I ► TH_J ► IDLE (done)
```

| phase | clocks |
|-------|--------|
| start | 1 |
| each time step: 1 clock to enter or shift a pixel, plus 5 Booth clocks | 6 |
| each packet: 8 time steps | 48 |
| 32 packets | 1536 |
| threshold test | 2 |
| **total, start to done** | **1539** |

The 1539 clocks assume the host never holds a packet back. Each clock in which
`pkt_ready` is high but `pkt_valid` is low adds one clock.

All 48 controllers run in lock step. The layer ANDs their `pkt_ready` and
`done` signals. The published estimate was about 2600 cycles per image, at a
cycle time of about 50 ns, or about 130 µs. This implementation's cycle split
is shorter: 1539 clocks, about 77 µs at 50 ns.

## Interface (`digit_recognizer`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `cfg_valid`, `cfg_place`, `cfg_addr` | in | 1, 3, 9 | load command while idle: place 0…5 on every segment, address 0…255 = pixel (row-major), 256 = bias |
| `seg_in[8]` | in | 8×6 | the eight segment inputs: while loading, the coefficient (two's complement) for neuron `6g + place` on `seg_in[g]`; during classification, pixel `8p+g` on `seg_in[g][3:0]` |
| `theta_we`, `theta_in` | in | 1, 12 | load Θ (unsigned) while idle |
| `start` | in | 1 | begin a classification while idle |
| `pkt_valid` | in | 1 | packet p on `seg_in` is taken in a clock where `pkt_valid && pkt_ready` |
| `pkt_ready` | out | 1 | the layer waits for the next packet |
| `busy`, `done` | out | 1 | `done` stays high from the end of a classification until the next `start` |
| `out_i`, `out_j` | out | 45 each | pair votes: `out_i[n]` for the first class of neuron n, `out_j[n]` for the second |
| `class_and` | out | 10 | bit d = AND gate of digit d |
| `reject` | out | 1 | no gate fired |

To use the circuit:

1. Load all coefficients and biases, eight per clock. Six places × 257
   addresses gives 1542 clocks.
2. Load Θ.
3. For each image, pulse `start`, stream 32 packets, and wait for `done`.

The coefficient memories are not reset. Load them before the first `start`.
Assertions in `first_layer` check that the two chips stay in lock step and
that no load command arrives while the layer is busy.

## Sizes

All parameters default to the published sizes:

- 256 pixels of 4 bits
- 6-bit coefficients, 256-word memories
- 13-bit accumulator
- 8 segments, 2 columns × 4 rows × 6 processors

The widths that the design chose itself are in `nn_pkg`:

- Θ: 12 bits
- ALU: 14 bits
- configuration fields

After coarse synthesis the top level has about 4700 word-level cells, 1857
flip-flop bits and 69 120 memory bits (45 memories × 256 × 6). The three spare
processors are removed because nothing reads their outputs. Seen on its own,
`first_layer` keeps all 48 processors, because it brings out every potential.

## Where this implementation departs from, or fills in, the published design

- **Accumulator range.** The 13-bit accumulator follows the published width.
  That width was justified by potentials "never exceeding 5000". A 13-bit
  two's-complement register only holds −4096…4095, so a potential outside
  that range wraps around. Set `ACC_W = 14` in `nn_pkg` if trained weights
  can reach ±5000.
- **Loading.** As in the original, coefficients travel on the 6-bit bus
  segments, which is why those are 6 bits wide while a pixel needs only 4.
  The load command that goes with them is this design's own: a place on the
  segment and an address, broadcast to all processors. It lets the eight
  segments load eight processors at once.
- **Bias.** The weight of the constant input is held in its own register.
- **Identification register.** It holds the neuron number, the segment and
  an enable bit, and is set from a parameter at reset, not loaded.
- **Chosen here.** The ring order, the handshake (`start`,
  `pkt_valid`/`pkt_ready`, `done`), the one-digit-per-clock Booth schedule
  and the exact cycle split are this design's choices.
- **Second layer.** The AND layer is built in hardware, with a `reject`
  output. In the first published version, this layer ran in software on the
  host. The pair votes are brought out too, so the host can still do it.
- **Chips.** The layer is built from two chips of 24 processors, one column
  each; that a chip holds exactly one column is this design's reading.
- **Not modelled.** The ROM variant of the memories, the host computer,
  preprocessing and training are not modelled, nor anything about the
  silicon process.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog.

- **`tb_digit_recognizer`** runs the whole design at its default sizes. It
  builds random class templates and derives pair weights from them, then
  loads all 11 565 coefficients. It classifies one image of each digit, two
  noise images and one image under a very high Θ. For each image it checks
  every vote, every gate, `reject` and the latency against a reference model.
  It also counts these events and fails if any never happens:
  - recognised images
  - rejected images
  - ambiguous neurons
  - packets held back
  - a change of Θ
  - Booth add and subtract steps
- **`tb_first_layer`** checks all 48 potentials exactly, including 13-bit
  wrap-around, with weights over the full 6-bit range.
- **`tb_layer_chip`** plays the other chip around the chip that holds the
  spares, and checks the pixel it hands on in every time step.
- **`tb_threshold_sweep`** shows the trade-off that Θ controls. It uses
  synthetic clear and ambiguous images, with weights rounded to 6-bit and
  to 4-bit integers. The 4-bit weights are sign-extended into the 6-bit
  words. On its fixed random data it prints:

  | weights | Θ    | right | rejected | wrong |
  |---------|------|-------|----------|-------|
  | 6-bit   | 0    | 12    | 0        | 8     |
  | 6-bit   | 600  | 10    | 8        | 2     |
  | 6-bit   | 1500 | 3     | 17       | 0     |
  | 4-bit   | 0    | 13    | 0        | 7     |
  | 4-bit   | 150  | 10    | 8        | 2     |
  | 4-bit   | 375  | 3     | 17       | 0     |

  Each row is out of 20 images. The test checks every result against the
  model. It also checks that rejections never fall and errors never rise as
  Θ grows.
- **`tb_neural_processor`** plays the rest of the ring around one processor
  and checks the cycle-exact timing of the bus shifts.
- **`tb_neuron_ctrl`** checks the address sequence of the ring schedule.
- **`tb_neuron_datapath`**, **`tb_neuron_alu`**, **`tb_coef_mem`** and
  **`tb_and_layer`** check their units against independent models.

To simulate with Verilator 5, for example the full design:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    --top-module tb_digit_recognizer rtl/nn_pkg.sv tb/tb_digit_recognizer.sv
./obj_dir/Vtb_digit_recognizer
```

Use the same command for any other testbench. This one takes well under a
second. The trained coefficients of the original network are not available,
so the recognition rates it reached cannot be reproduced. The tests use
synthetic weights and images.

## Files

- `rtl/nn_pkg.sv` holds the sizes, types, configuration and control structures, and the pair-numbering functions.
- `rtl/neuron_alu.sv`, `rtl/coef_mem.sv`, `rtl/neuron_datapath.sv` and `rtl/neuron_ctrl.sv` are the parts of one processor.
- `rtl/neural_processor.sv` is one processor.
- `rtl/layer_chip.sv` is one chip: a column of 24 processors.
- `rtl/first_layer.sv` is the two chips closing the ring, and the Θ register.
- `rtl/and_layer.sv` is the decision layer.
- `rtl/digit_recognizer.sv` is the top level.
- `tb/tb_<module>.sv` is the testbench of each module.
