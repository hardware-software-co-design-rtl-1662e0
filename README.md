# Masked binarized neural network coprocessor for a RISC-V SoC

This design runs neural network inference on a small RISC-V system while protecting the
network's secret weights against power side-channel attacks. The protection is first-order
masking: every intermediate value that depends on a weight is split into two random shares, and
the shares are processed apart.

Masking costs about twice the cycles. So the software chooses, layer by layer and at run time,
whether a layer runs masked or in the clear. When a layer runs in the clear, the datapath that
would carry the second share processes a second stream of partial products instead. An unmasked
layer therefore runs at about twice the speed of a masked one, on the same hardware.

The main network type is the binarized neural network (BNN). Its weights are ±1 and its hidden
activations are single bits. Beside the BNN unit sits a masked datapath for 8-bit
convolutional layers, with a masked ReLU and a masked max-pool.

All arithmetic is modulo K = 2^W, with W = 16 by default. A neuron's activation is 1 when its
modular sum lies below K/2, meaning its most significant bit (MSB) is 0. Sums at or above K/2
count as negative.

## System

```
 host PC ── UART ── [uart2bus bridge] ══ byte bus ══ host_if ──┬── soft reset / start ──> core reset
                      (external)                               ├── romload words ─────┐
                                                               ├── pixel words ──┐    │
                                                               └── result read   │    │
                                                                                 v    v
 [PicoRV32 core] ══ native mem bus ══> mem_arbiter ══ port A / port B ══> dp_ram (64 KiB)
   (external)   ══ PCPI ══> coprocessor ──┬── cmd_decoder (custom-0 instructions)
                                          └── snnu (layers, masking, PRNG) ── ports A and B
```

`soc_top` contains the host interface, the memory arbiter, the dual-ported memory, the
coprocessor and the convolution extension. The CPU (PicoRV32) and the UART bridge are
third-party blocks, so they are not included. Their interfaces are ports of `soc_top`:
- the core's native memory bus (`mem_*`);
- the core's PCPI bus (`pcpi_*`);
- the core's reset (`core_resetn_o`);
- the bridge's byte bus (`host_*`).

The core and the coprocessor share one memory. The firmware writes the parameters there and the
coprocessor reads them directly, so nothing is copied.

### Start-up and one inference

1. The host pulses a software reset (CTRL bit 0). This holds the core in reset and resets the
   coprocessor.
2. The host *romloads* the program and the network parameters into memory, word by word.
3. The host sets *start* (CTRL bit 1), which releases the core.
4. The firmware configures and runs the layers with the custom instructions below.
5. `mnn.ifetch` raises `pixel_req`. The host reads PIX_NUM and writes the pixel words. Each
   word goes to the image pointer plus its count. The host then acknowledges (CTRL bit 2),
   which completes the instruction.
6. After `mnn.olayer`, STATUS bit 1 is set. The host reads RESULT0 and RESULT1.

### Host register map (16-bit byte address, 8-bit data)

| Address   | Access | Meaning |
|-----------|--------|---------|
| 0x00      | W      | CTRL: bit 0 software reset, bit 1 start core, bit 2 pixel acknowledge |
| 0x00      | R      | STATUS: bit 0 pixel request, bit 1 result valid, bit 2 core running |
| 0x04–0x05 | W      | LOAD_ADDR: word address of the next romload word |
| 0x08–0x0B | W      | LOAD_DATA: writing byte 0x0B stores the word and increments LOAD_ADDR |
| 0x0C–0x0D | W      | PIX_CNT: count of the next pixel word |
| 0x10–0x13 | W      | PIX_DATA: writing byte 0x13 sends the word and increments PIX_CNT |
| 0x14–0x17 | R      | PIX_NUM: pixel words requested by the core |
| 0x20–0x23 | R      | RESULT0: result word, share 0 |
| 0x24–0x27 | R      | RESULT1: result word, share 1 |

Multi-byte fields are little-endian. Read data appears one cycle after the read strobe.

### Instructions (custom-0, opcode `0001011`, R-type)

| funct3 | Instruction            | Action |
|--------|------------------------|--------|
| 0      | `mnn.cfgwr rs1, rs2`   | Writes pointer rs1 and size rs2 to a configuration register. funct7[1:0] selects it: 0 IMAGE, 1 WEIGHT, 2 BIAS, 3 DIMS. DIMS holds n_in in the pointer field and n_out in the size field. |
| 1      | `mnn.ifetch rs1, rs2`  | Requests rs2 pixel words from the host. They are stored at byte address rs1 onward. |
| 2      | `mnn.ilayer rs1`       | Runs the input layer. rs1[0] = 1 means masked. |
| 3      | `mnn.hlayer rs1`       | Runs a hidden layer (XNOR-popcount). rs1[0] = 1 means masked. |
| 4      | `mnn.olayer rs1`       | Runs the output layer. rs1[0] = 1 means masked. Returns RESULT0 in rd. |

The core stalls on `pcpi_wait` until the instruction completes.

Result word:
- bits [15:0]: the best score;
- bits [23:16]: its class;
- bit 31: the masked flag.

In masked mode, the score and class are the XOR of RESULT0 and RESULT1. In clear mode,
RESULT1 holds zero shares.

### Memory layout expected by the coprocessor

- **Pixels:** signed 16-bit, two per word, the even pixel in the low half.
- **Weights:** one bit per weight, 1 = +1 and 0 = −1. Each neuron's row starts on a word boundary
  and takes ceil(n_in/32) words. Input i is bit i mod 32 of word i/32.
- **Biases:** one word per neuron of the input layer; the low W bits are used. Hidden and output
  layers have no bias.

## The secure neural network unit (`snnu`)

### Input layer: one pair of MACs, two uses

Each pixel word is read into two registers, `lo` and `hi`. The 32 weight bits of a word are
read in parallel on the memory's second port.

**Clear mode.** `lo` goes to MAC 0 and `hi` to MAC 1, each added or subtracted according to
its weight bit. This gives two partial sums per cycle. At the end of the neuron, a registered
demultiplexer passes both sums to an adder.

**Masked mode.** A toggle alternates between `lo` and `hi`, so one pixel is handled per cycle.
Pixel p is split into p − r and r, with fresh r from the PRNG. MAC 0 accumulates the first
share and MAC 1 the second, both with the same sign. The bias is preloaded into MAC 0 only.

The demultiplexer outputs zero on the adder path in masked mode. Its output registers keep a
late mode signal from briefly combining the two sums.

Measured rates: 20 cycles per 40 pixels per neuron in clear mode, 40 in masked mode. Each
neuron adds a fixed overhead of about 9 to 13 cycles (pipeline fill, drain and activation).

### Masked sign activation

The shares s0 and s1 satisfy s0 + s1 = s (mod K). The activation needs the MSB of s without
ever forming s. The masked Kogge-Stone adder adds (s0, 0) and (0, s1) as Boolean-shared
operands. This is the arithmetic-to-Boolean (A2B) conversion. Every AND in its
generate/propagate tree is a DOM AND gate with a fresh random bit.

The MSB of the Boolean-shared sum, with share 0 inverted, is the Boolean-shared activation.
Latency is log2(W) + 2 cycles from the shares to the activation shares: 1 + log2(W) in
the adder and 1 in the output register. For W = 16 the adder needs 114 random bits per cycle.

**DOM AND** (`dom_and`). The inner-domain products a0·b0 and a1·b1 are registered. The
cross-domain products a0·b1 and a1·b0 are registered after one fresh random bit is XORed into
each. Each output share is the XOR of one inner and one cross register. Since every product
is registered, the latency is 1 cycle.

### Hidden layers: XNOR-popcount and 1-bit B2A

Activations live in two ping-pong memories (`act_mem`). Every 4-bit location holds two
activations:
- bits [1:0]: the two shares of the even activation;
- bits [3:2]: the two shares of the odd activation.

An unmasked activation a is stored as the shares (a, 0), so both modes use one format. A layer
reads one memory and writes the other, and the roles swap after each layer.

**Masked mode.** The weight bit is XNORed into share 0. The Boolean pair (b0, b1) then goes to
`b2a_bit`, which converts one bit to arithmetic shares with a fresh bit rb and a fresh mask R1:

- z = b0 ⊕ b1 ⊕ rb is registered. z is uniformly random.
- a0 = z + (1 − 2z)·(rb − R1), and a1 = (1 − 2z)·R1.

Together a0 + a1 = z ⊕ rb = the bit. The ±1 product of the popcount is 2·bit − 1, so MAC 0
adds 2·a0 − 1 and MAC 1 adds 2·a1. One input is processed per cycle.

**Clear mode.** The shares are recombined behind registers, then XNORed. Two inputs are
processed per cycle, on the two MACs.

### Output layer: the thresholded maximum

Scores are modular, so a plain unsigned maximum would rank a "negative" score (at or above
K/2) above a positive one. The intended order is:
1. the largest score below K/2;
2. if no score is below K/2, the largest score overall.

Comparing keys k = score ⊕ K/2 as unsigned numbers gives exactly this order in one pass.

**Masked mode** (`masked_output_layer`):
1. Each score's shares go through A2B, using the same Kogge-Stone adder.
2. The public K/2 is XORed into share 0, which gives a Boolean-shared key.
3. The key is compared with the stored maximum. The comparison computes max + ¬key + 1 in the
   masked adder and reads the shared carry out.
4. A masked multiplexer (`masked_mux`: o = a ⊕ (sel · (a ⊕ b)), one DOM AND per bit) updates the
   shared {key, class} pair.

Only a strictly greater score replaces the maximum, so ties keep the lower class.

**Clear mode** (`unmasked_output_layer`): a register and a comparator over the same key, one
score per cycle.

### Randomness

`prng` is a set of 64-bit xorshift generators, each lane seeded from `SEED` at reset. It
supplies every fresh bit above each cycle:
- pixel masks;
- the B2A bit and mask;
- the Kogge-Stone gates;
- the output layer's multiplexer.

This is a deterministic pseudo-random source, suitable for simulation and a first
implementation. A product would reseed it from a true random source.

## Masked 8-bit convolution (`masked_qconv_unit`)

This datapath applies the same masking ideas to quantized convolutional networks:

1. **Share-wise multiply-accumulate.** Each signed 8-bit pixel p is split into p − r and r.
   Both shares are multiplied by the same signed 8-bit weight and accumulated in two W-bit
   accumulators. The bias goes to the first accumulator.

   A later layer takes its inputs from the previous layer, whose activations are Boolean
   shares (b0, b1). `b2a_word` converts them to arithmetic shares:
   - it draws a fresh random word R;
   - it computes x − R in the masked Kogge-Stone adder from the operands (b0, b1) and (−R, 0);
   - it registers the two Boolean shares of the result separately, then XORs them.

   The arithmetic shares are a0 = x − R and a1 = R. Registering the shares separately matters:
   the carries of x − R alone depend on x, so they must never meet in a glitch.
2. **Masked ReLU** (`masked_relu`). The A2B adder converts the sum to Boolean shares. The
   inverted MSB is then ANDed with every other bit (DOM AND). The result is ReLU_K(x): 0 if
   x ≥ K/2, otherwise x.
3. **Masked max-pool** (`masked_maxpool`). The masked comparator and the masked multiplexer keep
   the largest ReLU output of a pooling window.

Timing:
- One product per cycle. Previous-layer inputs enter the accumulators log2(W) + 4 cycles
  after they are given; pixels enter 1 cycle after.
- From the end of a convolution to the updated pool maximum: log2(W) + 3 cycles for the first
  value of a window, 2·log2(W) + 6 for the others.

The unit is driven directly through the `qc_*` ports of `soc_top`. No instruction and no
sequencer drive it. Whatever drives the ports must:
- walk the kernel and the pooling windows;
- not mix pixel and previous-layer inputs within one convolution;
- end a convolution only while `qc_ready_o` is high.

## Parameters

| Parameter | Default | Where | Meaning |
|-----------|---------|-------|---------|
| `W` | 16 | all datapath blocks | datapath width; the modulus is 2^W |
| `MAX_NODES` | 512 | `soc_top`, `coprocessor`, `snnu` | largest layer the activation memories hold |
| `MEM_WORDS` | 16384 | `soc_top` | shared memory size in 32-bit words (64 KiB) |
| `CW` | 8 | output layers | class index width |
| `SEED` | constant | PRNG owners | PRNG seed |

Sizing:
- A 64-64-64-10 BNN needs about 370 words of parameters and pixels.
- A 784-512-10 BNN needs 13,864 words, which leaves about 10 KiB for firmware. It runs in
  207,990 cycles clear and 414,468 masked.
- 512 nodes fit the activation memories.

## How this design departs from its source description

- **Latency.** For a 64-64-64-10 BNN this RTL takes 5,697 cycles fully clear and 11,087 fully
  masked, a ratio of 1.95. The reference implementation reports 4,997 and 10,150 cycles, a
  ratio of 2.08. The per-pixel and per-input rates match the dual-datapath scheme: 2 per cycle
  clear, 1 per cycle masked. The difference is per-neuron overhead of roughly 10 to 16 cycles.
  This RTL drains its pipeline and finishes the masked activation before it starts the next
  neuron.
- **Assumed widths and sizes.** These are this design's own choices:
  - datapath width (16);
  - memory size;
  - pixel width (16-bit, packed in pairs);
  - class width;
  - weight bit order;
  - result word layout;
  - funct3/funct7 encoding;
  - host register map.
- **One-pass maximum search.** The two-phase maximum search is done in one pass with the
  MSB-flipped key. It gives the same winner.
- **Share conversion circuits.** A2B and B2A are built here from the masked Kogge-Stone adder
  and the 1-bit formula above. The published design cites an earlier pipelined conversion
  that is not reproduced.
- **External blocks.** The RISC-V core and the UART bridge are not included.
- **No security measurement.** No power-analysis evaluation has been done on this RTL. The
  masking follows first-order DOM rules: fresh randomness for every cross-domain product,
  and registers wherever shares could meet through glitches.

## Verification and simulation

Every block has a self-checking testbench in `tb/` that compares against an independent
reference computed in the testbench. Each prints `TB_RESULT checks=N failures=M`. Where the
design has a defined latency or rate, the testbench checks the cycle count.

The end-to-end test `tb_soc_top` runs at default parameters and simulates in well under a
second. It plays the host (reset, romload, start, pixels, acknowledge, read-out) and a
bus-functional core that issues the instruction sequence. It checks the classification of a
random 64-64-64-10 network in four configurations:
- all clear;
- all masked;
- second hidden layer clear;
- output layer clear.

It also covers all-negative score sets, which exercise the second phase of the maximum search,
and masked convolution windows. It checks the latencies against the reference figures: at
most 20 % above 4,997 and 10,150 cycles.

It then runs a 784-512-10 network, which has one hidden layer, in clear and masked mode. This
run takes 207,990 and 414,468 cycles. Both are checked against two summations per cycle clear
and one per cycle masked. It counts each mechanism and fails if one never occurred. The
mechanisms are:
- masked layers;
- clear layers;
- pixel fetches;
- romloads;
- software resets;
- memory ping-pong;
- core memory accesses;
- convolution windows;
- ReLU clipping.

Run any testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/snn_pkg.sv tb/tb_soc_top.sv \
          --top-module tb_soc_top -Mdir obj_soc -o sim
./obj_soc/sim +verilator+rand+reset+2
```

Replace `tb_soc_top` with any other testbench name, for example `tb_snnu`,
`tb_masked_ks_adder` or `tb_masked_qconv_unit`. `+verilator+rand+reset+2` starts
uninitialised state at random values; the design resets everything it reads.

## Files

- `rtl/snn_pkg.sv` — shared width, opcode, enums and config structs, and the Kogge-Stone
  sizing functions.
- `rtl/soc_top.sv`, `rtl/host_if.sv`, `rtl/mem_arbiter.sv`, `rtl/dp_ram.sv` — the system.
- `rtl/coprocessor.sv`, `rtl/cmd_decoder.sv`, `rtl/snnu.sv` — the coprocessor.
- `rtl/dom_and.sv`, `rtl/masked_ks_adder.sv`, `rtl/masked_actfn.sv`, `rtl/b2a_bit.sv`,
  `rtl/masked_mux.sv`, `rtl/masked_output_layer.sv`, `rtl/unmasked_output_layer.sv`,
  `rtl/mac_unit.sv`, `rtl/act_mem.sv`, `rtl/prng.sv` — the SNNU's parts.
- `rtl/masked_qconv_unit.sv`, `rtl/b2a_word.sv`, `rtl/masked_relu.sv`, `rtl/masked_maxpool.sv` — the convolution
  extension.
- `tb/tb_<block>.sv` — one testbench per block.
