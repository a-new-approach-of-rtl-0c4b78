# Skewed, parity-protected on-chip bus link

On a long parallel on-chip bus, a wire is slowest when its two neighbours
switch in the opposite direction at the same moment: coupling capacitance can
make it several times slower than a wire with quiet neighbours. This link
removes that case by construction. It doubles the number of wires, puts two
words on the bus at once, one on the even wires and one on the odd wires, and
launches the two halves half a transmission period apart. A wire therefore
only ever switches while both its neighbours are holding still, which is
close to the best case for delay. The price is a transmission clock at half
the rate of the logic clock. Because each bit stays on its wire for two logic
cycles, the receiver gets two samples of every bit for free. One sample is
taken before the neighbours switch and one after. Comparing them gives a
*temporal* error check. A parity bit per word adds a *spatial* check.

The RTL is written in SystemVerilog (IEEE 1800-2017). It is synthesizable and
uses one clock domain. With the default sizes it carries 32-bit words on a
66-wire bus.

## Wire layout and timing

A 32-bit data word gets one parity bit, which makes a 33-bit coded word
`{parity, data}`. Two coded words are in flight, so the bus has 66 wires:

| wire          | carries                                   | launched on                    |
|---------------|-------------------------------------------|--------------------------------|
| `2*i`, i<32   | bit i of the word in the **even** group   | rising edge of transmission clock  |
| `2*i+1`, i<32 | bit i of the word in the **odd** group    | falling edge of transmission clock |
| 64            | parity of the even-group word             | rising edge                    |
| 65            | parity of the odd-group word              | falling edge                   |

`clk` is the nominal (logic) clock. The transmission clock `tx_clk` is
`clk / 2`. It is a registered signal that toggles on every `clk` edge and is
low after reset. Edges are counted from the first `clk` edge after reset,
which is edge 0:

```
clk edge              0    1    2    3    4    5    6
tx_clk after edge     1    0    1    0    1    0    1
sampled from data_i   W0   W1   W2   W3   W4   W5   W6
odd wires  (falling)       |W0-------|W2-------|W4-------
even wires (rising)             |W1-------|W3-------|W5---
W0 sampled by receiver          *    *
W0 on data_o                              |W0--|
```

Take a word W sampled from `data_i` at edge n:

* edge n: the word and its parity are registered in the encoder.
* edge n+1: W goes out on the even wires if `tx_clk` rises at this edge, and
  on the odd wires if it falls. It stays there until edge n+3.
* edges n+2 and n+3: the receiver samples the wires of that group. The
  neighbouring group changes at edge n+2, so these two samples fall on either
  side of the neighbours' transition.
* edge n+4: the selected word and its check flags are registered. `data_o`,
  `temporal_err_o`, `parity_err_o` and `retx_o` are valid until edge n+5.

The latency is therefore 4 `clk` cycles. Throughput is one word per `clk`
cycle, i.e. two words per transmission period. There is no valid or
handshake signal: the link streams continuously, and after reset it carries
all-zero words, which have a correct parity.

No two adjacent wires ever change at the same `clk` edge. The end-to-end
testbench checks this on every transition.

## Encoder (`skew_encoder`)

```
data_i --+----------------------> [33-bit reg] --> demux --+--> sender bank, rising edge  --> even wires
         +--> parity_gen (XOR) --^        ^                 +--> sender bank, falling edge --> odd wires
                                          tx_clk (tx_phase_gen) selects the bank that loads next
```

* `parity_gen` is a balanced XOR tree. The parity is even: the coded word
  always holds an even number of ones.
* `skew_demux` sends the registered word to one bank and drives zeros to the
  other.
* `skew_sender` is one bank of wire drivers. The rising-edge bank loads on
  the `clk` edge at which `tx_clk` goes from 0 to 1. The falling-edge bank
  loads when it goes from 1 to 0.
* The encoder forwards `tx_clk` to the receiver as `tx_clk_o`.

Classic implementations of this scheme clock the two sender banks with the
rising and falling edges of the transmission clock itself. Here both banks
are `clk` registers with alternate-cycle enables. The instants at which the
wires switch are the same, and the whole link stays in one clock domain. For
a dual-edge physical implementation, replace `skew_sender` with flip-flops
clocked by the transmission clock.

## Decoder (`skew_decoder`)

```
66 wires --> skew_receiver (2 samples + compare per wire) --+-- even group --+
                                                            +-- odd group  --+--> skew_mux --> [33-bit word + 33 flags reg]
tx_clk_i --> [reg] --------------------------------------------------------------^ select          |
                                                                          parity_check <-----------+
                                                                          retx_notify (OR tree) <--+--> retx_o
```

This is the part that needs the most care.

* **Receivers.** Every wire feeds two registers in series, clocked by `clk`.
  The first takes a new sample at every edge. The second keeps the previous
  sample. A wire holds its bit for two cycles. So on every other cycle the
  two registers hold the two samples of the *same* bit: the earlier one was
  taken while the neighbours were still stable, and the later one after they
  switched. A per-wire XOR of the two samples is the temporal error flag. The
  earlier sample is used as the data bit.
* **Which group is complete.** The two samples of the even group are
  complete in the cycles after a rising `tx_clk` edge has gone by. The odd
  group's are complete one cycle later. The decoder registers the forwarded
  `tx_clk_i` once. When that registered copy is low it selects the even
  group, and when it is high the odd group. The receiver therefore aligns
  itself to the encoder and needs no phase signal of its own.
* **Word register.** The 33-bit word and its 33 mismatch flags are
  registered together, so both checks refer to the same word.
* **Checks.** `parity_check` recomputes the parity of the 32 data bits and
  compares it with the received parity bit. `retx_notify` ORs the 33
  mismatch flags into `temporal_err_o`, and ORs that with the parity result
  into `retx_o`.

`retx_o` is a notification only. How a word is sent again depends on the bus
or network that carries the link and is not part of this RTL. A protocol
would attach to `retx_o` and to the fixed 4-cycle latency.

## What the two checks catch

Suppose noise flips bits of a word on the wires:

| disturbance                                       | temporal | parity | `retx_o` | `data_o`  |
|---------------------------------------------------|----------|--------|----------|-----------|
| one wire, first sample only                       | 1        | 1      | 1        | wrong bit |
| one wire, second sample only                      | 1        | 0      | 1        | correct   |
| one wire, both samples                            | 0        | 1      | 1        | wrong bit |
| two wires, both samples                           | 0        | 0      | **0**    | wrong     |

An error gets through only when it hits both samples of an even number of
wires. Suppose each sample is wrong with probability ε and errors are
independent. Then a single check with parity on one sample misses words at a
rate of roughly C(n+1,2)·ε². This link misses them at roughly C(n+1,2)·ε⁴.
Published analysis of this scheme reports that for an 8-bit word with 0.2 V
noise, the link at 1.2 V reaches about 1e-10 residual word error where
parity alone reaches 1e-4. It also finds that the parity-alone figure is
reached by the link at below 0.7 V. `tb_residual_error` measures the effect
in simulation: with ε = 5 % on 8-bit words, it shows about 13 600 wrong
words without coding, about 2 600 missed by one-sample parity and 1 missed
by this link, out of 40 000 words.

## Sizes and parameters

| name                  | default | meaning                                        |
|-----------------------|---------|------------------------------------------------|
| `skew_pkg::DATA_W`    | 32      | data bits per word                             |
| `skew_pkg::WORD_W`    | 33      | coded word (data + parity)                     |
| `skew_pkg::BUS_W`     | 66      | wires                                          |
| `DW` on `skew_link_top`, `skew_encoder`, `skew_decoder` | `DATA_W` | data width of that instance; wires = 2·(DW+1) |

Any `DW` ≥ 1 works. The tests use 32 and 8.

## Modules

| file                      | role |
|---------------------------|------|
| `rtl/skew_pkg.sv`         | sizes, `group_e` (even/odd), `tx_edge_e` (rise/fall) |
| `rtl/skew_link_top.sv`    | encoder + decoder; the wires stay outside (`bus_o` → wires → `bus_i`, `tx_clk_o` → `tx_clk_i`) |
| `rtl/skew_encoder.sv`     | parity, input register, demux, two sender banks |
| `rtl/parity_gen.sv`       | XOR tree |
| `rtl/tx_phase_gen.sv`     | transmission clock = `clk`/2 |
| `rtl/skew_demux.sv`       | word → even or odd bank |
| `rtl/skew_sender.sv`      | wire drivers launching on one transmission-clock edge |
| `rtl/skew_decoder.sv`     | receivers, mux, word register, checks |
| `rtl/skew_receiver.sv`    | two samples per wire and their comparison |
| `rtl/skew_mux.sv`         | even/odd group select |
| `rtl/parity_check.sv`     | parity recomputation and comparison |
| `rtl/retx_notify.sv`      | OR tree giving the retransmission request |
| `tb/bus_wire_model.sv`    | timed wire model for testbenches, not synthesizable |
| `tb/link_delay_run.sv`    | testbench helper: one link at a chosen clock period and wire length |

Resets are asynchronous and active low (`rst_n`), and clear every register.

The physical wires are not RTL. `tb/bus_wire_model.sv` stands in for them. It
delays every transition by an amount that depends on what the two neighbours
do at the same instant. The delays are those of a 1 mm metal-2 wire in
0.13 µm: 0.47 ns rising and 0.60 ns falling with quiet neighbours, and up to
1.17 ns and 1.41 ns with both neighbours switching the opposite way. A
parameter switches to 10 mm wires, where the same cases take 1.37 ns,
1.42 ns, 3.21 ns and 3.29 ns. The model records the longest delay it applied
and counts transitions with quiet neighbours and with switching
neighbours. It can also XOR a noise mask onto its outputs.

## Design choices that go beyond the scheme itself

* The link uses a single clock domain, with enabled registers instead of
  dual-edge flip-flops for the two sender banks (see Encoder). The receiver
  registers use the same clock edge as the encoder, so a wire must settle
  within one nominal clock period.
* The transmission clock is forwarded, and the receiver uses it as the mux
  select.
* Parity is even. The earlier of the two samples is used as the data bit.
* The two checks are evaluated in parallel and ORed. The scheme states them
  in sequence (parity only if the samples agree), but the request is the
  same either way.
* Wire order: the even and odd groups are interleaved, with the two parity
  wires at the top.
* The reset is asynchronous, the link has no valid signal, and the latency is
  4 cycles.
* Not built: the retransmission protocol, and the analog side (wire drivers,
  low-swing signalling, supply-voltage scaling).

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops by itself. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/skew_pkg.sv tb/tb_skew_link_top.sv \
  --top-module tb_skew_link_top -o sim
./obj_dir/sim
```

Replace `tb_skew_link_top` with any other testbench in `tb/`:

* `tb_skew_link_top`: end to end at the default size (32-bit words, 66
  wires), with 4000 words going through the timed wire model. Noise hits the
  first sample, the second sample or both, on one or two wires. The test
  checks every output word and the 4-cycle latency. It checks that no
  transition ever sees a switching neighbour. It also checks that each
  mechanism occurred: words on both groups, temporal detections, parity
  detections, retransmission requests, and undetected double faults.
* `tb_wire_delay`: two full-size links, one with 1 mm and one with 10 mm
  wire delays. Each runs at a nominal clock just above the quiet-neighbour
  delay: 0.7 ns and 1.5 ns. The test checks that every word arrives and that
  no transition is slower than the quiet-neighbour case. The worst delays
  seen are 0.60 ns and 1.42 ns. Against the 1.41 ns and 3.29 ns worst case of
  an unskewed bus, that is a speed-up of 2.35 and 2.32.
* `tb_residual_error`: 8-bit link, random independent flips of every sample.
  It compares the residual errors of no coding, one-sample parity and this
  link.
* `tb_skew_encoder`, `tb_skew_decoder`: each side on its own. The decoder
  test injects the four kinds of fault from the table above.
* `tb_parity_gen`, `tb_tx_phase_gen`, `tb_skew_demux`, `tb_skew_sender`,
  `tb_skew_receiver`, `tb_skew_mux`, `tb_parity_check`, `tb_retx_notify`:
  unit tests of the leaf blocks.

All testbenches pass, and each one fails when its block is broken in a way
that matters.
