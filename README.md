# A clockless 4x4 switching fabric

This is a crossbar switch with four input ports and four output ports that runs with no
clock at all. Each port carries four data bits as *bundled data*: the data wires plus one
strobe wire that says when they are valid. An input port asks for a path to one output
port. It gets that path if nobody else wants the output at that moment, and then keeps it
for as long as it likes. While it holds the path, its data and strobe pass to the output
through a few gates and no storage at all. A burst can therefore run at whatever rate the
sender can drive.

Two ideas drive the design:

* **Arbitration by arrival order.** A clocked crossbar samples all requests on an edge and
  needs a fairness rule, for example round robin, to pick among them. Without a clock the
  arbiter only has to notice which request came first. The first request to an output
  wins, and a later one is refused. This makes the arbiter tiny and fast.
* **Circuit switching for bursts.** The arbitration cost is paid once per burst, not once
  per word. After that, the path behaves like a wire.

The reference point for this kind of fabric is a full-custom 0.6 µm CMOS chip with the
same port count and width. Its circuit simulation reached 7.4 Gbit/s per port, which is
29.6 Gbit/s for the chip. On a board, the chip needed 10 to 12 ns to set up a path and
6 to 8 ns to pass data. This RTL describes the same logic at the register-transfer level.
Those speeds belong to the transistors and the layout, and the RTL does not claim them
(see *Timing*).

## What a sender sees

Each input port `p` has these signals:

| signal | dir | meaning |
|---|---|---|
| `in_req[p]` | in | path request; kept high for the whole burst, lowered to release |
| `in_dest[p]` | in | number of the wanted output (2 bits), stable while `in_req[p]` is high |
| `in_strobe[p]`, `in_data[p]` | in | bundled data: 4 data bits plus their strobe |
| `in_ack[p]` | out | the request has been decided |
| `in_nak[p]` | out | with `in_ack`: the request was refused |

Each output port `o` has `out_frame[o]`, `out_strobe[o]` and `out_data[o]`. `out_frame`
is high while some input holds the output. `out_strobe` and `out_data` are the holder's
strobe and data, and all three are zero while the output is free.

One transaction is a four-phase handshake:

1. Set `in_dest`, then raise `in_req`.
2. Wait for `in_ack`.
   * `in_nak` low: the path is yours. Drive words on `in_data` and signal each word on
     `in_strobe`. The fabric only carries the strobe, so two-phase (each toggle is a word)
     and four-phase use both work. The strobe must reach the receiver after its data.
     The fabric gives strobe and data the same path, so it keeps the sender's skew.
   * `in_nak` high: another port holds or wants that output. Go to step 3 and retry later.
     The refusal does not clear if the other port lets go. The sender has to release and
     ask again.
3. Lower `in_req`. `in_ack` and `in_nak` fall and the output is free again.

The fabric does not queue requests and does not remember who was refused. Retry policy,
such as back-off, belongs to the sender.

## How a path is decided

The decision uses two blocks. This is the subtle part of the design.

**Head-of-line conflict detection** (`hol_conflict_detect`) compares the destinations of
all raised requests. `conflict[i]` is high when port `i` requests an output that at least
one other port also requests. A holder keeps its request high, so "requests" includes
paths that are already held.

**The arbiter** (`async_arbiter`, one per input port) has two hold stages. Each stage can
only be set while the port's request is high, and is cleared the moment the request falls:

* `blocked` is set if the conflict line is high while the request is high.
* `win` is set if the request is high and `blocked` is low.

Follow one request that arrives while the output is free. The conflict line is low, so
`blocked` stays low and `win` sets. From then on `win` holds on its own. If another port
later asks for the same output, the conflict line rises for both ports. The holder's
`blocked` sets too, but its `win` is already latched, so the path is undisturbed. The
newcomer sees the conflict when its request arrives, so its `blocked` sets first and its
`win` never does. The newcomer is refused.

If two requests for one output arrive at the same instant, each sees the other's conflict
and both are refused. Both senders then retry. Without a clock, the requests separate in
time, and the earlier retry wins.

The order inside the arbiter matters. Stage 1 must settle on the conflict line before
stage 2 sees the request. Otherwise a request that meets a conflict could briefly set
`win`, and `win` would then hold. In silicon, a delay element matched to the conflict
detector's delay sits on the request input of each stage. In RTL there are no delays, so
both stages are written in one `always_latch` process with stage 1 first. That process
states the same order.

`sender_handshake` turns `win` and the refusal into `ack`/`nak` for the sender.

## The data path

Every held path passes a *lane* of six signals: four data bits, the strobe, and the
request itself, which appears at the output as `out_frame`.

* **Output port selection** (`output_port_select`, one per input port) decodes
  `in_dest` into four select lines. It then gates the lane through a 4 x 6 matrix of
  active-low crosspoints. Crosspoint `[o][s]` is pulled low only when three things hold:
  output `o` is selected, the arbiter has granted the request, and lane bit `s` is high.
  A port that has not won leaves every crosspoint high.
* **Output port** (`output_port`, one per output) merges the four input columns that lead
  to it. A lane bit is high when any column pulls it low. Only one input can hold an
  output, so this merge acts as the output's multiplexer.

A word crosses two levels of logic on its way through. No stage in the path waits for
anything.

## Timing

Nothing in the RTL is clocked. The only state is the eight latch bits of the four
arbiters. All of it is cleared whenever the requests are low, so there is no reset: a
fabric with all `in_req` low is idle. Synthesis and lint tools report those eight bits as
latches. They are the design's storage, not an accident of coding.

The RTL has no delays. In simulation, an output follows its holder's input in the same
time step. The real circuit's speed depends on gate delays and on the matched delay
element, which a particular layout sets. A port of this RTL to an ASIC or FPGA must
recreate two timing assumptions:

* the arbiter's stage ordering, which needs a delay on each stage's request input longer
  than the path through `hol_conflict_detect` to stage 1;
* the sender's data-to-strobe margin through the fabric.

An FPGA flow in particular will not keep these by itself.

## Files

All RTL is in `rtl/`, one unit per file:

| file | content |
|---|---|
| `fabric_pkg.sv` | default sizes (4 ports, 4 data bits) and the lane layout |
| `hol_conflict_detect.sv` | head-of-line conflict detection |
| `async_arbiter.sv` | two-stage hold arbiter of one port |
| `sender_handshake.sv` | ack/nak answer to one sender |
| `output_port_select.sv` | destination decode and crosspoint matrix of one input |
| `output_port.sv` | merge of the crosspoint columns of one output |
| `async_switch_fabric.sv` | the top: all of the above wired together |

`N_PORTS` and `DATA_W` are parameters of the top and of the blocks. Their defaults of 4
and 4 are the chip's. The destination width follows from `N_PORTS`. The top has an
assertion that no output is ever held by two inputs.

## Simulating

The testbenches in `tb/` use delays to pace their stimulus, so they need
Verilator's timing support. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/fabric_pkg.sv tb/tb_async_switch_fabric.sv --top-module tb_async_switch_fabric
./obj_dir/Vtb_async_switch_fabric
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each one also has a
watchdog that fails the run if it hangs.

* `tb_async_switch_fabric` runs the whole fabric at its default size. It plays four
  senders, first in directed scenarios and then in 3000 steps of random traffic. Each
  step raises, releases and bursts on random sets of ports. A reference model in the
  testbench decides every grant and refusal on its own. After every change the testbench
  compares all `ack`/`nak` answers and every output lane with that model. It also counts
  the fabric's mechanisms and fails if any of them never occurred: a grant, a refusal
  because of a holder, a simultaneous refusal, a late request that leaves a held path
  alone, an output handed to another port after release, a burst word, and all four
  outputs held at once.
* `tb_hol_conflict_detect`, `tb_output_port_select` and `tb_sender_handshake` are
  exhaustive over their inputs. `tb_output_port` tries every single-holder pattern and
  then random patterns. `tb_async_arbiter` walks through hold, late conflict, refusal,
  refusal that persists after the conflict ends, release and retry.

Each testbench was also run against a copy of its block with a deliberate bug, and each
one failed. The bugs were:

* stage order swapped in the arbiter;
* destinations compared on one bit only;
* crosspoints ignoring the grant;
* XOR instead of OR in the output merge;
* no `ack` on a refusal;
* each arbiter reading the wrong port's conflict line.

## Design choices not fixed by the architecture

The architecture fixes these points: the four parts, the two-stage arbiter with hold
until release, the matched delay, the three-condition crosspoint matrix with six signals
per output, the handshake that reports a conflict to the sender, and the port count and
width.

The following choices are this implementation's own and can be changed:

* **Destination.** It arrives on two dedicated pins, binary coded, held with the request.
  It could also be carried in a packet header on the data wires, which this RTL does
  not do.
* **Lane signals.** The six signals of each lane are data, strobe and frame.
* **Sender protocol.** The sender gets a four-phase `ack` with `nak`.
* **Simultaneous requests.** Requests that arrive in the same time step are both refused.
  A transistor circuit at the edge of its matched delay could resolve such a tie either
  way. The RTL always takes the conservative outcome.
* **Gates.** The logic is written at the level of functions, not gates. The chip's path
  is a 3-input NAND, two inverters, a 2-input NAND and a 2-input AND, and synthesis
  chooses its own.

The pad ring and the tuned delay lines are not in the RTL, and nor are the rates and
latencies in ns, which belong to the physical implementation.
