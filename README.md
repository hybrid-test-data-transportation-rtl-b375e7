# Hybrid test data transport over a network-on-chip: core-side RTL

When a network-on-chip (NoC) is reused as the test access mechanism of a
many-core SoC, test data has to travel as packets. A test scheduler designed
for a bus would give each core only a few of the test wires, such as 3 bits
of a 16-bit channel. A packet network cannot split its links that way.
The hybrid scheme implemented here works around this without changing any
router or network interface:

* **Stimuli are multicast.** Each stimuli flit is divided into *portions*,
  one per core (or group of cores tested one after another). The tester puts
  one *stimuli set* of every core into each flit. A set is one bit for each
  of the core's wrapper scan chains. The network multicasts the same flits
  to all cores, and each core's wrapper takes only its own portion.
* **Responses are unicast, and stacked.** A core's responses would fill only
  its own portion of a flit and leave the rest idle. Instead, a small
  interface on the core's AXI write channel stacks
  `floor(FLIT_W / PORTION_W)` response sets into one flit before the network
  interface packetizes it. This cuts the number of response flits from
  `CHAIN_LEN × N_TV` to `ceil(CHAIN_LEN / floor(FLIT_W / PORTION_W)) × N_TV`.

The scheme follows Ansari, Kim, Jung and Park, "Hybrid Test Data
Transportation Scheme for Advanced NoC-Based SoCs". The network, the network
interfaces, the cores and the tester are outside this RTL. The RTL covers
what sits between a core and its network interface, for every core.

## Blocks

| file | what it is |
|---|---|
| `rtl/hts_pkg.sv` | shared functions: sets per flit, response flits per test vector |
| `rtl/test_response_accumulator.sv` | the stacking interface on the AXI write-data channel |
| `rtl/core_test_wrapper.sv` | per-core wrapper: takes the core's portion of each stimuli flit and shifts it into the scan chains, then emits the response sets as AXI write beats |
| `rtl/hybrid_test_top.sv` | top: one wrapper and one accumulator per flit portion |
| `tb/*.sv` | self-checking testbenches, a behavioural scan-chain core, reference functions |

## The response accumulator (the part worth reading first)

`test_response_accumulator` sits on the AXI write-data channel. On one side
is the core (AXI master: `m_wdata`, `m_wvalid`, `m_wlast`, `m_wready`). On
the other is the network interface (AXI slave: `s_w*`). With `test_en` low,
all four signals pass straight through, so functional traffic is untouched.
With `test_en` high:

* **Stack register.** Each beat the master sends carries one response set in
  bits `[PORTION_LSB +: PORTION_W]` of WDATA. The accumulator writes that set
  into slot `s` of a `FLIT_W`-bit stack register, at bits
  `[s*PORTION_W +: PORTION_W]`. Slots fill from bit 0 upward. Bits above
  `SETS*PORTION_W` are idle and stay 0.
* **Flush on full.** When the last slot is written, the stack register is
  offered to the network interface. `TWVALID` goes high in the next cycle
  and stays high until `WREADY`.
* **Flush on WLAST.** A beat that carries WLAST also closes the flit, even
  if only some slots are filled. The stack register is not cleared between
  flits, so the unused upper slots of a short flit still hold older sets.
  The receiver knows how many sets are valid from the chain length.
* **Back-pressure.** `TWREADY` (the master's WREADY) is low only while a
  full stack register waits for the network interface. In that state it
  follows `WREADY`. So a new set can enter in the same cycle the old flit
  leaves, and the interface sustains one set per clock. Stacking therefore
  does not slow the scan stream down: it only lowers the flit rate.

Example (5-bit flit, 2-bit portion, network interface always ready). The
master sends `10`, `11`, `00`, `01`, and then `10` with WLAST. The
accumulator produces three flits: `01110`, `00100`, and `00110` with WLAST.
The second flit keeps the `11` of the first flit in bits [3:2] until `01`
overwrites them. In the third flit, `11` in bits [3:2] is stale. The
testbench checks exactly this sequence.

Stacking only helps when a portion is at most half of the flit. For a wider
portion, only one set fits. The accumulator then sends every set in a flit
of its own, in the core's own portion. That is the same flit a core would
send without the interface.

**Departure from the original interface.** Originally, WLAST runs straight
from the master to the network interface and acts only as an "interrupt"
that flushes the stack register. Here, in test mode, the slave-side WLAST is
registered and travels with the flushed flit. Otherwise the network interface
could see WLAST on a beat that does not end the burst: the WLAST beat is
taken into the stack register one cycle before the flit leaves. In functional
mode WLAST still passes straight through.

## The core test wrapper

`core_test_wrapper` is the test side of one core. Its insides are this
design's own. The scheme only fixes what it must do: take its portion of
every multicast stimuli flit, and put every response set on its portion of a
write beat, with idle (0) bits elsewhere. After a `start` pulse it runs
`N_TV + 1` shift windows of `CHAIN_LEN` cycles each:

```
window 0        load vector 0                        (no response sent)
capture         one cycle, scan_capture = 1
window w        load vector w, unload response w-1   (1 <= w < N_TV)
capture
window N_TV     unload response N_TV-1, scan_in = 0
```

Each shift consumes one stimuli flit (if the window loads a vector). It also
produces one response beat (if the window unloads one). A shift waits until
the flit is present and the previous beat has been taken, so nothing is lost
and the core is only stalled. Each unloaded vector is one AXI burst of
`CHAIN_LEN` beats, ended by WLAST. This makes the accumulator flush at the
end of every vector, and the response-flit count
`ceil(CHAIN_LEN / floor(FLIT_W/PORTION_W)) × N_TV` is exact. With no stalls,
a test takes `(N_TV+1)·CHAIN_LEN + N_TV + 2` cycles from the `start` edge
until `done` is seen. That count includes one start cycle and one drain
cycle. Set bit `i` drives scan chain `i`. Chains shorter than `CHAIN_LEN`
are assumed padded by the core's wrapper design.

## The top: `hybrid_test_top`

Parameters and defaults:

| parameter | default | origin |
|---|---|---|
| `FLIT_W` | 16 | worked example of the scheme (p93791, 16-bit flit) |
| `N_CUT` | 4 | same example: four TAM groups |
| `PORTION_W[N_CUT]` | `'{4,4,5,3}` | same example |
| `CHAIN_LEN[N_CUT]` | `'{10,10,10,10}` | own choice (from the 10-cell example chain) |
| `N_TV[N_CUT]` | `'{1,1,1,1}` | own choice |

Core `i` owns the flit bits starting at `PORTION_W[0] + … + PORTION_W[i-1]`.
Core 0 sits at bit 0. This order is this design's choice. With these
defaults, cores 0–3 stack 4, 4, 3 and 5 sets per flit. They send 3, 3, 4 and
2 response flits per test vector.

Ports are per core and are plain packed arrays, `[N_CUT-1:0][FLIT_W-1:0]`
for the wide ones:

* `stim_valid/stim_flit/stim_ready`: the multicast copy of each stimuli flit
  that reaches the core's network interface.
* `scan_shift/scan_capture/scan_in/scan_out`: the core's wrapper scan chains.
  Core `i` uses the low `PORTION_W[i]` bits of its row. The other bits of
  `scan_in` are constant 0, so a synthesis report lists them as idle.
* `func_w*`: the core's functional AXI write-data channel.
* `ni_w*`: the write-data channel into the core's network interface.
* `test_en`, and per core `start`, `busy`, `done`.

In test mode, the wrapper drives the accumulator's master side and the
functional channel sees WREADY = 0. With `test_en` low, the functional
channel reaches the network interface unchanged. To test several cores in
one portion one after another, restart that portion's wrapper.

## Choosing the network clock

This RTL does not set the network clock. An integrator still needs the rule
that comes with the scheme. Response packets are injected faster than the
tester consumes them when sets are stacked. So the network clock `f_N` must
exceed the tester clock `f_T` by

```
A_n    = floor(FLIT_W / P_n)                     cycles to fill one response flit
IPRP_n = A_n × (packet_size − 2) + 2             cycles between packets of core n
DoI    = max_n IPRP_n
NRP_n  = DoI / IPRP_n                            packets per DoI
NRF    = Σ_n ceil(NRP_n × packet_size)           flits per DoI
f_N/f_T = ceil(NRF / DoI)
```

`hts_pkg::clock_ratio(flit_w, packet_size, n, portion_w)` evaluates this
rule. The "2" in IPRP counts the head and tail flits. `NRP_n` is kept
fractional, and the ceiling is taken only on `NRP_n × packet_size`. Example: 16-bit flits with
portions 4, 4, 5, 3 and 4-flit packets (2 payload flits). Then A = 4, 4, 3,
5, IPRP = 10, 10, 8, 12, DoI = 12, NRF = 5 + 5 + 6 + 4 = 20, and
f_N/f_T = 2. With a single payload flit per packet, 3 is needed. The scheme's
source writes `A_n` with a ceiling in one place. Its own numbers, and the
response-flit formula, use the floor, and so does this RTL.

## What is not here

* **Routers and network interfaces.** The scheme assumes an existing NoC: a
  2-D mesh, wormhole switching, XY routing, multicast routers with a
  two-cycle per-flit latency, and credit-based network interfaces with an
  AXI slave port and a one-cycle latency. It also requires no change to
  them. None of these are included. Their connections are ports of the top.
* **Tester and cores.** The tester's flit packing, and the scan chains of
  the cores, exist only as testbench models.
* **Test scheduling.** A rectangle-packing scheduler chooses the portion
  widths. It is software, and its result is the `PORTION_W` parameter.
* **Scale.** The published comparisons use 32- and 64-bit flits and up to
  128 cores. The RTL is parameterized for that, but those schedules are not
  available, so only the 16-bit, four-portion example is set up.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. Build one with Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hts_pkg.sv tb/tb_hts_pkg.sv rtl/core_test_wrapper.sv \
  rtl/test_response_accumulator.sv rtl/hybrid_test_top.sv \
  tb/cut_scan_model.sv tb/tb_hybrid_test_top.sv \
  --top-module tb_hybrid_test_top -o sim && ./obj_dir/sim
```

* `tb_test_response_accumulator`: replays the 5-bit example above and
  checks the flit values and the one-cycle TWVALID latency. Then 200 random
  bursts with random WVALID/WREADY, compared with a model of the stack
  register. It also checks the TWREADY back-pressure rule, and functional
  pass-through.
* `tb_core_test_wrapper`: an 8-bit flit, a 3-bit portion at bit 2, 5-cell
  chains and 3 vectors, against a behavioural core. Every response beat is
  recomputed from the stimuli the wrapper consumed. Also checks the stall-free
  cycle count, and two runs with random stalls.
* `tb_hybrid_test_top`: the top at its default parameters, with four
  behavioural cores, a tester model that packs and multicasts flits, and a
  sink that unpacks the stacked sets. It checks every response set, the
  idle bits, WLAST, the per-core flit counts against the formula, the
  stall-free test length, and functional pass-through. It also requires
  that each mechanism happens at least once: multicast, full flush, WLAST
  flush, back-pressure from the network interface, a wait for stimuli, and
  functional traffic. In the stall-free run, consecutive response flits of a
  core must leave `floor(16/P)` cycles apart. The network clock ratios of the
  16-bit example are checked with `hts_pkg::clock_ratio`: 2 for 4-flit
  packets and 3 for single-payload packets.

* `tb_fig2_example`: a 5-bit flit shared by a 2-chain core and a 3-chain
  core, with 10-cell chains and one vector each. The 2-chain core must send 5
  response flits instead of 10. The 3-chain core's portion is wider than
  half the flit, so it must send 10 flits, one set each, in its own portion.

The assertions check the AXI rule that a valid beat stays unchanged until it
is accepted. They are active with `--assert`.
