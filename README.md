# TE03_35 switch IC — RTL model

TE03_35 is a small switch chip for a ring of processors. Each node has
four 4-lane channels: two electrical ports (A and B) and two optical paths
(A and B; on this chip the optical side is modelled with extra electrical
lanes). The switch connects them at 2.0 Gb/s per lane, which gives
4 × 4 × 2 Gb/s = 32 Gb/s peak. Beside the data path, the chip carries a
**BUSY BIT** arbitration scheme. A FRAME pulse and a serial stream of
per-processor busy flags circulate on two dedicated channels. Each node
claims a processor by turning the processor's flag from free to busy as the
FRAME passes through it.

This repository gives synthesizable SystemVerilog for the logic of the chip.
That covers the clock selection, the receive demultiplexers, the switch core
with its control decode, the transmit multiplexers, and the whole BUSY BIT
unit. It also has self-checking testbenches for every block, for the whole
chip, and for a ring of four chips. The analog parts are not modelled: LVDS
receivers and drivers, the clock delay chains, and the duty-cycle and slew
controls. Their logic-level signals are ports of the top module.

## Data path

```
 el_ina/el_inb/opt_ina/opt_inb (4 lanes each, line rate)
      │  rx_demux: every lane sampled on both clock edges → 2 bits per clock
      ▼
 switch_core: input registers → 4×4 restricted crossbar (C0..C6) → output registers
      │
      ▼  tx_mux: 8-bit word → 4 lanes at the line rate again
 el_outa/el_outb/opt_outa/opt_outb
```

* The line rate is twice the clock rate. A 1 GHz clock carries 2 Gb/s per
  lane. `rx_demux` captures the bit that is on the lane at the rising edge
  and the bit at the falling edge. The pair goes to the core as one 8-bit
  word per channel: `{falling-edge bits, rising-edge bits}`.
* The core registers the four words, routes them, and registers them again.
* `tx_mux` registers the word and drives the early half during the high
  clock phase. It drives the late half, retimed on the falling edge, during
  the low phase.
* From an input bit to the same bit at an output takes 8 bit slots, which is
  4 clocks. `tb_te03_35_top` checks this latency for every configuration.
* Data flows strictly from inputs to outputs. There is no feedback anywhere
  in the data path.

### Crossbar control

A full 4×4 crossbar would need 16 control lines. This chip has only seven,
C0..C6, and some of them are redundant. Four connections can never be made:

| not possible          |
|-----------------------|
| OPT_IN_B → OPT_OUT_A  |
| OPT_IN_A → OPT_OUT_B  |
| OPT_IN_B → EL_OUT_A   |
| OPT_IN_A → EL_OUT_B   |

The chip's documentation lists only six control words with their
connections. The decode in `te03_pkg::decode_ctrl` reproduces those six
exactly. It is also built so that no control word can ever make a forbidden
connection (the `switch_core` assertion and testbench check all 128 words):

```
EL_OUT_A  = C5 ? EL_IN_B  : OPT_IN_A
EL_OUT_B  = C1 ? EL_IN_A  : OPT_IN_B
OPT_OUT_A = C2 ? OPT_IN_A : (C4 ? EL_IN_A : EL_IN_B)
OPT_OUT_B = !C3 ? EL_IN_B : ((C1 | C4 & !C2) ? OPT_IN_B : EL_IN_A)
```

C0 and C6 do not affect the routing. The six configurations are listed
below, with the control word written C0 first:

| C0..C6    | EL_OUT_A | EL_OUT_B | OPT_OUT_A | OPT_OUT_B |
|-----------|----------|----------|-----------|-----------|
| 1000100   | OPT_IN_A | OPT_IN_B | EL_IN_A   | EL_IN_B   |
| 1101000   | OPT_IN_A | EL_IN_A  | EL_IN_B   | OPT_IN_B  |
| 1011110   | EL_IN_B  | OPT_IN_B | OPT_IN_A  | EL_IN_A   |
| 1001000   | OPT_IN_A | OPT_IN_B | EL_IN_B   | EL_IN_A   |
| 1100000   | OPT_IN_A | EL_IN_A  | EL_IN_B   | EL_IN_B   |
| 1001110   | EL_IN_B  | OPT_IN_B | EL_IN_A   | OPT_IN_B  |

**Trust level.** Only these six rows, and the list of connections that are
not possible, come from the chip's documentation. The other 122 control
words follow the equations above, which are this design's own completion.
Real silicon may route them differently. The chip's optical outputs A and B
are labelled so that the printed configurations agree with the list of
connections that are not possible.

## Clocking

The chip receives two clocks: the electrical input clock and the mock
optical clock. In the chip, each one passes through an analog delay chain.
That chain is outside this RTL: the testbench feeds its output back as
`eclk_dly`/`oclk_dly`. `clock_ctrl` is combinational clock muxing:

| control     | effect in this model                                                    |
|-------------|-------------------------------------------------------------------------|
| `sel_elec`  | 1 = bypass the electrical delay chain                                   |
| `sel_opt`   | 1 = bypass the optical delay chain                                      |
| `phi_a`     | 1 = electrical receive interface clocked 180° out of phase              |
| `phi1_a`    | 1 = optical receive interface clocked 180° out of phase                 |
| `int_sel1`  | clock of chain #1 (switch core, optical outputs, BUSY BIT): 0 electrical, 1 optical |
| `int_sel2`  | clock of chain #2 (electrical outputs): 0 electrical, 1 optical         |

The polarity of each select is this design's choice. The receivers hand
their words to the core clock directly, with no synchroniser. The phase
selects exist to give that crossing margin. With the receive clock inverted
(`phi_a = phi1_a = 1`), the crossing has half a clock of margin. With both
phases at 0°, the latency is still constant, and the testbench covers both
cases.

## BUSY BIT arbitration

This is the most intricate part of the chip.

### Signals on the ring

* The FRAME channel carries a pulse that is high for one clock per
  processor. While it is high, the BUSY channel carries one flag per clock,
  for processor 3 first and processor 0 last. A flag of 1 means busy.
* Both channels use an AC-coupling code. A logic 1 is sent as the chip pair
  `10` and a logic 0 as `01`, so the line toggles every bit except at data
  changes. `busy_decode` takes the first chip of each pair, optionally
  inverted by `phase_sel`. `busy_encode` builds the pair again.
* Each node adds a fixed delay: decode (1) + buffer (1) + FRAME register (1)
  + encode (1) = **4 clocks** inside `busy_bit_unit`. At the chip pins,
  the receive demultiplexer and transmit multiplexer add one clock each, for
  6 clocks in all. A ring of four chips therefore has a FRAME period of 24
  clocks (`tb_ring_network`).

### Registers of one node

| register                | width | behaviour |
|-------------------------|-------|-----------|
| request interface       | 4     | `bit_sel` picks a bit. `req_set` sets it and `req_reset` clears it. If both are high, set wins. |
| request                 | 4     | Copies the interface register while FRAME is low. While FRAME is high it shifts toward bit 3, filling with 0. `REQUEST` is bit 3. |
| grab                    | 4     | Holds its value while FRAME is low. While FRAME is high it shifts, loading `GRAB = REQUEST & (~BUSY_IN \| GRAB[3])`. `grab_set`/`grab_reset` force all bits. |
| grab interface (`gstat`) | 4    | Copies the grab register on a rising edge of `grab_clk`. The pins `grab_out = ~gstat`, so a grabbed processor reads low. |

During the FRAME, each flag leaves as

```
BUSY_OUT = REQUEST | BUSY_IN & ~GRAB[3]
```

so a node that asks for a processor always leaves it marked busy:

* If the processor was free, the node wins it and the grab bit is set.
* If it was already busy, the grab bit stays clear, unless this node already
  held it.
* If the node held a processor and no longer asks for it, the processor
  leaves free.
* Every other flag passes unchanged. Outside the FRAME the BUSY line passes
  straight through.

To use the scheme, software does the following:

1. Set request bits while no FRAME is at the node.
2. Let one FRAME pass.
3. Pulse `grab_clk` right after the FRAME to read `gstat`. The
   `frame_mon_n` output is the internal FRAME inverted, so it can serve as
   that clock.

### FRAME initialization and creation

One node is the master (`mt_n = 0`). `frame_logic` evaluates, once per
clock:

```
FRAME <= ~MS & FRAME_IN | MS & ~FC & (HIF & REQUEST | ~HIF & FRAME_IN)
HIF   <= MS & (FC | HIF & REQUEST)          (MS = ~mt_n, FC = tc)
```

* **Pass-through.** All other nodes are always in this state, and so is the
  master while `tc = 0`. FRAME repeats the incoming FRAME.
* **Initialization.** The master holds `tc = 1`. Its FRAME output is forced
  low and HIF (hide incoming frame) is set. `tc` must stay high until the
  ring has drained.
* **Creation.** `tc` falls. FRAME now follows REQUEST while the request
  register shifts, and HIF drops when REQUEST goes low. With m request bits
  set from bit 3 downward, the new FRAME is **m + 1 clocks** long. For
  example, bits 3, 2 and 1 give a 4-processor FRAME, and bit 3 alone gives
  a 2-processor FRAME.
* **After creation.** The master is back in pass-through and the FRAME
  circulates forever. The master's own requests were on the BUSY line during
  creation. So it starts owning every processor it asked for, normally all
  but itself, and then releases them one by one.

`frame_mode` reports the state: 0 pass-through, 1 initialization,
2 creation.

## Module hierarchy

```
te03_35_top
├── clock_ctrl                      clock selects and phase inversion
├── rx_demux ×4  (+1, one lane wide, for FRAME/BUSY)
├── switch_core                     uses te03_pkg::decode_ctrl
├── tx_mux ×4    (+1, one lane wide, for FRAME/BUSY)
└── busy_bit_unit
    ├── busy_decode ×2
    ├── frame_logic
    ├── busy_monitor
    │   ├── request_if_reg
    │   ├── request_reg
    │   ├── grab_reg
    │   └── grab_if_reg
    └── busy_encode ×2
```

`te03_pkg` holds `LANES = 4`, `N_PROC = 4`, the crossbar source enum and the
connection-map struct. Every file opens with a comment on its function,
timing, and which parts are interpretation.

## Where this model departs from the chip

* **Reset.** `rst_n` is added, because the chip has no reset pin. All
  registers clear asynchronously.
* **Request register edge.** The chip loads the request register on the
  falling clock edge. Here it uses the rising edge, like the rest of the
  unit. The alignment between FRAME, REQUEST and the BUSY flags is kept:
  the first flag of a FRAME still meets request bit 3.
* **Request interface register.** On the chip it is RS latches. Here it is
  clocked flip-flops, so set/reset pulses must last at least one clock.
* **Grab interface register.** It loads on the rising edge of the grab
  clock. The active-low "grab enable" is the low phase before that edge.
* **Grab and BUSY_OUT equations.** They are written so that they follow the
  chip's stated rules:
  * a free requested processor is won;
  * a busy one is not won;
  * a held one that is no longer requested is freed.

  This needs the complement of BUSY_IN in the grab equation and of the grab
  bit in BUSY_OUT.
* **FRAME state logic.** Where the chip's state diagram and its logic
  equations differ, the equations are implemented.
* **Crossbar.** The 122 undocumented control words are routed by the
  equations above (see *Trust level*).
* **Latency at the pins.** The node delay is 4 clocks inside the BUSY BIT
  unit but 6 clocks pin to pin, because the one-lane demux and mux each add
  a clock.
* **Not modelled.** LVDS pads, delay chains, duty-cycle (bias) and slew
  controls, and all analog performance: sensitivity, eye, jitter and BER.
  That includes whether 2.25 Gb/s is reached, which is a property of the
  silicon.

## Simulating

Verilator 5 is used for all testbenches. Every block has `tb/tb_<block>.sv`,
which prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl rtl/te03_pkg.sv tb/tb_te03_35_top.sv \
          --top-module tb_te03_35_top -o sim && ./obj_dir/sim
```

Replace the testbench name for any other test. `-Irtl` lets Verilator find
the other modules by name.

| testbench            | what it runs |
|----------------------|--------------|
| `tb_te03_35_top`     | Whole chip at its default size. Covers the six configurations, 20 random control words, delay chain in use, optical internal clock, 0° phases, BUSY pass-through, request/grab/release, decoder inversion, FRAME reset and creation. Counts each mechanism. |
| `tb_prbs_datapath`   | A PRBS-31 stream (x³¹ + x²⁸ + 1) on all 16 lanes, checked bit by bit at the outputs at 2.0 and 2.25 Gb/s per lane. |
| `tb_ring_network`    | Four chips in a ring. Covers FRAME init and creation (4 and 2 processors), master grab and release, two nodes contending for one processor, and regrab after release. |
| `tb_<block>`         | Unit tests. The switch core test runs all 128 control words against the forbidden list. |

Simulation is two-state. Every register the logic reads is reset.

## Limits

* Only six crossbar control words are known to match the chip.
* Clock muxing is plain combinational logic. Changing a select while the
  clocks run can glitch, as it can on the chip.
* Receive-to-core clock crossings have no synchroniser. Choose the phase
  selects so that the crossings have margin.
* `tc` is treated as synchronous to the internal clock.
