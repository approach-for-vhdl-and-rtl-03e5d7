# FlexRay communication controller: protocol operation control

A FlexRay node has to go through a fixed series of modes before it may send on the
bus. It is configured, it wakes the cluster, it joins or starts the cluster's TDMA
schedule, and only then does it run normally. This RTL models that part of the
communication controller (CC): the **protocol operation control (POC)** state machine,
steered one step at a time by the host. Next to it is a small output stage that
shows, for each POC state, the fields of the frame the controller presents:
frame ID, payload length, header CRC, cycle count, four payload bytes and the three
bytes of the 24-bit trailer CRC.

The design is small on purpose. It holds one 5-bit state register and a
combinational decode, and has 98 port bits (7 in, 91 out). It is a model of the
controller's mode logic and its port-level behaviour. It is not a full FlexRay
protocol engine (see *What is not here*).

## Structure

```
            command[4:0] ─┐
 clock, reset ──────────► cc_poc_fsm ──state[4:0]──► cc_frame_gen ──► frame fields (91 bits)
                             (5 FFs)                 (combinational)
                      └──────────────── controller_t ─────────────────┘
```

| file | contents |
|---|---|
| `rtl/flexray_cc_pkg.sv` | `poc_state_e` (the 18 states and their codes), `cc_frame_t` (the frame fields), field widths |
| `rtl/cc_poc_fsm.sv` | the POC state machine |
| `rtl/cc_frame_gen.sv` | decodes the state into the frame fields |
| `rtl/controller_t.sv` | top: both blocks, flat ports |
| `tb/tb_cc_poc_fsm.sv` | random-walk test of the state machine against a reference model |
| `tb/tb_cc_frame_gen.sv` | all 18 states against the expected field table |
| `tb/tb_controller_t.sv` | end-to-end run through wakeup, every startup path, normal operation and halt |

## The command protocol

The host never writes a "go" bit or an opcode. It writes the **code of the state it
wants**, and the two share one 5-bit code space:

| code | state | code | state |
|---|---|---|---|
| 00000 | DEFAULT_CONFIG | 01001 | INITIALIZE_SCHEDULE |
| 00001 | CONFIG | 01010 | NORMAL_ACTIVE |
| 00010 | READY | 01011 | NORMAL_PASSIVE |
| 00011 | HALT | 01100 | COLDSTART_COLLISION_RESOLUTION |
| 00100 | WAKEUP_LISTEN | 01101 | INTEGRATION_COLDSTART_CHECK |
| 00101 | WAKEUP_SEND | 01110 | INTEGRATION_CONSISTENCY_CHECK |
| 00110 | WAKEUP_DETECT | 01111 | COLDSTART_CONSISTENCY_CHECK |
| 00111 | COLDSTART_LISTEN | 10000 | COLDSTART_JOIN |
| 01000 | INTEGRATION_LISTEN | 10001 | COLDSTART_GAP |

On every rising clock edge the state machine asks one question: is "current state →
command" a legal move? If it is, the command becomes the new state. If it is not,
the state stays as it is. This covers unused codes 10010–11111, repeats of the
current state, and jumps the table does not allow. The host can therefore hold a
command on the bus for as long as it likes. It acts once, and only where it is
legal. There is one exception: **HALT always returns to DEFAULT_CONFIG on the next
clock**, whatever the command.

### Legal moves

```
DEFAULT_CONFIG ─► CONFIG ─► READY ─┬─► CONFIG
                                   ├─► WAKEUP_LISTEN ─► WAKEUP_SEND ─► WAKEUP_DETECT ─► READY
                                   ├─► COLDSTART_LISTEN
                                   └─► INTEGRATION_LISTEN

COLDSTART_LISTEN    ─► INITIALIZE_SCHEDULE | COLDSTART_COLLISION_RESOLUTION
INTEGRATION_LISTEN  ─► COLDSTART_LISTEN | INITIALIZE_SCHEDULE
INITIALIZE_SCHEDULE ─► COLDSTART_LISTEN | INTEGRATION_COLDSTART_CHECK
                                        | INTEGRATION_CONSISTENCY_CHECK

coldstart collision loop:
  COLDSTART_COLLISION_RESOLUTION ─► COLDSTART_CONSISTENCY_CHECK ─► COLDSTART_GAP
                      ▲                                               │
                      └───────────────────────────────────────────────┘
joining / integrating into normal operation:
  INTEGRATION_COLDSTART_CHECK ─► COLDSTART_JOIN ─► NORMAL_ACTIVE
  INTEGRATION_CONSISTENCY_CHECK ─────────────────► NORMAL_ACTIVE

NORMAL_ACTIVE ◄─► NORMAL_PASSIVE,   both ─► HALT ─(next clock)─► DEFAULT_CONFIG

READY (00010) is also accepted in every wakeup, startup and normal state.
```

The last rule lets the host abort wakeup or startup, or leave normal operation
in an orderly way, without going through HALT.

Three paths lead from READY to NORMAL_ACTIVE:

* **coldstart join**: COLDSTART_LISTEN → INITIALIZE_SCHEDULE →
  INTEGRATION_COLDSTART_CHECK → COLDSTART_JOIN → NORMAL_ACTIVE;
* **integration** (a node without coldstart capability): INTEGRATION_LISTEN →
  INITIALIZE_SCHEDULE → INTEGRATION_CONSISTENCY_CHECK → NORMAL_ACTIVE;
* **coldstart with collisions**: COLDSTART_LISTEN → COLLISION_RESOLUTION →
  CONSISTENCY_CHECK → GAP, and round the loop again. This loop has no exit into
  normal operation other than the READY abort (see below).

## Frame outputs

`cc_frame_gen` maps the state to fixed field values:

| field | width | value |
|---|---|---|
| Frame_ID | 11 | one code per state, below |
| Payload_Length | 7 | 0x02 in every state |
| Header_CRC | 11 | 0x002 in every state |
| Cycle_Count | 6 | 0x01 in DEFAULT_CONFIG, CONFIG, READY and the three wakeup states; 0x03 in all others |
| Data_1..Data_4 | 4×8 | 0x55, 0x5F, 0xAC, 0x33; all zero in DEFAULT_CONFIG |
| CRC_1..CRC_3 | 3×8 | 0x00, 0x95, 0x00; all zero in DEFAULT_CONFIG |

Frame_ID per state:

| state | ID | state | ID |
|---|---|---|---|
| DEFAULT_CONFIG | 000 | INITIALIZE_SCHEDULE | 029 |
| CONFIG | 00F | NORMAL_ACTIVE | 002 |
| READY | 001 | NORMAL_PASSIVE | 003 |
| HALT | 004 | COLDSTART_COLLISION_RESOLUTION | 023 * |
| WAKEUP_LISTEN | 011 | INTEGRATION_COLDSTART_CHECK | 026 |
| WAKEUP_SEND | 012 | INTEGRATION_CONSISTENCY_CHECK | 027 * |
| WAKEUP_DETECT | 013 | COLDSTART_CONSISTENCY_CHECK | 024 * |
| COLDSTART_LISTEN | 021 | COLDSTART_JOIN | 025 |
| INTEGRATION_LISTEN | 022 * | COLDSTART_GAP | 028 * |

The IDs are all different, so an observer can read the state from Frame_ID alone.
The testbenches rely on this. Values marked * are this design's own choice. The
controller's reference simulation gives all the others, and it never shows those
five states.

Many output bits are constant. Payload length, header CRC, CRC_1 and CRC_3 never
change, and the data bytes take only two values. Synthesis therefore reduces about
37 of the 91 output bits to constants. This is the intended behaviour, not a
wiring fault. The CRC fields are placeholders. They are not CRCs computed over the
frame.

## Timing

* `reset` is active high and **asynchronous**. While it is high the controller is
  in DEFAULT_CONFIG, and the outputs show it at once, with no clock edge needed.
* `command` is sampled on the rising edge of `clock`. The state register updates
  on that edge, and because the frame outputs decode the register output, they
  change on that edge too. Latency is one clock. The outputs never depend
  combinationally on `command`.
* One legal move per clock at most. HALT lasts exactly one clock.
* The only storage is the 5-bit state register. The critical path runs from
  `command` through the legal-move decode into that register.

Two assertions in `cc_poc_fsm` back this up. One checks that the register never
holds an unused code. The other checks that HALT is always followed by
DEFAULT_CONFIG.

## How far it follows the original controller, and where it departs

Taken directly from the original controller: the 18 state codes, the legal-move
table, command = target state, the automatic HALT → DEFAULT_CONFIG step, the
active-high asynchronous reset, the single 5-bit register, the port list and
widths, and the field values of the 13 states its simulation shows.

This design's own choices, or readings where the original is inconsistent:

* **READY from any wakeup, startup or normal state.** The original's transition
  table lists READY only as the exit of CONFIG and WAKEUP_DETECT. Its prose
  description of READY allows entry from wakeup, startup and normal operation as
  well. This design accepts both.
* **COLLISION_RESOLUTION → CONSISTENCY_CHECK.** The original table gives the target
  by name (COLDSTART_CONSISTENCY_CHECK) but prints the code of
  INTEGRATION_CONSISTENCY_CHECK. The name was followed (code 01111). The GAP →
  COLLISION_RESOLUTION entry was read the same way.
* **No move from COLDSTART_CONSISTENCY_CHECK to NORMAL_ACTIVE.** The table does not
  list one, so a coldstart that goes through collision resolution can leave the
  loop only through READY. Add the move in `cc_poc_fsm` if your protocol needs it.
* **Payload length and header CRC in DEFAULT_CONFIG** are 0x02 / 0x002, as the
  original simulation shows. One description instead says all header fields are
  null in that state.
* **The five Frame_ID codes marked \*** above, and Cycle_Count = 0x03 for the
  startup states never shown.
* **Illegal commands are ignored.** This design does not flag them.

Behaviour described for a real FlexRay CC that this design does **not** have,
because the original controller does not give it in a form that can be built:

* The wakeup timer and wakeup-noise timer (listen timeout, listen timeout noise),
  and the automatic exits from wakeup on pattern reception, collision or a
  received frame header. Here the host steps through wakeup.
* A wakeup error that sends the node back to CONFIG, and fatal-error entry into
  HALT from any state. HALT is reached only by command, from NORMAL_ACTIVE or
  NORMAL_PASSIVE.
* Leaving DEFAULT_CONFIG on a bus-driver wakeup event. Here only the CONFIG command
  does it.

## What is not here

The other parts of a FlexRay CC and node are not modelled. They have no
specification that could be turned into RTL:

* the controller-host interface;
* media access control (static slots, dynamic minislots);
* clock synchronization;
* frame and symbol processing;
* bit coding and decoding;
* real header and frame CRC generators (no polynomial is specified);
* the bus guardian, the bus drivers and the host processor.

The frame outputs carry four payload bytes. Frames with up to 254 payload bytes,
which the FlexRay frame format allows, have no storage or output here.

## Simulating

All files are plain SystemVerilog 2017. The package must come first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_controller_t \
    rtl/flexray_cc_pkg.sv rtl/cc_poc_fsm.sv rtl/cc_frame_gen.sv rtl/controller_t.sv \
    tb/tb_controller_t.sv
./obj_dir/Vtb_controller_t
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops through `$finish`.
A watchdog stops it with a failure if it hangs.

* `tb_cc_poc_fsm`: 20,000 random steps. Half of the commands are legal moves of a
  reference model's current state, and half are any 5-bit value. The test checks
  the state every clock and requires every legal move to occur at least once. It
  also checks the one-clock latency and the asynchronous reset.
* `tb_cc_frame_gen`: every state against the field table, plus uniqueness of the
  Frame_IDs.
* `tb_controller_t`: the full-size, end-to-end test, at the top's only
  configuration. It replays the reference sequence: configure, wake up, coldstart
  join into NORMAL_ACTIVE, toggle NORMAL_PASSIVE, then halt. It goes on to the
  integration path, the collision loop, startup fallbacks, a READY abort, ignored
  commands and an asynchronous reset. Before each edge it checks all 91 output
  bits against the old state, and after each edge against the new one. It also
  counts each of these mechanisms and fails if one never happens.

To change the legal moves, edit the `case` in `cc_poc_fsm` and the `MOVES` list in
`tb_cc_poc_fsm`. To change the field values, edit `cc_frame_gen` and the tables in
both frame-checking testbenches.
