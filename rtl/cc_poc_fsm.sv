// cc_poc_fsm -- protocol operation control (POC) state machine of the FlexRay
// communication controller.
//
// The POC is a 5-bit state register that holds one of 18 states. The host
// drives a 5-bit command coded as the binary code of the state it wants the
// controller in. On each rising clock edge the controller moves to the
// commanded state if that move is a transition of the state operation table;
// any other command, including an unused code, leaves the state unchanged.
// HALT is left by itself: one clock after entering HALT the controller is
// back in DEFAULT_CONFIG, whatever the command.
//
// Transitions (command = target state code):
//   DEFAULT_CONFIG -> CONFIG
//   CONFIG         -> READY
//   READY          -> WAKEUP_LISTEN, COLDSTART_LISTEN, INTEGRATION_LISTEN, CONFIG
//   HALT           -> DEFAULT_CONFIG (unconditional)
//   WAKEUP_LISTEN -> WAKEUP_SEND -> WAKEUP_DETECT -> READY
//   COLDSTART_LISTEN    -> INITIALIZE_SCHEDULE, COLDSTART_COLLISION_RESOLUTION
//   INTEGRATION_LISTEN  -> COLDSTART_LISTEN, INITIALIZE_SCHEDULE
//   INITIALIZE_SCHEDULE -> COLDSTART_LISTEN, INTEGRATION_COLDSTART_CHECK,
//                          INTEGRATION_CONSISTENCY_CHECK
//   NORMAL_ACTIVE  -> NORMAL_PASSIVE, HALT
//   NORMAL_PASSIVE -> NORMAL_ACTIVE, HALT
//   COLDSTART_COLLISION_RESOLUTION -> COLDSTART_CONSISTENCY_CHECK
//   INTEGRATION_COLDSTART_CHECK    -> COLDSTART_JOIN
//   INTEGRATION_CONSISTENCY_CHECK  -> NORMAL_ACTIVE
//   COLDSTART_CONSISTENCY_CHECK    -> COLDSTART_GAP
//   COLDSTART_JOIN                 -> NORMAL_ACTIVE
//   COLDSTART_GAP                  -> COLDSTART_COLLISION_RESOLUTION
// In addition the READY command (00010) is accepted in every wakeup, startup
// and normal state, so the host can abort wakeup or startup and stop normal
// operation.
//
// The table, the codes, the active-high asynchronous reset and the 5-bit
// state register follow the published controller. Accepting READY from the
// wakeup, startup and normal states follows its prose description of the
// READY state; holding the state on a command that is not in the table is
// this design's own choice.
//
// Timing: command is sampled on the rising edge of clock; state is a
// register output, so it shows the new state one clock after the command.
module cc_poc_fsm
  import flexray_cc_pkg::*;
(
  input  logic       clock,
  input  logic       reset,    // active high, asynchronous
  input  poc_state_e command,
  output poc_state_e state
);

  poc_state_e next_state;

  // Accept cmd when it names one of up to four allowed targets.
  function automatic logic allowed(poc_state_e cmd, poc_state_e t0, poc_state_e t1,
                                   poc_state_e t2, poc_state_e t3);
    return (cmd == t0) || (cmd == t1) || (cmd == t2) || (cmd == t3);
  endfunction

  always_comb begin
    logic take;
    take = 1'b0;
    unique case (state)
      DEFAULT_CONFIG:
        take = allowed(command, CONFIG, CONFIG, CONFIG, CONFIG);
      CONFIG:
        take = allowed(command, READY, READY, READY, READY);
      READY:
        take = allowed(command, WAKEUP_LISTEN, COLDSTART_LISTEN, INTEGRATION_LISTEN, CONFIG);
      HALT:
        take = 1'b0;
      WAKEUP_LISTEN:
        take = allowed(command, WAKEUP_SEND, READY, READY, READY);
      WAKEUP_SEND:
        take = allowed(command, WAKEUP_DETECT, READY, READY, READY);
      WAKEUP_DETECT:
        take = allowed(command, READY, READY, READY, READY);
      COLDSTART_LISTEN:
        take = allowed(command, INITIALIZE_SCHEDULE, COLDSTART_COLLISION_RESOLUTION,
                       READY, READY);
      INTEGRATION_LISTEN:
        take = allowed(command, COLDSTART_LISTEN, INITIALIZE_SCHEDULE, READY, READY);
      INITIALIZE_SCHEDULE:
        take = allowed(command, COLDSTART_LISTEN, INTEGRATION_COLDSTART_CHECK,
                       INTEGRATION_CONSISTENCY_CHECK, READY);
      NORMAL_ACTIVE:
        take = allowed(command, NORMAL_PASSIVE, HALT, READY, READY);
      NORMAL_PASSIVE:
        take = allowed(command, NORMAL_ACTIVE, HALT, READY, READY);
      COLDSTART_COLLISION_RESOLUTION:
        take = allowed(command, COLDSTART_CONSISTENCY_CHECK, READY, READY, READY);
      INTEGRATION_COLDSTART_CHECK:
        take = allowed(command, COLDSTART_JOIN, READY, READY, READY);
      INTEGRATION_CONSISTENCY_CHECK:
        take = allowed(command, NORMAL_ACTIVE, READY, READY, READY);
      COLDSTART_CONSISTENCY_CHECK:
        take = allowed(command, COLDSTART_GAP, READY, READY, READY);
      COLDSTART_JOIN:
        take = allowed(command, NORMAL_ACTIVE, READY, READY, READY);
      COLDSTART_GAP:
        take = allowed(command, COLDSTART_COLLISION_RESOLUTION, READY, READY, READY);
      default:
        take = 1'b0;
    endcase

    if (state == HALT)
      next_state = DEFAULT_CONFIG;
    else if (take)
      next_state = command;
    else
      next_state = state;
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset)
      state <= DEFAULT_CONFIG;
    else
      state <= next_state;
  end

  // The register only ever holds one of the 18 state codes.
  a_legal_state: assert property (@(posedge clock)
                                  is_state_code(state))
    else $error("POC state register holds unused code %b", state);

  // HALT lasts exactly one clock.
  a_halt_exit: assert property (@(posedge clock)
                                state == HALT |=> state == DEFAULT_CONFIG)
    else $error("POC did not return from HALT to DEFAULT_CONFIG");

endmodule
