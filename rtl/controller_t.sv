// controller_t -- FlexRay communication controller: protocol operation
// control with frame structure outputs.
//
// The controller is a state machine driven by the host. The host writes a
// 5-bit command, the binary code of the POC state it wants; the POC state
// machine (cc_poc_fsm) moves there on the next rising clock edge if the
// state operation table allows it, and otherwise stays put. From the state,
// the frame block (cc_frame_gen) drives the frame fields: Frame_ID,
// Payload_Length, Header_CRC, Cycle_Count, Data_1..Data_4 and CRC_1..CRC_3.
//
// Interface: clock, active-high asynchronous reset and command in; 91 frame
// output bits out, 98 ports in all, as in the published controller. The
// only storage is the 5-bit state register; every output is a
// combinational decode of it, valid one clock after the command that
// caused the move. Reset puts the controller in DEFAULT_CONFIG.
module controller_t
  import flexray_cc_pkg::*;
(
  input  logic        clock,
  input  logic        reset,
  input  logic [4:0]  command,
  output logic [10:0] frame_id,
  output logic [6:0]  payload_length,
  output logic [10:0] header_crc,
  output logic [5:0]  cycle_count,
  output logic [7:0]  data_1,
  output logic [7:0]  data_2,
  output logic [7:0]  data_3,
  output logic [7:0]  data_4,
  output logic [7:0]  crc_1,
  output logic [7:0]  crc_2,
  output logic [7:0]  crc_3
);

  poc_state_e state;
  cc_frame_t  frame;

  cc_poc_fsm u_poc (
    .clock   (clock),
    .reset   (reset),
    .command (poc_state_e'(command)),
    .state   (state)
  );

  cc_frame_gen u_frame (
    .state (state),
    .frame (frame)
  );

  assign frame_id       = frame.frame_id;
  assign payload_length = frame.payload_length;
  assign header_crc     = frame.header_crc;
  assign cycle_count    = frame.cycle_count;
  assign data_1         = frame.data[0];
  assign data_2         = frame.data[1];
  assign data_3         = frame.data[2];
  assign data_4         = frame.data[3];
  assign crc_1          = frame.crc[0];
  assign crc_2          = frame.crc[1];
  assign crc_3          = frame.crc[2];

endmodule
