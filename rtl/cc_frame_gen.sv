// cc_frame_gen -- frame structure outputs of the FlexRay communication
// controller.
//
// For the current POC state this block drives the fields of a FlexRay frame
// as the controller presents them to the outside: the 11-bit Frame_ID, the
// 7-bit Payload_Length, the 11-bit Header_CRC, the 6-bit Cycle_Count, four
// payload bytes (Data_1..Data_4) and the 24-bit trailer CRC as three bytes
// (CRC_1..CRC_3). It is purely combinational, a decode of the 5-bit state,
// so the fields change in the same clock cycle as the state register.
//
// Field values per state:
//   Frame_ID       one code per state (table below); the wakeup states use
//                  0x011..0x013 and the startup states 0x02x.
//   Payload_Length 0x02 and Header_CRC 0x002 in every state.
//   Cycle_Count    0x01 in DEFAULT_CONFIG, CONFIG, READY and the wakeup
//                  states; 0x03 in the startup, normal and HALT states.
//   Data_1..4      0x55, 0x5F, 0xAC, 0x33; all zero in DEFAULT_CONFIG.
//   CRC_1..3       0x00, 0x95, 0x00; all zero in DEFAULT_CONFIG.
// These are the values of the published controller's simulation. The
// Frame_ID codes of INTEGRATION_LISTEN (0x022), COLDSTART_COLLISION_RESOLUTION
// (0x023), COLDSTART_CONSISTENCY_CHECK (0x024), INTEGRATION_CONSISTENCY_CHECK
// (0x027) and COLDSTART_GAP (0x028), which that simulation never shows, are
// this design's own choice, picked to be distinct and inside the startup
// range. The header and trailer CRC fields are fixed values, not CRCs
// computed over the frame.
module cc_frame_gen
  import flexray_cc_pkg::*;
(
  input  poc_state_e state,
  output cc_frame_t  frame
);

  localparam logic [PAYLOAD_W-1:0]    PAYLOAD_LENGTH = 7'h02;
  localparam logic [HEADER_CRC_W-1:0] HEADER_CRC     = 11'h002;
  localparam logic [CYCLE_W-1:0]      CYCLE_EARLY    = 6'h01;
  localparam logic [CYCLE_W-1:0]      CYCLE_RUNNING  = 6'h03;
  localparam logic [DATA_BYTES-1:0][7:0] DATA_BYTES_ON = {8'h33, 8'hAC, 8'h5F, 8'h55};
  localparam logic [CRC_BYTES-1:0][7:0]  CRC_BYTES_ON  = {8'h00, 8'h95, 8'h00};

  logic [FRAME_ID_W-1:0] frame_id;
  logic                  early;   // before startup: configuration and wakeup states

  always_comb begin
    early = 1'b0;
    unique case (state)
      DEFAULT_CONFIG:                 begin frame_id = 11'h000; early = 1'b1; end
      CONFIG:                         begin frame_id = 11'h00F; early = 1'b1; end
      READY:                          begin frame_id = 11'h001; early = 1'b1; end
      HALT:                                 frame_id = 11'h004;
      WAKEUP_LISTEN:                  begin frame_id = 11'h011; early = 1'b1; end
      WAKEUP_SEND:                    begin frame_id = 11'h012; early = 1'b1; end
      WAKEUP_DETECT:                  begin frame_id = 11'h013; early = 1'b1; end
      COLDSTART_LISTEN:                     frame_id = 11'h021;
      INTEGRATION_LISTEN:                   frame_id = 11'h022;
      INITIALIZE_SCHEDULE:                  frame_id = 11'h029;
      NORMAL_ACTIVE:                        frame_id = 11'h002;
      NORMAL_PASSIVE:                       frame_id = 11'h003;
      COLDSTART_COLLISION_RESOLUTION:       frame_id = 11'h023;
      INTEGRATION_COLDSTART_CHECK:          frame_id = 11'h026;
      INTEGRATION_CONSISTENCY_CHECK:        frame_id = 11'h027;
      COLDSTART_CONSISTENCY_CHECK:          frame_id = 11'h024;
      COLDSTART_JOIN:                       frame_id = 11'h025;
      COLDSTART_GAP:                        frame_id = 11'h028;
      default:                        begin frame_id = 11'h000; early = 1'b1; end
    endcase

    frame.frame_id       = frame_id;
    frame.payload_length = PAYLOAD_LENGTH;
    frame.header_crc     = HEADER_CRC;
    frame.cycle_count    = early ? CYCLE_EARLY : CYCLE_RUNNING;
    frame.data           = (state == DEFAULT_CONFIG) ? '0 : DATA_BYTES_ON;
    frame.crc            = (state == DEFAULT_CONFIG) ? '0 : CRC_BYTES_ON;
  end

endmodule
