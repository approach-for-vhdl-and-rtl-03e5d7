// flexray_cc_pkg -- shared types and constants of the FlexRay communication
// controller (protocol operation control plus frame structure outputs).
//
// poc_state_e lists the 18 protocol operation control (POC) states with the
// 5-bit binary codes of the controller's state table. The host command uses
// the same code space: writing a state's code asks the controller to move to
// that state. cc_frame_t bundles the frame fields the controller drives:
// Frame_ID (11 bits), Payload_Length (7), Header_CRC (11), Cycle_Count (6),
// four payload bytes and the three bytes of the 24-bit trailer CRC.
//
// The state codes and field widths follow the controller's published state
// table and port list. The per-state field values are the values the
// reference simulation shows; the ones it does not show are this design's
// own choice (see cc_frame_gen).
package flexray_cc_pkg;

  localparam int unsigned STATE_W    = 5;
  localparam int unsigned NUM_STATES = 18;

  localparam int unsigned FRAME_ID_W   = 11;
  localparam int unsigned PAYLOAD_W    = 7;
  localparam int unsigned HEADER_CRC_W = 11;
  localparam int unsigned CYCLE_W      = 6;
  localparam int unsigned DATA_BYTES   = 4;
  localparam int unsigned CRC_BYTES    = 3;

  typedef enum logic [STATE_W-1:0] {
    DEFAULT_CONFIG                 = 5'b00000,
    CONFIG                         = 5'b00001,
    READY                          = 5'b00010,
    HALT                           = 5'b00011,
    WAKEUP_LISTEN                  = 5'b00100,
    WAKEUP_SEND                    = 5'b00101,
    WAKEUP_DETECT                  = 5'b00110,
    COLDSTART_LISTEN               = 5'b00111,
    INTEGRATION_LISTEN             = 5'b01000,
    INITIALIZE_SCHEDULE            = 5'b01001,
    NORMAL_ACTIVE                  = 5'b01010,
    NORMAL_PASSIVE                 = 5'b01011,
    COLDSTART_COLLISION_RESOLUTION = 5'b01100,
    INTEGRATION_COLDSTART_CHECK    = 5'b01101,
    INTEGRATION_CONSISTENCY_CHECK  = 5'b01110,
    COLDSTART_CONSISTENCY_CHECK    = 5'b01111,
    COLDSTART_JOIN                 = 5'b10000,
    COLDSTART_GAP                  = 5'b10001
  } poc_state_e;

  // Frame fields as driven on the controller's outputs.
  typedef struct packed {
    logic [FRAME_ID_W-1:0]   frame_id;
    logic [PAYLOAD_W-1:0]    payload_length;
    logic [HEADER_CRC_W-1:0] header_crc;
    logic [CYCLE_W-1:0]      cycle_count;
    logic [DATA_BYTES-1:0][7:0] data;   // data[0] is Data_1
    logic [CRC_BYTES-1:0][7:0]  crc;    // crc[0] is CRC_1
  } cc_frame_t;

  // True for the codes 00000..10001; the other 14 codes of the 5-bit space
  // are no state and no command.
  function automatic logic is_state_code(logic [STATE_W-1:0] code);
    return code < STATE_W'(NUM_STATES);
  endfunction

endpackage
