// tb_controller_t -- end-to-end testbench of the FlexRay communication
// controller at its default (and only) configuration.
//
// The host side is a script of (command, expected state) steps applied one
// per clock. It starts with the sequence of the controller's reference
// simulation: configuration and wakeup (DEFAULT_CONFIG, CONFIG, READY,
// WAKEUP_LISTEN, WAKEUP_SEND, WAKEUP_DETECT, READY), coldstart into normal
// operation (COLDSTART_LISTEN, INITIALIZE_SCHEDULE,
// INTEGRATION_COLDSTART_CHECK, COLDSTART_JOIN, NORMAL_ACTIVE) and normal
// operation to HALT and back to DEFAULT_CONFIG. It goes on with the other
// startup paths, the collision resolution loop, a READY abort, commands the
// table does not allow and an asynchronous reset.
//
// After each clock all 91 output bits are compared with the values expected
// for the expected state. Half a clock after a new command, before the edge,
// the outputs must still show the old state (one clock of latency). The
// current state is recovered from Frame_ID, and the testbench counts each
// mechanism of the controller it sees happen; one never seen is a failure.
module tb_controller_t;

  logic        clock = 1'b0;
  logic        reset = 1'b0;
  logic [4:0]  command;
  logic [10:0] frame_id;
  logic [6:0]  payload_length;
  logic [10:0] header_crc;
  logic [5:0]  cycle_count;
  logic [7:0]  data_1, data_2, data_3, data_4;
  logic [7:0]  crc_1, crc_2, crc_3;

  controller_t dut (
    .clock(clock), .reset(reset), .command(command),
    .frame_id(frame_id), .payload_length(payload_length), .header_crc(header_crc),
    .cycle_count(cycle_count),
    .data_1(data_1), .data_2(data_2), .data_3(data_3), .data_4(data_4),
    .crc_1(crc_1), .crc_2(crc_2), .crc_3(crc_3)
  );

  always #10 clock = ~clock;

  // Frame_ID of each state code 0..17.
  localparam int FID [18] = '{'h000, 'h00F, 'h001, 'h004, 'h011, 'h012, 'h013, 'h021,
                              'h022, 'h029, 'h002, 'h003, 'h023, 'h026, 'h027, 'h024,
                              'h025, 'h028};

  // Host script: {command, state expected after the next clock edge}.
  localparam int N_STEPS = 45;
  localparam int STEPS [N_STEPS][2] = '{
    // configuration and wakeup
    '{'h00, 0}, '{'h01, 1}, '{'h02, 2}, '{'h04, 4}, '{'h05, 5}, '{'h06, 6},
    '{'h02, 2},
    // coldstart path joining a running cluster, into normal operation
    '{'h07, 7}, '{'h09, 9}, '{'h0D, 13}, '{'h10, 16}, '{'h0A, 10}, '{'h0B, 11},
    // normal active / passive, then halt and the automatic return
    '{'h0A, 10}, '{'h0B, 11}, '{'h0A, 10}, '{'h03, 3}, '{'h03, 0}, '{'h03, 0},
    // back to READY, CONFIG round trip
    '{'h01, 1}, '{'h02, 2}, '{'h01, 1}, '{'h02, 2},
    // integration listen falls back to coldstart; collision resolution loop
    '{'h08, 8}, '{'h07, 7}, '{'h0C, 12}, '{'h0F, 15}, '{'h11, 17}, '{'h0C, 12},
    // abort startup with READY
    '{'h02, 2},
    // integration path: listen, schedule, back to coldstart listen, consistency check
    '{'h08, 8}, '{'h09, 9}, '{'h07, 7}, '{'h09, 9}, '{'h0E, 14}, '{'h0A, 10},
    // commands the table does not allow are ignored
    '{'h1F, 10}, '{'h00, 10}, '{'h07, 10},
    // halt, then start again for the asynchronous reset below
    '{'h03, 3}, '{'h00, 0}, '{'h01, 1}, '{'h02, 2}, '{'h04, 4}, '{'h05, 5}
  };

  typedef enum int {
    M_WAKEUP, M_COLDSTART_JOIN, M_INTEGRATION, M_COLLISION_LOOP, M_PASSIVE,
    M_ACTIVE_AGAIN, M_HALT_RETURN, M_IGNORED, M_READY_ABORT, M_CONFIG_AGAIN,
    M_FALLBACK, M_ASYNC_RESET, M_COUNT
  } mech_e;
  localparam string MECH_NAME [M_COUNT] = '{
    "wakeup pattern sent and detected", "coldstart join into normal active",
    "integration consistency check into normal active", "coldstart gap back to collision resolution",
    "normal passive entered", "normal active re-entered", "halt returns to default config",
    "disallowed command ignored", "startup aborted to ready", "ready back to config",
    "startup falls back to coldstart listen", "asynchronous reset"
  };

  int checks = 0;
  int failures = 0;
  int seen [M_COUNT];

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int state_of_id(int id);
    for (int s = 0; s < 18; s++) if (FID[s] == id) return s;
    return -1;
  endfunction

  task automatic check_outputs(string what, int st);
    logic [90:0] got, want;
    got  = {frame_id, payload_length, header_crc, cycle_count,
            data_1, data_2, data_3, data_4, crc_1, crc_2, crc_3};
    want = {11'(FID[st]), 7'h02, 11'h002,
            6'((st == 0 || st == 1 || st == 2 || st == 4 || st == 5 || st == 6) ? 1 : 3),
            (st == 0) ? 56'h0 : 56'h55_5F_AC_33_00_95_00};
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: outputs %h expected %h (state %0d)", what, got, want, st);
    end
  endtask

  task automatic count(int prev, int cur, int cmd);
    if (prev == 6 && cur == 2) seen[M_WAKEUP]++;
    if (prev == 16 && cur == 10) seen[M_COLDSTART_JOIN]++;
    if (prev == 14 && cur == 10) seen[M_INTEGRATION]++;
    if (prev == 17 && cur == 12) seen[M_COLLISION_LOOP]++;
    if (prev == 10 && cur == 11) seen[M_PASSIVE]++;
    if (prev == 11 && cur == 10) seen[M_ACTIVE_AGAIN]++;
    if (prev == 3 && cur == 0) seen[M_HALT_RETURN]++;
    if (prev == cur && cmd != prev && prev != 3) seen[M_IGNORED]++;
    if (prev >= 7 && prev <= 17 && prev != 10 && prev != 11 && cur == 2) seen[M_READY_ABORT]++;
    if (prev == 2 && cur == 1) seen[M_CONFIG_AGAIN]++;
    if ((prev == 8 || prev == 9) && cur == 7) seen[M_FALLBACK]++;
  endtask

  initial begin
    int prev, cur, cycles;
    foreach (seen[i]) seen[i] = 0;
    command = 5'h00;
    #1 reset = 1'b1;
    #1 check_outputs("in reset", 0);
    @(posedge clock);
    @(negedge clock);
    reset = 1'b0;
    prev = 0;
    cycles = 0;

    for (int i = 0; i < N_STEPS; i++) begin
      command = 5'(STEPS[i][0]);
      #1 check_outputs($sformatf("step %0d before edge", i), prev);
      @(posedge clock);
      #1;
      cycles++;
      check_outputs($sformatf("step %0d cmd %02h", i, STEPS[i][0]), STEPS[i][1]);
      cur = state_of_id(int'(frame_id));
      count(prev, cur, STEPS[i][0]);
      prev = STEPS[i][1];
      @(negedge clock);
    end

    // One step per clock: the whole script takes exactly N_STEPS clocks.
    checks++;
    if (cycles != N_STEPS) begin
      failures++;
      $display("FAIL script took %0d clocks, expected %0d", cycles, N_STEPS);
    end

    // Asynchronous reset from WAKEUP_SEND, between clock edges.
    command = 5'h06;
    #3 reset = 1'b1;
    #1 check_outputs("asynchronous reset", 0);
    if (frame_id == 11'h000 && prev == 5) seen[M_ASYNC_RESET]++;
    @(posedge clock);
    #1 check_outputs("held in reset", 0);
    reset = 1'b0;

    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      $display("mechanism %-50s seen %0d", MECH_NAME[m], seen[m]);
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", MECH_NAME[m]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
