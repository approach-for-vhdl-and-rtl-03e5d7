// tb_cc_frame_gen -- self-checking testbench of the frame structure outputs.
//
// Drives each of the 18 POC states into the block and compares every frame
// field with a table of expected values kept here as one row per state:
// Frame_ID and Cycle_Count, plus whether payload and trailer bytes are
// present (all states but DEFAULT_CONFIG). It also checks that the 18
// Frame_ID codes are all different, since a reader of the outputs tells the
// state from them.
module tb_cc_frame_gen;
  import flexray_cc_pkg::*;

  // {state code, Frame_ID, Cycle_Count, bytes present}
  localparam int ROWS [18][4] = '{
    '{ 0, 'h000, 1, 0}, '{ 1, 'h00F, 1, 1}, '{ 2, 'h001, 1, 1}, '{ 3, 'h004, 3, 1},
    '{ 4, 'h011, 1, 1}, '{ 5, 'h012, 1, 1}, '{ 6, 'h013, 1, 1}, '{ 7, 'h021, 3, 1},
    '{ 8, 'h022, 3, 1}, '{ 9, 'h029, 3, 1}, '{10, 'h002, 3, 1}, '{11, 'h003, 3, 1},
    '{12, 'h023, 3, 1}, '{13, 'h026, 3, 1}, '{14, 'h027, 3, 1}, '{15, 'h024, 3, 1},
    '{16, 'h025, 3, 1}, '{17, 'h028, 3, 1}
  };
  localparam int DATA_ON [4] = '{'h55, 'h5F, 'hAC, 'h33};
  localparam int CRC_ON  [3] = '{'h00, 'h95, 'h00};

  poc_state_e state;
  cc_frame_t  frame;
  int checks = 0;
  int failures = 0;
  int seen_id [18];

  cc_frame_gen dut (.state(state), .frame(frame));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, want);
    end
  endtask

  initial begin
    for (int r = 0; r < 18; r++) begin
      state = poc_state_e'(ROWS[r][0][4:0]);
      #10;
      expect_eq($sformatf("state %0d frame_id", r), int'(frame.frame_id), ROWS[r][1]);
      expect_eq($sformatf("state %0d payload_length", r), int'(frame.payload_length), 'h02);
      expect_eq($sformatf("state %0d header_crc", r), int'(frame.header_crc), 'h002);
      expect_eq($sformatf("state %0d cycle_count", r), int'(frame.cycle_count), ROWS[r][2]);
      for (int b = 0; b < 4; b++)
        expect_eq($sformatf("state %0d data_%0d", r, b + 1), int'(frame.data[b]),
                  ROWS[r][3] ? DATA_ON[b] : 0);
      for (int b = 0; b < 3; b++)
        expect_eq($sformatf("state %0d crc_%0d", r, b + 1), int'(frame.crc[b]),
                  ROWS[r][3] ? CRC_ON[b] : 0);
      seen_id[r] = int'(frame.frame_id);
    end
    for (int i = 0; i < 18; i++)
      for (int j = i + 1; j < 18; j++) begin
        checks++;
        if (seen_id[i] == seen_id[j]) begin
          failures++;
          $display("FAIL states %0d and %0d share Frame_ID %0h", i, j, seen_id[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
