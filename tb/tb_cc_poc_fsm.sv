// tb_cc_poc_fsm -- self-checking testbench of the POC state machine.
//
// A reference model holds the list of allowed (state, command) moves as plain
// integer pairs and predicts the next state: HALT always returns to
// DEFAULT_CONFIG, a listed move is taken, anything else holds the state.
// The stimulus is a random walk: half of the commands are picked from the
// moves allowed in the model's current state, the other half are any 5-bit
// value, unused codes included. Every clock the DUT's state is compared with
// the model, and each listed move must have been taken at least once.
// It also checks that the move appears exactly one clock after the command
// and that reset acts at once, without a clock edge.
module tb_cc_poc_fsm;
  import flexray_cc_pkg::*;

  localparam int N_MOVES = 38;
  // {from, to}: the state operation table, then READY from the wakeup,
  // startup and normal states.
  localparam int MOVES [N_MOVES][2] = '{
    '{0, 1}, '{1, 2}, '{2, 4}, '{2, 7}, '{2, 8}, '{2, 1},
    '{4, 5}, '{5, 6}, '{6, 2},
    '{7, 9}, '{7, 12}, '{8, 7}, '{8, 9}, '{9, 7}, '{9, 13}, '{9, 14},
    '{10, 11}, '{10, 3}, '{11, 3}, '{11, 10},
    '{12, 15}, '{13, 16}, '{14, 10}, '{15, 17}, '{16, 10}, '{17, 12},
    '{4, 2}, '{5, 2}, '{7, 2}, '{8, 2}, '{9, 2}, '{10, 2}, '{11, 2},
    '{12, 2}, '{13, 2}, '{14, 2}, '{15, 2}, '{16, 2}
  };
  // COLDSTART_GAP (17) -> READY is the last one of the READY moves.
  localparam int EXTRA_FROM = 17;

  logic       clock = 1'b0;
  logic       reset = 1'b0;
  poc_state_e command;
  poc_state_e state;

  int checks = 0;
  int failures = 0;
  int taken [N_MOVES+1];
  int ref_state;

  cc_poc_fsm dut (.clock(clock), .reset(reset), .command(command), .state(state));

  always #5 clock = ~clock;

  initial begin : watchdog
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int move_index(int from, int cmd);
    for (int i = 0; i < N_MOVES; i++)
      if (MOVES[i][0] == from && MOVES[i][1] == cmd) return i;
    if (from == EXTRA_FROM && cmd == 2) return N_MOVES;
    return -1;
  endfunction

  function automatic int model_next(int from, int cmd);
    if (from == 3) return 0;
    if (move_index(from, cmd) >= 0) return cmd;
    return from;
  endfunction

  task automatic check(string what, int expect_state);
    checks++;
    if (int'(state) != expect_state) begin
      failures++;
      $display("FAIL %s: state %0d expected %0d", what, int'(state), expect_state);
    end
  endtask

  initial begin
    int cmd, idx, n_ok;
    int options [8];
    foreach (taken[i]) taken[i] = 0;
    command = DEFAULT_CONFIG;
    #1 reset = 1'b1;
    #1 check("reset", 0);
    repeat (2) @(posedge clock);
    #1 reset = 1'b0;
    ref_state = 0;

    // Latency: CONFIG appears one clock after the command, not earlier.
    command = CONFIG;
    @(posedge clock); #1;
    check("one-clock latency", 1);
    ref_state = 1;
    taken[0]++;

    for (int step = 0; step < 20000; step++) begin
      if ($urandom_range(1) == 0) begin
        n_ok = 0;
        for (int i = 0; i < N_MOVES; i++)
          if (MOVES[i][0] == ref_state) begin options[n_ok] = MOVES[i][1]; n_ok++; end
        if (ref_state == EXTRA_FROM) begin options[n_ok] = 2; n_ok++; end
        cmd = (n_ok > 0) ? options[$urandom_range(n_ok - 1)] : int'($urandom_range(31));
      end else begin
        cmd = int'($urandom_range(31));
      end
      command = poc_state_e'(cmd[4:0]);
      idx = (ref_state == 3) ? -1 : move_index(ref_state, cmd);
      if (idx >= 0) taken[idx]++;
      ref_state = model_next(ref_state, cmd);
      @(posedge clock); #1;
      check($sformatf("step %0d cmd %0d", step, cmd), ref_state);
    end

    // The walk must have reached HALT at least once (its one-clock exit is
    // checked by the per-step comparison above).
    checks++;
    if (taken[17] + taken[18] == 0) begin
      failures++;
      $display("FAIL HALT never entered");
    end

    // Asynchronous reset in the middle of a clock period.
    command = DEFAULT_CONFIG;
    @(negedge clock);
    if (state == DEFAULT_CONFIG) begin
      command = CONFIG;
      @(posedge clock); #1;
      command = DEFAULT_CONFIG;
    end
    @(negedge clock);
    #2 reset = 1'b1;
    #1 check("asynchronous reset", 0);
    #1 reset = 1'b0;

    for (int i = 0; i <= N_MOVES; i++) begin
      checks++;
      if (taken[i] == 0) begin
        failures++;
        $display("FAIL move %0d never exercised", i);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
