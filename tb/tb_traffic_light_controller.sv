// tb_traffic_light_controller: end-to-end test of the whole controller at its
// default parameters (state lengths 16/4/8/4/16/4/8/4 clock cycles).
//
// A cycle-level reference model, written independently of the RTL, predicts
// state, count and the four light codes every cycle. The run has three parts:
//   1. every road busy for three full cycles: checks the table order, the
//      lengths of every state and the 64-cycle period;
//   2. random vehicle sensors: green phases of empty roads end early;
//   3. resets in the middle of a cycle.
// Lamp enables are checked along with the light codes.
// It counts how often each mechanism happened (full cycles, each yellow safe
// state, early end per road, mid-cycle reset) and counts a failure for any
// that never did.
module tb_traffic_light_controller;
  // Expected {north, east, south, west} light codes per state, 1 green,
  // 2 yellow, 3 red.
  localparam logic [7:0] LIGHTS [8] = '{
    8'b01_11_11_11, 8'b10_10_11_11, 8'b11_01_11_11, 8'b11_10_10_11,
    8'b11_11_01_11, 8'b11_11_10_10, 8'b11_11_11_01, 8'b10_11_11_10
  };
  localparam int LEN [8] = '{16, 4, 8, 4, 16, 4, 8, 4};

  logic clk, rst = 1;
  logic n_traffic, e_traffic, s_traffic, w_traffic;
  logic [1:0] north_lights, east_lights, south_lights, west_lights;
  logic [2:0] north_lamps, east_lamps, south_lamps, west_lamps;
  logic [2:0] state;
  logic [4:0] count;

  traffic_light_controller dut (.*);

  int checks = 0, failures = 0;
  int exp_state, exp_count;
  int n_full = 0, n_resets = 0;
  int n_early [4] = '{0, 0, 0, 0};
  int n_yellow [4] = '{0, 0, 0, 0};
  int cyc = 0, last_s0_start = -1, period_checks = 0;
  logic [3:0] traffic;
  bit adv, early;
  bit all_busy;  // every sensor high since the last start of S0

  assign {w_traffic, s_traffic, e_traffic, n_traffic} = traffic;

  initial clk = 1'b0;
  always #50 clk = ~clk;  // 10 MHz

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // {red, yellow, green} lamp enables for a light code.
  function automatic logic [2:0] lamp(logic [1:0] code);
    return code == 2'd1 ? 3'b001 : code == 2'd2 ? 3'b010 : 3'b100;
  endfunction

  task automatic step(bit do_rst);
    rst = do_rst;
    #1;
    check("state", int'(state), exp_state);
    check("count", int'(count), exp_count);
    check("lights", int'({north_lights, east_lights, south_lights, west_lights}),
          int'(LIGHTS[exp_state]));
    check("lamps", int'({north_lamps, east_lamps, south_lamps, west_lamps}),
          int'({lamp(LIGHTS[exp_state][7:6]), lamp(LIGHTS[exp_state][5:4]),
                lamp(LIGHTS[exp_state][3:2]), lamp(LIGHTS[exp_state][1:0])}));
    early = (exp_state % 2 == 0) && !traffic[exp_state / 2] && exp_count != LEN[exp_state] - 1;
    adv   = early || exp_count == LEN[exp_state] - 1;
    if (traffic != 4'hF) all_busy = 1'b0;
    @(posedge clk);
    cyc++;
    if (do_rst) begin
      if (exp_state != 0 || exp_count != 0) n_resets++;
      exp_state = 0; exp_count = 0;
      last_s0_start = -1;
    end else if (adv) begin
      if (early) n_early[exp_state / 2]++;
      if (exp_state % 2 == 1) n_yellow[exp_state / 2]++;
      if (exp_state == 7) begin
        n_full++;
        // With every road busy, S0 must come round every 64 cycles.
        if (all_busy && last_s0_start >= 0) begin
          check("cycle period", cyc - last_s0_start, 64);
          period_checks++;
        end
        last_s0_start = cyc;
        all_busy = 1'b1;
      end
      exp_state = (exp_state + 1) % 8;
      exp_count = 0;
    end else exp_count++;
    #1;
  endtask

  initial begin
    traffic = 4'hF;
    exp_state = 0; exp_count = 0;
    repeat (2) @(posedge clk);
    #1;
    step(1'b1);
    last_s0_start = cyc;
    all_busy = 1'b1;
    // 1. all roads busy: three full cycles
    repeat (3 * 64) step(1'b0);
    check("three cycles end in S0", exp_state, 0);
    // 2. random sensors, changing now and then
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 7) == 0)
        for (int r = 0; r < 4; r++) traffic[r] = $urandom_range(0, 2) != 0;
      step(1'b0);
    end
    // 3. resets in the middle of a cycle, then busy roads again
    traffic = 4'hF;
    for (int k = 0; k < 4; k++) begin
      repeat ($urandom_range(5, 60)) step(1'b0);
      step(1'b1);
    end
    last_s0_start = cyc;
    all_busy = 1'b1;
    repeat (2 * 64) step(1'b0);

    check("period checked", int'(period_checks >= 3), 1);
    check("mid-cycle reset seen", int'(n_resets > 0), 1);
    for (int r = 0; r < 4; r++) begin
      check("early end seen", int'(n_early[r] > 0), 1);
      check("yellow state seen", int'(n_yellow[r] > 0), 1);
    end
    $display("full cycles %0d, early ends N%0d E%0d S%0d W%0d, yellow states %0d/%0d/%0d/%0d, resets %0d",
             n_full, n_early[0], n_early[1], n_early[2], n_early[3],
             n_yellow[0], n_yellow[1], n_yellow[2], n_yellow[3], n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
