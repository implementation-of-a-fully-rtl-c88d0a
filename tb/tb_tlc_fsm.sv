// tb_tlc_fsm: checks the state sequence, the state lengths and the vehicle
// detection rule of the controller FSM on its own.
//
// The testbench plays the part of the state timer: it counts units itself,
// drives a random tick (so units last a random number of cycles) and clears
// its count when its own model says the state ends. The model knows the
// table lengths 16/4/8/4/16/4/8/4 and the rule that a green road whose
// sensor shows no vehicle loses green at once. State and advance are
// compared every cycle; a mid-run reset is checked too.
module tb_tlc_fsm;
  import tlc_pkg::*;
  localparam int unsigned CW = 5;
  localparam int LEN [8] = '{16, 4, 8, 4, 16, 4, 8, 4};

  logic clk = 0, rst = 1, tick = 0;
  logic [CW-1:0] count;
  logic [3:0] traffic;
  state_e state;
  logic advance, early_end;

  int checks = 0, failures = 0;
  int exp_state, exp_count;
  int n_early = 0, n_full = 0, n_wraps = 0;
  bit exp_adv, exp_early, time_up;

  tlc_fsm #(.CW(CW)) dut (.clk, .rst, .tick, .count, .traffic, .state, .advance, .early_end);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    exp_state = 0; exp_count = 0;
    traffic = 4'hF;
    count = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 6000; n++) begin
      // Phase 1: every road busy, tick every cycle. Phase 2: random sensors
      // (mostly busy) and random ticks. A reset lands in the middle.
      if (n < 300) begin
        tick = 1'b1;
        traffic = 4'hF;
      end else begin
        tick = $urandom_range(0, 2) != 0;
        if ($urandom_range(0, 9) == 0)
          for (int r = 0; r < 4; r++) traffic[r] = $urandom_range(0, 3) != 0;
      end
      rst = (n == 3001);
      count = CW'(exp_count);
      #1;
      time_up   = tick && (exp_count == LEN[exp_state] - 1);
      exp_early = (exp_state % 2 == 0) && !traffic[exp_state / 2] && !time_up;
      exp_adv   = time_up || exp_early;
      check("state", int'(state), exp_state);
      check("advance", int'(advance), int'(exp_adv));
      check("early_end", int'(early_end), int'(exp_early));
      @(posedge clk);
      if (rst) begin
        exp_state = 0; exp_count = 0;
      end else if (exp_adv) begin
        if (exp_early) n_early++;
        if (exp_state == 7) n_full++;
        exp_state = (exp_state + 1) % 8;
        exp_count = 0;
      end else if (tick) exp_count++;
      #1;
    end
    check("early ends seen", int'(n_early > 0), 1);
    check("full cycles seen", int'(n_full > 0), 1);
    $display("early ends %0d, full cycles %0d", n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
