// tb_tlc_seconds: the signal cycle in real time units.
//
// The controller runs at 10 MHz with UNIT_CYCLES = 10_000_000, so one time
// unit is one second and the state lengths become 16 s, 4 s, 8 s and 4 s.
// With every road busy the testbench timestamps each state change and checks
// the length of S0, S1, S2 and S3 in simulated time and the 32 s they take
// together, half of the 64 s cycle; S4..S7 repeat the same three lengths and
// are left out to keep the run to 320 million clock cycles. Only state
// changes are watched, to keep those cycles fast to simulate.
module tb_tlc_seconds;
  localparam longint NS_PER_S = 64'd1_000_000_000;
  localparam int     LEN [8] = '{16, 4, 8, 4, 16, 4, 8, 4};

  logic clk, rst;
  logic [1:0] north_lights, east_lights, south_lights, west_lights;
  logic [2:0] north_lamps, east_lamps, south_lamps, west_lamps;
  logic [2:0] state;
  logic [4:0] count;
  int checks = 0, failures = 0;
  longint t_enter, t_cycle;

  traffic_light_controller #(.UNIT_CYCLES(10_000_000)) dut (
    .clk, .rst,
    .n_traffic(1'b1), .e_traffic(1'b1), .s_traffic(1'b1), .w_traffic(1'b1),
    .north_lights, .east_lights, .south_lights, .west_lights,
    .north_lamps, .east_lamps, .south_lamps, .west_lamps, .state, .count
  );

  initial clk = 1'b0;
  always #50 clk = ~clk;  // 10 MHz

  initial begin
    #(40 * NS_PER_S);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("reset state", longint'(state), 0);
    t_enter = $time - 1;  // S0's first unit starts at the last reset edge
    t_cycle = t_enter;
    for (int s = 0; s < 4; s++) begin
      @(state);
      check("state order", longint'(state), longint'((s + 1) % 8));
      check("state length (ns)", $time - t_enter, longint'(LEN[s]) * NS_PER_S);
      $display("S%0d lasted %0d s", s, ($time - t_enter) / NS_PER_S);
      t_enter = $time;
    end
    check("half cycle length (ns)", $time - t_cycle, 32 * NS_PER_S);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
