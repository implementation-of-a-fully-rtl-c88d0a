// tb_state_timer: checks the unit counter with and without a prescaler.
//
// Two instances run side by side: one with one clock cycle per unit, one
// with UNIT_CYCLES = 3. A cycle-by-cycle reference model of each (a cycle
// counter and a unit counter, cleared together) is compared with the count
// and tick outputs while clear is pulsed at random, including the wrap of
// the 5-bit count at 32.
module tb_state_timer;
  localparam int unsigned CW = 5;
  localparam int unsigned UC = 3;

  logic clk = 0, rst = 1, clear = 0;
  logic tick1, tick3;
  logic [CW-1:0] count1, count3;
  int checks = 0, failures = 0;
  int exp_cyc3, exp_cnt1, exp_cnt3;
  int wraps = 0;

  state_timer #(.CW(CW), .UNIT_CYCLES(1))  dut1 (.clk, .rst, .clear, .tick(tick1), .count(count1));
  state_timer #(.CW(CW), .UNIT_CYCLES(UC)) dut3 (.clk, .rst, .clear, .tick(tick3), .count(count3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    exp_cyc3 = 0; exp_cnt1 = 0; exp_cnt3 = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      // Long stretches without clear so the count wraps, then random clears.
      clear = (n < 400) ? 1'b0 : ($urandom_range(0, 19) == 0);
      #1;
      check("tick1", int'(tick1), 1);
      check("tick3", int'(tick3), int'(exp_cyc3 == UC - 1));
      check("count1", int'(count1), exp_cnt1);
      check("count3", int'(count3), exp_cnt3);
      @(posedge clk);
      // Reference update for this edge.
      if (clear) begin
        exp_cnt1 = 0; exp_cnt3 = 0; exp_cyc3 = 0;
      end else begin
        if (exp_cnt1 == 31) wraps++;
        exp_cnt1 = (exp_cnt1 + 1) % 32;
        if (exp_cyc3 == UC - 1) begin
          exp_cyc3 = 0;
          exp_cnt3 = (exp_cnt3 + 1) % 32;
        end else exp_cyc3++;
      end
      #1;
    end
    check("wrap seen", int'(wraps > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
