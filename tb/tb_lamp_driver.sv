// tb_lamp_driver: checks the lamp enables for all four 2-bit codes.
//
// Expected {red, yellow, green}: code 1 -> green only, 2 -> yellow only,
// 3 -> red only, and the unused code 0 -> red only.
module tb_lamp_driver;
  import tlc_pkg::*;

  logic [1:0] code;
  logic [2:0] lamps;
  int checks = 0, failures = 0;

  localparam logic [2:0] EXPECTED [4] = '{3'b100, 3'b001, 3'b010, 3'b100};

  lamp_driver dut (.code(light_e'(code)), .lamps(lamps));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      code = 2'(i);
      #1;
      checks++;
      if (lamps !== EXPECTED[i]) begin
        failures++;
        $display("code %0d: lamps %b, expected %b", i, lamps, EXPECTED[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
