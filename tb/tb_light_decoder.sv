// tb_light_decoder: checks every entry of the state table.
//
// The expected codes are written here as one 8-bit word per state
// (north, east, south, west, two bits each; 1 green, 2 yellow, 3 red) and
// compared with the decoder's output for all eight states.
module tb_light_decoder;
  import tlc_pkg::*;

  state_e  state;
  lights_t lights;
  int checks = 0, failures = 0;

  light_decoder dut (.state(state), .lights(lights));

  // {north, east, south, west} per state S0..S7.
  localparam logic [7:0] EXPECTED [8] = '{
    8'b01_11_11_11,  // S0
    8'b10_10_11_11,  // S1
    8'b11_01_11_11,  // S2
    8'b11_10_10_11,  // S3
    8'b11_11_01_11,  // S4
    8'b11_11_10_10,  // S5
    8'b11_11_11_01,  // S6
    8'b10_11_11_10   // S7
  };

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      state = state_e'(i);
      #1;
      checks++;
      if ({lights.north, lights.east, lights.south, lights.west} !== EXPECTED[i]) begin
        failures++;
        $display("S%0d: got N%0d E%0d S%0d W%0d, expected %b", i,
                 lights.north, lights.east, lights.south, lights.west, EXPECTED[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
