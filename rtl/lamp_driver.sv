// lamp_driver: turns one display's 2-bit light code into separate red, yellow
// and green lamp enables.
//
// The controller carries each display as a code (1 green, 2 yellow, 3 red);
// the lamps of a display are separate outputs, one per colour, and exactly
// one of them is lit. The unused code 0 never comes out of the controller;
// should it appear, this design lights red, the safe choice.
//
// Combinational; lamps = {red, yellow, green}, active high.
module lamp_driver
  import tlc_pkg::*;
(
  input  light_e     code,
  output logic [2:0] lamps
);

  always_comb begin
    unique case (code)
      LIGHT_GREEN:  lamps = 3'b001;
      LIGHT_YELLOW: lamps = 3'b010;
      default:      lamps = 3'b100;  // LIGHT_RED, and the unused code 0
    endcase
  end

endmodule
