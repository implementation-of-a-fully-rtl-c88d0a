// light_decoder: the controller's state table, from state to display codes.
//
// Purely combinational. Each even state gives one road green and the rest
// red; each odd (safe) state shows yellow on the road whose green has just
// ended and on the road whose green comes next, red on the other two:
//
//   state  north  east  south  west
//   S0     G      R     R      R
//   S1     Y      Y     R      R
//   S2     R      G     R      R
//   S3     R      Y     Y      R
//   S4     R      R     G      R
//   S5     R      R     Y      Y
//   S6     R      R     R      G
//   S7     Y      R     R      Y
//
// The table is the reference design's; only the structured output is this
// design's choice.
module light_decoder
  import tlc_pkg::*;
(
  input  state_e  state,
  output lights_t lights
);

  always_comb begin
    lights = '{north: LIGHT_RED, east: LIGHT_RED, south: LIGHT_RED, west: LIGHT_RED};
    unique case (state)
      S0: lights.north = LIGHT_GREEN;
      S1: begin lights.north = LIGHT_YELLOW; lights.east  = LIGHT_YELLOW; end
      S2: lights.east  = LIGHT_GREEN;
      S3: begin lights.east  = LIGHT_YELLOW; lights.south = LIGHT_YELLOW; end
      S4: lights.south = LIGHT_GREEN;
      S5: begin lights.south = LIGHT_YELLOW; lights.west  = LIGHT_YELLOW; end
      S6: lights.west  = LIGHT_GREEN;
      S7: begin lights.west  = LIGHT_YELLOW; lights.north = LIGHT_YELLOW; end
    endcase
  end

endmodule
