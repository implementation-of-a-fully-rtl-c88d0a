// tlc_pkg: types and constants shared by the four-way traffic light controller.
//
// The controller cycles through eight binary-encoded states S0..S7. The even
// states give one road a green light (S0 north, S2 east, S4 south, S6 west);
// the odd states are the yellow "safe" states between two greens, in which the
// road that is losing green and the road that is about to gain it both show
// yellow. Every display is driven with a 2-bit code: 1 = green, 2 = yellow,
// 3 = red, as in the controller's state table. Code 0 is never produced.
//
// Default state lengths follow the state table: 16 time units for S0 and S4,
// 8 for S2 and S6 and 4 for each yellow state, 64 units for a whole cycle.
package tlc_pkg;

  // Binary state encoding, S0..S7 in table order.
  typedef enum logic [2:0] {
    S0 = 3'd0,  // north green
    S1 = 3'd1,  // north / east yellow
    S2 = 3'd2,  // east green
    S3 = 3'd3,  // east / south yellow
    S4 = 3'd4,  // south green
    S5 = 3'd5,  // south / west yellow
    S6 = 3'd6,  // west green
    S7 = 3'd7   // west / north yellow
  } state_e;

  // Light code of one display.
  typedef enum logic [1:0] {
    LIGHT_GREEN  = 2'd1,
    LIGHT_YELLOW = 2'd2,
    LIGHT_RED    = 2'd3
  } light_e;

  // The four displays, one per approach road.
  typedef struct packed {
    light_e north;
    light_e east;
    light_e south;
    light_e west;
  } lights_t;

  // Road index used for the vehicle-sensor vector.
  typedef enum logic [1:0] {
    ROAD_N = 2'd0,
    ROAD_E = 2'd1,
    ROAD_S = 2'd2,
    ROAD_W = 2'd3
  } road_e;

  // Default state lengths, in time units.
  localparam int unsigned T_MAIN_DEFAULT   = 16;  // S0, S4
  localparam int unsigned T_SIDE_DEFAULT   = 8;   // S2, S6
  localparam int unsigned T_YELLOW_DEFAULT = 4;   // S1, S3, S5, S7

  // Width of the state timer, as wide as the 5-bit count of the reference
  // simulation; holds values up to 31.
  localparam int unsigned COUNT_W = 5;

  // True for the green states S0, S2, S4, S6.
  function automatic logic is_green_state(state_e s);
    return s inside {S0, S2, S4, S6};
  endfunction

  // Road that has green in a green state: S0->N, S2->E, S4->S, S6->W.
  function automatic road_e green_road(state_e s);
    unique case (s)
      S0, S1:  return ROAD_N;
      S2, S3:  return ROAD_E;
      S4, S5:  return ROAD_S;
      default: return ROAD_W;
    endcase
  endfunction

endpackage
