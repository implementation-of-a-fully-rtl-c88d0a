// traffic_light_controller: fully automatic controller for a four-way
// intersection.
//
// Each approach road (north, east, south, west) has one display group that
// shows red, yellow or green, coded 3, 2 and 1 on a 2-bit output. An
// eight-state machine gives green to one road at a time in the order north,
// east, south, west, with a yellow "safe" state between every two greens in
// which both the outgoing and the incoming road show yellow. State lengths
// default to the state table's 16/4/8/4/16/4/8/4 time units (64 per cycle);
// a time unit is UNIT_CYCLES clock cycles (1 by default, so the table's
// clock-cycle counts hold; 10_000_000 gives seconds at the 10 MHz clock the
// reference design targets).
//
// Vehicle detection: a road whose sensor (x_traffic) shows no vehicle while it
// has green loses green at the next clock edge; the yellow state that follows
// still runs in full. This rule is this design's own; the sensors themselves
// are external.
//
// Each road's code also drives three separate lamp enables, {red, yellow,
// green} on x_lamps, which the lamps of all three displays of that road
// share (the three turn directions of a road are switched together).
//
// Structure: state_timer counts units in the current state, tlc_fsm holds
// the state and decides when to leave it, light_decoder turns the state into
// the four light codes and lamp_driver turns each code into lamp enables. All state is reset synchronously (rst, active high)
// to S0 with the count at 0. The lights, state and count are outputs of
// registers through combinational decoding only; they follow the state one
// clock edge after the FSM decides to advance.
module traffic_light_controller
  import tlc_pkg::*;
#(
  parameter int unsigned UNIT_CYCLES = 1,
  parameter int unsigned T_MAIN      = T_MAIN_DEFAULT,
  parameter int unsigned T_SIDE      = T_SIDE_DEFAULT,
  parameter int unsigned T_YELLOW    = T_YELLOW_DEFAULT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               n_traffic,
  input  logic               e_traffic,
  input  logic               s_traffic,
  input  logic               w_traffic,
  output logic [1:0]         north_lights,
  output logic [1:0]         east_lights,
  output logic [1:0]         south_lights,
  output logic [1:0]         west_lights,
  output logic [2:0]         north_lamps,
  output logic [2:0]         east_lamps,
  output logic [2:0]         south_lamps,
  output logic [2:0]         west_lamps,
  output logic [2:0]         state,
  output logic [COUNT_W-1:0] count
);

  logic    tick, advance, early_end;
  state_e  st;
  lights_t lights;
  logic [3:0] traffic;

  assign traffic = {w_traffic, s_traffic, e_traffic, n_traffic};

  state_timer #(
    .CW         (COUNT_W),
    .UNIT_CYCLES(UNIT_CYCLES)
  ) u_timer (
    .clk  (clk),
    .rst  (rst),
    .clear(advance),
    .tick (tick),
    .count(count)
  );

  tlc_fsm #(
    .CW      (COUNT_W),
    .T_MAIN  (T_MAIN),
    .T_SIDE  (T_SIDE),
    .T_YELLOW(T_YELLOW)
  ) u_fsm (
    .clk      (clk),
    .rst      (rst),
    .tick     (tick),
    .count    (count),
    .traffic  (traffic),
    .state    (st),
    .advance  (advance),
    .early_end(early_end)
  );

  light_decoder u_dec (
    .state (st),
    .lights(lights)
  );

  // Separate red / yellow / green enables for the lamps of each road.
  lamp_driver u_lamp_n (.code(lights.north), .lamps(north_lamps));
  lamp_driver u_lamp_e (.code(lights.east),  .lamps(east_lamps));
  lamp_driver u_lamp_s (.code(lights.south), .lamps(south_lamps));
  lamp_driver u_lamp_w (.code(lights.west),  .lamps(west_lamps));

  assign state        = st;
  assign north_lights = lights.north;
  assign east_lights  = lights.east;
  assign south_lights = lights.south;
  assign west_lights  = lights.west;

  // Safety rules of the intersection.
  function automatic int unsigned n_green(lights_t l);
    return int'(l.north == LIGHT_GREEN) + int'(l.east == LIGHT_GREEN)
         + int'(l.south == LIGHT_GREEN) + int'(l.west == LIGHT_GREEN);
  endfunction

  // An early end only ever cuts a green state short.
  a_early_in_green: assert property (@(posedge clk) disable iff (rst)
    early_end |-> n_green(lights) == 1);

  // Never more than one road on green.
  a_one_green: assert property (@(posedge clk) disable iff (rst) n_green(lights) <= 1);

  // A green light is always followed by green or yellow, never directly red.
  a_n_green_yellow: assert property (@(posedge clk) disable iff (rst)
    lights.north == LIGHT_GREEN |=> lights.north != LIGHT_RED || $past(rst));
  a_e_green_yellow: assert property (@(posedge clk) disable iff (rst)
    lights.east  == LIGHT_GREEN |=> lights.east  != LIGHT_RED || $past(rst));
  a_s_green_yellow: assert property (@(posedge clk) disable iff (rst)
    lights.south == LIGHT_GREEN |=> lights.south != LIGHT_RED || $past(rst));
  a_w_green_yellow: assert property (@(posedge clk) disable iff (rst)
    lights.west  == LIGHT_GREEN |=> lights.west  != LIGHT_RED || $past(rst));

endmodule
