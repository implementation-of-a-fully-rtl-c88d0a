// tlc_fsm: state register and next-state logic of the traffic light controller.
//
// The states run S0 -> S1 -> ... -> S7 -> S0. A state lasts as many time units
// as the state table gives it (T_MAIN for S0/S4, T_SIDE for S2/S6, T_YELLOW
// for the yellow states); the state timer counts those units and the FSM
// leaves a state in the last cycle of its last unit. With all sensors showing
// vehicles one cycle takes 2*T_MAIN + 2*T_SIDE + 4*T_YELLOW units (64 by
// default).
//
// Vehicle detection: traffic[r] is high while a vehicle is detected on road r
// (index order N, E, S, W). If, in a green state, the sensor of the road that
// has green shows no vehicle, the green ends at the next clock edge and the
// controller moves on to the following yellow state. Yellow states always run
// for their full length, so a road is never switched from green straight to
// red. The reference design names vehicle detection but does not give this
// rule; it is this design's own choice, as is the synchronous reset to S0.
//
// Interface and timing:
//   tick, count  from state_timer; count = whole units spent in the state.
//   state        registered; changes on the edge after `advance` is high.
//   advance      combinational; high in the last cycle of a state. Feed it
//                to the timer's clear so the next state starts at count 0.
//   early_end    combinational; high when advance comes from an empty road.
module tlc_fsm
  import tlc_pkg::*;
#(
  parameter int unsigned CW       = COUNT_W,
  parameter int unsigned T_MAIN   = T_MAIN_DEFAULT,
  parameter int unsigned T_SIDE   = T_SIDE_DEFAULT,
  parameter int unsigned T_YELLOW = T_YELLOW_DEFAULT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tick,
  input  logic [CW-1:0] count,
  input  logic [3:0]    traffic,
  output state_e        state,
  output logic          advance,
  output logic          early_end
);

  // The longest state must fit the timer.
  initial begin
    assert (T_MAIN >= 1 && T_SIDE >= 1 && T_YELLOW >= 1)
      else $error("tlc_fsm: state lengths must be at least 1");
    assert (T_MAIN <= 2**CW && T_SIDE <= 2**CW && T_YELLOW <= 2**CW)
      else $error("tlc_fsm: state length does not fit a %0d-bit timer", CW);
  end

  // Count value of the last unit of the current state.
  logic [CW-1:0] last_unit;
  always_comb begin
    unique case (state)
      S0, S4:  last_unit = CW'(T_MAIN - 1);
      S2, S6:  last_unit = CW'(T_SIDE - 1);
      default: last_unit = CW'(T_YELLOW - 1);
    endcase
  end

  logic time_up;
  assign time_up   = tick && (count == last_unit);
  assign early_end = is_green_state(state) && !traffic[green_road(state)] && !time_up;
  assign advance   = time_up || early_end;

  always_ff @(posedge clk) begin
    if (rst)          state <= S0;
    else if (advance) state <= state_e'(state + 3'd1);
  end

endmodule
