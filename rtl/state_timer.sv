// state_timer: counts the time units spent in the controller's current state.
//
// A time unit is UNIT_CYCLES clock cycles. With the default of 1 a unit is
// one clock cycle, so the state lengths of the state table (16, 8 and 4) are
// clock cycles; with UNIT_CYCLES = 10_000_000 on a 10 MHz clock a unit is one
// second, the reading the controller's timing description gives. The
// prescaler is this design's own way of offering both.
//
// Interface and timing:
//   clear  synchronous: count and prescaler return to 0 on the next edge.
//   tick   high in the last clock cycle of every unit (always high when
//          UNIT_CYCLES = 1); count goes up by one at the edge that ends it.
//   count  whole units elapsed since the last clear; wraps at 2**CW.
//   rst    synchronous, active high, same effect as clear.
module state_timer #(
  parameter int unsigned CW          = tlc_pkg::COUNT_W,
  parameter int unsigned UNIT_CYCLES = 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  output logic          tick,
  output logic [CW-1:0] count
);

  if (UNIT_CYCLES <= 1) begin : g_no_prescale
    assign tick = 1'b1;
  end else begin : g_prescale
    localparam int unsigned PW = $clog2(UNIT_CYCLES);
    localparam logic [PW-1:0] LAST = PW'(UNIT_CYCLES - 1);
    logic [PW-1:0] pre;

    always_ff @(posedge clk) begin
      if (rst || clear || pre == LAST) pre <= '0;
      else                             pre <= pre + 1'b1;
    end

    assign tick = (pre == LAST);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else if (tick)    count <= count + 1'b1;
  end

endmodule
