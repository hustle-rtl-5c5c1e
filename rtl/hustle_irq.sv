// hustle_irq: event-triggered STL scheduling, IC miss to interrupt request.
//
// An IC miss leaves the core waiting for the refill. HUSTLE turns the miss
// into an interrupt so that the core runs the STL, its interrupt service
// routine, from the ROM during that wait. irq is a level request to the
// interrupt controller: it is set in the cycle after ic_miss is seen while
// the unit is IDLE, and held until the core has entered the STL (state
// ACTIVE) or the unit is turned OFF. Misses seen while ACTIVE or OFF raise
// nothing. Using the miss as the trigger follows the document; the level
// form of the request and its clearing rule are choices of this design.
module hustle_irq
  import hustle_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ic_miss,
  input  hustle_state_e state,
  output logic          irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       irq <= 1'b0;
    else if (state != ST_IDLE)        irq <= 1'b0;
    else if (ic_miss)                 irq <= 1'b1;
  end

endmodule
