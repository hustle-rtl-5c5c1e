// hustle_ctrl: the OFF / IDLE / ACTIVE state machine of HUSTLE.
//
// Transitions, as in the unit's transition diagram:
//   OFF    -> IDLE   when enable is set
//   IDLE   -> OFF    when enable is cleared
//   IDLE   -> ACTIVE when the core issues a fetch inside the STL range
//   ACTIVE -> IDLE   when the core issues a fetch outside the STL range
// is_STL(address) is taken on every accepted fetch request (req_fire with
// req_is_stl). The request that moves IDLE to ACTIVE is itself answered by
// the ROM, and the one that moves ACTIVE to IDLE is itself sent to the IC:
// route_rom, a combinational output, tells the bypass logic where the
// current request goes. Clearing enable while ACTIVE takes effect once the
// core has left the STL (ACTIVE -> IDLE -> OFF), so a running STL is never
// cut off; the diagram has no ACTIVE -> OFF edge. Reset goes to OFF. These
// two points and the encoding of the states are choices of this design.
module hustle_ctrl
  import hustle_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          req_fire,
  input  logic          req_is_stl,
  output hustle_state_e state,
  output logic          route_rom
);

  hustle_state_e state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      ST_OFF:    if (enable) state_d = ST_IDLE;
      ST_IDLE: begin
        if (!enable)                      state_d = ST_OFF;
        else if (req_fire && req_is_stl)  state_d = ST_ACTIVE;
      end
      ST_ACTIVE: if (req_fire && !req_is_stl) state_d = ST_IDLE;
      default:   state_d = ST_OFF;
    endcase
  end

  // A request goes to the ROM when it lies in the STL range and the unit is
  // either ACTIVE already or IDLE with enable still set (entering ACTIVE).
  always_comb begin
    route_rom = 1'b0;
    if (req_is_stl) begin
      if (state == ST_ACTIVE)               route_rom = 1'b1;
      else if (state == ST_IDLE && enable)  route_rom = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_OFF;
    else        state <= state_d;
  end

endmodule
