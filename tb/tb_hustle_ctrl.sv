// tb_hustle_ctrl: self-checking test of the OFF / IDLE / ACTIVE controller.
//
// Random enable, request and address-decode inputs are applied for a few
// thousand cycles. A reference model written from the transition list
// (OFF->IDLE on enable, IDLE->OFF on !enable, IDLE->ACTIVE on an STL fetch,
// ACTIVE->IDLE on a non-STL fetch, reset to OFF) predicts the state and the
// routing decision every cycle. Each transition must occur at least once.
module tb_hustle_ctrl;
  import hustle_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, req_fire = 1'b0, req_is_stl = 1'b0;
  hustle_state_e state, ref_state;
  logic route_rom, ref_route;
  int checks = 0, failures = 0;
  int n_off_idle = 0, n_idle_off = 0, n_idle_act = 0, n_act_idle = 0;

  hustle_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic model_route(hustle_state_e s, logic en, logic stl);
    return stl && ((s == ST_ACTIVE) || (s == ST_IDLE && en));
  endfunction

  initial begin
    ref_state = ST_OFF;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // enable changes rarely, so the unit spends time in every state
      if ($urandom_range(0, 15) == 0) enable = ~enable;
      req_fire   = ($urandom_range(0, 2) != 0);
      req_is_stl = ($urandom_range(0, 1) != 0);
      #1;
      ref_route = model_route(ref_state, enable, req_is_stl);
      checks++;
      if (state !== ref_state || route_rom !== ref_route) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: state %0d/%0d route %0d/%0d", cyc, state, ref_state,
                   route_rom, ref_route);
      end
      @(posedge clk);
      case (ref_state)
        ST_OFF:    if (enable) begin ref_state = ST_IDLE; n_off_idle++; end
        ST_IDLE:   if (!enable) begin ref_state = ST_OFF; n_idle_off++; end
                   else if (req_fire && req_is_stl) begin ref_state = ST_ACTIVE; n_idle_act++; end
        ST_ACTIVE: if (req_fire && !req_is_stl) begin ref_state = ST_IDLE; n_act_idle++; end
        default:   ref_state = ST_OFF;
      endcase
      #1;
    end
    // reset returns to OFF
    rst_n = 1'b0; #1;
    checks++;
    if (state !== ST_OFF) failures++;
    $display("transitions: off->idle %0d idle->off %0d idle->active %0d active->idle %0d",
             n_off_idle, n_idle_off, n_idle_act, n_act_idle);
    checks++;
    if (n_off_idle == 0 || n_idle_off == 0 || n_idle_act == 0 || n_act_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
