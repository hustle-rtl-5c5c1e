// tb_hustle_irq: self-checking test of the miss-triggered interrupt request.
//
// The state and the IC miss line are driven at random. A reference model
// predicts irq: set the cycle after a miss seen in IDLE, held, and cleared
// once the state is ACTIVE or OFF. Setting, holding and both kinds of
// clearing must each occur.
module tb_hustle_irq;
  import hustle_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ic_miss = 1'b0;
  hustle_state_e state = ST_OFF;
  logic irq, ref_irq;
  int checks = 0, failures = 0;
  int n_set = 0, n_clr_act = 0, n_clr_off = 0, n_ignored = 0;

  hustle_irq dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_irq = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      if ($urandom_range(0, 7) == 0) begin
        case ($urandom_range(0, 5))
          0:       state = ST_OFF;
          1:       state = ST_ACTIVE;
          default: state = ST_IDLE;
        endcase
      end
      ic_miss = ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (state != ST_IDLE) begin
        if (ref_irq) begin
          if (state == ST_ACTIVE) n_clr_act++; else n_clr_off++;
        end
        if (ic_miss) n_ignored++;
        ref_irq = 1'b0;
      end else if (ic_miss) begin
        if (!ref_irq) n_set++;
        ref_irq = 1'b1;
      end
      #1;
      checks++;
      if (irq !== ref_irq) begin
        failures++;
        if (failures < 10) $display("cycle %0d: irq %0d expected %0d", cyc, irq, ref_irq);
      end
    end
    $display("irq set %0d, cleared by ACTIVE %0d, by OFF %0d, misses ignored %0d",
             n_set, n_clr_act, n_clr_off, n_ignored);
    checks++;
    if (n_set == 0 || n_clr_act == 0 || n_clr_off == 0 || n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
