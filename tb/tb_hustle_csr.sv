// tb_hustle_csr: self-checking test of the enable control/status register.
//
// Checks the reset value, that writes to the register's own number set and
// clear the enable bit, that writes to other CSR numbers are ignored, the
// read-back layout (enable in bit 0, state in bits 2:1) and csr_hit.
module tb_hustle_csr;
  import hustle_pkg::*;

  localparam logic [11:0] ADDR = 12'h7C0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic csr_we = 1'b0;
  logic [11:0] csr_addr = '0;
  logic [31:0] csr_wdata = '0, csr_rdata;
  logic csr_hit, enable;
  hustle_state_e state = ST_OFF;
  int checks = 0, failures = 0;

  hustle_csr #(.CSR_ADDR(ADDR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(logic [11:0] a, logic [31:0] d);
    csr_we = 1'b1; csr_addr = a; csr_wdata = d;
    @(posedge clk); #1;
    csr_we = 1'b0;
  endtask

  logic exp_en;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check("reset enable", 32'(enable), 0);
    rst_n = 1'b1;
    exp_en = 1'b0;
    for (int i = 0; i < 300; i++) begin
      logic [11:0] a;
      logic [31:0] d;
      a = ($urandom_range(0, 1) == 0) ? ADDR : 12'($urandom_range(0, 4095));
      d = $urandom;
      state = hustle_state_e'($urandom_range(0, 2));
      write(a, d);
      if (a == ADDR) exp_en = d[0];
      check("enable", 32'(enable), 32'(exp_en));
      csr_addr = ADDR; #1;
      check("hit", 32'(csr_hit), 1);
      check("rdata", csr_rdata, {29'b0, state, exp_en});
      csr_addr = ADDR ^ 12'h001; #1;
      check("miss hit", 32'(csr_hit), 0);
      check("miss rdata", csr_rdata, 0);
    end
    // explicit set and clear
    write(ADDR, 32'h1); check("set", 32'(enable), 1);
    write(ADDR, 32'hFFFF_FFFE); check("clear", 32'(enable), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
