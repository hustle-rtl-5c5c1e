// hustle_csr: control/status register through which software turns HUSTLE on.
//
// One CSR, number CSR_ADDR, is decoded from the core's CSR access port.
//   bit 0     EN     read/write, 1 enables the unit (reset value 0)
//   bits 2:1  STATE  read-only, current state (0 OFF, 1 IDLE, 2 ACTIVE)
//   other bits read as zero, writes to them are ignored
// A write (csr_we with csr_addr == CSR_ADDR) takes effect at the next clock
// edge; csr_rdata and csr_hit are combinational. The document states only
// that a CSR enables the unit from software; the CSR number (0x7C0, in the
// RISC-V machine-mode custom read/write range), the layout and the state
// read-back are choices of this design.
module hustle_csr
  import hustle_pkg::*;
#(
  parameter logic [11:0] CSR_ADDR = 12'h7C0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          csr_we,
  input  logic [11:0]   csr_addr,
  input  logic [31:0]   csr_wdata,
  output logic [31:0]   csr_rdata,
  output logic          csr_hit,
  input  hustle_state_e state,
  output logic          enable
);

  assign csr_hit = (csr_addr == CSR_ADDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 enable <= 1'b0;
    else if (csr_we && csr_hit) enable <= csr_wdata[0];
  end

  always_comb begin
    csr_rdata = '0;
    if (csr_hit) csr_rdata = {29'b0, state, enable};
  end

endmodule
