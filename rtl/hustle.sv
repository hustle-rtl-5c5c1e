// hustle: Hardware Unit for Self-Test-Library Efficient execution (top).
//
// HUSTLE is inserted on the fetch path between a core and its instruction
// cache (IC) and needs no change inside the core. It holds a self-test
// library (STL) in a private ROM mapped at ROM_BASE. While the core fetches
// functional code the unit forwards requests and responses between core and
// IC; when the core fetches from the STL range the unit answers from the ROM
// and keeps the IC out of it. An IC miss raises irq; with the STL installed
// as the service routine of that interrupt, the core runs test code while
// the IC refills the missing line.
//
// Blocks: hustle_csr (enable bit, software visible), hustle_ctrl (OFF / IDLE
// / ACTIVE state machine), hustle_bypass (routing and response mux),
// hustle_rom (STL image), hustle_irq (miss-triggered interrupt request).
// Ports are plain signals; see hustle_bypass for the fetch handshakes and
// hustle_csr for the register layout. Latencies: IC traffic is passed
// combinationally, ROM fetches take one cycle, irq follows ic_miss by one
// cycle. The structure (bypass logic, ROM, enable, miss interrupt) follows
// the document; widths, handshakes, sizes and the address map are this
// design's choices.
module hustle
  import hustle_pkg::*;
#(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned FETCH_WORDS = 1,
  parameter logic [31:0] ROM_BASE    = 32'h0001_0000,
  parameter int unsigned ROM_WORDS   = 1024,
  parameter logic [11:0] CSR_ADDR    = 12'h7C0,
  parameter string       INIT_FILE   = "rtl/hustle_stl.hex",
  localparam int unsigned PKT_W = FETCH_WORDS * INSN_W,
  localparam int unsigned ROWS  = ROM_WORDS / FETCH_WORDS,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // core fetch port
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic              cpu_flush,
  output logic              cpu_resp_valid,
  input  logic              cpu_resp_ready,
  output logic [PKT_W-1:0]  cpu_resp_data,
  // IC port
  output logic              ic_req_valid,
  input  logic              ic_req_ready,
  output logic [ADDR_W-1:0] ic_req_addr,
  output logic              ic_flush,
  input  logic              ic_resp_valid,
  output logic              ic_resp_ready,
  input  logic [PKT_W-1:0]  ic_resp_data,
  input  logic              ic_miss,
  // core CSR access
  input  logic              csr_we,
  input  logic [11:0]       csr_addr,
  input  logic [31:0]       csr_wdata,
  output logic [31:0]       csr_rdata,
  output logic              csr_hit,
  // to the interrupt controller
  output logic              irq,
  // observation
  output hustle_state_e     state
);

  logic             enable;
  logic             route_rom, req_is_stl, req_fire;
  logic             rom_rd_en;
  logic [ROW_W-1:0] rom_rd_row;
  logic [PKT_W-1:0] rom_rd_data;

  hustle_csr #(.CSR_ADDR(CSR_ADDR)) u_csr (
    .clk, .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata, .csr_hit,
    .state, .enable
  );

  hustle_ctrl u_ctrl (
    .clk, .rst_n, .enable, .req_fire, .req_is_stl, .state, .route_rom
  );

  hustle_bypass #(
    .ADDR_W(ADDR_W), .FETCH_WORDS(FETCH_WORDS),
    .ROM_BASE(ROM_BASE), .ROM_WORDS(ROM_WORDS)
  ) u_bypass (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req_addr, .cpu_flush,
    .cpu_resp_valid, .cpu_resp_ready, .cpu_resp_data,
    .ic_req_valid, .ic_req_ready, .ic_req_addr, .ic_flush,
    .ic_resp_valid, .ic_resp_ready, .ic_resp_data,
    .rom_rd_en, .rom_rd_row, .rom_rd_data,
    .state, .route_rom, .req_is_stl, .req_fire
  );

  hustle_rom #(
    .DEPTH(ROM_WORDS), .FETCH_WORDS(FETCH_WORDS), .INIT_FILE(INIT_FILE)
  ) u_rom (
    .clk, .rd_en(rom_rd_en), .rd_row(rom_rd_row), .rd_data(rom_rd_data)
  );

  hustle_irq u_irq (
    .clk, .rst_n, .ic_miss, .state, .irq
  );

endmodule
