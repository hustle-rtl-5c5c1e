// hustle_bypass: the bypass logic that sits between the core and the IC.
//
// Every fetch request of the core is decoded against the STL address range
// [ROM_BASE, ROM_BASE + 4*ROM_WORDS). The controller (hustle_ctrl) decides
// from that decode and its state whether the request is served by the ROM
// (route_rom); otherwise it is forwarded unchanged to the IC. While a request
// is routed to the ROM it never reaches the IC, so STL code neither occupies
// IC lines nor causes IC misses. In the ACTIVE state responses coming from
// the IC are blocked (drained and dropped): the core redirected into the STL
// and no longer waits for them.
//
// Interface (all choices of this design; the document only says that
// requests and responses are forwarded):
//   cpu_req_*  : valid/ready request with a byte address, from the core
//   cpu_resp_* : valid/ready response carrying one fetch packet of
//                FETCH_WORDS 32-bit instructions, to the core
//   cpu_flush  : core redirect; drops every outstanding fetch (a request
//                accepted in the same cycle survives). Forwarded to the IC
//                as ic_flush. The core must flush before it redirects into
//                the STL range, which it does when it takes the interrupt.
//   ic_*       : the same channels towards the IC
//   rom_rd_*   : read port of hustle_rom (one-cycle synchronous read)
// Timing: a ROM-routed request accepted in cycle t is answered in cycle t+1
// and held until the core accepts it; a new ROM request is accepted in the
// same cycle as the previous response is taken, so back-to-back STL fetches
// run at one packet per cycle. IC-routed traffic passes combinationally.
module hustle_bypass
  import hustle_pkg::*;
#(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned FETCH_WORDS = 1,
  parameter logic [31:0] ROM_BASE    = 32'h0001_0000,
  parameter int unsigned ROM_WORDS   = 1024,
  localparam int unsigned PKT_W  = FETCH_WORDS * INSN_W,
  localparam int unsigned ROWS   = ROM_WORDS / FETCH_WORDS,
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned PKT_LSB = $clog2(FETCH_WORDS * 4)
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic              cpu_flush,
  output logic              cpu_resp_valid,
  input  logic              cpu_resp_ready,
  output logic [PKT_W-1:0]  cpu_resp_data,
  // IC side
  output logic              ic_req_valid,
  input  logic              ic_req_ready,
  output logic [ADDR_W-1:0] ic_req_addr,
  output logic              ic_flush,
  input  logic              ic_resp_valid,
  output logic              ic_resp_ready,
  input  logic [PKT_W-1:0]  ic_resp_data,
  // ROM read port
  output logic              rom_rd_en,
  output logic [ROW_W-1:0]  rom_rd_row,
  input  logic [PKT_W-1:0]  rom_rd_data,
  // controller
  input  hustle_state_e     state,
  input  logic              route_rom,
  output logic              req_is_stl,
  output logic              req_fire
);

  localparam logic [ADDR_W-1:0] BASE  = ADDR_W'(ROM_BASE);
  localparam logic [ADDR_W:0]   LIMIT = (ADDR_W+1)'(ROM_BASE) + (ADDR_W+1)'(ROM_WORDS * 4);

  logic              rom_pend;   // a ROM response is waiting for the core
  logic              rom_ready;  // the ROM path can take a request
  logic              rom_fire;
  logic [ADDR_W-1:0] rom_off;

  // is_STL(address)
  assign req_is_stl = (cpu_req_addr >= BASE) && ({1'b0, cpu_req_addr} < LIMIT);

  // Request routing: ROM-routed requests are blocked from the IC.
  assign rom_ready     = !rom_pend || cpu_resp_ready;
  assign ic_req_valid  = cpu_req_valid && !route_rom;
  assign ic_req_addr   = cpu_req_addr;
  assign cpu_req_ready = route_rom ? rom_ready : ic_req_ready;
  assign req_fire      = cpu_req_valid && cpu_req_ready;
  assign rom_fire      = cpu_req_valid && route_rom && rom_ready;
  assign ic_flush      = cpu_flush;

  assign rom_off    = cpu_req_addr - BASE;
  assign rom_rd_en  = rom_fire;
  assign rom_rd_row = ROW_W'(rom_off >> PKT_LSB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       rom_pend <= 1'b0;
    else if (rom_fire)                rom_pend <= 1'b1;
    else if (cpu_flush)               rom_pend <= 1'b0;
    else if (cpu_resp_ready)          rom_pend <= 1'b0;
  end

  // Response path: the ROM answers in place of the IC; IC responses are
  // passed on outside ACTIVE and dropped inside it.
  always_comb begin
    if (rom_pend) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_data  = rom_rd_data;
      ic_resp_ready  = 1'b0;
    end else if (state == ST_ACTIVE) begin
      cpu_resp_valid = 1'b0;
      cpu_resp_data  = ic_resp_data;
      ic_resp_ready  = 1'b1;
    end else begin
      cpu_resp_valid = ic_resp_valid;
      cpu_resp_data  = ic_resp_data;
      ic_resp_ready  = cpu_resp_ready;
    end
  end

  // A request routed to the ROM never shows on the IC port.
  a_no_stl_to_ic: assert property (@(posedge clk) disable iff (!rst_n)
    ic_req_valid |-> !route_rom);
  // A waiting ROM response stays valid until it is taken or flushed.
  a_rom_resp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (rom_pend && !cpu_resp_ready && !cpu_flush) |=> cpu_resp_valid);

endmodule
