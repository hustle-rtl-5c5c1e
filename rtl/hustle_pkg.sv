// hustle_pkg: types and constants shared by the HUSTLE modules.
//
// HUSTLE is a unit placed between a core's fetch stage and its instruction
// cache (IC). It holds a self-test library (STL) in a private ROM and serves
// it to the core directly, so that test code never occupies IC lines and
// never waits on IC misses. The three operating states OFF, IDLE and ACTIVE
// are the ones of the unit's transition diagram; their binary encoding is a
// choice of this design. The instruction width of 32 bits is the RISC-V
// base instruction size; the fetch-port layout around it is this design's own.
package hustle_pkg;

  // Operating state of the unit.
  //   OFF    : disabled, every fetch goes to the IC as if the unit were absent
  //   IDLE   : enabled, the core runs functional code fetched through the IC
  //   ACTIVE : the core fetches from the STL address range, served by the ROM
  typedef enum logic [1:0] {
    ST_OFF    = 2'b00,
    ST_IDLE   = 2'b01,
    ST_ACTIVE = 2'b10
  } hustle_state_e;

  // Width of one instruction word held in the ROM.
  localparam int unsigned INSN_W = 32;

endpackage
