// hustle_rom: read-only memory that holds the self-test library (STL).
//
// The ROM is the store from which HUSTLE answers the core's instruction
// fetches while the STL runs. It is organised as DEPTH 32-bit words and is
// read one fetch packet (FETCH_WORDS consecutive words, aligned to the packet
// size) at a time. The read is synchronous: rd_data holds the packet selected
// by rd_row in the cycle after rd_en was high, and keeps it while rd_en is low.
//
// The image is loaded from INIT_FILE (one hexadecimal word per line) with
// $readmemh; words the file does not cover read as zero. The document only
// says that the ROM is initialised with STL instructions; its size, its read
// latency and the example image shipped as rtl/hustle_stl.hex are choices of
// this design.
module hustle_rom
  import hustle_pkg::*;
#(
  parameter int unsigned DEPTH       = 1024,               // words of INSN_W bits
  parameter int unsigned FETCH_WORDS = 1,                  // words per fetch packet
  parameter string       INIT_FILE   = "rtl/hustle_stl.hex",
  localparam int unsigned ROWS  = DEPTH / FETCH_WORDS,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                          clk,
  input  logic                          rd_en,
  input  logic [ROW_W-1:0]              rd_row,
  output logic [FETCH_WORDS*INSN_W-1:0] rd_data
);

  logic [INSN_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int w = 0; w < FETCH_WORDS; w++)
        rd_data[w*INSN_W +: INSN_W] <= mem[int'(rd_row) * FETCH_WORDS + w];
    end
  end

endmodule
