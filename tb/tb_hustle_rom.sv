// tb_hustle_rom: self-checking test of the STL ROM.
//
// Two instances, one word and two words per fetch packet, are read at random
// rows. The expected words come from the image file read by the testbench
// itself, and the first and last words of the shipped example image are also
// compared with fixed values (the first instruction of the routine and the
// closing mret). Checks the one-cycle read latency, that the output holds
// while rd_en is low, and that words past the image read as zero.
module tb_hustle_rom;
  import hustle_pkg::*;

  localparam int unsigned DEPTH = 1024;
  localparam string IMG = "rtl/hustle_stl.hex";

  logic clk = 1'b0;
  logic en1 = 1'b0, en2 = 1'b0;
  logic [9:0] row1 = '0;
  logic [8:0] row2 = '0;
  logic [31:0] d1;
  logic [63:0] d2;
  logic [31:0] img [DEPTH];
  int checks = 0, failures = 0;

  hustle_rom #(.DEPTH(DEPTH), .FETCH_WORDS(1), .INIT_FILE(IMG)) u1 (
    .clk, .rd_en(en1), .rd_row(row1), .rd_data(d1));
  hustle_rom #(.DEPTH(DEPTH), .FETCH_WORDS(2), .INIT_FILE(IMG)) u2 (
    .clk, .rd_en(en2), .rd_row(row2), .rd_data(d2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) img[i] = '0;
    $readmemh(IMG, img);
    // fixed points of the example image
    check("image word 0", 64'(img[0]), 64'h0000_0000_fe81_0113);
    check("image word 25", 64'(img[25]), 64'h0000_0000_3020_0073);
    @(negedge clk);
    // read every row of both instances once, in order, then randomly
    for (int i = 0; i < 1600; i++) begin
      int r1, r2;
      r1 = (i < DEPTH) ? i : $urandom_range(0, DEPTH - 1);
      r2 = (i < DEPTH / 2) ? i : $urandom_range(0, DEPTH / 2 - 1);
      en1 = 1'b1; row1 = 10'(r1);
      en2 = 1'b1; row2 = 9'(r2);
      @(posedge clk); #1;
      en1 = 1'b0; en2 = 1'b0;
      check("1-word read", 64'(d1), 64'(img[r1]));
      check("2-word read", d2, {img[2*r2+1], img[2*r2]});
      // output holds while rd_en is low, whatever the row input does
      row1 = ~row1; row2 = ~row2;
      @(posedge clk); #1;
      check("1-word hold", 64'(d1), 64'(img[r1]));
      check("2-word hold", d2, {img[2*r2+1], img[2*r2]});
    end
    // a word past the image reads as zero
    en1 = 1'b1; row1 = 10'd1000;
    @(posedge clk); #1;
    en1 = 1'b0;
    check("blank word", 64'(d1), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
