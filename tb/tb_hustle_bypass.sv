// tb_hustle_bypass: directed self-checking test of the bypass logic.
//
// The controller's outputs (state, route_rom) are driven by the testbench
// from its own address decode, and a one-cycle ROM model returns a known
// function of the row. Checked: the STL range decode at its edges,
// forwarding of requests and responses in IDLE and OFF (handshakes
// included), STL requests blocked from the IC and answered from the ROM one
// cycle later, one ROM fetch per cycle back to back, a held ROM response
// under back-pressure, a flush dropping a waiting ROM response, IC
// responses blocked in ACTIVE, and the packet index for two-word packets.
module tb_hustle_bypass;
  import hustle_pkg::*;

  localparam logic [31:0] BASE  = 32'h0001_0000;
  localparam int unsigned WORDS = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        cpu_req_valid = 1'b0, cpu_req_ready, cpu_flush = 1'b0;
  logic [31:0] cpu_req_addr = '0;
  logic        cpu_resp_valid, cpu_resp_ready = 1'b1;
  logic [31:0] cpu_resp_data;
  logic        ic_req_valid, ic_req_ready = 1'b1, ic_flush;
  logic [31:0] ic_req_addr;
  logic        ic_resp_valid = 1'b0, ic_resp_ready;
  logic [31:0] ic_resp_data = '0;
  logic        rom_rd_en;
  logic [9:0]  rom_rd_row;
  logic [31:0] rom_rd_data = '0;
  hustle_state_e state = ST_IDLE;
  logic        route_rom, req_is_stl, req_fire;
  int checks = 0, failures = 0;

  // second instance, two-word packets, only its packet index is checked
  logic [8:0]  row2;
  logic        unused2_a, unused2_b, unused2_c, unused2_d, unused2_e, unused2_f;
  logic [31:0] unused2_addr;
  logic [63:0] unused2_data;
  logic        unused2_g, unused2_h;

  hustle_bypass #(.ADDR_W(32), .FETCH_WORDS(1), .ROM_BASE(BASE), .ROM_WORDS(WORDS)) dut (.*);

  hustle_bypass #(.ADDR_W(32), .FETCH_WORDS(2), .ROM_BASE(BASE), .ROM_WORDS(WORDS)) dut2 (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready(unused2_a), .cpu_req_addr, .cpu_flush(1'b0),
    .cpu_resp_valid(unused2_b), .cpu_resp_ready(1'b1), .cpu_resp_data(unused2_data),
    .ic_req_valid(unused2_c), .ic_req_ready(1'b1), .ic_req_addr(unused2_addr),
    .ic_flush(unused2_d), .ic_resp_valid(1'b0), .ic_resp_ready(unused2_e),
    .ic_resp_data(64'h0), .rom_rd_en(unused2_f), .rom_rd_row(row2),
    .rom_rd_data(64'h0), .state, .route_rom, .req_is_stl(unused2_g), .req_fire(unused2_h)
  );

  function automatic logic [31:0] rom_f(logic [9:0] r);
    return 32'hABC0_0000 | 32'(r) * 3;
  endfunction

  // ROM model: synchronous read
  always @(posedge clk) if (rom_rd_en) rom_rd_data <= rom_f(rom_rd_row);

  // controller stand-in, from the testbench's own decode
  function automatic logic in_range(logic [31:0] a);
    return a >= BASE && a < BASE + WORDS * 4;
  endfunction
  assign route_rom = in_range(cpu_req_addr) && state != ST_OFF;

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- address decode at the range edges
    cpu_req_addr = BASE - 4;              #1 check("below range", 32'(req_is_stl), 0);
    cpu_req_addr = BASE;                  #1 check("range start", 32'(req_is_stl), 1);
    cpu_req_addr = BASE + WORDS * 4 - 4;  #1 check("range end", 32'(req_is_stl), 1);
    cpu_req_addr = BASE + WORDS * 4;      #1 check("past range", 32'(req_is_stl), 0);
    cpu_req_addr = 32'h8000_1234;         #1 check("far", 32'(req_is_stl), 0);

    // ---- IDLE: forwarding of requests and responses
    state = ST_IDLE;
    cpu_req_valid = 1'b1; cpu_req_addr = 32'h8000_0040;
    for (int r = 0; r < 2; r++) begin
      ic_req_ready = r[0]; #1;
      check("fwd req valid", 32'(ic_req_valid), 1);
      check("fwd req addr", ic_req_addr, 32'h8000_0040);
      check("fwd req ready", 32'(cpu_req_ready), 32'(r[0]));
      check("fwd fire", 32'(req_fire), 32'(r[0]));
      check("no ROM read", 32'(rom_rd_en), 0);
    end
    @(negedge clk);
    cpu_req_valid = 1'b0;
    ic_resp_valid = 1'b1; ic_resp_data = 32'h1234_5678;
    for (int r = 0; r < 2; r++) begin
      cpu_resp_ready = r[0]; #1;
      check("fwd resp valid", 32'(cpu_resp_valid), 1);
      check("fwd resp data", cpu_resp_data, 32'h1234_5678);
      check("fwd resp ready", 32'(ic_resp_ready), 32'(r[0]));
    end
    cpu_flush = 1'b1; #1 check("flush forwarded", 32'(ic_flush), 1);
    cpu_flush = 1'b0; #1 check("flush released", 32'(ic_flush), 0);
    @(negedge clk);
    ic_resp_valid = 1'b0;
    cpu_resp_ready = 1'b1;

    // ---- ACTIVE: back-to-back ROM fetches, blocked from the IC
    state = ST_ACTIVE;
    ic_req_ready = 1'b0;   // the IC is busy: must not matter
    for (int i = 0; i < 8; i++) begin
      cpu_req_valid = 1'b1; cpu_req_addr = BASE + 32'(i * 4); #1;
      check("STL not sent to IC", 32'(ic_req_valid), 0);
      check("ROM accepts", 32'(cpu_req_ready), 1);
      check("ROM row", 32'(rom_rd_row), i);
      check("2-word row", 32'(row2), i / 2);
      if (i > 0) begin
        check("ROM resp valid", 32'(cpu_resp_valid), 1);
        check("ROM resp data", cpu_resp_data, rom_f(10'(i - 1)));
      end
      @(negedge clk);
    end
    cpu_req_valid = 1'b0; #1;
    check("last ROM resp", cpu_resp_data, rom_f(10'd7));
    @(negedge clk);
    check("ROM resp retired", 32'(cpu_resp_valid), 0);

    // ---- back-pressure on a ROM response
    cpu_req_valid = 1'b1; cpu_req_addr = BASE + 32'h40;
    @(negedge clk);
    cpu_req_valid = 1'b1; cpu_req_addr = BASE + 32'h44;
    cpu_resp_ready = 1'b0;
    for (int i = 0; i < 3; i++) begin
      #1;
      check("held valid", 32'(cpu_resp_valid), 1);
      check("held data", cpu_resp_data, rom_f(10'h10));
      check("no new ROM request", 32'(cpu_req_ready), 0);
      @(negedge clk);
    end
    cpu_resp_ready = 1'b1; #1;
    check("taken with new request", 32'(cpu_req_ready), 1);
    @(negedge clk);
    cpu_req_valid = 1'b0; #1;
    check("next data", cpu_resp_data, rom_f(10'h11));

    // ---- flush drops a waiting ROM response
    cpu_resp_ready = 1'b0;
    @(negedge clk);
    cpu_flush = 1'b1;
    @(negedge clk);
    cpu_flush = 1'b0; cpu_resp_ready = 1'b1; #1;
    check("flushed", 32'(cpu_resp_valid), 0);

    // ---- ACTIVE: IC responses are blocked
    ic_resp_valid = 1'b1; ic_resp_data = 32'hDEAD_BEEF; #1;
    check("IC resp blocked", 32'(cpu_resp_valid), 0);
    check("IC resp drained", 32'(ic_resp_ready), 1);
    @(negedge clk);
    ic_resp_valid = 1'b0;

    // ---- ACTIVE, non-STL request leaves through the IC
    ic_req_ready = 1'b1;
    cpu_req_valid = 1'b1; cpu_req_addr = 32'h8000_0100; #1;
    check("exit request to IC", 32'(ic_req_valid), 1);
    check("exit no ROM", 32'(rom_rd_en), 0);
    @(negedge clk);

    // ---- OFF: STL range goes to the IC
    state = ST_OFF;
    cpu_req_addr = BASE + 32'h8; #1;
    check("OFF: to IC", 32'(ic_req_valid), 1);
    check("OFF: no ROM", 32'(rom_rd_en), 0);
    ic_req_ready = 1'b0; #1;
    check("OFF: IC ready", 32'(cpu_req_ready), 0);
    cpu_req_valid = 1'b0;
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
