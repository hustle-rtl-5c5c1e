// tb_hustle: end-to-end test of HUSTLE between a core fetch model and an IC
// model, with every parameter of the top at its default.
//
// The core model fetches one instruction at a time: a functional workload
// loop of WL_WORDS sequential words (twice the IC size, so it misses all
// the time) and the STL, fetched sequentially from the ROM base until the
// mret word (branches are not executed). Every fetched word is compared with
// the value the memory map gives for its address. Phases:
//   1 baseline  HUSTLE off; the STL is called after every workload pass and
//               is fetched through the IC like ordinary code
//   2 enabled   the same schedule with HUSTLE on: the STL comes from the ROM,
//               never reaches the IC, and costs fewer cycles than in phase 1
//   3 event     the STL runs as the service routine of HUSTLE's interrupt,
//               taken on IC misses (the core flushes the missed fetch and
//               returns to it after mret)
//   4 disable   enable is cleared while the STL runs: the unit stays ACTIVE
//               until the core leaves the ROM, then goes OFF and raises no
//               more interrupts
// The response-ready line of the core is random throughout (back-pressure).
// Each mechanism (forwarding, ROM service, blocking from the IC, interrupt,
// the three states and their transitions, back-pressure, flush) is counted
// and must occur; ROM fetches must be answered exactly one cycle after they
// are accepted.
module tb_hustle;
  import hustle_pkg::*;

  localparam logic [31:0] ROM_BASE = 32'h0001_0000;
  localparam int unsigned ROM_WORDS = 1024;
  localparam logic [11:0] CSR_A = 12'h7C0;
  localparam logic [31:0] WL_BASE = 32'h8000_0000;
  localparam int unsigned WL_WORDS = 256;
  localparam logic [31:0] MRET = 32'h3020_0073;
  localparam int PASSES = 3;

  logic clk = 1'b0, rst_n = 1'b0;

  // DUT ports
  logic        cpu_req_valid, cpu_req_ready, cpu_flush;
  logic [31:0] cpu_req_addr;
  logic        cpu_resp_valid, cpu_resp_ready;
  logic [31:0] cpu_resp_data;
  logic        ic_req_valid, ic_req_ready, ic_flush;
  logic [31:0] ic_req_addr;
  logic        ic_resp_valid, ic_resp_ready;
  logic [31:0] ic_resp_data;
  logic        ic_miss;
  logic        csr_we = 1'b0;
  logic [11:0] csr_addr = CSR_A;
  logic [31:0] csr_wdata = '0, csr_rdata;
  logic        csr_hit, irq;
  hustle_state_e state;

  int n_req_img, n_req_other, n_miss_img, n_miss_other;

  hustle dut (.*);

  icache_model #(.IMG_BASE(ROM_BASE), .IMG_WORDS(ROM_WORDS)) u_ic (
    .clk, .rst_n,
    .req_valid(ic_req_valid), .req_ready(ic_req_ready), .req_addr(ic_req_addr),
    .flush(ic_flush),
    .resp_valid(ic_resp_valid), .resp_ready(ic_resp_ready), .resp_data(ic_resp_data),
    .miss(ic_miss),
    .n_req_img, .n_req_other, .n_miss_img, .n_miss_other
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // ---------------------------------------------------------------- core model
  logic [31:0] img [ROM_WORDS];
  logic        run = 1'b0;       // fetching
  logic        call_mode = 1'b0; // call the STL after each workload pass
  logic        irq_mode = 1'b0;  // take HUSTLE's interrupt
  logic        rdy_rand = 1'b1;
  logic [31:0] pc, req_pc, ret_pc;
  logic        waiting, in_stl, in_isr;
  int          req_cycle;
  int          wait_cnt = 0, first_lat = 0;  // cycles since the request was accepted
  int          passes = 0, stl_runs = 0, stl_cycles = 0;
  logic        take_irq;

  // mechanism counters
  int m_forward = 0, m_rom = 0, m_irq = 0, m_flush = 0, m_bp = 0;
  int m_off_idle = 0, m_idle_off = 0, m_idle_act = 0, m_act_idle = 0;
  int m_stl_leak = 0, m_irq_off = 0;

  function automatic logic is_stl(logic [31:0] a);
    return a >= ROM_BASE && a < ROM_BASE + ROM_WORDS * 4;
  endfunction

  function automatic logic [31:0] exp_word(logic [31:0] a);
    if (is_stl(a)) return img[(a - ROM_BASE) >> 2];
    return (a * 32'h9E37_79B1) ^ 32'h1357_9BDF;
  endfunction

  assign take_irq       = run && irq_mode && irq && !in_isr && waiting;
  assign cpu_flush      = take_irq;
  assign cpu_req_valid  = run && !waiting;
  assign cpu_req_addr   = pc;
  assign cpu_resp_ready = rdy_rand;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= WL_BASE; waiting <= 1'b0; in_stl <= 1'b0; in_isr <= 1'b0;
      ret_pc <= WL_BASE; req_pc <= '0; req_cycle <= 0;
    end else if (take_irq) begin
      ret_pc  <= req_pc;   // re-fetch the instruction that missed
      pc      <= ROM_BASE;
      in_isr  <= 1'b1;
      in_stl  <= 1'b1;
      waiting <= 1'b0;
      m_irq++;
    end else if (cpu_req_valid && cpu_req_ready) begin
      wait_cnt  = 0;
      first_lat = 0;
      waiting   <= 1'b1;
      req_pc    <= pc;
      req_cycle <= cycle;
    end else if (waiting && !(cpu_resp_valid && cpu_resp_ready)) begin
      wait_cnt++;
      if (cpu_resp_valid && first_lat == 0) first_lat = wait_cnt;
    end else if (waiting && cpu_resp_valid && cpu_resp_ready) begin
      wait_cnt++;
      if (first_lat == 0) first_lat = wait_cnt;
      waiting <= 1'b0;
      checks++;
      if (cpu_resp_data !== exp_word(req_pc)) begin
        failures++;
        $display("cycle %0d: fetch %h got %h expected %h", cycle, req_pc,
                 cpu_resp_data, exp_word(req_pc));
      end
      if (is_stl(req_pc) && state == ST_ACTIVE) begin
        m_rom++;
        checks++;
        if (first_lat != 1) begin
          failures++;
          $display("ROM fetch latency %0d cycles", first_lat);
        end
      end else m_forward++;
      if (is_stl(req_pc) && cpu_resp_data == MRET) begin
        pc       <= ret_pc;
        in_stl   <= 1'b0;
        in_isr   <= 1'b0;
        stl_runs++;
      end else if (!is_stl(req_pc) && req_pc + 4 == WL_BASE + WL_WORDS * 4) begin
        passes++;
        if (call_mode) begin
          pc     <= ROM_BASE;
          ret_pc <= WL_BASE;
          in_stl <= 1'b1;
        end else pc <= WL_BASE;
      end else pc <= req_pc + 4;
    end
  end

  // ------------------------------------------------------------- monitors
  hustle_state_e prev_state = ST_OFF;
  logic prev_irq = 1'b0, prev_miss = 1'b0;
  always @(posedge clk) begin
    cycle++;
    if (in_stl) stl_cycles++;
    if (cpu_flush) m_flush++;
    if (cpu_resp_valid && !cpu_resp_ready) m_bp++;
    if (ic_req_valid && is_stl(ic_req_addr) && state != ST_OFF) m_stl_leak++;
    if (irq && state == ST_OFF) m_irq_off++;
    prev_state <= rst_n ? state : ST_OFF;
    // an interrupt request must follow an IC miss by one cycle
    if (rst_n && irq && !prev_irq) begin
      checks++;
      if (!prev_miss) begin
        failures++;
        $display("cycle %0d: irq raised without an IC miss", cycle);
      end
    end
    prev_irq  <= irq;
    prev_miss <= ic_miss;
    if (prev_state == ST_OFF && state == ST_IDLE)    m_off_idle++;
    if (prev_state == ST_IDLE && state == ST_OFF)    m_idle_off++;
    if (prev_state == ST_IDLE && state == ST_ACTIVE) m_idle_act++;
    if (prev_state == ST_ACTIVE && state == ST_IDLE) m_act_idle++;
    if (prev_state == ST_ACTIVE && state == ST_OFF) begin
      failures++;
      $display("cycle %0d: ACTIVE -> OFF directly", cycle);
    end
  end

  always @(negedge clk) rdy_rand <= ($urandom_range(0, 3) != 0);

  // ------------------------------------------------------------- helpers
  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic csr_write(logic [31:0] d);
    @(negedge clk);
    csr_we = 1'b1; csr_wdata = d;
    @(negedge clk);
    csr_we = 1'b0;
  endtask

  task automatic wait_passes(int n);
    int target;
    target = passes + n;
    while (passes < target) @(posedge clk);
    // let a trailing STL call finish
    while (in_stl) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int base_cycles, base_runs, base_img_miss, h_cycles, h_runs, h_img_req, h_img_miss;
  int irq_before;

  initial begin
    for (int i = 0; i < ROM_WORDS; i++) img[i] = '0;
    $readmemh("rtl/hustle_stl.hex", img);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset state OFF", state == ST_OFF && csr_rdata == 32'h0 && csr_hit);

    // phase 1: baseline, HUSTLE off, STL called after each pass
    call_mode = 1'b1;
    run = 1'b1;
    wait_passes(PASSES);
    base_cycles = stl_cycles; base_runs = stl_runs; base_img_miss = n_miss_img;
    check("baseline fetched STL through the IC", n_req_img > 0);
    check("no interrupt while OFF", m_irq == 0 && !irq);

    // phase 2: same schedule, HUSTLE on
    csr_write(32'h1);
    @(negedge clk);
    check("enabled: state IDLE read back", csr_rdata == {29'b0, ST_IDLE, 1'b1});
    h_img_req = n_req_img; h_img_miss = n_miss_img;
    stl_cycles = 0; stl_runs = 0;
    irq_mode = 1'b0;
    wait_passes(PASSES);
    h_cycles = stl_cycles; h_runs = stl_runs;
    check("enabled: no STL request reached the IC", n_req_img == h_img_req);
    check("enabled: no STL miss in the IC", n_miss_img == h_img_miss);
    check("STL run counts match", h_runs == base_runs && h_runs > 0);
    check("STL faster from the ROM", h_cycles < base_cycles);
    $display("STL cycles over %0d runs: through IC %0d, from ROM %0d (OR = %0.3f), STL IC misses in baseline %0d",
             h_runs, base_cycles, h_cycles, 1.0 - real'(h_cycles) / real'(base_cycles), base_img_miss);

    // phase 3: event-driven, STL as the interrupt service routine
    call_mode = 1'b0;
    irq_mode  = 1'b1;
    irq_before = m_irq;
    wait_passes(PASSES);
    while (in_isr) @(posedge clk);
    check("interrupts taken on IC misses", m_irq > irq_before);
    $display("event-driven: %0d STL runs started by IC misses", m_irq - irq_before);

    // phase 4: disable while the STL is running
    while (state != ST_ACTIVE) @(posedge clk);
    csr_write(32'h0);
    check("still ACTIVE after disable inside STL", state == ST_ACTIVE || in_isr == 1'b0);
    while (in_isr) @(posedge clk);
    repeat (4) @(negedge clk);
    check("OFF after leaving the STL", state == ST_OFF && csr_rdata == 32'h0);
    irq_before = m_irq;
    wait_passes(1);
    check("no interrupt once OFF", m_irq == irq_before);
    run = 1'b0;
    repeat (30) @(posedge clk);

    // mechanism coverage
    $display("forwarded %0d, ROM-served %0d, interrupts %0d, flushes %0d, back-pressure %0d",
             m_forward, m_rom, m_irq, m_flush, m_bp);
    $display("transitions off->idle %0d idle->off %0d idle->active %0d active->idle %0d",
             m_off_idle, m_idle_off, m_idle_act, m_act_idle);
    check("forwarding happened", m_forward > 0);
    check("ROM service happened", m_rom > 0);
    check("interrupt happened", m_irq > 0);
    check("flush happened", m_flush > 0);
    check("back-pressure happened", m_bp > 0);
    check("all transitions happened",
          m_off_idle > 0 && m_idle_off > 0 && m_idle_act > 0 && m_act_idle > 0);
    check("no STL request leaked to the IC while enabled", m_stl_leak == 0);
    check("no interrupt while OFF", m_irq_off == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
