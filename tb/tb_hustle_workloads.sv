// tb_hustle_workloads: the three STL schedules of the HUSTLE evaluation, run
// on the unit at default parameters with a core fetch model and an IC model.
//
// Workload: PASSES passes over a 256-word loop (twice the 128-word IC, so
// it keeps missing), plus STL_RUNS runs of the example STL. Each scenario
// starts from reset, with the unit off (baseline) or on:
//   none   : workload only, the reference for "additional" cycles and misses
//   test_1 : STL called after every workload pass
//   test_2 : STL started by a periodic timer interrupt
//   test_3 : STL started by the unit's IC-miss interrupt (unit on only),
//            compared with test_2 without the unit as its baseline
// Metrics, with C the extra cycles and M the extra IC misses over "none",
// N the STL instructions fetched, and the subscript h for the unit on:
//   OR = 1 - C_h/C,  dIPC = N/C_h - N/C,  IR = 1 - M_h/M
// Checked: all fetched words are right, every scenario runs the same STL
// work, each trigger (call, timer, miss interrupt) fired, the unit lowers
// both the extra cycles and the extra misses of test_1 and test_2, and the
// miss-driven schedule costs fewer extra cycles than the periodic one.
module tb_hustle_workloads;
  import hustle_pkg::*;

  localparam int PASSES   = 4;
  localparam int STL_RUNS = 4;
  localparam logic [11:0] CSR_A = 12'h7C0;

  logic clk = 1'b0, rst_n = 1'b0, core_rst_n = 1'b0;

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

  logic call_mode = 1'b0, irq_mode = 1'b0;
  int   timer_period = 0, stl_limit = 0;
  logic done;
  int   cycles, stl_runs, stl_insns, n_irq, n_timer, n_checks, n_errors;

  hustle dut (.*);

  icache_model u_ic (
    .clk, .rst_n,
    .req_valid(ic_req_valid), .req_ready(ic_req_ready), .req_addr(ic_req_addr),
    .flush(ic_flush),
    .resp_valid(ic_resp_valid), .resp_ready(ic_resp_ready), .resp_data(ic_resp_data),
    .miss(ic_miss),
    .n_req_img, .n_req_other, .n_miss_img, .n_miss_other
  );

  core_fetch_model u_core (
    .clk, .rst_n(core_rst_n),
    .req_valid(cpu_req_valid), .req_ready(cpu_req_ready), .req_addr(cpu_req_addr),
    .flush(cpu_flush),
    .resp_valid(cpu_resp_valid), .resp_ready(cpu_resp_ready), .resp_data(cpu_resp_data),
    .irq,
    .call_mode, .irq_mode, .timer_period, .passes_target(PASSES), .stl_limit,
    .rdy_rand(1'b1),
    .done, .cycles, .stl_runs, .stl_insns, .n_irq, .n_timer, .n_checks, .n_errors
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef struct {
    int cycles;
    int misses;
    int insns;
    int runs;
    int irqs;
    int timers;
  } result_t;

  // One scenario from reset. mode: 0 none, 1 call, 2 timer, 3 miss interrupt
  task automatic run_scenario(input int mode, input bit on, input int period,
                              output result_t r);
    @(negedge clk);
    rst_n = 1'b0; core_rst_n = 1'b0;
    call_mode    = (mode == 1);
    timer_period = (mode == 2) ? period : 0;
    irq_mode     = (mode == 3);
    stl_limit    = (mode == 0) ? 0 : STL_RUNS;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    if (on) begin
      csr_we = 1'b1; csr_wdata = 32'h1;
      @(negedge clk);
      csr_we = 1'b0;
      @(negedge clk);
    end
    core_rst_n = 1'b1;
    while (!done) @(posedge clk);
    @(negedge clk);
    check("fetched words correct", n_errors == 0 && n_checks > 0);
    r.cycles = cycles;
    r.misses = n_miss_img + n_miss_other;
    r.insns  = stl_insns;
    r.runs   = stl_runs;
    r.irqs   = n_irq;
    r.timers = n_timer;
    if (on) check("STL never fetched through the IC", n_req_img == 0);
  endtask

  function automatic real ratio(int a, int b);
    return (b == 0) ? 0.0 : real'(a) / real'(b);
  endfunction

  task automatic report(string name, result_t base, result_t with_h,
                        result_t ref_off, result_t ref_on);
    int c, ch, m, mh;
    c  = base.cycles - ref_off.cycles;
    ch = with_h.cycles - ref_on.cycles;
    m  = base.misses - ref_off.misses;
    mh = with_h.misses - ref_on.misses;
    $display("%-24s C=%0d C_h=%0d OR=%0.3f dIPC=%0.3f M=%0d M_h=%0d IR=%0.3f",
             name, c, ch, 1.0 - ratio(ch, c),
             ratio(with_h.insns, ch) - ratio(base.insns, c), m, mh, 1.0 - ratio(mh, m));
  endtask

  result_t w_off, w_on, t1_off, t1_on, t2_off, t2_on, t3_on;
  int period;

  initial begin
    run_scenario(0, 1'b0, 0, w_off);
    run_scenario(0, 1'b1, 0, w_on);
    check("workload alone unaffected by the unit", w_off.cycles == w_on.cycles);
    period = w_off.cycles / (STL_RUNS + 1);

    run_scenario(1, 1'b0, 0, t1_off);
    run_scenario(1, 1'b1, 0, t1_on);
    run_scenario(2, 1'b0, period, t2_off);
    run_scenario(2, 1'b1, period, t2_on);
    run_scenario(3, 1'b1, 0, t3_on);

    $display("workload alone: %0d cycles, %0d IC misses; timer period %0d cycles",
             w_off.cycles, w_off.misses, period);
    report("test_1", t1_off, t1_on, w_off, w_on);
    report("test_2", t2_off, t2_on, w_off, w_on);
    report("test_3 periodic", t2_off, t2_on, w_off, w_on);
    report("test_3 miss-driven", t2_off, t3_on, w_off, w_on);

    check("same STL work in every scenario",
          t1_off.runs == STL_RUNS && t1_on.runs == STL_RUNS && t2_off.runs == STL_RUNS &&
          t2_on.runs == STL_RUNS && t3_on.runs == STL_RUNS &&
          t1_off.insns == t3_on.insns && t2_on.insns == t3_on.insns && t1_off.insns > 0);
    check("timer trigger fired", t2_off.timers > 0 && t2_on.timers > 0);
    check("miss interrupt fired", t3_on.irqs > 0);
    check("no interrupt taken unless asked", t1_on.irqs == 0 && t2_on.irqs == 0);
    check("test_1: fewer extra cycles with the unit",
          t1_on.cycles - w_on.cycles < t1_off.cycles - w_off.cycles);
    check("test_1: fewer extra misses with the unit",
          t1_on.misses - w_on.misses < t1_off.misses - w_off.misses);
    check("test_2: fewer extra cycles with the unit",
          t2_on.cycles - w_on.cycles < t2_off.cycles - w_off.cycles);
    check("miss-driven beats periodic", t3_on.cycles < t2_on.cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
