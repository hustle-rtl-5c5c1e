// core_fetch_model: behavioural fetch side of a core, for testbenches only.
//
// The model keeps one fetch outstanding. It runs a workload loop of
// WL_WORDS sequential words from WL_BASE for `passes_target` passes and
// `stl_limit` runs of the self-test library (STL): sequential fetches from
// ROM_BASE up to the mret word (0x30200073), after which it returns.
// Branches are not executed. The STL is started in up to three ways:
//   call_mode    : called after every workload pass
//   timer_period : a periodic interrupt every timer_period cycles (0 = none),
//                  taken at the next instruction boundary
//   irq_mode     : the irq input, taken while a fetch is outstanding; the
//                  fetch is flushed and fetched again after the STL
// Runs still missing when the workload ends are called back to back, so
// every configuration executes the same STL work. Every answer is compared
// with the memory map (the image file in the STL range, a hash elsewhere).
// done rises when all passes and all STL runs have finished.
module core_fetch_model #(
  parameter logic [31:0] ROM_BASE  = 32'h0001_0000,
  parameter int unsigned ROM_WORDS = 1024,
  parameter logic [31:0] WL_BASE   = 32'h8000_0000,
  parameter int unsigned WL_WORDS  = 256,
  parameter string       IMG_FILE  = "rtl/hustle_stl.hex"
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch port
  output logic        req_valid,
  input  logic        req_ready,
  output logic [31:0] req_addr,
  output logic        flush,
  input  logic        resp_valid,
  output logic        resp_ready,
  input  logic [31:0] resp_data,
  input  logic        irq,
  // configuration
  input  logic        call_mode,
  input  logic        irq_mode,
  input  int          timer_period,
  input  int          passes_target,
  input  int          stl_limit,
  input  logic        rdy_rand,
  // results
  output logic        done,
  output int          cycles,
  output int          stl_runs,
  output int          stl_insns,
  output int          n_irq,
  output int          n_timer,
  output int          n_checks,
  output int          n_errors
);
  localparam logic [31:0] MRET = 32'h3020_0073;

  logic [31:0] img [ROM_WORDS];
  logic [31:0] pc, req_pc, ret_pc, next_pc;
  logic        waiting, in_stl, timer_pend, take_irq, resp_fire;
  int          passes, tcnt;

  initial begin
    for (int i = 0; i < ROM_WORDS; i++) img[i] = '0;
    $readmemh(IMG_FILE, img);
  end

  function automatic logic is_stl(logic [31:0] a);
    return a >= ROM_BASE && a < ROM_BASE + ROM_WORDS * 4;
  endfunction

  function automatic logic [31:0] exp_word(logic [31:0] a);
    if (is_stl(a)) return img[(a - ROM_BASE) >> 2];
    return (a * 32'h9E37_79B1) ^ 32'h1357_9BDF;
  endfunction

  logic running;
  assign running    = rst_n && !done;
  assign take_irq   = running && irq_mode && irq && !in_stl && waiting &&
                      stl_runs < stl_limit && passes < passes_target;
  assign flush      = take_irq;
  assign req_valid  = running && !waiting;
  assign req_addr   = pc;
  assign resp_ready = rdy_rand;
  assign resp_fire  = waiting && resp_valid && resp_ready;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= WL_BASE; req_pc <= WL_BASE; ret_pc <= WL_BASE;
      waiting <= 1'b0; in_stl <= 1'b0; timer_pend <= 1'b0; done <= 1'b0;
      passes = 0; tcnt = 0; cycles = 0;
      stl_runs = 0; stl_insns = 0; n_irq = 0; n_timer = 0; n_checks = 0; n_errors = 0;
    end else if (!done) begin
      cycles++;
      if (timer_period > 0 && !in_stl && stl_runs < stl_limit && passes < passes_target) begin
        tcnt++;
        if (tcnt >= timer_period) timer_pend <= 1'b1;
      end
      if (take_irq) begin
        ret_pc  <= req_pc;
        pc      <= ROM_BASE;
        in_stl  <= 1'b1;
        waiting <= 1'b0;
        n_irq++;
      end else if (req_valid && req_ready) begin
        waiting <= 1'b1;
        req_pc  <= pc;
      end else if (resp_fire) begin
        waiting <= 1'b0;
        n_checks++;
        if (resp_data !== exp_word(req_pc)) begin
          n_errors++;
          $display("fetch %h: got %h expected %h", req_pc, resp_data, exp_word(req_pc));
        end
        if (is_stl(req_pc)) stl_insns++;
        // where the program goes next
        next_pc = req_pc + 4;
        if (is_stl(req_pc) && resp_data == MRET) begin
          next_pc = ret_pc;
          in_stl  <= 1'b0;
          stl_runs++;
        end else if (!is_stl(req_pc) && next_pc == WL_BASE + WL_WORDS * 4) begin
          passes++;
          next_pc = WL_BASE;
        end
        if (!is_stl(req_pc) || resp_data == MRET) begin
          // at an instruction boundary outside the STL
          if ((call_mode && next_pc == WL_BASE && passes > 0 && resp_data != MRET &&
               stl_runs < stl_limit) ||
              (passes >= passes_target && stl_runs < stl_limit)) begin
            ret_pc <= next_pc;
            next_pc = ROM_BASE;
            in_stl <= 1'b1;
          end else if (timer_pend && stl_runs < stl_limit) begin
            ret_pc <= next_pc;
            next_pc = ROM_BASE;
            in_stl <= 1'b1;
            timer_pend <= 1'b0;
            tcnt = 0;
            n_timer++;
          end else if (passes >= passes_target) begin
            done <= 1'b1;
          end
        end
        pc <= next_pc;
      end
    end
  end
endmodule
