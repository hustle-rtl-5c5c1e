// icache_model: behavioural model of a blocking, direct-mapped instruction
// cache, used only by testbenches as the IC behind HUSTLE.
//
// The cache holds LINES lines of LINE_WORDS 32-bit words and serves one
// request at a time. A hit is answered HIT_LAT cycles after the request is
// accepted; a miss pulses miss for one cycle right after acceptance, refills
// the line in MISS_LAT cycles and then answers. A flush drops the pending
// answer but lets a refill finish and install its line. The backing memory
// returns the words of IMG_FILE for addresses in [IMG_BASE, IMG_BASE +
// 4*IMG_WORDS) and mem_word(addr) elsewhere. Counters of requests and misses,
// split by inside and outside the image range, are outputs.
module icache_model #(
  parameter int unsigned LINES      = 16,
  parameter int unsigned LINE_WORDS = 8,
  parameter int unsigned HIT_LAT    = 1,
  parameter int unsigned MISS_LAT   = 20,
  parameter logic [31:0] IMG_BASE   = 32'h0001_0000,
  parameter int unsigned IMG_WORDS  = 1024,
  parameter string       IMG_FILE   = "rtl/hustle_stl.hex"
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  input  logic        flush,
  output logic        resp_valid,
  input  logic        resp_ready,
  output logic [31:0] resp_data,
  output logic        miss,
  output int          n_req_img,
  output int          n_req_other,
  output int          n_miss_img,
  output int          n_miss_other
);
  localparam int unsigned OFF_W = $clog2(LINE_WORDS * 4);
  localparam int unsigned IDX_W = $clog2(LINES);

  logic [31:0] img [IMG_WORDS];
  logic [31:0] tag_q [LINES];
  logic        vld_q [LINES];

  typedef enum logic [1:0] {S_READY, S_WAIT, S_RESP} st_e;
  st_e         st;
  int          cnt;
  logic [31:0] cur_addr;
  logic        killed, refill;

  initial begin
    for (int i = 0; i < IMG_WORDS; i++) img[i] = '0;
    $readmemh(IMG_FILE, img);
  end

  function automatic logic [31:0] mem_word(logic [31:0] a);
    if (a >= IMG_BASE && a < IMG_BASE + IMG_WORDS * 4) return img[(a - IMG_BASE) >> 2];
    return (a * 32'h9E37_79B1) ^ 32'h1357_9BDF;
  endfunction

  function automatic logic [IDX_W-1:0] idx_of(logic [31:0] a);
    return a[OFF_W +: IDX_W];
  endfunction

  function automatic logic in_img(logic [31:0] a);
    return a >= IMG_BASE && a < IMG_BASE + IMG_WORDS * 4;
  endfunction

  assign req_ready  = (st == S_READY);
  assign resp_valid = (st == S_RESP);
  assign resp_data  = mem_word(cur_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_READY; cnt <= 0; cur_addr <= '0; killed <= 1'b0; refill <= 1'b0;
      miss <= 1'b0;
      n_req_img <= 0; n_req_other <= 0; n_miss_img <= 0; n_miss_other <= 0;
      for (int i = 0; i < LINES; i++) begin vld_q[i] <= 1'b0; tag_q[i] <= '0; end
    end else begin
      miss <= 1'b0;
      case (st)
        S_READY: if (req_valid) begin
          logic hit;
          hit = vld_q[idx_of(req_addr)] && tag_q[idx_of(req_addr)] == (req_addr >> (OFF_W + IDX_W));
          cur_addr <= req_addr;
          killed   <= 1'b0;
          refill   <= !hit;
          cnt      <= hit ? int'(HIT_LAT) : int'(MISS_LAT);
          st       <= S_WAIT;
          if (in_img(req_addr)) n_req_img <= n_req_img + 1; else n_req_other <= n_req_other + 1;
          if (!hit) begin
            miss <= 1'b1;
            if (in_img(req_addr)) n_miss_img <= n_miss_img + 1;
            else                  n_miss_other <= n_miss_other + 1;
          end
        end
        S_WAIT: begin
          if (flush) killed <= 1'b1;
          if (cnt <= 1) begin
            if (refill) begin
              vld_q[idx_of(cur_addr)] <= 1'b1;
              tag_q[idx_of(cur_addr)] <= cur_addr >> (OFF_W + IDX_W);
            end
            st <= (killed || flush) ? S_READY : S_RESP;
          end else cnt <= cnt - 1;
        end
        S_RESP: if (flush || resp_ready) st <= S_READY;
        default: st <= S_READY;
      endcase
    end
  end
endmodule
