// tb_icache: self-checking testbench of the instruction cache at its default
// size (64 KB, 4 ways, 64-byte blocks, fetch groups of 4 instructions).
//
// The next level is a behavioural memory whose 32-bit word at physical word
// address a is a fixed hash of a; it answers a block request after a random
// delay. Pages map to frames by a fixed hash. Checked:
//   - every fetch group returned equals the memory contents at the physical
//     address, in request order, with the request's virtual address;
//   - hits and misses agree with a reference true-LRU model of the sets
//     (tag = whole PFN, index = VA[13:6]), including addresses that differ
//     only in VA bit 13 and pages that alias to one frame;
//   - a hit returns 3 cycles after its request, and back-to-back hits come
//     out one per cycle.
module tb_icache;
  import rat_pkg::*;

  localparam int SETS = 256, WAYS = 4, LINE_W = 512;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  logic [VA_W-1:0] req_va = '0;
  logic [PFN_W-1:0] req_pfn = '0;
  logic rsp_valid, rsp_ready = 0;
  logic [FETCH_W-1:0][INSTR_W-1:0] rsp_instr;
  logic [VA_W-1:0] rsp_va;
  logic mem_req_valid, mem_req_ready = 0, mem_rsp_valid = 0;
  logic [PA_W-1:0] mem_req_addr;
  logic [LINE_W-1:0] mem_rsp_data = '0;
  logic ev_miss;

  icache dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_va_i(req_va), .req_pfn_i(req_pfn),
    .rsp_valid_o(rsp_valid), .rsp_ready_i(rsp_ready), .rsp_instr_o(rsp_instr), .rsp_va_o(rsp_va),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_addr_o(mem_req_addr),
    .mem_rsp_valid_i(mem_rsp_valid), .mem_rsp_data_i(mem_rsp_data), .ev_miss_o(ev_miss)
  );

  always #5 clk = ~clk;

  function automatic logic [31:0] mem_word(input logic [PA_W-1:0] pa);
    logic [63:0] x = 64'(pa >> 2);
    x = x * 64'h9E37_79B9_7F4A_7C15;
    return x[63:32] ^ x[31:0];
  endfunction

  function automatic logic [PFN_W-1:0] frame_of(input logic [VPN_W-1:0] v);
    // VPNs 0..15 map to 12 frames, so some pages alias
    return PFN_W'((v % 12) * 7 + 100);
  endfunction

  // memory model
  int mem_wait = -1;
  logic [PA_W-1:0] mem_addr_q;
  always @(negedge clk) begin
    mem_rsp_valid = 0;
    if (mem_wait > 0) mem_wait--;
    else if (mem_wait == 0) begin
      for (int i = 0; i < LINE_W / 32; i++) mem_rsp_data[i*32 +: 32] = mem_word(mem_addr_q + PA_W'(4 * i));
      mem_rsp_valid = 1;
      mem_wait = -1;
    end
    mem_req_ready = ($urandom % 3) != 0;
    #1;
    if (mem_req_valid && mem_req_ready) begin
      mem_addr_q = mem_req_addr;
      mem_wait = 1 + $urandom % 8;
    end
  end

  // reference LRU model
  typedef struct { bit v; logic [PFN_W-1:0] tag; } line_t;
  line_t lru [SETS][WAYS];  // 0 = most recent

  function automatic bit model_access(input logic [VA_W-1:0] va, input logic [PFN_W-1:0] pfn);
    int s = int'(va[13:6]);
    int h = -1;
    line_t e;
    for (int w = 0; w < WAYS; w++) if (lru[s][w].v && lru[s][w].tag == pfn) h = w;
    if (h < 0) begin
      h = WAYS - 1;
      lru[s][h] = '{v: 1, tag: pfn};
    end
    e = lru[s][h];
    for (int w = h; w > 0; w--) lru[s][w] = lru[s][w-1];
    lru[s][0] = e;
    return h < 0;
  endfunction

  typedef struct { logic [VA_W-1:0] va; logic [PFN_W-1:0] pfn; int t; } req_t;
  req_t q[$];
  int checks = 0, failures = 0, cyc = 0, misses_seen = 0, n_miss = 0, n_hit = 0;
  int last_rsp_cyc = -10, b2b = 0;
  bit random_phase = 0;
  int lat_expect = 0;  // >0: check the latency of the next response

  task automatic check_rsp();
    req_t r;
    bit   exp_miss;
    int   s;
    logic [PA_W-1:0] pa;
    logic [FETCH_W-1:0][INSTR_W-1:0] exp;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected response"); return; end
    r = q.pop_front();
    pa = {r.pfn, r.va[PAGE_BITS-1:4], 4'b0};
    for (int i = 0; i < FETCH_W; i++) exp[i] = mem_word(pa + PA_W'(4 * i));
    // model hit/miss before the LRU update
    s = int'(r.va[13:6]);
    exp_miss = 1;
    for (int w = 0; w < WAYS; w++) if (lru[s][w].v && lru[s][w].tag == r.pfn) exp_miss = 0;
    void'(model_access(r.va, r.pfn));
    if (rsp_instr !== exp || rsp_va !== r.va) begin
      failures++; $display("FAIL va=%h data=%h exp=%h", rsp_va, rsp_instr, exp);
    end
    checks++;
    if (exp_miss != (misses_seen > 0) || misses_seen > 1) begin
      failures++; $display("FAIL va=%h miss=%0d expected %b", r.va, misses_seen, exp_miss);
    end
    if (exp_miss) n_miss++; else n_hit++;
    misses_seen = 0;
    if (lat_expect > 0) begin
      checks++;
      if (cyc - r.t != lat_expect) begin
        failures++; $display("FAIL latency %0d", cyc - r.t);
      end
    end
    if (cyc == last_rsp_cyc + 1) b2b++;
    last_rsp_cyc = cyc;
  endtask

  // monitor, sampled just before each rising edge
  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      cyc++;
      if (ev_miss) misses_seen++;
      if (rsp_valid && rsp_ready) check_rsp();
      if (req_valid && req_ready) q.push_back('{va: req_va, pfn: req_pfn, t: cyc});
    end
  end

  function automatic logic [VA_W-1:0] rnd_va();
    logic [VPN_W-1:0] v = VPN_W'($urandom % 16);
    return {v, PAGE_BITS'($urandom)};
  endfunction

  task automatic issue(input logic [VA_W-1:0] va);
    @(negedge clk);
    req_valid = 1; req_va = va; req_pfn = frame_of(va[VA_W-1:PAGE_BITS]);
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    logic [VA_W-1:0] a;
    foreach (lru[s, w]) lru[s][w] = '{v: 0, tag: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    rsp_ready = 1;
    // directed: a miss, then the same group again (3-cycle hit)
    a = {VPN_W'(3), PAGE_BITS'(13'h0440)};
    issue(a);
    repeat (30) @(negedge clk);
    lat_expect = 3;
    issue(a);
    repeat (6) @(negedge clk);
    // back-to-back hits in the same block
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      req_valid = 1; req_va = a + VA_W'(16 * (i % 4)); req_pfn = frame_of(a[VA_W-1:PAGE_BITS]);
      @(negedge clk);
    end
    req_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (b2b < 7) begin failures++; $display("FAIL back-to-back hits: %0d", b2b); end
    lat_expect = 0;
    // random phase
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (!req_valid || req_ready) begin
        req_valid = ($urandom % 3) != 0;
        a = rnd_va();
        if ($urandom % 4 == 0) a[PAGE_BITS-1:0] = PAGE_BITS'(16 * ($urandom % 8));
        req_va = a; req_pfn = frame_of(a[VA_W-1:PAGE_BITS]);
      end
      rsp_ready = ($urandom % 5) != 0;
    end
    req_valid = 0; rsp_ready = 1;
    repeat (100) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_miss < 10 || n_hit < 10) begin
      failures++; $display("FAIL end: pending=%0d miss=%0d hit=%0d", q.size(), n_miss, n_hit);
    end
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
