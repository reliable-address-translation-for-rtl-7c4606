// workload_bench: runs the fetch front end, at page size 2**PG_BITS, over
// synthetic programs with the page-change behaviour of eight SPEC CPU
// applications, and checks the cycle cost of translation.
//
// The program is the same for every page size: 64 KB of code (4096 fetch
// groups) cut into runs of consecutive groups, the run ends drawn with a
// per-application probability, and the runs chained in a shuffled order into
// one loop that visits every group once. The jump probability is set so
// that with 8 KB pages the fraction of fetches that change page is near the
// application's measured rate (lucas 1.67 %, apsi 1.05 %, vpr 2.80 %, crafty
// 3.87 %, soplex 4.14 %, tonto 3.07 %, mcf 3.48 %, astar 5.62 %). The A bits
// are those a compiler would write for the given page size. The other bits
// of an instruction are a hash of its address.
//
// For each application the front end is reset, all 4096 groups are fetched
// once (warm-up), and then G groups of the program are fetched, one at a
// time, with the A bit from the previous-IR register. Checked over that part:
// iTLB reads requested by the A bit equal the page changes of the stream, no
// other iTLB read, iTLB miss or cache miss happens, every group is correct,
// and the cycle count is exactly 5 per group plus 1 per page change.
//
// Ports: start_i begins the run; done_o rises when it ends; checks_o and
// failures_o count the checks; changes_o/cycles_o give, per application,
// the page changes and cycles of the measured part.
module workload_bench
  import rat_pkg::*;
#(
  parameter int unsigned PG_BITS = 13,
  parameter int          G       = 20000
) (
  input  logic clk_i,
  input  logic start_i,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   changes_o [8],
  output int   cycles_o  [8]
);

  localparam int VPN_WD  = VA_W - PG_BITS;
  localparam int PFN_WD  = PA_W - PG_BITS;
  localparam int PFN_OFS = 500;
  localparam int NGRP    = 4096;  // 64 KB of code

  logic rst_n = 0;
  logic req_valid = 0, req_ready, req_use_prev = 1;
  logic [VA_W-1:0] req_va = '0;
  logic rsp_valid;
  logic [FETCH_W-1:0][INSTR_W-1:0] rsp_instr;
  logic [VA_W-1:0] rsp_va;
  logic xl_fire;
  xlat_src_e xl_src;
  logic [PB_W-1:0] xl_pb;
  logic tlb_miss, tlb_fill = 0;
  logic [VPN_WD-1:0] tlb_miss_vpn, fill_vpn = '0;
  logic [PFN_WD-1:0] fill_pfn = '0;
  logic [PFN_WD+PB_W-1:0] ctx0_o, ctx1_o;
  logic mem_req_valid, mem_rsp_valid = 0;
  logic [PA_W-1:0] mem_req_addr;
  logic [511:0] mem_rsp_data = '0;
  logic ev_cfr, ev_abit, ev_mm, ev_upd, ev_tmiss, ev_corr, ev_ue, ev_icmiss;

  rat_ifetch #(.PG_BITS(PG_BITS)) dut (
    .clk_i(clk_i), .rst_ni(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_va_i(req_va),
    .req_use_prev_i(req_use_prev), .req_abit_i(A_FROM_ITLB),
    .rsp_valid_o(rsp_valid), .rsp_ready_i(1'b1), .rsp_instr_o(rsp_instr), .rsp_va_o(rsp_va),
    .xl_fire_o(xl_fire), .xl_src_o(xl_src), .xl_pb_o(xl_pb),
    .tlb_miss_o(tlb_miss), .tlb_miss_vpn_o(tlb_miss_vpn), .tlb_fill_valid_i(tlb_fill),
    .tlb_fill_vpn_i(fill_vpn), .tlb_fill_pfn_i(fill_pfn), .tlb_fill_pb_i('0),
    .tlb_fill_inj_i('0), .tlb_flush_i(1'b0),
    .ctx_restore_i(1'b0), .ctx_cfr0_i('0), .ctx_cfr1_i('0),
    .ctx_cfr0_o(ctx0_o), .ctx_cfr1_o(ctx1_o), .cfr_inj0_i('0), .cfr_inj1_i('0),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(1'b1), .mem_req_addr_o(mem_req_addr),
    .mem_rsp_valid_i(mem_rsp_valid), .mem_rsp_data_i(mem_rsp_data),
    .ev_cfr_o(ev_cfr), .ev_abit_o(ev_abit), .ev_mismatch_o(ev_mm), .ev_cfr_upd_o(ev_upd),
    .ev_tlb_miss_o(ev_tmiss), .ev_ecc_corr_o(ev_corr), .ev_ecc_ue_o(ev_ue), .ev_ic_miss_o(ev_icmiss)
  );

  // page-change rates with 8 KB pages, in units of 0.01 %
  string names [8] = '{"lucas", "apsi", "vpr", "crafty", "soplex", "tonto", "mcf", "astar"};
  int    rates [8] = '{167, 105, 280, 387, 414, 307, 348, 562};
  int    jump  = 0;  // jump probability, 0.01 % units
  int    salt  = 0;

  function automatic logic [31:0] hash(input logic [63:0] a);
    logic [63:0] x = (a + 64'h3B) * 64'h9E37_79B9_7F4A_7C15;
    return x[63:32] ^ x[31:0];
  endfunction

  // Program layout: the 4096 groups are cut into runs of consecutive groups
  // (a run ends after group g with the jump probability); the runs are
  // chained in a shuffled order into one loop, so every group is visited
  // once per 4096 groups and the last group of a run jumps to the next run.
  int nxt [NGRP];

  task automatic build_program();
    int starts [$];
    int ends   [$];
    int order  [$];
    int t;
    starts.push_back(0);
    for (int g = 0; g < NGRP - 1; g++)
      if (int'(hash(64'(g) ^ (64'(salt) << 20)) % 10000) < jump) begin
        ends.push_back(g);
        starts.push_back(g + 1);
      end
    ends.push_back(NGRP - 1);
    foreach (starts[r]) order.push_back(r);
    for (int r = order.size() - 1; r > 0; r--) begin
      int k = int'(hash(64'(r) + (64'(salt) << 24)) % (r + 1));
      t = order[r]; order[r] = order[k]; order[k] = t;
    end
    for (int g = 0; g < NGRP; g++) nxt[g] = (g + 1) % NGRP;
    foreach (order[i]) nxt[ends[order[i]]] = starts[order[(i + 1) % order.size()]];
  endtask

  function automatic logic [VA_W-1:0] next_group(input logic [VA_W-1:0] g);
    return VA_W'(nxt[int'(g >> 4)] * 16);
  endfunction

  function automatic bit page_change(input logic [VA_W-1:0] a, input logic [VA_W-1:0] b);
    return (a >> PG_BITS) != (b >> PG_BITS);
  endfunction

  function automatic logic [31:0] instr_at(input logic [VA_W-1:0] va);
    logic [31:0] w = hash(64'(va) + 64'(salt));
    logic [VA_W-1:0] g = {va[VA_W-1:4], 4'b0};
    w[A_BIT_POS] = (va[3:2] == 2'd3 && page_change(g, next_group(g))) ? A_FROM_ITLB : A_FROM_CFR;
    return w;
  endfunction

  // next memory level: 12 cycles; frames are pages + PFN_OFS
  int mem_wait = -1;
  logic [PA_W-1:0] mem_addr_q;
  always @(negedge clk_i) begin
    mem_rsp_valid = 0;
    if (mem_wait > 0) mem_wait--;
    else if (mem_wait == 0) begin
      logic [VA_W-1:0] va;
      va = VA_W'(mem_addr_q - (PA_W'(PFN_OFS) << PG_BITS));
      for (int i = 0; i < 16; i++) mem_rsp_data[i*32 +: 32] = instr_at(va + VA_W'(4 * i));
      mem_rsp_valid = 1;
      mem_wait = -1;
    end
    #1;
    if (mem_req_valid) begin
      mem_addr_q = mem_req_addr;
      if (mem_wait < 0) mem_wait = 11;
    end
  end

  // page-table walk
  int walk_wait = 0;
  always @(negedge clk_i) begin
    tlb_fill = 0;
    if (tlb_miss) begin
      if (walk_wait == 0) walk_wait = 5;
      else if (--walk_wait == 0) begin
        tlb_fill = 1;
        fill_vpn = tlb_miss_vpn;
        fill_pfn = PFN_WD'(tlb_miss_vpn) + PFN_WD'(PFN_OFS);
      end
    end
  end

  int cyc = 0, n_abit = 0, n_other = 0, n_wrong = 0;
  logic [VA_W-1:0] exp_va;
  bit measuring = 0;

  always @(negedge clk_i) begin
    #2;
    cyc++;
    if (measuring) begin
      if (ev_abit) n_abit++;
      if (ev_mm || ev_tmiss || ev_icmiss || ev_corr || ev_ue) n_other++;
    end
    if (rsp_valid)
      for (int i = 0; i < FETCH_W; i++)
        if (rsp_instr[i] !== instr_at(exp_va + VA_W'(4 * i)) || rsp_va !== exp_va) n_wrong++;
  end

  task automatic fetch(input logic [VA_W-1:0] va, input bit use_prev);
    exp_va = va;
    @(negedge clk_i);
    req_valid = 1; req_va = va; req_use_prev = use_prev;
    #1;
    while (!req_ready) begin @(negedge clk_i); #1; end
    @(negedge clk_i);
    req_valid = 0;
    #3;
    while (!rsp_valid) begin @(negedge clk_i); #3; end
  endtask

  initial begin
    logic [VA_W-1:0] g, n;
    int changes, c0, c1;
    done_o = 0; checks_o = 0; failures_o = 0;
    foreach (changes_o[b]) begin changes_o[b] = 0; cycles_o[b] = 0; end
    wait (start_i);
    for (int b = 0; b < 8; b++) begin
      // fall-through crosses an 8 KB page once per 512 groups (0.195 %)
      jump = (rates[b] - 20) * 8 / 7;
      salt = 1000 * b + 7;
      build_program();
      rst_n = 0;
      repeat (3) @(negedge clk_i);
      rst_n = 1;
      for (int i = 0; i < NGRP; i++) fetch(VA_W'(i * 16), 0);
      n_abit = 0; n_other = 0; n_wrong = 0; changes = 0;
      g = '0;
      fetch(g, 0);
      measuring = 1;
      c0 = cyc;
      for (int i = 0; i < G; i++) begin
        n = next_group(g);
        if (page_change(g, n)) changes++;
        g = n;
        fetch(g, 1);
      end
      c1 = cyc;
      measuring = 0;
      checks_o += 3;
      if (n_abit != changes || n_other != 0) begin
        failures_o++;
        $display("FAIL %s: iTLB reads %0d for %0d page changes, other events %0d", names[b], n_abit, changes, n_other);
      end
      if (n_wrong != 0) begin failures_o++; $display("FAIL %s: %0d wrong groups", names[b], n_wrong); end
      if (c1 - c0 != 5 * G + changes) begin
        failures_o++; $display("FAIL %s: %0d cycles, expected %0d", names[b], c1 - c0, 5 * G + changes);
      end
      changes_o[b] = changes;
      cycles_o[b]  = c1 - c0;
      $display("%2d KB pages  %-7s page changes %5.2f%% (8 KB target %5.2f%%)  cycles %0d: +%4.2f%%, coded iTLB on every fetch: +%5.2f%%",
               (1 << PG_BITS) / 1024, names[b], 100.0 * changes / G, rates[b] / 100.0, c1 - c0,
               100.0 * (c1 - c0 - 5 * G) / (5 * G), 100.0 * G / (5 * G));
    end
    done_o = 1;
  end

endmodule
