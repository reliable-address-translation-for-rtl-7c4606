// tb_rat_ifetch: end-to-end testbench of the fetch front end at its default
// parameters.
//
// The testbench plays the parts around the front end:
//   - the program: a synthetic instruction stream in virtual memory. Each
//     fetch group either falls through to the next group or ends in a branch
//     (to the same page or to one of 80 pages). The annotation bit (bit 31)
//     of the last instruction of a group is set as a compiler would: 1 when
//     the next group is on another page (branch or page boundary) and for
//     branches marked as not analysable, 0 otherwise. The other bits are a
//     hash of the address.
//   - the core: fetches one group at a time, taking the A bit from the
//     previous-IR register, with an occasional redirect that supplies A = 1.
//   - the operating system: answers an iTLB miss with a fill from a fixed
//     page table (PFN = VPN + 1000); some fills carry injected upsets, of
//     1-4 adjacent bits (corrected) or 5-8 (uncorrectable: refilled).
//   - the next memory level: returns a block 12 cycles after the request.
//   - soft errors in the CFRs, and a context switch (save, another process,
//     restore).
// Checked: every fetch group and its address; the source of every
// translation (CFRs only when A = 0 and the CFRs agree); the latency of
// fetches that miss nowhere (4 cycles from the CFRs, 5 from the iTLB); and
// that each mechanism occurred at least once.
module tb_rat_ifetch;
  import rat_pkg::*;

  localparam int NPAGES = 80;
  localparam int PFN_OFS = 1000;
  localparam int TLB_CW = ecc_il_len(1 + VPN_W - 4 + PFN_W + PB_W, 4);

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_use_prev = 1, req_abit = 0;
  logic [VA_W-1:0] req_va = '0;
  logic rsp_valid, rsp_ready = 1;
  logic [FETCH_W-1:0][INSTR_W-1:0] rsp_instr;
  logic [VA_W-1:0] rsp_va;
  logic xl_fire;
  xlat_src_e xl_src;
  logic [PB_W-1:0] xl_pb;
  logic tlb_miss, tlb_fill = 0, tlb_flush = 0;
  logic [VPN_W-1:0] tlb_miss_vpn, fill_vpn = '0;
  logic [PFN_W-1:0] fill_pfn = '0;
  logic [PB_W-1:0] fill_pb = '0;
  logic [TLB_CW-1:0] fill_inj = '0;
  logic ctx_restore = 0;
  cfr_t ctx0_i = '0, ctx1_i = '0, ctx0_o, ctx1_o, inj0 = '0, inj1 = '0;
  logic mem_req_valid, mem_req_ready = 1, mem_rsp_valid = 0;
  logic [PA_W-1:0] mem_req_addr;
  logic [511:0] mem_rsp_data = '0;
  logic ev_cfr, ev_abit, ev_mm, ev_upd, ev_tmiss, ev_corr, ev_ue, ev_icmiss;

  rat_ifetch dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_va_i(req_va),
    .req_use_prev_i(req_use_prev), .req_abit_i(req_abit),
    .rsp_valid_o(rsp_valid), .rsp_ready_i(rsp_ready), .rsp_instr_o(rsp_instr), .rsp_va_o(rsp_va),
    .xl_fire_o(xl_fire), .xl_src_o(xl_src), .xl_pb_o(xl_pb),
    .tlb_miss_o(tlb_miss), .tlb_miss_vpn_o(tlb_miss_vpn), .tlb_fill_valid_i(tlb_fill),
    .tlb_fill_vpn_i(fill_vpn), .tlb_fill_pfn_i(fill_pfn), .tlb_fill_pb_i(fill_pb),
    .tlb_fill_inj_i(fill_inj), .tlb_flush_i(tlb_flush),
    .ctx_restore_i(ctx_restore), .ctx_cfr0_i(ctx0_i), .ctx_cfr1_i(ctx1_i),
    .ctx_cfr0_o(ctx0_o), .ctx_cfr1_o(ctx1_o), .cfr_inj0_i(inj0), .cfr_inj1_i(inj1),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_addr_o(mem_req_addr),
    .mem_rsp_valid_i(mem_rsp_valid), .mem_rsp_data_i(mem_rsp_data),
    .ev_cfr_o(ev_cfr), .ev_abit_o(ev_abit), .ev_mismatch_o(ev_mm), .ev_cfr_upd_o(ev_upd),
    .ev_tlb_miss_o(ev_tmiss), .ev_ecc_corr_o(ev_corr), .ev_ecc_ue_o(ev_ue), .ev_ic_miss_o(ev_icmiss)
  );

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- program
  function automatic logic [31:0] hash(input logic [63:0] a);
    logic [63:0] x = (a + 64'h1F) * 64'h9E37_79B9_7F4A_7C15;
    return x[63:32] ^ x[31:0];
  endfunction

  function automatic logic [VA_W-1:0] next_group(input logic [VA_W-1:0] g, output bit unanalysable);
    logic [31:0] h = hash(64'(g) ^ 64'hABCD);
    logic [VPN_W-1:0] v = g[VA_W-1:PAGE_BITS];
    unanalysable = 0;
    if (h % 8 == 0) begin  // branch
      if ((h >> 8) % 8 == 0) v = VPN_W'((h >> 12) % NPAGES);
      unanalysable = (h >> 4) % 6 == 0;
      return {v, PAGE_BITS'((h >> 16) & 32'h1FF0)};
    end
    // fall through; the last group of the last page wraps to page 0
    if (g[VA_W-1:PAGE_BITS] == VPN_W'(NPAGES - 1) && g[PAGE_BITS-1:4] == '1) return '0;
    return g + VA_W'(16);
  endfunction

  function automatic logic abit_of_group(input logic [VA_W-1:0] g);
    bit u;
    logic [VA_W-1:0] n = next_group(g, u);
    return (u || n[VA_W-1:PAGE_BITS] != g[VA_W-1:PAGE_BITS]) ? A_FROM_ITLB : A_FROM_CFR;
  endfunction

  function automatic logic [31:0] instr_at(input logic [VA_W-1:0] va);
    logic [31:0] w = hash(64'(va));
    w[A_BIT_POS] = (va[3:2] == 2'd3) ? abit_of_group({va[VA_W-1:4], 4'b0}) : 1'b0;
    return w;
  endfunction

  function automatic logic [PFN_W-1:0] pt_pfn(input logic [VPN_W-1:0] v);
    return PFN_W'(v) + PFN_W'(PFN_OFS);
  endfunction
  function automatic logic [PB_W-1:0] pt_pb(input logic [VPN_W-1:0] v);
    return PB_W'(v) ^ PB_W'(5);
  endfunction

  // ---------------------------------------------------------- memory model
  int mem_wait = -1;
  logic [PA_W-1:0] mem_addr_q;
  always @(negedge clk) begin
    mem_rsp_valid = 0;
    if (mem_wait > 0) mem_wait--;
    else if (mem_wait == 0) begin
      logic [VA_W-1:0] va;
      va = {VPN_W'(mem_addr_q[PA_W-1:PAGE_BITS] - PFN_W'(PFN_OFS)), mem_addr_q[PAGE_BITS-1:0]};
      for (int i = 0; i < 16; i++) mem_rsp_data[i*32 +: 32] = instr_at(va + VA_W'(4 * i));
      mem_rsp_valid = 1;
      mem_wait = -1;
    end
    #1;
    if (mem_req_valid && mem_req_ready) begin
      mem_addr_q = mem_req_addr;
      mem_wait = 11;
    end
  end

  // ------------------------------------------------------------ OS walker
  int walk_wait = 0;
  int n_inj_small = 0, n_inj_big = 0;
  always @(negedge clk) begin
    tlb_fill = 0; fill_inj = '0;
    if (tlb_miss) begin
      if (walk_wait == 0) walk_wait = 4 + $urandom % 4;
      else if (--walk_wait == 0) begin
        int r, len, st;
        r = $urandom % 10;
        tlb_fill = 1;
        fill_vpn = tlb_miss_vpn;
        fill_pfn = pt_pfn(tlb_miss_vpn);
        fill_pb  = pt_pb(tlb_miss_vpn);
        if (r < 3) begin
          len = (r == 0) ? 5 + $urandom % 4 : 1 + $urandom % 4;
          st  = $urandom % (TLB_CW - len + 1);
          for (int i = 0; i < len; i++) fill_inj[st + i] = 1'b1;
          if (r == 0) n_inj_big++; else n_inj_small++;
        end
      end
    end
  end

  // ------------------------------------------------------------- checking
  int checks = 0, failures = 0, cyc = 0;
  int n_grp = 0, n_cfr = 0, n_abit = 0, n_mm = 0, n_upd = 0, n_tmiss = 0, n_corr = 0, n_ue = 0;
  int n_icmiss = 0, n_redirect = 0, n_ctx = 0, n_bp = 0, n_lat = 0, n_boundary = 0;
  bit model_match = 0;       // do the CFRs agree (as the testbench knows)
  bit fetch_missed = 0;      // a miss or a held response during the current fetch
  int t_req = 0;
  logic exp_abit;
  xlat_src_e exp_src;
  logic [VA_W-1:0] exp_va;

  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      cyc++;
      if (ev_cfr) n_cfr++;
      if (ev_abit) n_abit++;
      if (ev_mm) n_mm++;
      if (ev_upd) begin n_upd++; model_match = 1; end
      if (ev_tmiss) begin n_tmiss++; fetch_missed = 1; end
      if (ev_corr) n_corr++;
      if (ev_ue) n_ue++;
      if (ev_icmiss) begin n_icmiss++; fetch_missed = 1; end
      if (rsp_valid && !rsp_ready) begin n_bp++; fetch_missed = 1; end
      if (req_valid && req_ready) t_req = cyc;
      if (xl_fire) begin
        checks++;
        if (xl_src !== exp_src || xl_pb !== pt_pb(exp_va[VA_W-1:PAGE_BITS])) begin
          failures++;
          $display("FAIL va=%h source %s expected %s pb=%h", exp_va, xl_src.name(), exp_src.name(), xl_pb);
        end
      end
      if (rsp_valid && rsp_ready) begin
        checks++;
        for (int i = 0; i < FETCH_W; i++)
          if (rsp_instr[i] !== instr_at(exp_va + VA_W'(4 * i))) begin
            failures++;
            $display("FAIL va=%h slot %0d got %h expected %h", exp_va, i, rsp_instr[i],
                     instr_at(exp_va + VA_W'(4 * i)));
          end
        if (rsp_va !== exp_va) begin failures++; $display("FAIL response va %h", rsp_va); end
        if (!fetch_missed) begin
          checks++; n_lat++;
          if (cyc - t_req != ((exp_src == SRC_CFR) ? 4 : 5)) begin
            failures++; $display("FAIL latency %0d for source %s", cyc - t_req, exp_src.name());
          end
        end
        n_grp++;
      end
    end
  end

  // one fetch: request, wait for the group
  task automatic fetch(input logic [VA_W-1:0] va, input bit use_prev, input logic abit_prev);
    logic a = use_prev ? abit_prev : A_FROM_ITLB;
    exp_va = va;
    exp_src = (a == A_FROM_CFR && model_match) ? SRC_CFR :
              (a == A_FROM_ITLB) ? SRC_ITLB : SRC_ITLB_ERR;
    fetch_missed = 0;
    @(negedge clk);
    req_valid = 1; req_va = va; req_use_prev = use_prev; req_abit = A_FROM_ITLB;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid = 0;
    while (!(rsp_valid && rsp_ready)) begin
      @(negedge clk);
      rsp_ready = ($urandom % 8) != 0;
      #3;
    end
    @(negedge clk);
    rsp_ready = 1;
  endtask

  initial begin
    logic [VA_W-1:0] g, n;
    logic a_prev;
    bit u;
    cfr_t s0, s1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    g = {VPN_W'(2), PAGE_BITS'(13'h1F00)};  // near the end of page 2
    a_prev = A_FROM_ITLB;                   // the previous-IR register after reset
    for (int i = 0; i < 6000; i++) begin
      // occasional redirect (A bit supplied by the core, = 1)
      if (i % 97 == 50) begin
        g = {VPN_W'($urandom % NPAGES), PAGE_BITS'(($urandom % 512) * 16)};
        n_redirect++;
        fetch(g, 0, A_FROM_ITLB);
      end else begin
        fetch(g, 1, a_prev);
      end
      n = next_group(g, u);
      if (n[VA_W-1:PAGE_BITS] != g[VA_W-1:PAGE_BITS] && n == g + VA_W'(16)) n_boundary++;
      a_prev = abit_of_group(g);
      g = n;
      // soft error in one CFR, or in both at different bits
      if (i % 41 == 20) begin
        @(negedge clk);
        inj0 = ($urandom % 2) ? cfr_t'(3) << ($urandom % 30) : '0;
        inj1 = (inj0 == '0) ? cfr_t'(7) << ($urandom % 30) : cfr_t'(1) << 31;
        @(negedge clk);
        inj0 = '0; inj1 = '0;
        model_match = 0;
      end
      // context switch: save, run another process's CFRs, restore
      if (i % 500 == 250) begin
        @(negedge clk);
        s0 = ctx0_o; s1 = ctx1_o;
        ctx_restore = 1; ctx0_i = cfr_t'({$urandom, $urandom}); ctx1_i = ctx0_i;
        @(negedge clk);
        ctx0_i = s0; ctx1_i = s1;
        @(negedge clk);
        ctx_restore = 0;
        n_ctx++;
        checks++;
        if (ctx0_o !== s0 || ctx1_o !== s1) begin failures++; $display("FAIL context restore"); end
      end
      // TLB shoot-down
      if (i % 1500 == 700) begin
        @(negedge clk); tlb_flush = 1;
        @(negedge clk); tlb_flush = 0;
      end
    end
    repeat (5) @(negedge clk);
    // every mechanism must have happened
    checks++;
    if (n_cfr == 0 || n_abit == 0 || n_mm == 0 || n_upd == 0 || n_tmiss == 0 || n_corr == 0 ||
        n_ue == 0 || n_icmiss == 0 || n_redirect == 0 || n_ctx == 0 || n_bp == 0 || n_lat == 0 ||
        n_boundary == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("groups=%0d cycles=%0d cfr=%0d itlb_by_abit=%0d itlb_by_mismatch=%0d cfr_updates=%0d",
             n_grp, cyc, n_cfr, n_abit, n_mm, n_upd);
    $display("itlb_miss=%0d ecc_corrected=%0d ecc_uncorrectable=%0d icache_miss=%0d redirects=%0d",
             n_tmiss, n_corr, n_ue, n_icmiss, n_redirect);
    $display("context_switches=%0d page_boundaries=%0d latency_checks=%0d backpressure=%0d",
             n_ctx, n_boundary, n_lat, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
