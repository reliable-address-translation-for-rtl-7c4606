// tb_xlat_ctrl: self-checking testbench of the translation-source controller.
//
// The CFR pair and the iTLB around it are behavioural models here: the CFRs
// are two registers loaded from cfr_upd_o, into which upsets are injected at
// random; the iTLB answers a lookup one cycle later and holds only the pages
// the testbench has "walked" (a miss is filled a few cycles after miss_o).
// The page table is a fixed hash VPN -> PFN/PB. Random requests (random
// A bit, pages drawn from a small pool) and random response back-pressure
// are applied. For every request the testbench predicts the physical
// address, the protection bits, the source, and the latency: 1 cycle from
// the CFRs, 2 from the iTLB, more after a miss. It also checks that the CFRs
// are reloaded after every iTLB translation and that no iTLB lookup is made
// for a fetch the CFRs can serve.
module tb_xlat_ctrl;
  import rat_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_abit = 0;
  logic [VA_W-1:0] req_va = '0;
  logic rsp_valid, rsp_ready = 0;
  logic [VA_W-1:0] rsp_va;
  logic [PA_W-1:0] rsp_pa;
  logic [PB_W-1:0] rsp_pb;
  xlat_src_e rsp_src;
  cfr_t c0 = '0, c1 = '0, upd_val;
  logic cfr_upd;
  logic lk_valid;
  logic [VPN_W-1:0] lk_vpn, miss_vpn;
  logic tlb_v_q = 0;
  logic [VPN_W-1:0] tlb_vpn_q = '0;
  logic miss, fill_done = 0;
  logic ev_cfr, ev_abit, ev_mm, ev_upd, ev_miss;
  bit present [64];

  xlat_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_va_i(req_va), .req_abit_i(req_abit),
    .rsp_valid_o(rsp_valid), .rsp_ready_i(rsp_ready), .rsp_va_o(rsp_va), .rsp_pa_o(rsp_pa),
    .rsp_pb_o(rsp_pb), .rsp_src_o(rsp_src),
    .cfr_i(c0), .cfr_match_i(c0 == c1), .cfr_upd_o(cfr_upd), .cfr_upd_val_o(upd_val),
    .lk_valid_o(lk_valid), .lk_vpn_o(lk_vpn),
    .tlb_valid_i(tlb_v_q), .tlb_hit_i(present[tlb_vpn_q[5:0]]),
    .tlb_pfn_i(pt_pfn(tlb_vpn_q)), .tlb_pb_i(pt_pb(tlb_vpn_q)),
    .miss_o(miss), .miss_vpn_o(miss_vpn), .fill_done_i(fill_done),
    .ev_cfr_o(ev_cfr), .ev_abit_o(ev_abit), .ev_mismatch_o(ev_mm), .ev_cfr_upd_o(ev_upd),
    .ev_tlb_miss_o(ev_miss)
  );

  always #5 clk = ~clk;

  function automatic logic [PFN_W-1:0] pt_pfn(input logic [VPN_W-1:0] v);
    return PFN_W'(v * 32'h9E37_79B1 + 32'h1234);
  endfunction
  function automatic logic [PB_W-1:0] pt_pb(input logic [VPN_W-1:0] v);
    return PB_W'(v ^ (v >> 3));
  endfunction

  // behavioural iTLB and CFR pair
  int miss_wait = 0;
  always @(posedge clk) begin
    tlb_v_q   <= lk_valid;
    tlb_vpn_q <= lk_vpn;
    if (cfr_upd) begin
      c0 <= upd_val;
      c1 <= upd_val;
    end else if ($urandom % 40 == 0) begin
      c1 <= c1 ^ (cfr_t'(1) << ($urandom % $bits(cfr_t)));
    end
  end

  typedef struct {
    logic [PA_W-1:0] pa;
    logic [PB_W-1:0] pb;
    xlat_src_e       src;
    int              lat;     // expected latency, 0 = not checked (miss)
    int              t_acc;
  } exp_t;
  exp_t q[$];

  int checks = 0, failures = 0, cyc = 0;
  int n_cfr = 0, n_abit = 0, n_mm = 0, n_miss = 0, n_bp = 0;
  bit seen_valid = 0;
  bit missed_cur = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      // drive
      if (!req_valid || req_ready) begin
        req_valid = ($urandom % 4) != 0;
        req_va    = {VPN_W'($urandom % 8 + (($urandom % 16 == 0) ? 8 : 0)), PAGE_BITS'($urandom)};
        req_abit  = ($urandom % 5) == 0;
      end
      rsp_ready = ($urandom % 4) != 0;
      fill_done = 0;
      if (miss) begin
        if (miss_wait == 0) miss_wait = 3 + $urandom % 5;
        else if (--miss_wait == 0) begin
          fill_done = 1;
          present[miss_vpn[5:0]] = 1;
        end
      end
      if ($urandom % 200 == 0) foreach (present[i]) present[i] = 0;  // OS shootdown
      #1;
      // monitor the coming edge
      if (lk_valid && req_valid && req_ready && req_abit == A_FROM_CFR && c0 == c1) begin
        failures++; $display("FAIL iTLB looked up for a CFR fetch");
      end
      if (ev_miss) begin n_miss++; missed_cur = 1; end
      if (rsp_valid && !seen_valid) begin
        seen_valid = 1;
        if (q.size() > 0 && q[0].lat != 0 && !missed_cur) begin
          checks++;
          if (cyc - q[0].t_acc != q[0].lat) begin
            failures++; $display("FAIL latency %0d expected %0d", cyc - q[0].t_acc, q[0].lat);
          end
        end
      end
      if (rsp_valid && !rsp_ready) n_bp++;
      if (rsp_valid && rsp_ready) begin
        checks++;
        if (q.size() == 0) begin
          failures++; $display("FAIL unexpected response");
        end else begin
          if (rsp_pa !== q[0].pa || rsp_pb !== q[0].pb || rsp_src !== q[0].src) begin
            failures++;
            $display("FAIL pa=%h/%h pb=%h/%h src=%s/%s", rsp_pa, q[0].pa, rsp_pb, q[0].pb,
                     rsp_src.name(), q[0].src.name());
          end
          void'(q.pop_front());
        end
        seen_valid = 0;
        missed_cur = 0;
      end
      if (req_valid && req_ready) begin
        exp_t e;
        logic [VPN_W-1:0] v;
        v = req_va[VA_W-1:PAGE_BITS];
        e.t_acc = cyc;
        if (req_abit == A_FROM_CFR && c0 == c1) begin
          e.pa = {c0.pfn, req_va[PAGE_BITS-1:0]}; e.pb = c0.pb; e.src = SRC_CFR; e.lat = 1;
          n_cfr++;
        end else begin
          e.pa = {pt_pfn(v), req_va[PAGE_BITS-1:0]}; e.pb = pt_pb(v);
          e.src = (req_abit == A_FROM_ITLB) ? SRC_ITLB : SRC_ITLB_ERR;
          e.lat = 2;
          if (req_abit == A_FROM_ITLB) n_abit++; else n_mm++;
        end
        q.push_back(e);
      end
      // CFR reload check: after an iTLB hit both CFRs get the translation
      if (tlb_v_q && present[tlb_vpn_q[5:0]]) begin
        checks++;
        if (!cfr_upd || upd_val.pfn !== pt_pfn(tlb_vpn_q) || upd_val.pb !== pt_pb(tlb_vpn_q)) begin
          failures++; $display("FAIL CFR not reloaded");
        end
      end
    end
  end

  initial begin
    foreach (present[i]) present[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    checks++;
    if (n_cfr == 0 || n_abit == 0 || n_mm == 0 || n_miss == 0 || n_bp == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("cfr=%0d abit=%0d mismatch=%0d miss=%0d backpressure=%0d", n_cfr, n_abit, n_mm, n_miss, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
