// tb_itlb: self-checking testbench of the coded iTLB at its default size.
//
// A reference model keeps, for every set, its entries in recency order
// (true LRU, invalid slots included) and predicts hit, PFN, protection bits
// and the error flags of every lookup. Fills carry injected upsets: bursts
// of 1-4 adjacent stored bits (must be corrected, flagged, and scrubbed so a
// second lookup is clean) and bursts of 5-8 (must be flagged uncorrectable
// and the entry dropped, so the next lookup misses). Also checked: the
// result appears exactly one cycle after the lookup cycle (two-cycle
// access), replacement order, and flush.
module tb_itlb;
  import rat_pkg::*;

  localparam int SETS = 16, WAYS = 4, SW = 4;
  localparam int CW = ecc_il_len(1 + VPN_W - SW + PFN_W + PB_W, 4);

  logic clk = 0, rst_n = 0, flush = 0;
  logic lk_valid = 0;
  logic [VPN_W-1:0] lk_vpn = '0;
  logic rsp_valid, rsp_hit, rsp_corr, rsp_ue;
  logic [PFN_W-1:0] rsp_pfn;
  logic [PB_W-1:0]  rsp_pb;
  logic fill_valid = 0;
  logic [VPN_W-1:0] fill_vpn = '0;
  logic [PFN_W-1:0] fill_pfn = '0;
  logic [PB_W-1:0]  fill_pb = '0;
  logic [CW-1:0]    fill_inj = '0;

  itlb dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .lk_valid_i(lk_valid), .lk_vpn_i(lk_vpn),
    .rsp_valid_o(rsp_valid), .rsp_hit_o(rsp_hit), .rsp_pfn_o(rsp_pfn), .rsp_pb_o(rsp_pb),
    .rsp_corrected_o(rsp_corr), .rsp_uncorrectable_o(rsp_ue),
    .fill_valid_i(fill_valid), .fill_vpn_i(fill_vpn), .fill_pfn_i(fill_pfn),
    .fill_pb_i(fill_pb), .fill_inj_i(fill_inj)
  );

  always #5 clk = ~clk;

  typedef struct {
    bit               valid;
    bit               fixable;  // holds a correctable upset
    bit               bad;      // holds an uncorrectable upset
    logic [VPN_W-1:0] vpn;
    logic [PFN_W-1:0] pfn;
    logic [PB_W-1:0]  pb;
  } ment_t;

  ment_t model [SETS][WAYS];  // index 0 = most recently used
  int checks = 0, failures = 0;
  int n_hit = 0, n_corr = 0, n_ue = 0, n_miss = 0;

  function automatic logic [VPN_W-1:0] rnd_vpn();
    // few tags per set, so sets overflow and entries get replaced
    return {VPN_W'($urandom % 6) << SW} | VPN_W'($urandom % 3);
  endfunction

  task automatic do_fill(input logic [VPN_W-1:0] vpn, input int burst);
    int s;
    ment_t e;
    @(negedge clk);
    fill_valid = 1; fill_vpn = vpn;
    fill_pfn = PFN_W'({$urandom, $urandom}); fill_pb = PB_W'($urandom);
    fill_inj = '0;
    if (burst > 0) begin
      int st = $urandom % (CW - burst + 1);
      for (int i = 0; i < burst; i++) fill_inj[st + i] = 1'b1;
    end
    s = int'(vpn[SW-1:0]);
    e = '{valid: 1, fixable: (burst > 0 && burst <= 4), bad: (burst > 4),
          vpn: vpn, pfn: fill_pfn, pb: fill_pb};
    for (int w = WAYS - 1; w > 0; w--) model[s][w] = model[s][w-1];
    model[s][0] = e;
    @(negedge clk);
    fill_valid = 0; fill_inj = '0;
  endtask

  task automatic do_lookup(input logic [VPN_W-1:0] vpn);
    int s, hw;
    bit exp_corr, exp_ue;
    ment_t e;
    s = int'(vpn[SW-1:0]);
    hw = -1; exp_corr = 0; exp_ue = 0;
    for (int w = 0; w < WAYS; w++) begin
      if (model[s][w].valid && model[s][w].fixable) exp_corr = 1;
      if (model[s][w].valid && model[s][w].bad) exp_ue = 1;
      if (model[s][w].valid && !model[s][w].bad && model[s][w].vpn == vpn && hw < 0) hw = w;
    end
    @(negedge clk);
    lk_valid = 1; lk_vpn = vpn;
    checks++;
    if (rsp_valid) begin failures++; $display("FAIL response before lookup"); end
    @(negedge clk);
    lk_valid = 0;
    checks++;
    // a burst of 5-8 bits may also leave single errors in other words, so
    // "corrected" is free when an uncorrectable entry is in the set
    if (!rsp_valid || rsp_hit !== (hw >= 0) || rsp_ue !== exp_ue ||
        (rsp_corr !== exp_corr && !(exp_ue && !exp_corr)) ||
        (hw >= 0 && (rsp_pfn !== model[s][hw].pfn || rsp_pb !== model[s][hw].pb))) begin
      failures++;
      $display("FAIL lookup vpn=%h v=%b hit=%b/%b corr=%b/%b ue=%b/%b pfn=%h", vpn, rsp_valid,
               rsp_hit, hw >= 0, rsp_corr, exp_corr, rsp_ue, exp_ue, rsp_pfn);
    end
    if (hw >= 0) n_hit++; else n_miss++;
    if (exp_corr) n_corr++;
    if (exp_ue) n_ue++;
    // model: scrub, drop uncorrectable entries, touch the hit
    for (int w = 0; w < WAYS; w++) begin
      if (model[s][w].bad) model[s][w].valid = 0;
      model[s][w].fixable = 0;
      model[s][w].bad = 0;
    end
    if (hw >= 0) begin
      e = model[s][hw];
      for (int w = hw; w > 0; w--) model[s][w] = model[s][w-1];
      model[s][0] = e;
    end
  endtask

  initial begin
    int op, burst;
    foreach (model[s, w]) model[s][w] = '{default: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      op = $urandom % 10;
      if (op < 4) begin
        logic [VPN_W-1:0] v;
        bit present;
        v = rnd_vpn();
        present = 0;
        // the page-table walk fills only what is missing
        for (int w = 0; w < WAYS; w++)
          if (model[int'(v[SW-1:0])][w].valid && !model[int'(v[SW-1:0])][w].bad &&
              model[int'(v[SW-1:0])][w].vpn == v) present = 1;
        burst = $urandom % 10;
        if (burst > 8) burst = 0;
        if ($urandom % 2) burst = 0;
        if (!present) do_fill(v, burst);
      end else if (op < 9) begin
        do_lookup(rnd_vpn());
      end else if ($urandom % 20 == 0) begin
        @(negedge clk); flush = 1;
        @(negedge clk); flush = 0;
        foreach (model[s, w]) begin model[s][w].valid = 0; model[s][w].fixable = 0; model[s][w].bad = 0; end
      end
    end
    checks++;
    if (n_hit == 0 || n_corr == 0 || n_ue == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL coverage hit=%0d corr=%0d ue=%0d miss=%0d", n_hit, n_corr, n_ue, n_miss);
    end
    $display("hits=%0d misses=%0d corrected=%0d uncorrectable=%0d", n_hit, n_miss, n_corr, n_ue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
