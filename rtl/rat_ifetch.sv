// rat_ifetch: instruction-fetch front end with reliable address translation.
//
// Every fetch needs the physical frame number of its page. Instead of reading
// the (ECC-protected, hence two-cycle) iTLB on every fetch, the frame of the
// current page is kept twice, in two context frame registers. The compiler
// marks each instruction with an annotation bit A telling whether the
// instruction after it stays in the page (A = 0) or not (A = 1). A fetch
// whose preceding instruction has A = 0 takes its translation from the CFRs
// in one cycle, provided the two CFRs agree; otherwise the iTLB is read, its
// code corrects any upset, and both CFRs are reloaded from it.
//
// Blocks: xlat_ctrl (A-bit test, CFR comparison, iTLB sequencing, frame
// selection), cfr_pair (the two CFRs), itlb (coded iTLB), icache (64 KB
// 4-way physically tagged L1 instruction cache, three stages). A previous-IR
// register keeps the A bit of the last instruction of the last fetch group
// delivered; it starts at 1 after reset because the CFRs then hold nothing.
//
// Interface:
//   req_*       fetch request (valid/ready). req_use_prev_i = 1 takes the A
//               bit from the previous-IR register (sequential fetch after
//               the last group delivered); 0 takes req_abit_i, for a fetch
//               whose preceding instruction is some other one (a taken
//               branch inside a group, a redirect).
//   rsp_*       fetch group of FETCH_W instructions (valid/ready).
//   xl_*        translation handed to the cache: its source and protection
//               bits, one strobe per fetch.
//   tlb_*       iTLB miss notification to the page-table walk and iTLB fill
//               (tlb_fill_inj_i flips stored code bits: fault injection).
//   ctx_*       CFR context save/restore; cfr_inj*_i flip CFR bits.
//   mem_*       block refill of the instruction cache from the next level.
//   ev_*        event strobes.
// PG_BITS sets the page size: 13 (8 KB) by default, 14 for 16 KB pages.
//
// Timing: a fetch translated from the CFRs delivers its group 4 cycles after
// the request (1 translation + 3 cache); one translated by the iTLB, 5.
module rat_ifetch
  import rat_pkg::*;
#(
  parameter int unsigned TLB_SETS = 16,
  parameter int unsigned TLB_WAYS = 4,
  parameter int unsigned TLB_IL   = 4,
  parameter int unsigned IC_SETS  = 256,
  parameter int unsigned IC_WAYS  = 4,
  parameter int unsigned LINE_B   = 64,
  parameter int unsigned PG_BITS  = PAGE_BITS,  // log2 of the page size (13: 8 KB)
  localparam int unsigned VPN_WD  = VA_W - PG_BITS,
  localparam int unsigned PFN_WD  = PA_W - PG_BITS,
  localparam int unsigned CFR_W   = PFN_WD + PB_W,  // {pfn, pb}
  localparam int unsigned TLB_K   = 1 + VPN_WD - $clog2(TLB_SETS) + PFN_WD + PB_W,
  localparam int unsigned TLB_CW  = ecc_il_len(TLB_K, TLB_IL)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  // fetch request
  input  logic                        req_valid_i,
  output logic                        req_ready_o,
  input  logic [VA_W-1:0]             req_va_i,
  input  logic                        req_use_prev_i,
  input  logic                        req_abit_i,
  // fetch response
  output logic                        rsp_valid_o,
  input  logic                        rsp_ready_i,
  output logic [FETCH_W-1:0][INSTR_W-1:0] rsp_instr_o,
  output logic [VA_W-1:0]             rsp_va_o,
  // translation observed
  output logic                        xl_fire_o,
  output xlat_src_e                   xl_src_o,
  output logic [PB_W-1:0]             xl_pb_o,
  // iTLB miss / fill
  output logic                        tlb_miss_o,
  output logic [VPN_WD-1:0]            tlb_miss_vpn_o,
  input  logic                        tlb_fill_valid_i,
  input  logic [VPN_WD-1:0]            tlb_fill_vpn_i,
  input  logic [PFN_WD-1:0]            tlb_fill_pfn_i,
  input  logic [PB_W-1:0]             tlb_fill_pb_i,
  input  logic [TLB_CW-1:0]           tlb_fill_inj_i,
  input  logic                        tlb_flush_i,
  // CFR context save / restore and fault injection
  input  logic                        ctx_restore_i,
  input  logic [CFR_W-1:0]           ctx_cfr0_i,
  input  logic [CFR_W-1:0]           ctx_cfr1_i,
  output logic [CFR_W-1:0]            ctx_cfr0_o,
  output logic [CFR_W-1:0]            ctx_cfr1_o,
  input  logic [CFR_W-1:0]           cfr_inj0_i,
  input  logic [CFR_W-1:0]           cfr_inj1_i,
  // instruction cache refill
  output logic                        mem_req_valid_o,
  input  logic                        mem_req_ready_i,
  output logic [PA_W-1:0]             mem_req_addr_o,
  input  logic                        mem_rsp_valid_i,
  input  logic [LINE_B*8-1:0]         mem_rsp_data_i,
  // events
  output logic                        ev_cfr_o,
  output logic                        ev_abit_o,
  output logic                        ev_mismatch_o,
  output logic                        ev_cfr_upd_o,
  output logic                        ev_tlb_miss_o,
  output logic                        ev_ecc_corr_o,
  output logic                        ev_ecc_ue_o,
  output logic                        ev_ic_miss_o
);

  // previous instruction register: A bit of the last instruction delivered
  logic prev_a_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                         prev_a_q <= A_FROM_ITLB;
    else if (rsp_valid_o && rsp_ready_i) prev_a_q <= rsp_instr_o[FETCH_W-1][A_BIT_POS];
  end

  logic abit;
  assign abit = req_use_prev_i ? prev_a_q : req_abit_i;

  // CFR pair
  logic [CFR_W-1:0] cfr, cfr_upd_val;
  logic cfr_match, cfr_upd;

  cfr_pair #(.PFN_WD(PFN_WD), .PB_WD(PB_W)) u_cfr (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .upd_i          (cfr_upd),
    .upd_val_i      (cfr_upd_val),
    .restore_i      (ctx_restore_i),
    .restore_cfr0_i (ctx_cfr0_i),
    .restore_cfr1_i (ctx_cfr1_i),
    .cfr0_o         (ctx_cfr0_o),
    .cfr1_o         (ctx_cfr1_o),
    .inj_cfr0_i     (cfr_inj0_i),
    .inj_cfr1_i     (cfr_inj1_i),
    .cfr_o          (cfr),
    .match_o        (cfr_match)
  );

  // iTLB
  logic             lk_valid, tlb_valid, tlb_hit, tlb_corr, tlb_ue;
  logic [VPN_WD-1:0] lk_vpn;
  logic [PFN_WD-1:0] tlb_pfn;
  logic [PB_W-1:0]  tlb_pb;

  itlb #(.SETS(TLB_SETS), .WAYS(TLB_WAYS), .IL(TLB_IL), .VPN_WD(VPN_WD), .PFN_WD(PFN_WD)) u_itlb (
    .clk_i               (clk_i),
    .rst_ni              (rst_ni),
    .flush_i             (tlb_flush_i),
    .lk_valid_i          (lk_valid),
    .lk_vpn_i            (lk_vpn),
    .rsp_valid_o         (tlb_valid),
    .rsp_hit_o           (tlb_hit),
    .rsp_pfn_o           (tlb_pfn),
    .rsp_pb_o            (tlb_pb),
    .rsp_corrected_o     (tlb_corr),
    .rsp_uncorrectable_o (tlb_ue),
    .fill_valid_i        (tlb_fill_valid_i),
    .fill_vpn_i          (tlb_fill_vpn_i),
    .fill_pfn_i          (tlb_fill_pfn_i),
    .fill_pb_i           (tlb_fill_pb_i),
    .fill_inj_i          (tlb_fill_inj_i)
  );

  assign ev_ecc_corr_o = tlb_corr;
  assign ev_ecc_ue_o   = tlb_ue;

  // translation control
  logic            xl_valid, xl_ready;
  logic [VA_W-1:0] xl_va;
  logic [PA_W-1:0] xl_pa;

  xlat_ctrl #(.PG_BITS(PG_BITS)) u_xlat (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .req_valid_i   (req_valid_i),
    .req_ready_o   (req_ready_o),
    .req_va_i      (req_va_i),
    .req_abit_i    (abit),
    .rsp_valid_o   (xl_valid),
    .rsp_ready_i   (xl_ready),
    .rsp_va_o      (xl_va),
    .rsp_pa_o      (xl_pa),
    .rsp_pb_o      (xl_pb_o),
    .rsp_src_o     (xl_src_o),
    .cfr_i         (cfr),
    .cfr_match_i   (cfr_match),
    .cfr_upd_o     (cfr_upd),
    .cfr_upd_val_o (cfr_upd_val),
    .lk_valid_o    (lk_valid),
    .lk_vpn_o      (lk_vpn),
    .tlb_valid_i   (tlb_valid),
    .tlb_hit_i     (tlb_hit),
    .tlb_pfn_i     (tlb_pfn),
    .tlb_pb_i      (tlb_pb),
    .miss_o        (tlb_miss_o),
    .miss_vpn_o    (tlb_miss_vpn_o),
    .fill_done_i   (tlb_fill_valid_i),
    .ev_cfr_o      (ev_cfr_o),
    .ev_abit_o     (ev_abit_o),
    .ev_mismatch_o (ev_mismatch_o),
    .ev_cfr_upd_o  (ev_cfr_upd_o),
    .ev_tlb_miss_o (ev_tlb_miss_o)
  );

  assign xl_fire_o = xl_valid && xl_ready;

  // instruction cache, tagged with the selected frame number
  icache #(.SETS(IC_SETS), .WAYS(IC_WAYS), .LINE_B(LINE_B), .PG_BITS(PG_BITS)) u_icache (
    .clk_i           (clk_i),
    .rst_ni          (rst_ni),
    .req_valid_i     (xl_valid),
    .req_ready_o     (xl_ready),
    .req_va_i        (xl_va),
    .req_pfn_i       (xl_pa[PA_W-1:PG_BITS]),
    .rsp_valid_o     (rsp_valid_o),
    .rsp_ready_i     (rsp_ready_i),
    .rsp_instr_o     (rsp_instr_o),
    .rsp_va_o        (rsp_va_o),
    .mem_req_valid_o (mem_req_valid_o),
    .mem_req_ready_i (mem_req_ready_i),
    .mem_req_addr_o  (mem_req_addr_o),
    .mem_rsp_valid_i (mem_rsp_valid_i),
    .mem_rsp_data_i  (mem_rsp_data_i),
    .ev_miss_o       (ev_ic_miss_o)
  );

endmodule
