// xlat_ctrl: decides, for every instruction fetch, where its address
// translation comes from, and delivers the physical address.
//
// The decision is the one of the CFR scheme. The compiler has written into
// the instruction preceding the fetch an annotation bit A: 0 means "same
// page, use the CFRs", 1 means "the next instruction is on another page, or
// the target could not be analysed: ask the iTLB".
//   A = 0 and CFR0 == CFR1   the PFN comes from the CFRs; the physical
//                            address is registered at the end of the request
//                            cycle (1-cycle translation).
//   A = 1, or CFRs differ    an iTLB lookup is started in the request cycle;
//                            its checked result arrives one cycle later and is
//                            registered then (2-cycle translation). On a hit
//                            both CFRs are loaded with the translation in the
//                            same edge, so following fetches in that page use
//                            the CFRs again. A CFR mismatch is how a soft
//                            error in the CFRs is detected; the reload from
//                            the corrected iTLB entry is how it is repaired.
//   iTLB miss                miss_o is raised with the VPN until the page-table
//                            walk signals fill_done_i; the lookup is then
//                            repeated.
// The selection between the CFR and the iTLB frame number is the 2:1 selector
// in front of the cache tag.
//
// Interface: valid/ready request (virtual address and the A bit of the
// preceding instruction); valid/ready response holding the virtual and the
// physical address,
// the protection bits and where the translation came from. One request per
// cycle is accepted on the CFR path; the iTLB path holds off new requests
// until its result is registered. ev_* are one-cycle event strobes for
// counting.
//
// The decision rule, the latencies and the CFR update follow the scheme; the
// handshakes, the miss protocol and the event outputs are this design's.
module xlat_ctrl
  import rat_pkg::*;
#(
  parameter int unsigned PG_BITS = PAGE_BITS,  // log2 of the page size
  parameter int unsigned VA_WD   = VA_W,
  parameter int unsigned PA_WD   = PA_W,
  parameter int unsigned PB_WD   = PB_W,
  localparam int unsigned VPN_WD = VA_WD - PG_BITS,
  localparam int unsigned PFN_WD = PA_WD - PG_BITS
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // request
  input  logic             req_valid_i,
  output logic             req_ready_o,
  input  logic [VA_WD-1:0]  req_va_i,
  input  logic             req_abit_i,
  // response
  output logic             rsp_valid_o,
  input  logic             rsp_ready_i,
  output logic [VA_WD-1:0]  rsp_va_o,
  output logic [PA_WD-1:0]  rsp_pa_o,
  output logic [PB_WD-1:0]  rsp_pb_o,
  output xlat_src_e        rsp_src_o,
  // CFR pair
  input  logic [PFN_WD+PB_WD-1:0] cfr_i,     // {pfn, pb}
  input  logic             cfr_match_i,
  output logic             cfr_upd_o,
  output logic [PFN_WD+PB_WD-1:0] cfr_upd_val_o,
  // iTLB
  output logic             lk_valid_o,
  output logic [VPN_WD-1:0] lk_vpn_o,
  input  logic             tlb_valid_i,
  input  logic             tlb_hit_i,
  input  logic [PFN_WD-1:0] tlb_pfn_i,
  input  logic [PB_WD-1:0]  tlb_pb_i,
  // iTLB miss handling
  output logic             miss_o,
  output logic [VPN_WD-1:0] miss_vpn_o,
  input  logic             fill_done_i,
  // event strobes
  output logic             ev_cfr_o,       // translation served by the CFRs
  output logic             ev_abit_o,      // iTLB access requested by A = 1
  output logic             ev_mismatch_o,  // iTLB access forced by CFR0 != CFR1
  output logic             ev_cfr_upd_o,   // CFRs reloaded
  output logic             ev_tlb_miss_o   // iTLB miss
);

  typedef enum logic [1:0] {
    ST_RUN   = 2'd0,  // accepting requests
    ST_WAIT  = 2'd1,  // iTLB lookup in flight
    ST_MISS  = 2'd2,  // waiting for the page-table walk
    ST_RETRY = 2'd3   // repeat the lookup after a fill
  } state_e;

  state_e           state_q, state_d;
  logic [VA_WD-1:0]  va_q;      // request held while the iTLB is used
  xlat_src_e        src_q;
  logic             rsp_valid_q;
  logic [VA_WD-1:0]  rsp_va_q;
  logic [PA_WD-1:0]  rsp_pa_q;
  logic [PB_WD-1:0]  rsp_pb_q;
  xlat_src_e        rsp_src_q;

  logic accept, use_cfr, tlb_done;

  assign req_ready_o = (state_q == ST_RUN) && (!rsp_valid_q || rsp_ready_i);
  assign accept      = req_valid_i && req_ready_o;
  // "1?" test on the A bit, and the CFR comparison
  assign use_cfr     = (req_abit_i == A_FROM_CFR) && cfr_match_i;
  assign tlb_done    = (state_q == ST_WAIT) && tlb_valid_i;

  assign lk_valid_o  = (accept && !use_cfr) || (state_q == ST_RETRY);
  assign lk_vpn_o    = (state_q == ST_RETRY) ? va_q[VA_WD-1:PG_BITS]
                                             : req_va_i[VA_WD-1:PG_BITS];

  assign cfr_upd_o     = tlb_done && tlb_hit_i;
  assign cfr_upd_val_o = {tlb_pfn_i, tlb_pb_i};

  assign miss_o     = (state_q == ST_MISS);
  assign miss_vpn_o = va_q[VA_WD-1:PG_BITS];

  assign ev_cfr_o      = accept && use_cfr;
  assign ev_abit_o     = accept && (req_abit_i == A_FROM_ITLB);
  assign ev_mismatch_o = accept && (req_abit_i == A_FROM_CFR) && !cfr_match_i;
  assign ev_cfr_upd_o  = cfr_upd_o;
  assign ev_tlb_miss_o = tlb_done && !tlb_hit_i;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_RUN:   if (accept && !use_cfr) state_d = ST_WAIT;
      ST_WAIT:  if (tlb_valid_i) state_d = tlb_hit_i ? ST_RUN : ST_MISS;
      ST_MISS:  if (fill_done_i) state_d = ST_RETRY;
      ST_RETRY: state_d = ST_WAIT;
      default:  state_d = ST_RUN;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= ST_RUN;
      va_q        <= '0;
      src_q       <= SRC_CFR;
      rsp_valid_q <= 1'b0;
      rsp_va_q    <= '0;
      rsp_pa_q    <= '0;
      rsp_pb_q    <= '0;
      rsp_src_q   <= SRC_CFR;
    end else begin
      state_q <= state_d;
      if (rsp_valid_q && rsp_ready_i) rsp_valid_q <= 1'b0;
      if (accept) begin
        va_q  <= req_va_i;
        src_q <= (req_abit_i == A_FROM_ITLB) ? SRC_ITLB : SRC_ITLB_ERR;
        if (use_cfr) begin
          rsp_valid_q <= 1'b1;
          rsp_va_q    <= req_va_i;
          rsp_pa_q    <= {cfr_i[PB_WD +: PFN_WD], req_va_i[PG_BITS-1:0]};
          rsp_pb_q    <= cfr_i[PB_WD-1:0];
          rsp_src_q   <= SRC_CFR;
        end
      end
      if (tlb_done && tlb_hit_i) begin
        rsp_valid_q <= 1'b1;
        rsp_va_q    <= va_q;
        rsp_pa_q    <= {tlb_pfn_i, va_q[PG_BITS-1:0]};
        rsp_pb_q    <= tlb_pb_i;
        rsp_src_q   <= src_q;
      end
    end
  end

  assign rsp_valid_o = rsp_valid_q;
  assign rsp_va_o    = rsp_va_q;
  assign rsp_pa_o    = rsp_pa_q;
  assign rsp_pb_o    = rsp_pb_q;
  assign rsp_src_o   = rsp_src_q;

  // the output register is free whenever an iTLB result is written into it
  assert property (@(posedge clk_i) !(tlb_done && rsp_valid_q))
    else $error("xlat_ctrl: iTLB result with the output register occupied");

endmodule
