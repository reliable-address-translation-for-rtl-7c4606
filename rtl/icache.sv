// icache: L1 instruction cache, 64 KB, 4-way set-associative with true LRU
// replacement, 64-byte blocks, in a three-stage pipeline (3-cycle latency,
// one access per cycle).
//
// The stages follow the classic pipelined-cache split:
//   S1  the set address (index) of the request is latched and decoded;
//   S2  the tag, valid and data arrays of that set are read (word lines,
//       bit lines, sense amplifiers): for every way its tag, valid bit and
//       the fetch group addressed by the block offset are latched;
//   S3  the latched tags are compared with the physical frame number from
//       the translation, and the output multiplexer drives the hitting way's
//       fetch group out.
// A request accepted in cycle T gives its response in cycle T+3.
//
// Addressing: the cache is indexed with virtual address bits [13:6] and
// tagged with the whole physical frame number. With 8 KB pages one index bit
// (bit 13) lies above the page offset, so the full PFN is kept as the tag to
// make the hit test exact. A fetch returns the aligned group of FETCH_W
// instructions that holds the requested address.
//
// Misses block: when S3 misses, the whole pipeline holds, the block is
// requested once from the next level (mem_req_valid_o/mem_req_ready_i, block
// aligned physical address), and the block returned on mem_rsp_valid_i is
// written into the LRU way of the set and into S3, which then hits. Younger
// requests in S1/S2 re-read the arrays when they move on, so they see the
// refill. A response that is not taken (rsp_ready_i low) also holds the
// pipeline.
//
// Geometry, LRU and the three stages follow the processor configuration the
// scheme was evaluated on; the indexing, the blocking miss handling and the
// handshakes are this design's.
module icache
  import rat_pkg::*;
#(
  parameter int unsigned SETS    = 256,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned LINE_B  = 64,
  parameter int unsigned FW      = FETCH_W,
  parameter int unsigned IW      = INSTR_W,
  parameter int unsigned PG_BITS = PAGE_BITS,
  parameter int unsigned VA_WD   = VA_W,
  parameter int unsigned PA_WD   = PA_W,
  localparam int unsigned PFN_WD = PA_WD - PG_BITS,
  localparam int unsigned LINE_W = LINE_B * 8,
  localparam int unsigned GRP_W  = FW * IW
) (
  input  logic                         clk_i,
  input  logic                         rst_ni,
  // request: virtual address and translated frame number
  input  logic                         req_valid_i,
  output logic                         req_ready_o,
  input  logic [VA_WD-1:0]             req_va_i,
  input  logic [PFN_WD-1:0]            req_pfn_i,
  // response: one fetch group
  output logic                         rsp_valid_o,
  input  logic                         rsp_ready_i,
  output logic [FW-1:0][IW-1:0]        rsp_instr_o,
  output logic [VA_WD-1:0]             rsp_va_o,
  // refill from the next level
  output logic                         mem_req_valid_o,
  input  logic                         mem_req_ready_i,
  output logic [PA_WD-1:0]             mem_req_addr_o,
  input  logic                         mem_rsp_valid_i,
  input  logic [LINE_W-1:0]            mem_rsp_data_i,
  output logic                         ev_miss_o
);

  localparam int unsigned OFF_W = $clog2(LINE_B);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WW    = $clog2(WAYS);
  localparam int unsigned GRPS  = LINE_W / GRP_W;
  localparam int unsigned GS_W  = (GRPS > 1) ? $clog2(GRPS) : 1;
  localparam int unsigned GRP_B = GRP_W / 8;

  typedef struct packed {
    logic [VA_WD-1:0]  va;
    logic [PFN_WD-1:0] pfn;
  } req_t;

  // arrays
  logic [LINE_W-1:0] data_q  [SETS][WAYS];
  logic [PFN_WD-1:0] tag_q   [SETS][WAYS];
  logic [WAYS-1:0]   valid_q [SETS];

  // pipeline registers
  logic               s1_v_q, s2_v_q, s3_v_q;
  req_t               s1_q, s2_q, s3_q;
  logic [PFN_WD-1:0]  s3_tag_q   [WAYS];
  logic [WAYS-1:0]    s3_valid_q;
  logic [GRP_W-1:0]   s3_grp_q   [WAYS];
  logic               s3_sent_q;  // refill request already issued

  function automatic logic [IDX_W-1:0] idx_of(input logic [VA_WD-1:0] va);
    return va[OFF_W +: IDX_W];
  endfunction

  function automatic logic [GS_W-1:0] grp_of(input logic [VA_WD-1:0] va);
    return GS_W'(va[OFF_W-1:0] / GRP_B);
  endfunction

  // S3: tag compare and way selection
  logic [WAYS-1:0] s3_way_hit;
  logic            s3_hit;
  logic [WW-1:0]   s3_hit_way;
  always_comb begin
    s3_hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      s3_way_hit[w] = s3_valid_q[w] && (s3_tag_q[w] == s3_q.pfn);
    end
    for (int w = WAYS - 1; w >= 0; w--)
      if (s3_way_hit[w]) s3_hit_way = WW'(w);
  end
  assign s3_hit = |s3_way_hit;

  logic adv;
  assign adv         = !s3_v_q || (s3_hit && rsp_ready_i);
  assign req_ready_o = adv;

  assign rsp_valid_o = s3_v_q && s3_hit;
  assign rsp_instr_o = s3_grp_q[s3_hit_way];
  assign rsp_va_o    = s3_q.va;

  // refill
  logic [IDX_W-1:0] s3_idx, s2_idx;
  logic [WW-1:0]    victim;
  logic             refill;
  assign s3_idx = idx_of(s3_q.va);
  assign s2_idx = idx_of(s2_q.va);
  assign refill = s3_v_q && !s3_hit && s3_sent_q && mem_rsp_valid_i;

  assign mem_req_valid_o = s3_v_q && !s3_hit && !s3_sent_q;
  assign mem_req_addr_o  = {s3_q.pfn, s3_q.va[PG_BITS-1:OFF_W], OFF_W'(0)};
  assign ev_miss_o       = mem_req_valid_o && mem_req_ready_i;

  lru_ctrl #(.SETS(SETS), .WAYS(WAYS)) u_lru (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .rd_set_i    (s3_idx),
    .victim_o    (victim),
    .touch_i     (refill || (s3_v_q && s3_hit && rsp_ready_i)),
    .touch_set_i (s3_idx),
    .touch_way_i (refill ? victim : s3_hit_way)
  );

  // arrays: written only by a refill
  always_ff @(posedge clk_i) begin
    if (refill) begin
      data_q[s3_idx][victim] <= mem_rsp_data_i;
      tag_q[s3_idx][victim]  <= s3_q.pfn;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
    end else if (refill) begin
      valid_q[s3_idx][victim] <= 1'b1;
    end
  end

  // pipeline
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s1_v_q     <= 1'b0;
      s2_v_q     <= 1'b0;
      s3_v_q     <= 1'b0;
      s1_q       <= '0;
      s2_q       <= '0;
      s3_q       <= '0;
      s3_valid_q <= '0;
      s3_sent_q  <= 1'b0;
      for (int w = 0; w < WAYS; w++) begin
        s3_tag_q[w] <= '0;
        s3_grp_q[w] <= '0;
      end
    end else if (adv) begin
      s1_v_q <= req_valid_i;
      s1_q   <= '{va: req_va_i, pfn: req_pfn_i};
      s2_v_q <= s1_v_q;
      s2_q   <= s1_q;
      s3_v_q <= s2_v_q;
      s3_q   <= s2_q;
      s3_sent_q  <= 1'b0;
      s3_valid_q <= valid_q[s2_idx];
      for (int w = 0; w < WAYS; w++) begin
        s3_tag_q[w] <= tag_q[s2_idx][w];
        s3_grp_q[w] <= data_q[s2_idx][w][grp_of(s2_q.va)*GRP_W +: GRP_W];
      end
    end else begin
      if (mem_req_valid_o && mem_req_ready_i) s3_sent_q <= 1'b1;
      if (refill) begin
        s3_sent_q          <= 1'b0;
        s3_valid_q[victim] <= 1'b1;
        s3_tag_q[victim]   <= s3_q.pfn;
        s3_grp_q[victim]   <= mem_rsp_data_i[grp_of(s3_q.va)*GRP_W +: GRP_W];
      end
    end
  end

endmodule
