// itlb: instruction TLB whose entries are protected by a code that corrects
// spatial multi-bit upsets; one lookup takes two cycles.
//
// Organisation: SETS x WAYS entries, set-associative, true LRU replacement.
// An entry holds {valid, VPN tag, PFN, protection bits}; the whole entry is
// stored encoded by ecc_il_enc (bit-interleaved SECDED of degree IL), so a
// burst of up to IL adjacent upset cells is corrected and up to 2*IL is
// detected. The all-zero code word is a valid code word of the all-zero
// (invalid) entry, which is what reset and flush_i write.
//
// Lookup (lk_valid_i, lk_vpn_i) in cycle T: the set is read and its code
// words registered. Cycle T+1: every way is decoded and corrected, the
// corrected tags are compared, and rsp_valid_o with hit, PFN, protection bits
// and the error flags is presented combinationally. It is this check that
// adds the second cycle. In the same cycle T+1:
//   - a way that needed correction is written back corrected (scrubbing), so
//     the iTLB holds the corrected translation again;
//   - a way with an uncorrectable error is written back as invalid; its
//     translation is then refilled from the page table on the miss it causes;
//   - the hitting way is touched in the LRU state.
// A fill (fill_valid_i) writes the LRU way of the set in one cycle and
// touches it; fill_inj_i is XORed into the stored code word (fault
// injection, zero in normal operation). A fill must not be issued while a
// lookup is in flight.
//
// The two-cycle access and the correcting code follow the scheme; the
// geometry, the particular code, scrubbing and the treatment of
// uncorrectable entries are this design's choices.
module itlb
  import rat_pkg::*;
#(
  parameter int unsigned SETS   = 16,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned IL     = 4,
  parameter int unsigned VPN_WD = VPN_W,
  parameter int unsigned PFN_WD = PFN_W,
  parameter int unsigned PB_WD  = PB_W,
  localparam int unsigned SW    = $clog2(SETS),
  localparam int unsigned TAG_W = VPN_WD - SW,
  localparam int unsigned K     = 1 + TAG_W + PFN_WD + PB_WD,
  localparam int unsigned CW    = ecc_il_len(K, IL)
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              flush_i,
  // lookup
  input  logic              lk_valid_i,
  input  logic [VPN_WD-1:0] lk_vpn_i,
  output logic              rsp_valid_o,
  output logic              rsp_hit_o,
  output logic [PFN_WD-1:0] rsp_pfn_o,
  output logic [PB_WD-1:0]  rsp_pb_o,
  output logic              rsp_corrected_o,
  output logic              rsp_uncorrectable_o,
  // fill from the page-table walk
  input  logic              fill_valid_i,
  input  logic [VPN_WD-1:0] fill_vpn_i,
  input  logic [PFN_WD-1:0] fill_pfn_i,
  input  logic [PB_WD-1:0]  fill_pb_i,
  input  logic [CW-1:0]     fill_inj_i
);

  localparam int unsigned WW = $clog2(WAYS);

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [PFN_WD-1:0] pfn;
    logic [PB_WD-1:0]  pb;
  } entry_t;

  logic [CW-1:0] mem_q [SETS][WAYS];

  // stage 1 registers
  logic              s1_valid_q;
  logic [VPN_WD-1:0] s1_vpn_q;
  logic [CW-1:0]     s1_code_q [WAYS];

  // stage 2: decode every way
  entry_t        dec_ent   [WAYS];
  logic [K-1:0]  dec_data  [WAYS];
  logic [WAYS-1:0] dec_corr, dec_ue, way_hit;
  logic [CW-1:0] wb_code   [WAYS];

  logic [SW-1:0] s1_set;
  assign s1_set = s1_vpn_q[SW-1:0];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    ecc_il_dec #(.K(K), .IL(IL)) u_dec (
      .code_i          (s1_code_q[w]),
      .data_o          (dec_data[w]),
      .corrected_o     (dec_corr[w]),
      .uncorrectable_o (dec_ue[w])
    );
    assign dec_ent[w] = entry_t'(dec_data[w]);
    assign way_hit[w] = s1_valid_q && !dec_ue[w] && dec_ent[w].valid &&
                        (dec_ent[w].tag == s1_vpn_q[VPN_WD-1:SW]);
    // write-back value: the corrected entry, or an invalid entry when the
    // error could not be corrected (all-zero code word)
    ecc_il_enc #(.K(K), .IL(IL)) u_enc (
      .data_i (dec_ue[w] ? '0 : dec_data[w]),
      .code_o (wb_code[w])
    );
  end

  logic [WW-1:0] hit_way;
  always_comb begin
    hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (way_hit[w]) hit_way = WW'(w);
  end

  assign rsp_valid_o         = s1_valid_q;
  assign rsp_hit_o           = |way_hit;
  assign rsp_pfn_o           = dec_ent[hit_way].pfn;
  assign rsp_pb_o            = dec_ent[hit_way].pb;
  assign rsp_corrected_o     = s1_valid_q && |dec_corr;
  assign rsp_uncorrectable_o = s1_valid_q && |dec_ue;

  // replacement
  logic [WW-1:0] victim;
  logic [SW-1:0] fill_set;
  assign fill_set = fill_vpn_i[SW-1:0];

  lru_ctrl #(.SETS(SETS), .WAYS(WAYS)) u_lru (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .rd_set_i    (fill_set),
    .victim_o    (victim),
    .touch_i     (fill_valid_i || (s1_valid_q && |way_hit)),
    .touch_set_i (fill_valid_i ? fill_set : s1_set),
    .touch_way_i (fill_valid_i ? victim : hit_way)
  );

  entry_t        fill_ent;
  logic [CW-1:0] fill_code;
  assign fill_ent = '{valid: 1'b1, tag: fill_vpn_i[VPN_WD-1:SW], pfn: fill_pfn_i, pb: fill_pb_i};

  ecc_il_enc #(.K(K), .IL(IL)) u_fill_enc (
    .data_i (fill_ent),
    .code_o (fill_code)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          mem_q[s][w] <= '0;
    end else if (flush_i) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          mem_q[s][w] <= '0;
    end else begin
      if (s1_valid_q)
        for (int w = 0; w < WAYS; w++)
          if (dec_corr[w] || dec_ue[w]) mem_q[s1_set][w] <= wb_code[w];
      if (fill_valid_i)
        mem_q[fill_set][victim] <= fill_code ^ fill_inj_i;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s1_valid_q <= 1'b0;
      s1_vpn_q   <= '0;
      for (int w = 0; w < WAYS; w++) s1_code_q[w] <= '0;
    end else begin
      s1_valid_q <= lk_valid_i && !flush_i;
      if (lk_valid_i) begin
        s1_vpn_q <= lk_vpn_i;
        for (int w = 0; w < WAYS; w++) s1_code_q[w] <= mem_q[lk_vpn_i[SW-1:0]][w];
      end
    end
  end

  // a fill may not collide with the write-back of a lookup
  assert property (@(posedge clk_i) !(fill_valid_i && s1_valid_q))
    else $error("itlb: fill issued while a lookup is in flight");

endmodule
