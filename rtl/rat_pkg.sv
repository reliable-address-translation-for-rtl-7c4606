// rat_pkg: shared constants and types of the reliable instruction address
// translation front end.
//
// The page size (8 KB), the L1 instruction cache geometry (64 KB, 4-way,
// 64-byte blocks) and the fetch width (4 instructions per cycle) are the
// configuration the design is built for. The address widths follow the
// Alpha 21264 (43-bit virtual, 44-bit physical), the width of the protection
// bits, the iTLB geometry (16 sets x 4 ways) and the position of the
// annotation bit inside an instruction are choices of this design.
package rat_pkg;

  localparam int unsigned VA_W      = 43;  // virtual address bits
  localparam int unsigned PA_W      = 44;  // physical address bits
  localparam int unsigned PAGE_BITS = 13;  // 8 KB pages
  localparam int unsigned PB_W      = 4;   // protection bits kept with a PFN
  localparam int unsigned VPN_W     = VA_W - PAGE_BITS;
  localparam int unsigned PFN_W     = PA_W - PAGE_BITS;

  localparam int unsigned INSTR_W   = 32;  // Alpha-like fixed-length instructions
  localparam int unsigned FETCH_W   = 4;   // instructions per fetch group
  localparam int unsigned A_BIT_POS = 31;  // annotation bit inside an instruction

  // A bit values written by the compiler into the preceding instruction
  localparam logic A_FROM_CFR  = 1'b0;
  localparam logic A_FROM_ITLB = 1'b1;

  // A translation as it is held in a CFR: PFN and protection bits only
  typedef struct packed {
    logic [PFN_W-1:0] pfn;
    logic [PB_W-1:0]  pb;
  } cfr_t;

  // Where the translation of one fetch came from
  typedef enum logic [1:0] {
    SRC_CFR       = 2'd0,  // both CFRs agreed, A bit was 0
    SRC_ITLB      = 2'd1,  // A bit was 1 (page change)
    SRC_ITLB_ERR  = 2'd2   // A bit was 0 but the CFRs disagreed
  } xlat_src_e;

  // Check bits of a SECDED Hamming word with k data bits (without the
  // overall parity bit): the smallest r with 2**r >= k + r + 1.
  function automatic int unsigned ecc_r(input int unsigned k);
    int unsigned r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Stored length of a k-bit payload under the interleaved SECDED code of
  // degree il: il words of ceil(k/il) data bits, their check bits and one
  // overall parity bit each.
  function automatic int unsigned ecc_il_len(input int unsigned k, input int unsigned il);
    int unsigned kw = (k + il - 1) / il;
    return (kw + ecc_r(kw) + 1) * il;
  endfunction

endpackage
