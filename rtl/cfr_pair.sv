// cfr_pair: the two context frame registers (CFR0, CFR1) and their equality
// comparator.
//
// Both registers hold the same thing, the physical frame number and the
// protection bits of the page the fetch stream is in; no virtual page number
// is kept. They are written together, from the same value, whenever the iTLB
// supplies a translation (upd_i). A soft error that hits one register, or the
// two in different bit positions, makes them differ: match_o then drops and
// the controller must not use cfr_o. cfr_o is CFR0.
//
// The registers are part of a process context: cfr0_o/cfr1_o are read out on
// a context save and restore_i writes each register back from its own saved
// copy, so an error that was present at the save is still detected after the
// restore. inj_cfr0_i/inj_cfr1_i are fault-injection masks, XORed into the
// registers at the clock edge; tie them to zero in normal operation.
//
// Each register is {pfn, pb}, PFN_WD + PB_WD bits (the layout of cfr_t at
// the default page size).
//
// Timing: match_o and cfr_o are combinational from the registers; updates
// take effect at the next edge (restore has priority over upd_i). Reset
// clears both registers. The register contents and the comparison follow the
// scheme; the restore and injection ports are this design's.
module cfr_pair
  import rat_pkg::*;
#(
  parameter int unsigned PFN_WD = PFN_W,
  parameter int unsigned PB_WD  = PB_W,
  localparam int unsigned CW    = PFN_WD + PB_WD  // {pfn, pb}
) (
  input  logic clk_i,
  input  logic rst_ni,
  // update from an iTLB translation: both registers get the same value
  input  logic upd_i,
  input  logic [CW-1:0] upd_val_i,
  // context save / restore
  input  logic restore_i,
  input  logic [CW-1:0] restore_cfr0_i,
  input  logic [CW-1:0] restore_cfr1_i,
  output logic [CW-1:0] cfr0_o,
  output logic [CW-1:0] cfr1_o,
  // soft-error injection (XOR masks)
  input  logic [CW-1:0] inj_cfr0_i,
  input  logic [CW-1:0] inj_cfr1_i,
  // translation and error check
  output logic [CW-1:0] cfr_o,
  output logic match_o
);

  logic [CW-1:0] cfr0_q, cfr1_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cfr0_q <= '0;
      cfr1_q <= '0;
    end else if (restore_i) begin
      cfr0_q <= restore_cfr0_i ^ inj_cfr0_i;
      cfr1_q <= restore_cfr1_i ^ inj_cfr1_i;
    end else if (upd_i) begin
      cfr0_q <= upd_val_i ^ inj_cfr0_i;
      cfr1_q <= upd_val_i ^ inj_cfr1_i;
    end else begin
      cfr0_q <= cfr0_q ^ inj_cfr0_i;
      cfr1_q <= cfr1_q ^ inj_cfr1_i;
    end
  end

  assign match_o = (cfr0_q == cfr1_q);
  assign cfr_o   = cfr0_q;
  assign cfr0_o  = cfr0_q;
  assign cfr1_o  = cfr1_q;

endmodule
