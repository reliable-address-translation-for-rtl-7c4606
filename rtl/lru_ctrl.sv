// lru_ctrl: true least-recently-used replacement state for a set-associative
// array, shared by the iTLB and the instruction cache.
//
// Every way of every set has an age between 0 (most recent) and WAYS-1
// (least recent); the ages of a set are always a permutation. A touch of a
// way makes it age 0 and ages by one every way that was younger than it. The
// victim of a set is the way whose age is WAYS-1. Reset gives way w the age
// w, so way WAYS-1 is the first victim.
//
// Timing: victim_o is combinational from the state for the set on
// rd_set_i; a touch on touch_i is applied at the next clock edge.
module lru_ctrl #(
  parameter int unsigned SETS = 16,
  parameter int unsigned WAYS = 4
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic [$clog2(SETS)-1:0]   rd_set_i,
  output logic [$clog2(WAYS)-1:0]   victim_o,
  input  logic                      touch_i,
  input  logic [$clog2(SETS)-1:0]   touch_set_i,
  input  logic [$clog2(WAYS)-1:0]   touch_way_i
);

  localparam int unsigned AW = $clog2(WAYS);

  logic [AW-1:0] age_q [SETS][WAYS];

  always_comb begin
    victim_o = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (age_q[rd_set_i][w] == AW'(WAYS - 1)) victim_o = AW'(w);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned w = 0; w < WAYS; w++)
          age_q[s][w] <= AW'(w);
    end else if (touch_i) begin
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (AW'(w) == touch_way_i)
          age_q[touch_set_i][w] <= '0;
        else if (age_q[touch_set_i][w] < age_q[touch_set_i][touch_way_i])
          age_q[touch_set_i][w] <= age_q[touch_set_i][w] + 1'b1;
      end
    end
  end

endmodule
