// tb_cfr_pair: self-checking testbench of cfr_pair. A random sequence of
// updates, restores and injected upsets is applied; a model of the two
// registers predicts cfr_o, cfr0_o/cfr1_o and match_o after every edge.
module tb_cfr_pair;
  import rat_pkg::*;

  logic clk = 0, rst_n = 0;
  logic upd = 0, restore = 0;
  cfr_t upd_val = '0, r0 = '0, r1 = '0, inj0 = '0, inj1 = '0;
  cfr_t cfr, cfr0, cfr1;
  logic match;
  cfr_t m0, m1;
  int checks = 0, failures = 0;
  int mismatches = 0;
  int op;

  cfr_pair dut (
    .clk_i(clk), .rst_ni(rst_n), .upd_i(upd), .upd_val_i(upd_val),
    .restore_i(restore), .restore_cfr0_i(r0), .restore_cfr1_i(r1),
    .cfr0_o(cfr0), .cfr1_o(cfr1), .inj_cfr0_i(inj0), .inj_cfr1_i(inj1),
    .cfr_o(cfr), .match_o(match)
  );

  always #5 clk = ~clk;

  function automatic cfr_t rnd();
    return cfr_t'({$urandom, $urandom});
  endfunction

  task automatic check();
    checks++;
    if (cfr0 !== m0 || cfr1 !== m1 || cfr !== m0 || match !== (m0 == m1)) begin
      failures++;
      $display("FAIL cfr0=%h/%h cfr1=%h/%h match=%b", cfr0, m0, cfr1, m1, match);
    end
  endtask

  initial begin
    m0 = '0; m1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check();
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      upd = 0; restore = 0; inj0 = '0; inj1 = '0;
      op = $urandom % 6;
      case (op)
        0, 1: begin upd = 1; upd_val = rnd(); end
        2: begin restore = 1; r0 = rnd(); r1 = ($urandom % 2) ? r0 : rnd(); end
        3: inj0 = cfr_t'(3) << ($urandom % ($bits(cfr_t) - 1));
        4: inj1 = cfr_t'(1) << ($urandom % $bits(cfr_t));
        default: ;
      endcase
      @(posedge clk);
      if (restore)  begin m0 = r0 ^ inj0; m1 = r1 ^ inj1; end
      else if (upd) begin m0 = upd_val ^ inj0; m1 = upd_val ^ inj1; end
      else          begin m0 = m0 ^ inj0; m1 = m1 ^ inj1; end
      #1;
      check();
      if (m0 != m1) mismatches++;
    end
    checks++;
    if (mismatches == 0) begin failures++; $display("FAIL no mismatch produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
