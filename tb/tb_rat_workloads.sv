// tb_rat_workloads: the front end under instruction streams shaped after
// eight SPEC CPU applications, with 8 KB pages (the default) and with 16 KB
// pages. Each page size runs in a workload_bench (see there for the program
// model and the per-application checks).
//
// Both benches run the same programs, so every 16 KB page change is also an
// 8 KB page change. Checked on top of the per-application checks: for every
// application the 16 KB run has no more page changes and no more cycles
// than the 8 KB run, and at least one has fewer.
module tb_rat_workloads;

  logic clk = 0;
  logic start8 = 0, start16 = 0, done8, done16;
  int   checks8, failures8, checks16, failures16;
  int   ch8 [8], cy8 [8], ch16 [8], cy16 [8];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  workload_bench #(.PG_BITS(13)) u_8k (
    .clk_i(clk), .start_i(start8), .done_o(done8), .checks_o(checks8), .failures_o(failures8),
    .changes_o(ch8), .cycles_o(cy8)
  );

  workload_bench #(.PG_BITS(14)) u_16k (
    .clk_i(clk), .start_i(start16), .done_o(done16), .checks_o(checks16), .failures_o(failures16),
    .changes_o(ch16), .cycles_o(cy16)
  );

  initial begin
    bit fewer = 0;
    start8 = 1;
    wait (done8);
    start16 = 1;
    wait (done16);
    checks = checks8 + checks16;
    failures = failures8 + failures16;
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (ch16[b] > ch8[b] || cy16[b] > cy8[b]) begin
        failures++; $display("FAIL application %0d: 16 KB pages cost more than 8 KB pages", b);
      end
      if (ch16[b] < ch8[b]) fewer = 1;
    end
    checks++;
    if (!fewer) begin failures++; $display("FAIL 16 KB pages never reduced the page changes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
