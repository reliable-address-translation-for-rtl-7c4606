// tb_ecc_il: self-checking testbench of ecc_il_enc at its default size.
// Compares the code word with an independent reference encoder for fixed
// and random payloads.
module tb_ecc_il;
  import ecc_ref_pkg::*;

  logic [K-1:0]  data;
  logic [CW-1:0] code;
  int checks = 0, failures = 0;

  ecc_il_enc dut (.data_i(data), .code_o(code));

  task automatic check(input logic [K-1:0] d);
    data = d;
    #1;
    checks++;
    if (code !== ref_encode(d)) begin
      failures++;
      $display("FAIL data=%h code=%h exp=%h", d, code, ref_encode(d));
    end
  endtask

  initial begin
    check('0);
    check('1);
    for (int i = 0; i < K; i++) check(K'(1) << i);
    for (int i = 0; i < 500; i++) check({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
