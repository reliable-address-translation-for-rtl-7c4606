// tb_ecc_il_dec: self-checking testbench of ecc_il_dec at its default size.
// Code words come from an independent reference encoder. Checked: clean
// words decode unflagged; every single-bit error and every burst of 2 to 4
// adjacent stored bits is corrected and flagged as corrected; every burst of
// 5 to 8 adjacent bits is flagged uncorrectable.
module tb_ecc_il_dec;
  import ecc_ref_pkg::*;

  logic [CW-1:0] code;
  logic [K-1:0]  data;
  logic          corr, ue;
  int checks = 0, failures = 0;

  ecc_il_dec dut (.code_i(code), .data_o(data), .corrected_o(corr), .uncorrectable_o(ue));

  task automatic apply(input logic [K-1:0] d, input int start, input int len);
    logic [CW-1:0] mask = '0;
    for (int i = 0; i < len; i++)
      if (start + i < CW) mask[start + i] = 1'b1;
    code = ref_encode(d) ^ mask;
    #1;
    checks++;
    if (len == 0) begin
      if (data !== d || corr || ue) begin
        failures++;
        $display("FAIL clean d=%h got=%h corr=%b ue=%b", d, data, corr, ue);
      end
    end else if (len <= IL) begin
      if (data !== d || !corr || ue) begin
        failures++;
        $display("FAIL burst %0d@%0d d=%h got=%h corr=%b ue=%b", len, start, d, data, corr, ue);
      end
    end else begin
      if (!ue) begin
        failures++;
        $display("FAIL burst %0d@%0d not detected", len, start);
      end
    end
  endtask

  initial begin
    logic [K-1:0] d;
    for (int t = 0; t < 20; t++) begin
      d = {$urandom, $urandom};
      apply(d, 0, 0);
      for (int len = 1; len <= 2 * IL; len++)
        for (int s = 0; s + len <= CW; s++) apply(d, s, len);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
