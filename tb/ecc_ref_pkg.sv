// ecc_ref_pkg: reference model of the iTLB entry code, for testbenches.
//
// It builds the code in a different way from the RTL: each word's check
// bits are the XOR of the (1-based) positions of its set data bits, the data
// bits going to the non-power-of-two positions in order; position 0 is the
// overall parity. Fixed to the default entry: K = 62 payload bits, IL = 4
// words of 16 data bits, 5 check bits and 1 parity bit (22 bits), 88 stored.
package ecc_ref_pkg;

  localparam int K  = 62;
  localparam int IL = 4;
  localparam int KW = 16;
  localparam int N  = 22;
  localparam int CW = N * IL;

  function automatic logic [CW-1:0] ref_encode(input logic [K-1:0] data);
    logic [CW-1:0] code = '0;
    for (int w = 0; w < IL; w++) begin
      logic [N-1:0] cw = '0;
      logic [4:0]   chk = '0;
      int pos = 1;
      for (int j = 0; j < KW; j++) begin
        while ((pos & (pos - 1)) == 0) pos++;
        if (j * IL + w < K && data[j*IL + w]) begin
          cw[pos] = 1'b1;
          chk ^= 5'(pos);
        end
        pos++;
      end
      for (int r = 0; r < 5; r++) cw[1 << r] = chk[r];
      cw[0] = ^cw;
      for (int j = 0; j < N; j++) code[j*IL + w] = cw[j];
    end
    return code;
  endfunction

endpackage
