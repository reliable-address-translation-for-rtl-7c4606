// ecc_il_enc: encoder of the bit-interleaved SECDED code that protects iTLB
// entries.
//
// The K payload bits are dealt round-robin over IL check words: payload bit i
// goes to word i % IL. Each word is a Hamming code with one extra overall
// parity bit (single error correct, double error detect). The stored code
// word places bit j of word w at position j*IL + w, so physically adjacent
// cells always belong to different words: a burst of up to IL adjacent upset
// cells costs each word at most one bit and is corrected; a burst of up to
// 2*IL cells is detected.
//
// Inside a word the Hamming layout is the classic one: position 0 is the
// overall parity, positions that are powers of two hold check bits and the
// rest hold data bits in ascending order.
//
// Purely combinational. The choice of interleaved SECDED as the "strong
// code" and the interleave degree are this design's; only the need for a
// code that corrects spatial multi-bit upsets comes from the scheme.
module ecc_il_enc
  import rat_pkg::*;
#(
  parameter int unsigned K  = 62,  // payload bits
  parameter int unsigned IL = 4    // interleave degree
) (
  input  logic [K-1:0]                       data_i,
  output logic [ecc_il_len(K, IL)-1:0]   code_o
);

  // bits of payload per word, check bits per word, bits per word
  localparam int unsigned KW = (K + IL - 1) / IL;
  localparam int unsigned R  = ecc_r(KW);
  localparam int unsigned N  = KW + R + 1;

  always_comb begin
    logic [KW-1:0] d;
    logic [N-1:0]  cw;
    int unsigned   di;
    logic          p;
    code_o = '0;
    for (int unsigned w = 0; w < IL; w++) begin
      d = '0;
      for (int unsigned j = 0; j < KW; j++)
        if (j * IL + w < K) d[j] = data_i[j*IL + w];
      cw = '0;
      di = 0;
      for (int unsigned pos = 1; pos < N; pos++) begin
        if ((pos & (pos - 1)) != 0) begin
          cw[pos] = d[di];
          di++;
        end
      end
      for (int unsigned r = 0; r < R; r++) begin
        p = 1'b0;
        for (int unsigned pos = 1; pos < N; pos++)
          if (((pos >> r) & 1) != 0 && pos != (1 << r)) p ^= cw[pos];
        cw[1 << r] = p;
      end
      cw[0] = ^cw[N-1:1];
      for (int unsigned j = 0; j < N; j++) code_o[j*IL + w] = cw[j];
    end
  end

endmodule
