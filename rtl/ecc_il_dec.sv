// ecc_il_dec: decoder and corrector of the bit-interleaved SECDED code of
// ecc_il_enc.
//
// The stored word is split back into its IL Hamming words (bit j of word w
// sits at position j*IL + w). For each word the syndrome is the XOR of the
// positions of all set bits, and the overall parity is the XOR of all bits:
//   syndrome 0, parity even   no error
//   parity odd                single error at position "syndrome" (0 means
//                             the overall parity bit itself): corrected
//   syndrome != 0, parity even, or a syndrome that points past the word:
//                             uncorrectable (two or more errors)
// The payload is reassembled from the corrected words. corrected_o is set
// when any word needed a correction, uncorrectable_o when any word could not
// be corrected (data_o is then not to be trusted).
//
// Purely combinational; its depth is what costs the iTLB its extra cycle.
module ecc_il_dec
  import rat_pkg::*;
#(
  parameter int unsigned K  = 62,
  parameter int unsigned IL = 4
) (
  input  logic [ecc_il_len(K, IL)-1:0] code_i,
  output logic [K-1:0]                 data_o,
  output logic                         corrected_o,
  output logic                         uncorrectable_o
);

  localparam int unsigned KW = (K + IL - 1) / IL;
  localparam int unsigned R  = ecc_r(KW);
  localparam int unsigned N  = KW + R + 1;

  always_comb begin
    logic [N-1:0]  cw;
    logic [R:0]    syn;  // one spare bit: a syndrome may point past N
    logic          par;
    int unsigned   di;
    data_o          = '0;
    corrected_o     = 1'b0;
    uncorrectable_o = 1'b0;
    for (int unsigned w = 0; w < IL; w++) begin
      for (int unsigned j = 0; j < N; j++) cw[j] = code_i[j*IL + w];
      syn = '0;
      for (int unsigned pos = 1; pos < N; pos++)
        if (cw[pos]) syn ^= (R+1)'(pos);
      par = ^cw;
      if (par) begin
        if (int'(syn) < N) begin
          for (int unsigned pos = 0; pos < N; pos++)
            if (int'(syn) == pos) cw[pos] = ~cw[pos];
          corrected_o = 1'b1;
        end else begin
          uncorrectable_o = 1'b1;
        end
      end else if (syn != '0) begin
        uncorrectable_o = 1'b1;
      end
      di = 0;
      for (int unsigned pos = 1; pos < N; pos++) begin
        if ((pos & (pos - 1)) != 0) begin
          if (di * IL + w < K) data_o[di*IL + w] = cw[pos];
          di++;
        end
      end
    end
  end

endmodule
