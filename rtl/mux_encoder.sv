// MUX-based thermometer-to-binary encoder: turns a (2^N_BITS-1)-bit
// thermometer code therm[2^N_BITS-1:1] into the N_BITS-bit count of its 1s,
// using nothing but 2:1 multiplexers and a binary search.
//
// The MSB is the centre bit of the code, therm[2^(N_BITS-1)]: it is 1 when
// more than half of the code is 1. Each half is then searched the same way.
// Bit k is the centre bit of the part of the code that the bits above it
// have selected, i.e. therm[{bin[N_BITS-1:k+1], 1'b1, k'b0}]. It is built as
// a tree of 2^(N_BITS-1-k)-1 muxes over the candidates
// therm[(2m+1)*2^k], m = 0 .. 2^(N_BITS-1-k)-1: the first level of the tree
// is steered by the MSB, the next by bin[N_BITS-2], and so on down to
// bin[k+1]. For N_BITS = 3 this gives exactly the three-mux 7-to-3 encoder:
// B2 = T4, B1 = B2 ? T6 : T2, B0 = B1 ? (B2 ? T7 : T3) : (B2 ? T5 : T1).
// The total mux count is sum_{i=1}^{N_BITS-1} (2^(N_BITS-i) - 1). All of this
// follows the document; which mux input is taken for a select of 1 (the
// upper half) follows from the meaning of the code.
//
// The encoder assumes a valid thermometer code; a bubble that reaches it
// can give a wrong output, which is why the BEC stage comes first.
// Interface: therm in, bin out. Timing: purely combinational, the MSB
// after no gate and bit k after N_BITS-1-k mux levels on top of bit k+1.
module mux_encoder #(
  parameter int unsigned N_BITS = 6
) (
  input  logic [(1 << N_BITS) - 1:1] therm,
  output logic [N_BITS-1:0]          bin
);

  assign bin[N_BITS-1] = therm[1 << (N_BITS - 1)];

  for (genvar k = 0; k < N_BITS - 1; k++) begin : g_bit
    localparam int unsigned L = N_BITS - 1 - k;   // mux levels for this bit
    localparam int unsigned C = 1 << L;           // candidate inputs

    // node[j][m]: output m of level j; level 0 holds the candidates.
    logic [C-1:0] node [L+1];

    for (genvar m = 0; m < C; m++) begin : g_cand
      assign node[0][m] = therm[(2 * m + 1) << k];
    end

    for (genvar j = 1; j <= L; j++) begin : g_level
      // Level j is steered by bin[N_BITS-j] and halves the candidates.
      for (genvar m = 0; m < (1 << (L - j)); m++) begin : g_mux
        mux2 u_mux (
          .d0  (node[j-1][m]),
          .d1  (node[j-1][m + (1 << (L - j))]),
          .sel (bin[N_BITS-j]),
          .y   (node[j][m])
        );
      end
      // Unused upper bits of the level's vector.
      for (genvar m = (1 << (L - j)); m < C; m++) begin : g_pad
        assign node[j][m] = 1'b0;
      end
    end

    assign bin[k] = node[L][0];
  end

endmodule
