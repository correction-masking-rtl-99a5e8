// cm_pattern_compare: pattern comparison of the syndrome decoder.
//
// Compares the syndrome with the syndrome of every correctable error pattern
// and raises e_i for each data bit i that the matching pattern covers. For
// each data bit the module holds one equality comparator per correctable
// pattern that contains that bit, and ORs their results:
//   SEC-DED        the single error on the bit;
//   SEC-DAEC/burst every burst of at most 1..4 adjacent codeword bits that
//                  contains the bit (bursts may reach into the check bits);
//   BCH DEC        the single error on the bit and its pairing with every
//                  other codeword bit.
// Errors confined to check bits raise no e_i. The block is not protected:
// a transient inside it can raise any e_i, which is why the decoder masks
// its output with corr_en. The technique fixes only what this block must do;
// the comparator-per-pattern structure is this implementation's choice.
//
// Interface: syndrome[R-1:0] in, e[K-1:0] out (e[i] for data bit d_(i+1)).
// Timing: combinational, one comparator level and an OR tree.
module cm_pattern_compare
  import cm_pkg::*;
#(
  parameter code_e       CODE = CODE_SEC_DED,
  parameter int unsigned K    = 32,
  localparam int unsigned R   = check_bits(CODE, K),
  localparam int unsigned N   = K + R
) (
  input  logic [R-1:0] syndrome,
  output logic [K-1:0] e
);

  localparam hmat_t       H  = build_h(CODE, K);
  localparam int unsigned B  = burst_len(CODE);
  localparam int unsigned NM = (B > 0) ? (1 << (B - 1)) : 1;

  for (genvar i = 0; i < K; i++) begin : g_bit
    localparam int unsigned C = R + i;  // codeword position of data bit i
    if (B > 0) begin : g_burst
      // candidate bursts: last bit at C + d, lower bits chosen by mask m
      logic [B*NM-1:0] hit;
      for (genvar d = 0; d < B; d++) begin : g_end
        for (genvar m = 0; m < NM; m++) begin : g_mask
          localparam int unsigned J    = C + d;
          localparam bit          INCL = (J < N) &&
                                         ((d == 0) || (((m >> (d - 1)) & 1) == 1));
          localparam col_t        SYN  = (J < N) ? burst_syn(H, J, m) : '0;
          if (INCL) begin : g_cmp
            assign hit[d*NM+m] = (syndrome == SYN[R-1:0]);
          end else begin : g_none
            assign hit[d*NM+m] = 1'b0;
          end
        end
      end
      assign e[i] = |hit;
    end else begin : g_pair
      // single error on C, or C together with any other codeword bit j
      logic [N-1:0] hit;
      for (genvar j = 0; j < N; j++) begin : g_other
        localparam col_t SYN = (j == C) ? H[C] : (H[C] ^ H[j]);
        assign hit[j] = (syndrome == SYN[R-1:0]);
      end
      assign e[i] = |hit;
    end
  end

endmodule
