// cm_decoder: SET tolerant syndrome decoder using correction masking.
//
// Decodes a memory word (K data bits, R check bits) of a single or burst
// error correcting code and outputs the corrected data. A plain syndrome
// decoder computes the syndrome, compares it with the correctable patterns
// and XORs the resulting error vector e into the data. A transient in that
// logic while the word is correct would flip data bits. This decoder adds
// two things:
//   * the syndrome bits come from independent parity check blocks
//     (cm_syndrome), so one transient corrupts at most one syndrome bit, and
//     a one-hot syndrome only ever names a check bit;
//   * corr_en, the OR of the syndrome bits (cm_corr_en), gates the error
//     vector (cm_masked_correction), so with a zero syndrome no bit is
//     corrected whatever the pattern comparison (cm_pattern_compare) says.
// With at most one event per cycle (an upset in the word or a transient in
// the decoder, not both), the output is always the correct data.
// The four-stage structure and the masking equations are those of the
// correction masking technique; the code matrices, the codeword bit order
// and the default configuration are choices of this implementation.
//
// Parameters: CODE selects the code family, K the data width (16, 32 or
// 64); the number of check bits R follows from them (cm_pkg::check_bits).
// The default, a (39,32) odd-weight-column SEC-DED code, is one of the
// evaluated configurations.
// Interface: data_in = d_1..d_k (bit 0 = d_1), parity_in = p_1..p_r,
// data_out = corrected data. Timing: purely combinational, no clock.
module cm_decoder
  import cm_pkg::*;
#(
  parameter code_e       CODE = CODE_SEC_DED,
  parameter int unsigned K    = 32,
  localparam int unsigned R   = check_bits(CODE, K)
) (
  input  logic [K-1:0] data_in,
  input  logic [R-1:0] parity_in,
  output logic [K-1:0] data_out
);

  logic [R-1:0] s;
  logic [K-1:0] e;
  logic         corr_en;

  cm_syndrome #(.CODE(CODE), .K(K)) u_syndrome (
    .codeword({data_in, parity_in}),
    .syndrome(s)
  );

  cm_pattern_compare #(.CODE(CODE), .K(K)) u_compare (
    .syndrome(s),
    .e       (e)
  );

  cm_corr_en #(.R(R)) u_corr_en (
    .syndrome(s),
    .corr_en (corr_en)
  );

  cm_masked_correction #(.K(K)) u_correct (
    .data_in (data_in),
    .e       (e),
    .corr_en (corr_en),
    .data_out(data_out)
  );

endmodule
