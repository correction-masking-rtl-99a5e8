// cm_corr_en: correction enable of the correction masking decoder.
//
// corr_en = s_1 + s_2 + ... + s_r, an r-input OR of the syndrome bits. It is
// one exactly when the syndrome is non-zero, i.e. when the word read from
// memory is in error. Under the single event assumption a transient in the
// decoder can only occur while the input word is correct, so corr_en is then
// zero (or has been raised by a single corrupted syndrome bit, which points
// at a check bit) and no data bit is flipped.
//
// Interface: syndrome[R-1:0] in, corr_en out. Timing: combinational.
module cm_corr_en #(
  parameter int unsigned R = 7
) (
  input  logic [R-1:0] syndrome,
  output logic         corr_en
);

  assign corr_en = |syndrome;

endmodule
