// cm_masked_correction: masked correction stage of the decoder.
//
// d_i_corr = d_i xor (e_i and corr_en): a data bit is flipped only when the
// pattern comparison flags it and corr_en says the syndrome is non-zero. The
// AND gates are the masking added by the technique; the XOR gates are the
// correction of a plain syndrome decoder. The gates of this stage are meant
// to be built from hardened cells, as a voter of a triplicated design would
// be.
//
// Interface: data_in[K-1:0], e[K-1:0], corr_en in; data_out[K-1:0] out.
// Timing: combinational, one AND and one XOR level.
module cm_masked_correction #(
  parameter int unsigned K = 32
) (
  input  logic [K-1:0] data_in,
  input  logic [K-1:0] e,
  input  logic         corr_en,
  output logic [K-1:0] data_out
);

  logic [K-1:0] flip;

  assign flip     = e & {K{corr_en}};
  assign data_out = data_in ^ flip;

  // With a zero syndrome nothing may be corrected, whatever e holds.
  always_comb begin
    if (!corr_en) assert (data_out == data_in) else $error("correction without corr_en");
  end

endmodule
