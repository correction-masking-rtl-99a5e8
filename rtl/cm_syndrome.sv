// cm_syndrome: syndrome computation of the correction masking decoder.
//
// Produces the r syndrome bits s = r . H^T of a received codeword, one
// cm_parity_check instance per bit, each fed with its own row of H and
// sharing no gates with the others (the "Parity check 1..r" blocks of the
// decoder). A fault-free codeword gives s = 0; a correctable error gives the
// syndrome of its pattern.
//
// Interface: codeword[N-1:0], bits 0..R-1 the check bits, R..N-1 the data
// bits; syndrome[R-1:0]. The code is chosen with CODE and K (see cm_pkg).
// Timing: combinational.
module cm_syndrome
  import cm_pkg::*;
#(
  parameter code_e       CODE = CODE_SEC_DED,
  parameter int unsigned K    = 32,
  localparam int unsigned R   = check_bits(CODE, K),
  localparam int unsigned N   = K + R
) (
  input  logic [N-1:0] codeword,
  output logic [R-1:0] syndrome
);

  localparam hmat_t H = build_h(CODE, K);

  // Row i of H: bit j is set when codeword bit j takes part in check i.
  function automatic logic [N-1:0] h_row(int unsigned i);
    logic [N-1:0] row;
    row = '0;
    for (int unsigned j = 0; j < N; j++)
      for (int unsigned b = 0; b < RMAX; b++)
        if (b == i) row[j] = H[j][b];
    return row;
  endfunction

  for (genvar i = 0; i < R; i++) begin : g_chk
    cm_parity_check #(
      .N   (N),
      .MASK(h_row(i))
    ) u_chk (
      .codeword(codeword),
      .s       (syndrome[i])
    );
  end

endmodule
