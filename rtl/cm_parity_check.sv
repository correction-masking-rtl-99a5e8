// cm_parity_check: one parity check equation of the syndrome computation.
//
// Computes one syndrome bit s_i = r . H(i)^T, the XOR of the codeword bits
// selected by row i of the parity check matrix (MASK). The decoder builds one
// instance per syndrome bit and the instances share no logic, so a single
// event transient inside one of them can corrupt at most that one syndrome
// bit. Keeping the instances apart through synthesis is what makes the
// decoder tolerant; the module therefore asks the synthesis tool to keep its
// hierarchy.
//
// Interface: codeword (N bits, bit j = codeword bit j) in, s out.
// Timing: purely combinational, an N-input XOR tree at most.
(* keep_hierarchy *)
module cm_parity_check #(
  parameter int unsigned N = 39,
  parameter logic [N-1:0] MASK = '1
) (
  input  logic [N-1:0] codeword,
  output logic         s
);

  assign s = ^(codeword & MASK);

endmodule
