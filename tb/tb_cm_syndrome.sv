// tb_cm_syndrome: checks the syndrome computation for the default SEC-DED
// code and for the k = 16 BCH code: zero for encoded words, the pattern's
// syndrome for every single error, and the column-by-column reference for
// random words.
module tb_cm_syndrome;
  import cm_pkg::*;
  import cm_tb_pkg::*;

  localparam int unsigned K0 = 32, R0 = check_bits(CODE_SEC_DED, 32), N0 = K0 + R0;
  localparam int unsigned K1 = 16, R1 = check_bits(CODE_BCH_DEC, 16), N1 = K1 + R1;
  localparam hmat_t H0 = build_h(CODE_SEC_DED, 32);
  localparam hmat_t H1 = build_h(CODE_BCH_DEC, 16);

  logic [N0-1:0] cw0;
  logic [R0-1:0] s0;
  logic [N1-1:0] cw1;
  logic [R1-1:0] s1;
  int checks = 0, failures = 0;

  cm_syndrome                                 u0 (.codeword(cw0), .syndrome(s0));
  cm_syndrome #(.CODE(CODE_BCH_DEC), .K(16)) u1 (.codeword(cw1), .syndrome(s1));

  task automatic check(string what);
    col_t e0, e1;
    e0 = syn_of(H0, pat_t'(cw0), N0);
    e1 = syn_of(H1, pat_t'(cw1), N1);
    checks += 2;
    if (s0 !== e0[R0-1:0]) begin failures++; $display("FAIL %s secded cw=%h s=%h exp=%h", what, cw0, s0, e0); end
    if (s1 !== e1[R1-1:0]) begin failures++; $display("FAIL %s bch cw=%h s=%h exp=%h", what, cw1, s1, e1); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    col_t p0, p1;
    for (int t = 0; t < 50; t++) begin
      d = {$urandom, $urandom};
      p0 = encode(H0, d, K0, R0);
      p1 = encode(H1, d, K1, R1);
      cw0 = {d[K0-1:0], p0[R0-1:0]};
      cw1 = {d[K1-1:0], p1[R1-1:0]};
      #1;
      checks += 2;
      if (s0 !== '0) begin failures++; $display("FAIL secded codeword gives s=%h", s0); end
      if (s1 !== '0) begin failures++; $display("FAIL bch codeword gives s=%h", s1); end
      for (int j = 0; j < N0; j++) begin
        cw0 = {d[K0-1:0], p0[R0-1:0]} ^ (N0'(1) << j);
        cw1 = {d[K1-1:0], p1[R1-1:0]} ^ (N1'(1) << (j % N1));
        #1;
        check("single");
        checks++;
        if (s0 !== H0[j][R0-1:0]) begin failures++; $display("FAIL secded column %0d", j); end
      end
      cw0 = N0'({$urandom, $urandom});
      cw1 = N1'($urandom);
      #1;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
