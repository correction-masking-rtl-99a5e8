// tb_cm_parity_check: checks one parity check equation against a bit-by-bit
// XOR of the selected codeword bits, for an all-ones and a sparse mask.
module tb_cm_parity_check;
  localparam int unsigned N = 39;
  localparam logic [N-1:0] M2 = 39'h55_A3C1_0F96;

  logic [N-1:0] cw;
  logic s1, s2;
  int checks = 0, failures = 0;

  cm_parity_check #(.N(N))           u1 (.codeword(cw), .s(s1));
  cm_parity_check #(.N(N), .MASK(M2)) u2 (.codeword(cw), .s(s2));

  function automatic logic ref_par(logic [N-1:0] v, logic [N-1:0] m);
    logic p = 1'b0;
    for (int j = 0; j < N; j++) if (m[j] && v[j]) p = ~p;
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      cw = N'({$urandom, $urandom});
      if (t < N) cw = N'(1) << t;
      #1;
      checks += 2;
      if (s1 !== ref_par(cw, '1)) begin failures++; $display("FAIL all-ones mask cw=%h", cw); end
      if (s2 !== ref_par(cw, M2)) begin failures++; $display("FAIL sparse mask cw=%h", cw); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
