// tb_cm_pattern_compare: for each of the five codes at k = 16 and for the
// default SEC-DED k = 32 configuration, feeds the syndrome of every
// correctable error pattern and expects e to be the data part of that
// pattern; a zero syndrome and every one-hot syndrome (a check bit error)
// must give e = 0.
module tb_cm_pattern_compare;
  import cm_pkg::*;
  import cm_tb_pkg::*;

  localparam int NCFG = 6;
  int checks = 0, failures = 0;
  logic [NCFG-1:0] done = '0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam code_e       CODE = (c == 5) ? CODE_SEC_DED : code_e'(c);
    localparam int unsigned K    = (c == 5) ? 32 : 16;
    localparam int unsigned R    = check_bits(CODE, K);
    localparam int unsigned N    = K + R;
    localparam hmat_t       H    = build_h(CODE, K);

    logic [R-1:0] s;
    logic [K-1:0] e;

    if (c == 5) begin : g_dut
      cm_pattern_compare dut (.syndrome(s), .e(e));
    end else begin : g_dut
      cm_pattern_compare #(.CODE(CODE), .K(K)) dut (.syndrome(s), .e(e));
    end

    initial begin
      pat_t q[$];
      col_t sy;
      logic [K-1:0] exp;
      all_patterns(CODE, N, q);
      #(c);
      for (int r = -1; r < int'(R); r++) begin
        s = (r < 0) ? '0 : (R'(1) << r);
        #10;
        checks++;
        if (e !== '0) begin failures++; $display("FAIL cfg%0d s=%h gives e=%h", c, s, e); end
      end
      foreach (q[i]) begin
        sy = syn_of(H, q[i], N);
        s = sy[R-1:0];
        exp = K'(q[i] >> R);
        #10;
        checks++;
        if (e !== exp) begin
          failures++;
          $display("FAIL cfg%0d pattern=%h s=%h e=%h exp=%h", c, q[i], s, e, exp);
        end
      end
      done[c] = 1'b1;
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
