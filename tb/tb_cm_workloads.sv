// tb_cm_workloads: runs the decoder in every evaluated configuration, the
// five code families (SEC-DED, SEC-DAEC, 3-bit burst, 4-bit burst, BCH DEC)
// at k = 16, 32 and 64 data bits.
//
// For each configuration and a few random data words it applies every
// correctable error pattern of the code (exhaustively) and expects the
// original data back, and injects transients into the pattern comparison
// (forced e) and into each parity check (one forced syndrome bit) of a
// correct word, expecting no data bit to change. For the SEC-DED codes it
// also applies every double error and expects no data bit to be flipped.
module tb_cm_workloads;
  import cm_pkg::*;
  import cm_tb_pkg::*;

  localparam int NCFG  = 15;
  localparam int WORDS = 3;
  int checks = 0, failures = 0;
  int n_data_corr = 0, n_parity_only = 0, n_mask_e = 0, n_mask_s = 0, n_double = 0;
  logic [NCFG-1:0] done = '0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam code_e       CODE = code_e'(c % 5);
    localparam int unsigned K    = (c < 5) ? 16 : (c < 10) ? 32 : 64;
    localparam int unsigned R    = check_bits(CODE, K);
    localparam int unsigned N    = K + R;
    localparam hmat_t       H    = build_h(CODE, K);

    logic [K-1:0] din, dout;
    logic [R-1:0] pin;

    cm_decoder #(.CODE(CODE), .K(K)) dut (.data_in(din), .parity_in(pin), .data_out(dout));

    initial begin
      pat_t q[$];
      logic [K-1:0] d;
      logic [R-1:0] p;
      col_t pp;
      all_patterns(CODE, N, q);
      #(c);
      for (int w = 0; w < WORDS; w++) begin
        d  = K'({$urandom, $urandom});
        pp = encode(H, 64'(d), K, R);
        p  = pp[R-1:0];
        foreach (q[i]) begin
          {din, pin} = {d, p} ^ N'(q[i]);
          #20;
          checks++;
          if (dout !== d) begin
            failures++;
            $display("FAIL %s k=%0d pattern=%h out=%h exp=%h", CODE.name(), K, q[i], dout, d);
          end
          if ((q[i] >> R) != '0) n_data_corr++; else n_parity_only++;
        end
        // SEC-DED: a double error has an even-weight syndrome, matches no
        // column and must leave the word as read (detected, not corrected)
        if (CODE == CODE_SEC_DED) begin
          for (int a = 0; a < int'(N); a++)
            for (int b = a + 1; b < int'(N); b++) begin
              logic [N-1:0] err;
              err = (N'(1) << a) | (N'(1) << b);
              {din, pin} = {d, p} ^ err;
              #20;
              checks++;
              if (dout !== din) begin
                failures++;
                $display("FAIL SEC-DED k=%0d double error %0d,%0d miscorrected", K, a, b);
              end
              n_double++;
            end
        end
        din = d; pin = p;
        for (int t = 0; t < 8; t++) begin
          force dut.e = K'({$urandom, $urandom}) | K'(1);
          #20;
          checks++;
          if (dout !== d) begin failures++; $display("FAIL %s k=%0d SET on e not masked", CODE.name(), K); end
          n_mask_e++;
          release dut.e;
        end
        for (int b = 0; b < int'(R); b++) begin
          force dut.s = R'(1) << b;
          #20;
          checks++;
          if (dout !== d) begin failures++; $display("FAIL %s k=%0d SET on s%0d corrupts data", CODE.name(), K, b + 1); end
          n_mask_s++;
          release dut.s;
        end
        #20;
      end
      $display("%-13s k=%0d r=%0d: %0d correctable patterns", CODE.name(), K, R, q.size());
      done[c] = 1'b1;
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    $display("data_corrections=%0d parity_only=%0d masked_e=%0d masked_s=%0d double_detected=%0d",
             n_data_corr, n_parity_only, n_mask_e, n_mask_s, n_double);
    if (n_data_corr == 0 || n_parity_only == 0 || n_mask_e == 0 || n_mask_s == 0 || n_double == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
