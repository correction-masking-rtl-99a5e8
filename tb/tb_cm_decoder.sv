// tb_cm_decoder: end-to-end test of the decoder at its default parameters
// (odd-weight SEC-DED, k = 32).
//
// For random data words it checks, against the original data:
//   * the error-free word passes unchanged;
//   * every correctable error pattern (here every single error) is corrected,
//     whether it hits a data bit or only a check bit;
//   * a transient in the pattern comparison (e forced to a random non-zero
//     value while the word is correct) is masked by corr_en;
//   * a transient in one parity check (one syndrome bit forced to one while
//     the word is correct) raises corr_en but flips no data bit.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_cm_decoder;
  import cm_pkg::*;
  import cm_tb_pkg::*;

  localparam code_e       CODE = CODE_SEC_DED;
  localparam int unsigned K    = 32;
  localparam int unsigned R    = check_bits(CODE, K);
  localparam int unsigned N    = K + R;
  localparam hmat_t       H    = build_h(CODE, K);
  localparam int          WORDS = 200;

  logic [K-1:0] din, dout;
  logic [R-1:0] pin;
  int checks = 0, failures = 0;
  int n_clean = 0, n_data_corr = 0, n_parity_only = 0, n_mask_e = 0, n_mask_s = 0;

  cm_decoder dut (.data_in(din), .parity_in(pin), .data_out(dout));

  task automatic expect_data(logic [K-1:0] d, string what);
    checks++;
    if (dout !== d) begin
      failures++;
      $display("FAIL %s: data=%h out=%h", what, d, dout);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pat_t q[$];
    logic [K-1:0] d;
    logic [R-1:0] p;
    logic [N-1:0] cw;
    logic [K-1:0] fe;
    logic [R-1:0] fs;
    col_t pp;
    all_patterns(CODE, N, q);
    for (int w = 0; w < WORDS; w++) begin
      d  = (w == 0) ? '0 : (w == 1) ? '1 : K'({$urandom, $urandom});
      pp = encode(H, 64'(d), K, R);
      p  = pp[R-1:0];
      din = d; pin = p;
      #1;
      expect_data(d, "clean word");
      n_clean++;
      foreach (q[i]) begin
        cw = {d, p} ^ N'(q[i]);
        {din, pin} = cw;
        #1;
        expect_data(d, "correctable error");
        if ((q[i] >> R) != '0) n_data_corr++; else n_parity_only++;
      end
      // transient in the pattern comparison of a correct word
      din = d; pin = p;
      for (int t = 0; t < 4; t++) begin
        fe = K'({$urandom, $urandom}) | (K'(1) << ((w + t) % K));
        force dut.e = fe;
        #1;
        expect_data(d, "SET on e");
        checks++;
        if (dut.corr_en !== 1'b0) begin failures++; $display("FAIL corr_en set on correct word"); end
        n_mask_e++;
        release dut.e;
      end
      // transient in one parity check of a correct word
      for (int b = 0; b < int'(R); b++) begin
        fs = R'(1) << b;
        force dut.s = fs;
        #1;
        expect_data(d, "SET on one syndrome bit");
        checks++;
        if (dut.corr_en !== 1'b1) begin failures++; $display("FAIL corr_en not raised"); end
        n_mask_s++;
        release dut.s;
      end
      #1;
    end
    $display("clean=%0d data_corrections=%0d parity_only=%0d masked_e=%0d masked_s=%0d",
             n_clean, n_data_corr, n_parity_only, n_mask_e, n_mask_s);
    if (n_clean == 0)       begin failures++; $display("FAIL no clean word"); end
    if (n_data_corr == 0)   begin failures++; $display("FAIL no data correction"); end
    if (n_parity_only == 0) begin failures++; $display("FAIL no check bit error"); end
    if (n_mask_e == 0)      begin failures++; $display("FAIL no masked comparison SET"); end
    if (n_mask_s == 0)      begin failures++; $display("FAIL no masked syndrome SET"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
