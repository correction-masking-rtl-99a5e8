// tb_cm_masked_correction: data bits flip where e is set only while corr_en
// is one; with corr_en zero the data passes unchanged whatever e holds.
module tb_cm_masked_correction;
  localparam int unsigned K = 32;
  logic [K-1:0] d, e, q;
  logic en;
  int checks = 0, failures = 0;

  cm_masked_correction #(.K(K)) dut (.data_in(d), .e(e), .corr_en(en), .data_out(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] exp;
    for (int t = 0; t < 400; t++) begin
      d  = $urandom;
      e  = (t % 3 == 0) ? (K'(1) << (t % K)) : $urandom;
      en = t[0];
      #1;
      for (int i = 0; i < K; i++) exp[i] = en ? (d[i] != e[i]) : d[i];
      checks++;
      if (q !== exp) begin failures++; $display("FAIL d=%h e=%h en=%b q=%h", d, e, en, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
