// tb_cm_corr_en: corr_en must be one exactly when the syndrome is non-zero.
module tb_cm_corr_en;
  localparam int unsigned R = 7;
  logic [R-1:0] s;
  logic en;
  int checks = 0, failures = 0;

  cm_corr_en #(.R(R)) dut (.syndrome(s), .corr_en(en));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << R); v++) begin
      s = R'(v);
      #1;
      checks++;
      if (en !== (v != 0)) begin failures++; $display("FAIL s=%h en=%b", s, en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
