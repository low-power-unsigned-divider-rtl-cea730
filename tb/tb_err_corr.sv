// tb_err_corr - exhaustive check of the OR-gate error correction for N = 8:
// values of 256 or more become 255, all others pass unchanged.
module tb_err_corr;
  logic [8:0] qs;
  logic [7:0] q;
  int checks = 0, failures = 0;

  err_corr #(.N(8)) dut (.qs(qs), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      qs = 9'(v);
      #1;
      checks++;
      if (int'(q) != ((v > 255) ? 255 : v)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %0d", v, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
