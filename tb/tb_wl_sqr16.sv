// tb_wl_sqr16 - error characteristics of the 16-bit approximate SQR circuit
// over all 65536 radicands, for pruned radicand widths 2K = 6, 8, 10, 12.
// Checks, per width, that the maximum error distance equals 2^(8-K)-1 and
// that the error rate, NMED (mean error distance over 255) and MRED (mean
// relative error distance, radicand 0 excluded) match the reference values
// 95.71/91.14/82.30/65.82 %, 5.33/2.53/1.16/0.48 % and 7.98/3.80/1.72/0.69 %
// to within 0.01 percentage points (rounding of the printed values).
module tb_wl_sqr16;
  import aa_ref_pkg::*;
  logic [15:0] a;
  logic [7:0]  q [4];
  int checks = 0, failures = 0;

  const real ER_REF   [4] = '{95.71, 91.14, 82.30, 65.82};
  const real NMED_REF [4] = '{5.33, 2.53, 1.16, 0.48};
  const real MRED_REF [4] = '{7.98, 3.80, 1.72, 0.69};

  aasr #(.N(8), .K(3), .USE_LUT(1'b1)) d3 (.a(a), .q(q[0]));
  aasr #(.N(8), .K(4), .USE_LUT(1'b1)) d4 (.a(a), .q(q[1]));
  aasr #(.N(8), .K(5), .USE_LUT(1'b0)) d5 (.a(a), .q(q[2]));
  aasr #(.N(8), .K(6), .USE_LUT(1'b0)) d6 (.a(a), .q(q[3]));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  errs [4];
    int  edmax [4];
    real sed [4];
    real sred [4];
    for (int j = 0; j < 4; j++) begin
      errs[j] = 0; edmax[j] = 0; sed[j] = 0.0; sred[j] = 0.0;
    end
    for (int v = 0; v < 65536; v++) begin
      int exact;
      a = 16'(v);
      #1;
      exact = int'(ref_isqrt(v));
      for (int j = 0; j < 4; j++) begin
        int ed;
        ed = exact - int'(q[j]);
        if (ed < 0) ed = -ed;
        if (ed != 0) errs[j]++;
        if (ed > edmax[j]) edmax[j] = ed;
        sed[j] += real'(ed);
        if (v > 0) sred[j] += real'(ed) / real'(exact);
      end
    end
    for (int j = 0; j < 4; j++) begin
      real er, nmed, mred;
      er   = 100.0 * errs[j] / 65536.0;
      nmed = 100.0 * sed[j] / 65536.0 / 255.0;
      mred = 100.0 * sred[j] / 65535.0;
      $display("AASR-%0d: ER %6.2f%%  NMED %5.2f%%  MRED %5.2f%%  ED_max %0d",
               2 * (j + 3), er, nmed, mred, edmax[j]);
      checks += 4;
      if (edmax[j] != (1 << (5 - j)) - 1) begin
        failures++; $display("FAIL ED_max");
      end
      if (er - ER_REF[j] > 0.01 || ER_REF[j] - er > 0.01) begin
        failures++; $display("FAIL ER, reference %0.2f", ER_REF[j]);
      end
      if (nmed - NMED_REF[j] > 0.01 || NMED_REF[j] - nmed > 0.01) begin
        failures++; $display("FAIL NMED, reference %0.2f", NMED_REF[j]);
      end
      if (mred - MRED_REF[j] > 0.01 || MRED_REF[j] - mred > 0.01) begin
        failures++; $display("FAIL MRED, reference %0.2f", MRED_REF[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
