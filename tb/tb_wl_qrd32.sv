// tb_wl_qrd32 - the 32/16 divider with a 20-bit pruned dividend (K = 10)
// and the 32-bit SQR circuit with a 6-bit core (K = 3), the sizes used for
// QR decomposition in image reconstruction. Random operands spread over all
// magnitudes; each result must match the arithmetic model and stay within
// the analytical error bounds: divider ED <= 126, SQR ED <= 2^13-1 with the
// result never above the exact root.
module tb_wl_qrd32;
  import aa_ref_pkg::*;
  logic [31:0] a, s;
  logic [15:0] b, q, r;
  int checks = 0, failures = 0;
  longint unsigned dbound;
  longint dmax = 0, smax = 0;

  aaxd #(.N(16), .K(10))                  u_div  (.a(a), .b(b), .q(q));
  aasr #(.N(16), .K(3), .USE_LUT(1'b1))   u_sqrt (.a(s), .q(r));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dbound = div_ed_bound(16, 10);
    for (int i = 0; i < 300000; i++) begin
      longint bm, am, ed, ex;
      bm = longint'($urandom_range(65535, 1)) >> ($urandom % 16);
      if (bm == 0) bm = 1;
      am = (longint'($urandom) % (bm * 65536)) >> ($urandom % 32);
      a = 32'(am);
      b = 16'(bm);
      s = $urandom >> ($urandom % 32);
      #1;
      checks += 4;
      if (longint'(q) != ref_aaxd(am, bm, 16, 10)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d: %0d", am, bm, q);
      end
      ex = am / bm;
      ed = (ex > longint'(q)) ? ex - longint'(q) : longint'(q) - ex;
      if (ed > dmax) dmax = ed;
      if (ed > longint'(dbound)) begin
        failures++;
        $display("FAIL divider bound %0d/%0d: %0d", am, bm, q);
      end
      if (longint'(r) != ref_aasr(s, 3)) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt(%0d): %0d", s, r);
      end
      ex = longint'(ref_isqrt(s));
      if (longint'(r) > ex || ex - longint'(r) > 8191) begin
        failures++;
        $display("FAIL sqrt bound (%0d): %0d", s, r);
      end
      if (ex - longint'(r) > smax) smax = ex - longint'(r);
    end
    $display("INFO AAXD-20 ED_max %0d (bound %0d), AASR-6 ED_max %0d (bound 8191)", dmax, dbound, smax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
