// tb_aaxd_signed - signed 32/16 approximate divider (K = 10): random
// operands of every sign combination; the result must equal the unsigned
// model applied to the magnitudes, negated when exactly one operand is
// negative.
module tb_aaxd_signed;
  import aa_ref_pkg::*;
  logic [31:0] a;
  logic [15:0] b;
  logic [16:0] q;
  int checks = 0, failures = 0;
  int negs = 0;

  aaxd_signed #(.N(16), .K(10)) dut (.a(a), .b(b), .q(q));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100000; i++) begin
      longint am, bm, expq;
      logic [31:0] sgn;
      bm = longint'($urandom_range(32767, 1)) >> ($urandom % 15);
      if (bm == 0) bm = 1;
      am = (longint'($urandom) % (bm * 65536)) >> ($urandom % 20);
      if (am > 32'h7FFF_FFFF) am = 32'h7FFF_FFFF;
      expq = longint'(ref_aaxd(am, bm, 16, 10));
      sgn = $urandom;
      a = sgn[9]  ? 32'(-am) : 32'(am);
      b = sgn[20] ? 16'(-bm) : 16'(bm);
      if (a[31] ^ b[15]) expq = -expq;
      #1;
      checks++;
      if (longint'(signed'(q)) != expq) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d: %0d expected %0d", signed'(a), signed'(b), signed'(q), expq);
      end
      if (q[16]) negs++;
    end
    checks++;
    if (negs == 0) begin
      failures++;
      $display("FAIL no negative quotient produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
