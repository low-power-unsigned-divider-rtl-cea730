// tb_aasr - exhaustive check of the 16-bit approximate SQR circuit with a
// 6-bit core, array (AASR_A) and lookup-table (AASR_T) versions, against
// the arithmetic model; also checks that the result never exceeds the exact
// root, that the error distance stays within 2^(n-k)-1 = 31, and that
// radicands below 2^6 are rooted exactly.
module tb_aasr;
  import aa_ref_pkg::*;
  localparam int N = 8, K = 3;
  logic [15:0] a;
  logic [7:0]  qa, qt;
  int checks = 0, failures = 0;

  aasr #(.N(N), .K(K), .USE_LUT(1'b0)) dut_a (.a(a), .q(qa));
  aasr #(.N(N), .K(K), .USE_LUT(1'b1)) dut_t (.a(a), .q(qt));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      longint unsigned exp_q, exact;
      a = 16'(v);
      #1;
      exp_q = ref_aasr(v, K);
      exact = ref_isqrt(v);
      checks += 3;
      if (longint'(qa) != exp_q || longint'(qt) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt(%0d): array %0d lut %0d expected %0d", v, qa, qt, exp_q);
      end
      if (longint'(qa) > exact || exact - longint'(qa) > 31) begin
        failures++;
        if (failures < 10) $display("FAIL bound sqrt(%0d): %0d exact %0d", v, qa, exact);
      end
      if (v < 64 && longint'(qa) != exact) begin
        failures++;
        $display("FAIL small sqrt(%0d): %0d", v, qa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
