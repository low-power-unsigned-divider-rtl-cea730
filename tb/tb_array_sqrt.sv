// tb_array_sqrt - exhaustive check of the 6-bit and 12-bit restoring array
// square-root circuits: q = floor(sqrt(a)) and r = a - q^2.
module tb_array_sqrt;
  import aa_ref_pkg::*;
  logic [5:0]  a;
  logic [2:0]  q;
  logic [3:0]  r;
  logic [11:0] a6;
  logic [5:0]  q6;
  logic [6:0]  r6;
  int checks = 0, failures = 0;

  array_sqrt #(.W(3)) dut  (.a(a),  .q(q),  .r(r));
  array_sqrt #(.W(6)) dut6 (.a(a6), .q(q6), .r(r6));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      a  = 6'(v);
      a6 = 12'(v);
      #1;
      if (v < 64) begin
        checks++;
        if (longint'(q) != ref_isqrt(a) || int'(r) != int'(a) - int'(q) * int'(q)) begin
          failures++;
          $display("FAIL sqrt(%0d): q=%0d r=%0d", a, q, r);
        end
      end
      checks++;
      if (longint'(q6) != ref_isqrt(a6) || int'(r6) != int'(a6) - int'(q6) * int'(q6)) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt(%0d): q=%0d r=%0d", a6, q6, r6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
