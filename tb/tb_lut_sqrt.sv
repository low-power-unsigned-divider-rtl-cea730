// tb_lut_sqrt - exhaustive check of the 6-bit and 12-bit lookup-table
// square-root circuits: q*q <= a < (q+1)*(q+1).
module tb_lut_sqrt;
  logic [5:0]  a;
  logic [2:0]  q;
  logic [11:0] a6;
  logic [5:0]  q6;
  int checks = 0, failures = 0;

  lut_sqrt #(.W(3)) dut  (.a(a),  .q(q));
  lut_sqrt #(.W(6)) dut6 (.a(a6), .q(q6));

  function automatic bit is_root(int x, int r);
    return (r * r <= x) && ((r + 1) * (r + 1) > x);
  endfunction

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
        if (!is_root(v, int'(q))) begin
          failures++;
          $display("FAIL sqrt(%0d): q=%0d", v, q);
        end
      end
      checks++;
      if (!is_root(v, int'(q6))) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt(%0d): q=%0d", v, q6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
