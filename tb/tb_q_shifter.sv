// tb_q_shifter - checks the bidirectional shifter of the 16/8 divider for
// every 4-bit quotient and every shift amount from -16 to 15: the result is
// qd * 2^sh (floored), with qs[8] set whenever that value reaches 2^8.
module tb_q_shifter;
  logic [3:0]        qd;
  logic signed [4:0] sh;
  logic [8:0]        qs;
  int checks = 0, failures = 0;

  q_shifter #(.N(8), .K(3)) dut (.qd(qd), .sh(sh), .qs(qs));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++)
      for (int s = -16; s < 16; s++) begin
        longint val;
        qd = 4'(v);
        sh = 5'(s);
        #1;
        val = (s >= 0) ? longint'(v) * (longint'(1) << s) : longint'(v) / (longint'(1) << -s);
        checks++;
        if (int'(qs[7:0]) != int'(val % 256) || qs[8] !== (val >= 256)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d sh %0d: qs=%h", v, s, qs);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
