// tb_array_div - exhaustive check of the 8/4 restoring array divider over
// every non-overflowing input (a[7:4] < b), plus random 12/6 divisions,
// against integer division.
module tb_array_div;
  logic [7:0]  a;
  logic [3:0]  b, q, r;
  logic [11:0] a6;
  logic [5:0]  b6, q6, r6;
  int checks = 0, failures = 0;

  array_div #(.W(4)) dut  (.a(a),  .b(b),  .q(q),  .r(r));
  array_div #(.W(6)) dut6 (.a(a6), .b(b6), .q(q6), .r(r6));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bv = 1; bv < 16; bv++)
      for (int av = 0; av < 256; av++) begin
        if ((av >> 4) >= bv) continue;
        a = 8'(av);
        b = 4'(bv);
        #1;
        checks++;
        if (int'(q) != av / bv || int'(r) != av % bv) begin
          failures++;
          if (failures < 10) $display("FAIL %0d/%0d: q=%0d r=%0d", av, bv, q, r);
        end
      end
    for (int i = 0; i < 20000; i++) begin
      b6 = 6'($urandom_range(63, 1));
      a6 = 12'($urandom % (int'(b6) * 64));
      #1;
      checks++;
      if (int'(q6) != int'(a6) / int'(b6) || int'(r6) != int'(a6) % int'(b6)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d: q=%0d r=%0d", a6, b6, q6, r6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
