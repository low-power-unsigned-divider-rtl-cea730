// tb_sub_cell - exhaustive check of the restoring subtractor cell against
// x - y - bin computed as an integer.
module tb_sub_cell;
  logic x, y, bin, q, bout, r;
  int checks = 0, failures = 0;

  sub_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int diff;
      {x, y, bin, q} = 4'(v);
      #1;
      diff = int'(x) - int'(y) - int'(bin);
      checks++;
      if (bout !== (diff < 0) || r !== (q ? diff[0] : x)) begin
        failures++;
        $display("FAIL x=%0d y=%0d bin=%0d q=%0d: bout=%0d r=%0d", x, y, bin, q, bout, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
