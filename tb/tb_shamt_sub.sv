// tb_shamt_sub - exhaustive check of the shift-amount subtractor of the
// 16/8 divider (K = 3) and of the 32/16 divider (K = 10).
module tb_shamt_sub;
  logic [3:0]        la;
  logic [2:0]        lb;
  logic signed [4:0] sh;
  logic [4:0]        la2;
  logic [3:0]        lb2;
  logic signed [5:0] sh2;
  int checks = 0, failures = 0;

  shamt_sub #(.N(8),  .K(3))  dut  (.la(la),  .lb(lb),  .sh(sh));
  shamt_sub #(.N(16), .K(10)) dut2 (.la(la2), .lb(lb2), .sh(sh2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 16; j++) begin
        la  = 4'(i);
        lb  = 3'(j);
        la2 = 5'(i);
        lb2 = 4'(j);
        #1;
        if (i < 16 && j < 8) begin
          checks++;
          if (int'(sh) != i - j - 3) begin
            failures++;
            $display("FAIL %0d-%0d-3: %0d", i, j, sh);
          end
        end
        checks++;
        if (int'(sh2) != i - j - 10) begin
          failures++;
          $display("FAIL %0d-%0d-10: %0d", i, j, sh2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
