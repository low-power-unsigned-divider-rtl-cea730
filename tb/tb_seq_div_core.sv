// tb_seq_div_core - sequential 8/4 divider: every non-overflowing input is
// divided and compared with integer division; valid must rise exactly
// W = 4 clock edges after the loading edge, with 'last' high only in the
// cycle before it.
module tb_seq_div_core;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [2*W-1:0] a;
  logic [W-1:0]   b, q;
  logic busy, last, valid;
  int checks = 0, failures = 0;

  seq_div_core #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    b = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int bv = 1; bv < 16; bv++)
      for (int av = 0; av < 256; av++) begin
        int cyc, lasts;
        if ((av >> 4) >= bv) continue;
        @(negedge clk);
        a = 8'(av);
        b = 4'(bv);
        load = 1'b1;
        @(posedge clk);
        @(negedge clk);
        load = 1'b0;
        a = '1;            // operands must have been captured
        b = '0;
        cyc = 0;          // clock edges after the loading edge
        lasts = 0;
        while (!valid && cyc < 20) begin
          if (last) lasts++;
          @(negedge clk);
          cyc++;
        end
        checks += 2;
        if (cyc != W || lasts != 1) begin
          failures++;
          $display("FAIL latency %0d (last seen %0d times)", cyc, lasts);
        end
        if (int'(q) != av / bv) begin
          failures++;
          if (failures < 10) $display("FAIL %0d/%0d: q=%0d", av, bv, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
