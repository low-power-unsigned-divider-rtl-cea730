// tb_aaxd_seq - sequential approximate dividers: the 16/8 AAXD_S with a
// 6-bit pruned dividend (K = 3) must finish in K+3 = 6 cycles and the
// 32/16 AAXD_S-20 (K = 10) in 13 cycles; results are compared with the
// arithmetic model. busy must cover the whole operation and start is
// ignored while busy.
module tb_aaxd_seq;
  import aa_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        s8, s16;
  logic [15:0] a8;
  logic [7:0]  b8, q8, q8c;
  logic [31:0] a16;
  logic [15:0] b16, q16;
  logic busy8, done8, busy16, done16;
  int checks = 0, failures = 0;

  aaxd_seq #(.N(8), .K(3)) dut8 (.clk, .rst_n, .start(s8), .a(a8), .b(b8),
                                 .busy(busy8), .done(done8), .q(q8));
  aaxd_seq #(.N(16), .K(10)) dut16 (.clk, .rst_n, .start(s16), .a(a16), .b(b16),
                                    .busy(busy16), .done(done16), .q(q16));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s8 = 0; s16 = 0; a8 = 0; b8 = 1; a16 = 0; b16 = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      int c8, c16;
      logic [15:0] av8;
      logic [7:0]  bv8;
      logic [31:0] av16;
      logic [15:0] bv16;
      bv8  = 8'($urandom_range(255, 1) >> ($urandom % 8));
      if (bv8 == 0) bv8 = 8'd1;
      av8  = 16'($urandom % (int'(bv8) * 256)) >> ($urandom % 16);
      bv16 = 16'($urandom_range(65535, 1) >> ($urandom % 16));
      if (bv16 == 0) bv16 = 16'd1;
      av16 = 32'(longint'($urandom) % (longint'(bv16) * 65536)) >> ($urandom % 32);
      @(negedge clk);
      a8 = av8; b8 = bv8; a16 = av16; b16 = bv16;
      s8 = 1'b1; s16 = 1'b1;
      @(posedge clk);
      @(negedge clk);
      // a second start while busy must be ignored
      a8 = '1; b8 = 8'd1; a16 = '1; b16 = 16'd1;
      c8 = 0; c16 = 0;
      while (!done16 && c16 < 40) begin
        if (done8 && c8 == 0 && c16 > 0) begin
          c8 = c16;
          q8c = q8;
        end
        @(negedge clk);
        c16++;
      end
      s8 = 1'b0; s16 = 1'b0;
      checks += 4;
      if (c8 != 6) begin
        failures++;
        $display("FAIL 16/8 latency %0d", c8);
      end
      if (c16 != 13) begin
        failures++;
        $display("FAIL 32/16 latency %0d", c16);
      end
      if (longint'(q8c) != ref_aaxd(av8, bv8, 8, 3)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d: %0d", av8, bv8, q8c);
      end
      if (longint'(q16) != ref_aaxd(av16, bv16, 16, 10)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d: %0d", av16, bv16, q16);
      end
      // the held start relaunches both units; let them finish
      @(negedge clk);
      while (busy8 || busy16) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
