// tb_aasr_seq - sequential approximate SQR circuits: the 16-bit AASR_S with
// a 6-bit core (K = 3) must finish in K+2 = 5 cycles, as must the 32-bit
// AASR_S-6; every 16-bit radicand and random 32-bit radicands are compared
// with the arithmetic model.
module tb_aasr_seq;
  import aa_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        start;
  logic [15:0] a8;
  logic [7:0]  q8;
  logic [31:0] a16;
  logic [15:0] q16;
  logic busy8, done8, busy16, done16;
  int checks = 0, failures = 0;

  aasr_seq #(.N(8), .K(3)) dut8 (.clk, .rst_n, .start, .a(a8),
                                 .busy(busy8), .done(done8), .q(q8));
  aasr_seq #(.N(16), .K(3)) dut16 (.clk, .rst_n, .start, .a(a16),
                                   .busy(busy16), .done(done16), .q(q16));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; a8 = 0; a16 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 65536; v++) begin
      int c8, c16;
      logic [31:0] av16;
      av16 = $urandom >> ($urandom % 32);
      @(negedge clk);
      a8 = 16'(v); a16 = av16; start = 1'b1;
      @(posedge clk);
      @(negedge clk);
      start = 1'b0;
      a8 = '1; a16 = '1;
      c8 = 0; c16 = 0;
      for (int c = 0; c < 20 && (c8 == 0 || c16 == 0); c++) begin
        if (done8)  c8 = c;
        if (done16) c16 = c;
        if (c8 == 0 || c16 == 0) @(negedge clk);
      end
      checks += 3;
      if (c8 != 5 || c16 != 5) begin
        failures++;
        $display("FAIL latency %0d %0d", c8, c16);
      end
      if (longint'(q8) != ref_aasr(v, 3)) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt(%0d): %0d", v, q8);
      end
      if (longint'(q16) != ref_aasr(av16, 3)) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt(%0d): %0d", av16, q16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
