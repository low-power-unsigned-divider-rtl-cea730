// tb_seq_sqrt_core - sequential square root of 6-bit and 12-bit radicands:
// every radicand is rooted and compared with floor(sqrt(a)); valid must
// rise exactly W clock edges after the loading edge.
module tb_seq_sqrt_core;
  import aa_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [5:0]  a3;
  logic [2:0]  q3;
  logic [11:0] a6;
  logic [5:0]  q6;
  logic busy3, last3, valid3, busy6, last6, valid6;
  int checks = 0, failures = 0;

  seq_sqrt_core #(.W(3)) dut3 (.clk, .rst_n, .load, .a(a3), .busy(busy3),
                               .last(last3), .valid(valid3), .q(q3));
  seq_sqrt_core #(.W(6)) dut6 (.clk, .rst_n, .load, .a(a6), .busy(busy6),
                               .last(last6), .valid(valid6), .q(q6));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a3 = '0;
    a6 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 4096; v++) begin
      int cyc, v3, v6;
      @(negedge clk);
      a3 = 6'(v);
      a6 = 12'(v);
      load = 1'b1;
      @(posedge clk);
      @(negedge clk);
      load = 1'b0;
      a3 = '1;
      a6 = '1;
      cyc = 0;
      v3 = 0;
      v6 = 0;
      while (!valid6 && cyc < 20) begin
        if (valid3 && v3 == 0) v3 = cyc;
        @(negedge clk);
        cyc++;
      end
      v6 = cyc;
      checks += 2;
      if (v3 != 3 || v6 != 6) begin
        failures++;
        $display("FAIL latency W=3: %0d, W=6: %0d", v3, v6);
      end
      if ((v < 64 && longint'(q3) != ref_isqrt(v)) || longint'(q6) != ref_isqrt(v)) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt(%0d): %0d %0d", v, q3, q6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
