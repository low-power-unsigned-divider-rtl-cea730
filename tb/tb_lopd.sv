// tb_lopd - exhaustive check of the 16-bit leading one position detector
// (and a 32-bit instance on random values) against a logarithm loop.
module tb_lopd;
  import aa_ref_pkg::*;
  logic [15:0] x;
  logic [3:0]  pos;
  logic [31:0] x32;
  logic [4:0]  pos32;
  int checks = 0, failures = 0;

  lopd #(.W(16)) dut   (.x(x),   .pos(pos));
  lopd #(.W(32)) dut32 (.x(x32), .pos(pos32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      x = 16'(v);
      x32 = {$urandom} >> ($urandom % 32);
      #1;
      checks += 2;
      if (int'(pos) != ref_lead(x)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h pos=%0d", x, pos);
      end
      if (int'(pos32) != ref_lead(x32)) begin
        failures++;
        if (failures < 10) $display("FAIL x32=%h pos=%0d", x32, pos32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
