// tb_prune - checks the pruning circuit for every 16-bit operand, once with
// its true leading position and once with that position made odd (as the
// SQR circuit uses it), against x * 2^(OUT_W-1-lead) floored.
module tb_prune;
  import aa_ref_pkg::*;
  logic [15:0] x;
  logic [3:0]  lead, lead_odd;
  logic [5:0]  xp, xp_odd;
  logic [7:0]  xb;
  logic [2:0]  leadb;
  logic [2:0]  xpb;
  int checks = 0, failures = 0;

  prune #(.IN_W(16), .OUT_W(6)) dut  (.x(x), .lead(lead), .xp(xp));
  prune #(.IN_W(16), .OUT_W(6)) dut2 (.x(x), .lead(lead_odd), .xp(xp_odd));
  prune #(.IN_W(8),  .OUT_W(3)) dutb (.x(xb), .lead(leadb), .xp(xpb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      x        = 16'(v);
      lead     = 4'(ref_lead(x));
      lead_odd = lead | 4'd1;
      xb       = 8'(v);
      leadb    = 3'(ref_lead(xb));
      #1;
      checks += 3;
      if (longint'(xp) != ref_prune(x, int'(lead), 6)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h xp=%h", x, xp);
      end
      if (longint'(xp_odd) != ref_prune(x, int'(lead_odd), 6)) begin
        failures++;
        if (failures < 10) $display("FAIL odd x=%h xp=%h", x, xp_odd);
      end
      if (longint'(xpb) != ref_prune(xb, int'(leadb), 3)) begin
        failures++;
        if (failures < 10) $display("FAIL b x=%h xp=%h", xb, xpb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
