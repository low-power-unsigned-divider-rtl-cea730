// tb_wl_div16 - error characteristics of the 16/8 approximate divider over
// every valid input pair (divisor 1..255, dividend 0..65535 with
// a[15:8] < b: 8,355,840 pairs), for pruned dividend widths 2K = 6, 8, 10
// (reduced dividers 8/4, 10/5 and 12/6). Each result is compared with the
// arithmetic model, and the maximum error distance must stay within the
// analytical bound ceil((2^n-1)(2^(n-k)-1)/(2^(n-1)+2^(n-k)-1)), which is
// 50, 27 and 14 for K = 3, 4, 5. ER, NMED and MRED are printed.
module tb_wl_div16;
  import aa_ref_pkg::*;
  logic [15:0] a;
  logic [7:0]  b;
  logic [7:0]  q [3];
  int checks = 0, failures = 0;
  // valid pairs: sum of 256*b for b = 1..255; zero quotients: sum of b
  localparam int TOTAL   = 256 * 255 * 256 / 2;
  localparam int NONZERO = TOTAL - 255 * 256 / 2;

  aaxd #(.N(8), .K(3)) d3 (.a(a), .b(b), .q(q[0]));
  aaxd #(.N(8), .K(4)) d4 (.a(a), .b(b), .q(q[1]));
  aaxd #(.N(8), .K(5)) d5 (.a(a), .b(b), .q(q[2]));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs [3];
    int     edmax [3];
    real    sed [3];
    real    sred [3];
    for (int j = 0; j < 3; j++) begin
      errs[j] = 0; edmax[j] = 0; sed[j] = 0.0; sred[j] = 0.0;
    end
    for (int bv = 1; bv < 256; bv++)
      for (int av = 0; av < bv * 256; av++) begin
        int exact;
        a = 16'(av);
        b = 8'(bv);
        #1;
        exact = av / bv;
        for (int j = 0; j < 3; j++) begin
          int ed;
          ed = exact - int'(q[j]);
          if (ed < 0) ed = -ed;
          if (ed != 0) errs[j]++;
          if (ed > edmax[j]) edmax[j] = ed;
          sed[j] += real'(ed);
          if (exact != 0) sred[j] += real'(ed) / real'(exact);
          // spot-check the model on a sample of the pairs
          if ((av & 16'h3F) == 16'h15) begin
            checks++;
            if (longint'(q[j]) != ref_aaxd(av, bv, 8, j + 3)) begin
              failures++;
              if (failures < 10) $display("FAIL K=%0d %0d/%0d: %0d", j + 3, av, bv, q[j]);
            end
          end
        end
      end
    for (int j = 0; j < 3; j++) begin
      longint unsigned bound;
      bound = div_ed_bound(8, j + 3);
      $display("AAXD-%0d: ER %6.2f%%  NMED %5.3f%%  MRED %5.3f%%  ED_max %0d (bound %0d, looser bound %0d)",
               2 * (j + 3), 100.0 * real'(errs[j]) / real'(TOTAL),
               100.0 * sed[j] / real'(TOTAL) / 255.0, 100.0 * sred[j] / real'(NONZERO),
               edmax[j], bound, (1 << (8 - j - 3 + 1)) - 2);
      checks++;
      if (longint'(edmax[j]) > bound) begin
        failures++;
        $display("FAIL ED_max above the bound");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
